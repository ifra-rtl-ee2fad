// tb_ifra_top: end-to-end run of the IFRA recording hardware at its default
// size (64 instructions in flight, 8-bit IDs, 24 recorders of 1,024
// entries, 400-cycle soft retirement gap).
//
// A behavioural model of a 4-way out-of-order core lives in this testbench:
// random fetch bundles, decode and dispatch stages with random stalls,
// dispatch into a 64-entry issue queue and reorder buffer (stalling when
// either is full), random out-of-order issue to 2 ALUs, 2 multipliers,
// 2 branch units and 2 load/store units of different latencies, in-order
// commit of up to 4 instructions, and mispredicted branches that flush the
// pipeline when they commit. The model keeps its own copy of every
// instruction's ID, computed from the ID scheme (consecutive mod 256, jump
// to Y+129 after a flush caused by ID Y), and from what it drives it builds
// the list of entries every recorder must hold (instruction entries, idle
// runs split at 255, nothing while recording is paused).
//
// Timeline: normal running; a TLB miss and, 40 cycles later, its refill
// (soft pause); a stretch with commits held back for more than 400 cycles
// (short retirement gap: soft pause, resumed at the next commit); more
// running until every recorder has wrapped; finally a load/store with
// address 0, the null-pointer hard post-trigger, which halts recording.
// The whole scan chain (about 502,000 bits) is then shifted out and every
// recorder's write pointer, full flag and live entries are compared bit by
// bit with the model, as is the commit recorder. Each mechanism (flush,
// both stalls, full-queue stall, out-of-order issue, both soft pauses, the
// hard stop, idle compaction, recorder wrap) is counted and must occur.
module tb_ifra_top;
  import ifra_pkg::*;

  localparam int N    = 64;
  localparam int D    = 1024;
  localparam int IDW  = 8;
  localparam int QIW  = 6;
  localparam int NW   = 4;
  localparam int NF   = 8;
  localparam int NREC = 24;
  localparam int AW   = 10;
  localparam int SG   = 400;

  int checks = 0, failures = 0;

  // ---------------- DUT
  logic clk = 0, rst_n = 0;
  logic [NW-1:0]     fe_valid;
  logic [PC_W-1:0]   fe_pc        [NW];
  logic              dec_stall;
  logic [DECODE_AUX_W-1:0] dec_info [NW];
  logic              dis_stall;
  logic [PREG_W-1:0] dis_rd [NW], dis_rs1 [NW], dis_rs2 [NW];
  logic [QIW-1:0]    dis_iq_idx [NW], dis_rob_idx [NW];
  logic [NW-1:0]     iss_valid;
  logic [QIW-1:0]    iss_iq_idx [NW];
  fu_e               iss_fu     [NW];
  logic [DATA_W-1:0] iss_opa [NW], iss_opb [NW];
  logic [NF-1:0]     fu_done;
  logic [DATA_W-1:0] fu_result [NF];
  logic [ADDR_W-1:0] lsu_addr  [N_LSU];
  logic [NW-1:0]     cmt_valid;
  logic [QIW-1:0]    cmt_rob_idx [NW];
  logic              flush;
  logic [QIW-1:0]    flush_rob_idx;
  logic              array_err, arith_err, exception, os_segfault, tlb_miss, tlb_refill;
  logic              recording, soft_pause, halt;
  trig_cause_t       trig_cause;
  logic              cmt_id_valid;
  logic [IDW-1:0]    cmt_youngest_id;
  logic              scan_en, scan_in, scan_out;

  ifra_top dut (.*);

  always #5 clk = ~clk;

  // ---------------- core model
  typedef struct {
    int          id;
    logic [31:0] pc;
    logic [3:0]  dinfo;
    logic [6:0]  rd, rs1, rs2;
    int          cls;        // 0 ALU, 1 MUL, 2 BR, 3 LSU
    logic [63:0] opa, opb, res;
    logic [31:0] addr;
    bit          mispred;
    int          robi;
    int          seq;
  } ins_t;

  bit   dec_v [NW], dis_v [NW];
  ins_t dec_s [NW], dis_s [NW];
  bit   iq_v [N];
  ins_t iq   [N];
  ins_t rob  [N];
  bit   rob_done [N];
  int   rob_head, rob_cnt;
  ins_t fuq  [NF][$];
  int   furem[NF][$];
  int   next_id, seq_no;

  // ---------------- expected recorder contents
  logic [63:0] E [NREC][$];
  bit          r_open [NREC];
  int          r_cnt  [NREC];
  int          exw    [NREC];   // aux width per recorder
  bit          m_cv;
  int          m_cid;

  // ---------------- mechanism counters
  int n_flush, n_dec_stall, n_dis_stall, n_full_stall, n_ooo, n_tlb_pause, n_gap_pause;
  int n_hard, n_idle, n_sat, n_wrap, n_commit, n_issue;

  function automatic int fu_of(int cls, int pick);
    return cls * 2 + pick;
  endfunction

  function automatic logic [63:0] ent(bit idle, int f, logic [63:0] aux, int xw);
    return (64'(idle) << (IDW + xw)) | (64'(f) << xw) | (idle ? 64'd0 : aux);
  endfunction

  task automatic rstep(int r, bit rec, bit v, int id, logic [63:0] aux);
    if (rec) begin
      if (v) begin
        if (r_open[r]) begin E[r].push_back(ent(1, r_cnt[r], 0, exw[r])); r_open[r] = 0; end
        E[r].push_back(ent(0, id, aux, exw[r]));
      end else if (!r_open[r]) begin
        r_open[r] = 1; r_cnt[r] = 1; n_idle++;
      end else if (r_cnt[r] == 255) begin
        E[r].push_back(ent(1, 255, 0, exw[r])); r_cnt[r] = 1; n_sat++;
      end else r_cnt[r]++;
    end else if (r_open[r]) begin
      E[r].push_back(ent(1, r_cnt[r], 0, exw[r])); r_open[r] = 0;
    end
  endtask

  function automatic ins_t new_ins();
    ins_t i;
    i.id      = next_id;
    next_id   = (next_id + 1) % (4 * N);
    i.pc      = $urandom;
    i.dinfo   = 4'($urandom);
    i.rd      = 7'($urandom);
    i.rs1     = 7'($urandom);
    i.rs2     = 7'($urandom);
    i.cls     = $urandom_range(0, 3);
    i.opa     = {$urandom, $urandom};
    i.opb     = {$urandom, $urandom};
    i.res     = {$urandom, $urandom};
    i.addr    = $urandom | 32'h10;          // never zero
    i.mispred = (i.cls == 2) && ($urandom_range(0, 3) == 0);
    i.robi    = 0;
    i.seq     = seq_no++;
    return i;
  endfunction

  task automatic drive_idle();
    fe_valid = '0; dec_stall = 0; dis_stall = 0; iss_valid = '0; fu_done = '0;
    cmt_valid = '0; flush = 0; flush_rob_idx = '0;
    array_err = 0; arith_err = 0; exception = 0; os_segfault = 0; tlb_miss = 0; tlb_refill = 0;
    for (int w = 0; w < NW; w++) begin
      fe_pc[w] = '0; dec_info[w] = '0; dis_rd[w] = '0; dis_rs1[w] = '0; dis_rs2[w] = '0;
      dis_iq_idx[w] = '0; dis_rob_idx[w] = '0; iss_iq_idx[w] = '0; iss_fu[w] = FU_ALU0;
      iss_opa[w] = '0; iss_opb[w] = '0; cmt_rob_idx[w] = '0;
    end
    for (int f = 0; f < NF; f++) fu_result[f] = '0;
    for (int l = 0; l < N_LSU; l++) lsu_addr[l] = 32'h100;
  endtask

  // one clock cycle of the core model; returns after the rising edge
  task automatic cycle(int c, bit block_commit, bit final_trig, output bit trig_done);
    bit   rec;
    int   ncm;
    bit   do_flush;
    int   flush_idx;
    ins_t fetched [NW];
    bit   fet_v [NW];
    bit   fu_used [NF];
    ins_t issued [NW];
    int   iss_unit [NW];
    int   n_iss;
    int   done_f [NF];
    int   cand [$];
    int   free_iq [$];
    int   need, rob_free;
    bit   fu_fire [NF];
    int   y;
    trig_done = 0;
    rec = recording;
    drive_idle();

    // ---- commit (and flush)
    ncm = 0; do_flush = 0; flush_idx = 0;
    if (!block_commit) begin
      while (ncm < NW && ncm < rob_cnt && rob_done[(rob_head + ncm) % N]) begin
        ins_t ci = rob[(rob_head + ncm) % N];
        cmt_valid[ncm]   = 1;
        cmt_rob_idx[ncm] = QIW'(ci.robi);
        if (rec) m_cid = ci.id;
        ncm++;
        if (ci.mispred) begin do_flush = 1; flush_idx = ci.robi; y = ci.id; break; end
      end
    end
    if (rec && ncm > 0) begin
      // commit recorder holds the youngest committed while recording
      m_cv = 1;
    end
    n_commit += ncm;

    if (do_flush) begin
      flush = 1; flush_rob_idx = QIW'(flush_idx);
      n_flush++;
      for (int r = 0; r < NREC; r++) rstep(r, rec, 0, 0, 0);
      @(posedge clk);
      // squash everything younger
      for (int w = 0; w < NW; w++) begin dec_v[w] = 0; dis_v[w] = 0; end
      for (int q = 0; q < N; q++) iq_v[q] = 0;
      for (int f = 0; f < NF; f++) begin fuq[f].delete(); furem[f].delete(); end
      rob_head = (rob_head + ncm) % N; rob_cnt = 0;
      next_id = (y + 2 * N + 1) % (4 * N);
      return;
    end

    // ---- execute completions
    for (int f = 0; f < NF; f++) begin
      fu_fire[f] = 0;
      if (fuq[f].size() > 0 && furem[f][0] == 0) begin
        ins_t xi = fuq[f][0];
        fu_fire[f]   = 1;
        fu_done[f]   = 1;
        fu_result[f] = xi.res;
        if (f >= 6) begin
          lsu_addr[f - 6] = xi.addr;
          if (final_trig) begin
            lsu_addr[f - 6] = '0; xi.addr = '0; trig_done = 1; final_trig = 0;
          end
        end
        if (f < 4)       rstep(16 + f, rec, 1, xi.id, 64'(xi.res % 7));
        else if (f < 6)  rstep(16 + f, rec, 1, xi.id, 0);
        else             rstep(16 + f, rec, 1, xi.id, (64'(xi.res % 7) << 32) | 64'(xi.addr));
      end else rstep(16 + f, rec, 0, 0, 0);
    end

    // ---- issue
    for (int f = 0; f < NF; f++) fu_used[f] = 0;
    for (int q = 0; q < N; q++) if (iq_v[q]) cand.push_back(q);
    cand.shuffle();
    n_iss = 0;
    foreach (cand[k]) begin
      ins_t ii = iq[cand[k]];
      int   u  = -1;
      if (n_iss == NW) break;
      if ($urandom_range(0, 9) < 4) continue;
      for (int p = 0; p < 2; p++) begin
        int f = fu_of(ii.cls, p);
        if (u < 0 && !fu_used[f] && fuq[f].size() < 8) u = f;
      end
      if (u < 0) continue;
      fu_used[u] = 1;
      iss_valid[n_iss]  = 1;
      iss_iq_idx[n_iss] = QIW'(cand[k]);
      iss_fu[n_iss]     = fu_e'(u);
      iss_opa[n_iss]    = ii.opa;
      iss_opb[n_iss]    = ii.opb;
      issued[n_iss]     = ii;
      iss_unit[n_iss]   = u;
      // out of order if an older instruction stays behind in the queue
      foreach (cand[j]) if (iq_v[cand[j]] && iq[cand[j]].seq < ii.seq) begin n_ooo++; break; end
      iq_v[cand[k]] = 0;                 // leaves the queue at this edge
      n_iss++;
    end
    n_issue += n_iss;
    for (int w = 0; w < NW; w++)
      if (w < n_iss) rstep(12 + w, rec, 1, issued[w].id,
                           (64'(issued[w].opa % 7) << 3) | 64'(issued[w].opb % 7));
      else           rstep(12 + w, rec, 0, 0, 0);

    // ---- dispatch
    need = 0;
    for (int w = 0; w < NW; w++) if (dis_v[w]) need++;
    for (int q = 0; q < N; q++) if (!iq_v[q] && !(q inside {cand}) ) free_iq.push_back(q);
    // entries issued this cycle are not reused in the same cycle
    rob_free = N - rob_cnt;
    dis_stall = ($urandom_range(0, 9) == 0);
    if (dis_stall) n_dis_stall++;
    else if (need > free_iq.size() || need > rob_free) begin dis_stall = 1; n_full_stall++; end
    free_iq.shuffle();
    for (int w = 0; w < NW; w++) begin
      bit lv = dis_v[w] && !dis_stall;
      if (lv) begin
        dis_rd[w] = dis_s[w].rd; dis_rs1[w] = dis_s[w].rs1; dis_rs2[w] = dis_s[w].rs2;
        dis_iq_idx[w]  = QIW'(free_iq.pop_front());
        dis_rob_idx[w] = QIW'((rob_head + rob_cnt) % N);
        dis_s[w].robi  = (rob_head + rob_cnt) % N;
        rob[dis_s[w].robi]      = dis_s[w];
        rob_done[dis_s[w].robi] = 0;
        rob_cnt++;
        iq[dis_iq_idx[w]]   = dis_s[w];
        rstep(8 + w, rec, 1, dis_s[w].id,
              (64'(dis_s[w].rd % 3) << 4) | (64'(dis_s[w].rs1 % 3) << 2) | 64'(dis_s[w].rs2 % 3));
      end else rstep(8 + w, rec, 0, 0, 0);
    end

    // ---- decode
    dec_stall = dis_stall || ($urandom_range(0, 9) == 0);
    if (dec_stall && !dis_stall) n_dec_stall++;
    for (int w = 0; w < NW; w++) begin
      bit lv = dec_v[w] && !dec_stall;
      if (lv) dec_info[w] = dec_s[w].dinfo;
      rstep(4 + w, rec, lv, dec_s[w].id, 64'(dec_s[w].dinfo));
    end

    // ---- fetch
    for (int w = 0; w < NW; w++) begin
      fet_v[w] = !dec_stall && ($urandom_range(0, 9) < 6);
      if (fet_v[w]) begin
        fetched[w]  = new_ins();
        fe_valid[w] = 1;
        fe_pc[w]    = fetched[w].pc;
      end
      rstep(w, rec, fet_v[w], fetched[w].id, 64'(fetched[w].pc));
    end

    @(posedge clk);

    // ---- state after the edge
    rob_head = (rob_head + ncm) % N; rob_cnt -= ncm;
    for (int f = 0; f < NF; f++) begin
      if (fu_fire[f]) begin
        rob_done[fuq[f][0].robi] = 1;
        void'(fuq[f].pop_front()); void'(furem[f].pop_front());
      end
      foreach (furem[f][k]) if (furem[f][k] > 0) furem[f][k]--;
    end
    for (int w = 0; w < n_iss; w++) begin
      int lat;
      case (issued[w].cls)
        1:       lat = 3;
        3:       lat = $urandom_range(1, 6);
        default: lat = 1;
      endcase
      fuq[iss_unit[w]].push_back(issued[w]);
      furem[iss_unit[w]].push_back(lat - 1);
    end
    for (int w = 0; w < NW; w++) iq_v[dis_iq_idx[w]] = iq_v[dis_iq_idx[w]] | (dis_v[w] && !dis_stall);
    if (!dis_stall)
      for (int w = 0; w < NW; w++) begin
        dis_v[w] = dec_v[w] && !dec_stall;
        dis_s[w] = dec_s[w];
      end
    if (!dec_stall)
      for (int w = 0; w < NW; w++) begin
        dec_v[w] = fet_v[w];
        dec_s[w] = fetched[w];
      end
  endtask

  // ---------------- scan-out and comparison
  int  ew [NREC];
  bit  cap [];

  function automatic logic [63:0] bits_at(int pos, int w);
    logic [63:0] v = '0;
    for (int i = 0; i < w; i++) v[i] = cap[pos + i];
    return v;
  endfunction

  initial begin
    #200ms;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int  total, pos, c;
    bit  tdone;
    bit  trig_done, final_trig;
    int  gap_start;
    for (int r = 0; r < NREC; r++) begin
      r_open[r] = 0; r_cnt[r] = 0;
      if (r < 4)        exw[r] = FETCH_AUX_W;
      else if (r < 8)   exw[r] = DECODE_AUX_W;
      else if (r < 12)  exw[r] = DISPATCH_AUX_W;
      else if (r < 16)  exw[r] = ISSUE_AUX_W;
      else if (r < 20)  exw[r] = EXEC_AUX_W;
      else if (r < 22)  exw[r] = BRANCH_AUX_W;
      else              exw[r] = LSU_AUX_W;
      ew[r] = 1 + IDW + exw[r];
    end
    for (int w = 0; w < NW; w++) begin dec_v[w] = 0; dis_v[w] = 0; end
    for (int q = 0; q < N; q++) begin iq_v[q] = 0; rob_done[q] = 0; end
    rob_head = 0; rob_cnt = 0; next_id = 0; seq_no = 0; m_cv = 0; m_cid = 0;
    n_flush = 0; n_dec_stall = 0; n_dis_stall = 0; n_full_stall = 0; n_ooo = 0;
    n_tlb_pause = 0; n_gap_pause = 0; n_hard = 0; n_idle = 0; n_sat = 0; n_wrap = 0;
    n_commit = 0; n_issue = 0;
    scan_en = 0; scan_in = 0;
    drive_idle();
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < NREC; r++) rstep(r, recording, 0, 0, 0);   // one empty cycle
    @(negedge clk);

    // ---- run
    gap_start = 1500;
    final_trig = 0; tdone = 0;
    c = 0;
    while (!tdone && c < 20000) begin
      bit blk;
      blk = (c >= gap_start && c < gap_start + SG + 60);
      if (c >= 4800) final_trig = 1;
      cycle(c, blk, final_trig, trig_done);
      if (trig_done) tdone = 1;
      // soft post-trigger stimulus, applied on its own cycles
      if (c == 700) begin
        @(negedge clk);
        drive_idle(); dec_stall = 1; dis_stall = 1; tlb_miss = 1;
        for (int r = 0; r < NREC; r++) rstep(r, recording, 0, 0, 0);
        @(posedge clk);
      end else if (c == 740) begin
        @(negedge clk);
        drive_idle(); dec_stall = 1; dis_stall = 1; tlb_refill = 1;
        if (soft_pause && !recording) n_tlb_pause++;
        for (int r = 0; r < NREC; r++) rstep(r, recording, 0, 0, 0);
        @(posedge clk);
      end
      @(negedge clk);
      if (soft_pause && blk) n_gap_pause += (c == gap_start + SG + 10);
      c++;
    end
    // after the hard post-trigger the core is halted
    drive_idle();
    checks++;
    if (!halt || recording || !trig_cause.null_addr) begin
      failures++; $display("FAIL hard trigger: halt %b rec %b cause %b", halt, recording, trig_cause);
    end else n_hard++;
    for (int r = 0; r < NREC; r++) rstep(r, 0, 0, 0, 0);
    repeat (4) @(negedge clk);
    $display("run: %0d cycles, %0d committed, %0d issued", c, n_commit, n_issue);

    // ---- scan out the whole chain
    total = IDW + 1;
    for (int r = 0; r < NREC; r++) total += AW + 1 + D * ew[r];
    cap = new[total];
    scan_en = 1;
    for (int b = 0; b < total; b++) begin
      cap[b] = scan_out;
      @(negedge clk);
    end
    scan_en = 0;
    $display("scanned %0d bits", total);

    // ---- compare, last recorder first
    pos = 0;
    for (int r = NREC - 1; r >= 0; r--) begin
      int t, bad;
      t = E[r].size();
      bad = 0;
      if (t >= D) n_wrap++;
      checks += 2;
      if (bits_at(pos, AW) != 64'(t % D)) begin
        failures++; $display("FAIL rec %0d wp %0d exp %0d", r, bits_at(pos, AW), t % D);
      end
      if (cap[pos + AW] != (t >= D)) begin
        failures++; $display("FAIL rec %0d full %b exp %b", r, cap[pos + AW], t >= D);
      end
      pos += AW + 1;
      for (int i = (t > D ? t - D : 0); i < t; i++) begin
        logic [63:0] g;
        g = bits_at(pos + (i % D) * ew[r], ew[r]);
        checks++;
        if (g != E[r][i]) begin
          failures++; bad++;
          if (bad < 4) $display("FAIL rec %0d entry %0d (addr %0d): %h exp %h", r, i, i % D, g, E[r][i]);
        end
      end
      pos += D * ew[r];
    end
    checks++;
    if (bits_at(pos, IDW + 1) != ((64'(m_cv) << IDW) | 64'(m_cid))) begin
      failures++; $display("FAIL commit recorder %h exp %b/%0d", bits_at(pos, IDW + 1), m_cv, m_cid);
    end

    $display("flush=%0d dec_stall=%0d dis_stall=%0d full_stall=%0d ooo_issue=%0d",
             n_flush, n_dec_stall, n_dis_stall, n_full_stall, n_ooo);
    $display("tlb_pause=%0d gap_pause=%0d hard_stop=%0d idle_runs=%0d idle_splits=%0d wrapped_recorders=%0d",
             n_tlb_pause, n_gap_pause, n_hard, n_idle, n_sat, n_wrap);
    if (n_flush == 0)      begin failures++; $display("FAIL no flush"); end
    if (n_dec_stall == 0)  begin failures++; $display("FAIL no decode stall"); end
    if (n_dis_stall == 0)  begin failures++; $display("FAIL no dispatch stall"); end
    if (n_full_stall == 0) begin failures++; $display("FAIL no full-queue stall"); end
    if (n_ooo == 0)        begin failures++; $display("FAIL no out-of-order issue"); end
    if (n_tlb_pause == 0)  begin failures++; $display("FAIL no TLB pause"); end
    if (n_gap_pause == 0)  begin failures++; $display("FAIL no retirement-gap pause"); end
    if (n_hard == 0)       begin failures++; $display("FAIL no hard stop"); end
    if (n_idle == 0)       begin failures++; $display("FAIL no idle runs"); end
    if (n_wrap == 0)       begin failures++; $display("FAIL no recorder wrapped"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
