// tb_recorder: two recorders on one scan chain, scan_in -> A -> B ->
// scan_out. A has 16 entries and 5 auxiliary bits, B has 8 entries and no
// auxiliary bits. Both see the same random stream of instructions, empty
// cycles (including a run longer than the 255-cycle count limit) and
// recording pauses. The expected buffer is built independently: the stream
// is turned into a list of entries (instruction entries, and one idle entry
// per run of empty cycles, split at 255), entry i lands at address
// i mod DEPTH, the write pointer is the entry count mod DEPTH and the full
// flag says whether the count reached DEPTH. After the stop the chain is
// shifted out one bit per clock and compared bit-exactly; the shift goes on
// for a second pass with scan_out looped back to scan_in, which must repeat
// the first pass (the chain is a plain shift register while scan_en stays
// high). Two episodes: one short (no wrap, full = 0) and one long (wrap,
// full = 1). Before them, a third recorder C (8 entries, 8 aux bits) is
// given the worked example of the recorder description: IDs 2, 5, 12, then
// 24 empty cycles, then ID 22. Its dump must show exactly those five entries,
// the idle one with count 24, and a write pointer of 5.
module tb_recorder;
  localparam int ID_W = 8;
  localparam int DA = 16, XA = 5;     // recorder A: depth, aux width
  localparam int DB = 8;              // recorder B: depth, no aux
  localparam int EWA = 1 + ID_W + XA, EWB = 1 + ID_W;
  localparam int AWA = $clog2(DA), AWB = $clog2(DB);
  localparam int LA = AWA + 1 + DA * EWA, LB = AWB + 1 + DB * EWB;
  int checks = 0, failures = 0;
  int n_idle = 0, n_sat = 0, n_pause = 0, n_wrap = 0;

  logic clk = 0, rst_n = 0, rec_en, in_valid, scan_en, scan_in, mid, scan_out;
  logic [ID_W-1:0] in_id;
  logic [XA-1:0]   in_aux;
  logic [AWA-1:0]  wpa;
  logic [AWB-1:0]  wpb;
  logic            fulla, fullb;

  recorder #(.ID_W(ID_W), .AUX_W(XA), .DEPTH(DA)) dut_a (
    .clk, .rst_n, .rec_en, .in_valid, .in_id, .in_aux,
    .scan_en, .scan_in, .scan_out(mid), .wr_ptr(wpa), .full(fulla));
  recorder #(.ID_W(ID_W), .AUX_W(0), .DEPTH(DB)) dut_b (
    .clk, .rst_n, .rec_en, .in_valid, .in_id, .in_aux(1'b0),
    .scan_en, .scan_in(mid), .scan_out, .wr_ptr(wpb), .full(fullb));

  // recorder C: the example buffer of the recorder figure (8-bit aux)
  logic       c_rec, c_valid, c_scan_en, c_scan_out;
  logic [7:0] c_id, c_aux;
  logic [2:0] c_wp;
  logic       c_full;
  recorder #(.ID_W(ID_W), .AUX_W(8), .DEPTH(8)) dut_c (
    .clk, .rst_n, .rec_en(c_rec), .in_valid(c_valid), .in_id(c_id), .in_aux(c_aux),
    .scan_en(c_scan_en), .scan_in(1'b0), .scan_out(c_scan_out), .wr_ptr(c_wp), .full(c_full));

  always #5 clk = ~clk;

  // IDs 2, 5, 12 (aux 0x22, 0x34, 0x2C), 24 empty cycles, ID 22 (aux 0x32):
  // entries {0,2,22} {0,5,34} {0,12,2C} {1,24,-} {0,22,32}
  task automatic figure_example();
    int          ids  [4] = '{2, 5, 12, 22};
    int          auxs [4] = '{'h22, 'h34, 'h2C, 'h32};
    logic [16:0] exp_e [5];
    logic [16:0] g;
    logic [3:0]  hdr = 4'b0101;           // wr_ptr = 5 LSB first, full = 0
    c_rec = 0; c_valid = 0; c_scan_en = 0; c_id = '0; c_aux = '0;
    rst_n = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    c_rec = 1;
    for (int k = 0; k < 3; k++) begin
      c_valid = 1; c_id = 8'(ids[k]); c_aux = 8'(auxs[k]);
      @(negedge clk);
    end
    c_valid = 0;
    repeat (24) @(negedge clk);
    c_valid = 1; c_id = 8'(ids[3]); c_aux = 8'(auxs[3]);
    @(negedge clk);
    c_valid = 0; c_rec = 0;
    repeat (2) @(negedge clk);
    exp_e[0] = {1'b0, 8'd2,  8'h22};
    exp_e[1] = {1'b0, 8'd5,  8'h34};
    exp_e[2] = {1'b0, 8'd12, 8'h2C};
    exp_e[3] = {1'b1, 8'd24, 8'h00};
    exp_e[4] = {1'b0, 8'd22, 8'h32};
    checks++;
    if (c_wp != 3'd5 || c_full) begin failures++; $display("FAIL figure example wp %0d full %0d", c_wp, c_full); end
    c_scan_en = 1;
    for (int b = 0; b < 4; b++) begin      // wr_ptr = 5 LSB first, then full = 0
      checks++;
      if (c_scan_out != hdr[b]) begin
        failures++; $display("FAIL figure example header bit %0d", b);
      end
      @(negedge clk);
    end
    for (int e = 0; e < 5; e++) begin
      for (int b = 0; b < 17; b++) begin
        g[b] = c_scan_out;
        @(negedge clk);
      end
      checks++;
      if (g != exp_e[e]) begin failures++; $display("FAIL figure example entry %0d: %h exp %h", e, g, exp_e[e]); end
    end
    c_scan_en = 0;
  endtask

  // ---------------- reference model
  logic [63:0] ea [$], eb [$];
  bit          open_r;
  int          cnt_r;
  logic [63:0] mem_a [DA], mem_b [DB];   // last known contents
  bit          known_a [DA], known_b [DB];

  function automatic logic [63:0] ent(input bit idle, input int f, input int aux, input int xw);
    return (64'(idle) << (ID_W + xw)) | (64'(f) << xw) | 64'(aux);
  endfunction

  task automatic push2(input bit idle, input int f, input int aux);
    ea.push_back(ent(idle, f, idle ? 0 : aux, XA));
    eb.push_back(ent(idle, f, 0, 0));
  endtask

  task automatic model_step(input bit rec, input bit v, input int id, input int aux);
    if (rec) begin
      if (v) begin
        if (open_r) begin push2(1, cnt_r, 0); open_r = 0; end
        push2(0, id, aux);
      end else if (!open_r) begin
        open_r = 1; cnt_r = 1; n_idle++;
      end else if (cnt_r == 255) begin
        push2(1, 255, 0); cnt_r = 1; n_sat++;
      end else cnt_r++;
    end else if (open_r) begin
      push2(1, cnt_r, 0); open_r = 0;
    end
  endtask

  // ---------------- scan and compare
  bit got  [LA + LB];
  bit got2 [LA + LB];

  // shift the chain twice without pausing, output looped back to input:
  // the second pass must repeat the first one bit for bit
  task automatic shift_all();
    scan_en = 1;
    for (int b = 0; b < 2 * (LA + LB); b++) begin
      if (b < LA + LB) got[b] = scan_out;
      else             got2[b - LA - LB] = scan_out;
      scan_in = scan_out;
      @(negedge clk);
    end
    scan_en = 0;
    scan_in = 0;
    @(negedge clk);
    for (int b = 0; b < LA + LB; b++) begin
      checks++;
      if (got2[b] != got[b]) begin failures++; $display("FAIL loop-back bit %0d", b); end
    end
  endtask

  function automatic logic [63:0] field(input int pos, input int w);
    logic [63:0] v = '0;
    for (int i = 0; i < w; i++) v[i] = got[pos + i];
    return v;
  endfunction

  task automatic compare(input string tag);
    int tA = ea.size(), tB = eb.size();
    int pos;
    // B comes out first
    pos = 0;
    checks += 2;
    if (field(pos, AWB) != 64'(tB % DB)) begin failures++; $display("FAIL %s B wp %0d exp %0d", tag, field(pos, AWB), tB % DB); end
    if (got[pos + AWB] != (tB >= DB)) begin failures++; $display("FAIL %s B full", tag); end
    pos += AWB + 1;
    for (int a = 0; a < DB; a++) begin
      if (known_b[a]) begin
        checks++;
        if (field(pos + a * EWB, EWB) != mem_b[a]) begin
          failures++; $display("FAIL %s B[%0d] %h exp %h", tag, a, field(pos + a * EWB, EWB), mem_b[a]);
        end
      end
    end
    pos = LB;
    checks += 2;
    if (field(pos, AWA) != 64'(tA % DA)) begin failures++; $display("FAIL %s A wp %0d exp %0d", tag, field(pos, AWA), tA % DA); end
    if (got[pos + AWA] != (tA >= DA)) begin failures++; $display("FAIL %s A full", tag); end
    pos += AWA + 1;
    for (int a = 0; a < DA; a++) begin
      if (known_a[a]) begin
        checks++;
        if (field(pos + a * EWA, EWA) != mem_a[a]) begin
          failures++; $display("FAIL %s A[%0d] %h exp %h", tag, a, field(pos + a * EWA, EWA), mem_a[a]);
        end
      end
    end
  endtask

  task automatic episode(input int cycles, input bit long_idle);
    ea.delete(); eb.delete(); open_r = 0; cnt_r = 0;
    rst_n = 0; rec_en = 0; in_valid = 0; scan_en = 0; scan_in = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < cycles; c++) begin
      bit pause;
      pause    = ((c / 37) % 5 == 4) && !(long_idle && c >= 100 && c < 700);
      rec_en   = !pause;
      in_valid = ($urandom_range(0, 9) < (((c / 50) % 2 != 0) ? 7 : 2));
      if (long_idle && c >= 100 && c < 700) in_valid = 0;   // > 255 empty cycles
      in_id    = ID_W'($urandom);
      in_aux   = XA'($urandom);
      if (pause) n_pause++;
      model_step(rec_en, in_valid, int'(in_id), int'(in_aux));
      @(negedge clk);
    end
    rec_en = 0; in_valid = 0;
    model_step(0, 0, 0, 0);
    repeat (3) @(negedge clk);
    // expected memory contents
    for (int i = 0; i < ea.size(); i++) begin mem_a[i % DA] = ea[i]; known_a[i % DA] = 1; end
    for (int i = 0; i < eb.size(); i++) begin mem_b[i % DB] = eb[i]; known_b[i % DB] = 1; end
    if (ea.size() >= DA) n_wrap++;
    // observation ports agree before scanning
    checks += 2;
    if (wpa != AWA'(ea.size() % DA) || fulla != (ea.size() >= DA)) begin failures++; $display("FAIL A ptr/full"); end
    if (wpb != AWB'(eb.size() % DB) || fullb != (eb.size() >= DB)) begin failures++; $display("FAIL B ptr/full"); end
    shift_all();
    compare("scan");
  endtask

  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < DA; a++) known_a[a] = 0;
    for (int a = 0; a < DB; a++) known_b[a] = 0;
    in_id = '0; in_aux = '0; rec_en = 0; in_valid = 0; scan_en = 0; scan_in = 0;
    figure_example();
    episode(6, 0);        // a few entries only, no wrap
    episode(1500, 1);     // many entries, long idle run, wraps
    $display("idle_runs=%0d saturations=%0d pause_cycles=%0d wraps=%0d", n_idle, n_sat, n_pause, n_wrap);
    if (n_idle == 0 || n_sat == 0 || n_pause == 0 || n_wrap == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
