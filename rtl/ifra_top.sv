// ifra_top: IFRA recording infrastructure of a 4-way superscalar core.
//
// IFRA (instruction footprint recording and analysis) helps find where an
// electrical bug struck in a processor during post-silicon validation,
// without reproducing the failure. While the chip runs, every instruction
// carries an instruction ID, and each pipeline stage drops a "footprint"
// (ID plus a few bits of auxiliary information) into a small circular
// recorder. When a failure is detected the recording stops and all recorders
// are scanned out for offline analysis against the program binary.
//
// This module holds the three kinds of added hardware and the ID plumbing
// that shadows the host core's pipeline. The host core itself is outside:
// its stage handshakes are the ports below.
//   id_assign        IDs for instructions leaving fetch (mod 4n, jump by
//                    2n+1 after a flush).
//   id_stage_reg x2  IDs of the decode and dispatch stages, same stall/flush
//                    as the instructions.
//   id_queue (issue) IDs beside the issue queue, written at dispatch, read at
//                    issue with the issue queue's own entry numbers.
//   id_queue (ROB)   IDs beside the reorder buffer, written at dispatch, read
//                    at commit and for the flush-causing instruction.
//   id_fifo x8       IDs inside each functional unit between issue and
//                    completion.
//   recorder x24     fetch (4, PC), decode (4, decode bits), dispatch (4,
//                    2-bit residues of three register names), issue (4,
//                    3-bit residues of two operands), ALU/MUL (4, 3-bit
//                    residue of result), branch (2, nothing), load/store (2,
//                    3-bit residue of result and 32-bit address).
//   commit_recorder  ID of the youngest committed instruction.
//   post_trigger_gen soft triggers pause, hard triggers stop the recording
//                    and halt the core.
// Recorder placement, counts and auxiliary widths follow the design. The
// exact port protocol, writing the ROB ID queue at dispatch, the per-unit ID
// FIFOs in the execute stage and a single clock for all recorders are this
// implementation's choices (the design allows each stage its own clock
// domain; here one clock drives everything).
//
// Port protocol (all signals sampled on the rising clock edge):
//   fetch->decode  fe_valid[w]: an instruction leaves fetch in way w and
//                  enters decode; fe_pc[w] is its PC. Must be 0 while
//                  dec_stall is 1.
//   decode         dec_stall holds the decode stage; an instruction leaves
//                  decode when it is valid and dec_stall is 0; dec_info[w]
//                  is its 4 decode bits.
//   dispatch       dis_stall holds the dispatch stage; an instruction leaving
//                  dispatch goes to issue queue entry dis_iq_idx[w] and ROB
//                  entry dis_rob_idx[w]; dis_rd/rs1/rs2 are its physical
//                  register names.
//   issue          iss_valid[w] issues issue-queue entry iss_iq_idx[w] to
//                  functional unit iss_fu[w] (ifra_pkg::fu_e numbering) with
//                  operand values iss_opa/iss_opb. At most one issue per unit
//                  per cycle.
//   execute        fu_done[f]: unit f delivers its oldest instruction's
//                  result fu_result[f]; load/store units also give the
//                  address lsu_addr.
//   commit         cmt_valid[w] commits ROB entry cmt_rob_idx[w], way 0
//                  oldest. flush squashes every instruction younger than ROB
//                  entry flush_rob_idx, which must be the oldest in flight.
//   scan           with scan_en high (after halt), one bit moves along the
//                  chain per clock: scan_in -> commit recorder -> fetch
//                  recorders 0..3 -> decode -> dispatch -> issue -> ALU0,
//                  ALU1, MUL0, MUL1, BR0, BR1, LSU0, LSU1 -> scan_out.
module ifra_top
  import ifra_pkg::fu_e, ifra_pkg::trig_cause_t, ifra_pkg::N_FU, ifra_pkg::N_ALU,
         ifra_pkg::N_MUL, ifra_pkg::N_BR, ifra_pkg::N_LSU, ifra_pkg::PC_W,
         ifra_pkg::PREG_W, ifra_pkg::DATA_W, ifra_pkg::ADDR_W,
         ifra_pkg::FETCH_AUX_W, ifra_pkg::DECODE_AUX_W, ifra_pkg::DISPATCH_AUX_W,
         ifra_pkg::ISSUE_AUX_W, ifra_pkg::EXEC_AUX_W, ifra_pkg::BRANCH_AUX_W,
         ifra_pkg::LSU_AUX_W;
#(
  parameter int unsigned N_INFLIGHT = ifra_pkg::N_INFLIGHT,
  parameter int unsigned REC_DEPTH  = ifra_pkg::REC_DEPTH,
  parameter int unsigned EXQ_DEPTH  = 8,
  parameter int unsigned SHORT_GAP  = 400,
  parameter int unsigned LONG_GAP   = 2000000000,
  localparam int unsigned NW        = ifra_pkg::WAYS,
  localparam int unsigned ID_W      = $clog2(4 * N_INFLIGHT),
  localparam int unsigned QIW       = $clog2(N_INFLIGHT)
) (
  input  logic              clk,
  input  logic              rst_n,
  // fetch -> decode
  input  logic [NW-1:0]     fe_valid,
  input  logic [PC_W-1:0]   fe_pc        [NW],
  // decode
  input  logic              dec_stall,
  input  logic [DECODE_AUX_W-1:0] dec_info [NW],
  // dispatch
  input  logic              dis_stall,
  input  logic [PREG_W-1:0] dis_rd       [NW],
  input  logic [PREG_W-1:0] dis_rs1      [NW],
  input  logic [PREG_W-1:0] dis_rs2      [NW],
  input  logic [QIW-1:0]    dis_iq_idx   [NW],
  input  logic [QIW-1:0]    dis_rob_idx  [NW],
  // issue
  input  logic [NW-1:0]     iss_valid,
  input  logic [QIW-1:0]    iss_iq_idx   [NW],
  input  fu_e               iss_fu       [NW],
  input  logic [DATA_W-1:0] iss_opa      [NW],
  input  logic [DATA_W-1:0] iss_opb      [NW],
  // execute
  input  logic [N_FU-1:0]   fu_done,
  input  logic [DATA_W-1:0] fu_result    [N_FU],
  input  logic [ADDR_W-1:0] lsu_addr     [N_LSU],
  // commit and flush
  input  logic [NW-1:0]     cmt_valid,
  input  logic [QIW-1:0]    cmt_rob_idx  [NW],
  input  logic              flush,
  input  logic [QIW-1:0]    flush_rob_idx,
  // failure indications from the core's error detectors and OS
  input  logic              array_err,
  input  logic              arith_err,
  input  logic              exception,
  input  logic              os_segfault,
  input  logic              tlb_miss,
  input  logic              tlb_refill,
  // post-trigger outputs
  output logic              recording,
  output logic              soft_pause,
  output logic              halt,
  output trig_cause_t       trig_cause,
  output logic              cmt_id_valid,   // commit recorder contents
  output logic [ID_W-1:0]   cmt_youngest_id,
  // scan chain (driven by the boundary-scan port)
  input  logic              scan_en,
  input  logic              scan_in,
  output logic              scan_out
);
  localparam int unsigned N_REC = 4 * NW + N_FU;   // 24 recorders with history

  logic rec_en;

  // ------------------------------------------------------------------ IDs
  logic [ID_W-1:0] fe_id     [NW];
  logic [ID_W-1:0] flush_id;

  id_assign #(.WAYS(NW), .N_INFLIGHT(N_INFLIGHT)) u_id_assign (
    .clk, .rst_n,
    .fetch_valid(fe_valid & {NW{!flush}}),
    .flush, .flush_id,
    .id(fe_id), .last_id()
  );

  // decode-stage IDs
  logic [NW-1:0]   dec_v;
  logic [ID_W-1:0] dec_id [NW];
  id_stage_reg #(.WAYS(NW), .ID_W(ID_W)) u_dec_reg (
    .clk, .rst_n, .flush, .stall(dec_stall),
    .in_valid(fe_valid), .in_id(fe_id),
    .out_valid(dec_v), .out_id(dec_id)
  );

  // dispatch-stage IDs
  logic [NW-1:0]   dis_v;
  logic [ID_W-1:0] dis_id [NW];
  id_stage_reg #(.WAYS(NW), .ID_W(ID_W)) u_dis_reg (
    .clk, .rst_n, .flush, .stall(dis_stall),
    .in_valid(dec_v & {NW{!dec_stall}}), .in_id(dec_id),
    .out_valid(dis_v), .out_id(dis_id)
  );

  logic [NW-1:0] dec_leave, dis_leave;
  assign dec_leave = dec_v & {NW{!dec_stall && !flush}};
  assign dis_leave = dis_v & {NW{!dis_stall && !flush}};

  // issue-queue IDs
  logic [ID_W-1:0] iq_rd_id [NW];
  logic [NW-1:0]   iq_rd_v;
  logic [NW-1:0]   iss_fire;
  id_queue #(.DEPTH(N_INFLIGHT), .WR_PORTS(NW), .RD_PORTS(NW), .ID_W(ID_W)) u_iq_ids (
    .clk, .rst_n, .flush,
    .wr_en(dis_leave), .wr_idx(dis_iq_idx), .wr_id(dis_id),
    .rd_idx(iss_iq_idx), .rd_release(iss_valid),
    .rd_id(iq_rd_id), .rd_valid(iq_rd_v)
  );
  assign iss_fire = iss_valid & iq_rd_v & {NW{!flush}};

  // reorder-buffer IDs: read ports 0..NW-1 for commit, NW for the flush
  logic [QIW-1:0]  rob_rd_idx [NW+1];
  logic [ID_W-1:0] rob_rd_id  [NW+1];
  logic [NW:0]     rob_rd_v;
  always_comb begin
    for (int w = 0; w < NW; w++) rob_rd_idx[w] = cmt_rob_idx[w];
    rob_rd_idx[NW] = flush_rob_idx;
  end
  id_queue #(.DEPTH(N_INFLIGHT), .WR_PORTS(NW), .RD_PORTS(NW+1), .ID_W(ID_W)) u_rob_ids (
    .clk, .rst_n, .flush,
    .wr_en(dis_leave), .wr_idx(dis_rob_idx), .wr_id(dis_id),
    .rd_idx(rob_rd_idx), .rd_release({1'b0, cmt_valid}),
    .rd_id(rob_rd_id), .rd_valid(rob_rd_v)
  );
  assign flush_id = rob_rd_id[NW];

  // execute-stage IDs, one FIFO per functional unit
  logic [N_FU-1:0] fu_push, fu_empty, fu_full, fu_fire;
  logic [ID_W-1:0] fu_push_id [N_FU];
  logic [ID_W-1:0] fu_id      [N_FU];
  always_comb begin
    fu_push = '0;
    for (int f = 0; f < N_FU; f++) fu_push_id[f] = '0;
    for (int w = 0; w < NW; w++)
      if (iss_fire[w]) begin
        fu_push[iss_fu[w]]    = 1'b1;
        fu_push_id[iss_fu[w]] = iq_rd_id[w];
      end
  end
  assign fu_fire = fu_done & ~fu_empty & {N_FU{!flush}};

  for (genvar f = 0; f < N_FU; f++) begin : g_fu_ids
    id_fifo #(.DEPTH(EXQ_DEPTH), .ID_W(ID_W)) u_fifo (
      .clk, .rst_n, .flush,
      .push(fu_push[f]), .push_id(fu_push_id[f]),
      .pop(fu_fire[f]), .head_id(fu_id[f]),
      .empty(fu_empty[f]), .full(fu_full[f])
    );
  end

  // ------------------------------------------------------- post-triggers
  logic [N_LSU-1:0] lsu_chk;
  for (genvar l = 0; l < N_LSU; l++) begin : g_lsu_chk
    assign lsu_chk[l] = fu_done[N_ALU + N_MUL + N_BR + l];
  end

  post_trigger_gen #(
    .N_LSU(N_LSU), .ADDR_W(ADDR_W), .SHORT_GAP(SHORT_GAP), .LONG_GAP(LONG_GAP)
  ) u_ptg (
    .clk, .rst_n,
    .array_err, .arith_err, .exception, .os_segfault,
    .lsu_valid(lsu_chk), .lsu_addr,
    .retire(|cmt_valid), .tlb_miss, .tlb_refill,
    .rec_en, .soft_pause, .stop(halt), .cause(trig_cause),
    .gap_cnt()
  );
  assign recording = rec_en;

  // ------------------------------------------------------------ recorders
  logic [N_REC+1:0] chain;   // chain[0] = scan_in, chain[N_REC+1] = scan_out
  assign chain[0] = scan_in;
  assign scan_out = chain[N_REC+1];

  logic [NW-1:0]   cmt_v;
  logic [ID_W-1:0] cmt_id [NW];
  always_comb begin
    for (int w = 0; w < NW; w++) begin
      cmt_v[w]  = cmt_valid[w] && rob_rd_v[w];
      cmt_id[w] = rob_rd_id[w];
    end
  end

  commit_recorder #(.WAYS(NW), .ID_W(ID_W)) u_cmt_rec (
    .clk, .rst_n, .rec_en,
    .cmt_valid(cmt_v), .cmt_id,
    .scan_en, .scan_in(chain[0]), .scan_out(chain[1]),
    .youngest_valid(cmt_id_valid), .youngest_id(cmt_youngest_id)
  );

  for (genvar w = 0; w < NW; w++) begin : g_way
    // fetch: program counter
    recorder #(.ID_W(ID_W), .AUX_W(FETCH_AUX_W), .DEPTH(REC_DEPTH)) u_fetch_rec (
      .clk, .rst_n, .rec_en,
      .in_valid(fe_valid[w] && !flush), .in_id(fe_id[w]), .in_aux(fe_pc[w]),
      .scan_en, .scan_in(chain[1 + w]), .scan_out(chain[2 + w]),
      .wr_ptr(), .full()
    );

    // decode: decoding results
    recorder #(.ID_W(ID_W), .AUX_W(DECODE_AUX_W), .DEPTH(REC_DEPTH)) u_dec_rec (
      .clk, .rst_n, .rec_en,
      .in_valid(dec_leave[w]), .in_id(dec_id[w]), .in_aux(dec_info[w]),
      .scan_en, .scan_in(chain[1 + NW + w]), .scan_out(chain[2 + NW + w]),
      .wr_ptr(), .full()
    );

    // dispatch: 2-bit residues of destination and source register names
    logic [1:0] r_rd, r_rs1, r_rs2;
    residue_gen #(.W(PREG_W), .K(2)) u_res_rd  (.value(dis_rd[w]),  .residue(r_rd));
    residue_gen #(.W(PREG_W), .K(2)) u_res_rs1 (.value(dis_rs1[w]), .residue(r_rs1));
    residue_gen #(.W(PREG_W), .K(2)) u_res_rs2 (.value(dis_rs2[w]), .residue(r_rs2));
    recorder #(.ID_W(ID_W), .AUX_W(DISPATCH_AUX_W), .DEPTH(REC_DEPTH)) u_dis_rec (
      .clk, .rst_n, .rec_en,
      .in_valid(dis_leave[w]), .in_id(dis_id[w]), .in_aux({r_rd, r_rs1, r_rs2}),
      .scan_en, .scan_in(chain[1 + 2*NW + w]), .scan_out(chain[2 + 2*NW + w]),
      .wr_ptr(), .full()
    );

    // issue: 3-bit residues of the two operands
    logic [2:0] r_opa, r_opb;
    residue_gen #(.W(DATA_W), .K(3)) u_res_opa (.value(iss_opa[w]), .residue(r_opa));
    residue_gen #(.W(DATA_W), .K(3)) u_res_opb (.value(iss_opb[w]), .residue(r_opb));
    recorder #(.ID_W(ID_W), .AUX_W(ISSUE_AUX_W), .DEPTH(REC_DEPTH)) u_iss_rec (
      .clk, .rst_n, .rec_en,
      .in_valid(iss_fire[w]), .in_id(iq_rd_id[w]), .in_aux({r_opa, r_opb}),
      .scan_en, .scan_in(chain[1 + 3*NW + w]), .scan_out(chain[2 + 3*NW + w]),
      .wr_ptr(), .full()
    );
  end

  for (genvar f = 0; f < N_FU; f++) begin : g_fu_rec
    localparam bit IS_BR  = (f >= N_ALU + N_MUL) && (f < N_ALU + N_MUL + N_BR);
    localparam bit IS_LSU = (f >= N_ALU + N_MUL + N_BR);
    localparam int unsigned AUXW = IS_LSU ? LSU_AUX_W : (IS_BR ? BRANCH_AUX_W : EXEC_AUX_W);
    localparam int unsigned AUXP = (AUXW > 0) ? AUXW : 1;
    logic [AUXP-1:0] aux;
    if (IS_BR) begin : g_br
      assign aux = '0;                       // branch units record only the ID
    end else begin : g_res
      logic [2:0] r_res;
      residue_gen #(.W(DATA_W), .K(3)) u_res (.value(fu_result[f]), .residue(r_res));
      if (IS_LSU) begin : g_lsu
        assign aux = {r_res, lsu_addr[f - (N_ALU + N_MUL + N_BR)]};
      end else begin : g_alu
        assign aux = r_res;
      end
    end
    recorder #(.ID_W(ID_W), .AUX_W(AUXW), .DEPTH(REC_DEPTH)) u_fu_rec (
      .clk, .rst_n, .rec_en,
      .in_valid(fu_fire[f]), .in_id(fu_id[f]), .in_aux(aux),
      .scan_en, .scan_in(chain[1 + 4*NW + f]), .scan_out(chain[2 + 4*NW + f]),
      .wr_ptr(), .full()
    );
  end

  // ------------------------------------------------------------ protocol
  a_one_issue_per_fu: assert property (@(posedge clk) disable iff (!rst_n)
    $countones(fu_push) == $countones(iss_fire));
  a_fe_no_stall: assert property (@(posedge clk) disable iff (!rst_n)
    dec_stall |-> (fe_valid == '0));
  a_fu_not_full: assert property (@(posedge clk) disable iff (!rst_n)
    (fu_push & fu_full & ~fu_fire) == '0);
  a_scan_after_stop: assert property (@(posedge clk) disable iff (!rst_n)
    scan_en |-> !rec_en);

endmodule
