// post_trigger_gen: post-trigger generator.
//
// Decides when the footprint recorders stop. Early detection keeps the
// error-to-failure history inside the recorders:
//   hard post-triggers stop recording for good and halt the core: an array
//     parity error, an arithmetic residue error, a built-in exception, a
//     segmentation fault declared by the OS, a load/store address equal to
//     zero (null-pointer dereference, detected here on every load/store
//     address), and a long instruction-retirement gap (deadlock);
//   soft post-triggers only pause recording while the core keeps running:
//     a short retirement gap (SHORT_GAP cycles, the time of two memory
//     loads) and a TLB miss. Recording resumes when an instruction retires,
//     or when the TLB refill completes, i.e. when the symptom was false.
// The deadlock hard trigger fires LONG_GAP cycles (two seconds) after the
// soft one if nothing retired. The trigger list and soft/hard split follow
// the design; the cycle counts depend on the clock frequency and are
// parameters (defaults assume 1 GHz and 200-cycle memory loads). A single
// outstanding TLB miss is tracked, an implementation choice.
//
// Timing: all inputs are sampled on the rising edge; rec_en falls in the
// cycle after a trigger condition is seen. stop and cause are sticky until
// reset. rec_en = !stop && !soft_pause.
module post_trigger_gen #(
  parameter int unsigned N_LSU     = 2,
  parameter int unsigned ADDR_W    = 32,
  parameter int unsigned SHORT_GAP = 400,          // cycles: two memory loads
  parameter int unsigned LONG_GAP  = 2000000000    // cycles: two seconds at 1 GHz
) (
  input  logic              clk,
  input  logic              rst_n,
  // hard failure indications from the core's error detectors
  input  logic              array_err,
  input  logic              arith_err,
  input  logic              exception,
  input  logic              os_segfault,
  // load/store addresses, checked against zero
  input  logic [N_LSU-1:0]  lsu_valid,
  input  logic [ADDR_W-1:0] lsu_addr [N_LSU],
  // symptoms
  input  logic              retire,       // at least one instruction committed
  input  logic              tlb_miss,
  input  logic              tlb_refill,
  // control of the recorders and the core
  output logic              rec_en,
  output logic              soft_pause,
  output logic              stop,         // hard post-trigger fired; halts the core
  output ifra_pkg::trig_cause_t cause,
  output logic [31:0]       gap_cnt       // cycles since the last retirement
);
  localparam logic [31:0] HARD_GAP = 32'(SHORT_GAP) + 32'(LONG_GAP);

  logic        tlb_pending;
  logic        null_hit;
  ifra_pkg::trig_cause_t hit;

  always_comb begin
    null_hit = 1'b0;
    for (int i = 0; i < N_LSU; i++)
      if (lsu_valid[i] && lsu_addr[i] == '0) null_hit = 1'b1;
    hit           = '0;
    hit.array_err = array_err;
    hit.arith_err = arith_err;
    hit.exception = exception;
    hit.segfault  = os_segfault;
    hit.null_addr = null_hit;
    hit.deadlock  = !retire && (gap_cnt + 1'b1 >= HARD_GAP);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gap_cnt     <= '0;
      tlb_pending <= 1'b0;
      stop        <= 1'b0;
      cause       <= '0;
    end else begin
      if (retire)                 gap_cnt <= '0;
      else if (gap_cnt != '1)     gap_cnt <= gap_cnt + 1'b1;

      if (tlb_miss)               tlb_pending <= 1'b1;
      else if (tlb_refill)        tlb_pending <= 1'b0;

      if (!stop && (|hit)) begin
        stop  <= 1'b1;
        cause <= hit;
      end
    end
  end

  assign soft_pause = tlb_pending || (gap_cnt >= 32'(SHORT_GAP));
  assign rec_en     = !stop && !soft_pause;

  a_cause_on_stop: assert property (@(posedge clk) disable iff (!rst_n) stop |-> (cause != '0));
endmodule
