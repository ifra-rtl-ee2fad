// id_assign: the ID-assignment unit.
//
// Every instruction leaving the fetch stage gets an instruction ID that lets
// the offline analysis tie together the footprints it leaves in the
// recorders. For a core with at most n instructions in flight the ID is
// log2(4n) bits and counts modulo 4n: if the last ID handed out was X and
// k instructions leave fetch this cycle, they get X+1 .. X+k in way order
// (way 0 first, skipping ways without an instruction). When the instruction
// with ID Y causes a pipeline flush, the first instruction fetched after the
// flush gets Y+2n+1. This jump is what lets the analysis spot a flush in an
// in-order recorder and keeps two live instructions from sharing an ID. The
// scheme is the design's; the register-level organisation (one "last ID"
// register, per-way adders on its output, one register on the flush path)
// follows the block diagram of the unit.
//
// Interface/timing: fetch_valid[w] means an instruction leaves fetch in way
// w this cycle; id[w] is its ID, combinational from the last-ID register.
// flush with flush_id = Y (the flush-causing ID, read from the commit stage)
// loads the last-ID register with Y+2n on the rising edge, so the next
// instruction gets Y+2n+1; instructions leaving fetch in a flush cycle are
// squashed and get no ID. After reset the first ID is 0.
module id_assign #(
  parameter int unsigned WAYS       = 4,
  parameter int unsigned N_INFLIGHT = 64,
  localparam int unsigned ID_W      = $clog2(4 * N_INFLIGHT)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [WAYS-1:0] fetch_valid,
  input  logic            flush,
  input  logic [ID_W-1:0] flush_id,
  output logic [ID_W-1:0] id      [WAYS],
  output logic [ID_W-1:0] last_id
);
  localparam int unsigned MOD = 4 * N_INFLIGHT;
  localparam int unsigned SW  = ID_W + 2;

  // (a + b) mod 4n for a < 4n and b <= 4n (b is at most WAYS or 2n)
  function automatic logic [ID_W-1:0] add_mod(input logic [ID_W-1:0] a, input logic [ID_W:0] b);
    logic [SW-1:0] s;
    s = SW'(a) + SW'(b);
    if (s >= SW'(MOD)) s = s - SW'(MOD);
    return s[ID_W-1:0];
  endfunction

  logic [ID_W-1:0] last_q;
  logic [ID_W:0]   k_total;   // instructions leaving fetch this cycle

  always_comb begin
    logic [ID_W:0] k;
    k = '0;
    for (int w = 0; w < WAYS; w++) begin
      k     = k + (ID_W+1)'(fetch_valid[w]);
      id[w] = add_mod(last_q, k);      // ways before w, plus one
    end
    k_total = k;
  end

  assign last_id = last_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      last_q <= ID_W'(MOD - 1);
    else if (flush)  last_q <= add_mod(flush_id, (ID_W+1)'(2 * N_INFLIGHT));
    else             last_q <= add_mod(last_q, k_total);
  end

endmodule
