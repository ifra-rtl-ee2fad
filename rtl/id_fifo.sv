// id_fifo: IDs of the instructions inside one functional unit.
//
// The execute stage of the host core has units of different and variable
// latency. Each unit gets a small FIFO of instruction IDs: the ID read from
// the issue-stage ID queue is pushed when the unit accepts an instruction,
// and popped when the unit delivers its result, at which point the
// execute-stage recorder stores it. This works because each unit completes
// its own instructions in the order it accepted them, an assumption of this
// implementation. A flush empties the FIFO (a flush is raised only when the
// flush-causing instruction is the oldest one, so everything still in a unit
// is younger and squashed).
//
// Timing: push and pop act on the rising edge; head_id shows the oldest ID
// combinationally. Pushing when full or popping when empty is an error
// caught by assertions.
module id_fifo #(
  parameter int unsigned DEPTH = 8,
  parameter int unsigned ID_W  = 8
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            flush,
  input  logic            push,
  input  logic [ID_W-1:0] push_id,
  input  logic            pop,
  output logic [ID_W-1:0] head_id,
  output logic            empty,
  output logic            full
);
  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [ID_W-1:0] mem [DEPTH];
  logic [PW-1:0]   rd_ptr, wr_ptr;
  logic [PW:0]     count;

  function automatic logic [PW-1:0] inc(input logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  assign empty   = (count == '0);
  assign full    = (count == (PW+1)'(DEPTH));
  assign head_id = mem[rd_ptr];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else if (flush) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (push) wr_ptr <= inc(wr_ptr);
      if (pop)  rd_ptr <= inc(rd_ptr);
      count <= count + (PW+1)'(push) - (PW+1)'(pop);
    end
  end

  always_ff @(posedge clk) begin
    if (push && !flush) mem[wr_ptr] <= push_id;
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) (push && !pop) |-> !full);
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) pop |-> !empty);
endmodule
