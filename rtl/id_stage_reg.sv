// id_stage_reg: instruction-ID pipeline register of one in-order stage.
//
// An instruction ID must travel with its instruction and obey the same
// control: when the stage stalls the IDs are held, when the pipeline is
// flushed they are dropped. This register is the "REG" placed beside each
// in-order stage of the host core. It holds one ID and a valid bit per way.
//
// Timing: on a rising edge, flush clears all valid bits; otherwise, when
// stall is low, the register loads in_valid/in_id; when stall is high it
// keeps its contents. Outputs are the register contents. The ways are kept
// in place: an ID stays in the way its instruction occupies (this design
// assumes the host core does not move instructions between ways).
module id_stage_reg #(
  parameter int unsigned WAYS = 4,
  parameter int unsigned ID_W = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 flush,
  input  logic                 stall,
  input  logic [WAYS-1:0]      in_valid,
  input  logic [ID_W-1:0]      in_id  [WAYS],
  output logic [WAYS-1:0]      out_valid,
  output logic [ID_W-1:0]      out_id [WAYS]
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= '0;
      for (int w = 0; w < WAYS; w++) out_id[w] <= '0;
    end else if (flush) begin
      out_valid <= '0;
    end else if (!stall) begin
      out_valid <= in_valid;
      for (int w = 0; w < WAYS; w++) out_id[w] <= in_id[w];
    end
  end
endmodule
