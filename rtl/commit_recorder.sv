// commit_recorder: footprint recorder of the commit stage.
//
// Unlike the other recorders it keeps no history: a single register holds
// the ID of the youngest committed instruction. After a failure, every ID
// that appears after it in an in-order recorder belongs to an instruction
// that was still uncommitted, which is how the analysis separates committed
// from in-flight footprints. A valid bit (this implementation's addition)
// tells whether anything committed since reset.
//
// Interface/timing: cmt_valid[w]/cmt_id[w] describe the instructions that
// commit this cycle, way 0 being the oldest. While rec_en is high the
// register takes the ID of the highest-numbered committing way on the
// rising edge. With scan_en high the register {valid, id} is a shift register
// of ID_W+1 bits in the scan chain: the ID leaves first (LSB first), then
// the valid bit.
module commit_recorder #(
  parameter int unsigned WAYS = 4,
  parameter int unsigned ID_W = 8
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            rec_en,
  input  logic [WAYS-1:0] cmt_valid,
  input  logic [ID_W-1:0] cmt_id [WAYS],
  input  logic            scan_en,
  input  logic            scan_in,
  output logic            scan_out,
  output logic            youngest_valid,
  output logic [ID_W-1:0] youngest_id
);
  logic [ID_W-1:0] sel_id;

  always_comb begin
    sel_id = youngest_id;
    for (int w = 0; w < WAYS; w++)
      if (cmt_valid[w]) sel_id = cmt_id[w];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      youngest_valid <= 1'b0;
      youngest_id    <= '0;
    end else if (scan_en) begin
      {youngest_valid, youngest_id} <= {scan_in, youngest_valid, youngest_id[ID_W-1:1]};
    end else if (rec_en && |cmt_valid) begin
      youngest_valid <= 1'b1;
      youngest_id    <= sel_id;
    end
  end

  assign scan_out = youngest_id[0];

endmodule
