// id_queue: instruction-ID storage beside an issue queue or reorder buffer.
//
// When an instruction is placed in a queue of the host core, its ID is
// placed in this queue at the same entry index, and it is read out with the
// same index when the host entry is read (issue, commit). The host core
// supplies the indices, so the IDs follow exactly the host queue's control,
// including out-of-order removal from the issue queue.
//
// Each entry has a valid bit: set on write, cleared when a read port
// releases it (rd_release) or on flush. rd_valid reports whether the entry
// read is occupied, so a read of an empty slot is never recorded as a
// footprint. Writes take effect on the rising edge; reads are
// combinational. A write and a release of the same entry in one cycle leave
// the entry valid (the write is newer).
module id_queue #(
  parameter int unsigned DEPTH    = 64,
  parameter int unsigned WR_PORTS = 4,
  parameter int unsigned RD_PORTS = 4,
  parameter int unsigned ID_W     = 8,
  localparam int unsigned IW      = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                flush,
  input  logic [WR_PORTS-1:0] wr_en,
  input  logic [IW-1:0]       wr_idx     [WR_PORTS],
  input  logic [ID_W-1:0]     wr_id      [WR_PORTS],
  input  logic [IW-1:0]       rd_idx     [RD_PORTS],
  input  logic [RD_PORTS-1:0] rd_release,
  output logic [ID_W-1:0]     rd_id      [RD_PORTS],
  output logic [RD_PORTS-1:0] rd_valid
);
  logic [ID_W-1:0]  ids   [DEPTH];
  logic [DEPTH-1:0] valid;

  always_comb begin
    for (int r = 0; r < RD_PORTS; r++) begin
      rd_id[r]    = ids[rd_idx[r]];
      rd_valid[r] = valid[rd_idx[r]];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid <= '0;
    end else if (flush) begin
      valid <= '0;
    end else begin
      for (int r = 0; r < RD_PORTS; r++)
        if (rd_release[r]) valid[rd_idx[r]] <= 1'b0;
      for (int p = 0; p < WR_PORTS; p++)
        if (wr_en[p]) valid[wr_idx[p]] <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    for (int p = 0; p < WR_PORTS; p++)
      if (wr_en[p] && !flush) ids[wr_idx[p]] <= wr_id[p];
  end

endmodule
