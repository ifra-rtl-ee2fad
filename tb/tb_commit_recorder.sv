// tb_commit_recorder: random commit bundles with recording on and off; the
// register must hold the ID of the youngest (highest-way) committed
// instruction seen while recording. Then the register is scanned out and
// the serial bit order (ID LSB first, then valid) checked; a second full
// shift with the output fed back restores it.
module tb_commit_recorder;
  localparam int WAYS = 4, ID_W = 8;
  int checks = 0, failures = 0, paused = 0;

  logic clk = 0, rst_n = 0, rec_en, scan_en, scan_in, scan_out;
  logic [WAYS-1:0] cmt_valid;
  logic [ID_W-1:0] cmt_id [WAYS];
  logic            youngest_valid;
  logic [ID_W-1:0] youngest_id;

  commit_recorder #(.WAYS(WAYS), .ID_W(ID_W)) dut (.*);
  always #5 clk = ~clk;

  bit              m_v;
  logic [ID_W-1:0] m_id;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [ID_W:0] got;
    rec_en = 0; scan_en = 0; scan_in = 0; cmt_valid = '0;
    for (int w = 0; w < WAYS; w++) cmt_id[w] = '0;
    m_v = 0; m_id = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    checks++;
    if (youngest_valid) failures++;
    for (int cyc = 0; cyc < 2000; cyc++) begin
      @(negedge clk);
      checks++;
      if (youngest_valid != m_v || (m_v && youngest_id != m_id)) begin
        failures++; $display("FAIL cyc %0d got %b/%0d exp %b/%0d", cyc, youngest_valid, youngest_id, m_v, m_id);
      end
      rec_en    = ($urandom_range(0, 9) != 0);
      cmt_valid = WAYS'($urandom);
      for (int w = 0; w < WAYS; w++) cmt_id[w] = ID_W'($urandom);
      if (!rec_en) paused++;
      if (rec_en)
        for (int w = 0; w < WAYS; w++)
          if (cmt_valid[w]) begin m_v = 1; m_id = cmt_id[w]; end
    end
    // scan out
    @(negedge clk);
    rec_en = 0; cmt_valid = '0;
    @(negedge clk);
    scan_en = 1;
    for (int b = 0; b <= ID_W; b++) begin
      got[b] = scan_out;
      scan_in = scan_out;           // loop back
      @(negedge clk);
    end
    scan_en = 0;
    checks++;
    if (got != {1'b1, m_id}) begin
      failures++; $display("FAIL scan got %b exp %b", got, {1'b1, m_id});
    end
    checks++;
    if (!youngest_valid || youngest_id != m_id) begin
      failures++; $display("FAIL restore");
    end
    if (paused == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
