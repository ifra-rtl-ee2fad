// tb_id_stage_reg: random stall/flush/load sequence against a reference
// copy of the stage contents kept in the testbench.
module tb_id_stage_reg;
  localparam int WAYS = 4, ID_W = 8;
  int checks = 0, failures = 0, stalls = 0, flushes = 0;

  logic clk = 0, rst_n = 0, flush, stall;
  logic [WAYS-1:0] in_valid, out_valid;
  logic [ID_W-1:0] in_id [WAYS];
  logic [ID_W-1:0] out_id [WAYS];

  id_stage_reg #(.WAYS(WAYS), .ID_W(ID_W)) dut (.*);
  always #5 clk = ~clk;

  logic [WAYS-1:0] m_valid;
  logic [ID_W-1:0] m_id [WAYS];

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    flush = 0; stall = 0; in_valid = '0;
    for (int w = 0; w < WAYS; w++) begin in_id[w] = '0; m_id[w] = '0; end
    m_valid = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      // compare with the model of the previous edge
      checks++;
      if (out_valid != m_valid) begin
        failures++; $display("FAIL cyc %0d valid %b exp %b", cyc, out_valid, m_valid);
      end
      for (int w = 0; w < WAYS; w++)
        if (m_valid[w]) begin
          checks++;
          if (out_id[w] != m_id[w]) begin
            failures++; $display("FAIL cyc %0d way %0d id %0d exp %0d", cyc, w, out_id[w], m_id[w]);
          end
        end
      flush    = ($urandom_range(0, 15) == 0);
      stall    = ($urandom_range(0, 3) == 0);
      in_valid = WAYS'($urandom);
      for (int w = 0; w < WAYS; w++) in_id[w] = ID_W'($urandom);
      if (flush) begin
        m_valid = '0; flushes++;
      end else if (!stall) begin
        m_valid = in_valid;
        for (int w = 0; w < WAYS; w++) m_id[w] = in_id[w];
      end else stalls++;
    end
    if (stalls == 0 || flushes == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
