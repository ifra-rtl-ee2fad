// tb_id_fifo: random push/pop/flush against a queue model; checks head,
// empty and full every cycle, and that a full FIFO holds DEPTH IDs.
module tb_id_fifo;
  localparam int DEPTH = 8, ID_W = 8;
  int checks = 0, failures = 0, fulls = 0, flushes = 0;

  logic clk = 0, rst_n = 0, flush, push, pop, empty, full;
  logic [ID_W-1:0] push_id, head_id;

  id_fifo #(.DEPTH(DEPTH), .ID_W(ID_W)) dut (.*);
  always #5 clk = ~clk;

  logic [ID_W-1:0] q [$];

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    flush = 0; push = 0; pop = 0; push_id = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 5000; cyc++) begin
      @(negedge clk);
      checks += 2;
      if (empty != (q.size() == 0) || full != (q.size() == DEPTH)) begin
        failures++; $display("FAIL cyc %0d empty %b full %b size %0d", cyc, empty, full, q.size());
      end
      if (q.size() > 0 && head_id != q[0]) begin
        failures++; $display("FAIL cyc %0d head %0d exp %0d", cyc, head_id, q[0]);
      end
      if (full) fulls++;
      // phases bias toward filling or draining
      flush   = ($urandom_range(0, 99) == 0);
      push    = (q.size() < DEPTH) && ($urandom_range(0, 9) < (((cyc / 200) % 2 != 0) ? 3 : 7));
      pop     = (q.size() > 0) && ($urandom_range(0, 9) < 5);
      push_id = ID_W'($urandom);
      if (flush) begin
        q.delete(); flushes++;
      end else begin
        if (pop)  void'(q.pop_front());
        if (push) q.push_back(push_id);
      end
    end
    if (fulls == 0 || flushes == 0) failures++;
    $display("fulls=%0d flushes=%0d", fulls, flushes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
