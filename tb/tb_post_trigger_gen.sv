// tb_post_trigger_gen: exercises every post-trigger of the generator with
// short gap thresholds (SHORT_GAP = 10, LONG_GAP = 50 cycles).
//   - short retirement gap: recording pauses exactly SHORT_GAP cycles after
//     the last retirement and resumes when an instruction retires;
//   - TLB miss pauses recording, TLB refill resumes it;
//   - each hard trigger (parity, residue, exception, OS segfault, null
//     load/store address, long retirement gap) stops recording, sets halt
//     and records its cause; the long gap fires SHORT_GAP + LONG_GAP cycles
//     after the last retirement;
//   - a non-zero load/store address does not trigger.
module tb_post_trigger_gen;
  localparam int SG = 10, LG = 50, NL = 2;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  logic array_err, arith_err, exception, os_segfault, retire, tlb_miss, tlb_refill;
  logic [NL-1:0] lsu_valid;
  logic [31:0]   lsu_addr [NL];
  logic rec_en, soft_pause, stop;
  ifra_pkg::trig_cause_t cause;
  logic [31:0] gap_cnt;

  post_trigger_gen #(.N_LSU(NL), .ADDR_W(32), .SHORT_GAP(SG), .LONG_GAP(LG)) dut (.*);
  always #5 clk = ~clk;

  task automatic expect_state(input string what, input bit e_rec, input bit e_soft, input bit e_stop);
    checks++;
    if (rec_en !== e_rec || soft_pause !== e_soft || stop !== e_stop) begin
      failures++;
      $display("FAIL %s: rec_en %b soft %b stop %b, exp %b %b %b", what, rec_en, soft_pause, stop,
               e_rec, e_soft, e_stop);
    end
  endtask

  task automatic idle_inputs();
    array_err = 0; arith_err = 0; exception = 0; os_segfault = 0;
    retire = 1; tlb_miss = 0; tlb_refill = 0; lsu_valid = '0;
    lsu_addr[0] = 32'h1000; lsu_addr[1] = 32'h2000;
  endtask

  task automatic do_reset();
    idle_inputs();
    rst_n = 0;
    @(negedge clk); @(negedge clk);
    rst_n = 1;
    @(negedge clk);
  endtask

  // apply one hard trigger for one cycle, then check stop and cause
  task automatic hard(input int which);
    ifra_pkg::trig_cause_t exp_c;
    do_reset();
    expect_state("before hard", 1, 0, 0);
    exp_c = '0;
    case (which)
      0: begin array_err = 1;   exp_c.array_err = 1; end
      1: begin arith_err = 1;   exp_c.arith_err = 1; end
      2: begin exception = 1;   exp_c.exception = 1; end
      3: begin os_segfault = 1; exp_c.segfault  = 1; end
      default: begin lsu_valid[1] = 1; lsu_addr[1] = '0; exp_c.null_addr = 1; end
    endcase
    @(negedge clk);
    idle_inputs();
    expect_state($sformatf("hard %0d", which), 0, 0, 1);
    checks++;
    if (cause != exp_c) begin failures++; $display("FAIL cause %b exp %b", cause, exp_c); end
    repeat (5) @(negedge clk);
    expect_state("hard sticky", 0, 0, 1);
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t;
    do_reset();
    expect_state("after reset", 1, 0, 0);

    // non-zero addresses do not trigger
    lsu_valid = '1;
    repeat (3) @(negedge clk);
    lsu_valid = '0;
    expect_state("nonzero addr", 1, 0, 0);

    // short retirement gap: pause after exactly SG cycles without retirement
    retire = 0;
    t = 0;
    while (rec_en && t < 100) begin @(negedge clk); t++; end
    checks++;
    if (t != SG) begin failures++; $display("FAIL soft gap after %0d cycles, exp %0d", t, SG); end
    expect_state("soft gap", 0, 1, 0);
    retire = 1;
    @(negedge clk);
    expect_state("resume on retire", 1, 0, 0);

    // TLB miss pauses, refill resumes
    tlb_miss = 1;
    @(negedge clk);
    tlb_miss = 0;
    expect_state("tlb miss", 0, 1, 0);
    repeat (4) @(negedge clk);
    expect_state("tlb wait", 0, 1, 0);
    tlb_refill = 1;
    @(negedge clk);
    tlb_refill = 0;
    expect_state("tlb refill", 1, 0, 0);

    // long retirement gap: hard after SG + LG cycles
    retire = 0;
    t = 0;
    while (!stop && t < 1000) begin @(negedge clk); t++; end
    checks++;
    if (t != SG + LG) begin failures++; $display("FAIL hard gap after %0d cycles, exp %0d", t, SG + LG); end
    checks++;
    if (!cause.deadlock) begin failures++; $display("FAIL deadlock cause"); end
    retire = 1;
    @(negedge clk);
    expect_state("deadlock sticky", 0, 0, 1);

    for (int k = 0; k < 5; k++) hard(k);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
