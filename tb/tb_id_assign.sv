// tb_id_assign: checks the ID-assignment scheme.
// A reference counter in the testbench hands out X+1..X+k (mod 4n) to the
// k ways that fetch, in way order, and jumps to Y+2n+1 after a flush caused
// by ID Y. IDs must be available in the same cycle the instructions leave
// fetch (zero latency), and the first ID after reset is 0. A second unit
// with n = 8 (IDs mod 32) repeats the worked flush example: IDs 3..6 are in
// flight, ID 3 causes a flush, and the next instruction must get ID 20.
module tb_id_assign;
  localparam int WAYS = 4;
  localparam int N    = 64;
  localparam int ID_W = 8;
  int checks = 0, failures = 0, flushes = 0;

  logic clk = 0, rst_n = 0;
  logic [WAYS-1:0] fetch_valid;
  logic            flush;
  logic [ID_W-1:0] flush_id;
  logic [ID_W-1:0] id [WAYS];
  logic [ID_W-1:0] last_id;

  id_assign #(.WAYS(WAYS), .N_INFLIGHT(N)) dut (.*);

  always #5 clk = ~clk;

  // second unit with n = 8 (5-bit IDs, mod 32) for the flush example:
  // IDs 3,4,5,6 are fetched, ID 3 flushes, the next instruction gets 20
  logic [3:0] s_valid;
  logic       s_flush;
  logic [4:0] s_flush_id;
  logic [4:0] s_id [4];
  logic [4:0] s_last;
  id_assign #(.WAYS(4), .N_INFLIGHT(8)) dut8 (
    .clk, .rst_n, .fetch_valid(s_valid), .flush(s_flush), .flush_id(s_flush_id),
    .id(s_id), .last_id(s_last));

  initial begin
    s_valid = '0; s_flush = 0; s_flush_id = '0;
    @(posedge rst_n);
    @(negedge clk);
    s_valid = 4'b0111;                        // IDs 0, 1, 2
    @(negedge clk);
    s_valid = 4'b1111;                        // IDs 3, 4, 5, 6
    #1;
    for (int w = 0; w < 4; w++) begin
      checks++;
      if (s_id[w] != 5'(3 + w)) begin failures++; $display("FAIL n=8 id %0d", s_id[w]); end
    end
    @(negedge clk);
    s_valid = '0; s_flush = 1; s_flush_id = 5'd3;
    @(negedge clk);
    s_flush = 0; s_valid = 4'b0100;           // one instruction, in way 2
    #1;
    checks++;
    if (s_id[2] != 5'd20) begin failures++; $display("FAIL n=8 after flush id %0d exp 20", s_id[2]); end
    @(negedge clk);
    s_valid = '0;
  end

  int next_id;   // ID the next fetched instruction must get

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fetch_valid = '0; flush = 0; flush_id = '0;
    next_id = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 5000; cyc++) begin
      @(negedge clk);
      checks++;
      if (last_id != ID_W'((next_id + 4 * N - 1) % (4 * N))) begin
        failures++;
        $display("FAIL cyc %0d: last_id %0d", cyc, last_id);
      end
      flush       = ($urandom_range(0, 19) == 0);
      flush_id    = ID_W'($urandom);
      fetch_valid = WAYS'($urandom);
      #1;
      if (!flush) begin
        for (int w = 0; w < WAYS; w++)
          if (fetch_valid[w]) begin
            checks++;
            if (id[w] != ID_W'(next_id)) begin
              failures++;
              $display("FAIL cyc %0d way %0d: id %0d exp %0d", cyc, w, id[w], next_id);
            end
            next_id = (next_id + 1) % (4 * N);
          end
      end else begin
        flushes++;
        next_id = (int'(flush_id) + 2 * N + 1) % (4 * N);
      end
    end
    if (flushes == 0) failures++;
    $display("flushes=%0d", flushes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
