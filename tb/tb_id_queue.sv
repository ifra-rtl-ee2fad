// tb_id_queue: writes IDs at random free entries (several ports per cycle),
// reads them back out of order by entry index, releases them, and flushes
// occasionally. Read data and valid bits are compared with an array model.
module tb_id_queue;
  localparam int DEPTH = 64, WRP = 4, RDP = 4, ID_W = 8, IW = 6;
  int checks = 0, failures = 0, flushes = 0, hits = 0;

  logic clk = 0, rst_n = 0, flush;
  logic [WRP-1:0]  wr_en;
  logic [IW-1:0]   wr_idx [WRP];
  logic [ID_W-1:0] wr_id  [WRP];
  logic [IW-1:0]   rd_idx [RDP];
  logic [RDP-1:0]  rd_release, rd_valid;
  logic [ID_W-1:0] rd_id  [RDP];

  id_queue #(.DEPTH(DEPTH), .WR_PORTS(WRP), .RD_PORTS(RDP), .ID_W(ID_W)) dut (.*);
  always #5 clk = ~clk;

  bit              m_v  [DEPTH];
  logic [ID_W-1:0] m_id [DEPTH];

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit taken [DEPTH];
    flush = 0; wr_en = '0; rd_release = '0;
    for (int p = 0; p < WRP; p++) begin wr_idx[p] = '0; wr_id[p] = '0; end
    for (int p = 0; p < RDP; p++) rd_idx[p] = '0;
    for (int i = 0; i < DEPTH; i++) m_v[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      @(negedge clk);
      for (int i = 0; i < DEPTH; i++) taken[i] = 0;
      // reads: random indices, distinct
      for (int p = 0; p < RDP; p++) begin
        int idx;
        do idx = $urandom_range(0, DEPTH - 1); while (taken[idx]);
        taken[idx] = 1;
        rd_idx[p] = IW'(idx);
        rd_release[p] = 1'($urandom_range(0, 1));
      end
      // writes: random free, untaken entries
      for (int p = 0; p < WRP; p++) begin
        int idx, tries;
        wr_en[p] = 0; tries = 0;
        do begin idx = $urandom_range(0, DEPTH - 1); tries++; end
        while ((taken[idx] || m_v[idx]) && tries < 20);
        if (!taken[idx] && !m_v[idx] && $urandom_range(0, 1) != 0) begin
          taken[idx] = 1; wr_en[p] = 1; wr_idx[p] = IW'(idx); wr_id[p] = ID_W'($urandom);
        end
      end
      flush = ($urandom_range(0, 199) == 0);
      #1;
      for (int p = 0; p < RDP; p++) begin
        checks++;
        if (rd_valid[p] != m_v[rd_idx[p]]) begin
          failures++; $display("FAIL cyc %0d port %0d valid", cyc, p);
        end
        if (m_v[rd_idx[p]]) begin
          hits++; checks++;
          if (rd_id[p] != m_id[rd_idx[p]]) begin
            failures++; $display("FAIL cyc %0d port %0d id %0d exp %0d", cyc, p, rd_id[p], m_id[rd_idx[p]]);
          end
        end
      end
      if (flush) begin
        flushes++;
        for (int i = 0; i < DEPTH; i++) m_v[i] = 0;
      end else begin
        for (int p = 0; p < RDP; p++) if (rd_release[p]) m_v[rd_idx[p]] = 0;
        for (int p = 0; p < WRP; p++) if (wr_en[p]) begin m_v[wr_idx[p]] = 1; m_id[wr_idx[p]] = wr_id[p]; end
      end
    end
    if (flushes == 0 || hits == 0) failures++;
    $display("hits=%0d flushes=%0d", hits, flushes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
