// recorder: instruction-footprint recorder of one way of one pipeline stage.
//
// Each instruction leaving the stage in this way drops a footprint: its ID
// and a few bits of stage-specific auxiliary information. Footprints go into
// a circular buffer that is overwritten continuously, so that after a
// failure it holds the last DEPTH entries of history. Every entry has three
// fields, {idle, ID or idle count, aux}:
//   idle = 0 : an instruction passed; the middle field is its ID.
//   idle = 1 : a run of cycles without an instruction; the middle field is
//              the number of such cycles, the aux field is zero.
// The idle-cycle FSM compacts a run of empty cycles into one entry: on the
// first empty cycle it writes an idle entry with count 1 at the write
// pointer without advancing it, and rewrites that entry with count+1 on
// every further empty cycle. When an instruction arrives (or the count would
// overflow the ID field) the idle entry is closed and the new entry is
// written just after it. The write pointer therefore always points at the
// next free entry once the run is closed, and the full flag records whether
// it ever wrapped from DEPTH-1 to 0, which tells the analysis where the
// eldest entry is. The entry layout, idle compaction, write pointer, full
// flag and serializer follow the design; the in-place update of the open
// idle entry and the saturation of the count at 2^ID_W-1 are this
// implementation's choices.
//
// Control: rec_en comes from the post-trigger generator. While it is low
// (soft post-trigger pause, or hard stop) nothing is recorded and an open
// idle entry is closed. A hard stop is simply rec_en staying low.
//
// Scan-out: with scan_en high (and rec_en low) the recorder is a shift
// register of (AW + 1) + DEPTH*EW bits (AW = log2 DEPTH) between scan_in and scan_out, one bit per
// clock: first the write pointer (LSB first) and the full flag, then entry 0,
// entry 1, ... entry DEPTH-1, each LSB first (aux, then the ID/count field,
// then the idle bit). Bits entering at scan_in replace the buffer contents in
// the same order, so while scan_en stays high the recorder is a plain
// delay line of that many bits and recorders chain into one long scan chain.
// Dropping scan_en ends the dump: the serializer realigns to entry 0. The buffer
// needs one read and one write port; the serializer reads the next entry and
// writes back the entry it has just filled once every EW clocks.
module recorder #(
  parameter int unsigned ID_W  = 8,     // instruction ID / idle-count field
  parameter int unsigned AUX_W = 32,    // auxiliary information (may be 0)
  parameter int unsigned DEPTH = 1024,  // entries, a power of two >= 2
  localparam int unsigned AW    = $clog2(DEPTH),
  localparam int unsigned EW    = 1 + ID_W + AUX_W,   // entry width
  localparam int unsigned AUXP  = (AUX_W > 0) ? AUX_W : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            rec_en,     // record (no post-trigger active)
  input  logic            in_valid,   // an instruction leaves the stage in this way
  input  logic [ID_W-1:0] in_id,
  input  logic [AUXP-1:0] in_aux,     // ignored when AUX_W = 0
  input  logic            scan_en,
  input  logic            scan_in,
  output logic            scan_out,
  output logic [AW-1:0]   wr_ptr,     // for observation
  output logic            full        // for observation
);
  localparam logic [ID_W-1:0] CNT_MAX = '1;
  localparam int unsigned     BW      = $clog2(EW);

  logic [EW-1:0] mem [DEPTH];

  // ---------------- recording state
  logic            idle_open;
  logic [ID_W-1:0] idle_cnt;

  // ---------------- serializer state
  logic [EW-1:0]   sr;
  logic [AW-1:0]   sidx;
  logic [BW-1:0]   bitcnt;

  // ---------------- entry formatting
  function automatic logic [EW-1:0] mk_entry(input logic idle, input logic [ID_W-1:0] f,
                                             input logic [AUXP-1:0] aux);
    logic [EW-1:0] e;
    e = '0;
    e[EW-1] = idle;
    e[EW-2 -: ID_W] = f;
    if (AUX_W > 0 && !idle) e[AUXP-1:0] = aux;
    return e;
  endfunction

  // ---------------- next-state of the recording path
  logic            rec;
  logic            we;
  logic [AW-1:0]   waddr;
  logic [EW-1:0]   wdata;
  logic [1:0]      adv;          // how far the write pointer advances
  logic            open_n;
  logic [ID_W-1:0] cnt_n;
  logic [AW:0]     wp_sum;
  logic [EW-1:0]   sr_shift;
  logic            word_done;

  assign rec       = rec_en && !scan_en;
  assign sr_shift  = {scan_in, sr[EW-1:1]};
  assign word_done = scan_en && (bitcnt == BW'(EW - 1));

  always_comb begin
    we     = 1'b0;
    waddr  = wr_ptr;
    wdata  = '0;
    adv    = 2'd0;
    open_n = idle_open;
    cnt_n  = idle_cnt;
    if (scan_en) begin
      we    = word_done;
      waddr = sidx;
      wdata = sr_shift;
    end else if (rec) begin
      if (in_valid) begin
        // close a pending idle entry and store the footprint after it
        we     = 1'b1;
        waddr  = idle_open ? wr_ptr + 1'b1 : wr_ptr;
        wdata  = mk_entry(1'b0, in_id, in_aux);
        adv    = idle_open ? 2'd2 : 2'd1;
        open_n = 1'b0;
      end else if (!idle_open) begin
        // first empty cycle: open an idle entry
        we     = 1'b1;
        wdata  = mk_entry(1'b1, ID_W'(1), '0);
        open_n = 1'b1;
        cnt_n  = ID_W'(1);
      end else if (idle_cnt == CNT_MAX) begin
        // count field full: close it and open the next one
        we     = 1'b1;
        waddr  = wr_ptr + 1'b1;
        wdata  = mk_entry(1'b1, ID_W'(1), '0);
        adv    = 2'd1;
        cnt_n  = ID_W'(1);
      end else begin
        we     = 1'b1;
        wdata  = mk_entry(1'b1, idle_cnt + 1'b1, '0);
        cnt_n  = idle_cnt + 1'b1;
      end
    end else if (idle_open) begin
      // recording paused or stopped: close the open idle entry
      adv    = 2'd1;
      open_n = 1'b0;
    end
    wp_sum = {1'b0, wr_ptr} + (AW+1)'(adv);
  end

  // ---------------- state registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr    <= '0;
      full      <= 1'b0;
      idle_open <= 1'b0;
      idle_cnt  <= '0;
      sidx      <= '0;
      bitcnt    <= '0;
    end else if (scan_en) begin
      // header shifts as the last stage of the chain
      {full, wr_ptr} <= {sr[0], full, wr_ptr[AW-1:1]};
      idle_open      <= 1'b0;
      if (word_done) begin
        bitcnt <= '0;
        sidx   <= sidx + 1'b1;
      end else begin
        bitcnt <= bitcnt + 1'b1;
      end
    end else begin
      wr_ptr    <= wp_sum[AW-1:0];
      if (wp_sum[AW]) full <= 1'b1;      // wrapped past DEPTH-1
      idle_open <= open_n;
      idle_cnt  <= cnt_n;
      sidx      <= '0;
      bitcnt    <= '0;
    end
  end

  assign scan_out = wr_ptr[0];

  // ---------------- buffer: one write port, one read port (serializer)
  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (!scan_en)       sr <= mem[0];
    else if (word_done) sr <= mem[sidx + 1'b1];
    else                sr <= sr_shift;
  end

  initial begin
    assert (DEPTH >= 2 && (DEPTH & (DEPTH - 1)) == 0)
      else $error("recorder: DEPTH must be a power of two >= 2");
  end

endmodule
