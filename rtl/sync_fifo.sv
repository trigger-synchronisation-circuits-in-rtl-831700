// sync_fifo: the Synchronisation FIFO of SyncRx, a dual-clock FIFO.
//
// Written on the link clock (wclk, TxClk), read on the common clock (rclk,
// RxClk). Both clocks run at the LHC bunch frequency but with unknown
// phase, so the pointers cross domains as Gray codes through two-flop
// synchronisers (the classic scheme). A word is written when wr_en and not
// full (`wr_accept`), and read when rd_en and not empty (`rd_accept`); the
// read word appears on rd_data one rclk later with `rd_valid`. A write when
// full and a read when empty are dropped; the orbit write/read counters of
// the monitor then no longer match and flag a synchronisation error.
//
// `clear` (wclk) empties the FIFO for a new orbit: the write pointer is set
// to 0 at once, and the clear is carried to rclk by a toggle synchroniser
// that sets the read pointer to 0 two to three rclk cycles later. The clear
// must come while neither side is moving data, that is in the gap after
// the last read of the orbit; the pointer jump is then harmless. The FIFO
// depth is not given for this circuit; 16 words (power of two, at least 4)
// is this design's choice and bounds the spread of arrival phases between
// channels that the Common BC0 can absorb.
module sync_fifo #(
  parameter int unsigned DATA_W = 8,
  parameter int unsigned DEPTH  = 16,
  parameter int unsigned AW     = $clog2(DEPTH)
) (
  input  logic              wclk,
  input  logic              wrst_n,
  input  logic              clear,
  input  logic              wr_en,
  input  logic [DATA_W-1:0] wr_data,
  output logic              wr_accept,
  output logic              full,
  input  logic              rclk,
  input  logic              rrst_n,
  input  logic              rd_en,
  output logic              rd_accept,
  output logic [DATA_W-1:0] rd_data,
  output logic              rd_valid,
  output logic              empty
);
  logic [DATA_W-1:0] mem [DEPTH];

  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] rgray_w1, rgray_w2, wgray_r1, wgray_r2;
  logic [AW:0] rbin_w, wbin_r;
  logic        clr_tgl, clr_r1, clr_r2, clr_r3, rclear;

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  function automatic logic [AW:0] gray2bin(input logic [AW:0] g);
    logic [AW:0] b;
    b[AW] = g[AW];
    for (int i = int'(AW) - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  // ---------------- write side (wclk) ----------------
  always_comb begin
    rbin_w    = gray2bin(rgray_w2);
    full      = ((wbin - rbin_w) >= (AW+1)'(DEPTH));
    wr_accept = wr_en && !full && !clear;
  end

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wbin     <= '0;
      wgray    <= '0;
      rgray_w1 <= '0;
      rgray_w2 <= '0;
      clr_tgl  <= 1'b0;
    end else begin
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
      if (clear) begin
        wbin    <= '0;
        wgray   <= '0;
        clr_tgl <= ~clr_tgl;
      end else if (wr_accept) begin
        wbin  <= wbin + 1'b1;
        wgray <= bin2gray(wbin + 1'b1);
      end
    end
  end

  always_ff @(posedge wclk) begin
    if (wr_accept) mem[wbin[AW-1:0]] <= wr_data;
  end

  // ---------------- read side (rclk) ----------------
  always_comb begin
    wbin_r    = gray2bin(wgray_r2);
    empty     = (rbin == wbin_r);
    rclear    = clr_r2 ^ clr_r3;
    rd_accept = rd_en && !empty && !rclear;
  end

  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rbin     <= '0;
      rgray    <= '0;
      wgray_r1 <= '0;
      wgray_r2 <= '0;
      clr_r1   <= 1'b0;
      clr_r2   <= 1'b0;
      clr_r3   <= 1'b0;
      rd_valid <= 1'b0;
      rd_data  <= '0;
    end else begin
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
      clr_r1   <= clr_tgl;
      clr_r2   <= clr_r1;
      clr_r3   <= clr_r2;
      rd_valid <= rd_accept;
      if (rclear) begin
        rbin  <= '0;
        rgray <= '0;
      end else if (rd_accept) begin
        rd_data <= mem[rbin[AW-1:0]];
        rbin    <= rbin + 1'b1;
        rgray   <= bin2gray(rbin + 1'b1);
      end
    end
  end
endmodule
