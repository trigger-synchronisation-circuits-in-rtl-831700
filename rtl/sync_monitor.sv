// sync_monitor: Monitor of Synchronisation Errors of SyncRx (R/W FIFO
// counters, sync error flag and sync error counter).
//
// Counts the FIFO writes of each orbit on the write clock, from the FIFO
// input being enabled to its being disabled, and the FIFO reads of each
// orbit on the read clock, from the Common BC0 to the read-side SOG.
// Synchronisation is lost in an orbit when either count differs from
// N_DATA, the number of periods between BC0 and SOG.
//
// Write side: when the input is disabled (end of orbit) the count is kept
// in wr_count_last and its verdict in a level that crosses to the read
// clock through two flops. Read side: CHECK_DLY read clocks after SOG (long
// enough for the write verdict of the same orbit to arrive, since writing
// ends before reading), sync_err_flag is set to the verdict of the orbit
// just read and held until the next check; each failing orbit increments
// the saturating sync_err_count. The counting rule is the circuit's; the
// check instant, the held flag and the counter widths are this design's.
module sync_monitor #(
  parameter int unsigned N_DATA    = sync_pkg::N_DATA,
  parameter int unsigned CNT_W     = 12,
  parameter int unsigned ERR_W     = 16,
  parameter int unsigned CHECK_DLY = 4
) (
  // write side
  input  logic             wclk,
  input  logic             wrst_n,
  input  logic             wr_orbit_start,
  input  logic             wr_orbit_end,
  input  logic             wr_accept,
  output logic [CNT_W-1:0] wr_count_last,
  // read side
  input  logic             rclk,
  input  logic             rrst_n,
  input  logic             rd_orbit_start,
  input  logic             rd_orbit_end,
  input  logic             rd_accept,
  output logic [CNT_W-1:0] rd_count_last,
  output logic             sync_err_flag,
  output logic [ERR_W-1:0] sync_err_count
);
  logic [CNT_W-1:0] wr_cnt, rd_cnt;
  logic             wr_err, wr_err_r1, wr_err_r2, rd_err;
  logic [CHECK_DLY-1:0] chk_pipe;

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wr_cnt        <= '0;
      wr_count_last <= '0;
      wr_err        <= 1'b0;
    end else begin
      if (wr_orbit_start) wr_cnt <= CNT_W'(wr_accept);
      else if (wr_accept) wr_cnt <= wr_cnt + 1'b1;
      if (wr_orbit_end) begin
        wr_count_last <= wr_cnt;
        wr_err        <= (wr_cnt != CNT_W'(N_DATA));
      end
    end
  end

  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      wr_err_r1      <= 1'b0;
      wr_err_r2      <= 1'b0;
      rd_cnt         <= '0;
      rd_count_last  <= '0;
      rd_err         <= 1'b0;
      chk_pipe       <= '0;
      sync_err_flag  <= 1'b0;
      sync_err_count <= '0;
    end else begin
      wr_err_r1 <= wr_err;
      wr_err_r2 <= wr_err_r1;
      if (rd_orbit_start) rd_cnt <= '0;
      else if (rd_accept) rd_cnt <= rd_cnt + 1'b1;
      if (rd_orbit_end) begin
        rd_count_last <= rd_cnt;
        rd_err        <= (rd_cnt != CNT_W'(N_DATA));
      end
      chk_pipe <= {chk_pipe[CHECK_DLY-2:0], rd_orbit_end};
      if (chk_pipe[CHECK_DLY-1]) begin
        sync_err_flag <= rd_err || wr_err_r2;
        if ((rd_err || wr_err_r2) && (sync_err_count != '1))
          sync_err_count <= sync_err_count + 1'b1;
      end
    end
  end
endmodule
