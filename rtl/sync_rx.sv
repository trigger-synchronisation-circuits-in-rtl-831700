// sync_rx: SyncRx, the receive half of the trigger synchronisation circuit.
//
// Brings every trigger link into step with all others. On the link clock
// (wclk, TxClk) the EDC decoder checks each received word and counts
// parity errors, and the Synchronisation Command Decoder (SCD) writes the
// data words of an orbit into the Synchronisation FIFO, stops writing when
// the data/sync flag goes to 'sync', clears the FIFO on the clear word of
// the gap and starts writing again, with bunch 0 first, when the flag goes
// back to 'data'. On the common clock (rclk, RxClk) the Common BC0,
// distributed with the same phase to every SyncRx, starts reading: the
// first word read is bunch 0, and reading goes on for N_DATA clocks, until
// the read-side start of gap (SOG). Outside that window, or when the FIFO
// is empty, the data outputs are 0; out_flag is 1 ('sync') outside the
// window. The monitor compares the orbit's write and
// read counts with N_DATA and flags and counts lost synchronisation.
//
// Timing (rclk): Common BC0 at clock c -> first read at c+1 -> bunch 0 on
// out_data with out_flag = 0 ('data') at c+2; the window then lasts N_DATA clocks.
// The Common BC0 must come after bunch 0 has reached the FIFO in every
// channel (two to three rclk of synchroniser delay after its write) and
// early enough that no FIFO fills.
module sync_rx #(
  parameter int unsigned       DATA_W     = 8,
  parameter int unsigned       N_DATA     = sync_pkg::N_DATA,
  parameter int unsigned       FIFO_DEPTH = 16,
  parameter logic [DATA_W-1:0] CLR_WORD   = DATA_W'(64),
  parameter int unsigned       CNT_W      = 12,
  parameter int unsigned       ERR_W      = 16
) (
  // link side (TxClk)
  input  logic              wclk,
  input  logic              wrst_n,
  input  logic [DATA_W-1:0] in_data,
  input  logic              in_flag,
  input  logic              in_edc,
  output logic [ERR_W-1:0]  data_err_count,
  output logic [CNT_W-1:0]  wr_count_last,
  output logic              fifo_full,
  output logic              clear_seen,
  // common side (RxClk)
  input  logic              rclk,
  input  logic              rrst_n,
  input  logic              common_bc0,
  output logic [DATA_W-1:0] out_data,
  output logic              out_flag,
  output logic              fifo_empty,
  output logic              sync_err_flag,
  output logic [ERR_W-1:0]  sync_err_count,
  output logic [CNT_W-1:0]  rd_count_last
);
  localparam int unsigned BX_W = $clog2(N_DATA + 1);

  logic              edc_err;
  logic              wr_en, enable_in, disable_in, clear_fifo, wr_accept;
  logic [DATA_W-1:0] wr_data, rd_data;
  logic              rd_active, rd_sog, rd_accept, rd_valid, active_q;
  logic [BX_W-1:0]   rd_bx;

  edc_dec #(.DATA_W(DATA_W), .CNT_W(ERR_W)) u_edc (
    .clk(wclk), .rst_n(wrst_n), .data(in_data), .flag(in_flag), .edc(in_edc),
    .err(edc_err), .err_count(data_err_count)
  );

  sync_cmd_decoder #(.DATA_W(DATA_W), .CLR_WORD(CLR_WORD)) u_scd (
    .clk(wclk), .rst_n(wrst_n), .in_data, .in_flag,
    .wr_en, .wr_data, .enable_in, .disable_in, .clear_fifo
  );

  sync_fifo #(.DATA_W(DATA_W), .DEPTH(FIFO_DEPTH)) u_fifo (
    .wclk, .wrst_n, .clear(clear_fifo), .wr_en, .wr_data, .wr_accept,
    .full(fifo_full),
    .rclk, .rrst_n, .rd_en(rd_active), .rd_accept, .rd_data, .rd_valid,
    .empty(fifo_empty)
  );

  bx_counter #(.N_DATA(N_DATA), .BX_W(BX_W)) u_rdbx (
    .clk(rclk), .rst_n(rrst_n), .bc0(common_bc0), .active(rd_active),
    .bx(rd_bx), .sog(rd_sog)
  );

  sync_monitor #(.N_DATA(N_DATA), .CNT_W(CNT_W), .ERR_W(ERR_W)) u_mon (
    .wclk, .wrst_n, .wr_orbit_start(enable_in), .wr_orbit_end(disable_in),
    .wr_accept, .wr_count_last,
    .rclk, .rrst_n, .rd_orbit_start(common_bc0), .rd_orbit_end(rd_sog),
    .rd_accept, .rd_count_last, .sync_err_flag, .sync_err_count
  );

  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) active_q <= 1'b0;
    else         active_q <= rd_active;
  end

  always_comb begin
    out_data   = rd_valid ? rd_data : '0;
    out_flag   = !active_q;
    clear_seen = clear_fifo;
  end

  // The parity verdict per word is counted in edc_dec; the read-side bunch
  // index is not needed beyond the window timer.
  logic unused;
  assign unused = edc_err ^ (^rd_bx);
endmodule
