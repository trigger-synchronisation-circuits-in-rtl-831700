// sync_txrx: the SyncTx/Rx trigger synchronisation circuit (top level).
//
// One circuit per trigger link. It holds SyncTx (bunch 0 flagging, sync
// data during the LHC gap, bunch profile histogram, EDC generation),
// SyncRx (EDC check, Synchronisation Command Decoder, dual-clock
// Synchronisation FIFO read out under the Common BC0, monitor of
// synchronisation errors) and the control registers. The mode register
// selects how the halves are used:
//   TXRX  both halves in one circuit at the receiving end of a link: the
//         Rx half takes the Tx half's words directly;
//   TX    transmitting end: tx_* go to the link, Rx outputs are held in
//         sync mode (data 0, flag 1);
//   RX    receiving end: the Rx half takes link_* from the link.
// tx_* are driven in every mode. The link clock is tx_clk in all modes (in
// RX and TXRX mode it is the clock recovered from the link); rx_clk is the
// common clock fanned out with equal phase to all circuits. The mode
// register lives on tx_clk; its copy for the rx_clk outputs passes through
// two flops and is meant to be changed only while the trigger is idle.
// The mode encoding and control register map are this design's choices.
module sync_txrx #(
  parameter int unsigned       DATA_W     = 8,
  parameter int unsigned       N_DATA     = sync_pkg::N_DATA,
  parameter int unsigned       ACCU_DEPTH = sync_pkg::ORBIT_LEN,
  parameter int unsigned       ACCU_W     = 16,
  parameter int unsigned       FIFO_DEPTH = 16,
  parameter logic [DATA_W-1:0] CLR_WORD   = DATA_W'(64)
) (
  input  logic              tx_clk,
  input  logic              tx_rst_n,
  input  logic              rx_clk,
  input  logic              rx_rst_n,
  // trigger data and TTC commands (tx_clk)
  input  logic [DATA_W-1:0] data_in,
  input  logic              ttc_cmd_valid,
  input  logic [7:0]        ttc_cmd,
  // control lines (tx_clk)
  input  logic [3:0]        ctrl_addr,
  input  logic              ctrl_wr,
  input  logic              ctrl_rd,
  input  logic [15:0]       ctrl_wdata,
  output logic [15:0]       ctrl_rdata,
  output logic              ctrl_rvalid,
  // link transmit side (tx_clk)
  output logic [DATA_W-1:0] tx_data,
  output logic              tx_flag,
  output logic              tx_edc,
  // link receive side (tx_clk), used in RX mode
  input  logic [DATA_W-1:0] link_data,
  input  logic              link_flag,
  input  logic              link_edc,
  // synchronised output (rx_clk)
  input  logic              common_bc0,
  output logic [DATA_W-1:0] rx_data,
  output logic              rx_flag,
  output logic              sync_err_flag,
  output logic [15:0]       sync_err_count
);
  import sync_pkg::*;

  localparam int unsigned BX_W = $clog2(ACCU_DEPTH);
  localparam int unsigned CNT_W = $clog2(N_DATA + 1);

  mode_e             mode;
  logic [1:0]        mode_r1, mode_r2;
  logic [DATA_W-1:0] threshold;
  logic [BX_W-1:0]   accu_rd_addr;
  logic [ACCU_W-1:0] accu_rd_data;
  logic              accu_busy, accu_enabled;
  logic [15:0]       data_err_count;
  logic [CNT_W-1:0]  wr_count_last, rd_count_last;
  logic [DATA_W-1:0] rx_in_data, rx_out_data;
  logic              rx_in_flag, rx_in_edc, rx_out_flag;
  logic              fifo_full, fifo_empty, clear_seen;

  control_regs #(.DATA_W(DATA_W), .BX_W(BX_W), .CNT_W(ACCU_W), .ERR_W(16),
                 .WCNT_W(CNT_W)) u_ctrl (
    .clk(tx_clk), .rst_n(tx_rst_n), .ctrl_addr, .ctrl_wr, .ctrl_rd,
    .ctrl_wdata, .ctrl_rdata, .ctrl_rvalid, .mode, .threshold,
    .accu_rd_addr, .accu_rd_data, .accu_busy, .accu_enabled,
    .data_err_count, .wr_count_last
  );

  sync_tx #(.DATA_W(DATA_W), .N_DATA(N_DATA), .DEPTH(ACCU_DEPTH),
            .CNT_W(ACCU_W), .BX_W(BX_W)) u_tx (
    .clk(tx_clk), .rst_n(tx_rst_n), .data_in, .ttc_cmd_valid, .ttc_cmd,
    .threshold, .accu_rd_addr, .accu_rd_data, .accu_busy, .accu_enabled,
    .out_data(tx_data), .out_flag(tx_flag), .out_edc(tx_edc)
  );

  always_comb begin
    if (mode == MODE_TXRX) begin
      rx_in_data = tx_data;
      rx_in_flag = tx_flag;
      rx_in_edc  = tx_edc;
    end else begin
      rx_in_data = link_data;
      rx_in_flag = link_flag;
      rx_in_edc  = link_edc;
    end
  end

  sync_rx #(.DATA_W(DATA_W), .N_DATA(N_DATA), .FIFO_DEPTH(FIFO_DEPTH),
            .CLR_WORD(CLR_WORD), .CNT_W(CNT_W), .ERR_W(16)) u_rx (
    .wclk(tx_clk), .wrst_n(tx_rst_n), .in_data(rx_in_data),
    .in_flag(rx_in_flag), .in_edc(rx_in_edc), .data_err_count,
    .wr_count_last, .fifo_full, .clear_seen,
    .rclk(rx_clk), .rrst_n(rx_rst_n), .common_bc0, .out_data(rx_out_data),
    .out_flag(rx_out_flag), .fifo_empty, .sync_err_flag, .sync_err_count,
    .rd_count_last
  );

  always_ff @(posedge rx_clk or negedge rx_rst_n) begin
    if (!rx_rst_n) begin
      mode_r1 <= 2'(MODE_TXRX);
      mode_r2 <= 2'(MODE_TXRX);
    end else begin
      mode_r1 <= mode;
      mode_r2 <= mode_r1;
    end
  end

  always_comb begin
    if (mode_r2 == 2'(MODE_TX)) begin
      rx_data = '0;
      rx_flag = 1'b1;
    end else begin
      rx_data = rx_out_data;
      rx_flag = rx_out_flag;
    end
  end

  // FIFO state flags, the clear strobe and the read count are visible in
  // simulation through the hierarchy; they have no pins on this circuit.
  logic unused;
  assign unused = fifo_full ^ fifo_empty ^ clear_seen ^ (^rd_count_last);
endmodule
