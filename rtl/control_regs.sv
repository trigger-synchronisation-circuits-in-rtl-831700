// control_regs: control block of the SyncTx/Rx circuit, reached through
// the control lines.
//
// A small register file on the link clock. A write (ctrl_wr) stores
// ctrl_wdata into the addressed register; a read (ctrl_rd) returns the
// addressed value on ctrl_rdata one clock later with ctrl_rvalid. Map
// (sync_pkg::REG_*):
//   0 MODE       R/W  operating mode, sync_pkg::mode_e (reset: TXRX)
//   1 THRESHOLD  R/W  noise threshold of the histogram (reset: 0)
//   2 ACCU_ADDR  R/W  histogram address for the next ACCU_DATA read
//   3 ACCU_DATA  R    histogram bin at ACCU_ADDR; each read then advances
//                     ACCU_ADDR by one, so the histogram reads out in one
//                     burst without stopping accumulation
//   4 STATUS     R    bit 0 histogram clear busy, bit 1 histogram enabled
//   5 DATA_ERR   R    EDC (parity) error count of the received data
//   6 WR_COUNT   R    FIFO writes counted in the last completed orbit
// Unmapped addresses read 0. No register is wider than 12 bits, so
// ctrl_wdata[15:12] is ignored on writes (a lint tool reports it unused). The circuit has a control block with control
// lines but its registers are not described; this map and bus are this
// design's choice.
module control_regs #(
  parameter int unsigned DATA_W = 8,
  parameter int unsigned BX_W   = 12,
  parameter int unsigned CNT_W  = 16,
  parameter int unsigned ERR_W  = 16,
  parameter int unsigned WCNT_W = 12
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [3:0]          ctrl_addr,
  input  logic                ctrl_wr,
  input  logic                ctrl_rd,
  input  logic [15:0]         ctrl_wdata,
  output logic [15:0]         ctrl_rdata,
  output logic                ctrl_rvalid,
  // configuration
  output sync_pkg::mode_e     mode,
  output logic [DATA_W-1:0]   threshold,
  // histogram read port
  output logic [BX_W-1:0]     accu_rd_addr,
  input  logic [CNT_W-1:0]    accu_rd_data,
  // status
  input  logic                accu_busy,
  input  logic                accu_enabled,
  input  logic [ERR_W-1:0]    data_err_count,
  input  logic [WCNT_W-1:0]   wr_count_last
);
  import sync_pkg::*;

  logic [3:0] rsel;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode         <= MODE_TXRX;
      threshold    <= '0;
      accu_rd_addr <= '0;
      rsel         <= '0;
      ctrl_rvalid  <= 1'b0;
    end else begin
      ctrl_rvalid <= ctrl_rd;
      if (ctrl_rd) rsel <= ctrl_addr;
      if (ctrl_wr) begin
        unique case (ctrl_addr)
          REG_MODE:      mode         <= mode_e'(ctrl_wdata[1:0]);
          REG_THRESHOLD: threshold    <= ctrl_wdata[DATA_W-1:0];
          REG_ACCU_ADDR: accu_rd_addr <= ctrl_wdata[BX_W-1:0];
          default: ;
        endcase
      end else if (ctrl_rd && ctrl_addr == REG_ACCU_DATA) begin
        accu_rd_addr <= accu_rd_addr + 1'b1;
      end
    end
  end

  always_comb begin
    ctrl_rdata = '0;
    if (ctrl_rvalid) begin
      unique case (rsel)
        REG_MODE:      ctrl_rdata = 16'(mode);
        REG_THRESHOLD: ctrl_rdata = 16'(threshold);
        REG_ACCU_ADDR: ctrl_rdata = 16'(accu_rd_addr);
        REG_ACCU_DATA: ctrl_rdata = 16'(accu_rd_data);
        REG_STATUS:    ctrl_rdata = {14'd0, accu_enabled, accu_busy};
        REG_DATA_ERR:  ctrl_rdata = 16'(data_err_count);
        REG_WR_COUNT:  ctrl_rdata = 16'(wr_count_last);
        default:       ctrl_rdata = '0;
      endcase
    end
  end
endmodule
