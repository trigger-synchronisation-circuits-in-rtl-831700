// sync_pkg: constants and types shared by the SyncTx/SyncRx trigger
// synchronisation circuit.
//
// The LHC orbit is 3564 bunch-crossing periods of the 40.08 MHz machine
// clock. It ends with the 127-crossing extraction gap; the first crossing
// after the gap is bunch 0. Data therefore flows for ORBIT_LEN - GAP_LEN =
// 3437 periods between BC0 and the start of the gap (SOG). These three
// numbers are the LHC's own. The TTC broadcast command codes and the mode
// encoding below are this design's choice: the circuit only needs to tell
// BC0, Start, Stop and Reset apart, and to know whether it runs as Tx, Rx
// or both.
package sync_pkg;

  localparam int unsigned ORBIT_LEN = 3564;            // periods per orbit
  localparam int unsigned GAP_LEN   = 127;             // extraction gap
  localparam int unsigned N_DATA    = ORBIT_LEN - GAP_LEN; // BC0 .. SOG

  // TTC broadcast command byte, decoded by the TTC command decoder.
  typedef enum logic [7:0] {
    TTC_BC0   = 8'h01,   // bunch 0 arrives in the next clock
    TTC_START = 8'h02,   // start filling the bunch profile histogram
    TTC_STOP  = 8'h03,   // stop filling it
    TTC_RESET = 8'h04    // clear the histogram and return to sync mode
  } ttc_cmd_e;

  // Operating mode of a SyncTx/Rx circuit.
  typedef enum logic [1:0] {
    MODE_TXRX = 2'd0,    // both halves in one circuit, Rx fed by own Tx
    MODE_TX   = 2'd1,    // transmit end of a link, Rx outputs held at 0
    MODE_RX   = 2'd2     // receive end of a link, Rx fed from the link
  } mode_e;

  // Control register map (word addresses on the control lines).
  localparam logic [3:0] REG_MODE      = 4'd0;
  localparam logic [3:0] REG_THRESHOLD = 4'd1;
  localparam logic [3:0] REG_ACCU_ADDR = 4'd2;
  localparam logic [3:0] REG_ACCU_DATA = 4'd3;
  localparam logic [3:0] REG_STATUS    = 4'd4;
  localparam logic [3:0] REG_DATA_ERR  = 4'd5;
  localparam logic [3:0] REG_WR_COUNT  = 4'd6;

endpackage
