// ttc_cmd_decoder: turns the TTC broadcast command byte into one-cycle
// pulses for BC0, Start, Stop and Reset.
//
// A command is taken when cmd_valid is high; the matching output pulses
// for exactly one tx_clk cycle, one cycle later (registered). Unknown codes
// are ignored. The four commands are the ones the SyncTx decoder is
// specified to handle; the byte-plus-strobe interface and the code values
// (sync_pkg::ttc_cmd_e) are this design's choice.
module ttc_cmd_decoder (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       cmd_valid,
  input  logic [7:0] cmd,
  output logic       bc0,
  output logic       start,
  output logic       stop,
  output logic       reset_cmd
);
  import sync_pkg::*;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bc0 <= 1'b0; start <= 1'b0; stop <= 1'b0; reset_cmd <= 1'b0;
    end else begin
      bc0       <= cmd_valid && (cmd == TTC_BC0);
      start     <= cmd_valid && (cmd == TTC_START);
      stop      <= cmd_valid && (cmd == TTC_STOP);
      reset_cmd <= cmd_valid && (cmd == TTC_RESET);
    end
  end
endmodule
