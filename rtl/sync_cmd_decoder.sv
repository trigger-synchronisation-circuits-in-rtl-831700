// sync_cmd_decoder: Synchronisation Command Decoder (SCD) of SyncRx.
//
// Watches the received word and its data/sync flag (1 = sync) on the
// transmit clock and drives the Synchronisation FIFO's input side:
//  * flag goes from data to sync: one orbit is complete, `disable_in`
//    pulses and the FIFO input is switched off;
//  * in sync mode, the word equal to CLR_WORD is the clear-FIFO command:
//    `clear_fifo` pulses, preparing the FIFO for the next orbit;
//  * flag goes from sync to data: the next orbit has begun, `enable_in`
//    pulses and the FIFO input is switched on again.
// All outputs are registered, one clock after the word they belong to;
// `wr_en`/`wr_data` are the FIFO write strobe and word, so the first word
// written after `enable_in` is bunch 0. The three actions follow the
// circuit's description. Which sync word clears the FIFO is not fixed
// there: CLR_WORD = 64 is this design's choice, placing the clear in the
// middle of the 127-word gap, after the reading side (at most the FIFO
// depth behind) has stopped and well before the next orbit.
module sync_cmd_decoder #(
  parameter int unsigned      DATA_W   = 8,
  parameter logic [DATA_W-1:0] CLR_WORD = DATA_W'(64)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [DATA_W-1:0] in_data,
  input  logic              in_flag,
  output logic              wr_en,
  output logic [DATA_W-1:0] wr_data,
  output logic              enable_in,
  output logic              disable_in,
  output logic              clear_fifo
);
  logic flag_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      flag_q     <= 1'b1;
      wr_en      <= 1'b0;
      wr_data    <= '0;
      enable_in  <= 1'b0;
      disable_in <= 1'b0;
      clear_fifo <= 1'b0;
    end else begin
      flag_q     <= in_flag;
      enable_in  <= !in_flag && flag_q;
      disable_in <= in_flag && !flag_q;
      clear_fifo <= in_flag && (in_data == CLR_WORD);
      wr_en      <= !in_flag;
      wr_data    <= in_data;
    end
  end
endmodule
