// sync_tx: SyncTx, the transmit half of the trigger synchronisation circuit.
//
// Flags bunch 0 and fills the bunch profile histogram. The TTC command
// decoder turns the broadcast byte into BC0/Start/Stop/Reset pulses. A BC0
// pulse means that the input word of the following clock is bunch 0: from
// then on, for N_DATA clocks, the multiplexer passes the input data with
// the data/sync flag at 'data' (0), and the accumulator adds one at address
// bx for every word above the noise threshold. The clock after the last
// data word is the start of the gap (SOG): the synchronisation data
// generator starts counting from 0, the multiplexer sends its words and
// the flag goes to 'sync' (1), and the histogram stops. A parity bit (EDC)
// goes with every word.
//
// Timing: TTC command at clock c -> decoded BC0 at c+1 -> bunch 0 expected
// on data_in at c+2 -> out_data/out_flag at c+3. The TTC command therefore
// has to be sent two clocks before bunch 0 reaches data_in; that offset is
// part of the BC0 phase adjusted in the TTC receiver. Reset/Start/Stop
// only act on the histogram (this design's choice). After reset the block
// sends sync words until the first BC0.
module sync_tx #(
  parameter int unsigned DATA_W = 8,
  parameter int unsigned N_DATA = sync_pkg::N_DATA,
  parameter int unsigned DEPTH  = sync_pkg::ORBIT_LEN,
  parameter int unsigned CNT_W  = 16,
  parameter int unsigned BX_W   = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [DATA_W-1:0] data_in,
  input  logic              ttc_cmd_valid,
  input  logic [7:0]        ttc_cmd,
  input  logic [DATA_W-1:0] threshold,
  input  logic [BX_W-1:0]   accu_rd_addr,
  output logic [CNT_W-1:0]  accu_rd_data,
  output logic              accu_busy,
  output logic              accu_enabled,
  output logic [DATA_W-1:0] out_data,
  output logic              out_flag,
  output logic              out_edc
);
  logic              bc0, start, stop, reset_cmd;
  logic              active, sog, hit;
  logic [BX_W-1:0]   bx;
  logic [DATA_W-1:0] sync_word;

  ttc_cmd_decoder u_dec (
    .clk, .rst_n, .cmd_valid(ttc_cmd_valid), .cmd(ttc_cmd),
    .bc0, .start, .stop, .reset_cmd
  );

  bx_counter #(.N_DATA(N_DATA), .BX_W(BX_W)) u_bx (
    .clk, .rst_n, .bc0, .active, .bx, .sog
  );

  sync_data_gen #(.DATA_W(DATA_W)) u_gen (
    .clk, .rst_n, .run(!active), .word(sync_word)
  );

  tx_mux #(.DATA_W(DATA_W)) u_mux (
    .clk, .rst_n, .sel_data(active), .data_in, .sync_word, .out_data, .out_flag
  );

  noise_threshold #(.DATA_W(DATA_W)) u_thr (
    .data(data_in), .threshold, .hit
  );

  accu #(.DEPTH(DEPTH), .CNT_W(CNT_W), .ADDR_W(BX_W)) u_accu (
    .clk, .rst_n, .active, .bx, .hit, .start, .stop, .clear(reset_cmd),
    .rd_addr(accu_rd_addr), .rd_data(accu_rd_data), .busy(accu_busy),
    .enabled(accu_enabled)
  );

  edc_gen #(.DATA_W(DATA_W)) u_edc (
    .data(out_data), .flag(out_flag), .edc(out_edc)
  );

  // The SOG pulse needs no consumer here: the generator and multiplexer
  // follow `active` directly. It is kept for observation in simulation.
  logic unused_sog;
  assign unused_sog = sog;
endmodule
