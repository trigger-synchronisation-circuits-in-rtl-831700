// tx_mux: SyncTx output multiplexer and data/sync flag.
//
// Selects the input data while sel_data is high (between BC0 and SOG) and
// the synchronisation word otherwise, and registers the choice together
// with the data/sync flag, which is active (1) in sync mode, during the
// gap, and 0 while data flows. Latency one clock. After reset the output
// is in sync mode.
module tx_mux #(
  parameter int unsigned DATA_W = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              sel_data,
  input  logic [DATA_W-1:0] data_in,
  input  logic [DATA_W-1:0] sync_word,
  output logic [DATA_W-1:0] out_data,
  output logic              out_flag
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_data <= '0;
      out_flag <= 1'b1;
    end else begin
      out_data <= sel_data ? data_in : sync_word;
      out_flag <= !sel_data;
    end
  end
endmodule
