// sync_data_gen: synchronisation data generator of SyncTx.
//
// A plain counter, as the circuit description calls it. While `run` is
// high (the gap) it counts up by one per clock, starting from 0 in the
// first gap cycle, wrapping at 2**DATA_W; while `run` is low (data) it
// is held at 0 so that the next gap again begins with word 0. The words
// are sent on the link in place of data during the gap; SyncRx recognises
// one of them as its clear-FIFO command. Counting from 0 at SOG is this
// design's choice.
module sync_data_gen #(
  parameter int unsigned DATA_W = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              run,
  output logic [DATA_W-1:0] word
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   word <= '0;
    else if (run) word <= word + 1'b1;
    else          word <= '0;
  end
endmodule
