// edc_gen: error detection code generator of SyncTx.
//
// Produces one even-parity bit over the data word and its data/sync flag,
// so that the word, flag and parity together always hold an even number
// of ones. Combinational. The circuit provides EDC generation and decoding;
// a single parity bit as the code is this design's choice.
module edc_gen #(
  parameter int unsigned DATA_W = 8
) (
  input  logic [DATA_W-1:0] data,
  input  logic              flag,
  output logic              edc
);
  always_comb edc = ^{flag, data};
endmodule
