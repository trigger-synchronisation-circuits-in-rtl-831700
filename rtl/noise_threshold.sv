// noise_threshold: programmable noise threshold of the bunch profile
// accumulator.
//
// `hit` is high when the input word is strictly above the programmed
// threshold, as an unsigned comparison. Purely combinational; the
// threshold itself is held in the control registers. The strict
// comparison and unsigned coding are this design's reading of "above the
// noise threshold".
module noise_threshold #(
  parameter int unsigned DATA_W = 8
) (
  input  logic [DATA_W-1:0] data,
  input  logic [DATA_W-1:0] threshold,
  output logic              hit
);
  always_comb hit = (data > threshold);
endmodule
