// edc_dec: error detection code decoder and data error counter of SyncRx.
//
// Checks every received word: the data, its data/sync flag and the parity
// bit from edc_gen must hold an even number of ones. A failing word raises
// `err` for that cycle (combinational) and increments the saturating data
// error counter one clock later. The counter is cleared by reset only.
// Single-bit parity and the counter width are this design's choices.
module edc_dec #(
  parameter int unsigned DATA_W = 8,
  parameter int unsigned CNT_W  = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [DATA_W-1:0] data,
  input  logic              flag,
  input  logic              edc,
  output logic              err,
  output logic [CNT_W-1:0]  err_count
);
  always_comb err = ^{edc, flag, data};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                        err_count <= '0;
    else if (err && (err_count != '1)) err_count <= err_count + 1'b1;
  end
endmodule
