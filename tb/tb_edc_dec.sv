// tb_edc_dec: random words with correct parity, a known number of them
// with one bit flipped; err must flag exactly those and the counter must
// end at their number.
module tb_edc_dec;
  logic clk = 0, rst_n = 0;
  logic [7:0] data = '0; logic flag = 0, edc = 0, err;
  logic [15:0] err_count;
  always #5 clk = ~clk;
  edc_dec dut (.*);
  int checks = 0, failures = 0, n_bad = 0;
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 2000; c++) begin
      bit bad;
      @(negedge clk);
      data = 8'($urandom); flag = 1'($urandom);
      edc = ^{flag, data};
      bad = ($urandom_range(0, 9) == 0);
      if (bad) begin
        case ($urandom_range(0, 2))
          0: edc = ~edc;
          1: flag = ~flag;
          default: data[$urandom_range(0, 7)] ^= 1'b1;
        endcase
        n_bad++;
      end
      #1;
      checks++;
      if (err !== bad) begin failures++; if (failures < 10) $display("FAIL c=%0d", c); end
    end
    @(negedge clk);
    checks++;
    if (err_count !== 16'(n_bad)) begin failures++; $display("FAIL count %0d exp %0d", err_count, n_bad); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
