// tb_sync_data_gen: the counter is 0 while run is low, counts 0,1,2,...
// from the first run cycle and wraps at 256.
module tb_sync_data_gen;
  logic clk = 0, rst_n = 0, run = 0;
  logic [7:0] word;
  always #5 clk = ~clk;
  sync_data_gen dut (.*);
  int checks = 0, failures = 0, exp_w = 0, n_wrap = 0;
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      checks++;
      if (word !== 8'(exp_w)) begin
        failures++; if (failures < 10) $display("FAIL c=%0d got %0d exp %0d", c, word, exp_w);
      end
      run = ((c % 1000) >= 300);
      if (run) begin if (exp_w == 255) n_wrap++; exp_w = (exp_w + 1) % 256; end
      else exp_w = 0;
    end
    checks++; if (n_wrap == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
