// tb_ttc_cmd_decoder: random TTC command bytes and strobes; each output
// must pulse exactly one clock after its own code arrives with the strobe.
module tb_ttc_cmd_decoder;
  logic clk = 0, rst_n = 0, cmd_valid = 0;
  logic [7:0] cmd = '0;
  logic bc0, start, stop, reset_cmd;
  always #5 clk = ~clk;
  ttc_cmd_decoder dut (.*);
  int checks = 0, failures = 0;
  logic [3:0] expq;
  int seen [4];
  initial begin
    expq = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      checks++;
      if ({bc0, start, stop, reset_cmd} !== expq) begin
        failures++; $display("FAIL cycle %0d got %b exp %b", i, {bc0, start, stop, reset_cmd}, expq);
      end
      for (int k = 0; k < 4; k++) if (expq[3-k]) seen[k]++;
      cmd_valid = $urandom_range(0, 1);
      cmd = ($urandom_range(0, 3) == 0) ? 8'($urandom) : 8'($urandom_range(0, 5));
      expq = {cmd_valid && cmd == 8'h01, cmd_valid && cmd == 8'h02,
              cmd_valid && cmd == 8'h03, cmd_valid && cmd == 8'h04};
    end
    for (int k = 0; k < 4; k++) begin
      checks++; if (seen[k] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
