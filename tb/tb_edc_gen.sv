// tb_edc_gen: for every data word and flag the parity bit must make the
// total number of ones even.
module tb_edc_gen;
  logic [7:0] data; logic flag, edc;
  edc_gen dut (.*);
  int checks = 0, failures = 0;
  initial begin
    for (int v = 0; v < 512; v++) begin
      {flag, data} = 9'(v);
      #1;
      checks++;
      if (edc !== 1'($countones(v) % 2)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
