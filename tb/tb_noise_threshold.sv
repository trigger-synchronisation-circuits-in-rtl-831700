// tb_noise_threshold: every data value against a set of thresholds,
// including the equal case, which must not count as a hit.
module tb_noise_threshold;
  logic [7:0] data, threshold;
  logic hit;
  noise_threshold dut (.*);
  int checks = 0, failures = 0;
  int thr_list [5] = '{0, 1, 10, 128, 255};
  initial begin
    foreach (thr_list[t]) begin
      for (int d = 0; d < 256; d++) begin
        data = 8'(d); threshold = 8'(thr_list[t]);
        #1;
        checks++;
        if (hit !== (d > thr_list[t])) begin
          failures++; if (failures < 10) $display("FAIL d=%0d thr=%0d", d, thr_list[t]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
