// tb_tx_mux: random select, data and sync words; the registered output
// must carry the selected word and the data/sync flag (1 = sync) one
// clock later.
module tb_tx_mux;
  logic clk = 0, rst_n = 0, sel_data = 0, out_flag;
  logic [7:0] data_in = '0, sync_word = '0, out_data;
  always #5 clk = ~clk;
  tx_mux dut (.*);
  int checks = 0, failures = 0;
  logic [7:0] e_d = '0; logic e_f = 1;
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 1000; c++) begin
      @(negedge clk);
      checks++;
      if (out_data !== e_d || out_flag !== e_f) begin
        failures++; if (failures < 10) $display("FAIL c=%0d", c);
      end
      sel_data = $urandom_range(0, 1); data_in = 8'($urandom); sync_word = 8'($urandom);
      e_d = sel_data ? data_in : sync_word; e_f = !sel_data;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
