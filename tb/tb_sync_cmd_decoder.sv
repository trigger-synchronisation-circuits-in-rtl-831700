// tb_sync_cmd_decoder: a stream of orbits shaped like SyncTx output (data
// words with flag 0, then a gap of counting sync words with flag 1).
// Checks, one clock later, the FIFO write strobe and word, the enable and
// disable pulses at the flag edges and the clear pulse on word 64 of the
// gap only.
module tb_sync_cmd_decoder;
  localparam int ND = 100, NG = 127;
  logic clk = 0, rst_n = 0, in_flag = 1;
  logic [7:0] in_data = '0, wr_data;
  logic wr_en, enable_in, disable_in, clear_fifo;
  always #5 clk = ~clk;
  sync_cmd_decoder dut (.*);
  int checks = 0, failures = 0, n_clr = 0, n_en = 0, n_dis = 0;
  logic pf = 0, e_wr = 0, e_en = 0, e_dis = 0, e_clr = 0;
  logic [7:0] e_d = '0;
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 5 * (ND + NG); c++) begin
      int r;
      @(negedge clk);
      checks++;
      if (wr_en !== e_wr || wr_data !== e_d || enable_in !== e_en ||
          disable_in !== e_dis || clear_fifo !== e_clr) begin
        failures++; if (failures < 10) $display("FAIL c=%0d", c);
      end
      n_clr += int'(clear_fifo); n_en += int'(enable_in); n_dis += int'(disable_in);
      r = c % (ND + NG);
      in_flag = !(r < ND);
      // data words may equal 64 too: they must not clear
      in_data = !in_flag ? ((r % 7 == 0) ? 8'd64 : 8'($urandom)) : 8'(r - ND);
      e_wr = !in_flag; e_d = in_data;
      e_en = !in_flag && !pf; e_dis = in_flag && pf;
      e_clr = in_flag && in_data == 8'd64;
      pf = !in_flag;
    end
    checks++; if (n_clr != 5 || n_en != 5 || n_dis < 4) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
