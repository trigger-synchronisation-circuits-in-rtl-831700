// tb_bx_counter: BC0 pulses at orbit spacing and at odd times; checks the
// window length N_DATA, the bunch index, the SOG pulse position and the
// restart on a BC0 inside the window, against a cycle-by-cycle model.
module tb_bx_counter;
  localparam int N = 3437;
  logic clk = 0, rst_n = 0, bc0 = 0;
  logic active, sog;
  logic [11:0] bx;
  always #5 clk = ~clk;
  bx_counter dut (.*);
  int checks = 0, failures = 0, n_sog = 0, n_restart = 0;
  // model
  bit m_act = 0, m_sog = 0; int m_bx = 0;
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 4 * 3564; c++) begin
      @(negedge clk);
      checks++;
      if (active !== m_act || sog !== m_sog || (m_act && bx !== 12'(m_bx))) begin
        failures++;
        if (failures < 10) $display("FAIL c=%0d act %b/%b sog %b/%b bx %0d/%0d", c, active, m_act, sog, m_sog, bx, m_bx);
      end
      if (m_sog) n_sog++;
      // drive next bc0: every orbit, plus one early restart
      bc0 = (c % 3564 == 10) || (c == 3 * 3564 + 500);
      if (bc0 && m_act) n_restart++;
      // model update for next cycle
      m_sog = 0;
      if (bc0) begin m_act = 1; m_bx = 0; end
      else if (m_act) begin
        if (m_bx == N - 1) begin m_act = 0; m_bx = 0; m_sog = 1; end
        else m_bx++;
      end
    end
    checks++; if (n_sog < 3) failures++;
    checks++; if (n_restart != 1) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
