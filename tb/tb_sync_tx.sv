// tb_sync_tx: SyncTx at full orbit size. An LHC-like pattern (trains of
// 80 filled crossings, 10 empty, the 127-crossing gap) is applied with the
// TTC BC0 sent two clocks before bunch 0. Checks on every clock: data
// words with flag 0 for the 3437 crossings from bunch 0, then sync words
// 0,1,2,... with flag 1 (sync) through the gap, the parity bit, and the
// one-clock output latency. The histogram is started by the TTC Start
// command before orbit 1, stopped after orbit 2, and every bin is
// compared with two times the above-threshold pattern.
module tb_sync_tx;
  import sync_pkg::*;
  localparam int ORB = 3564, NDAT = 3437, N0 = 100, THR = 10;
  logic clk = 0, rst_n = 0;
  logic [7:0] data_in = '0, ttc_cmd = '0, threshold = 8'(THR);
  logic ttc_cmd_valid = 0;
  logic [11:0] accu_rd_addr = '0; logic [15:0] accu_rd_data;
  logic accu_busy, accu_enabled;
  logic [7:0] out_data; logic out_flag, out_edc;
  always #5 clk = ~clk;
  sync_tx dut (.*);
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string s);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL %s t=%0t", s, $time); end
  endtask
  function automatic logic [7:0] pat(input int b);
    if (b >= NDAT)      return 8'(b % 4);
    if ((b % 90) >= 80) return 8'(b % 8);
    return 8'(20 + (b * 37) % 200);
  endfunction
  int cyc = 0;
  logic [7:0] prev_in = '0; bit prev_data = 0; int prev_rel = -1;
  bit checking = 0; int n_data = 0, n_sync = 0, n_orbit_words = 0;
  always @(negedge clk) begin
    int rel;
    if (rst_n) begin
      // outputs now belong to the input of the previous cycle
      if (checking) begin
        check(out_flag == !prev_data, "flag");
        if (prev_data) begin check(out_data == prev_in, "data word"); n_data++; end
        else begin check(out_data == 8'(prev_rel - NDAT), "sync word"); n_sync++; end
        check(out_edc == ^{out_flag, out_data}, "parity");
      end
      cyc++;
      rel = (cyc - N0 + 100 * ORB) % ORB;
      data_in = (cyc >= N0) ? pat(rel) : 8'h0;
      prev_in = data_in; prev_data = (cyc >= N0) && rel < NDAT; prev_rel = rel;
      ttc_cmd_valid = 0;
      if (rel == ORB - 2) begin ttc_cmd_valid = 1; ttc_cmd = TTC_BC0; end
      if (cyc == N0 + ORB - 50) begin ttc_cmd_valid = 1; ttc_cmd = TTC_START; end
      if (cyc == N0 + 3 * ORB - 50) begin ttc_cmd_valid = 1; ttc_cmd = TTC_STOP; end
      if (cyc == N0) checking = 1;
    end
  end
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (N0 + 4 * ORB) @(posedge clk);
    n_orbit_words = n_data;
    check(accu_enabled == 0 && accu_busy == 0, "histogram stopped");
    for (int a = 0; a < ORB; a++) begin
      @(negedge clk); accu_rd_addr = 12'(a);
      @(negedge clk);
      check(accu_rd_data == ((a < NDAT && pat(a) > 8'(THR)) ? 16'd2 : 16'd0), $sformatf("bin %0d", a));
    end
    check(n_orbit_words == 4 * NDAT, "data words per orbit");
    check(n_sync > 4 * 127, "sync words");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (6 * ORB + 10000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
