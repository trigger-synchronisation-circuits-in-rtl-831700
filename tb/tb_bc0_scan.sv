// tb_bc0_scan: bunch profile histograms for different TTC BC0 settings.
//
// Four SyncTx circuits see the same LHC-like orbit: trains of 80 filled
// crossings separated by 8 empty ones, every third train followed by a
// 38-crossing hole, and the 127-crossing gap at the end. Their TTC BC0 is
// on time, 3 clocks late, 1 clock in advance and 5 clocks in advance.
// After three accumulated orbits each histogram is read and compared with
// the pattern shifted by the BC0 error: with a late BC0 bin a holds
// crossing a+3, with an advanced one bin a holds crossing a-A (crossings
// of the previous gap for the first A bins, so those stay empty). The
// shift between the measured and the expected structure is the BC0
// correction, which is also recovered here from the first filled bin.
module tb_bc0_scan;
  import sync_pkg::*;
  localparam int ORB = 3564, NDAT = 3437, N0 = 100, THR = 10, K = 3;
  localparam int NCH = 4;
  int off [NCH] = '{0, 3, -1, -5};          // + late, - advance
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [7:0]  data_in = '0;
  logic        cv [NCH];
  logic [7:0]  cmd [NCH];
  logic [11:0] ra = '0;
  logic [15:0] rd [NCH];
  logic        busy [NCH], en [NCH], of [NCH], oe [NCH];
  logic [7:0]  od [NCH];
  for (genvar i = 0; i < NCH; i++) begin : g_ch
    sync_tx u (.clk, .rst_n, .data_in, .ttc_cmd_valid(cv[i]), .ttc_cmd(cmd[i]),
               .threshold(8'(THR)), .accu_rd_addr(ra), .accu_rd_data(rd[i]),
               .accu_busy(busy[i]), .accu_enabled(en[i]), .out_data(od[i]),
               .out_flag(of[i]), .out_edc(oe[i]));
  end
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string s);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask
  function automatic bit filled(input int b);
    int p;
    if (b < 0 || b >= NDAT) return 0;
    p = b % 294;
    return (p < 80) || (p >= 88 && p < 168) || (p >= 176 && p < 256);
  endfunction
  function automatic logic [7:0] pat(input int b);
    return filled(b) ? 8'(20 + (b * 37) % 200) : 8'(b % 8);
  endfunction
  int cyc = 0;
  always @(negedge clk) begin
    int rel;
    cyc++;
    rel = (cyc - N0 + 100 * ORB) % ORB;
    data_in = (cyc >= N0) ? pat(rel) : 8'h0;
    for (int i = 0; i < NCH; i++) begin
      cv[i] = 0; cmd[i] = 8'h0;
      if (rel == (ORB - 2 + off[i] + ORB) % ORB) begin cv[i] = 1; cmd[i] = TTC_BC0; end
      if (cyc == N0 + ORB - 60) begin cv[i] = 1; cmd[i] = TTC_START; end
      if (cyc == N0 + (K + 1) * ORB - 60) begin cv[i] = 1; cmd[i] = TTC_STOP; end
    end
  end
  initial begin
    int first_filled [NCH], run_len [NCH];
    bit in_run [NCH];
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (N0 + (K + 2) * ORB) @(posedge clk);
    foreach (first_filled[i]) begin first_filled[i] = -1; run_len[i] = 0; in_run[i] = 1; end
    for (int a = 0; a < ORB; a++) begin
      @(negedge clk); ra = 12'(a);
      @(negedge clk);
      for (int i = 0; i < NCH; i++) begin
        int b, e;
        b = a + off[i];
        e = (a < NDAT && filled(b)) ? K : 0;
        check(rd[i] == 16'(e), $sformatf("ch %0d bin %0d got %0d exp %0d", i, a, rd[i], e));
        if (first_filled[i] < 0 && rd[i] != 0) first_filled[i] = a;
        if (first_filled[i] >= 0 && in_run[i]) begin
          if (rd[i] != 0) run_len[i]++; else in_run[i] = 0;
        end
      end
    end
    // correction recovered from the histogram alone: an advanced BC0 moves
    // the first filled bin up by the advance; a late one shortens the
    // first 80-crossing train by the delay
    for (int i = 0; i < NCH; i++) begin
      int est;
      est = (first_filled[i] > 0) ? -first_filled[i] : 80 - run_len[i];
      check(est == off[i], $sformatf("ch %0d BC0 error estimate %0d", i, est));
      $display("channel %0d: BC0 offset %0d, estimated %0d", i, off[i], est);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (N0 + (K + 5) * ORB) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
