// tb_accu: histogram accumulator at a reduced size (64 bins, 4-bit
// counters so that saturation is reached). Drives orbits of 50 data
// clocks with random hits and checks every bin against a model, plus
// Start/Stop gating, saturation, the clear sweep after reset and after the
// Reset command, and that reading never disturbs accumulation.
module tb_accu;
  localparam int D = 64, W = 4, NW = 50;
  logic clk = 0, rst_n = 0, active = 0, hit = 0, start = 0, stop = 0, clear = 0;
  logic [5:0] bx = '0, rd_addr = '0;
  logic [W-1:0] rd_data;
  logic busy, enabled;
  always #5 clk = ~clk;
  accu #(.DEPTH(D), .CNT_W(W)) dut (.*);
  int checks = 0, failures = 0, n_sat = 0;
  int model [D];
  task automatic check(input bit ok, input string s);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask
  task automatic orbit(input bit en, input int p_hit);
    for (int c = 0; c < NW + 10; c++) begin
      @(negedge clk);
      active = (c < NW); bx = 6'(c < NW ? c : 0);
      hit = ($urandom_range(0, 99) < p_hit);
      rd_addr = 6'($urandom);                    // reads run all the time
      if (en && active && hit && model[c] < (1 << W) - 1) model[c]++;
    end
    @(negedge clk); active = 0; hit = 0;
  endtask
  task automatic compare_all(input string s);
    for (int a = 0; a < D; a++) begin
      @(negedge clk); rd_addr = 6'(a);
      @(negedge clk);
      check(rd_data == W'(model[a]), $sformatf("%s bin %0d got %0d exp %0d", s, a, rd_data, model[a]));
      if (model[a] == (1 << W) - 1) n_sat++;
    end
  endtask
  task automatic pulse(ref logic s);
    @(negedge clk); s = 1; @(negedge clk); s = 0;
  endtask
  initial begin
    foreach (model[i]) model[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); check(busy == 1, "busy after reset");
    while (busy) @(negedge clk);
    check(enabled == 0, "stopped after reset");
    compare_all("after reset clear");
    orbit(0, 50);                          // not started: nothing counts
    compare_all("stopped");
    pulse(start); check(enabled == 1, "start");
    repeat (20) orbit(1, 60);
    pulse(stop);  check(enabled == 0, "stop");
    orbit(0, 100);
    compare_all("accumulated");
    check(n_sat > 0, "saturation reached");
    pulse(clear);
    check(busy == 1, "clear sweep");
    while (busy) @(negedge clk);
    foreach (model[i]) model[i] = 0;
    compare_all("after Reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
