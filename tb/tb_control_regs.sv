// tb_control_regs: register writes and read-back, reset values, status
// and counter inputs, and the histogram read port: consecutive ACCU_DATA
// reads return consecutive bins (modelled here as a one-clock memory whose
// bin a holds 3*a+1) while the address advances by one per read.
module tb_control_regs;
  import sync_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [3:0] ctrl_addr = '0; logic ctrl_wr = 0, ctrl_rd = 0;
  logic [15:0] ctrl_wdata = '0, ctrl_rdata; logic ctrl_rvalid;
  mode_e mode; logic [7:0] threshold;
  logic [11:0] accu_rd_addr; logic [15:0] accu_rd_data = '0;
  logic accu_busy = 0, accu_enabled = 0;
  logic [15:0] data_err_count = 16'd77; logic [11:0] wr_count_last = 12'd3437;
  always #5 clk = ~clk;
  always @(posedge clk) accu_rd_data <= 16'(3 * accu_rd_addr + 1);
  control_regs dut (.*);
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask
  task automatic wr(input logic [3:0] a, input logic [15:0] d);
    @(negedge clk); ctrl_addr = a; ctrl_wdata = d; ctrl_wr = 1;
    @(negedge clk); ctrl_wr = 0;
  endtask
  task automatic rd(input logic [3:0] a, output logic [15:0] d);
    @(negedge clk); ctrl_addr = a; ctrl_rd = 1;
    @(negedge clk); ctrl_rd = 0; d = ctrl_rdata;
    check(ctrl_rvalid == 1, "rvalid");
  endtask
  logic [15:0] v;
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    rd(REG_MODE, v);       check(v == 0 && mode == MODE_TXRX, "mode reset");
    rd(REG_THRESHOLD, v);  check(v == 0, "threshold reset");
    wr(REG_MODE, 16'(MODE_RX)); check(mode == MODE_RX, "mode written");
    rd(REG_MODE, v);       check(v == 16'(MODE_RX), "mode read");
    wr(REG_THRESHOLD, 16'h00A5); check(threshold == 8'hA5, "threshold written");
    rd(REG_THRESHOLD, v);  check(v == 16'h00A5, "threshold read");
    accu_busy = 1; accu_enabled = 0;
    rd(REG_STATUS, v);     check(v == 16'd1, "status busy");
    accu_busy = 0; accu_enabled = 1;
    rd(REG_STATUS, v);     check(v == 16'd2, "status enabled");
    rd(REG_DATA_ERR, v);   check(v == 16'd77, "data error count");
    rd(REG_WR_COUNT, v);   check(v == 16'd3437, "write count");
    rd(4'd15, v);          check(v == 0, "unmapped reads 0");
    wr(REG_ACCU_ADDR, 16'd100);
    for (int a = 100; a < 140; a++) begin
      rd(REG_ACCU_DATA, v); check(v == 16'(3 * a + 1), $sformatf("bin %0d", a));
    end
    rd(REG_ACCU_ADDR, v);  check(v == 16'd140, "address advanced");
    @(negedge clk); check(ctrl_rdata == 0, "rdata 0 when not valid");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
