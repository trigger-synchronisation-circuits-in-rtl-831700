// tb_sync_monitor: orbit write/read counting at a reduced orbit (N_DATA =
// 40) on two clocks. Good orbits leave the flag low; an orbit with one
// write missing, and one with one read missing, each raise the flag for
// that orbit and add one to the error counter; the flag drops after the
// next good orbit. The per-orbit counts are checked too.
module tb_sync_monitor;
  localparam int N = 40;
  logic wclk = 0, rclk = 0, wrst_n = 0, rrst_n = 0;
  logic wr_orbit_start = 0, wr_orbit_end = 0, wr_accept = 0;
  logic rd_orbit_start = 0, rd_orbit_end = 0, rd_accept = 0;
  logic [11:0] wr_count_last, rd_count_last;
  logic sync_err_flag; logic [15:0] sync_err_count;
  always #5 wclk = ~wclk;
  initial begin #2; forever #5 rclk = ~rclk; end
  sync_monitor #(.N_DATA(N)) dut (.*);
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s t=%0t", s, $time); end
  endtask
  // one orbit: nw writes, nr reads; the read side lags by 5 clocks
  task automatic orbit(input int nw, input int nr);
    fork
      begin
        @(posedge wclk); #1 wr_orbit_start = 1; wr_accept = (nw > 0);
        for (int i = 1; i < N; i++) begin
          @(posedge wclk); #1 wr_orbit_start = 0; wr_accept = (i < nw);
        end
        @(posedge wclk); #1 wr_accept = 0; wr_orbit_end = 1;
        @(posedge wclk); #1 wr_orbit_end = 0;
      end
      begin
        repeat (5) @(posedge rclk);
        #1 rd_orbit_start = 1;
        @(posedge rclk); #1 rd_orbit_start = 0;
        for (int i = 0; i < N; i++) begin
          rd_accept = (i < nr);
          @(posedge rclk); #1;
        end
        rd_accept = 0; rd_orbit_end = 1;
        @(posedge rclk); #1 rd_orbit_end = 0;
      end
    join
    repeat (20) @(posedge rclk);
  endtask
  initial begin
    repeat (2) @(posedge wclk);
    wrst_n = 1; rrst_n = 1;
    orbit(N, N);
    check(sync_err_flag == 0 && sync_err_count == 0, "good orbit");
    check(wr_count_last == 12'(N) && rd_count_last == 12'(N), "counts of good orbit");
    orbit(N - 1, N);
    check(sync_err_flag == 1 && sync_err_count == 1, "missing write flagged");
    check(wr_count_last == 12'(N - 1), "write count");
    orbit(N, N);
    check(sync_err_flag == 0 && sync_err_count == 1, "flag drops");
    orbit(N, N - 1);
    check(sync_err_flag == 1 && sync_err_count == 2, "missing read flagged");
    check(rd_count_last == 12'(N - 1), "read count");
    orbit(N, N);
    check(sync_err_flag == 0 && sync_err_count == 2, "flag drops again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge wclk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
