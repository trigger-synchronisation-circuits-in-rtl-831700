// tb_sync_rx: SyncRx at a reduced orbit (60 data crossings + the 127-word
// gap). The link side receives a SyncTx-shaped stream on wclk (data that
// changes from orbit to orbit, then sync words 0..126 with their parity);
// the Common BC0 arrives on rclk, 3 ns out of phase, LAT clocks after
// bunch 0 was received. Checks: the output window opens exactly LAT+2
// clocks after bunch 0, lasts 60 clocks, carries this orbit's words in
// order and zeros elsewhere; an orbit with a too-early Common BC0 raises
// the sync error flag and counter; two corrupted parity bits are counted.
module tb_sync_rx;
  localparam int ND = 60, NG = 127, ORB = ND + NG, N0 = 50;
  logic wclk = 0, rclk = 0, wrst_n = 0, rrst_n = 0;
  logic [7:0] in_data = '0, out_data; logic in_flag = 0, in_edc = 0;
  logic [15:0] data_err_count, sync_err_count; logic [5:0] wr_count_last, rd_count_last;
  logic fifo_full, clear_seen, common_bc0 = 0, out_flag, fifo_empty, sync_err_flag;
  always #5 wclk = ~wclk;
  initial begin #3; forever #5 rclk = ~rclk; end
  sync_rx #(.N_DATA(ND), .CNT_W(6)) dut (.*);
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string s);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL %s t=%0t", s, $time); end
  endtask
  function automatic logic [7:0] word(input int orb, input int rel);
    return 8'(orb * 13 + rel * 7 + 1);
  endfunction
  // link stream
  int wc = 0;
  always @(posedge wclk) begin
    int rel, orb;
    wc <= wc + 1;
    rel = (wc + 1 - N0 + 100 * ORB) % ORB; orb = (wc + 1 - N0) / ORB;
    if (wc + 1 >= N0 && rel < ND) begin in_flag <= 0; in_data <= word(orb, rel); end
    else begin in_flag <= 1; in_data <= (wc + 1 >= N0) ? 8'(rel - ND) : 8'(wc % 128); end
    in_edc <= ^{!(wc + 1 >= N0 && rel < ND), ((wc + 1 >= N0 && rel < ND) ? word(orb, rel) :
               ((wc + 1 >= N0) ? 8'(rel - ND) : 8'(wc % 128)))}
              ^ ((wc + 1 == N0 + 5 * ORB + 7) || (wc + 1 == N0 + 5 * ORB + 100));
  end
  // Common BC0
  int rc = 0, lat = 5;
  always @(posedge rclk) begin
    int rel;
    rc <= rc + 1;
    rel = (rc + 1 - N0 + 100 * ORB) % ORB;
    common_bc0 <= (rc + 1 >= N0) && rel == lat;
    if (rel == ORB - 20) lat <= ((rc + 1 - N0) / ORB == 2) ? 1 : 5;   // orbit 3 early
  end
  // output checks
  int n_words = 0, n_win = 0, n_err_flag = 0, widx = 0;
  always @(negedge rclk) begin
    int rel, orb;
    rel = (rc - N0 + 100 * ORB) % ORB; orb = (rc - N0) / ORB;
    if (rc >= N0 + 1 && orb != 3) begin
      bit inwin;
      inwin = (rel >= 5 + 2) && (rel < 5 + 2 + ND);
      check(out_flag == !inwin, $sformatf("window orbit %0d rel %0d", orb, rel));
      if (inwin) begin
        check(out_data == word(orb, rel - 7), "synchronised word"); n_words++;
        if (rel == 7) n_win++;
      end else check(out_data == 0, "zeros outside window");
    end
    if (sync_err_flag) n_err_flag++;
  end
  initial begin
    repeat (2) @(posedge wclk);
    wrst_n = 1; rrst_n = 1;
    while (rc < N0 + 3 * ORB - 5) @(posedge rclk);
    check(sync_err_flag == 0 && sync_err_count == 0, "good orbits");
    check(wr_count_last == 6'(ND) && rd_count_last == 6'(ND), "orbit counts");
    while (rc < N0 + 4 * ORB - 5) @(posedge rclk);
    check(sync_err_flag == 1 && sync_err_count == 1, "early Common BC0 flagged");
    while (rc < N0 + 5 * ORB - 5) @(posedge rclk);
    check(sync_err_flag == 0 && sync_err_count == 1, "flag cleared");
    while (rc < N0 + 8 * ORB) @(posedge rclk);
    check(data_err_count == 16'd2, "parity errors counted");
    check(sync_err_count == 1, "no more sync errors");
    check(n_win >= 6 && n_words >= 6 * ND, "windows seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (N0 + 10 * ORB) @(posedge wclk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
