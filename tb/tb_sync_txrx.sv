// tb_sync_txrx: end-to-end test of the SyncTx/Rx circuit at its default
// (full LHC orbit) sizes.
//
// A pattern generator feeds an LHC-like orbit: 3564 crossings, trains of
// 80 filled crossings separated by 10 empty ones, and the 127-crossing gap
// at the end; filled crossings carry a value above the noise threshold,
// empty ones low noise (one of them exactly at the threshold). The TTC
// BC0 command is sent two clocks ahead of bunch 0, and the Common BC0 on
// the common clock (3 time units out of phase) LAT clocks after bunch 0.
// The run goes through:
//   orbits 0-3  Tx/Rx mode, synchronised output checked word by word;
//               histogram started in the gap of orbit 0, stopped in the
//               gap of orbit 3 (three orbits accumulated)
//   orbit 4     Common BC0 too early: FIFO read while empty, sync error
//   orbit 5     good again: sync error flag clears
//   orbit 6     Common BC0 too late: FIFO overflows, sync error
//   orbit 7-8   good; histogram read out through the control registers
//   orbits 10-11 Rx mode, fed over a 3-clock link from the Tx outputs, one
//               parity bit corrupted: data error counted
//   orbit 13    Tx mode: the Rx outputs stay quiet
//   then        TTC Reset clears the histogram
// Each mechanism is counted and must have happened at least once.
module tb_sync_txrx;
  import sync_pkg::*;

  localparam int ORB   = 3564;
  localparam int NDAT  = 3437;
  localparam int N0    = 200;     // tx cycle of the first bunch 0
  localparam int THR   = 10;
  localparam int LINKD = 3;       // link delay in Rx mode

  logic tx_clk = 0, rx_clk = 0, tx_rst_n = 0, rx_rst_n = 0;
  always #5 tx_clk = ~tx_clk;
  initial begin #3; forever #5 rx_clk = ~rx_clk; end

  logic [7:0]  data_in = '0, ttc_cmd = '0;
  logic        ttc_cmd_valid = 0;
  logic [3:0]  ctrl_addr = '0;
  logic        ctrl_wr = 0, ctrl_rd = 0;
  logic [15:0] ctrl_wdata = '0, ctrl_rdata;
  logic        ctrl_rvalid;
  logic [7:0]  tx_data, link_data = '0, rx_data;
  logic        tx_flag, tx_edc, link_flag = 0, link_edc = 0;
  logic        common_bc0 = 0, rx_flag, sync_err_flag;
  logic [15:0] sync_err_count;

  sync_txrx dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at t=%0t", what, $time);
    end
  endtask

  function automatic logic [7:0] pat(input int b);
    if (b >= NDAT)          return 8'(b % 4);
    if ((b % 90) == 85)     return 8'(THR);            // at threshold
    if ((b % 90) >= 80)     return 8'(b % 8);          // empty: noise
    return 8'(20 + (b * 37) % 200);                    // filled
  endfunction

  // ---------------- stimulus on the link clock ----------------
  int tcyc = 0;                       // tx cycle being driven
  int orbit_t;                        // orbit of the word on data_in
  int rel_t;
  logic [7:0] ttc_q [$];              // extra TTC commands, sent in gaps
  logic [9:0] link_pipe [LINKD];
  int corrupt_cycle = -1;

  always @(posedge tx_clk) begin
    tcyc <= tcyc + 1;
    rel_t   = (tcyc + 1 - N0 + 100*ORB) % ORB;
    orbit_t = (tcyc + 1 - N0) / ORB;
    data_in <= (tcyc + 1 >= N0) ? pat(rel_t) : 8'h00;
    // TTC BC0 two clocks ahead of bunch 0 (rel == ORB-2)
    if (rel_t == ORB - 2) begin
      ttc_cmd_valid <= 1; ttc_cmd <= TTC_BC0;
    end else if (rel_t > NDAT + 20 && rel_t < ORB - 10 && ttc_q.size() > 0) begin
      ttc_cmd_valid <= 1; ttc_cmd <= ttc_q.pop_front();
    end else begin
      ttc_cmd_valid <= 0; ttc_cmd <= 8'h00;
    end
    // link model for Rx mode: fixed delay, optional parity corruption
    link_pipe[0] <= {tx_edc ^ (tcyc == corrupt_cycle), tx_flag, tx_data};
    for (int i = 1; i < LINKD; i++) link_pipe[i] <= link_pipe[i-1];
    {link_edc, link_flag, link_data} <= link_pipe[LINKD-1];
  end

  // ---------------- Common BC0 on the common clock ----------------
  int rcyc = 0;
  int lat = 6;                        // Common BC0 rel. to bunch 0
  int cur_lat = 6;
  bit expect_good = 0;
  always @(posedge rx_clk) begin
    int rel;
    rcyc <= rcyc + 1;
    rel = (rcyc + 1 - N0 + 100*ORB) % ORB;
    if (rcyc + 1 >= N0 && rel == lat) begin
      common_bc0 <= 1; cur_lat <= lat;
    end else common_bc0 <= 0;
  end

  // ---------------- output checks on the common clock ----------------
  int n_win = 0, n_words = 0, n_word_err = 0, n_quiet = 0;
  int win_len = 0, first_win_rel = -1;
  bit in_win = 0, tx_mode_check = 0;
  always @(negedge rx_clk) begin
    int rel, idx;
    rel = (rcyc - N0 + 100*ORB) % ORB;
    if (!rx_flag) begin
      if (!in_win) begin
        n_win++; win_len = 0;
        if (expect_good) check(rel == cur_lat + 2, "window starts LAT+2 after bunch 0");
      end
      idx = win_len;
      if (expect_good) begin
        check(rx_data == pat(idx), "synchronised word");
        n_words++;
      end
      win_len++;
    end else if (in_win) begin
      if (expect_good) check(win_len == NDAT, "window length");
    end
    if (rx_flag && expect_good) check(rx_data == 8'h00, "zeros outside window");
    if (tx_mode_check) begin
      check(rx_flag && rx_data == 0, "Rx quiet in Tx mode"); n_quiet++;
    end
    in_win = !rx_flag;
  end

  // ---------------- mechanism counters ----------------
  int n_bc0 = 0, n_sog = 0, n_clear = 0, n_full = 0, n_empty_rd = 0;
  int n_err_orbits = 0, n_thr_rej = 0, n_modes = 0;
  logic tx_flag_q = 1, err_q = 0;
  always @(posedge tx_clk) begin
    tx_flag_q <= tx_flag;
    if (!tx_flag && tx_flag_q) n_bc0++;
    if (tx_flag && !tx_flag_q) n_sog++;
    if (dut.clear_seen) n_clear++;
    if (dut.fifo_full) n_full++;
    if (dut.u_tx.active && dut.u_tx.accu_enabled && data_in == 8'(THR)) n_thr_rej++;
  end
  always @(posedge rx_clk) begin
    err_q <= sync_err_flag;
    if (sync_err_flag && !err_q) n_err_orbits++;
    if (dut.u_rx.rd_active && dut.fifo_empty) n_empty_rd++;
  end

  // ---------------- control-line tasks ----------------
  task automatic ctrl_write(input logic [3:0] a, input logic [15:0] d);
    @(posedge tx_clk);
    ctrl_addr <= a; ctrl_wdata <= d; ctrl_wr <= 1;
    @(posedge tx_clk);
    ctrl_wr <= 0;
  endtask
  task automatic ctrl_read(input logic [3:0] a, output logic [15:0] d);
    @(posedge tx_clk);
    ctrl_addr <= a; ctrl_rd <= 1;
    @(posedge tx_clk);
    ctrl_rd <= 0;
    @(negedge tx_clk);
    d = ctrl_rdata;
    check(ctrl_rvalid == 1, "ctrl read valid");
  endtask
  // wait until the tx stimulus is at a given orbit and relative cycle
  task automatic wait_at(input int orb, input int rel);
    while (!((tcyc - N0) >= orb*ORB + rel)) @(posedge tx_clk);
  endtask

  // ---------------- main sequence ----------------
  logic [15:0] v;
  int n_hist_nz = 0, n_err_seen;
  initial begin
    repeat (4) @(posedge tx_clk);
    tx_rst_n = 1; rx_rst_n = 1;
    ctrl_write(REG_THRESHOLD, 16'(THR));
    ctrl_read(REG_THRESHOLD, v); check(v == 16'(THR), "threshold register");
    ctrl_read(REG_MODE, v);      check(v == 16'(MODE_TXRX), "reset mode");
    ctrl_read(REG_STATUS, v);    check(v[0] == 1, "histogram clearing after reset");

    // orbit 0 gap: start the histogram; orbits 1-3 accumulate
    wait_at(0, NDAT + 5);
    ctrl_read(REG_STATUS, v);    check(v == 16'd0, "histogram idle and stopped");
    ttc_q.push_back(TTC_START);
    wait_at(1, 0);
    ctrl_read(REG_STATUS, v);    check(v == 16'd2, "histogram enabled");
    expect_good = 1;
    wait_at(3, NDAT + 5);
    ttc_q.push_back(TTC_STOP);
    check(sync_err_flag == 0 && sync_err_count == 0, "no sync error in good orbits");
    ctrl_read(REG_WR_COUNT, v);  check(v == 16'(NDAT), "orbit write count");
    check(dut.rd_count_last == 12'(NDAT), "orbit read count");

    // orbit 4: Common BC0 too early
    wait_at(3, ORB - 300);
    expect_good = 0; lat = 2;
    wait_at(4, ORB - 40);
    lat = 6;
    check(sync_err_flag == 1 && sync_err_count == 1, "early Common BC0 flagged");
    wait_at(5, 100); expect_good = 1;
    wait_at(5, ORB - 40);
    check(sync_err_flag == 0 && sync_err_count == 1, "flag clears after good orbit");

    // orbit 6: Common BC0 too late, FIFO overflows
    expect_good = 0; lat = 30;
    wait_at(6, ORB - 40);
    lat = 6;
    check(sync_err_flag == 1 && sync_err_count == 2, "late Common BC0 flagged");
    wait_at(7, 100); expect_good = 1;

    // read out the histogram (three orbits accumulated)
    ctrl_write(REG_ACCU_ADDR, 16'd0);
    for (int a = 0; a < ORB; a++) begin
      int exp_n;
      ctrl_read(REG_ACCU_DATA, v);
      exp_n = (a < NDAT && pat(a) > 8'(THR)) ? 3 : 0;
      check(v == 16'(exp_n), $sformatf("histogram bin %0d", a));
      if (v != 0) n_hist_nz++;
    end
    ctrl_read(REG_ACCU_ADDR, v); check(v == 16'(ORB % 4096), "ACCU address auto-increment");

    // orbit 9 gap: switch to Rx mode behind a 3-clock link
    wait_at(9, NDAT + 10);
    expect_good = 0;
    ctrl_write(REG_MODE, 16'(MODE_RX)); n_modes++;
    lat = 6 + LINKD;
    corrupt_cycle = N0 + 10*ORB + 500;
    wait_at(10, 200); expect_good = 1;
    wait_at(11, ORB - 40);
    ctrl_read(REG_DATA_ERR, v);  check(v == 16'd1, "one parity error counted");
    n_err_seen = int'(v);
    check(sync_err_count == 2, "no sync error in Rx mode");

    // orbit 12 gap: Tx mode, Rx outputs quiet
    wait_at(12, NDAT + 10);
    expect_good = 0;
    ctrl_write(REG_MODE, 16'(MODE_TX)); n_modes++;
    wait_at(13, 0); tx_mode_check = 1;
    wait_at(13, 2000); tx_mode_check = 0;

    // TTC Reset clears the histogram
    wait_at(13, NDAT + 5);
    ttc_q.push_back(TTC_RESET);
    wait_at(14, NDAT + 100);
    ctrl_read(REG_STATUS, v); check(v == 16'd0, "clear done, stopped");
    ctrl_write(REG_ACCU_ADDR, 16'd0);
    for (int a = 0; a < 200; a++) begin
      ctrl_read(REG_ACCU_DATA, v); check(v == 0, "bin cleared by TTC Reset");
    end

    // every mechanism must have happened
    check(n_bc0 >= 10,       "bunch 0 flagged");
    check(n_sog >= 10,       "start of gap reached");
    check(n_clear >= 10,     "clear FIFO command");
    check(n_win >= 8,        "Common BC0 read windows");
    check(n_words >= 5*NDAT, "synchronised words checked");
    check(n_err_orbits >= 2, "sync error orbits");
    check(n_full > 0,        "FIFO overflow");
    check(n_empty_rd > 0,    "read from empty FIFO");
    check(n_thr_rej > 0,     "word at threshold rejected");
    check(n_hist_nz > 0,     "histogram filled");
    check(n_err_seen == 1,   "EDC error");
    check(n_modes == 2,      "mode switches");
    check(n_quiet > 0,       "Tx mode quiet");
    $display("mechanisms: bc0=%0d sog=%0d clear=%0d windows=%0d words=%0d err_orbits=%0d full=%0d empty_rd=%0d thr_rej=%0d hist_nz=%0d",
             n_bc0, n_sog, n_clear, n_win, n_words, n_err_orbits, n_full, n_empty_rd, n_thr_rej, n_hist_nz);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20 * ORB) @(posedge tx_clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
