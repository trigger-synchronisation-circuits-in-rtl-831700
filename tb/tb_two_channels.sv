// tb_two_channels: the two-channel test set-up with the Common BC0
// adjustment procedure.
//
// One pattern source feeds two trigger channels in parallel. Each channel
// is a SyncTx/Rx circuit in Tx mode, a link of its own length (2 and 8
// clocks) and a second circuit in Rx mode; both Rx circuits share the
// common clock (3 ns out of phase with the link clock) and the Common BC0.
// The Common BC0 starts late and is advanced by one clock per orbit until
// one of the FIFOs is read while empty (the longer channel), then delayed
// by one clock, which is the operating point with the smallest latency.
// From there on both channels must deliver identical, correctly ordered
// data on every common clock, with no synchronisation error.
module tb_two_channels;
  import sync_pkg::*;
  localparam int ORB = 3564, NDAT = 3437, N0 = 200;
  localparam int NI = 4;                       // tx A, rx A, tx B, rx B
  int linkd [2] = '{2, 8};
  logic tx_clk = 0, rx_clk = 0, rst_n = 0;
  always #5 tx_clk = ~tx_clk;
  initial begin #3; forever #5 rx_clk = ~rx_clk; end

  logic [7:0]  data_in = '0, ttc_cmd = '0;
  logic        ttc_cmd_valid = 0, common_bc0 = 0;
  logic [3:0]  ctrl_addr = '0;
  logic        ctrl_wr [NI], ctrl_rd = 0;
  logic [15:0] ctrl_wdata = '0, ctrl_rdata [NI];
  logic        ctrl_rvalid [NI];
  logic [7:0]  tx_data [NI], link_data [NI], rx_data [NI];
  logic        tx_flag [NI], tx_edc [NI], link_flag [NI], link_edc [NI];
  logic        rx_flag [NI], sync_err_flag [NI];
  logic [15:0] sync_err_count [NI];
  logic        empty_rd [NI];

  for (genvar i = 0; i < NI; i++) begin : g
    sync_txrx u (
      .tx_clk, .tx_rst_n(rst_n), .rx_clk, .rx_rst_n(rst_n),
      .data_in((i % 2 == 0) ? data_in : 8'h00),
      .ttc_cmd_valid((i % 2 == 0) ? ttc_cmd_valid : 1'b0), .ttc_cmd,
      .ctrl_addr, .ctrl_wr(ctrl_wr[i]), .ctrl_rd, .ctrl_wdata,
      .ctrl_rdata(ctrl_rdata[i]), .ctrl_rvalid(ctrl_rvalid[i]),
      .tx_data(tx_data[i]), .tx_flag(tx_flag[i]), .tx_edc(tx_edc[i]),
      .link_data(link_data[i]), .link_flag(link_flag[i]), .link_edc(link_edc[i]),
      .common_bc0, .rx_data(rx_data[i]), .rx_flag(rx_flag[i]),
      .sync_err_flag(sync_err_flag[i]), .sync_err_count(sync_err_count[i]));
    assign empty_rd[i] = u.u_rx.rd_active && u.fifo_empty;
  end

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string s);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL %s t=%0t", s, $time); end
  endtask
  function automatic logic [7:0] pat(input int b);
    if (b >= NDAT || (b % 90) >= 80) return 8'(b % 8);
    return 8'(20 + (b * 37) % 200);
  endfunction

  // pattern source, TTC BC0 and the two links
  int tcyc = 0;
  logic [9:0] pipe [2][16];
  always @(posedge tx_clk) begin
    int rel;
    tcyc <= tcyc + 1;
    rel = (tcyc + 1 - N0 + 100 * ORB) % ORB;
    data_in <= (tcyc + 1 >= N0) ? pat(rel) : 8'h00;
    ttc_cmd_valid <= (rel == ORB - 2);
    ttc_cmd <= TTC_BC0;
    for (int c = 0; c < 2; c++) begin
      pipe[c][0] <= {tx_edc[2*c], tx_flag[2*c], tx_data[2*c]};
      for (int k = 1; k < 16; k++) pipe[c][k] <= pipe[c][k-1];
      {link_edc[2*c+1], link_flag[2*c+1], link_data[2*c+1]} <= pipe[c][linkd[c]-1];
      {link_edc[2*c], link_flag[2*c], link_data[2*c]} <= '0;
    end
  end

  // Common BC0 and its adjustment
  int rcyc = 0, lat = 16, lat_found = -1;
  bit empty_seen = 0, locked = 0;
  int n_scan = 0;
  always @(posedge rx_clk) begin
    int rel;
    rcyc <= rcyc + 1;
    rel = (rcyc + 1 - N0 + 100 * ORB) % ORB;
    common_bc0 <= (rcyc + 1 >= N0) && (rel == lat);
    if (rcyc + 1 >= N0 + ORB && (empty_rd[1] || empty_rd[3])) empty_seen = 1;
    if (rcyc + 1 >= N0 + ORB && rel == ORB - 30 && !locked) begin
      if (empty_seen) begin
        lat_found = lat; lat <= lat + 1; locked = 1;
      end else begin
        lat <= lat - 1; n_scan++;
      end
      empty_seen = 0;
    end
  end

  // outputs: identical in both channels, in order, once locked
  int n_cmp = 0, widx = 0, lock_rc = -1;
  bit cmp_started = 0;
  always @(negedge rx_clk) begin
    if (locked && lock_rc < 0) lock_rc = rcyc;
    if (lock_rc >= 0 && rcyc > lock_rc + 100 && (rx_flag[1] == 1 || widx > 0 || cmp_started)) begin
      cmp_started = 1;
      check(rx_flag[1] == rx_flag[3] && rx_data[1] == rx_data[3], "channels aligned");
      if (!rx_flag[1]) begin
        check(rx_data[1] == pat(widx), "word order");
        widx++; n_cmp++;
      end else widx = 0;
      check(!empty_rd[1] && !empty_rd[3], "no empty read at the operating point");
    end
  end

  logic [15:0] errs_at_lock [2];
  initial begin
    repeat (4) @(posedge tx_clk);
    rst_n = 1;
    for (int i = 0; i < NI; i++) begin
      @(posedge tx_clk);
      ctrl_addr <= REG_MODE; ctrl_wdata <= (i % 2 == 0) ? 16'(MODE_TX) : 16'(MODE_RX);
      ctrl_wr[i] <= 1;
      @(posedge tx_clk);
      ctrl_wr[i] <= 0;
    end
    wait (locked);
    repeat (ORB) @(posedge rx_clk);
    errs_at_lock[0] = sync_err_count[1]; errs_at_lock[1] = sync_err_count[3];
    repeat (2 * ORB) @(posedge rx_clk);
    check(sync_err_count[1] == errs_at_lock[0] && sync_err_count[3] == errs_at_lock[1],
          "no sync errors at the operating point");
    check(sync_err_flag[1] == 0 && sync_err_flag[3] == 0, "flags clear");
    check(n_scan > 0, "Common BC0 advanced at least once");
    check(errs_at_lock[1] > 0, "the longer channel reached empty during the scan");
    check(n_cmp >= 2 * NDAT, "aligned words compared");
    $display("Common BC0 adjustment: empty reached at %0d, operating point %0d clocks after bunch 0, output latency %0d",
             lat_found, lat, lat + 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    ctrl_wr = '{default: 0};
    repeat (15 * ORB) @(posedge tx_clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
