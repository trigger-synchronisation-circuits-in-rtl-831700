// tb_sync_fifo: dual-clock FIFO with the write and read clocks at the same
// period and 3.7 ns apart, as for a trigger link against the common clock.
// Phase 1: random writes and reads, every word read must be the next one
// written (scoreboard). Phase 2: writes only until full, excess writes are
// refused. Phase 3: reads only until empty, excess reads refused. Phase 4:
// clear empties the FIFO and the next word written is the next read.
module tb_sync_fifo;
  logic wclk = 0, rclk = 0, wrst_n = 0, rrst_n = 0;
  logic clear = 0, wr_en = 0, rd_en = 0;
  logic [7:0] wr_data = '0, rd_data;
  logic wr_accept, full, rd_accept, rd_valid, empty;
  always #5 wclk = ~wclk;
  initial begin #3.7; forever #5 rclk = ~rclk; end
  sync_fifo dut (.*);
  int checks = 0, failures = 0, n_full = 0, n_empty = 0;
  logic [7:0] sb [$];
  logic [7:0] wnext = 0;
  int phase = 0;
  task automatic check(input bit ok, input string s);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL %s t=%0t", s, $time); end
  endtask
  // write side
  always @(negedge wclk) begin
    if (wrst_n) begin
      if (wr_accept) begin sb.push_back(wr_data); wnext <= wnext + 1; end
      if (wr_en && full) n_full++;
    end
  end
  always @(posedge wclk) begin
    #1;
    case (phase)
      1: wr_en = ($urandom_range(0, 99) < 50);
      2: wr_en = 1;
      default: wr_en = 0;
    endcase
    wr_data = wnext;
  end
  // read side
  logic pend = 0;
  always @(negedge rclk) begin
    if (rrst_n) begin
      if (rd_valid) begin
        check(sb.size() > 0, "read with nothing written");
        if (sb.size() > 0) check(rd_data == sb.pop_front(), "word order");
      end
      if (rd_en && empty) n_empty++;
    end
  end
  always @(posedge rclk) begin
    #1;
    case (phase)
      1: rd_en = ($urandom_range(0, 99) < 50);
      3: rd_en = 1;
      default: rd_en = 0;
    endcase
  end
  initial begin
    repeat (3) @(posedge wclk);
    wrst_n = 1; rrst_n = 1;
    phase = 1; repeat (3000) @(posedge wclk);
    phase = 0; repeat (10) @(posedge wclk);
    phase = 2; repeat (60) @(posedge wclk);
    check(full == 1, "full after many writes");
    check(sb.size() == 16, $sformatf("holds 16 words (%0d)", sb.size()));
    phase = 3; repeat (60) @(posedge wclk);
    check(empty == 1 && sb.size() == 0, "drained");
    // leave some words, then clear
    phase = 2; repeat (5) @(posedge wclk);
    phase = 0; repeat (5) @(posedge wclk);
    @(posedge wclk); #1 clear = 1; @(posedge wclk); #1 clear = 0;
    sb.delete();
    repeat (6) @(posedge wclk);
    check(empty == 1, "empty after clear");
    phase = 1; repeat (500) @(posedge wclk);
    phase = 3; repeat (40) @(posedge wclk);
    check(sb.size() == 0, "all words read after clear");
    check(n_full > 0, "full seen"); check(n_empty > 0, "empty seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge wclk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
