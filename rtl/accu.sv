// accu: bunch profile histogram accumulator (ACCU) of SyncTx.
//
// One counter per bunch-crossing address. While `active` (between BC0 and
// SOG) the address `bx` follows the bunch crossing, restarting at 0 on each
// BC0; in each such cycle the counter at that address is incremented if
// `hit` (input above the noise threshold) and accumulation is enabled.
// From SOG on nothing is updated. Over many orbits the array fills with
// the bunch profile histogram, whose shift against the LHC filling pattern
// tells how far the TTC BC0 is off.
//
// The TTC Start and Stop commands enable and disable accumulation; the TTC
// Reset command, and the circuit reset, stop accumulation and clear every
// counter with a sweep of DEPTH cycles (`busy` high meanwhile). Counters
// saturate at all ones. The read port (rd_addr -> rd_data one clock later)
// works at any time without disturbing accumulation, so the histogram can
// be monitored during running. What Start/Stop/Reset do, the counter width
// and saturation are this design's choices; the update rule is the
// circuit's. The prototype used external RAM; here the array is a memory
// with one read-modify-write port and one read port.
module accu #(
  parameter int unsigned DEPTH = sync_pkg::ORBIT_LEN,
  parameter int unsigned CNT_W = 16,
  parameter int unsigned ADDR_W = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              active,
  input  logic [ADDR_W-1:0] bx,
  input  logic              hit,
  input  logic              start,
  input  logic              stop,
  input  logic              clear,
  input  logic [ADDR_W-1:0] rd_addr,
  output logic [CNT_W-1:0]  rd_data,
  output logic              busy,
  output logic              enabled
);
  logic [CNT_W-1:0]  mem [DEPTH];
  logic [ADDR_W-1:0] clr_addr;
  logic              update;
  logic [CNT_W-1:0]  cur;

  always_comb begin
    update = enabled && !busy && active && hit;
    cur    = mem[bx];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy     <= 1'b1;
      clr_addr <= '0;
      enabled  <= 1'b0;
    end else begin
      if (clear) begin
        busy     <= 1'b1;
        clr_addr <= '0;
        enabled  <= 1'b0;
      end else if (busy) begin
        if (clr_addr == ADDR_W'(DEPTH - 1)) busy <= 1'b0;
        clr_addr <= clr_addr + 1'b1;
      end
      if (!clear) begin
        if (start)     enabled <= 1'b1;
        else if (stop) enabled <= 1'b0;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (busy)
      mem[clr_addr] <= '0;
    else if (update && (cur != '1))
      mem[bx] <= cur + 1'b1;
  end

  always_ff @(posedge clk) rd_data <= mem[rd_addr];
endmodule
