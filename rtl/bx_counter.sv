// bx_counter: BC0-to-SOG orbit timer.
//
// A pulse on bc0 announces that bunch 0 arrives in the next clock. From
// that next clock on, `active` is high for N_DATA cycles while `bx` counts
// the bunch crossing 0 .. N_DATA-1. The cycle after the last one is the
// start of the gap (SOG): `active` drops and `sog` pulses for one cycle.
// A bc0 that arrives while active restarts the count at 0. After reset the
// timer is idle (gap). Used by SyncTx (driven by the TTC BC0) to flag data
// and address the histogram, and by SyncRx (driven by the Common BC0) to
// enable FIFO reads. The counting from BC0 to SOG follows the circuit's
// description; the restart rule is this design's choice.
module bx_counter #(
  parameter int unsigned N_DATA = sync_pkg::N_DATA,
  parameter int unsigned BX_W   = $clog2(sync_pkg::ORBIT_LEN)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            bc0,
  output logic            active,
  output logic [BX_W-1:0] bx,
  output logic            sog
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= 1'b0;
      bx     <= '0;
      sog    <= 1'b0;
    end else begin
      sog <= 1'b0;
      if (bc0) begin
        active <= 1'b1;
        bx     <= '0;
      end else if (active) begin
        if (bx == BX_W'(N_DATA - 1)) begin
          active <= 1'b0;
          bx     <= '0;
          sog    <= 1'b1;
        end else begin
          bx <= bx + 1'b1;
        end
      end
    end
  end
endmodule
