# SyncTx/Rx — orbit-based synchronisation of trigger data links

A synchronous, pipelined Level-1 trigger assumes that every word reaching a
processing stage in a given clock comes from the same bunch crossing. The
trigger links do not carry a crossing number, and the words arrive with
phases that nobody can predict well: flight paths differ, fibre lengths
differ and change when fibres are replaced, and temperature moves the timing.

This design solves the problem with the structure of the LHC beam itself.
An orbit is 3564 bunch periods of the 40.08 MHz clock and ends with a
127-crossing gap with no collisions. The first crossing after the gap is
*bunch 0*. Each trigger link gets a small circuit that does three things:

* at the sending end, it marks which word is bunch 0 and fills the gap with
  a recognisable pattern;
* at the receiving end, it puts one orbit of data into a FIFO, with bunch 0
  first. All FIFOs in the system are then read together when a Common BC0
  signal arrives, which reaches every circuit with the same phase;
* it clears and restarts in every gap, so a channel that has lost
  synchronisation is back in step after one orbit (about 89 µs). Each
  orbit is checked, and an error flag marks the orbits where
  synchronisation was lost.

A bunch profile histogram, built inside the circuit, shows how far the
bunch-0 marker (the TTC BC0 command) is from the real bunch 0. With it the
BC0 timing can be set from the running beam.

All RTL is SystemVerilog-2017 and synthesizable. The sizes are those of the
LHC: 3564 periods per orbit, 3437 data periods, and 3564 histogram bins.
Widths and encodings that the original description leaves open are listed
in [Choices made in this implementation](#choices-made-in-this-implementation).

## The orbit as a frame

All timing is counted from BC0:

```
 crossing:  0 1 2 ...                 3436 | 3437 ...          3563 | 0 1 ...
 flag:      data data ...             data | sync sync ...     sync | data
 link word: bunch 0, 1, 2 ...              | 0, 1, 2 ... 126        | bunch 0
                                           ^ start of gap (SOG)
```

* **BC0** (a TTC broadcast command) means "the next input word is bunch 0".
* After BC0 the circuit counts `N_DATA = 3564 - 127 = 3437` words. Then the
  **start of gap (SOG)** is reached. `bx_counter` does this count. Both halves
  use it: the Tx half starts it from the TTC BC0 and the Rx half from the
  Common BC0.
* Each word on the link has a **data/sync flag**. The flag is active (1) in
  sync mode, which is the gap, and 0 for data. During the gap, the data is
  replaced by the output of a counter that starts at 0 at SOG.

## SyncTx: marking bunch 0 (`sync_tx`)

```
 ttc_cmd ─► ttc_cmd_decoder ─bc0─► bx_counter ─active/bx─┬─► tx_mux ─► out_data, out_flag ─► edc_gen ─► out_edc
                         │                               │     ▲
                         │ start/stop/reset              │  sync_data_gen (counts while !active)
                         ▼                               ▼
                        accu ◄── hit ── noise_threshold ◄── data_in
```

* `ttc_cmd_decoder` turns the command byte (`ttc_cmd_valid` + `ttc_cmd`) into
  one-clock pulses for BC0, Start, Stop and Reset.
* `bx_counter` keeps `active` high for the 3437 clocks that follow BC0, with
  `bx` = crossing number.
* `tx_mux` selects the data words or the sync words. It registers them
  together with the flag.
* `edc_gen` adds an even-parity bit over the word and the flag.
* `accu` is the histogram. See [The bunch profile histogram](#the-bunch-profile-histogram-accu).

Latency: a TTC command in clock *c* is decoded in *c+1*. Bunch 0 is then
expected on `data_in` in *c+2* and appears on `out_data` in *c+3*. So the TTC
system has to send BC0 two clocks ahead of bunch 0. This offset is one part
of the BC0 phase, which is adjusted in the TTC receiver.

## SyncRx: one FIFO per link, read by everyone at once (`sync_rx`)

This is the part that needs the most care. SyncRx has two clock domains:

| domain | clock | contents |
|---|---|---|
| link (`wclk`) | the link's own clock, TxClk | `edc_dec`, `sync_cmd_decoder`, FIFO write port, write counter |
| common (`rclk`) | RxClk, fanned out with equal phase to all circuits | Common BC0 timer, FIFO read port, read counter, error flag |

Both clocks run at the bunch frequency but with unknown relative phase.
`sync_fifo` is therefore a dual-clock FIFO. Its pointers are Gray-coded and
cross between the domains through two-flop synchronisers.

**Write side.** The Synchronisation Command Decoder (`sync_cmd_decoder`)
follows the received flag:

1. The flag goes from data to sync: the orbit is complete. `disable_in`
   pulses and writing stops.
2. In the gap, the sync word equal to `CLR_WORD` (64) is the clear command.
   `clear_fifo` resets the write pointer at once. A toggle synchroniser then
   resets the read pointer 2–3 common clocks later.
3. The flag goes from sync to data: a new orbit starts. `enable_in` pulses.
   The first word written after a clear is bunch 0.

Each channel does this at its own time, which is the point of the scheme.

**Read side.** The Common BC0 starts the same 3437-clock window (`bx_counter`)
in every SyncRx. In clock *c* the Common BC0 arrives. In *c+1* the first read
happens. In *c+2* bunch 0 appears on `out_data`, with `out_flag` = 0 (data).
Outside the window `out_data` is 0 and `out_flag` is 1 (sync). Because
every FIFO starts reading on the same common clock, and every FIFO holds
bunch 0 at its head, all the outputs are aligned.

**When the Common BC0 may come.** The Common BC0 has to fit in a window:

* *Not too early.* Bunch 0 must already be in every FIFO, and visible through
  the synchroniser. This is about 3–4 clocks after the word leaves the
  slowest link. If it comes earlier, a read finds the FIFO empty and the
  orbit is flagged.
* *Not too late.* No FIFO may fill up. With 16 words of depth, the fastest
  channel must not get more than about 15 words ahead of the read. If a FIFO
  fills, writes are lost and the orbit is flagged.
* *The clear must come after the last read.* In the orbit, the clear comes
  64 words into the gap. The read window ends `LAT + 1 + 3437` clocks after
  bunch 0, where `LAT` is the delay from bunch 0 to the Common BC0. So
  `LAT` has to stay well under about 60 clocks. The FIFO depth enforces this
  anyway.

The setting procedure follows from these limits. Advance the Common BC0 one
clock at a time until some FIFO reads empty, then delay it by one clock. That
is the working point with the lowest latency. `tb_two_channels` runs this
procedure.

**Monitoring (`sync_monitor`, `edc_dec`).**

* The FIFO writes of each orbit are counted on the link clock. The FIFO reads
  are counted on the common clock. An orbit is good only if both counts
  equal 3437.
* Four common clocks after the read-side SOG, `sync_err_flag` is set to the
  result for the orbit just read and held until the next check. A failing
  orbit also increments `sync_err_count`.
* The write result crosses into the common domain as a level, and writing
  always ends before reading. So the four-clock wait is enough.
* Words with bad parity are counted by `edc_dec` (readable as DATA_ERR).

## The bunch profile histogram (`accu`)

`accu` has one 16-bit counter per crossing address (3564 bins). On BC0 the
address returns to 0. In each of the following 3437 clocks, the bin at the
current address is incremented if the input word is above the programmable
noise threshold (`noise_threshold`, strict `>`). The address then moves on.
From SOG on, nothing is updated.

Collect this over many orbits and it shows the filling pattern of the
machine. If BC0 is on time, the histogram matches the LHC bunch structure. If
BC0 is *late* by *d* clocks, bin *a* holds crossing *a+d*, so the first train
looks *d* crossings short. If BC0 is *early* by *d*, the first *d* bins hold
gap crossings and stay empty. Correlating the histogram with the known
pattern gives the BC0 correction; that correlation is done in software.
`tb_bc0_scan` checks all these cases.

The histogram is controlled by three TTC commands:

* **Start** enables accumulation.
* **Stop** disables it.
* **Reset** disables it and clears all bins with a 3564-clock sweep. The
  circuit reset does the same.

The counters saturate. A second read port lets the histogram be read at any
time without disturbing accumulation.

At an occupancy of 10⁻⁴, about 15 minutes of running (≈1.0·10⁷ orbits) gives
about 1000 events per bin. This is well within the 16-bit range.

## The circuit as a whole (`sync_txrx`)

`sync_txrx` contains SyncTx, SyncRx and `control_regs`. The mode register
decides how the circuit is used:

| mode | use | Rx input | Rx outputs |
|---|---|---|---|
| `MODE_TXRX` (0, reset) | one circuit at the receiving end does both jobs | the circuit's own Tx output | active |
| `MODE_TX` (1) | sending end of a link | link inputs (unused) | held in sync mode (data 0, flag 1) |
| `MODE_RX` (2) | receiving end of a link | `link_data/flag/edc` | active |

`tx_data/tx_flag/tx_edc` are driven in every mode. `tx_clk` is the link
clock. At a receiving end it is the clock recovered from the link, and the
whole Tx half and the FIFO write side run on it. `rx_clk` is the common
clock. The mode value is copied into the `rx_clk` domain through two flops.
Change it only while the trigger is idle.

### Control registers (`control_regs`, on `tx_clk`)

The bus has these signals: `ctrl_addr[3:0]`, `ctrl_wr`, `ctrl_rd`,
`ctrl_wdata[15:0]`. A read returns `ctrl_rdata` one clock later, with
`ctrl_rvalid`.

| addr | name | access | contents |
|---|---|---|---|
| 0 | MODE | R/W | `sync_pkg::mode_e` |
| 1 | THRESHOLD | R/W | noise threshold (8 bits) |
| 2 | ACCU_ADDR | R/W | histogram address for the next ACCU_DATA read |
| 3 | ACCU_DATA | R | histogram bin at ACCU_ADDR; ACCU_ADDR then advances by one |
| 4 | STATUS | R | bit 0 histogram clear in progress, bit 1 histogram enabled |
| 5 | DATA_ERR | R | parity errors received |
| 6 | WR_COUNT | R | FIFO writes in the last completed orbit |

`sync_err_flag` and `sync_err_count` are `rx_clk` signals and come out as
pins. The TTC command codes are in `sync_pkg::ttc_cmd_e`: BC0 = 0x01,
Start = 0x02, Stop = 0x03, Reset = 0x04.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `DATA_W` | 8 | trigger word width (8 bits per channel, as in the two-channel test set-up) |
| `N_DATA` | 3437 | clocks from BC0 to SOG (3564 − 127) |
| `ACCU_DEPTH` | 3564 | histogram bins, one per crossing of the orbit |
| `ACCU_W` | 16 | histogram counter width |
| `FIFO_DEPTH` | 16 | Synchronisation FIFO depth (power of two, ≥ 4) |
| `CLR_WORD` | 64 | sync word that clears the FIFO |

The orbit constants are in `rtl/sync_pkg.sv`.

## Choices made in this implementation

The original description gives the architecture, the FIFO and histogram
rules, and the orbit numbers. It does not give the following; each is this
design's own choice:

* 8-bit data words, and a single even-parity bit as the error-detection code.
* The TTC command byte and its codes. What Start, Stop and Reset do: they act
  on the histogram only.
* The clear word (64). The FIFO depth (16). The dual-clock
  FIFO structure and how the clear crosses into the common clock domain.
* When the orbit check is made, holding the error flag for one orbit, and all
  counter widths.
* The control register map. The JTAG port of the original circuit is not
  implemented.
* The histogram has 3564 bins (the whole orbit). Updates stop at SOG, so bins
  3437–3563 always stay 0. The original prototype kept the histogram in
  external RAM; here it is an on-chip memory array.

The circuit also has link identification and test functions, but their
behaviour is not described, so they are not built. The TTC receiver, the
links, the Common BC0/RxClk fan-out and the trigger-primitive electronics
are outside this circuit: they connect through its ports.

## Simulating

Every testbench checks its own results. It prints
`TB_RESULT checks=N failures=M` and stops; a watchdog stops it if it hangs.
With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/sync_pkg.sv tb/tb_sync_txrx.sv \
          --top-module tb_sync_txrx -Mdir obj_top
./obj_top/Vtb_sync_txrx
```

Replace the testbench name to run any other test.

| testbench | what it shows |
|---|---|
| `tb_sync_txrx` | Whole circuit at full size over 15 orbits. Tx/Rx mode, with every synchronised word checked. Early Common BC0 (empty FIFO) and late Common BC0 (overflow), both flagged and counted. Histogram of three orbits read through the control registers. Rx mode over a 3-clock link, with one corrupted parity bit. Tx mode. TTC Reset. Counts every mechanism. |
| `tb_two_channels` | Two channels (link lengths 2 and 8), each Tx circuit → link → Rx circuit. The Common BC0 is adjusted to the lowest-latency working point; both outputs then match word for word. |
| `tb_bc0_scan` | Histograms with BC0 on time, 3 late, 1 and 5 early; the offset is recovered from each. |
| `tb_sync_tx`, `tb_sync_rx` | Each half on its own; `tb_sync_rx` uses a shortened 60-word orbit. |
| `tb_<block>` | One per building block: `ttc_cmd_decoder`, `bx_counter`, `sync_data_gen`, `tx_mux`, `noise_threshold`, `accu`, `edc_gen`, `edc_dec`, `sync_cmd_decoder`, `sync_fifo`, `sync_monitor`, `control_regs`. |

Each testbench finishes in well under a second.
