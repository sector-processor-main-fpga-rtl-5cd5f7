# Sector Processor Main FPGA

The Main FPGA sits at the centre of a muon trigger Sector Processor
(SP2002). Once every LHC bunch crossing (25 ns, 40 MHz), it takes in the
track segments of one sector:

* 9 segments from the ME2, ME3 and ME4 cathode strip chamber (CSC)
  stations,
* 6 segments from ME1,
* 2 segments from the barrel drift tubes (DT).

A track finder inside the FPGA joins these segments into at most three
muon tracks. Each track addresses a 4M x 8 SRAM, the PT LUT, which returns
the track's transverse momentum. The tracks and their PT values go to the
Muon Sorter as one 64-bit word per crossing, sent as two 32-bit frames at
80 MHz.

The CSC segments arrive already lined up in time. The DT segments do not:
they come on their own link clocks and have to be aligned here. The FPGA
also has four service functions:

* a VME slave port;
* the CCB fast-control lines (clock, bunch counter reset, L1 accept);
* an out-of-synch monitor;
* a readout port that sends the DT segments and tracks of a triggered
  crossing to the DDU.

This RTL contains everything around the track finder. The track
reconstruction algorithm is not part of it. The track finder's inputs are
outputs of the top module `sp_main_fpga`, and its three tracks come back in
as an input (`trk_i`), one set per crossing.

## Blocks

| module | role |
| --- | --- |
| `sp_main_fpga` | top: wiring, CSC input registers, readout record, status |
| `vme_regs` | VME slave port, configuration and status registers |
| `ccb_fast_ctrl` | CCB fast control: BX counter, BC0 check, L1A/test pulses, event number |
| `sync_monitor` | FM_OSY out-of-synch flag from the CSC BC1 markers and the CCB BC0 |
| `dt_align` (+ `dt_cdc_fifo`) | moves each DT link from DT_CLK40 to the main clock, adds a programmable delay, checks DT_BXN |
| `pt_lut_ctrl` | address and control pins of the three PT LUTs; writes to a LUT through the loading buffer |
| `ms_out_fmt` | the 40 bits of the Muon Sorter word that the FPGA drives |
| `ms_clk_gen` | the three mux clocks MX_CLK (CLK80, CLK40-90, CLK40-270) |
| `ddu_readout` | L1A-triggered event building and the DDU handshake |
| `sp_main_pkg` | widths, record structs, VME register map, Muon Sorter frame layout |

All logic runs on CCB_CLK40 (`ccb_clk40`), with three exceptions:
* the DT write side runs on each link's DT_CLK40;
* `ms_clk_gen` runs on `clk160`, a clock four times CCB_CLK40 and
  phase-locked to it (in an FPGA this comes from a clock manager);
* the VME strobes are asynchronous and pass through synchronisers.

The reset `rst` is synchronous and active high.

## One bunch crossing through the FPGA

Timing is counted in main-clock edges.

1. **Edge 0.** The CSC segments and the BC1 markers are registered, and so
   is the BX counter. From here on they are the track finder inputs
   `me234_o` and `me1_o`, and all refer to the same crossing.
2. **DT segments.** They arrive on `dt_o` after their own alignment delay
   (see below).
3. **Track finder.** It returns the tracks of a crossing `TF_LAT` clocks
   later on `trk_i`. The default is `TF_LAT = 2`, an assumed value.
4. **Edge after `trk_i` is valid.** On one edge:
   * `pt_lut_ctrl` puts the three PT LUT addresses on the pins;
   * `ms_out_fmt` puts phi, eta, halo and charge of the same tracks on the
     `SP_*` pins, with BXN and ERROR.

   The SRAMs answer within their access time, and their bytes go straight
   to the Muon Sorter transceivers. The FPGA never sees the PT value.
5. **Readout.** In the same clock, `ddu_readout` stores the tracks and
   the DT segments of the same crossing (`dt_o` delayed by `TF_LAT`) in
   its 256-crossing history.

## The Muon Sorter link and the mux clocks

This is the timing-critical part of the design.

The 64-bit word of one crossing is made of two parts:

* **40 bits from the FPGA:** per track phi (5), eta (5), halo (1) and
  charge (1); then BXN (2 LSBs of the BX counter), ERROR and SPARE
  (driven 0).
* **24 bits from the PT LUTs:** one byte per track.

All 64 bits go to the A inputs of four GTLP16617 registered transceivers,
which form two sets of 32 bits. The B outputs of the two sets are wired
together. Each transceiver samples its A inputs on every rising edge of
CLK80, and its output enable /OEAB is synchronous. The set whose /OEAB is
CLK40-270 drives the bus in one half of the crossing. The set whose /OEAB
is CLK40-90 drives it in the other half. The result is 32 lines carrying
80 Mbit/s each.

The frame layout comes from the board wiring. This design fixes it in
`sp_main_pkg::ms_frames`:

| frame | bits |
| --- | --- |
| frame 0 (CLK40-270 set, on the bus first) | muon 1 and muon 2 {phi 5, eta 5, charge, halo}, muon 3 {eta 5, charge, halo}, ERROR |
| frame 1 (CLK40-90 set) | PT of muons 1, 2, 3 (8 bits each), muon 3 phi 5, BXN 2, SPARE |

The layout keeps all 24 PT LUT bits in frame 1. The reason for this is
timing, explained below.

`ms_clk_gen` divides `clk160` with a 2-bit phase counter. Phase 0 starts on
the CCB_CLK40 rising edge, and each phase lasts 6.25 ns:

| output | high in phases |
| --- | --- |
| `mx_clk[2]` CLK80 | 0, 2 |
| `mx_clk[1]` CLK40-90 | 1, 2 |
| `mx_clk[0]` CLK40-270 | 3, 0 |

For a word launched at edge k, this is what happens:

* The CLK40-270 set samples at k + 12.5 ns and drives frame 0 from about
  k + 19 ns.
* The CLK40-90 set samples at k + 25 ns. The FPGA pins are still held at
  that moment, so this is still word k. It drives frame 1 from about
  k + 32 ns.

The k + 12.5 ns sample sees only FPGA register outputs, so it needs just
the FPGA clock-to-out and board delay. The PT LUT bytes are sampled at
k + 25 ns, the end of the crossing. That leaves room for the SRAM access
(10-15 ns parts, with margin up to about 20 ns) on top of the address
clock-to-out.

A layout with PT bytes in frame 0 would instead need clock-to-out plus
access to fit in 12.5 ns. Only 10 ns parts would meet that. The
end-to-end testbench uses 1 ns of board delay and 15 ns SRAMs.

## PT LUTs and their loading

Each PT LUT is two 4M x 4 SRAMs that share the address, /CE and /WE lines.
Each chip has its own /OE, which gives the two `/PT_OE` lines per LUT. The
22 address bits are the track finder's fields, MSB first:

| bits | field |
| --- | --- |
| 21:9 | PT_DPHI |
| 8 | PT_SIGN |
| 7:4 | PT_ETA |
| 3:0 | PT_MODE |

**Run mode** (CSR bit 0 = 0). A new address goes out every clock, with
/CE and /OE low and /WE high.

**Load mode** (CSR bit 0 = 1):
* all /OE lines are high, so the SRAMs release their data lines;
* /BUF_DIR is low, so the buffer points from the FPGA to the LUT.

Writing the data register `RA_LUT_DAT` starts one write cycle on the LUT
chosen in `RA_LUT_AHI[9:8]`, at the address held in `RA_LUT_ALO/AHI`. The
cycle has three 25 ns clocks:

1. **SETUP:** address, /CE and /BUF_OE are low and BUF_D is driven.
2. **WRITE:** /WE is low.
3. **HOLD:** /WE is high again.

The status bit `lut_busy` covers the cycle. The LUT data lines do not come
back into the FPGA, so there is no read-back path. Software checks the
contents by watching the Muon Sorter output.

## DT segment alignment

Each DT link is handled in three steps:

1. **Clock crossing.** The link is written on its own DT_CLK40 into an
   8-word dual-clock FIFO (`dt_cdc_fifo`) with Gray-coded pointers and
   two-flop synchronisers. The reader starts once it sees two words and
   then reads one word every clock. The clocks have the same frequency, so
   the latency stays constant once running. Over- or underflow raises
   `fifo_err`, which feeds SP_ERROR.
2. **Delay.** A delay line of 0 to 15 crossings (`RA_DT_DLY0/1`) lines the
   segments up with the CSC data.
3. **BXN check.** At the output, a segment with nonzero quality whose
   DT_BXN differs from the 2 LSBs of the BX counter counts as a mismatch.
   `RA_BXN_ERR` counts the clocks with a mismatch on either link.

The FIFO latency depends on the clock phases, so the right delay is found
at run time. Step the delays until the mismatch counter stops growing.
The end-to-end testbench does exactly this.

## Readout to the DDU

**History.** Every clock, `ddu_readout` writes that crossing's 150-bit
record (2 DT segments, 3 tracks) and its BX number into a 256-entry ring.

**Capture.** An L1A or a CCB test request reads back the crossing written
`RA_L1A_LAT` clocks before the trigger arrived at the block. Valid
latencies are 1 to 255. The read record goes into an 8-event buffer. If
the buffer is full, the event is dropped:
* `ovf_cnt` counts it;
* the sticky overflow flag is set (cleared by CSR bit 2);
* the overflow flag also raises SP_ERROR.

**Handshake:**
1. The DDU raises DDU_RR.
2. The FPGA answers with DDU_RA while an event is stored.
3. The DDU raises DDU_ST.
4. From the next clock, 12 words go out, one per clock.
5. DDU_RA drops with the last word.

**Event format:**
* word 0: `{4'hA, event number}`. The event number counts L1A plus test
  requests, and the first event is 1.
* word 1: `{3'b0, test, BX}`
* words 2-11: the record, MSB first, with the last word padded with
  zeros. The record bit order is `sp_main_pkg::ro_rec_t`.

**DDU_VP bits:**
* 0: word valid
* 1: first word
* 2: last word
* 3: test event

## VME registers

A VME access works like this:
* /VM_CE low frames the access, and /VM_WR low makes it a write.
* Both strobes are synchronised. Address and data are taken three clocks
  after /VM_CE falls, so they must be stable by then.
* Read data is driven (`vm_d_oe`) while a read is active.

| addr | name | access |
| --- | --- | --- |
| 0 | CSR | bit 0 LUT load mode (rw); bit 1 clear FM_OSY, bit 2 clear overflow (write pulses) |
| 1, 2 | DT_DLY0/1 | DT delay in crossings, 4 bits |
| 3 | L1A_LAT | L1A latency in crossings, 8 bits |
| 4 | BC1_BX | BX at which the CSC BC1 markers must arrive |
| 5 | LUT_ALO | LUT load address 15:0 |
| 6 | LUT_AHI | [5:0] address 21:16, [9:8] LUT select |
| 7 | LUT_DAT | [7:0] data; writing starts the SRAM write |
| 8 | STATUS (r) | 0 LUT busy, 1 OSY, 2 DDU overflow, 8:3 OSY sources (5 BC1 lines, BC0) |
| 9 | BX (r) | BX counter |
| 10 | EVN (r) | event number |
| 11 | OVF_CNT (r) | events lost to a full buffer |
| 12 | BXN_ERR (r) | DT BXN mismatch count |

## Fast control and synchronisation

**BX counter.** It counts 0 to 3563 (the LHC orbit) and wraps. CCB_BCR
zeroes it.

**BC0 check.** A CCB_BC0 on a crossing where the counter is not 0 is an
error.

**BC1 markers.** Each CSC link sends a BC1 marker once per orbit. It must
arrive on the crossing given by `RA_BC1_BX`.

**FM_OSY.** Any error, from BC0 or from a BC1 marker, sets the sticky
FM_OSY flag. The source bits can be read in STATUS. The flag is cleared
by CSR bit 1 or by a bunch counter reset.

**CCB_CLKEN.** It gates the counter and the trigger pulses.

## Pin budget

Table of the board signals the top module brings out:

| group | pins |
| --- | --- |
| VME | 30 |
| ME2-ME4 | 264 |
| ME1 | 200 |
| DT | 50 |
| MS mux | 43 |
| PT LUT | 78 |
| buffer | 12 |
| DDU | 23 |
| fast control | 6 |
| fast monitoring | 1 |
| **total** | **707** |

Adding the reserved lines and the configuration pins gives 716 user I/Os.
The XC2V3000 in the FF1152 package has 720, so the design fits with only
4 pins spare. The XC2V4000 and larger parts in the same package have 824.
The 726 signal contacts needed on the mezzanine card fit in four
200-contact connectors. The track finder ports and `clk160` are internal
and use no pins.

## Departures and open points

* The track finder is not included; its interface is brought out.
* The reserved pins are not brought out: CCB_SPARE (2), DDU_RSVD (3) and
  FM_SPARE. Configuration and JTAG pins belong to the FPGA device, not to
  user logic.
* Only the PT LUT built from two 4M x 4 chips is supported. The
  alternative of two 2M x 8 chips would need a chip select decoded from an
  address bit, which the pin list does not provide.
* Bidirectional VM_D is split into `vm_d_i`, `vm_d_o` and `vm_d_oe`. The
  pad tristate is outside this RTL.
* These are choices of this design, made where no specification was
  available:
  * the VME cycle and register map;
  * the DDU handshake and event format;
  * the FIFO-and-delay DT alignment;
  * the BC1 check;
  * the MX_CLK bit order;
  * the frame layout;
  * `TF_LAT`.

  Each is stated in the header comment of its module.

## Simulating

Each testbench is self-checking and ends with a line
`TB_RESULT checks=N failures=M`. Build a testbench with Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  -Irtl -y rtl -y tb --top-module tb_sp_main_fpga \
  rtl/sp_main_pkg.sv tb/tb_sp_main_fpga.sv -o sim
./obj_dir/sim
```

Replace `tb_sp_main_fpga` with `tb_<module>` for a single block.

`tb_sp_main_fpga` runs the whole design at its default parameters, with
behavioural models of the board:
* `pt_sram_model`: a PT LUT with its loading buffer;
* `gtlp16617_model`: one transceiver;
* a random track source that stands in for the track finder.

It does the following:
* loads the PT LUTs over VME;
* calibrates the DT delays;
* provokes and clears FM_OSY;
* overflows and drains the event buffer;
* checks every Muon Sorter word rebuilt from the 80 MHz bus, and every
  DDU word.

At the end it prints how often each mechanism happened. It runs in a few
seconds.

`tb_io_budget` checks the pin budget against the top module itself. It
measures each board-facing port of `sp_main_fpga` with `$bits`, compares
every group with the subtotals in the pin budget table, adds the reserved
and configuration pins, and checks the 716 total against the 720 user I/Os
of the XC2V3000. It also checks the 64-bit Muon Sorter word and the 22-bit
PT LUT address.

To check the whole design for lint problems:
`verilator --lint-only -Wall -Irtl -y rtl rtl/sp_main_pkg.sv rtl/sp_main_fpga.sv`.
