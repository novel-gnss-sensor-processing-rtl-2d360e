# GNSS correlator subsystem on the low-latency port of a Cortex-R52

A satellite-navigation receiver divides its work into two parts. One part is a
fast fixed-function correlator. It multiplies the incoming baseband samples by
local replicas of the satellite's carrier and spreading code, and it adds up the
products. The other part is software on a processor. It reads those sums a
thousand times a second per channel and closes the tracking loops. Here the
processor is an Arm Cortex-R52. The correlator is a GNSS core, placed in the
embedded FPGA of a space SoC and reached through the R52's Low-Latency
Peripheral Port (LLPP).

This RTL is that correlator subsystem as it was put into the eFPGA:

```
 R52 LLPP ──AXI4──► [interconnect, not here] ──AXI4──► axi2ahb_bridge ──AHB-Lite──► gnss_module
                                                                          ┌────────────┴───────────┐
 39 MHz ──► clk_div (/8) ──► 4.875 MHz for everything to the right        sync_module ──► gnss_core
                                                                                    │
                    ie_irq_o[3:0], me_irq_o ◄── to the CPU's interrupt controller ──┘
```

The RF front end is not used. The core carries its own GPS C/A signal generator:
a look-up table holding one 1 ms code period, sampled at the core clock. This
lets the whole chain be exercised end to end. The chain runs from software
writing registers, through signal generation, down to correlation peaks read
back over the bus.

Top module: `gnss_efpga_top` (`rtl/gnss_efpga_top.sv`).

## Clocking

`clk_div` divides the 39 MHz fabric clock by 8, giving 4.875 MHz.

- The divided clock is a register toggling every four input clocks, with 50% duty.
- Everything else runs on it: the bridge, the Sync Module, the core, and the AXI4 port of the top.
- Moving the CPU's transactions into this clock is left to the interconnect in front of the top.
- All flops have an asynchronous active-low reset.
- The divided clock stops while reset is held, so its flops are reset by the reset edge itself, not by a clock edge.

The design depends on one number: 4.875 MHz is exactly 4875 samples per millisecond. The C/A code has
1023 chips and repeats every 1 ms. So one code period is a whole number of samples, and every
timing relation below is an integer count of clocks.

## The built-in C/A signal generator (`ca_code_gen`)

- A 4875-entry table holds one code period. It is computed at elaboration from the standard G1/G2 shift registers, with the PRN as a parameter (default 1).
- Entry *n* holds chip ⌊n·1023/4875⌋. A chip lasts 4 or 5 samples.
- A counter steps through the table once per clock and wraps from the last entry to the first.
- The carrier is zero, so I and Q are identical.
- Each sample is a 3-bit word. Word *s* means level 2s+1, so the range is −7…+7 in odd steps. Chip 0 is sent as +1 (`000`) and chip 1 as −1 (`111`).
- Software sets a start delay. This is the number of clocks between enabling the generator and its first sample, and it is used to line the signal up with a channel's replica. The next section explains why that matters.

## A channel (`gnss_channel`)

Each of the four channels is a chain of small units.

| Unit | Module | Work |
|---|---|---|
| Input selector | `input_selector` | Takes the generator stream or the previous channel's selected stream (*channel slaving*). Channel 0's "previous" input is the generator. |
| Carrier generator | `carrier_gen` | 32-bit NCO (2³² = one cycle per sample). An 8-phase, three-level cos/sin replica is taken from the top three phase bits. |
| Final down-converter | `final_down_conv` | Rotates the sample by the replica: I·cos+Q·sin, Q·cos−I·sin, as 5-bit signed values. |
| Code generator | `code_gen` | Code RAM of 32×32 bits, loaded by software. A 32-bit code NCO (2³² = one chip per sample). Counts chips to mark the end of each integration epoch. |
| Delay line | `delay_line` | Shift register with taps at 0, d, 2d, 3d, 4d samples: Early-Early, Early, Prompt, Late, Late-Late. d = 1…8 samples. |
| Correlator | `correlator` | Ten 24-bit integrate-and-dump accumulators (5 taps × I/Q). They dump on the epoch's last sample. |

The channel also latches its code chip, code NCO phase and carrier NCO phase at each measurement
epoch.

### Timing alignment: the part to understand before changing anything

The sample path (selector → down-converter) has two register stages. So does the code path (code
generator → delay line). Therefore a sample and the chip generated in the same clock meet at the
Early-Early tap. The Prompt tap is 2d clocks later.

The epoch marker travels through the delay line with the code and is picked off at the Prompt
tap. As a result, all ten accumulators dump when the Prompt replica finishes an epoch.

The code NCO resets to ⌈1023·2³²/4875⌉. With that value, a 1023-chip epoch is exactly 4875 samples,
and chip boundaries fall where the generator's table puts them.

Suppose the generator's first sample enters the channel in the same clock as the Prompt replica's
chip 0. Then the Prompt correlation is a perfect match: 4875 per epoch on I and on Q. The
testbenches obtain this by measuring the gap between the two register writes that start the
generator and the channel, and then setting the generator delay from it. With a one-sample
spacing, the five taps then read:

| EE | E | P | L | LL |
|---|---|---|---|---|
| 2827 | 3851 | 4875 | 3851 | 2827 |

This is a triangle 1024 per sample wide: each sample of offset costs about 1023 chip-edge mismatches.

A slaved channel sees its predecessor's stream one clock later, because of the selector's register.

## Measurement epochs and the time base (`time_base`)

- A 32-bit counter of core clocks gives the receiver time.
- A programmable-period strobe marks each measurement epoch. The default period is 97 500 clocks, which is 20 ms.
- Writing 0 stops the strobe.
- The strobe is output as `me_irq_o`, and it triggers the channels' latches.

## Register file and map (`gnss_core`)

The Sync Module decodes the byte address:

- `HADDR[15:12]` selects a block: 0–3 for the channels, `F` for the global registers. Other blocks read as zero and ignore writes.
- `HADDR[7:2]` selects a word in the block.

This compact map fits the CPU's 4 MB peripheral window.

Channel block (`gnss_pkg` names the offsets):

| Word | Name | Contents |
|---|---|---|
| 0 | CTRL | [0] enable, [1] input select (0 generator, 1 previous channel), [11:8] tap spacing |
| 1 | CARR_FREQ | carrier NCO increment |
| 2 | CODE_FREQ | code NCO increment (reset: 1.023 MHz) |
| 3 | EPOCH_CHIPS | chips per integration epoch, up to 8191 (reset 1023; 4092 = 4 ms) |
| 4 | STATUS | [0] new observables, write 1 to clear; [31:16] epoch count |
| 8–12 | I EE…LL | I observables of the last epoch |
| 13–17 | Q EE…LL | Q observables |
| 18–20 | ME_CHIP, ME_CODE_PH, ME_CARR_PH | states latched at the last measurement epoch |
| 32–63 | CODE_RAM | code, chip k in word k/32 bit k%32 (write only) |

Global block:

| Word | Name | Contents |
|---|---|---|
| 0 | GEN_CTRL | [0] generator enable; reads [1] running, [31:16] table passes |
| 1 | GEN_DELAY | generator start delay in clocks |
| 2 | ME_PERIOD | measurement-epoch period in clocks |
| 3 | TIME | receiver time in clocks (read only) |
| 4 | IE_STATUS | epoch flag of every channel (read only) |

Core timing:

- A read returns 2 clocks after the request.
- A write takes effect at once and is acknowledged 4 clocks later.

`ie_irq_o[n]` pulses once per channel epoch. There is no interrupt controller in the core: the
lines go to the CPU's own controller.

## Bus path and latencies

**`axi2ahb_bridge`**

- It is an AXI4 slave with 32-bit address and data and one outstanding transaction. It alternates reads and writes when both wait.
- Each AXI beat becomes one AHB-Lite SINGLE transfer. INCR and WRAP bursts advance the address; FIXED bursts do not.
- The AXI address is passed on unchanged.
- Accesses outside the 4 MB window (`BASE_ADDR`, `WIN_BITS`) get DECERR and never reach AHB.
- If the slave keeps HREADY low for 256 clocks, the transfer is abandoned with SLVERR.
- The R handshake comes 3 clocks after the AHB data phase ends, and the B handshake 1 clock after. These wait states make the end-to-end times equal those measured on the original bridge.

**`sync_module`**

- It is the AHB-Lite slave. It decodes the map and passes each request to the core through two register stages, and passes the answer back through two more.
- These stages keep the timing of the clock-domain synchroniser the block descends from, though both sides now share a clock.
- HREADYOUT is fed back to the bridge and to its own HREADY. HSEL is tied high.
- Writes are posted: the data phase ends after 2 clocks while the write is still on its way to the core.
- An access arriving before that write has been acknowledged waits, with HREADYOUT low.

Resulting AHB data phases:

- 7 clocks for a read: 2 to the core, 2 in it, 2 back, 1 response.
- 2 clocks for an isolated write.

Seen from the AXI side, an isolated register read takes 11 clocks from the AR handshake to the R handshake. That is 2 in the bridge, 2 to the core, 2 in the core, 2 back and 3 in the bridge. This matches the stage-by-stage latencies measured on the prototype. At 4.875 MHz it is about 2.3 µs. An isolated posted write takes 5 clocks from the AW handshake to the B handshake, matching the measured 3 + 2.

## How it departs from the thesis it implements

The receiver was prototyped with existing blocks: a vendor AXI-to-AHB bridge, and the original
correlator core of a space GNSS chip. Its description gives each block's function, the prototype's
configuration and measured latencies, but not their insides. Everything inside the blocks here is
this design's own, built as the simplest logic that does the described job:

- **Three state machines in the bridge.** The bridge merges its read, write and AHB state machines into one.
- **Bridge timing.** The bridge keeps the measured end-to-end times of the original bridge: 11 clocks per read and 5 per posted write. How these divide between the stages is this design's own. Forward, a read reaches the AHB slave 2 clocks after the AR handshake, and a write 3 clocks after AW. Back, the response delays are plain wait states (`RD_RESP_LAT` = 3, `WR_RESP_LAT` = 1); set both to 1 for the fastest response.
- **HREADYOUT.** The Sync Module's HREADYOUT is a standard AHB-Lite ready. The original pulsed a custom ready after its synchroniser.
- **Register map.** The original map is not published, so this map is new and compact. The DMA master, and the arbiter between DMA and bus, are left out; the software did not use them.
- **Carrier replica.** The replica is an 8-phase three-level table. Its resolution, and the NCO widths, are not given in the source.
- **Delay line.** Uniform tap spacing is this design's choice. With an exact code match, the result is symmetric (E = L). The published prototype measurement was asymmetric, with Late above Early, and gave a Prompt of 4763 rather than 4875. That points to a residual offset of a fraction of a sample in their set-up, which the exact alignment here does not have.
- **Generator samples.** The generator uses ±1 levels. The source gives the 3-bit format but not the amplitude it used.
- **Parts not modelled.** The input modules, power detector, beam forming and aiding units are not built; the FPGA version had removed them. Neither are the CPU, interconnect and interrupt controller. Their signals are the top's AXI4 port and interrupt outputs.

## Capacity

- Four hardware channels are built. This is the channel count of the eFPGA prototype.
- The source's channel-capacity figures measure how many channels the CPU software can serve: about 55 on the FPGA prototype and several hundred on the ASIC. Those figures are not a hardware channel count.
- `NUM_CH` is a parameter. However, the map addresses at most 15 channel blocks.
- The 13-bit epoch length and 24-bit accumulators hold the 4 ms tracking epochs. A 4 ms epoch is 4092 chips, with a Prompt of 19 500.

## Simulating

Every block has a self-checking testbench in `tb/`. Each prints `TB_RESULT checks=… failures=…`
and stops itself with a watchdog. The shared reference functions (C/A code, sample levels) are in
`tb/tb_ref_pkg.sv`.

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  --top-module tb_gnss_efpga_top -y rtl -y tb +libext+.sv -Irtl -Itb \
  rtl/gnss_pkg.sv tb/tb_ref_pkg.sv tb/tb_gnss_efpga_top.sv
./obj_dir/Vtb_gnss_efpga_top
```

`tb_gnss_efpga_top` runs the whole subsystem at its default parameters. It does the following:

- loads the code through AXI bursts;
- sets two channels on the generator and two slaved behind them, one with a carrier offset;
- aligns the generator with channel 0;
- compares all 40 observables with a sample-exact model;
- switches to 4 ms epochs;
- measures one measurement epoch at its 20 ms default, and counts the epochs of each length within it.

It also checks interrupts, measurement epochs, status clearing, FIXED bursts, simultaneous read
and write, and DECERR. It counts each bus and datapath mechanism and fails if any never occurred.

`tb_gnss_module` exercises the AHB side with pipelined transfers and checks the 7- and 2-clock
data phases. It also sweeps the generator delay to find the correlation peak.

`tb_gnss_core`, `tb_gnss_channel` and the unit testbenches check each block against reference
values computed in the testbench.
