# Camera controller for a two-channel push-broom satellite camera

This is synthesizable SystemVerilog for the camera controller (CC) of a
multi-spectral satellite camera. The camera has two electro-optical channels
that image at a synchronous rate: a panchromatic (PAN) channel with 1 m
ground resolution and a multi-spectral (MS) channel with 4 m resolution in
four spectral bands. The controller takes orders from the satellite's payload
management unit (PMU) over RS-422. It powers and sequences the focal plane
electronics (FPEs), sends them commands, gives them line syncs, reads
telemetry and supervises its own microcontroller.

In the original controller, a microcontroller (80C32 class) runs the
operating software. An FPGA beside it does the time-critical and
reliability-critical work. This RTL gives:

* **the FPGA** (`cc_fpga`), with its three parts:
  * `decode_latch`: bus decoding and the functional sub-blocks;
  * `watch_dog`: supervision of the microcontroller;
  * `comm_uart`: combining the serial lines towards the PMU.
* **the operating-mode state machine** (`cc_mode_ctrl`). In the original
  this logic is software on the microcontroller. Here it is a hardware
  state machine, so the mode behaviour can be simulated and reused.

`cc_top` places the two side by side. The microcontroller itself, the SRAM,
both flash devices, the A/D converter and its multiplexer, the RS-422
transceivers, oscillators and regulators are external parts. Their signals
are ports of `cc_top`.

```
                 +------------------------------- cc_top ----------------------------------+
 80C32 bus  ---> | cc_fpga                                                                  |
 AD, A15:8,      |  decode_latch                                                            |
 ALE RD WR PSEN  |   address_latch -> d_a_adapter --acc strobe--> discrete_line  -> enables  |
                 |                                            |-> serial_data    -> TX/CLK/SYNC
                 |                                            |-> a2d_interface  <-> ADC, AMUX
                 |                                            |-> flash_interface -> flash CS
                 |                        address, RD/WR level -> ram_interface  -> SRAM CS
 PMU line sync --|-------------------------------------------> line_sync_pan_ms -> PAN/MS sync
 fast clocks --->|                        EN_CLKS ------------> fpe_clk_gate x2  -> FPE clocks
 WDI, MR_n ----> |  watch_dog ---------------------------------------------------> WDO_n     |
 UART lines <--> |  comm_uart <------------------------------------------------> RS-422      |
                 |                                                                          |
 PMU commands -> | cc_mode_ctrl ----> mode, band enables, imaging, telemetry/BIT enables    |
                 +--------------------------------------------------------------------------+
```

Everything except the two FPE clock gates runs on one clock, `clk`, which
is assumed to be the microcontroller's 12 MHz clock (`CLK_HZ`). Asynchronous inputs pass two-flop
synchronisers in the block that uses them. Reset `rst_n` is asynchronous and
active low.

## Operating modes (`cc_mode_ctrl`)

The mode logic is the part with the most behaviour. The controller is a slave
of the PMU, so every mode change is a PMU command. There are two exceptions:
power-up, and loss of contact with the PMU.

| Mode | Entered | What is active | Left on |
|---|---|---|---|
| INIT | reset | nothing | `init_done` (initialisation and power-up BIT finished) -> WAIT |
| WAIT | from INIT | nothing; a 20 s timer runs | READY_IMAGE command -> READY_IMAGE; any other command -> STANDBY, where that command is then executed; no command for 20 s -> default READY_IMAGE |
| default READY_IMAGE | WAIT timeout | all five bands, `default_params` | next clock -> IMAGING (START_IMAGING is set automatically) |
| STANDBY | command, end of IBIT, first PMU contact in default imaging | periodic BIT only, all bands off, no FPE telemetry | READY_IMAGE command -> READY_IMAGE; IBIT command -> IBIT |
| READY_IMAGE | command (from WAIT or STANDBY) | selected bands powered, their telemetry monitored, periodic BIT | START_IMAGING -> IMAGING; STANDBY command -> STANDBY |
| IMAGING | START_IMAGING, or automatically in default operation | as READY_IMAGE, plus `imaging` | STOP_IMAGING -> READY_IMAGE; STANDBY command -> STANDBY |
| IBIT | IBIT command in STANDBY | all FPEs disabled, `ibit_active` | `ibit_done` -> STANDBY |

**Loss of contact.** If the PMU stays silent through WAIT, the camera starts
imaging on its own with default parameters: all bands, and STANDBY is skipped.
The first PMU command that arrives during this default operation shows that
the link works. The controller then drops to STANDBY, clears `default_params`
and executes that command from STANDBY on the next clock. An IBIT command
received this way therefore leads through STANDBY to IBIT.

**Pending command.** A command that moves the controller from WAIT or from
default imaging into STANDBY is kept in a one-entry register. It is executed
one clock after STANDBY is entered. A READY_IMAGE request in WAIT goes
directly to READY_IMAGE. This follows the original mode diagram. Its prose
says instead that every message first passes through STANDBY.

**Interface.** A command is `cmd_valid` high for one clock with `cmd`
(`pmu_cmd_e` in `cc_pkg`) and, for READY_IMAGE, a band mask `cmd_bands`:
bit 0 is PAN, bits 1-4 are MS bands 1-4. A command that means nothing in the
current mode is dropped and pulses `cmd_rejected`. `CMD_OTHER` stands for any
other PMU message, for example a telemetry request. It changes no mode except
where the table says so. The contents of the power-up BIT, the initiated BIT
and the periodic BIT are not part of this RTL: `init_done` and `ibit_done`
are inputs, and `pbit_en`, `tlm_mon_en`, `ibit_active` are outputs.
`band_en` is the set of band power enables for the FPEs.

## The microcontroller bus and the register map

The FPGA sits on the 80C32's multiplexed bus: AD[7:0] carries the low address
while ALE is high and carries data afterwards, and A[15:8] comes from port 2.
`address_latch` captures the low byte on ALE and also drives it out
(`mem_a_lo`) as A[7:0] for the memories. `d_a_adapter` builds the 16-bit
address. It turns each completed access into a one-clock `cpu_acc_t` strobe
that all sub-blocks watch:

* A **write** strobe comes when the synchronised WR_n rises. Its data is the
  last byte sampled while WR_n was low, so the CPU may release the bus right
  after WR_n.
* A **read** strobe comes when RD_n rises. Flags that a read clears are
  therefore cleared only after the CPU has taken the value. While RD_n is
  low and the address is in the register page, the FPGA drives AD[7:0]
  (`ad_out`, `ad_oe`). For any other address it never drives the bus.

The memory map is this design's own choice (`cc_pkg`):

| Range | Use |
|---|---|
| 0x0000-0x7FFF | external SRAM (`ram_interface`) |
| 0x8000-0xBFFF | data window onto the flash device that is not executing |
| 0xC000 | `REG_DISCRETE`, R/W: bit0 LINE_SYNC_EN_PAN, bit1 LINE_SYNC_EN_MS, bit2 RST_LOW, bit3 EN_BUF_DA, bit4 EN_CLKS |
| 0xC001 | `REG_SERIAL`, W: byte to the FPEs; R: bit0 busy, bit1 overrun (cleared by this read) |
| 0xC002 | `REG_A2D_CTRL`, W: start a conversion on channel data[4:0]; R: bit7 done, bit6 busy, bits4:0 channel |
| 0xC003 | `REG_A2D_DATA`, R: last result (the read clears done) |
| 0xC004 | `REG_FLASH_CTRL`, R/W: bit0 code_sel, bit1 prog_en |

Bus strobes pass two flip-flops, so the FPGA's view of an access lags the
CPU by two to three clocks. The SRAM and flash select lines add one more
clock. The bus model in the testbenches holds RD_n and WR_n low for four to
five clocks. A real 80C32 at the same clock holds its strobes for several
clocks as well, but check this against your clock ratio before using the
design.

## Sub-blocks of `decode_latch`

**Discrete lines (`discrete_line`).** Five enable lines, written by the CPU:

* the PAN and MS line-sync enables, used inside the FPGA;
* RST_LOW, the detector reset;
* EN_BUF_DA, the buffer enable;
* EN_CLKS, which lets the fast clocks out to the FPEs.

All five reset low.

**FPE clocks (`fpe_clk_gate`).** The FPEs get two fast clocks, a master
clock and a serial clock. Both come from oscillators outside the FPGA and
enter on `fast_clk_in[1:0]`. Each passes one `fpe_clk_gate` and leaves on
`fpe_clk_out[1:0]`. The gate is this design's circuit:

* EN_CLKS crosses into the fast clock through a two-flop synchroniser;
* a register on the falling edge of the fast clock holds the enable;
* the output is the AND of the fast clock and that register.

The enable changes only while the clock is low, so the output has no runt
pulses. It starts or stops two to three fast-clock cycles after EN_CLKS
changes. While disabled, the output is held low.

**FPE command link (`serial_data`).** The original controller uses its own
synchronous protocol on three lines, TX, CLK and SYNC. The frame format here
is this design's choice:

* SYNC is high for a frame of 8 bits, sent MSB first.
* Each bit lasts `2*CLK_HALF` clocks (8 clocks by default, 1.5 Mbit/s at
  12 MHz).
* TX changes while CLK is low. CLK rises in the middle of the bit, so the
  FPE samples on the rising edge.
* SYNC rises one clock after the write strobe. A frame takes 64 clocks.

A byte written while a frame is running is dropped and sets the overrun
flag. The FPEs' return line and their telemetry are not handled here.

**Line syncs (`line_sync_pan_ms`).** The PMU supplies a line sync at the PAN
line rate. Each of its rising edges makes a `PULSE_W`-clock pulse on
`pan_line_sync`, three clocks later, while LINE_SYNC_EN_PAN is set. The MS
ground sample is four times coarser and both channels image synchronously,
so MS takes one line per four PAN lines (`MS_RATIO` = 4). The divider is
held at zero while LINE_SYNC_EN_MS is low, so the first MS line after
enabling falls on a PAN line. At about 6.8 km/s ground speed, a 1 m line is
about 147 µs, or about 1,765 clocks at 12 MHz. The block accepts any line period
longer than about 7 clocks.

**SRAM (`ram_interface`).** For reads and writes in the SRAM range, it
asserts chip select together with output enable or write enable. Address and
data go from the CPU to the SRAM directly.

**Flash (`flash_interface`).** There are two flash devices, one holding a
loader and one holding the operational code.

* After reset, program fetches (PSEN_n) go to the loader flash.
* Setting `code_sel` moves fetches to the code flash.
* The device that is not executing appears at 0x8000-0xBFFF. It can be read
  there, and written (programmed) there only while `prog_en` is set.

This is how the loader reads or replaces the code. The scheme is this
design's interpretation of "code read and loader write" chip-select logic.

**Telemetry A/D (`a2d_interface`).** A write to `REG_A2D_CTRL` selects one of
32 multiplexer channels and raises `adc_start`. `adc_start` stays high until
the converter raises `adc_ready`. The 8-bit result is then latched, `done`
is set and `adc_start` falls. A start written while a conversion is running
is ignored. Converter resolution and channel count are assumptions.

## Watchdog (`watch_dog`)

The microcontroller must toggle `wdi`. Any edge restarts a timer. After
1.6 s without an edge (`TIMEOUT_MS`, 19.2 million clocks at 12 MHz),
`wdo_n` goes low for `PULSE_MS` (200 ms, an assumption). This resets or
interrupts the microcontroller, and the timer then starts again. The
active-low manual reset `mr_n` holds `wdo_n` low for as long as it is low.
`timeout_cnt` counts the timeouts.

## Serial lines to the PMU (`comm_uart`)

The on-board UART and the primary and redundant microcontrollers can each
drive the transmit line to the PMU. An idle asynchronous serial line is
high, so the three lines are combined with an AND: whichever source is
active sets the line. The PMU's receive line is fanned out to all three.
Inputs are synchronised and outputs registered, which adds three clocks in
each direction.

## Parameters

| Parameter (on `cc_top`) | Default | Origin |
|---|---|---|
| `CLK_HZ` | 12,000,000 | assumed |
| `WD_TIMEOUT_MS` | 1600 | original specification (1.6 s) |
| `WD_PULSE_MS` | 200 | assumed |
| `WAIT_S` | 20 | original specification (20 s) |
| `SER_CLK_HALF` | 4 | assumed |
| `MS_RATIO` | 4 | from the 1 m / 4 m resolutions |
| `SYNC_PULSE_W` | 4 | assumed |

Shared types and addresses are in `rtl/cc_pkg.sv`: `cpu_acc_t`,
`discrete_t`, `cc_mode_e`, `pmu_cmd_e` and the register offsets.

## Simulation

Every module has a self-checking testbench `tb/tb_<module>.sv`. It prints
`TB_RESULT checks=N failures=M` and stops on its own watchdog if it hangs.
With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/cc_pkg.sv tb/tb_cc_top.sv \
          --top-module tb_cc_top -o sim && obj_dir/sim
```

* `tb_cc_top` runs the whole controller end to end at `CLK_HZ` = 1000. At
  that clock the 20 s WAIT is 20,000 clocks and the 1.6 s watchdog 1,600
  clocks. The testbench acts as the microcontroller (bus cycles and watchdog
  toggling), the PMU (commands, line sync, RS-422) and the A/D converter.
  The operation it runs: power-up, WAIT expiring into default imaging with
  line syncs, first PMU contact leading to STANDBY and IBIT, commanded
  READY_IMAGE and IMAGING with an FPE command byte and telemetry
  conversions, the FPE clocks held and then let through by EN_CLKS,
  SRAM and flash accesses with the switch to the code flash,
  the RS-422 combining, a watchdog timeout and the manual reset. It counts
  each of 26 mechanisms and fails if one never occurs.
* `tb_cc_top_full` runs the same sequence with every parameter at its
  default, with the PMU line sync at the PAN line rate of the orbit (about
  1,765 clocks per line). That is about 290 million clocks and takes about
  three minutes.
* The block testbenches (`tb_serial_data`, `tb_line_sync_pan_ms`,
  `tb_watch_dog`, `tb_cc_mode_ctrl`, ...) also check frame lengths,
  latencies, pulse widths and timeouts in clock cycles.

## How far to trust it, and what is not here

The block structure, the signal names of the discrete lines and the serial
link, the 1.6 s watchdog, the AND of the serial lines, the 20 s WAIT timeout
and the modes with their transitions all follow the original controller's
description. The following are this design's own choices, because the
original gives no detail for them:

* the clock rate and bus timing;
* the memory map and register layout;
* the serial frame format;
* the A/D handshake and width;
* the flash selection scheme;
* pulse widths;
* the command encoding.

Things to know:

* The mode state machine is not connected to the FPGA registers. In the real
  system the microcontroller's software writes the discrete enables for each
  mode; the testbench does this in its place.
* Not handled: the FPE return channel ("Com Rx") and FPE telemetry lines,
  the LVDS bus to the FPEs, the contents of the built-in tests, the
  video-processor control, and the regulator power-up sequence beyond the
  enable lines.
* The power-on reset circuit, oscillators, memories, converter and
  transceivers are external parts and are not modelled in `rtl/`. The
  converter exists only as a small model inside the testbenches.
