# Windowed watchdog with spare-block interfacing

A plain watchdog timer only notices that software has gone quiet for too long.
It notices late, because it waits for one long timeout, and all it does then is
reset the whole system. This design replaces it with a *windowed* watchdog.
Software must service it inside a chain of short windows, each timed by its own
slow clock. A failure is seen in the window where it happens, and the cause is
recorded. The reset follows only after a fixed grace time, during which software
can still save state. Around the watchdog sit three more parts:

- a sensor checker, which makes each window also check one sensor reading;
- a fault-injection harness, which disturbs a program counter at random to
  measure how many faults the watchdog catches;
- a core of four *scheduled processes*, each followed by a *spare block*. When a
  process or the watchdog reports a malfunction, the spare block keeps the task
  running on the last good data.

The RTL follows the design described in "Design and Implementation of High Speed
FPGA Configuration Using SBI" (SBI: spare blocks interfacing). That description
leaves many details open: widths, ratios, encodings, exact timing. Every such
choice made here is listed in the file headers and summarised under
[Choices not fixed by the original description](#choices-not-fixed-by-the-original-description).

## The window sequence

This is the part that needs the most care. The watchdog (`wdt_core`) always has
at most one window open. Its `stage` output tells which one:

```
            INIT falls                 service               service              service
 IDLE ─────────────────► SERVICE ───────────────► FRAME ─────────────► CTRL ─────────────► FRAME ─► ...
                           │  SWCLK, SWLEN          │  FWCLK, FWLEN       │ CWCLK, CWLEN
                           │ expires                │ expires             │ expires
                           ▼                        ▼                     ▼
                        WDFAIL (mode 1)          WDFAIL (mode 2)       WDFAIL (mode 3)
```

1. A high-to-low transition on `init` opens the **service window**. `init`
   passes through two synchroniser flops, so the window opens three SYSCLK
   cycles after the pin falls.
2. Software services the watchdog by writing a 1 to bit 0 (WDSRVC) of the
   configuration register. A service inside the service window stops that
   window's counters at once, and the **frame window** opens.
3. A service inside the frame window closes it and opens the **controller
   window**. A service inside the controller window opens a fresh frame window,
   with its counters restarted. From here on, periodic services alternate
   between frame and controller windows.
4. If a window's main counter reaches its length before a service arrives, the
   watchdog raises `wdfail` and records *which* window expired in `fail_mode`.
   It does the same, with mode 4, if the sensor checker reports a reading over
   its limit while a window is open. All windows close.
5. A service while no window is open is ignored.

Each window is one instance of `wdt_window`. The window clocks are free-running,
so a start request usually falls between two edges of the window's clock. The
window therefore begins with an **offset phase**: a SYSCLK-rate counter counts
the cycles up to the next rising edge of the window clock. Only then does the
**main counter** start, and it counts edges of the slow clock. The main counter
needs only 8 bits and one comparator, because the slow clock does the coarse
division. This is the reason for the slow clocks.

The window lasts `offset + len × DIV` SYSCLK cycles, where `DIV` is the window
clock's division ratio. The offset is less than one window-clock period.
`closed` and `expired` are single-cycle pulses, one cycle after the service or
after the last tick. The offset measured by the frame window is brought out as
`fw_offset`.

The derived clocks come from `wdt_clk_div`. The square waves are output, but
inside they are used as one-cycle **ticks**, which act as clock enables. The
whole watchdog therefore runs in the SYSCLK domain and needs no clock-domain
crossing.

## From WDFAIL to RSTOUT

`wdt_down_counter` turns the failure into a reset:

- When `wdfail` rises, it waits `RST_DELAY_CYC` cycles (default 1024). RSTOUT
  rises `RST_DELAY_CYC + 1` cycles after the first edge that sees WDFAIL.
- It then holds `rstout` high for `RST_PULSE_CYC` cycles (default 16).
- When the pulse ends, the watchdog returns to IDLE, clears `wdfail`, and waits
  for the next INIT transition.
- `fail_mode` keeps the cause until the next failure, so software can read it
  after the reset.

The grace time is for software to save debugging data. Within it, software can
also cancel the reset:

- a write of bit 1 (WDRST) restarts the watchdog;
- the `clr` pin does the same.

Either one clears `wdfail`, and no reset follows.

## Configuration register and the unlock sequence

There is one 16-bit register on a simple bus: `cs`, `wr` and `rd` strobes with
`dbus_i` and `dbus_o`. A write takes one cycle with `cs && wr`. A read is
combinational while `cs && rd`.

| bits    | field     | access | meaning                                       |
|---------|-----------|--------|-----------------------------------------------|
| [15:13] | FWLEN     | RW*    | frame window length select                    |
| [12:10] | SWLEN     | RW*    | service window length select                  |
| [9:7]   | CWLEN     | RW*    | controller window length select               |
| [6:4]   | fail mode | RO     | 0 none, 1 service, 2 frame, 3 controller, 4 sensor |
| [3]     | WDFAIL    | RO     | fail flag                                     |
| [2]     | FWCLOSED  | RC     | a service closed the frame window; a read clears it |
| [1]     | WDRST     | W1     | restart the watchdog, clear a failure         |
| [0]     | WDSRVC    | W1     | service                                       |

FWCLOSED is set each time a service closes the frame window. It stays set
until software reads the register; the read returns 1 and then clears it. A
closure in the same cycle as the read is kept for the next read.

A length select does not hold a length. It picks one of eight lengths fixed in
`wdt_pkg::win_len`: 4, 8, 16, 24, 32, 64, 128 or 255 ticks of the window's
clock. After reset all three select 24 ticks. The selected lengths are output as
`swlen`, `fwlen` and `cwlen`.

*The length fields are guarded. While INIT is high, before the watchdog has
been started, any ordinary write sets them freely; this is the initialisation
time in which software configures the windows. After that, `wdt_pattern_cmp`
must see this sequence:

1. a write of `0xAAAA`;
2. a write of `0x5555` no more than `KEY_US` µs later (10 µs);
3. then, for `OPEN_US` µs (10 µs), every ordinary write loads the length fields.

A late second pattern, a stray write between the two patterns, or the wrong
order leaves the fields locked.

Writes equal to either pattern are never decoded as commands (`0x5555` has bit 0
set). This means every ordinary write also carries the length fields. Software
should therefore always write the current lengths together with its WDSRVC or
WDRST bit. While the unlock window is open, a service write with other length
values changes the lengths.

## Sensor checking

`param_checker` links each window to one 8-bit sensor reading:

| window     | reading    | limit  | enable    |
|------------|------------|--------|-----------|
| service    | `pressure` | `0x7F` | `enable1` |
| frame      | `temp`     | `0xBF` | `enable2` |
| controller | `heat`     | `0x7F` | `enable3` |

While a window is open, an enabled reading above its limit raises a parameter
fault, one cycle later. The watchdog turns the fault into WDFAIL with mode 4.
`dataout` shows the reading under check when it is in range, and 0 when it is
not or when nothing is checked.

The limits are parameters. The defaults reproduce the reference sample readings:

- 0x80 / 0xD0 / 0x2A fails;
- 0x00 / 0x10 / 0x6A passes;
- a pressure of 0xC7 fails.

## Fault injection

`fault_injector` stands in for the software under watch:

- A program counter advances every SYSCLK cycle through an incrementer.
- The program services the watchdog each time the PC reaches `SERVICE_PC`, so
  with the defaults it services once every 256 cycles.
- A multiplexer in front of the PC normally takes the incrementer.
- A random pulse switches the multiplexer for one cycle to a random value. The
  pulse comes from one PN generator (`pn_gen`, a 16-bit maximal-length LFSR),
  and the random value from a second one, the *random fault generator*.

A jump backwards delays the next service. If the delay is long enough, the open
window expires and the watchdog fails. A jump forwards only brings the service
earlier, which this watchdog does not punish. The block counts faults injected
(`fi_inject_count`) and faults detected (`fi_detect_count`): a detection is a
rise of WDFAIL while an injected fault is outstanding.

After RSTOUT the PC restarts at 0, and the program drops its INIT to start the
watchdog again. With `prog_sel` high, the program model drives the watchdog's
INIT and services. `fi_enable` turns injection on.

With the defaults, the service period is 256 cycles. The frame and controller
windows are 24 ticks × 16 = 384 cycles long. Normal operation therefore never
fails. Roughly one injected jump in twenty is caught: in the end-to-end test,
101 injections led to 5 detections.

## Scheduled processes and spare blocks

The core holds four pairs of a process and a spare block.

`sched_process` measures a pulse train (`task_pulse[p]`) against SYSCLK:

- One flop group counts clock cycles (`curr_count`).
- A second group, clocked by the pulse itself, saves the count at every pulse.
  It outputs the number of clock cycles since the previous pulse on the 48-bit
  `dat_o`.
- If two pulses arrive with no clock edge between them, the pulse is faster
  than the clock, and `err_o` is set.
- `curr_count` is read across clock domains. With unrelated clocks, a pulse
  near a clock edge can catch a changing count. Add a Gray-code or synchroniser
  stage if that matters.

`sbi_spare` sits between a process and the embedded task (`task_data[p]`):

- In normal operation it passes the process's data on, three cycles later. The
  inputs are synchronised, and a word is taken only when it has been stable for
  two cycles.
- It keeps the last good word.
- When the process reports an error, or the watchdog has failed, it supplies
  the stored word instead, raises `task_spare[p]`, and counts the event.

The spare blocks provide storage and spare data. The "delay clock" help that
the original description also attributes to them is not modelled, because
nothing specifies it.

## Top level: `proposed_application`

The top-level block is `proposed_application`. The following parts are not in
this RTL; their connections are ports of the top:

- the embedded task that consumes `task_data`;
- the CPU and its software on the register bus;
- the sensors;
- clock and reset generation.

| group          | ports |
|----------------|-------|
| clock, reset   | `sysclk`, `sysreset` (active high, asynchronous) |
| watchdog       | `init`, `clr`, `cs`, `rd`, `wr`, `dbus_i`, `dbus_o`, `wdfail`, `rstout`, `fail_mode`, `stage`, `swlen`, `fwlen`, `cwlen`, `swclk`, `fwclk`, `cwclk`, `fw_offset` |
| sensors        | `pressure`, `temp`, `heat`, `enable1..3`, `dataout` |
| fault injection| `prog_sel`, `fi_enable`, `fi_pc`, `fi_inject_count`, `fi_detect_count` |
| core           | `task_pulse[4]`, `task_data[4][48]`, `task_spare[4]`, `task_err[4]`, `task_spare_count[4][16]` |

Parameters, with their defaults:

| parameter | default | meaning |
|-----------|---------|---------|
| `SYSCLK_MHZ` | 50 | converts the µs limits to cycles |
| `KEY_US`, `OPEN_US` | 10, 10 | unlock timing (µs) |
| `SW_DIV`, `FW_DIV`, `CW_DIV` | 64, 16, 16 | SYSCLK division for SWCLK, FWCLK, CWCLK |
| `RST_DELAY_CYC`, `RST_PULSE_CYC` | 1024, 16 | WDFAIL-to-RSTOUT delay and pulse width |
| `PC_W`, `PULSE_BITS` | 8, 8 | program-counter width, random pulse rate (about 1 in 2^8 cycles) |
| `DAT_W`, `N_PROC` | 48, 4 | process data width, number of process/spare pairs |

The window length table and the register layout are in `rtl/wdt_pkg.sv`.

## Simulating

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`. `tb_proposed_application` runs the whole
design at its default parameters. It takes the design through these steps:

1. every window and every failure mode;
2. a reset, a WDRST and a `clr`;
3. an unlock and a length change, and a read of the FWCLOSED status;
4. the sensor limits;
5. a too-fast pulse train;
6. the spare blocks;
7. the program model, first without and then with fault injection.

It counts each of these mechanisms and fails if one never occurred. It
simulates about 330,000 cycles in under a second.

```
verilator --binary --timing --assert -Irtl -y rtl --top-module tb_proposed_application \
    rtl/wdt_pkg.sv tb/tb_proposed_application.sv
./obj_dir/Vtb_proposed_application
```

`tb_sensor_workload` replays three sets of sensor readings through the whole
design, also at the defaults. In the first and third set, pressure is over its
limit, and the test checks that the watchdog fails at once and that the reset
follows after the grace time. In the second set all readings are within limits,
and the test checks that software keeps the watchdog serviced through several
windows while `dataout` shows each reading in turn.

For another testbench, replace the name. The package must come first on the
command line; `-y rtl` finds the other modules. Verilator is a two-state
simulator, so every testbench applies reset before checking.

## Choices not fixed by the original description

Given by the description and followed here:

- the INIT-falling start;
- slow derived window clocks with a SYSCLK-rate offset counter;
- services stopping the counters at once;
- service window → frame window → controller window;
- the FWLEN / SWLEN / CWLEN fields, chosen from hard-coded lengths;
- the 0xAAAA / 0x5555 unlock with its two 10 µs limits;
- a fixed delay from WDFAIL to the reset;
- the PC / incrementer / multiplexer / two-PN-generator fault injector with a
  detection counter;
- four scheduled processes with spare blocks around an embedded task;
- the 48-bit process data;
- the sensor names and 8-bit widths.

Chosen here:

- **Window order after the first service.** The frame and controller windows
  alternate, and each service restarts the frame. The source says only that
  frame counters reset on a service in the next service window, and that the
  controller window follows the frame window.
- **Early services.** A service arriving early is not treated as a fault.
- **Offset counters.** The source mentions an offset up/down pair for the
  service window but explains only the up counter, so each window has only the
  up counter.
- **Numbers.** All ratios, lengths, delays and limits, and the SYSCLK frequency
  (50 MHz), are chosen here.
- **Register layout.** The bit positions, the rule that length writes are free
  while INIT is high, and the rule that pattern writes are not commands.
  The source draws a "frame window closed" line into the register but does
  not say what it does; here it is the clear-on-read FWCLOSED bit.
- **Reset behaviour.** RSTOUT is a pulse, and a cleared WDFAIL cancels the
  pending reset.
- **Sensors.** The mapping from window to sensor, and the limits.
- **Clocks.** The derived window clocks are made inside the design and are
  outputs. In the original top-level symbol they are inputs.
- **Program model.** How a PC jump reaches the watchdog: the program services
  at a fixed PC value.
- **Spare-block behaviour.** Substitution of the last good word, triggered by a
  process error or by WDFAIL.

The original implementation reports 13 LUTs, 43 I/O pins and 301 MHz on an
FPGA. That figure belongs to a far smaller build than this one, which
synthesises to about 480 word-level cells and 1650 flip-flop bits (mostly the
48-bit process counters and registers). It is not a target for this RTL.
