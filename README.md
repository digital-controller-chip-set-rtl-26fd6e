# Digital controller chip set for an isolated DC-DC converter

An isolated power supply has to get its output-voltage error from the
secondary (output) side of the transformer back to the primary side, where the
power switch is driven. The usual solution sends an analog error through an
opto-coupler running in its linear region, whose gain spreads widely between
parts and over temperature, so the loop has to be designed for the worst case.

This design sends the error **digitally** instead. A small secondary-side chip
turns the A/D-converted output voltage into a 4-bit error code and sends it as
a serial bit stream through an opto-coupler used only as an on/off logic link.
The primary-side chip receives the code, runs a table-driven PID law and drives
the power switch through a 10-bit digital pulse-width modulator (DPWM). The
opto-coupler gain no longer enters the loop.

The SystemVerilog here describes both chips: all of their digital logic as
synthesizable RTL, plus behavioural models of the analog delay line inside the
DPWM.

```
            primary-side chip                               secondary-side chip
 fsel[1:0] ─┐
            ▼
        ┌────────┐ clk_out (16 x fsw)       opto-coupler 1     clk_in
 d_out ◄┤  DPWM  ├────────┬────────────────────►─────────────────┐
        └───▲────┘        │                                      ▼
     duty   │ (10 bit)    ▼                               ┌──────────────┐  vad (8 bit)
        ┌───┴────┐  e  ┌──────────┐        opto-coupler 2 │ serial_tx    │◄── err_window ◄── A/D
        │regulatr│◄────┤serial_rx │◄──────────◄───────────┤ (16-bit word │           ▲
        └────────┘ 4bit└──────────┘ ser_in         ser_out│  per period) │           vref
                                                          └──────────────┘
```

The DPWM also makes the system clock (16 x the switching frequency). It clocks
the receiver and the regulator and is sent across the first opto-coupler to
clock the transmitter. So the whole chip set runs in step with the switching
period: one switching period is 16 system clocks, and one error word is sent
per period.

## The error code

`err_window` compares the 8-bit A/D sample `vad` with the digital reference
`vref`. Only a narrow window around the reference matters to a regulator. So the
code is `e = vref + 7 - vad`, clamped to 0..15:

| output voltage       | e    |
|----------------------|------|
| vref + 7 LSB or more | 0000 |
| vref                 | 0111 |
| vref - 8 LSB or less | 1111 |

The code grows as the output falls. Code 7 means zero error. The regulator
tables are indexed by the raw code, so the offset costs nothing. The A/D step
should be chosen so that one LSB is the allowed static error, for example
16.5 mV (0.5 %) for a 3.3 V output.

## The serial link

The link is the least obvious part of the design.

**Frame.** The transmitter doubles each error bit (`e3 e3 e2 e2 e1 e1 e0 e0`),
puts the start sequence `0101` before it and the stop sequence `1010` after it,
and sends the 16 bits most significant bit first:

```
  0 1 0 1 | e3 e3 e2 e2 e1 e1 e0 e0 | 1 0 1 0      (16 system clocks = 1 switching period)
```

Doubling the data bits means that the alternating pattern `0101` cannot appear
inside the data field. That lets the receiver find the word boundary by pattern
alone, with no shared frame counter.

**Transmitter (`serial_tx`).** On every rising clock edge a 16-bit buffer
register takes the framed word for the current error. A 16-bit circular shift
register, clocked on the *falling* edge so its output is steady when the
receiver samples, rotates left and drives `ser_out` from its top bit. After 16
rotations it holds the original word again. A comparator sees this alignment and
reloads the register from the buffer instead of rotating it. The reload writes
the new word already rotated by one place: in the reload cycle the first start
bit (always 0) is on the line from the old word, so each frame still takes
exactly 16 clocks.

**Receiver (`serial_rx`).** `ser_in` is shifted into a 12-bit register on each
rising clock edge. When the four oldest bits `r[11:8]` read `0101`, the next
eight bits are the doubled error. The update signal (UC) then loads the compress
register, which keeps one bit of each pair. The new code appears 13 clocks after
the first start bit was sent.

**Guard against a false start (a choice made here).** A 4-bit check for `0101`
alone is not unique at the edges of the frame. If the last data bit `e0` is 0,
it is followed by `1 0 1` of the stop sequence, which reads `0101` as well. Both
ends therefore check a little more:

- The transmitter reloads only when the top four bits are `0101` *and* the
  bottom four are `1010`. This 8-bit pattern across the word boundary occurs
  exactly once per circulation, for every error code.
- The receiver updates only when `r[11:8] = 0101` *and* all four pairs in
  `r[7:0]` hold equal bits. At the false position the pairs always contain a
  `1 0`.

**Latency.** The buffer samples the error every clock, but a new value waits
for the next frame. The receiver has it 13 clocks into that frame. From an A/D
change to a new `e` at the receiver therefore takes between about 1 and 2
switching periods. In the end-to-end test, a step of the A/D input to zero
shows up as `e = 1111` 0.75 periods after the sample changes. That figure does
not count the up-to-one-period wait for the next A/D sample.

## The regulator

`lut_regulator` implements an incremental PID law without multipliers:

```
u[n] = sat( u[n-1] + A(e[n]) + B(e[n-1]) + C(e[n-2]) ),      duty = u[13:4]
```

`A`, `B` and `C` are three 16-word tables of 14-bit signed words, indexed by
the error codes. In PID terms, A = Kp+Ki+Kd, B = -(Kp+2Kd) and C = Kd, each
multiplied by (code - 7). The original design fixes only the table sizes and the
10-bit output. The incremental form, the 14-bit accumulator with 4 fraction bits
and its saturation at 0 and full scale are choices made here.

- **Update.** Once per switching period, at the system clock edge where the
  DPWM's period position `phase` equals `REG_PHASE` (default 8, mid-period).
  The new duty is then ready well before the DPWM takes it at the start of the
  next period.
- **Programming.** Write one word per system clock through
  `prog_we / prog_sel / prog_addr / prog_data`. `prog_sel` takes `LUT_A`,
  `LUT_B` or `LUT_C` from `ctrl_pkg`.
- **Reset.** Each table is filled with `K*(code-7)`, using KA=112, KB=-128 and
  KC=32 in 1/16 duty-LSB units. These defaults only suit the averaged test plant
  in `tb_chipset_top`. A real supply must program its own tables.

## The 10-bit DPWM

A 10-bit PWM at several hundred kHz would need a GHz counter clock. The DPWM
(`dpwm`) splits the job between two parts:

- **Ring oscillator.** `dpwm_delay_line` is a ring of 32 delay blocks. A single
  wave runs round it. Each stage is a flip-flop that sets when the wave arrives
  and clears itself one block delay Tb later, so stage k gives a tap pulse that
  starts k·Tb into the turn. One turn takes 32·Tb. The last stage also clocks a
  5-bit counter (`inc`).
- **Counter and output latch.** `dpwm_ctrl` counts turns. A switching period is
  32 turns, which is 1024 slots of Tb. The output SR latch is **set** in slot 0
  (counter 0, tap 0). It is **reset** when the counter equals `duty[9:5]` while
  tap `duty[4:0]` is active, picked through a 32:1 multiplexer. The output is
  therefore high for exactly `duty` slots.

The resolution is one block delay, while the fastest clock in the design runs at
only 32 x the switching frequency. The output latch is intentionally
asynchronous, because it is where the sub-clock resolution comes from.
Synthesis reports it as a latch, and it reports the ring as a logic loop.

**Other rules in the control logic:**

- A zero command (10-bit NOR) and the master reset hold the output low.
- A start-up flip-flop, set when the counter first reaches 16, suppresses the
  incomplete first period after reset.
- The input register takes the command at the counter wrap, so a change acts
  from the next full period on.
- The command is clamped to `DUTY_MAX` = 1003, which is 98 % of 1024. The
  original design limits the output to 0..98 % without saying how; the clamp is
  this design's way of doing it.

**Programmable frequency.** Each delay block (`dpwm_delay_block`) is four cells
and a 4:1 multiplexer, so a block is 1 to 4 cells long. The select lines are
crossed: `fsel[1]` drives select bit 0 and `fsel[0]` drives select bit 1. Cells
used = `{fsel[0], fsel[1]} + 1`. With the default 1.3 ns cell:

| fsel | cells | Tb     | switching frequency | system clock |
|------|-------|--------|---------------------|--------------|
| 00   | 1     | 1.3 ns | 751 kHz             | 12.0 MHz     |
| 10   | 2     | 2.6 ns | 376 kHz             | 6.0 MHz      |
| 01   | 3     | 3.9 ns | 250 kHz             | 4.0 MHz      |
| 11   | 4     | 5.2 ns | 188 kHz             | 3.0 MHz      |

The original chip was run at 400 kHz and quoted as reaching 700 kHz; its cells
were evidently somewhat slower or faster than the 1.3 ns it also quotes. To
model a given part, set `T_CELL`.

**Clocks derived from the counter.** The system clock is counter bit 0, which
is 16 x the switching frequency. `phase = cnt[4:1]` is the position in the
period, and it is stable at the system clock's rising edge.

**Event order at a turn boundary.** The set and reset terms combine counter
state with tap pulses, so the counter must never be seen with a tap from the
wrong turn. The delay-line model therefore gives each stage flip-flop a
clock-to-output delay `T_CQ` (0.05 ns). At every turn boundary, tap 31 falls
first, then the counter advances (`T_CQ/2`), then tap 0 rises (`T_CQ`). A
physical implementation must keep this ordering.

## Modules

| file | kind | contents |
|------|------|----------|
| `rtl/ctrl_pkg.sv` | package | widths, frame constants, expand/compress/frame functions, table select enum |
| `rtl/err_window.sv` | RTL | 8-bit sample to 4-bit error code |
| `rtl/serial_tx.sv` | RTL | buffer register, circular shift register, boundary comparator |
| `rtl/secondary_ctrl.sv` | RTL | secondary-side chip: err_window + serial_tx |
| `rtl/serial_rx.sv` | RTL | 12-bit receiver, start comparator, compress register |
| `rtl/lut_regulator.sv` | RTL | three-table PID regulator with programming port |
| `rtl/dpwm_ctrl.sv` | RTL | input register, counter, tap mux, comparator, SR output latch |
| `rtl/dpwm_delay_block.sv` | behavioural | 1-4 cell programmable delay |
| `rtl/dpwm_delay_line.sv` | behavioural | 32-stage ring oscillator |
| `rtl/dpwm.sv` | RTL + model | complete DPWM |
| `rtl/primary_ctrl.sv` | RTL | primary-side chip: DPWM + serial_rx + lut_regulator |
| `rtl/chipset_top.sv` | RTL | both chips side by side |

`chipset_top` keeps the two chips separate, because off-chip parts join them:

- `clk_out` must reach `clk_in` through opto-coupler 1.
- `ser_out` must reach `ser_in` through opto-coupler 2.

The chip also needs the following from outside; they are not part of this RTL:

- a power-on reset circuit, which supplies `p_rst_n` and a `p_start` pulse
  shorter than one block delay to launch the ring;
- an 8-bit A/D converter, which supplies `vad`;
- the power stage, which takes `d_out`.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` at the end. Any one of
them builds with Verilator 5 like this:

```
verilator --binary --timing --assert -Wno-fatal -Irtl rtl/ctrl_pkg.sv \
          tb/tb_chipset_top.sv --top-module tb_chipset_top -Mdir obj_top
obj_top/Vtb_chipset_top
```

Use `--timing`, because the delay-line models and the testbenches use delays.
All files use `timescale 1ns/1ps`.

| testbench | what it checks |
|-----------|----------------|
| `tb_err_window` | every sample for 52 references against the clamp formula |
| `tb_serial_tx` | 64 frames bit by bit, including all 16 codes, and the 16-clock frame spacing |
| `tb_serial_rx` | 80 frames: e after 13 clocks, exactly one update per frame, no update without a start sequence |
| `tb_secondary_ctrl` | frames carry clamp(vref+7-vad), both window ends |
| `tb_lut_regulator` | reference model with default tables, random reprogramming, both saturation limits, hold without update |
| `tb_dpwm_delay_block` | rise and fall delay for each fsel |
| `tb_dpwm_delay_line` | tap spacing, tap width, one tap at a time, turn time, stop in reset, each fsel |
| `tb_dpwm_ctrl` | high time in slots for many commands, clamp, zero command, first period, period, reset |
| `tb_dpwm` | period, high time and system clock period for every fsel and several commands |
| `tb_primary_ctrl` | primary chip with a model transmitter: received codes, regulator against a model, every pulse width, clock, table write |
| `tb_chipset_top` | closed loop at default parameters (below) |
| `tb_workload_400k` | closed loop at 400 kHz / 6.4 MHz with a 1.221 ns cell: load transients and the link test (below) |

`tb_chipset_top` joins the chips with 20 ns opto-coupler delays and closes the
loop through an averaged power-stage model. An ideal A/D converter with a
16.5 mV step samples once per period, with the reference at code 200 (3.3 V).
The test runs:

1. start-up from 0 V at fsel = 10;
2. load steps of 25 → 50 → 25 → 50 → 75 % of 20 A;
3. an A/D step to zero, which must give e = 1111 within two periods and drive
   the duty to its 98 % limit;
4. recovery from that step;
5. a table rewrite;
6. a switch to fsel = 00.

Along the way it checks every gate pulse against its commanded duty, and checks
that the output regulates to within one LSB after each disturbance. It also
counts each mechanism (frames, receiver and regulator updates, both window
saturations, clamp, zero-duty periods, load steps, table write, frequency
switch), and fails if any of them never happens. It simulates about 3 ms in
about 20 s.

`tb_workload_400k` runs the same loop at the operating point of a 3.3 V, 20 A
supply: 400 kHz switching and a 6.4 MHz system clock. The default 1.3 ns cell
cannot reach this exact rate; the nearest is 375 kHz. So this bench sets
`T_CELL` to 1.221 ns with fsel = 10. That gives a 2500.6 ns period, the
closest the 1 ps time step allows. The bench:

- applies the load steps 25 → 50 %, 50 → 25 % and 50 → 75 %;
- prints the peak deviation and the recovery time of each step (2 LSB and
  5 periods with the model stage);
- holds the A/D code at one LSB below the reference, where e = 1000;
- steps the A/D code to zero and checks that e = 1111 arrives within two
  periods;
- checks that the frames on the line then read 0101 1111 1111 1010;
- checks the system clock period, the switching period and every pulse width
  throughout.

## How far to trust it

- **Followed closely from the original chip set:**
  - the 4-bit window code;
  - bit doubling, the 0101/1010 framing, the 16-bit buffer and circular shift
    register, and the falling-edge shift;
  - the 12-bit receiver with its comparator on the top four bits;
  - three 14-bit, 16-word regulator tables and the 10-bit duty;
  - the 32-stage ring with 4-cell programmable delay blocks and a 5-bit counter;
  - the 32x internal and 16x system clocks;
  - zero output at start-up, reset and zero command, and the 98 % limit.
- **Design choices made here:**
  - the exact code offset in the window (0111 at vref);
  - the extra boundary checks on the serial link;
  - the reload-with-rotation;
  - the incremental PID form, number format, default tables and programming
    port;
  - the regulator update point;
  - the exact set/reset gating of the DPWM latch, and how the 98 % limit is
    enforced;
  - the stage self-clear and `T_CQ` ordering in the ring model;
  - the reset values.
- **Not modelled:** the power-on reset circuit, the opto-couplers, the A/D
  converter and the power stage. The closed-loop results therefore show that
  the logic works as a controller. They do not reproduce measured transients of
  a real supply.
- **Delay line:** `dpwm_delay_line` and `dpwm_delay_block` are timing models.
  Synthesis turns their delays into wires. A silicon version needs a custom
  delay line with the ordering described above.
