# Supervised FSMs and a shift-and-add audio FIR filter

This RTL implements three small designs, each built around one idea from
digital control:

1. **Major/minor FSM hierarchy.** A supervising ("major") state machine runs
   work done by subordinate ("minor") state machines of unknown duration. The
   two kinds talk only through a `start`/`busy` handshake. The example runs
   computations A and B in parallel on every timer tick, then runs C.
2. **An 8-bit audio FIR filter.** It is meant for a small FPGA between an
   8-bit A/D converter and an 8-bit D/A converter. Once per sample period it
   forms `y[n] = sum h[k]·x[n-k]` over 16 taps. There is no hardware
   multiplier: a serial shift-and-add unit does each product. Four switches
   pick one of 16 impulse responses.
3. **Library-style ROM and RAM** with optional registered address, input and
   output. These show what registering a memory's ports does to its timing.
   The FIR filter's sample store is one of these RAMs.

All three are synthesizable SystemVerilog. They stand side by side in
`l11_top`, sharing only the clock.

---

## 1. Major and minor FSMs

### The handshake

A minor FSM (`minor_fsm`) is a chain of states A1 … An.

- A1 is entered on `init` and is the only state where `busy` is low.
- In A1 the machine waits for `start`.
- From A2 it walks unconditionally back to A1.

So `busy` rises the clock after `start` is seen. It stays high for
`NSTATES-1` clocks. The path A1 → … → A1 must take at least two clocks, so
`NSTATES ≥ 2`; the module checks this at elaboration.

A major FSM uses `busy` in two ways:

- **low means "available"**: the major FSM may start the minor one;
- **a fall after a rise means "done"**.

The major FSM holds `start` high until it sees `busy` high. That is why the
scheme works for minors of any length. It also works when `busy` arrives a
clock late through a synchronizer.

All machines use one rising-edge clock and one synchronous `init` that is one
clock long.

### The example (`major_fsm`, `fsm_example`)

| state | output           | leaves to | when                              |
|-------|------------------|-----------|-----------------------------------|
| WT    |                  | CK        | `tick`                            |
| CK    |                  | ERR / SAB | any of `abusy bbusy cbusy` / none |
| SAB   | `astart, bstart` | WAB       | `abusy & bbusy`                   |
| WAB   |                  | SC        | `!abusy & !bbusy`                 |
| SC    | `cstart`         | WC        | `cbusy`                           |
| WC    |                  | WT        | `!cbusy` (pulses `done`)          |
| ERR   | `err`            | —         | only `init` leaves                |

`tick_gen` supplies `tick`. It is a modulo-`PERIOD` counter whose last count
is decoded as the tick (default period 32).

Each minor FSM has its own length. Count a tick seen in WT as clock 0. Then
`done` comes at clock `3 + max(NA, NB) + NC`:

- two clocks to reach SAB;
- `NA-1` and `NB-1` busy clocks;
- one clock for WAB to see both idle;
- one clock in SC;
- `NC-1` busy clocks;
- one clock for WC to see C idle.

With the default of four states each (three busy clocks), that is 11 clocks.

The CK → ERR check guards against a tick that arrives while work is still
running. In this composition the major FSM only returns to WT after C is
done, and A and B always finish before C starts. So the error state cannot
be reached from `fsm_example`'s ports. It is exercised in `major_fsm`'s own
test, where a minor is forced busy.

### Crossing clocks (`sync_ff`, `C_ASYNC`)

A minor FSM may run on another clock, even at another frequency. In that
case:

- pass `start` through a flip-flop clocked by the minor FSM;
- pass `busy` through one clocked by the major FSM;
- do both before either signal steers a transition.

`sync_ff` is that flip-flop. It defaults to one stage; `STAGES = 2` gives the
usual two-flop synchronizer.

With `C_ASYNC = 1`, `fsm_example` runs minor FSM C on its own clock `clk_c`,
with synchronizers on `cstart`, on C's `busy` and on `init`. The
handshake is unchanged, but its round trip grows:

- the busy flop, plus the major FSM's transition: two `clk` periods;
- the start flop, plus the minor FSM's transition: two `clk_c` periods.

C must therefore stay busy for longer than that, that is
`(NC-1)·Tc > 2·T + 2·Tc`. Otherwise C sees the old `start` again and runs
twice. For the same reason `init` must last longer than one `clk_c` period.
The test runs C at periods 7 and 13 against a major-FSM period of 10, with
`NC = 8`.

The default `C_ASYNC = 0` keeps all minors on one clock, and `l11_top` uses
that. `sync_ff` also guards the FIR filter's reset button, selection switches
and A/D status line.

---

## 2. The FIR filter (`fir_filter`)

```
           +------------------------------------------------------------+
 ad_data ->| sample store (16x8 RAM) --s--> fir_arith ---acc[14:7]--->  |-> da_data
 ad_status>| sync  ^ addr wp-k            ^ h        (offset binary)    |   da_wr
 sel_sw -->| sync -+--------------> impulse ROM (16 resp. x 16 coef.)   |
 reset --->| sync ->  fir_ctrl (main loop) <- sample_timer (every DIV)  |-> ad_start, ad_rd
           +------------------------------------------------------------+
```

### Number formats

| quantity                 | format                                         |
|--------------------------|------------------------------------------------|
| sample `x` (from A/D)    | 8-bit two's complement                         |
| coefficient `h`          | 8-bit sign/magnitude: bit 7 sign, bits 6:0 = \|h\|·128 |
| accumulator              | 16-bit two's complement                        |
| output (to D/A)          | 8-bit offset binary: accumulator bits 14:7, top bit inverted |

A coefficient magnitude is a fraction of 128. The product
`x·|h|` therefore carries 7 fraction bits, and bits 14:7 of the sum are the
integer output. A unit coefficient is stored as 127, so the unit-sample
response reproduces the input times 127/128: one step low for most positive
inputs. If the coefficient magnitudes sum to no more than 128, the sum
cannot overflow.

### The arithmetic unit (`fir_arith`)

This is the heart of the filter. It multiplies a two's complement sample by a
sign/magnitude coefficient without a multiplier and without ever negating
the product. It is itself a minor FSM with `start`/`busy`.

1. **LOADH.** HREG takes `h`. Its sign `H[7]` stays put while the operation
   runs. Its 7-bit magnitude will shift right.
2. **LOADS.** The 15-bit shift register SR takes `x XOR {8{H[7]}}`,
   sign-extended. The XOR is a programmable inverter: for a positive
   coefficient SR holds `x`, for a negative one its ones complement `-x-1`.
3. **STEP, repeated.** If `HREG[0]` is 1, add SR to the accumulator with
   carry-in `H[7]`. Then shift SR left and HREG right. The bit shifted into
   SR is `H[7]`.

Why this is exact: after `j` shifts with 1s shifted in, SR holds
`(-x-1)·2^j + (2^j - 1) = -x·2^j - 1`. The carry-in adds the missing 1, so
every partial product enters as exactly `-x·2^j`. The two's complement
negation is thus spread over the XOR, the shifted-in bits and the adder's
carry. If zeros were shifted in instead, each partial product for bit `j` would
be `2^j - 1` too small. That is up to 63 accumulator LSBs for bit 6, or about
half an output step.

The steps stop when the remaining magnitude is zero (the HZERO flag). A
multiply therefore takes `2 + bitlen(|h|)` clocks of `busy`. That is 9 at
most, and 2 for a zero coefficient.

`clac` clears the accumulator while the unit is idle. `dout` is the offset
binary conversion of bits 14:7, which needs a single inverter on the top bit.

### The main loop (`fir_ctrl`)

After `init`:

- ICLR: write zero to all 16 store addresses;
- IADC: start a first conversion.

Then, once per `sample` pulse:

| state  | action |
|--------|--------|
| WAIT   | wait for the sample timer |
| OUT    | `da_wr`: write the result computed in the previous pass to the D/A |
| STORE  | wait while the synchronized A/D status is high; then `ad_rd` and write the A/D word at store address `wp` |
| ADC    | `ad_start`: start the next conversion; it runs during the convolution |
| CLR    | `clac` |
| MSTART | present sample address `wp-k` and coefficient `k`; hold `ar_start` until the unit is busy |
| MWAIT  | wait for the unit to finish; `k+1`, or after tap 15 advance `wp` and go to WAIT |

The output goes out first, right after the sample pulse. So the D/A updates
at a fixed instant whatever the convolution length. The cost is one sample
period of latency.

Counting in sample periods:

- the A/D conversion started in pass `p` is stored in pass `p+1`;
- it is convolved in pass `p+1`;
- its result reaches the D/A in pass `p+2`.

The store is a circular buffer. `wp` points at the newest sample, and tap
`k` reads address `wp-k` modulo 16.

**Timing budget.** A pass from OUT to the end of the last multiply takes
`4 + Σ_k (4 + bitlen(|h[k]|))` clocks: 180 at most, and 132 for the boxcar.
The sample period `DIV` (default 256 clocks) must be longer than that. A
sample pulse that arrives during a pass is not seen. For example, a 2 MHz
clock with `DIV = 256` gives a 7.8 kHz sample rate.

**The sample store** is `lpm_ram_dq` with a registered address, so its
output follows the address one clock late. The arithmetic unit reads the
sample in LOADS, one clock after the coefficient, and the controller holds
both addresses for the whole multiply. So the registered read needs no
extra wait state.

### Impulse responses (`impulse_rom`)

The 256 × 8 ROM is addressed by `{sel, tap}`. Its contents are computed by a
function:

| sel  | response                    | coefficients                          |
|------|-----------------------------|---------------------------------------|
| 0    | unit sample                 | `h[0] = +127`, others 0               |
| 1    | negative unit sample        | `h[0] = -127` (0xFF), others 0        |
| 2    | 16-point boxcar (moving average) | all 16 = 8 (sum 128)             |
| 3    | exponential decay           | 64, 32, 16, 8, 4, 2, 1, then 0        |
| 4–15 | empty                       | all 0                                 |

Responses 0–2 are debugging filters:

- the unit sample gives back the input;
- the negative unit sample gives back the negated input;
- the boxcar turns a square wave into ramps.

Response 3 is one possible low-pass filter with an exponential step
response. Add real designs in place of the empty entries.

### The converters

The A/D and D/A converters are separate chips and are not part of the RTL.
The filter sees:

- **A/D:** `ad_start` (one-clock start strobe), `ad_status` (high while
  converting, asynchronous), `ad_rd` (one-clock read strobe during which
  `ad_data` is taken);
- **D/A:** `da_data` with the one-clock latch strobe `da_wr`.

The two converters can share one 8-bit bus on a board. Here the data has
separate input and output ports, and the tri-state bus is left to the pin
level. The reset button and the selection switches are asynchronous too, so
they pass through `sync_ff`. The filter's internal `init` is therefore the
reset input delayed by one clock; hold `reset` for at least two clocks.

---

## 3. Library-style ROM and RAM (`lpm_rom`, `lpm_ram_dq`)

Both memories take the word width (`WIDTH`) and address width (`WIDTHAD`) as
parameters. They also have flags that register parts of the memory:

- `ADDRESS_REG`: the address (and, for the RAM, `we`) is captured on the
  rising edge of `inclock`. `q` then shows the word at the address presented
  *before* the last edge. Registering the address sets this trap for anyone
  who reads `q` in the same clock.
- `INDATA_REG` (RAM only): data is captured on `inclock`. With either input
  flag set, the write happens at the clock edge.
- `OUTDATA_REG`: `q` is registered again on `outclock`, which adds one more
  clock.
- With no input register, the RAM write is level-sensitive: the addressed
  word follows `data` while `we` is high. This synthesizes to latches, which
  is intended for this setting. Keep the address stable while `we` is high.

The defaults are the two small examples:

- `lpm_rom`: 8 × 8, unregistered, holding 07, 06, …, 00 at addresses 0…7,
  loaded from `rtl/rom2.hex` (`$readmemh` format, path relative to the
  project root);
- `lpm_ram_dq`: 4 × 2, unregistered.

Memories start cleared.

---

## Where this RTL makes its own choices

These points are not fixed by the design it follows, and are worth checking
before reuse:

- Clock frequency and sample period (`DIV = 256`), and tick period
  (`PERIOD = 32`).
- Exact arithmetic: 1s shifted into SR for negative coefficients. Taking bits
  14:7 as the output, with truncation and no saturation.
- The multiply ends early on HZERO instead of always taking seven steps.
- The init sequence: clear the store, start one conversion. Waiting in STORE
  for a slow converter.
- Coefficient values: 127 for "unity", 8 for the boxcar, the exponential
  response, and the empty responses 4–15.
- The converter handshake is reduced to start/status/read and data/latch
  strobes. The D/A status line is not used.
- One-flop synchronizers on reset, switches and A/D status.
- The asynchronous-write reading of an unregistered RAM.
- In `fsm_example` the minor FSM that can move to its own clock is C.
  Its `init` is synchronized as well.

---

## Files

| file | contents |
|------|----------|
| `rtl/l11_top.sv` | the three designs side by side |
| `rtl/fsm_example.sv`, `major_fsm.sv`, `minor_fsm.sv`, `tick_gen.sv` | major/minor FSM example |
| `rtl/sync_ff.sv` | synchronizer |
| `rtl/fir_filter.sv`, `fir_ctrl.sv`, `fir_arith.sv`, `impulse_rom.sv`, `sample_timer.sv`, `fir_pkg.sv` | FIR filter |
| `rtl/lpm_rom.sv`, `lpm_ram_dq.sv`, `rom2.hex` | memories, example ROM contents |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_fir_square_wave.sv` | square-wave step responses of the boxcar and exponential filters |
| `tb/ad670_model.sv` | behavioural A/D converter (start, status, read, data) |
| `tb/fir_scoreboard.sv` | integer reference model of the filter's output and pass length |

## Simulating

Run from the project root, so that `$readmemh` finds `rtl/rom2.hex`. For
example, the whole design:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/fir_pkg.sv tb/tb_l11_top.sv --top-module tb_l11_top -Mdir obj_top
./obj_top/Vtb_l11_top
```

Any other testbench runs the same way with its own name. Each one prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog if the
design hangs.

### What the tests establish

- **`tb_l11_top`** runs everything at default parameters, about 36 000
  clocks. It checks:
  - about 960 ticks of the FSM example, with the 11-clock tick-to-done
    latency;
  - 120 filter samples over four impulse responses, each D/A word compared
    with a convolution computed in integers;
  - every pass length against the formula above;
  - one A/D stall, forced by a slow first conversion;
  - the ROM contents and random RAM writes.
- **`tb_fir_square_wave`** feeds a ±100 square wave through the boxcar and
  then the exponential response. It checks only the shape of the output:
  - boxcar edges become straight 16-step ramps between plateaus of exactly
    ±100;
  - exponential edges become 7 steps that halve in size (100, 50, 25, …).
- **`tb_fir_arith`** accumulates groups of random products, including
  corner values such as -128 and negative zero. It checks the exact sum and
  each multiply's clock count.
- **The other testbenches** cover the control sequence of `fir_ctrl`
  (including a converter that is still busy), the FSM handshakes with minors
  of random length, the error state, minor FSM C on a faster and on a slower
  clock, and the registered and unregistered memory modes.

Each testbench was also run against a copy of its module with one
deliberate bug, and each reported failures.

Not covered:

- real converter timing: the A/D model is a simple behavioural one;
- the exact coefficient sets of a production filter bank;
- behaviour when a sample pulse arrives during a pass, which the design
  does not handle.
