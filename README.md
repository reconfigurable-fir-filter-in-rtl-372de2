# Reconfigurable FIR filter built from basic cells

A finite impulse response filter computes

    y(n) = k0·x(n) + k1·x(n-1) + ... + k(m)·x(n-m)

A fully parallel hardware filter does all these multiplications and additions
at once, but its coefficients and length are fixed. A software filter can change
anything, but it needs at least one loop step per tap for every output. This design
sits between the two. It is a line of identical **basic cells**. Each cell holds
one delay register, one multiplier and one adder. Seven selection bits per cell
set how these parts are wired to the previous cell. Two constants per cell set
the coefficient and an additive offset. Rewriting these bits and constants
changes the filter's coefficients, its length and its topology while it runs.
The samples held in the delay registers are kept, and no reset is needed.

The configuration and the samples come from a PC over a serial (RS-232) link,
and every filtered sample goes back the same way.

## The basic cell (`rtl/fir_cell.sv`)

Every cell has three inputs from the previous cell and three outputs to the
next one:

| signal | meaning in the canonical filter |
|--------|---------------------------------|
| S      | the sample line (x delayed by one more step per cell) |
| M      | the product made in the cell |
| A      | the running sum |

Inside, four multiplexers are driven by the selection bits S0..S6:

```
            S1 S0                S2
 S(p) ──┐   ┌─┴─┐          ┌────┴────┐
 M(p) ──┼──►│Mux│──┬──────►│         │
 A(p) ──┤   │ 1 │  └─►[z⁻¹]►  Mux 2  ├──┬───────────────► S(n)
 spare ─┼──►└───┘          └─────────┘  │
        │   S4 S3                       ▼
        ├─►┌───┐                       (×)──┬────────────► M(n)
 mul_k ─┼─►│Mux│──────────────────────────►│ │
        │  │ 3 │                            ▼
        │  S6 S5                           (+)───────────► A(n)
        └─►┌───┐                            ▲
 add_k ───►│Mux│────────────────────────────┘
           │ 4 │
```

* **Mux 1** (`{S1,S0}`) chooses what feeds the S path: S(p), M(p), A(p) or the
  spare input. So the S line of a cell can carry the previous cell's sample,
  its product or its sum.
* **Mux 2** (`S2`) passes that value straight on (0) or takes it from the delay
  register (1), which holds the value of the previous sample step.
* **Mux 3** (`{S4,S3}`) chooses the second multiplier operand: S(p), M(p), A(p)
  or the multiplication constant `mul_k`. Then M(n) = S(n) × operand.
* **Mux 4** (`{S6,S5}`) chooses the second adder operand: S(p), M(p), A(p) or
  the addition constant `add_k`. Then A(n) = M(n) + operand.

For all three 4-input multiplexers, code 0 selects S(p), 1 selects M(p), 2 selects
A(p) and 3 selects the constant (the spare input for Mux 1). The selection byte
holds S6..S0 in bits 6..0. In `fir_pkg` this is the packed struct `cell_sel_t`
(`mux4, mux3, mux2, mux1` from the most significant end).

All values are 16-bit two's-complement integers. Products and sums wrap
modulo 2^16. The arithmetic is integer, so a multiplication constant of 1
removes the multiplication and an addition constant of 0 removes the addition.
This is how a cell is reduced to only some of its parts.

### Useful settings

| role of the cell | sel (hex) | Mux 4, 3, 2, 1 | constants |
|---|---|---|---|
| first tap of a direct-form filter | `58` | A(p), k, direct, S(p) | `mul_k = k0`, `add_k = 0` |
| later tap | `5C` | A(p), k, delayed, S(p) | `mul_k = ki`, `add_k = 0` |
| unused cell (passes A on, keeps the delay line going) | `5C` | A(p), k, delayed, S(p) | `mul_k = 0` |
| pure delay of the sum | `7E` | const, k, delayed, A(p) | `mul_k = 1`, `add_k = 0` |
| gain plus offset on the S line | `7C` | const, k, delayed, S(p) | `mul_k = g`, `add_k = c` |

Every cell loads the idle setting (`5C`, `mul_k = 0`) at reset, so the filter
outputs 0 until it is configured.

## The line of cells (`rtl/fir_array.sv`)

`N_CELLS` cells (16 by default) are chained: S, M and A of cell *i* are
S(p), M(p), A(p) of cell *i+1*. The first cell gets the input sample on S(p)
and zero on M(p) and A(p). The filter output `y` is A(n) of the last cell.
S(n) and M(n) of the last cell are also brought out, for topologies whose result
ends up on those lines.

The input sample and all delay registers advance together on a one-clock
`step` pulse, once per sample. With `step` tied high the filter takes one sample per
clock. M and A are combinational from the registers to the output, as in a
textbook direct-form filter. The path from the sample register to `y` runs through
every multiplier-adder pair, and that path limits the clock rate for large
`N_CELLS`. `y` is valid one clock after the step that loads x(n).

With the canonical settings (first cell `58`, the others `5C`) the line
computes `y = Σ k_i·x(n-i)` over its N cells. A filter of T < N taps uses
the first T cells and leaves the rest idle. The idle cells still shift the
sample line, so they can become taps later without refilling it.

**Reconfiguring on the fly.** A configuration write changes one cell's word
and nothing else. The delay registers keep their contents, with two results:

* When only coefficients change, or a filter is shortened or lengthened
  (the cells keep their delay settings), the next output is already the
  new filter applied to the real sample history.
* When the delay settings change, the registers hold values shifted for
  the old topology. The output is exact again after N samples.

## Talking to the filter over the serial link

The serial link runs 8 data bits, no parity and 1 stop bit, LSB first. It uses
`CLKS_PER_BIT` clocks per bit (434 by default: 115200 bit/s from 50 MHz). All
16-bit values are sent high byte first.

| command | bytes | effect |
|---|---|---|
| configure a cell | `C0 cell sel k_hi k_lo c_hi c_lo` | writes selection bits, `mul_k` and `add_k` of cell `cell` in one clock. A cell index ≥ N_CELLS is ignored |
| filter a sample | `D0 x_hi x_lo` | steps the filter with x. The device answers `y_hi y_lo` |

Any other byte where a command is expected is ignored. A byte with a low stop bit
is dropped and pulses `frame_err`. The reply starts as soon as the middle of the
command's last stop bit has been sampled, so a PC that sends
commands back to back never overruns the replies: a sample command takes 30 bit
times and its reply 20. If replies are overrun anyway, `overrun` pulses and the
newer result replaces the older one.

A 16-tap filter is configured with 16 × 7 = 112 bytes. After that, each sample
costs 3 bytes in and 2 out. At 115200 bit/s this is about 3800 samples per second.
The link, not the filter, sets this rate.

## Module map

| file | contents |
|---|---|
| `rtl/fir_pkg.sv` | widths, select-code enums, `cell_sel_t`, `cell_cfg_t`, idle configuration, command bytes |
| `rtl/fir_cell.sv` | the basic cell |
| `rtl/fir_array.sv` | the line of cells and the input-sample register |
| `rtl/cfg_bank.sv` | one configuration word per cell, written one cell at a time |
| `rtl/uart_rx.sv`, `rtl/uart_tx.sv` | serial receiver and transmitter |
| `rtl/cmd_parser.sv` | byte protocol: configuration writes, sample steps, replies |
| `rtl/fir_top.sv` | everything wired together. Ports: `clk`, `rst` (synchronous, active high), `uart_rxd`, `uart_txd`, `y`, `y_s`, `y_m`, `frame_err`, `overrun` |

Top-level parameters: `N_CELLS` (16) and `CLKS_PER_BIT` (434). The data width is
`fir_pkg::DATA_W` (16). The serial protocol carries exactly two bytes per value, so
changing the width also needs a protocol change.

## What comes from the original description and what does not

The original description gives these parts:

* the cell: its four multiplexers and what each can select, the single
  delay, the multiplier and the adder, and the count of seven selection bits;
* the linear chaining of cells;
* the use of constants 1 and 0 to bypass the multiplier and the adder;
* loading configuration bits, coefficients and data over an RS-232 link;
* reconfiguration by overwriting, without a reset.

The following are this implementation's own choices:

* the select codes and the order of the selection bits;
* the 16-bit wrapping arithmetic;
* that the adder adds to the product M(n);
* the `step` enable;
* tying the spare input of Mux 1 to 0, and feeding zeros into M(p) and A(p)
  of the first cell;
* A(n) of the last cell as the output;
* 16 cells;
* the bit rate, the command protocol and the serial reply path.

Not built:

* the router that would join cells in directions other than a straight line.
  It is only suggested, with no function or interface given.
* the genetic-algorithm loop (population, FFT, comparator, mutation) that could
  evolve coefficient sets. It is an application idea with no sizes or
  algorithms fixed.
* the PC software and the RS-232 level shifter, which lie outside the FPGA.

The 256-tap filter used as an example of the fully parallel and fully
sequential alternatives needs `N_CELLS = 256`. The cell index byte of the protocol
covers that.

## Verification

Every module has a self-checking testbench in `tb/`. Each one ends with a line
`TB_RESULT checks=N failures=M` and has a watchdog.

* `fir_cell_tb`: 3000 random configurations and operands checked against
  a model of the cell. Every select code is used. The delay is checked to hold
  while `step` is low.
* `fir_array_tb`: impulse response of a 16-tap canonical filter. Random
  samples checked against the convolution sum. Shortened filters and new
  coefficients without a reset. 1500 steps of random topologies checked
  against the chain model in `tb/fir_ref_pkg.sv`.
* `cfg_bank_tb`, `uart_rx_tb` (±3 % bit-time error, bad stop bits,
  glitches), `uart_tx_tb` (line decoded, busy time = 10 bit times), and
  `cmd_parser_tb` (random commands, junk bytes, a stalled transmitter, and an
  assertion that reply bytes are held until they are taken).
* `fir_256tap_tb`: a line of 256 cells set up as a 256-tap filter, with a
  new sample every clock. Its impulse response must read out all 256
  coefficients. Every output is checked against the 256-term sum one clock
  after its sample entered, so 856 outputs take 856 clocks. The test ends with
  a cut to 100 taps while samples keep flowing.
* `fir_top_tb`: the whole design at its default parameters, driven over
  the serial line as a PC would drive it. It runs power-up output, a 16-tap filter
  and its impulse response, coefficient and length changes on the fly,
  bypass settings, random topologies rewritten cell by cell, and a
  corrupted byte. It counts each of these mechanisms and fails if one never
  happens. About 5 million clocks, a few seconds in Verilator.

To run one with plain Verilator (here the end-to-end test):

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
        rtl/fir_pkg.sv tb/fir_ref_pkg.sv tb/fir_top_tb.sv --top-module fir_top_tb
    ./obj_dir/Vfir_top_tb

The other testbenches build the same way with their own file and top
module name. Keeping `tb/fir_ref_pkg.sv` on the command line does no harm;
`fir_array_tb` and `fir_top_tb` need it.

## Limits worth knowing

* The adder chain is combinational across all cells. A large `N_CELLS` at a
  high clock rate would need pipeline registers, which would change the
  cell's timing from the one described here.
* Arithmetic wraps silently. Choose coefficients so that the sum fits in 16
  bits, or scale the input.
* A configuration is applied one cell at a time. While a multi-cell
  reconfiguration is under way, the filter is a mix of old and new cells. Send
  no samples during it if that matters.
