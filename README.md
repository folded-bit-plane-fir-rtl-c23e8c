# Folded bit-plane FIR filter with changeable coefficient length

This is a small-area FIR filter

    y_i = c_0*x_i + c_1*x_(i-1) + ... + c_(K-1)*x_(i-K+1)

built as a fixed array of K rows of one-bit "basic cells" (an AND gate and a
full adder each). It starts from the bit-plane filter, where every bit of
every coefficient has its own row of cells. Those rows are folded so that
one row per tap does all the coefficient's bit rows one after the other, one
coefficient bit per clock. The array is therefore as large as one bit plane
of the unfolded filter. A sample takes m clocks, m being the coefficient
length. The point of the design is that m is a run-time setting: the same
array handles any coefficient length from 1 to M1 bits. Short coefficients
finish sooner, so the throughput rises by M1/m.

Samples and coefficients are unsigned. The defaults are K = 3 taps, N = 5-bit
samples and M1 = 8-bit maximum coefficient length. The output is
W = M1 + N + ceil(log2 K) = 15 bits wide, which is exact for every input.

## How a tap works

Each tap is one row of W basic cells (`fbp_cell_row`). The row keeps a
running sum in carry-save form: a sum vector `s` and a carry vector `c`, with
value `s + 2*c`. In phase j of a sample period (j = 0..m-1):

* the shared input shift register (`fbp_input_shreg`) presents `2^j * x`;
* the row's coefficient register (`fbp_coef_rotator`) presents bit `c^j`;
* every cell ANDs its bit of `2^j * x` with `c^j` and adds the result with
  its full adder. The other two adder inputs are a sum bit and a carry bit.

Two multiplexers in each cell pick those two bits: L for the sum and R for
the carry (`fbp_basic_cell`).

* Phases 1..m-1: they take the row's own registered sum and carry. The row
  keeps adding into itself.
* Phase 0: they take the registered sum and carry of the previous row (zeros
  for row 0). The row starts the new sample from the previous row's finished
  result.

That phase-0 hand-over chains the taps. Row r multiplies by coefficient
`c_(K-1-r)`, so row 0 uses the highest-index coefficient and the last row uses
`c_0`. After m clocks:

    row 0 holds         x_i * c_2
    row 1 holds         x_i * c_1 + x_(i-1) * c_2
    row 2 (last) holds  x_i * c_0 + x_(i-1) * c_1 + x_(i-2) * c_2  =  y_i

The vector merging adder (`fbp_vma`) adds the last row's `s + 2*c` into a
binary word. It is combinational.

All rows work at the same time on the same sample. No row waits for another,
because each row hands over only the result it finished in the previous
sample period.

Example with K = 3 and m = 4. Sample x_1 is taken at the end of clock 0:

| clock | phase | shift register | coefficient bit | row 0 after the clock | last row after the clock |
|---|---|---|---|---|---|
| 1 | 0 | x_1 | c^0 | c_2^0 x_1 | c_0^0 x_1 + (row 1's result for x_0) |
| 2 | 1 | 2 x_1 | c^1 | (c_2^0 + 2 c_2^1) x_1 | ... |
| 3 | 2 | 4 x_1 | c^2 | ... | ... |
| 4 | 3 | 8 x_1 | c^3 | c_2 x_1 | y_1 |
| 5 | 0 | x_2 | c^0 | c_2^0 x_2 | y_1 is on `y` during this clock |

## Changing the coefficient length (folding factor)

The controller (`fbp_ctrl`) holds the active length m and counts the phase
0..m-1. From the phase it makes:

* `ck1`: high in the last phase. The input register takes the next sample at
  the end of that clock, so `ck1` repeats every m clocks.
* the phase-0 select for the L/R multiplexers;
* the output-valid strobe.

Each coefficient register rotates only its low m bits. It therefore repeats
`c^0 .. c^(m-1)` for as long as the length stays the same.

A new length needs no other hardware change. Load it and the counter wraps
after m clocks, the rotators cycle over m bits, and the array stays the same.
Coefficient bits at or above the active length are ignored.

## Interface and timing (`fbp_fir_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `cfg_load` | in | 1 | one clock: load `cfg_coef` and `cfg_m`, clear the rows, take `x_in` as the first sample |
| `cfg_m` | in | MW=4 | coefficient length 1..M1 (an assertion checks the range; 0 or above M1 acts as M1) |
| `cfg_coef[i]` | in | M1 | coefficient c_i |
| `x_in` | in | N | sample; taken at the end of every clock in which `ck1` is high |
| `ck1` | out | 1 | sample strobe, once every m clocks (also high with `cfg_load`) |
| `y`, `y_valid` | out | W | output word; valid for one clock every m clocks |
| `m_active` | out | MW | length in use |

Timing: a sample taken at the end of clock t is processed in clocks t+1 to
t+m. Its output word is on `y` with `y_valid` in clock t+m+1, while the next
sample is being processed. The latency is m clocks and one word comes out
every m clocks. There is no back-pressure: the source must supply a sample
whenever `ck1` is high. After reset the filter runs with m = M1 and all-zero
coefficients until the first `cfg_load`. A load clears every row, so outputs
after a load use only samples taken since that load.

## Files

| file | contents |
|---|---|
| `rtl/fbp_pkg.sv` | default sizes and the row-width formula |
| `rtl/fbp_basic_cell.sv` | AND gate, full adder, L/R multiplexers, sum and carry flip-flops |
| `rtl/fbp_cell_row.sv` | one tap: W basic cells with the carry chain |
| `rtl/fbp_input_shreg.sv` | shared input shift register, N+M1-1 bits |
| `rtl/fbp_coef_rotator.sv` | per-tap coefficient register with m-bit rotation |
| `rtl/fbp_ctrl.sv` | phase counter, `ck1`, multiplexer select, output valid |
| `rtl/fbp_vma.sv` | vector merging adder |
| `rtl/fbp_fir_top.sv` | the filter |
| `tb/tb_<module>.sv` | a self-checking testbench for each module |

At the defaults, synthesis gives about 45 basic cells (3 rows of 15), about 130
flip-flops and one 15-bit adder.

## What comes from the architecture and what is chosen here

Taken from the architecture:

* the tap order (row r uses c_(K-1-r), with the previous row's result added in phase 0);
* the cell contents, and the L/R multiplexers choosing between the row's own
  path and the previous row (zeros into the first row);
* a single shift register that shifts the sample left once per clock and
  feeds all taps;
* m-bit rotating coefficient registers and a control signal with period m;
* the row width m1 + n + ceil(log2 k), and the vector merging adder on the last row;
* latency m and one word per m clocks;
* K = 3 and N = 5.

Chosen here:

* M1 = 8, since no maximum length is specified;
* unsigned arithmetic;
* a carry-save accumulator whose top carry is dropped, which is safe because
  W holds the largest result;
* `ck1` as a one-clock enable rather than a second clock;
* the `cfg_load` configuration port, which clears the rows;
* the reset behaviour and the clamping of out-of-range lengths;
* no input handshake;
* a combinational merging adder.

Departure: the unfolded bit-plane filter can drop one low-order bit of the
running sum after each bit plane. This design does not. It shifts the sample
left instead of shifting the sum right, so every row keeps the full W bits
and the output is exact.

The critical path runs through one cell: AND gate, multiplexer and full
adder. Carries only move one place per clock. The combinational 15-bit merging
adder after the last row is the other long path. Register `y` outside the
filter if that path is too slow, at the cost of one more clock of latency.

## Verification

Each testbench prints `TB_RESULT checks=N failures=F`. A watchdog ends a hung run and counts it as a failure.

* `tb_fbp_basic_cell`: random stimulus against a model of the cell; all 128
  combinations of inputs and stored sum are reached.
* `tb_fbp_cell_row`: the row value `s + 2*c` is compared every clock with an
  integer model. Whole m-clock multiplications are also checked.
* `tb_fbp_input_shreg`, `tb_fbp_coef_rotator`, `tb_fbp_ctrl`, `tb_fbp_vma`:
  each is checked against the rule it implements, clock by clock. The
  controller test includes out-of-range lengths.
* `tb_fbp_dataflow`: runs the 3-tap, m = 4 case and checks, in every clock,
  the value held by each of the three rows. It also checks the shift-register
  output (x, 2x, 4x, 8x) and each row's coefficient bit. The expected values
  are the ones given in the example table above.
* `tb_fbp_fir_top`: runs the filter at its default size and checks every
  output word against the FIR sum over the samples taken. It also checks the
  latency (m+1 clocks from a load to the first word) and the spacing of words
  (m clocks). It covers:
  * output straight after reset;
  * the 3-tap, m = 4 case;
  * every length 1..8, with folding-factor changes between them;
  * full-scale operands, which give the largest output word;
  * coefficients with bits set above m.

  It counts each case and fails if one never occurs.

Simulate with Verilator, for example:

    verilator --binary --timing --assert -Wno-fatal --top-module tb_fbp_fir_top \
        -y rtl -y tb +libext+.sv rtl/fbp_pkg.sv tb/tb_fbp_fir_top.sv
    ./obj_dir/Vtb_fbp_fir_top

The parameters K, N and M1 of `fbp_fir_top` can be changed together. W and
MW follow from them through `fbp_pkg`.
