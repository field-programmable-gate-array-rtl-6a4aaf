# Multiwavelet OFDM baseband transceiver

This is an OFDM transmitter and receiver in which the IFFT and FFT are replaced by a 16-point
orthogonal multiwavelet transform, the discrete multiwavelet critical-sampling transform
(DMWCST). Wavelet-based subcarriers have lower side lobes than the rectangular-windowed
subcarriers of an FFT, so the system is less sensitive to inter-carrier interference.

Each OFDM symbol carries 24 bits:

- The bits become 12 QPSK symbols.
- The 12 symbols sit on subcarriers 2..13 of a 16-point frame, and subcarriers 0, 1, 14 and 15
  are held at zero.
- The frame goes through the inverse transform (IDMWCST).
- The result is sent as 16 I/Q sample pairs.

The receiver undoes these steps in reverse order. The top level, `mwofdm_top`, connects the two
back to back: bits go in, the same bits come out 249 clocks later, and the channel samples can
be watched on the way.

Everything is written in synthesizable SystemVerilog with a single clock and an asynchronous
active-low reset.

## Block chain

```
 tx_bit ─► qpsk_mapper ─► zero_pad ─► idmwcst ─► ps_converter ─► chan_i / chan_q / chan_valid
              (S/P, QPSK)   (nulls)    (W^T x)    (TDM, I/Q align)          │
                                                                            ▼
 rx_bit ◄─ qpsk_demapper ◄─ remove_zeros ◄─ dmwcst ◄─ sp_converter ◄────────┘
            (hard decision,   (drop nulls,    (W x)     (I then Q into
             P/S)             realign I/Q)               one vector stream)
```

`mwofdm_tx` and `mwofdm_rx` hold the two chains and `mwofdm_top` joins them. Shared constants,
types and the transform coefficients are in `mwofdm_pkg`.

## Clock plan and frame timing

The design runs on one clock at the rate of the serial channel samples:

| quantity | clocks |
|---|---|
| one input bit (`tx_bit_valid` spacing) | 8 (`BIT_CLKS`) |
| one QPSK symbol | 16 (`SYM_CLKS = N_F`) |
| one OFDM symbol (24 bits, 12 QPSK symbols) | 192 |
| channel burst per OFDM symbol (`chan_valid` high) | 16 |

These ratios reproduce a multi-rate original in which:

- the parallel-to-serial stage runs 16 times faster than the symbol stream;
- the symbol stream runs at half the bit rate.

The channel is busy for only 16 of the 192 clocks of each OFDM symbol. The other 176 clocks
carry zeros, as in the original. Only the ratios matter: at the original's rates the input must
deliver one bit every 8 clocks.

Stages pass data with valid strobes, not handshakes. No stage can stall, so the source must keep
to these rates. Assertions in `zero_pad` and `ps_converter` fire if a frame overruns the previous
one.

## The transform

### The matrix

The transform is a constant 16x16 matrix W applied to a 16-sample vector:

- The receiver computes `y = W x` (`dmwcst`).
- The transmitter computes `y = W^T x` (`idmwcst`).

W is the single-level, periodically extended transform of the GHM (Geronimo–Hardin–Massopust)
multiwavelet:

- The 16 inputs are read as 8 two-component vector samples.
- Outputs 0..7 are the low band. Block row r applies the 2x2 filter taps H0..H3 to vector
  samples 2r..2r+3, modulo 8.
- Outputs 8..15 are the high band and use G0..G3 in the same way.

The tap values are listed in the header of `rtl/mwofdm_pkg.sv`. GHM is orthogonal, so W W^T = I,
and the inverse transform is just the transpose.

### Sparsity

At most 7 of the 16 entries in any row or column of W (or of W^T) are nonzero. `mw_matmul`
builds only the nonzero terms:

1. At elaboration, `mw_nz_col()` lists the nonzero columns of each output row.
2. Each listed column gets one constant multiplier.
3. The products of an output meet in one seven-input adder tree (`adder_tree7`):
   `((a+b)+(c+d)) + ((e+f)+g)`.
4. Rows with fewer than seven nonzero entries feed zeros to the spare tree inputs.

That makes 16 trees for each transform.

### Number formats

| signal | format |
|---|---|
| samples | signed 16 bits, 8 fraction bits. QPSK levels are ±181/256 = ±0.70703125 |
| coefficients | signed 16 bits, 14 fraction bits, each rounded to the nearest step |
| products and sums | full precision, with 3 bits of headroom |
| result | rounded half-up to 8 fraction bits, saturated to 16 bits |

The integer matrix is orthogonal to within 1/2000. Each output agrees with the exact
floating-point transform to within 3 LSB.

With unit-energy QPSK inputs, transform outputs stay below ±2.5, far from the saturation limit.
After the round trip, the data subcarriers arrive close to ±181. The null
subcarriers come back within ±4 LSB of zero.

### Timing

Each transform is fully pipelined and accepts one vector per clock:

- 1 register stage for the products;
- 3 for the adder tree;
- 1 for rounding.

Valid and `is_q` flags travel with the data.

## I and Q share one transform

The transform is real, so the I part and the Q part of a frame are transformed separately, one
after the other, through the same hardware. The pieces that make this work:

- **`zero_pad`** gathers the 12 symbols of a frame. On the last one it emits the I vector. The Q
  vector follows exactly 16 clocks later. Between vectors its output is forced to zero.
- **`ps_converter`** serialises each vector, sample 0 first, with a time-division multiplexer.
  The stream therefore carries 16 I samples and then 16 Q samples. Two multiplexers split this
  stream into `chan_i` and `chan_q`. The I samples pass a 16-stage delay line, so I sample k and
  Q sample k leave on the same clock, and `chan_valid` marks those 16 clocks.
- **`sp_converter`** reverses this. For the first 16 clocks of a frame it feeds the I samples
  into a serial-to-parallel shift register. For the next 16 clocks it feeds the Q samples, which
  were held back by their own 16-stage delay. It emits the I vector and then, 16 clocks later,
  the Q vector.
- **`remove_zeros`** keeps subcarriers 2..13 of the I vector until the Q vector arrives. It then
  emits the 12 (I, Q) pairs, one every 16 clocks. A staging register lets the next frame's I
  vector arrive while the last pairs are still leaving.

## Mapping and decision

`qpsk_mapper` takes bits in pairs, the first bit being the most significant:

- the first bit chooses I and the second chooses Q;
- a 0 maps to −0.70703125 and a 1 to +0.70703125.

`qpsk_demapper` compares I and Q with 0. A value above zero gives 1, and zero or below gives 0.
It sends the I decision first and the Q decision 8 clocks later.

## Interface of `mwofdm_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset |
| `tx_bit`, `tx_bit_valid` | in | 1 | input bits, one every 8 clocks |
| `chan_i`, `chan_q` | out | 16 | transmitted samples (signed, 8 fraction bits), zero outside a burst |
| `chan_valid` | out | 1 | high for the 16 clocks of each OFDM symbol |
| `rx_bit`, `rx_bit_valid` | out | 1 | recovered bits, one every 8 clocks |

### Latency

Latencies are counted from the clock edge that takes an input to the edge after which the result
is visible.

| path | edges |
|---|---|
| last bit of a frame → first channel pair (`mwofdm_tx`) | 24 |
| first channel pair taken → first recovered bit (`mwofdm_rx`) | 40 |
| any bit, end to end (`mwofdm_top`) | 249 |

The end-to-end delay is the same for every bit. All latencies come from this design's choice of
register stages.

`mwofdm_rx` can also be used on its own. It expects frames in the format `mwofdm_tx` produces: 16
pairs marked by `chan_valid`, one frame every 192 clocks. It does no synchronisation, and the
valid strobe stands in for frame timing.

## How closely this follows the original design

Taken from the original design:

- 16 subcarriers, of which 12 carry data;
- two null subcarriers at each end;
- QPSK mapping with the MSB first and levels of ±0.70703125;
- the structure of each stage: a time-division multiplexer with a 16-clock I delay, an I-then-Q
  serial-to-parallel multiplexer, and terminators on the null subcarriers;
- the threshold-0 hard decision, with I and Q concatenated and the I decision first;
- transforms built as constant matrix products that omit zero coefficients and use a
  seven-input adder tree;
- the clock ratios: 192 clocks per OFDM symbol, with I and Q each taking 16 clocks.

This design's own choices:

- **The transform matrix.** The source specifies a DMWCST matrix multiply but does not give the
  matrix. The GHM matrix used here is orthogonal, and like the original it has at most seven
  nonzero taps per output. Any other orthogonal 16x16 matrix can be substituted by changing
  `dmwcst_coef()` in `mwofdm_pkg`. If it has more than seven nonzero taps per row, `MAX_NZ` and
  the adder tree must grow too.
- **Word lengths and pipelining.** Only the 8 fraction bits of the samples are fixed by the
  original. The total widths, the coefficient precision and the register stages are this
  design's own.
- **Control.** The original steers every multiplexer from a free-running counter with a
  hand-tuned delay. Here valid strobes and an `is_q` flag travel with the data, and small local
  counters start from them.
- **Resources.** Every product and adder level is registered at full precision, so the
  flip-flop count (about 12,000 bits for the whole transceiver) is far higher than in a
  hand-trimmed implementation. Narrowing the product registers is the obvious saving.
- **Omissions.** There is no channel model, noise, cyclic prefix, synchronisation or
  host/debug link.

## Testbenches

Each module in `rtl/` has a self-checking testbench `tb/tb_<module>.sv`. The exceptions are
`mw_matmul`, which is tested through `tb_idmwcst` and `tb_dmwcst`, and `mwofdm_pkg`, which
`tb_mwofdm_pkg` tests directly. Reference values come from `tb/tb_ref_pkg.sv`, which rebuilds the
GHM matrix in floating point from the filter definitions, independently of the RTL's integer
tables.

Every testbench of a clocked block:

- checks data and cycle-exact timing;
- has a watchdog;
- ends with a line `TB_RESULT checks=N failures=M`.

`tb_mwofdm_top` runs the whole transceiver at its default sizes:

- 24 OFDM symbols, including one all-ones and one all-zeros symbol (576 bits);
- checks every bit and its 249-clock latency;
- checks the 16-pair channel bursts and the null subcarriers on both sides;
- checks the 16-clock I-to-Q spacing through both transforms;
- counts each mechanism: the four QPSK points, null insertion and removal, I and Q passes of
  each transform, and channel bursts.

`tb_mwofdm_rx` adds uniform noise of ±24 LSB to the channel samples.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_mwofdm_top \
    -y rtl -y tb +libext+.sv rtl/mwofdm_pkg.sv tb/tb_ref_pkg.sv tb/tb_mwofdm_top.sv
./obj_dir/Vtb_mwofdm_top
```

For another testbench, replace `tb_mwofdm_top` in both places. Every run finishes in well under a
second.
