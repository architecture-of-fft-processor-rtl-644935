# 4-point radix-2 FFT processor with a Vedic (Urdhva-Tiryakbhyam) multiplier

This is a small FFT processor for an FPGA. A host PC sends 8-bit samples over
a serial line. The processor computes a 4-point FFT and sends back the real
and imaginary parts of the four bins.

Two ideas shape the design:

* **Memory-based FFT with one butterfly.** A single radix-2 butterfly does all
  the arithmetic. It works in place on a dual-port data memory, one butterfly
  per clock. An N-point radix-r transform takes (N/r)·log_r N clocks, which is
  4 clocks for N = 4.
* **Vedic multiplication for the twiddle products.** Every real product in
  the complex twiddle multiplier comes from an Urdhva-Tiryakbhyam ("vertical
  and crosswise") multiplier. That multiplier is built from 4 × 4 blocks.

All of it is synthesizable SystemVerilog (IEEE 1800-2017) and lints cleanly
with Verilator.

## Block hierarchy

```
fft_uart_top              serial-in / serial-out wrapper (CLK_HZ, BAUD)
├── uart_rx               8N1 receiver
├── host_if               byte framing: 4 sample bytes in, 16 result bytes out
├── fft4_core             memory-based 4-point FFT
│   ├── fft_ctrl          butterfly scheduler / address generator
│   ├── twiddle_rom       W^0 = 1, W^1 = -j
│   ├── radix2_butterfly  y0 = a + w·b, y1 = a − w·b
│   │   └── cmul_vedic    complex multiply, four real products
│   │       └── vedic_smul (×4)   signed wrapper (sign-magnitude)
│   │           └── vedic_mul_nxn 16 × 16 from sixteen 4 × 4 blocks
│   │               └── vedic_mul4 (×16)  column-wise vertical-and-crosswise
│   └── fft_dpram         4-word dual-port memory, asynchronous read
└── uart_tx               8N1 transmitter
fft_pkg                   widths, cplx_t / twiddle_t structs, bitrev()
```

## Vertical and crosswise multiplication

### The 4 × 4 block (`vedic_mul4`)

The product is built one column at a time, from the LSB to the MSB. Column
*k* adds every bit product a_i·b_j with i + j = k, plus the carry out of
column k − 1:

| column | products added                      | name                  |
|-------:|-------------------------------------|-----------------------|
| 0      | a0b0                                | vertical              |
| 1      | a1b0 + a0b1                         | crosswise             |
| 2      | a2b0 + a1b1 + a0b2                  | vertical + crosswise  |
| 3      | a3b0 + a2b1 + a1b2 + a0b3           | crosswise             |
| 4      | a3b1 + a2b2 + a1b3                  | vertical + crosswise  |
| 5      | a3b2 + a2b3                         | crosswise             |
| 6      | a3b3                                | vertical (MSBs)       |

The LSB of a column sum is product bit *k*. The rest of the sum is carried
into the next column, and the final carry becomes bit 7. A column can hold up
to four products plus its carry, so the carry is a small multi-bit value, not
a single bit.

All 16 bit products are formed at the same time. The delay is therefore the
carry path through the column adders, as in an array multiplier, and no clock
is involved.

Example: 1011 × 1101 (11 × 13).

| column | sum (products + carry) | bit | carry out |
|-------:|------------------------|----:|----------:|
| 0      | 1                      | 1   | 0         |
| 1      | 1 + 0 = 1              | 1   | 0         |
| 2      | 0 + 0 + 1 = 1          | 1   | 0         |
| 3      | 1 + 0 + 1 + 1 = 3      | 1   | 1         |
| 4      | 0 + 0 + 1 + 1 = 2      | 0   | 1         |
| 5      | 1 + 0 + 1 = 2          | 0   | 1         |
| 6      | 1 + 1 = 2              | 0   | 1 (bit 7) |

The result is 1000 1111 = 143.

### N × N from 4 × 4 blocks (`vedic_mul_nxn`, default N = 16)

The same rule is applied one level up, in base 16. The operands are cut into
N/4 digits of 4 bits each. Every pair of digits gets its own `vedic_mul4`,
and all of them run in parallel (16 blocks for 16 × 16). Column *c* collects
the tile products whose digit indices add up to *c*. The columns are then
summed with weights 16^c. This design writes that sum as one plain
expression and leaves the adder tree to synthesis. N must be a multiple of 4.

### Signed and complex products

The Vedic array multiplies unsigned numbers. `vedic_smul` multiplies the two
magnitudes and negates the product when the operand signs differ.

`cmul_vedic` forms (br + j·bi)(wr + j·wi) with four of these multipliers:
br·wr, bi·wi, br·wi and bi·wr. It then shifts the two sums right by the
twiddle's 6 fraction bits. The shift truncates toward −∞. For the twiddles of
a 4-point transform (1 and −j) every product is exact.

## The butterfly schedule

`fft4_core` computes X[k] = Σ x[n]·W₄^(nk), where W₄ = −j. It uses in-place
decimation in time:

1. **Load.** Sample x[n] is written to memory address bitrev(n), through
   port A. So x0 goes to address 0, x1 to 2, x2 to 1 and x3 to 3.
2. **Run.** A `start` pulse runs four butterfly clocks. In each one, ports A
   and B read the two operands, the butterfly computes combinationally, and
   both results are written back to the same addresses at the clock edge:

   | clock | stage | addr A | addr B | twiddle |
   |------:|------:|-------:|-------:|---------|
   | 1     | 1     | 0      | 1      | W^0 = 1 |
   | 2     | 1     | 2      | 3      | W^0 = 1 |
   | 3     | 2     | 0      | 2      | W^0 = 1 |
   | 4     | 2     | 1      | 3      | W^1 = −j|

   In general, `fft_ctrl` gives butterfly *j* of stage *s* (span 2^s) the
   addresses a = ⌊j/2^s⌋·2^(s+1) + (j mod 2^s) and a + 2^s. Its twiddle
   exponent is (j mod 2^s)·N/2^(s+1).
3. **Read.** `done` pulses for one cycle right after the fourth write. X[k]
   can then be read combinationally at `rd_addr = k`, in natural order, until
   the next load.

`start` is taken on a rising edge. `done` is high in the cycle after the 4th
butterfly, which is 5 rising edges after `start` was sampled. `busy` covers
that whole interval. Loads and starts are ignored while `busy` is high.

The asynchronous read is what allows one butterfly per clock. It matches a
distributed (LUT) RAM. With a block RAM that reads synchronously, the
butterfly would need one pipeline stage and the controller would have to
account for the read latency.

## Number formats (`fft_pkg`)

| quantity        | format                                                        |
|-----------------|---------------------------------------------------------------|
| serial sample   | unsigned 8 bits, 4 fraction bits: value = code / 16 (0 … 15.94) |
| core data word  | `cplx_t`: two 12-bit two's-complement parts                   |
| twiddle         | `twiddle_t`: two 8-bit parts, 6 fraction bits (+1 = 64)       |
| multiplier      | 16 × 16 unsigned Vedic array                                  |

Examples of sample codes: 1.1551 → 0001 0010, 0.5277 → 0000 1000 and
0.4061 → 0000 0110.

The core does not scale between stages. An 8-bit unsigned input grows by at
most two bits over the two stages, so the results stay within ±1020 and fit
in 12 bits. The results keep the samples' 4 fraction bits, so X[0] = 16
means a sum of 1.0.

## Serial protocol (`host_if`, `uart_rx`, `uart_tx`)

* The line uses 8 data bits, no parity and 1 stop bit, LSB first. The default
  rate is 9600 baud from a 50 MHz clock, so `CLKS_PER_BIT` = 5208.
* **Host to FPGA:** four bytes, x[0] to x[3]. The fourth byte starts the
  transform.
* **FPGA to host:** 16 bytes. For each k = 0 … 3 they are Re X[k] and then
  Im X[k], each sign-extended to 16 bits and sent low byte first.
* A byte that arrives between the fourth sample and the last reply byte is
  dropped and sets the sticky `overrun` output. A missing stop bit sets the
  sticky `frame_err` output, and that byte is dropped too. Only reset clears
  the two flags.
* A frame takes about 20 character times on the line (about 21 ms at
  9600 baud). The FFT itself takes 4 clocks.

The receiver synchronises the line with two flip-flops. It checks the start
bit again at mid-bit, so a glitch shorter than half a bit starts no frame.

## What follows the original design, and what is this implementation's choice

Taken from the original design:

* a 4-point radix-2 FFT
* one butterfly reused for every operation, (N/r)·log_r N = 4 clocks per
  transform
* a dual-port data memory
* Urdhva-Tiryakbhyam multiplication for the complex twiddle products
* N × N multipliers reduced to 4 × 4 blocks
* the column-by-column vertical-and-crosswise procedure with carries
* samples sent to the FPGA over a serial link and results returned as real
  and imaginary parts
* 8-bit sample codes with four fraction bits

Chosen here, where the original gives no detail:

* all internal widths and the twiddle format
* decimation in time with bit-reversed loading
* asynchronous-read memory, and port B winning when both ports write the
  same address
* how the 4 × 4 tile products are summed
* the sign-magnitude signed multiply and truncation after the twiddle
  multiply
* clock, baud rate and frame format
* the reply byte format and the overrun/frame-error policy
* active-low synchronous reset everywhere except the data memory, which the
  core always writes before it reads

Limitations worth knowing:

* **Only the 4-point transform is built.** Its twiddles are 1 and −j, so the
  Vedic multipliers only ever multiply by 0 and ±64. The multiplier path is
  fully general, and its testbenches cover random operands and random
  twiddles. The host plots of 96- and 300-sample signals show longer
  spectra, which this hardware cannot compute in one transform. Streaming
  those signals gives one 4-point spectrum per 4 samples.
  `fft_ctrl` is written for any power-of-two N. `twiddle_rom`, the
  package widths and `host_if` are fixed at N = 4.
* The USB-to-serial bridge and the PC software are outside the RTL. The top
  has the two serial lines as ports.

## Simulating

Each block has a self-checking testbench `tb/tb_<module>.sv` that ends with
`TB_RESULT checks=N failures=M`. To build and run one with Verilator 5 from
the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl +libext+.sv \
    rtl/fft_pkg.sv tb/tb_fft4_core.sv --top-module tb_fft4_core -o sim
./obj_dir/sim
```

| testbench               | what it shows                                                          |
|-------------------------|------------------------------------------------------------------------|
| `tb_vedic_mul4`         | all 256 products                                                       |
| `tb_vedic_mul_nxn`      | 16 × 16 corners and 5000 random products                               |
| `tb_cmul_vedic`         | complex products for 1, −j and random twiddles                        |
| `tb_radix2_butterfly`   | both outputs for random operands                                       |
| `tb_twiddle_rom`        | the two twiddles                                                       |
| `tb_fft_dpram`          | both ports, read-before-write, collisions                              |
| `tb_fft_ctrl`           | address and twiddle sequence, 4 butterfly clocks, done/busy, start ignored while busy |
| `tb_fft4_core`          | 204 real and complex frames against a direct DFT, 5-edge latency, loads ignored while busy |
| `tb_uart_rx`, `tb_uart_tx` | serial framing, timing, stop-bit error, glitch rejection            |
| `tb_host_if`            | load order, one start per frame, reply byte order, overrun, frame_err  |
| `tb_fft_uart_top`       | end to end at the default 50 MHz / 9600 baud                           |
| `tb_fft_signal_stream`  | a 96-sample and a 300-sample signal streamed as 99 frames, defaults    |

`tb_fft_uart_top` acts as the PC. It checks every bin and counts each
mechanism: frames, first- and second-stage butterflies, butterflies that use
the −j twiddle, overrun and frame error. It fails if any of them never
happens. It runs in a few seconds. `tb_fft_signal_stream` takes about a
minute.

The simulator is two-state, so every register that is read has a reset or
is written before it is read.

## Changing it

* **Clock or baud rate:** change the `CLK_HZ` and `BAUD` parameters of
  `fft_uart_top`.
* **Data width:** change `DATA_W` in `fft_pkg`. Keep `MULT_W` at least
  `DATA_W` and a multiple of 4.
* **Larger transform:** change `N_POINTS` and `ADDR_W` in `fft_pkg`, widen
  `DATA_W` by one bit per extra stage, widen the twiddle index in `fft4_core`,
  and give `twiddle_rom` a full table of cos/−sin values. The byte counts in `host_if` follow `N_POINTS`. `fft_ctrl`
  already handles any power of two.
