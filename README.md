# Flexible M-QAM mapper and scalable radix-4 IFFT for a multi-standard OFDM transmitter

This is the baseband core of an OFDM transmitter that serves two standards with
one set of hardware: IEEE 802.11a (64 subcarriers) and IEEE 802.16d (256
subcarriers). Both use the same modulation schemes (BPSK, QPSK, 16-QAM, 64-QAM,
and for 802.16d also 256-QAM). Link adaptation can give every subcarrier its own
scheme. Two observations keep the hardware small:

* **The constellations are nested.** Each lower-order square QAM constellation is
  a corner subset of the next larger one. So a single 16-entry table of
  amplitude levels maps every scheme, and I and Q are looked up separately.
  Without this, each scheme would need its own I table and its own Q table.
* **Radix-4 stages all look alike.** Each stage of a radix-4
  decimation-in-frequency IFFT does the same thing: it splits every group into
  four sub-groups, applies a butterfly across them and multiplies by twiddle
  factors. One stage datapath, driven by a stage/group/element loop, therefore
  computes an IFFT of any size N = 4^v. The twiddle factors of every smaller
  size are a subset of the largest size's, so one twiddle table serves all sizes.

The design is written in synthesizable SystemVerilog (IEEE 1800-2017).

## Signal chain

```
             la_wr_*                      serial bits
                |                              |
        +-------v---------+  scheme of   +-----v--------+   X(k)   +---------------+  x(n)
        | bit_loading_    |--subcarrier->| qam_mod_flex |--------->| ifft_scalable |------> out_*
        | table (NMAX)    |      k       +--------------+  k=0..N-1+---------------+ natural order
        +-----------------+
```

`ofdm_tx_top` produces one OFDM symbol at a time:

1. While `idle` is high, pulse `start` together with `n_size` (64 for 802.11a,
   256 for 802.16d, or any power of 4 from 4 up to `NMAX`).
2. For subcarriers k = 0 .. N-1, the top reads the scheme of k from the table
   and hands it to the modulator. The modulator then takes exactly that many bits
   from `bit_in` (`bit_valid`/`bit_ready`, b0 first). The finished symbol X(k)
   streams into the IFFT.
3. The IFFT computes in place and then sends N time samples x(n) in natural
   order: `out_valid` is high for N cycles in a row, and `out_last` marks the
   final sample. There is no output back-pressure.

Schemes are coded as the number of bits per symbol (`qam_pkg::mod_t`): 0 = off
(the subcarrier carries 0), 1 = BPSK, 2 = QPSK, 4 = 16-QAM, 6 = 64-QAM,
8 = 256-QAM. The link-adaptation algorithm is outside this design. It writes the
per-subcarrier table through `la_wr_en`/`la_wr_addr`/`la_wr_mod`, normally
between symbols. `n_size` may change from one symbol to the next.

## The flexible mapper (`qam_mod_flex`)

### Splitting bits into an I index and a Q index

In the bit word b7..b0 of a symbol, the even bits choose the I amplitude and the
odd bits choose the Q amplitude. Each index is built by shift-and-add, one step
per scheme above QPSK, so no multiplier is needed (`qam_symbol_calc`):

| bits/symbol | I index                      | Q index                      |
|-------------|------------------------------|------------------------------|
| 1 (BPSK)    | b0                           | 0                            |
| 2 (QPSK)    | b0                           | b1                           |
| 4 (16-QAM)  | b0 + b2<<1                   | b1 + b3<<1                   |
| 6 (64-QAM)  | ... + b4<<2                  | ... + b5<<2                  |
| 8 (256-QAM) | ... + b6<<3                  | ... + b7<<3                  |

### One table for all schemes

`qam_lut` holds 16 Gray-coded levels:

| index | 0  | 1 | 2  | 3 | 4  | 5 | 6  | 7 | 8   | 9  | 10  | 11 | 12 | 13 | 14  | 15 |
|-------|----|---|----|---|----|---|----|---|-----|----|-----|----|----|----|-----|----|
| level | -1 | 1 | -3 | 3 | -7 | 7 | -5 | 5 | -11 | 11 | -13 | 13 | -9 | 9  | -15 | 15 |

I is the entry at the I index. Q is the *negated* entry at the Q index. QPSK uses
entries 0-1, 16-QAM uses 0-3, 64-QAM uses 0-7 and 256-QAM uses all 16. BPSK
points come out as -1+j and +1+j: two of the QPSK points, because the Q index is
0. The table has two read ports, so I and Q are read in the same cycle.

### Normalisation

`qam_normalize` scales both levels so that each constellation has unit average
power:

| scheme        | factor      |
|---------------|-------------|
| BPSK and QPSK | 1/sqrt(2)   |
| 16-QAM        | 1/sqrt(10)  |
| 64-QAM        | 1/sqrt(42)  |
| 256-QAM       | 1/sqrt(170) |

BPSK takes the QPSK factor because its points lie off the real axis. The factors
are computed at elaboration in Q0.18. The product is rounded into the Q2.14
sample format and stays within one LSB of the exact value.

### Handshake and timing

* `mod_valid`/`mod_ready` carries the scheme.
* `bit_valid`/`bit_ready` carries the bits; they are gathered by `qam_s2p`, a
  serial-to-parallel register.
* `sym_valid`/`sym_ready` carries the result.

When bits arrive in every cycle, `sym_valid` rises n+1 clock edges after the
scheme is accepted. A zero-bit (off) subcarrier takes no bits.

## The scalable IFFT (`ifft_scalable`)

### What it computes

x(n) = (1/N) * sum_k X(k) * exp(+j*2*pi*k*n/N) for N = 4^v, 1 <= v <= log4(NMAX).
The size `n_size` is the only configuration input. The 1/N factor is applied as
1/4 in each stage, which keeps the word width constant across stages.

### Loop structure (`ifft_addr_gen`)

There are v stages. Stage s (counted from 0) has N_group = 4^s groups. Each group
splits into four sub-groups of N_element = N / (4 * N_group) elements. One
butterfly takes element e of each of the four sub-groups of group g:

```
addr[k]   = g * 4*N_element + k*N_element + e          k = 0..3
tw_idx[k] = (k * e * N_group) * (NMAX / N)             index into the NMAX-entry table
```

The twiddle exponents therefore follow a fixed pattern:

* Stage 0 uses W_N^(0e,1e,2e,3e) for e = 0 .. N/4-1.
* Stage 1 uses W_N^(0e,4e,8e,12e).
* The last stage has one element per sub-group, so every twiddle factor there is 1.

The loops run stage, then group, then element. The walk has (N/4)*v butterflies.
For a 64-point transform this gives 3 stages:

| stage | groups | butterflies per group |
|-------|--------|-----------------------|
| 0     | 1      | 16                    |
| 1     | 4      | 4                     |
| 2     | 16     | 1                     |

### Datapath and schedule

There is one radix-4 butterfly (`ifft_radix4_bfly`), one twiddle table
(`ifft_twiddle_rom`) and a single complex multiplier (`cmul`), all around one
in-place sample memory (`ifft_buffer`). The memory keeps real and imaginary
parts in separate arrays and has one write port and one combinational read port.
Each butterfly takes 8 cycles:

* **Cycles 0-3:** read the four elements into registers.
* **Cycles 4-7:** for each output y_k, multiply by its twiddle factor and write
  the result back to the address it was read from.

The butterfly computes the inverse kernel and rounds each sum divided by 4:

```
y0 = a0 +   a1 + a2 +   a3
y1 = a0 + j*a1 - a2 - j*a3
y2 = a0 -   a1 + a2 -   a3
y3 = a0 - j*a1 - a2 + j*a3
```

An in-place DIF transform leaves its results in base-4 digit-reversed order.
For a 64-point transform, memory positions 0, 1, 2, ... hold outputs 0, 16, 32,
48, 4, 20, .... The output phase therefore reads memory at the digit-reversed
address of n (`ifft_digit_rev`) and delivers x(n) in natural order.

### Timing

Count the cycle in which `start` is accepted as cycle 1, and assume one input
sample arrives per load cycle. Then `out_last` is high in cycle
N + 2*N*log4(N) + N:

| N   | load | compute | output | total |
|-----|------|---------|--------|-------|
| 16  | 16   | 64      | 16     | 96    |
| 64  | 64   | 384     | 64     | 512   |
| 256 | 256  | 2048    | 256    | 2560  |

In the full transmitter, modulating subcarrier k takes about n_k + 3 cycles. The
IFFT's compute and output phases then take 2*N*log4(N) + N cycles after the last
symbol enters.

For continuous transmission at the 20 MHz sample rate of both standards, the
clock must run about 2560/256 = 10 times faster than the sample rate for the
IFFT alone, and more once modulation is counted. This core processes one symbol
at a time and does not overlap symbols.

## Number formats

| quantity                    | format                                       |
|-----------------------------|----------------------------------------------|
| samples (I/Q, IFFT data)    | 16-bit two's complement, Q2.14, range +-2    |
| twiddle factors             | Q2.14; 1.0 = 16384 is exactly representable  |
| normalisation factors       | unsigned Q0.18                               |
| LUT levels                  | 5-bit signed, -15..15                        |

The largest modulator output is 15/sqrt(170) = 1.15. The complex multiplier
rounds to nearest and saturates.

Against a floating-point inverse DFT, the 256-point transform of random data
stays within 2 LSB (about 1.2e-4).

## Parameters

| module                                                                   | parameter | default | meaning                                   |
|--------------------------------------------------------------------------|-----------|---------|-------------------------------------------|
| `ofdm_tx_top`, `ifft_scalable`, `bit_loading_table`, `ifft_*`            | `NMAX`    | 256     | largest IFFT size and number of subcarriers |
| `qam_s2p`                                                                | `MAXB`    | 8       | largest bits per symbol                   |

`NMAX` must be a power of 4. The IFFT has also been simulated at NMAX = 64,
1024 and 4096. Only the twiddle table and the memories grow; the datapath stays
the same. Widths and formats are set in `qam_pkg`.

## What comes from the published design and what was chosen here

These parts follow the published method:

* the mapping chain: serial bits, then I/Q index by shift-and-add, then one
  shared LUT with Q negated, then normalisation
* the level table and the normalisation factors
* BPSK's 1/sqrt(2) factor
* the radix-4 DIF structure: stage/group/element loop, N_group and N_element,
  twiddle exponents, one table for all sizes, one butterfly and one multiplier
* output scrambling after the last stage

These are this implementation's own choices:

* all word widths and fixed-point formats
* the 1/4 scaling per stage
* the 8-cycle in-place memory schedule and every cycle count
* all handshakes, and the bit order (b0 arrives first)
* synchronous active-low reset
* the scheme table and how the top sequences the blocks

These are left out:

* the link-adaptation algorithm itself, which is not specified (only its write
  port is provided)
* the conventional one-table-per-scheme modulator, which is a reference design
* pilots, guard subcarriers and cyclic prefix, which are not part of the
  described core
* overlapping of consecutive symbols
* a forward-FFT mode: only the inverse transform is worked out, so only the
  inverse transform is built

## Files

| file                                 | role                                                     |
|--------------------------------------|----------------------------------------------------------|
| `rtl/qam_pkg.sv`                     | shared types (`mod_t`, `cplx_t`), widths, normalisation constants |
| `rtl/ofdm_tx_top.sv`                 | transmitter top                                          |
| `rtl/bit_loading_table.sv`           | per-subcarrier scheme store                              |
| `rtl/qam_mod_flex.sv`                | flexible modulator                                       |
| `rtl/qam_s2p.sv`                     | serial-to-parallel                                       |
| `rtl/qam_symbol_calc.sv`             | I/Q index calculation                                    |
| `rtl/qam_lut.sv`                     | shared level table                                       |
| `rtl/qam_normalize.sv`               | scaling                                                  |
| `rtl/ifft_scalable.sv`               | IFFT control and datapath                                |
| `rtl/ifft_addr_gen.sv`               | stage/group/element loop                                 |
| `rtl/ifft_radix4_bfly.sv`            | butterfly                                                |
| `rtl/cmul.sv`                        | twiddle multiplier                                       |
| `rtl/ifft_twiddle_rom.sv`            | twiddle table, computed at elaboration                   |
| `rtl/ifft_buffer.sv`                 | sample memory                                            |
| `rtl/ifft_digit_rev.sv`              | output scrambling                                        |
| `tb/tb_<module>.sv`                  | self-checking testbench for each module                  |

## Simulating

Every testbench checks itself and ends by printing
`TB_RESULT checks=<n> failures=<m>`. For example, to run the end-to-end test
with plain Verilator:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -Irtl rtl/qam_pkg.sv \
          tb/tb_ofdm_tx_top.sv --top-module tb_ofdm_tx_top -o sim
./obj_dir/sim
```

Swap in any other `tb/tb_<module>.sv` and `--top-module tb_<module>` to test one
block.

### The end-to-end test (`tb_ofdm_tx_top`)

This test runs at the default NMAX = 256. It sends five symbols of 64, 256, 64,
16 and 256 points, rewriting the scheme table before each one. The bit source
pauses at random.

* **Reference:** the testbench maps the bits the core accepted with its own
  model and compares every output sample against a real-valued inverse DFT.
* **Bit and timing checks:** the bit count, the unbroken output burst and the
  IFFT latency.
* **Coverage:** the test fails if any of these never happens: a scheme code,
  a size switch, a gap in the bit stream, a refused bit, a table rewrite.

### IFFT test (`tb_ifft_scalable`)

* **4-point case, exact:** inputs 1+j, 1-j, 0, -1-j must give 0.25-0.25j,
  0.25+0.75j, 0.25+0.75j, 0.25-0.25j.
* **Random frames:** 16-, 64- and 256-point transforms, each checked against
  the inverse DFT and for cycle count.

### Bit error rate test (`tb_qam_ber`)

This test checks signal quality. The modulator sends 16-QAM (and QPSK) over
simulated Gaussian noise, and a hard-decision demodulator recovers the bits.
The measured BER must match the theoretical curve for Gray-coded 16-QAM within
25 % at Eb/N0 = 2, 4, 6 and 8 dB. This confirms that the shared table's level
order is a proper Gray mapping.

### Other block tests

* **Exhaustive:** index calculation, LUT and digit reversal.
* **Random, against independent models:** butterfly, multiplier, memory,
  normalisation, table and address generator.

All tests together take a few seconds.
