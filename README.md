# Split-memory radix-2 FFT processor

A processor with a single radix-2 butterfly normally needs two clock cycles
per butterfly, because it has to read two operands and write two results
through one memory port per RAM. This design gets one butterfly per clock out
of the same amount of memory (2N complex words for an N-point transform) by
splitting each of its two RAM sets into an upper bank **U** and a lower bank
**L**, and by placing the data so that the two operands of every butterfly,
and its two results, always sit in different banks. One stage of the
transform then takes N/2 cycles, the whole transform N/2 · log2 N cycles,
and with reading out one result while loading the next input the processor
transforms a continuous stream every

    N/2 · (1 + log2 N) cycles      (5632 cycles for N = 1024)

i.e. at 2/(1 + log2 N) samples per clock. The algorithm is the
decimation-in-frequency radix-2 FFT in its *constant-geometry* form, in which
every stage connects the same positions, so every stage uses the same
addresses; only the coefficient addresses change from stage to stage. All
control signals come straight from the bits of one counter.

Default configuration: N = 1024, 24-bit real and imaginary data parts,
16-bit real and imaginary coefficient parts (32 bits per coefficient), and a
complex multiplier pipelined 5 cycles deep. All of these are parameters of
the top module `fft_split_mem`.

## The algorithm

Let n = log2 N and let d be the vector of N complex values entering a stage.
Stage s (s = 1 … n) has N/2 butterflies; butterfly k (k = 0 … N/2-1) takes
d[k] and d[k+N/2] and produces

    d'[2k]   = d[k] + d[k+N/2]
    d'[2k+1] = (d[k] - d[k+N/2]) · W_N^e,   e = 2^(s-1) · floor(k / 2^(s-1))
    W_N = exp(-j·2π/N)

After n stages, position p of the vector holds frequency bin X[bitrev_n(p)]:
the result is in bit-reversed order.

## Where the data lives

Every stage reads positions k and k+N/2 and writes positions 2k and 2k+1. A
plain split (first half of the vector in U, second half in L) keeps the two
*operands* apart but puts both *results* of a butterfly into the same bank.
The placement used here keeps both apart:

    position p  ->  bank U if p[0] == p[n-1], bank L otherwise,  address p >> 1

- Operands k and k+N/2 differ only in bit n-1, so they go to different banks,
  both at address {p[n-1], k[n-2:1]}.
- Results 2k and 2k+1 differ only in bit 0, so they also go to different
  banks, both at address k.

For N = 8 (address in parentheses):

| bank U | bank L |
|--------|--------|
| d0 (0) | d1 (0) |
| d2 (1) | d3 (1) |
| d5 (2) | d4 (2) |
| d7 (3) | d6 (3) |

The two RAM sets alternate: stage 1 reads set 0 (U, L) and writes set 1
(U', L'), stage 2 reads set 1 and writes set 0, and so on. Each bank is read
or written at most once per cycle in each direction.

## The control counter

The control unit (`fft_ctrl`) counts butterflies with an (n-1)-bit counter
k = k[n-2] … k[0] and derives everything from it:

| signal | value | use |
|--------|-------|-----|
| SA1 | k[0], k[n-2] … k[1] | read address of bank U |
| SA2 | ~k[0], k[n-2] … k[1] | read address of bank L |
| C1  | k[0] | 0: operand x_k comes from U; 1: from L (the read switch crosses) |
| DA  | k | write address of both banks |
| C2  | k[n-2] | 0: d'[2k] goes to U; 1: d'[2k] goes to L (the write switch crosses) |
| CA  | k with its s-1 low bits cleared | coefficient ROM address |

The ROM (`fft_twiddle_rom`) holds the N/2 values W_N^k at address k. For
N = 8 the counter gives:

| k | C1 | C2 | SA1 | SA2 | DA | operands | U' gets | L' gets |
|---|----|----|-----|-----|----|----------|---------|---------|
| 0 | 0 | 0 | 0 | 2 | 0 | d0, d4 | d'0 | d'1 |
| 1 | 1 | 0 | 2 | 0 | 1 | d1, d5 | d'2 | d'3 |
| 2 | 0 | 1 | 1 | 3 | 2 | d2, d6 | d'5 | d'4 |
| 3 | 1 | 1 | 3 | 1 | 3 | d3, d7 | d'7 | d'6 |

The routing switches are `fft_swap2` instances: straight when their select
is 0, crossed when it is 1.

## Schedule and pipeline

A transform goes through three phases:

1. **Load**: N/2 input pairs, one per accepted cycle, written into the free
   RAM set. Pair a is (x[2a], x[2a+1]); it is written at address a with the
   write switch set by a[n-2], exactly as if a butterfly had produced it, so
   the input ends up in the placement above.
2. **Compute**: n stages of N/2 butterflies, issued one per cycle with no
   gap between stages (for N ≥ 32).
3. **Unload**: N/2 cycles, reading both banks of the result set at address
   a = 0 … N/2-1. Pair a carries positions 2a and 2a+1, i.e. X[bitrev(2a)]
   and X[bitrev(2a+1)]; `out_index` gives a.

Unload of one transform and load of the next run in the same N/2 cycles, in
different RAM sets. The next transform starts computing in the cycle after
both are done, which with an uninterrupted input stream gives the period of
N/2 · (1 + n) cycles.

The datapath is pipelined. A fetch (RAM and ROM addresses) is issued in cycle
c; the banks and the ROM answer in cycle c+1 (C1 is applied then); the
butterfly's results leave the multiplier pipeline in cycle c+1+MULT_LAT, when
DA and C2 are applied and the results are written. The control unit delays
its signals to match. Because of this, the first fetches of stage s+1 happen
while the last results of stage s are still being written. That is safe
when a stage's first reads need words written early in the previous stage:
butterfly 0 of stage s+1 needs the result of butterfly N/4 of stage s, which
can be read back from MULT_LAT+2 cycles after its fetch. So no wait is
needed if N/4 ≥ MULT_LAT + 2, which holds for N ≥ 32 with the 5-cycle
multiplier. Otherwise the control unit waits GAP = MULT_LAT+2-N/4 idle
cycles between stages and, if positive, UGAP = MULT_LAT+2-N/2 cycles before
the unload (N = 8: 5 and 3). Each bank therefore has a separate read port and write port.

Latency from the last accepted input pair to the first result pair is
2 + n·N/2 + (n-1)·GAP + UGAP cycles (5122 for N = 1024).

## Interface (`fft_split_mem`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk` | in | 1 | clock, all logic on the rising edge |
| `rst_n` | in | 1 | synchronous active-low reset (control only; RAM contents are not cleared) |
| `in_valid`, `in_ready` | in, out | 1 | input handshake; a pair moves when both are 1 |
| `in_re[2]`, `in_im[2]` | in | 2 × DW | element 0: x[2a], element 1: x[2a+1] |
| `out_valid` | out | 1 | high for N/2 consecutive cycles per transform; no back-pressure |
| `out_index` | out | n-1 | pair address a |
| `out_re[2]`, `out_im[2]` | out | 2 × DW | X[bitrev(2a)], X[bitrev(2a+1)] |
| `busy` | out | 1 | computing or unloading |
| `computing`, `stage` | out | 1, ⌈log2(n+1)⌉ | compute phase and its stage 1 … n |

`in_ready` is high during the load phase until N/2 pairs have been taken;
the source may pause at any time. Output samples appear at a fixed rate and
must be taken when `out_valid` is high.

### Number formats

- Data: two's-complement integers, DW bits per part.
- Coefficients: two's-complement fixed point, CW bits per part with CW-2
  fraction bits (+1.0 = 2^14 for CW = 16), rounded to nearest; computed at
  elaboration time from cos and sin, so the ROM needs no data file.
- The butterfly does not scale. The sum wraps to DW bits; the difference
  enters the multiplier with DW+1 bits; the product is shifted back by CW-2
  bits with round-half-up and wraps to DW bits. The output is the unscaled
  DFT, so the inputs need n bits of headroom. With DW = 24 and N = 1024,
  keep each input part within ±4096 (13 bits) to be safe from overflow.

## Modules

| file | role |
|------|------|
| `rtl/fft_pkg.sv` | phase type, coefficient quantisation functions |
| `rtl/fft_split_mem.sv` | top: four banks, ROM, butterfly, switches, bank port multiplexing |
| `rtl/fft_ctrl.sv` | counter, address/routing equations, stage and set sequencing, load/unload |
| `rtl/fft_butterfly.sv` | a+b and (a-b)·W with the sum delayed to match the multiplier |
| `rtl/fft_cmult.sv` | complex multiplier: 4 real multipliers, 2 adders, LAT-deep pipeline |
| `rtl/fft_bank_ram.sv` | N/2-word bank, one write and one registered read port |
| `rtl/fft_twiddle_rom.sv` | N/2-entry coefficient ROM, registered read |
| `rtl/fft_swap2.sv` | 2x2 straight/cross switch |

`MULT_LAT` selects the multiplier: 5 (default) for the pipelined version,
0 for a fully combinational one (then the RAM read, butterfly and RAM write
form one combinational path), and anything in between. With LAT ≥ 1 the four
real products are registered and the remaining LAT-1 register levels follow
the adders; a synthesis tool with retiming can move them into the
multipliers. N must be a power of two, at least 8.

## Verification

Each module has a self-checking testbench in `tb/`. All print one line
`TB_RESULT checks=… failures=…`.

| testbench | what it checks |
|-----------|----------------|
| `tb_fft_split_mem` | default size (N = 1024): four transforms streamed back to back, the third with random input pauses; every output bit-exact against a fixed-point model, the model against a floating-point DFT, latency 5122, period 5632; counts both settings of C1 and C2, set swaps, unload/load overlap and input pauses |
| `tb_fft_split_mem_small` | N = 8 (5-cycle multiplier, idle cycles between stages), N = 16 (combinational multiplier), N = 32 (1-cycle multiplier) |
| `tb_fft_workloads` | N = 256 and 512 with pipelined and combinational multipliers, N = 1024 combinational; periods 1152, 2560 and 5632 cycles |
| `tb_fft_ctrl` | every control output, cycle by cycle, for N = 8 (against the table above) and N = 1024 |
| `tb_fft_butterfly`, `tb_fft_cmult` | arithmetic and latency against integer models |
| `tb_fft_bank_ram`, `tb_fft_twiddle_rom`, `tb_fft_swap2` | storage, read timing, ROM contents, switching |

The reference model (`tb/fft_ref_pkg.sv`) computes the constant-geometry
algorithm on a plain array with the same rounding rules, independently of
banks, switches and timing. Helper modules `fft_tb_stream`, `fft_tb_case`
and `fft_tb_ctrl_run` hold the shared stimulus and checking code.

To run the end-to-end test with Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/fft_pkg.sv tb/fft_ref_pkg.sv tb/tb_fft_split_mem.sv \
        --top-module tb_fft_split_mem
    obj_dir/Vtb_fft_split_mem

Replace the testbench name to run any other one. The default-size test
simulates about 24,000 cycles and finishes in under a second.

## Design choices beyond the architecture

The bank organisation, the counter equations, the set swapping, the
overlapped unload/load, the data and coefficient widths and the 5-cycle
multiplier follow the architecture as published. The following are this
implementation's own decisions:

- the input/output handshake, the natural-order input pairs and the
  pair-wise bit-reversed output order;
- one-cycle registered RAM and ROM reads, and a separate read and write
  port per bank;
- the idle cycles for small N (N < 32 with the 5-cycle multiplier), which
  are not needed at the sizes the scheme targets;
- the Q2.14 coefficient format, round-half-up rounding and the absence of
  per-stage scaling (wrap-around on overflow, no saturation);
- synchronous reset of the control unit only;
- the multiplier is generic RTL; the original used vendor multiplier cores
  with the same latency, and the banks map onto FPGA block RAMs or any
  simple dual-port memory.

Clock frequency and area were not evaluated; only cycle counts are
verified.
