# Multiplier-free OFDM transmitter

This is an OFDM transmitter whose inverse DFT uses no multiplier. It
follows the design in "Design and Implementation of a Multiplier free
FPGA based OFDM Transmitter". The main configuration is the one that was
built on an FPGA board there:

- QPSK mapping,
- a 16-point IDFT,
- a 4-sample cyclic prefix,
- 15-bit results.

The RTL is parameterised. It also covers BPSK and 16-QAM, and any
power-of-two IDFT length.

## The idea: a decoder instead of multipliers

An OFDM transmitter computes `x(n) = sum_k X(k) * W^(-nk)`. Here `X(k)`
are the mapped symbols and `W^(-nk) = cos(2πnk/N) + i·sin(2πnk/N)` are
the twiddle factors. Done directly, this takes N² complex
multiplications. The key observation is that `X(k)` is never an arbitrary
number. It is one of only M constellation points. Every point of BPSK,
QPSK and 16-QAM has real and imaginary parts in {-3, -1, 0, +1, +3}.
Write a twiddle factor as `a + ib`. Then its product with a symbol is
always a signed choice among `a`, `b`, `3a` and `3b`:

| QPSK point | decoder line | product with a+ib |
|---|---|---|
| +1 | op[0] | a + ib |
| +i | op[1] | -b + ia |
| -i | op[2] | b - ia |
| -1 | op[3] | -a - ib |

So the mapper does not output complex numbers. It is a log2(M):M one-hot
decoder (`mapper_decoder`). Each decoder line selects, inside every adder
block, which stored twiddle words are added or subtracted. For 16-QAM the
products `3a` and `3b` are stored as well ("scaled twiddle factors").
This way a level of ±3 still needs only a selection.

The IDFT is then N **cumulative adder blocks** (CABs, `cab`) that work in
parallel. CAB n owns ROMs with row n of the IDFT matrix (`twiddle_rom`).
It also has two P-bit accumulators, one for the real part and one for the
imaginary part. Each time a symbol `X(k)` is complete, the control unit
puts `k` on the common ROM address. All N CABs then add their selected
term in the same clock cycle. After the N-th symbol, CAB n holds `x(n)`.
No FFT butterflies are involved, and the result is ready one clock after
the last input bit, whatever N is. The cost is N² ROM words and 2N
accumulators. There are no DSP multipliers.

## Data path

```
bit_in ──► sp_dff ──► mapper_decoder ──► idft_cab_array ──► control_unit ──► out_re/out_im
          (S/P,      (log2M:M one-hot)   N × (twiddle_rom    (symbol count,     (CP + P/S,
        log2M-1 FFs)                          + cab)          ROM address,       valid/ready)
                                                              cp_ps buffer) ──► monitor ──► ledr
```

| file | role |
|---|---|
| `rtl/ofdm_pkg.sv` | constellation tables and the twiddle formula, shared by the modules |
| `rtl/sp_dff.sv` | serial-to-parallel converter: log2(M)-1 D-FFs plus the arriving bit |
| `rtl/mapper_decoder.sv` | the mapper as a one-hot decoder |
| `rtl/twiddle_rom.sv` | a, b (and 3a, 3b for 16-QAM) for one IDFT-matrix row, computed at elaboration |
| `rtl/cab.sv` | cumulative adder block: term selection and two accumulators |
| `rtl/idft_cab_array.sv` | N ROM + CAB pairs sharing decoder lines and address |
| `rtl/cp_ps.sv` | frame buffer, cyclic prefix and parallel-to-serial output |
| `rtl/control_unit.sv` | symbol counter, CAB control, frame hand-over, input stall; contains `cp_ps` |
| `rtl/monitor.sv` | switch-selected result shown on LEDs |
| `rtl/ofdm_tx_top.sv` | top level |

### Serial input and the decoder

Bits arrive one per clock at most (`bit_valid`/`bit_ready`). For QPSK,
the first bit of a symbol waits in one D-FF. When the second bit
arrives, the stored bit (decoder input In1, `sym_idx[0]`) and the arriving
bit (In2) go straight to the decoder. So the decoder is enabled on every
second bit, and the symbol is added to all CABs at that same clock edge.
The QPSK truth table is `{In2,In1}` = 00 → +1, 01 → +i, 10 → -i, 11 → -1.
In general the first bit of a symbol is the least significant bit of the
decoder input.

BPSK uses no flip-flop: bit 0 gives +1 and bit 1 gives -1. 16-QAM uses
three flip-flops. Its points are Gray coded per axis, with `idx[1:0]` for
the in-phase level and `idx[3:2]` for the quadrature level:
00 → -3, 01 → -1, 11 → +1, 10 → +3. Both the BPSK and 16-QAM bit
assignments are choices of this design. The source gives only the sets
of points for these two.

### Number format

Twiddle factors are stored as `round(1000·cos)` and `round(1000·sin)`.
This is decimal fixed point with three fractional digits, held in P-bit
two's complement. The results are unnormalised sums, with no 1/N factor.
For example, the first published result, -2.000, is the word
`111100000110000` = -2000. With this format the 16-point QPSK test frame
gives all 32 published 15-bit words bit for bit. For QPSK one term is at
most 1000 in magnitude, so |x(n)| ≤ 16 000 at N = 16, and P = 15 never
overflows. The accumulators wrap silently in other configurations, for
example BPSK at N = 256 with 16-bit words, where the worst case needs 19
bits. Choose P to suit.

### Frame timing, cyclic prefix and stalls

- The control unit counts symbols. Its counter is the common ROM address
  `k`, and `first` (k = 0) makes every CAB start from zero instead of
  adding to the previous frame. No clearing cycle is needed.
- When symbol N-1 has been added, `frame_done` goes high. In the next cycle
  the N results are copied into the `cp_ps` output buffer, and the CABs
  are free for the next frame at once.
- `cp_ps` sends N + CP samples over a valid/ready stream: first
  x(N-CP) … x(N-1) (the cyclic prefix, `out_cp` high), then x(0) … x(N-1).
  `out_sof` marks the first sample of each OFDM symbol.
- **Latency:** if the output is idle, the first sample of a frame is valid
  one clock after the frame's last input bit was accepted.
- **Stall:** a finished frame waits in the accumulators while the buffer is
  still sending the previous one. `bit_ready` then drops (`stall` high)
  until the hand-over, so no result is ever overwritten. For QPSK at full
  rate a frame takes 32 input cycles and 20 output cycles, so stalls come
  only from back-pressure (`out_ready` low). For BPSK, N input bits yield
  N + CP samples, so a continuous stream stalls CP cycles per frame.

### Monitor

`sw[log2 N - 1 : 0]` (SW0–SW3 for N = 16) selects an element of the last
frame that was handed to the output buffer. `sw[log2 N]` (SW4) selects
the imaginary part (1) or the real part (0). The value appears on
`ledr` (LEDR0–LEDR14) one clock later. The use of SW4 for real/imaginary
is this design's choice.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `N` | 16 | IDFT length (power of two); number of CABs |
| `M` | 4 | constellation size: 2 (BPSK), 4 (QPSK), 16 (16-QAM) |
| `CP` | 4 | cyclic prefix length |
| `P` | 15 | word and accumulator width |

The ROM tables are produced from the formula at elaboration, so any `N`
works without data files. ROM size is 2·N²·P bits for BPSK and QPSK, and
twice that for 16-QAM. The accumulators take 2·N·P flip-flops, plus the
same again for the output buffer. At the defaults, synthesis gives about
1000 flip-flop bits, 184 adders/subtractors of 15 bits, and no multiplier.

## Where this design departs from the source, and what it adds

- **Clocked, not combinational.** The source gives processing time in
  gate delays: for BPSK, 9 gate delays (about 45 ns) after the last bit.
  This RTL is synchronous. A symbol is added at the clock edge where its
  last bit arrives, and the frame's first output sample follows one clock
  later.
- **Control unit.** The source says that the control unit generates the
  clock, starts transmission, drives the memory addresses and holds the
  cyclic prefix adder and the P/S converter. It does not show its
  insides. Here it is a symbol counter, a "frame waiting" flag, the
  `cp_ps` buffer and a valid/ready handshake on both ends. There is no
  clock generator; one clock is supplied from outside. The output buffer
  lets the next frame accumulate while the previous frame is sent, which
  is also this design's choice.
- **QPSK test input.** The published register trace for the first CAB
  lists the input pairs 11 11 11 00 10 01 11 01 10 10 00 01 01 10 00 01.
  Under the published decoder table, these pairs do not give the published
  results; they give them with the codes 01 and 11 exchanged. The
  decoder table is followed here. The testbench sends the symbols that
  produce the published results: -i -i -i 1 i -1 -i -1 i i 1 -1 -1 i 1 -1.
- **Word width.** The 16-point board build shows 15-bit results on 15
  LEDs, which is the default here. The 256-point comparison core is
  quoted with 16-bit data; run it with `P = 16`, or more to avoid wrap.
- **Memory size.** The source estimates (0.5·√M·N²·P) + 2NP bits of
  storage. This RTL stores complete a and b rows for every CAB (2·N²·P
  bits), without exploiting the symmetry of the twiddle matrix.
- **Overflow, reset, handshakes.** None of these are specified. The
  accumulators wrap. `rst_n` is an asynchronous active-low reset. The
  interfaces are valid/ready.
- The DAC that follows the transmitter is not part of the RTL. The
  `out_re`/`out_im` stream is where it connects.

## Verification

Each module has a self-checking testbench in `tb/`. Each one ends with
`TB_RESULT checks=<n> failures=<n>` and has a cycle watchdog. The
reference models in `tb/tb_ref_pkg.sv` are written independently of the
RTL: they use literal constellation tables and integer complex
multiplication by the rounded twiddle factors.

| testbench | what it shows |
|---|---|
| `tb_sp_dff` | symbol boundaries and bit order for M = 2, 4, 16 with random gaps |
| `tb_mapper_decoder` | exhaustive decode, including the QPSK truth table |
| `tb_twiddle_rom` | literal 22.5° multiples, conjugate symmetry, 16-QAM scaled words |
| `tb_cab` | the published first-CAB register trace step by step; the worked product W·(-3+3i); random 16-QAM |
| `tb_idft_cab_array` | all 16 published results bit-exact; random frames |
| `tb_cp_ps` | prefix order, marks, back-pressure, back-to-back loads |
| `tb_control_unit` | address/first sequence, frame_done timing, stalls, output content |
| `tb_monitor` | every switch setting |
| `tb_ofdm_tx_top` | default configuration end to end, 40 frames: the published frame bit-exact, one-clock latency, stalls, back-pressure, prefix, every decoder case, monitor |
| `tb_ofdm_tx_qam16` | 16-QAM (N = 16, P = 18) end to end, via `tb_ofdm_tx_run` |
| `tb_ofdm_tx_bpsk256` | BPSK, N = 256, P = 16 end to end (input stalls every frame), via `tb_ofdm_tx_run` |

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/ofdm_pkg.sv tb/tb_ref_pkg.sv tb/tb_ofdm_tx_top.sv --top-module tb_ofdm_tx_top
./obj_dir/Vtb_ofdm_tx_top
```

Replace the testbench name to run another one. The simulator has two
states only, so every register has a reset value. Compiling the 256-point
configuration takes under a minute, because the tables of 65 536 twiddle
words are computed at elaboration.
