# 64-point FFT/IFFT processor, radix-2³ single-path delay feedback

This is a streaming 64-point FFT/IFFT engine for OFDM-style receivers and transmitters. It takes one complex sample per clock in natural order and returns one transformed sample per clock in bit-reversed order. A 64-point transform is two radix-8 stages (64 = 8 × 8). Each radix-8 stage is computed by one **radix-2³ processing element** (PE): three radix-2 butterflies with feedback buffers (single-path delay feedback, SDF), plus two cheap multipliers between the butterflies. The whole transform then needs:

- one general complex multiplier, for the W64 twiddles between the two PEs;
- two constant multipliers, which only multiply by 1/√2;
- no twiddle ROM: all 64 twiddle factors are derived from 17 quarter-wave constants.

The inverse transform runs on the same hardware. Real and imaginary parts are exchanged on the way in and on the way out, and the result is divided by 64.

The architecture follows the radix-2³ SDF processor described in *Implementation of 64-Point FFT/IFFT by Using Radix-8 Algorithm*. That description gives the block structure but not the control, the number format or the arithmetic details. Those were designed here; section 7 lists them.

## 1. Data path

```
 in ──► ifft_in_swap ──► r23sdf_pe N=64 ──► cmplx_mult_w64 ──► r23sdf_pe N=8 ──► ifft_out_scale ──► out
        (swap re/im        BF2I  [32]        W64^e, e from        BF2I  [4]         swap back,
         in IFFT mode)     -j                sample position      -j                ÷64 (IFFT),
                           BF2II [16]                             BF2II [2]         out_k = bitrev
                           ×W8^e                                  ×W8^e
                           BF2III [8]                             BF2III [1]
```

The numbers in brackets are feedback-buffer depths in complex words, 63 words in total. Each box is one module in `rtl/`:

| module | role |
|---|---|
| `fft64_r23sdf` | top: wiring, flow control, per-frame FFT/IFFT mode bookkeeping |
| `r23sdf_pe` | radix-2³ PE: BF2I → −j → BF2II → W8 → BF2III |
| `bf2_sdf` | radix-2 SDF butterfly with its feedback buffer |
| `sdf_delay_line` | feedback buffer: D-word memory with a circular pointer |
| `neg_j_mult` | multiplication by −j (swap and negate) |
| `const_mult_w8` | multiplication by W8^e, e = 0..3, with the one constant 1/√2 |
| `cmplx_mult_w64` | twiddle multiplier between the PEs: four Booth multipliers |
| `twiddle_gen_w64` | W64^e from a 17-entry quarter cosine, without ROM |
| `booth_mult_fw` | radix-4 modified Booth multiplier with a fixed-width rounded product |
| `ifft_in_swap` | input FFT/IFFT multiplexer with the re/im swap; holds the mode for a frame |
| `ifft_out_scale` | output swap, ÷64, FFT/IFFT multiplexer, bin index |
| `fft_pkg` | quarter-wave cosine constants, rounding and bit-reversal helpers |

## 2. How a radix-8 stage becomes three radix-2 butterflies

This is the core of the design. The multiplier schedules below follow from it.

Take a stream of N samples, with N = 64 for the first PE and N = 8 for the second. Split the input index as n = (N/2)·n1 + (N/4)·n2 + (N/8)·n3 + n′. Split the output index as k = k1 + 2·k2 + 4·k3 + 8·k′. Then the DFT exponent nk (mod N) separates into:

```
W_N^(nk) = (-1)^(n1 k1)                       → BF2I   (butterfly over n1)
         · (-j)^(n2 k1) · (-1)^(n2 k2)        → -j, then BF2II
         · W8^(n3 (k1 + 2k2)) · (-1)^(n3 k3)  → W8 constant multiplier, then BF2III
         · W_N^(n′ (k1 + 2k2 + 4k3))          → twiddle after the PE
         · W_(N/8)^(n′ k′)                    → the next (smaller) transform
```

In an SDF pipeline, each butterfly with buffer depth D emits first all D sums of a 2D-sample block, then all D differences. After the three butterflies, the sample at position t inside the block therefore carries t = {k1, k2, k3, n′}, most significant bit first. With L = log2 N, each multiplier reads its selection straight from the position counter:

| where | applies | when |
|---|---|---|
| after BF2I | −j | t[L−1] = 1 and t[L−2] = 1 |
| after BF2II | W8^(t[L−1] + 2·t[L−2]): 1, (1−j)/√2, −j or (−1−j)/√2 | t[L−3] = 1 |
| after the N = 64 PE | W64^e, e = t[2:0] · (t5 + 2·t4 + 4·t3) mod 64 | every sample (e = 0 passes exactly) |

The second PE (N = 8) takes the eight interleaved 8-point transforms left over and needs no twiddle after it. At the output, position t holds bin k = bitrev6(t). `ifft_out_scale` reports this as `out_k`, so results can be written to a buffer in natural order.

## 3. The SDF butterfly and flow control

`bf2_sdf` counts valid input samples modulo 2D:

- **First half of each block:** the input is written into the D-word buffer. The stage outputs the buffer's oldest word, which is a difference left by the previous block.
- **Second half:** the input x[n+D] meets x[n] leaving the buffer. The stage outputs x[n] + x[n+D] and writes x[n] − x[n+D] back into the buffer.

Each stage registers its output. Each stage also counts the positions of its outputs from the first valid one. The −j, W8 and W64 selections are decoded from these counts, so there is no global sequencer.

**Flow control.** Every register in the pipeline moves only on a cycle with `in_valid` high:

- A gap in the input stalls the whole pipeline, and it resumes without loss.
- Valid flags travel with the data, so nothing is reported until the buffers hold real samples.
- The price is that results still inside the pipeline leave only as further samples are pushed in. To drain the last frame, feed 73 or more further samples, for example zeros.

**Frames.** Frames are 64 consecutive valid samples counted from reset. There is no frame-start input, so after reset the stream must begin on a frame boundary.

## 4. Multipliers

**Twiddles without ROM** (`twiddle_gen_w64`). The exponent e is split into a quadrant e[5:4] and a step e[3:0]. cos(r·π/32) and sin(r·π/32) = cos((16−r)·π/32) are read from one 17-entry constant list, cos(k·π/32) for k = 0..16. The quadrant then swaps the two and sets their signs. The list is stored at 30 fractional bits and rounded to the coefficient width. A coefficient has two integer bits, so W^0 = +1.0 is exact: Q2.18 for the default 20 bits.

**Fixed-width Booth multiplier** (`booth_mult_fw`). The coefficient is recoded into radix-4 Booth digits in {−2..2}, which gives 10 partial products for 20 bits. The partial products are summed. The product is then returned at data width, rounded half up once after the full sum. Rounding once, rather than dropping low partial-product columns and adding a compensation constant, is the most accurate fixed-width result. How the original fixed-width multiplier compensates is not described, so this is this design's choice.

**Constant multiplier** (`const_mult_w8`):

- W8¹ and W8³ need only (a ± b)·(1/√2), with 1/√2 = 185364 / 2¹⁸.
- W8² = −j is a swap and a negation.
- W8⁰ passes the sample through.

## 5. Inverse transform

IDFT(x) = swap(DFT(swap(x))) / 64, where swap(a + jb) = b + ja. `ifft_in_swap` samples `ifft` with the first sample of each frame and holds it for the rest of the frame. The top records each frame's mode in a four-entry history, which is enough because at most two frames are in flight. `ifft_out_scale` applies the swap and the ÷64 (arithmetic shift by 6, rounded half up) only to results of IFFT frames. FFT and IFFT frames can therefore alternate freely in one stream.

## 6. Interface, number format and timing

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `in_valid` | in | 1 | a sample is presented; the pipeline advances |
| `ifft` | in | 1 | 1 = inverse transform; read with the first sample of each frame |
| `in_re`, `in_im` | in | DW | input sample, two's complement |
| `out_valid` | out | 1 | one-cycle pulse per result |
| `out_re`, `out_im` | out | DW | result |
| `out_k` | out | 6 | bin (or time) index of the result |
| `out_ifft` | out | 1 | mode of the frame the result belongs to |

**Parameters.** `DW` = 20 is the data bits per component. `CW` = 20 is the coefficient bits, and must be ≤ 31. Both defaults come from the 20-bit multiplier width of the published design.

**Word growth.** Every stage keeps DW bits, and sums wrap. FFT results are not scaled, so inputs need 6 bits of headroom for the 64-point sum and a little more for complex rotation: keep |re|, |im| < 2^(DW−1)/(64·√2), which is 5792 for DW = 20. The IFFT path divides by 64 at the end, so the same input limit applies there.

**Latency.** Result j of the stream is presented in the cycle after input sample j + 73 is accepted. That is 63 samples in the feedback buffers plus 10 register stages.

**Accuracy.** Measured on random full-range frames, the largest FFT error against a double-precision DFT was 4 LSB. IFFT results agree within 1–2 LSB after the ÷64.

## 7. Relation to the published architecture

**Taken from it:**

- the radix-2³ SDF organisation;
- the 64-point stage layout (buffers 32, 16, 8 | W64 | 4, 2, 1);
- the −j and constant-multiplier positions in the PE;
- one complex multiplier and two constant multipliers (its multiplier-count table, 64-point column);
- ROM-less twiddle generation with a reconfigurable complex multiplier;
- fixed-width modified Booth multiplication;
- the 20-bit multiplier width;
- the FFT/IFFT multiplexers with a swap box and a ÷64 stage.

**This design's own choices:**

- the `in_valid`-driven stall-and-push flow control and the drain requirement;
- position counters in each butterfly instead of a central controller;
- the buffer built as a memory with a circular pointer;
- the per-frame mode latch and mode history;
- the twiddle-generation method (quarter-wave table plus symmetry);
- the Booth rounding scheme and half-up rounding everywhere;
- the constant data width with headroom rule;
- the register stages after the constant multiplier, the twiddle multiplier and the input/output stages;
- the `out_k` / `out_ifft` outputs.

**Not provided:**

- The published work also mentions a generator producing R2³SDF, R2³MDC and memory-based cores of other sizes, but does not describe it.
- The radix-2 and radix-2² SDF elements appear there only as points of comparison.
- A simulation waveform is published, but its number format is not explained. Its values were not used as test vectors.

## 8. Simulating

Every module has a self-checking testbench `tb/tb_<module>.sv` that prints `TB_RESULT checks=N failures=M`. The reference values are computed independently in the testbench, with double-precision DFTs and real-valued twiddles. For example:

```
verilator --binary --timing -Irtl -y rtl rtl/fft_pkg.sv tb/tb_fft64_r23sdf.sv \
          --top-module tb_fft64_r23sdf -o simv
./obj_dir/simv
```

`tb_fft64_r23sdf` runs the top at its default parameters. It streams eight frames: an impulse, tones and random data. The frames switch between FFT and IFFT in both directions, and random input gaps stall the pipeline. Two zero frames follow to drain the last results. Every result is checked for value, bin index, frame mode and latency. The test also fails if no stall or no mode switch in either direction took place.

`tb_ofdm_roundtrip` uses the processor the way an OFDM modem would. Four symbols of QPSK data on all 64 subcarriers go through the IFFT. The time-domain results, put back in natural order with `out_k`, come back through the FFT in the same stream. Every subcarrier must be recovered within 64 LSB and decode to the same symbol. The worst error seen is 8 LSB on an amplitude of 4000.

The unit testbenches cover the remaining blocks. `tb_r23sdf_pe` checks both PE sizes against the 8-point DFT formula of section 2. `tb_cmplx_mult_w64` checks every position's twiddle, and `tb_twiddle_gen_w64` checks all 64 factors. The others check the butterfly, delay line, Booth multiplier, W8 and −j multipliers, and the input and output stages.

To change the data width, override `DW`/`CW` on `fft64_r23sdf`. The transform length is fixed at 64. Another power of 8 would need a further PE and a wider twiddle generator.
