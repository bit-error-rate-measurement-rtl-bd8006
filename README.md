# Single-chip BER measurement of an encrypted 2x2 MIMO link

This is a bit error rate (BER) test set that fits on one chip. A data
source sends blocks through a complete wireless transmitter, a fading radio
channel and a complete receiver, then counts how many bits come back wrong.
A software Monte Carlo run of the same link takes hours. In hardware, every
part of the link runs at clock speed, including the channel's random fading
and noise.

The data is protected twice before it goes on the link. First comes a block
cipher with *embedded error control* (CSEEC). It permutes the bits,
Manchester-codes them, masks them with a pseudorandom sequence and then
deletes part of the coded block. What it deletes is redundant for a receiver
that holds the key, and missing for anyone else. The link then scrambles the
bits with a PN sequence, interleaves them over 16383-bit frames, sends them
as BPSK over a 2x2 MIMO Rayleigh channel, and recovers them with a
maximum-likelihood (ML) detector.

The design follows the system published as "Bit Error Rate Measurement for
Wireless Communication System by VLSI". That
publication fixes the structure. Many details it leaves open were chosen
here; the section *Choices made here* lists them.

```
 data LFSR -> cseec_encrypt -> pn_encoder -> interleaver -> bpsk_mod ---> tx_sample
  (9-bit        (9-bit          (serial,      (16383-bit     (16 samples
   blocks)       cipher)         PN xor)        frames)        per bit)
                                                                 | antipodal symbols
                                                                 v
                         fading_gen (gains) ----------->  mimo_channel  (2x2, block fading)
                         fading_gen (noise, sigma_n) -->        |
                                                                v  r, h
 ber_counter <- cseec_decrypt <- pn_decoder <- deinterleaver <- ml_detector
 (bits, errors)                                                 (16 candidates / 16 cycles)
```

Every arrow is a valid/ready handshake. The slowest stage sets the pace:
the modulator, at 16 cycles per bit. Each interleaver stalls its producer
while it reads a frame out.

## The CSEEC cipher

### Block layout and permutations

A block holds 3 x 3 = 9 bits, D0..D8, numbered down the columns: D0, D1, D2
form the first column. A permutation array P lists, for each output cell,
the input bit that goes there: `out[i] = in[P[i]]`. In the worked example,
the array

```
5 7 2          D5 D7 D2
1 8 0   turns  D1 D8 D0
6 4 3          D6 D4 D3
```

the data block into the block on the right. `tb_block_perm` checks this
example bit for bit. The same module (`block_perm`) with `INVERSE = 1`
computes `out[P[i]] = in[i]`, which undoes the permutation.

### Encryption, step by step (`cseec_encrypt`)

1. **Pre-permutation** by P1 gives S.
2. **Parallel to serial, Manchester, serial to parallel.** S leaves one bit
   at a time (LSB first), and the Manchester encoder turns each bit b into
   the two chips `b, ~b`. The 18 chips are gathered back into the coded
   block T. Chip 2i goes to T[i], the *first chips*, which fill coded
   columns 0-2. Chip 2i+1 goes to T[9+i], the *second chips*, in columns
   3-5. So coded column c and column c+3 always hold the two chips of the
   same three data bits.
3. **Randomise:** U = T xor rSeq. rSeq is the next 18 output bits of the
   14-bit PRNG (an LFSR).
4. **Delete.** For each data column c, one of the two partner columns (c or
   c+3) is thrown away. The 3-bit delete selection P2 decides which: bit
   c = 1 keeps column c. The 3 columns left form the 3 x 3 block V.
5. **Post-permutation** by P3 gives the ciphertext C (9 bits).
6. **Update.** The PRNG has advanced 18 steps. The permutation set is
   replaced by `P1 <- P1 o K`, `P3 <- P3 o K` and
   `P2 <- rotl(P2) xor KD`, where `(P o K)[i] = P[K[i]]`.

Here is why the delete step loses nothing for the legitimate receiver. A
deleted chip is the complement of its surviving partner, before the PRNG
mask. The receiver knows the mask, and P2 tells it which chip survived. An
eavesdropper never sees the PRNG bits at the deleted positions. It also
does not know which positions were deleted, because the selection changes
every block.

### Decryption (`cseec_decrypt`)

Decryption runs the same steps backwards. It undoes P3, then re-expands V
to 18 chips (`col_restore`) and flags the deleted chips as erased. It
removes rSeq from the surviving chips and sends the chips serially into the
Manchester decoder. For each pair, the decoder takes the first chip, or the
inverse of the second chip when the first was erased. The 9 decoded bits
pass through the inverse of P1.

The receiver's `perm_update` and PRNG advance once per block, exactly as the
transmitter's do. Decryption therefore needs no earlier block to have
decrypted correctly: it only needs to see the same number of blocks.

### Key

`key_t` (in `ber_pkg`) holds the starting P1, P2 and P3, the update
permutation K and the update mask KD. `cfg_load` loads the key and the
14-bit PRNG seed on both sides. P1, P3 and K must be permutations of 0..8.

### Timing

Each side takes one block at a time. The output is valid 21 cycles
(2 x 9 + 3) after the block is taken and is held until `out_ready`. This
gives 22 cycles per block, or about 2.4 cycles per bit, well below the
modulator's 16.

## The link

**Encoder and decoder** (`pn_encoder`, `pn_decoder`). The encoder serialises
a word (8 bits by default, 9 in the system), LSB first. It XORs each bit
with the next bit of a 14-bit LFSR started from a 14-bit seed. The decoder
runs the same sequence and regroups the words. It holds a finished word
until the decryptor takes it.

**Interleaver and deinterleaver.** Each has one 16384 x 1 memory, a counter
that runs 1..16383 and a 14-bit maximal-length LFSR. The LFSR never
produces 0, so address 0 is unused and a frame is 16383 bits.

- The interleaver writes at the counter address and reads at the LFSR
  address.
- The deinterleaver writes at the LFSR address and reads at the counter
  address.
- The LFSR restarts from `SEED` (1) at every frame, so both sides use the
  same order.

A control unit alternates two phases:

- **WRITE:** takes `bIn` on `newBit` while `in_ready` is high.
- **READ:** fills the output register `bout`, flagged by `bitReady`, and
  refills it each time the consumer takes the bit (`bitReady && !hold`).
  `hold` keeps the current bit. `in_ready` is low for the whole read phase.

Reading takes one bit per cycle when nothing holds it. So the transmitter
reads after it has written a frame, and the receiver writes the next frame
after it has read the last one out.

**BPSK modulator** (`bpsk_mod`). Each bit occupies one carrier period of 16
samples:

- a 1 sends `round(127 sin(2 pi (k + 0.5) / 16))`, k = 0..15;
- a 0 sends the negated samples.

So a 1 starts its period with positive samples and a 0 with negative ones.
The samples are brought out as `tx_sample`. The modulator hands the
antipodal symbol (+1 / -1) of each period it has sent to the channel model,
from a one-entry register loaded with the period's last sample. If the
channel has not taken the previous symbol by then, the modulator pauses on
that last sample, so every symbol the channel sees belongs to a carrier
period that was actually sent.

**Channel** (`mimo_channel`). Four consecutive symbols form a space-time
(ST) symbol: bit k goes to antenna k mod 2, in time slot k div 2. For
receive antenna j and slot t, the channel forms

```
r[j+2t] = h[2j] s[0][t] + h[2j+1] s[1][t] + n[j+2t]
```

The gains h are the last four Rayleigh variates of one fading generator,
held for both slots. The noise n is the last four Gaussian variates of a
second generator, scaled by `sigma_n`. Because s is +1 or -1, no multiplier
is needed. The gains go to the detector together with r: the receiver is
assumed to know the channel.

## Fading variate generator (`fading_gen`)

With u1 and u2 uniform on (0,1), `r = sqrt(-2 ln u1)` is Rayleigh
distributed and `g = r cos(2 pi u2)` is standard normal. This is the
Box-Muller route. Instead of iterative log and square-root units, r comes
from a piecewise-linear table over a hybrid segmentation of u1 (16 bits):

- (0, 0.5) is cut into octaves towards 0: segment p holds
  u1 in [2^p, 2^(p+1)) / 2^16.
- [0.5, 1) is cut into octaves towards 1, measured as 1 - u1. This is where
  the function is steep.
- Each octave is cut uniformly into 4 sub-segments.

The addressing unit finds the leading one of u1 (or of 2^16 - u1). That
position p, the half and the next two bits form a 7-bit address. The 12
bits after them form the offset x, in [0,1). The coefficient memory
(`fading_coef.hex`, 128 words `{a, b}`, both signed Q3.12) gives
`r = b + a x`.

The coefficients are least-squares line fits of `sqrt(-2 ln u1)` over all
16-bit u1 in each sub-segment. The worst error is about 0.002. The cosine
comes from a 64-entry quarter-wave table (`fading_cos.hex`, entry i =
`round(32767 sin(pi/2 (i + 0.5)/64))`), addressed by the top 8 bits of u2.
u1 and u2 come from 16-bit and 18-bit LFSRs, advanced 16 steps per sample.

The generator is pipelined and gives one sample per cycle. The output
appears 4 clock edges after `en`. Formats: `rayleigh` unsigned Q4.12,
`gauss` signed Q3.12 (saturated), `sigma_n` unsigned Q4.12.
`tb_fading_gen` checks every output against real arithmetic. It also checks
E[r^2] = 2, and a Gaussian mean of 0 with variance sigma^2.

Both `.hex` files are read with `$readmemh("rtl/...")`, so simulations must
run from the directory that holds `rtl/`.

## ML detector (`ml_detector`)

For each ST symbol, the detector tries all 16 candidate symbol matrices S.
It computes

```
cost(S) = sum over j,t of ( r[j+2t] - sum_i h[2j+i] s[i][t] )^2
```

and outputs the candidate with the least cost.

- **Cost datapath:** one datapath serves all 16 candidates, one per cycle.
  Stage A forms the four errors (additions only). Stage B squares them with
  four multipliers. Stage C adds the squares.
- **FIFO section:** a tag shift register moves each candidate's index along
  with its cost.
- **Search section:** three comparators. Even candidates go to comparator 1
  (running minimum M1) and odd ones to comparator 2 (M2), so each
  registered comparator sees a new value only every other cycle. After the
  16th cost, comparator 3 picks the smaller of M1 and M2; M1 wins a tie.

A new ST symbol can enter every 16 cycles, which gives a symbol rate of
Fclk/16. A decision leaves 21 cycles after its symbol entered: 16 cost
cycles plus the pipeline. Decisions wait in a two-entry queue. The detector
takes a new symbol only when the queue has room for it.

In the system, a 4-bit shift register turns each decision back into a bit
stream (bit 0 first) for the deinterleaver. One ST symbol carries 4 bits
and needs 64 modulator cycles, so the detector has slack. It still holds
the channel up while the deinterleaver reads a frame out.

## BER counting (`ber_counter`)

The data source is a 14-bit LFSR that gives 9 new bits per block. The BER
counter runs an identical LFSR from the same seed and compares every
decrypted block with it. It counts bits, bit errors and blocks, in 32-bit
saturating counters; BER = `err_count / bit_count`. `cfg_load` clears the
counters.

## Choices made here

The published description fixes the block structure, the 3 x 3 cipher
block, the order of the cipher steps, the interleaver memory, counter and
LFSR, the port names of the interleaver, the BPSK phase rule, the ML
detector's 16 candidates, 4 multipliers, 3 comparators and Fclk/16 rate,
and the segmentation idea of the fading generator. The following were
chosen here:

- **Manchester convention** `b -> b, ~b`, and the chip layout in the coded
  block.
- **Delete rule:** one column of each Manchester pair is deleted, so 3 of
  the 6 coded columns. The published description names a delete step but
  no count. This rule makes every deletion recoverable, so the ciphertext
  is as long as the plaintext.
- **Permutation update rule:** composition with K, and rotate-and-XOR for
  P2.
- **LFSR polynomials:** x^14+x^13+x^12+x^2+1 (period 16383) for all 14-bit
  registers; x^16+x^15+x^13+x^4+1 and x^18+x^11+1 for the uniform sources.
- **Encoder:** read as a PN scrambler, because the code is not specified.
  No forward error correction code is built.
- **Baseband channel:** it carries real-valued Rayleigh gains and real
  Gaussian noise, with block fading over the two slots of an ST symbol.
  The RF stage (the local oscillator) is not built. The modulator's carrier
  samples are only an output.
- **Sizes:** 16 samples per bit, amplitude 127, 4 sub-segments per octave,
  all fixed-point widths, and the coefficient values.
- **Control:** the interleavers' two-phase control and every handshake,
  queue and latency figure above.
- **Data source:** the system's words on the link are 9 bits, the cipher
  block size. The encoder's standalone default is the 8 bits the published
  description gives.

## Verifying and simulating

Every module has a self-checking testbench in `tb/`, named `tb_<module>`.
Each one computes its expected values independently: a cipher model written
from the algorithm, real-arithmetic Rayleigh and Gaussian values, an
exhaustive ML search, and LFSR models. Where timing is stated above, the
testbenches check it too: the 21-cycle cipher latency, the 16-cycle ML
interval and 21-cycle ML latency, 16 samples per bit, and one interleaver
bit per cycle. Each ends by printing `TB_RESULT checks=N failures=M`.

`tb_ber_system` runs the whole system at its default sizes. It takes about
2 million cycles, a few seconds of simulation:

- **Without noise:** two full interleaver frames (32769 bits, 3641 blocks)
  come back with zero bit errors.
- **With sigma_n = 2.0:** the counted BER is about 0.125, below the 0.5
  limit the testbench checks.
- **Mechanisms:** it also fails if any of these never happens: the
  interleaver and deinterleaver changing phase, each output being held, ML
  decisions, both delete selections, the per-block permutation update, and
  both carrier polarities.

To run one testbench with Verilator, from the directory that holds `rtl/`
and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb rtl/ber_pkg.sv tb/tb_ber_system.sv \
          --top-module tb_ber_system -o sim
./obj_dir/sim
```

Replace `tb_ber_system` with any other testbench name. `ber_pkg.sv` must
come first, because it holds the shared types (block, permutation, key and
channel matrices) and the sizes.

## Files

| file | contents |
|---|---|
| `rtl/ber_pkg.sv` | sizes, types, permutation functions |
| `rtl/ber_system.sv` | top level: the whole chain |
| `rtl/cseec_encrypt.sv`, `rtl/cseec_decrypt.sv` | cipher |
| `rtl/block_perm.sv`, `rtl/col_delete.sv`, `rtl/col_restore.sv`, `rtl/perm_update.sv` | cipher steps |
| `rtl/p2s.sv`, `rtl/s2p.sv`, `rtl/manchester_enc.sv`, `rtl/manchester_dec.sv` | serial conversion and Manchester code |
| `rtl/lfsr.sv` | every pseudorandom source |
| `rtl/pn_encoder.sv`, `rtl/pn_decoder.sv` | link encoder and decoder |
| `rtl/interleaver.sv`, `rtl/deinterleaver.sv` | 16383-bit frame interleavers |
| `rtl/bpsk_mod.sv`, `rtl/mimo_channel.sv` | modulator and channel |
| `rtl/fading_gen.sv`, `rtl/fading_coef.hex`, `rtl/fading_cos.hex` | Rayleigh / Gaussian generator and its tables |
| `rtl/ml_detector.sv` | ML detector |
| `rtl/ber_counter.sv` | BER counters |
