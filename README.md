# 5G NR polar coding in hardware: encoder, rate recovery and list decoder

5G New Radio protects its control channels (downlink DCI, uplink UCI) with
polar codes. A block of K bits, made of a message plus a CRC, is placed on the K
most reliable of N = 2^n synthetic bit channels. The other N−K channels are
frozen to zero. The vector is multiplied by the generator matrix
G_N = [1 0; 1 1]^⊗n, and the N-bit codeword is then cut or repeated to the E
bits the physical channel carries. The receiver reverses the rate matching and
decodes the result with a successive-cancellation *list* decoder. The decoder
keeps up to L candidate paths through the decoding tree, and the CRC picks the
right candidate at the end.

This RTL implements that chain as three independent IP blocks. They form the
programmable-logic part of a processor + FPGA system-on-chip:

```
             msg bits          I/Q words       (channel: software)      I/Q words          LLRs            bits
 DMA  ──► polar_encoder_ip ──────────────► DMA ─────────────────► rate_recover_ip ──► polar_decoder_ip ──► DMA
              ▲ AXI4-Lite                                             ▲ AXI4-Lite         ▲ AXI4-Lite
```

`polar_soc_top` instantiates the three IPs. The rate-recover IP feeds the
decoder directly over an internal AXI4-Stream. Every other stream, each
AXI4-Lite control bus and each interrupt is a top-level port. The processor,
DDR memory, DMA engine and the noisy channel model sit outside this RTL.

## Signal chain

Transmitter (`polar_encoder_ip`):

1. **CRC attachment** (`crc_unit`): CRC6 (x^6+x^5+1), CRC11 (0xE21) or CRC24C
   (0x1B2B117), computed by serial long division. Each dividend bit takes
   three states (shift in, test the leading bit, XOR or copy), so a division
   of NB bits takes 3·NB+2 cycles.
2. **Input interleaving** (`il_pattern`, downlink only, iIL = 1): the pattern
   for length K is obtained from the 164-entry master table of TS 38.212 by
   keeping the entries ≥ 164−K and subtracting 164−K from them. This takes
   164 cycles. Software loads the master table.
3. **Polar encoding** (`polar_encoder_core`): the interleaved bits are placed
   at the information positions of u, then c = u·G_N is produced one bit per
   cycle. G_N is never stored, because G_N(i,j) = 1 exactly when the bit set
   of j is a subset of the bit set of i. Each column is formed on the fly and
   reduced with an N-input XOR. Latency is 2N+1.
   Parity-check (PC) positions, given by the PC mask, follow TS 38.212: a
   5-bit register y0..y4 rotates once per channel. A PC bit copies y0, and
   every information or PC bit is XORed into y0.
4. **Rate matching** (`rate_matcher` with `bil_addr_gen`):
   - 32-way sub-block interleaving.
   - Bit selection:
     - repetition if E ≥ N;
     - puncturing (the last E bits are kept) if K/E ≤ 7/16;
     - shortening (the first E bits are kept) otherwise.
   - For uplink (iBIL = 1), the triangular bit interleaver.

   All three steps are address arithmetic on the stored codeword, one bit per
   cycle.
5. **Modulation** (`modulator`): BPSK, QPSK, 16QAM or 64QAM per TS 38.211.
   Levels are scaled by 1/√2, 1/√10 or 1/√42, in fixed point.

Receiver (`rate_recover_ip`, `polar_decoder_ip`):

6. **Soft demodulation** (`soft_demodulator`): max-log LLRs. The sign gives
   the bit (positive = 0) and the distance to the decision boundary gives the
   magnitude. There is no noise-variance scaling.
7. **Rate recovery** (`rate_recover`): the E LLRs are written to a buffer
   through the inverse bit interleaver. The N mother-code LLRs are then read
   out in codeword order:
   - punctured positions get 0 (no information);
   - shortened positions get the largest positive LLR (a known 0);
   - with repetition, the first N received values are used.
8. **CA-SCL decoding** (`scl_decoder`, next section).

## The list decoder

`scl_decoder` is the largest and least obvious part of the design.

**Tree and memories.** For N = 2^n the decoder walks the bit channels
φ = 0..N−1 in order. Layer λ of the tree (1..n) holds β = 2^(n−λ) LLRs. Each
path slot has one LLR memory in which layer λ occupies addresses [β, 2β). The
channel LLRs (layer 0) sit in a separate shared memory `ch_mem`, which the IP
fills as the LLR stream arrives.

**Lazy copies with pointer rows.** When a path forks, copying its whole LLR
memory would cost N cycles. Instead every slot l has a row `ptr[l][λ]` naming
the slot whose memory holds layer λ for path l. A new path copies only its
parent's pointer row. A path writes only its own memory. A phase starting at
layer s reads layer s−1 through the pointer, and every deeper layer it has
just written itself. Shared data is therefore never overwritten while another
path still needs it. The partial sums (C0/C1, the bit estimates of the left and
right child at every layer), the decided bits û and the path metric are
registers. They are copied whole, in the same cycle, when a path forks.

**One phase.**

1. *LLR update.* The start layer is s = 1 for φ = 0, otherwise s = n − (number
   of trailing zeros of φ). The step at layer s is a g operation, using the
   left sibling's partial sums. The steps below it are f operations. Each
   f or g takes one cycle per LLR per active path, through a single shared
   `f_unit` / `g_unit` pair.
2. *Decision.*
   - Frozen bit: every path takes u = 0, and its metric grows by |LLR| if the
     LLR points to 1.
   - Parity-check bit: the same, except that each path takes u = y0 from its
     own parity register (see step 3 of the transmitter) and pays |LLR| if the
     LLR disagrees. The register is copied along with the path when it is
     cloned.
   - Information bit: every active path forks. With leaf LLR P, the u = 0 fork
     keeps the metric PM if P > 0 and pays PM+|P| otherwise; the u = 1 fork the
     reverse. `scl_prune` ranks all 2·L candidates (rank = number of strictly
     better candidates, ties to the lower index) and keeps the `list_size`
     best, meaning the smallest metrics. A path whose two forks both survive
     is cloned into a free slot. A path with no surviving fork frees its slot.
3. *Partial-sum update* (odd φ only). The B step combines the two children of
   a node: left = C0 ⊕ C1, right = C1. It moves up one layer per cycle, for
   all paths at once, as long as the node is a right child.

**End of block.** After φ = N−1 the K information bits of every path are
gathered and deinterleaved through the input-interleaver pattern, back to the
transmitted order. One `crc_unit` per path then checks them in parallel. The
decoder chooses the path with the smallest metric among those whose CRC
remainder is zero. If none passes, it outputs the best-metric path and
reports `crc_ok = 0`; the IP turns this into its error interrupt. With
`list_size = 1` the same hardware is a plain SC decoder.

**Timing.** One cycle per f/g operation per path, one per decision, one per
partial-sum layer, then K cycles of gather and 3K+2 cycles of CRC check. Every layer costs N operations per path over a block, so a block needs at
most list_size · N · log2 N LLR cycles (fewer while the list is still
filling) plus about 2N cycles of decisions and updates. For N = 1024 and
L = 4 that is at most about 43 k cycles. Measured for K = 1011, N = 1024,
L = 4, rate recovery plus decoding took 48 k cycles. Encoding K = 1018 into
E = 2048 QPSK bits took 11.3 k cycles, from start to the last symbol word.

## Fixed point

Every soft value (received samples, LLRs) is a (14,8) number: 14-bit two's
complement, 8 integer bits including sign, 6 fractional bits, so 1.0 = 64.
The g operation and the rate-recovery constants saturate to ±8191. The path
metric is 24 bits unsigned, which is enough for N = 1024 at the largest LLR.
The modulator's constellation constants are 45, 20 and 10: 1/√2, 1/√10 and
1/√42 times 64, rounded.

## Software interface

All three IPs share the same AXI4-Lite register block (`axil_regs`), with a
7-bit byte address and 32-bit data:

| Address | Register | Function |
|---|---|---|
| 0x00 | CTRL | Write bit0 = 1 to start. Any CTRL write clears the error flag. Read: bit0 ap_start, bit1 ap_done (sticky, cleared by the read), bit2 ap_idle. |
| 0x04 + 4(i−1) | PARAMi | Job parameters, see below. |
| 0x40 | TBL_ADDR | Table address. Increments after each TBL_DATA write. |
| 0x44 | TBL_DATA | Table write. |
| 0x48 | STATUS | bit0 error. The `interrupt` port carries the same flag. |

Parameters:

| IP | PARAM1 | 2 | 3 | 4 | 5 | 6 | 7 |
|---|---|---|---|---|---|---|---|
| encoder | msgLen (K−crcLen) | E | crcLen | nMax (9 DL, 10 UL) | iIL | iBIL | mod |
| rate recover | K | E | N | iBIL | mod | – | – |
| decoder | K | E (unused) | N | L (1..4) | crcLen | nMax (unused) | iIL |

`mod` is 0 BPSK, 1 QPSK, 2 16QAM, 3 64QAM.

Tables, used by the encoder and the decoder:
- Addresses 0..31 hold the information-bit mask. Bit b of word w is channel
  32w+b, and 1 means an information bit.
- Addresses 32..63 hold the parity-check (PC) mask, laid out the same way.
  It must not overlap the information mask. Leave it all zero for CA-polar.
- Addresses 256..419 hold the interleaver master table.

Software must compute the mask: the K most reliable channels of the TS 38.212
reliability sequence, excluding the positions that rate matching will
puncture or shorten.

Streams are 32-bit AXI4-Stream words with TLAST on the last word of a block:

| Stream | Contents |
|---|---|
| encoder in | one message bit per word, in TDATA[0] |
| encoder out | ceil(E/bps) symbols, each as two words, I then Q, sign-extended (14,8) |
| rate recover in | the same format as the encoder output |
| rate recover out / decoder in | N sign-extended LLRs in codeword order |
| decoder out | K bits, one per word, message first and CRC last |

Parameters outside the supported range raise the error interrupt, and the job
ends without consuming data:
- K > 1023;
- E > 8192 or E < K;
- N not a power of two in 32..1024;
- crcLen other than 6, 11 or 24;
- list size outside 1..4;
- input interleaving (iIL = 1) with K > 164, the interleaver's length.

## Departures and limits

- **Parity-check positions are chosen by software.** PC-polar (uplink
  payloads of 12 to 19 bits) is encoded and decoded, but which channels carry
  the nPC and nPCwm bits is written in the PC mask, not derived in hardware.
- **Frozen mask and interleaver table are loaded, not built in.** The
  1024-entry reliability sequence and the 164-entry interleaver table come
  from TS 38.212. Software writes the mask and the table through the table
  port.
- **No DCI-specific CRC handling.** The CRC is not initialised with 24 ones,
  and there is no RNTI scrambling.
- **Rate recovery of repeated bits.** Only the first N values are used;
  repeated copies are not combined.
- **Rate-recover output length.** The rate-recover IP outputs N LLRs, the
  decoder's input length, rather than E.
- **Path metric.** The metric is a penalty: smaller is better. Pruning keeps
  the smallest metrics.
- **Soft demodulation.** The demodulator applies no noise-variance scaling.
  The SCL decoder's decisions do not depend on a common scale factor.
- **Generator matrix.** G_N is generated on the fly instead of stored. The
  encoder computes one codeword bit per cycle with a full-width XOR, not a
  4-way partitioned product.
- **Word length.** The word length is fixed at (14,8). A floating-point
  variant is not provided.

## Verification

`tb/` holds one self-checking testbench per module. Each prints
`TB_RESULT checks=N failures=M`, and each has a watchdog. The reference model
`tb/polar_ref_pkg.sv` is written independently of the RTL: CRC, N selection,
a polarization-weight reliability order used to build test masks, encoding by
butterflies, rate matching and recovery, and constellations.
`tb/axil_bfm.svh` is a small AXI4-Lite master shared by the IP testbenches.

| Testbench | What it checks |
|---|---|
| `tb_polar_soc_top` | The whole chain, at the top's defaults: random messages, reference-checked symbols, Gaussian noise added in the testbench, decoded blocks compared bit for bit. It covers every CRC length and modulation, puncturing, shortening, repetition, both interleavers, list sizes 1, 2 and 4, K up to 1011 with N = 1024, and two PC-polar blocks. It counts each mechanism (pruning, cloning, a CRC-rejected candidate, …) and fails if one never happened. |
| `tb_polar_workloads` | Twelve block sizes typical of control-channel use, from K = 20 to K = 1018 and N up to 1024, through the whole chain with list size 4. It prints the cycle counts quoted above. |
| `tb_scl_decoder` | At list size 1, bit-exact against a recursive reference SC decoder on very noisy input. At list sizes 1, 2 and 4, recovery of CRC-protected blocks, with and without three parity-check bits. On pure noise, CRC failure. |
| `tb_crc_unit` | The 3·NB+2 latency. |
| `tb_il_pattern` | The 165-cycle pattern build. |
| `tb_polar_encoder_core` | The 2N+1 latency, and parity-check bits against the standard's shift-register rule. |
| IP testbenches | Random valid gaps and back-pressure on the streams. |

To simulate with Verilator 5 (the same form works for any testbench):

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/polar_pkg.sv tb/polar_ref_pkg.sv tb/tb_polar_soc_top.sv \
    --top-module tb_polar_soc_top -Mdir build -o sim
./build/sim
```

Verilator lint leaves a few warnings on purpose:
- unused upper TDATA bits of the 32-bit stream words;
- unused low AXI address bits;
- the LLR_F constant, which documents the format.
