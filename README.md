# Replicated LDPC decoders for SoC-FPGA Monte Carlo verification

An FEC decoder is hard to verify by HDL simulation. Errors inside it tend to
be corrected away, and error-rate curves need millions of codewords. The
approach this RTL serves puts the decoder under test into the programmable
logic (PL) of a Zynq-class SoC FPGA, many copies at once. The processor cores
(PS) do everything that is easier in software: random information words,
encoding, modulation, Gaussian noise, demodulation to soft values, a
C reference decoder, mismatch counting and codeword/bit-error-rate
bookkeeping. Each processor thread owns one *computation unit* in the PL. It
packs the soft inputs of several codewords into one word per code element,
streams them through an HP port, and gets back one packed word of decoded
bits per element.

This repository holds the PL side in synthesizable SystemVerilog:

* a layered Normalized Min-Sum decoder for the CCSDS telecommand (128,64)
  binary LDPC code, with 3-bit soft input and hard output;
* its AXI-Stream wrapper, which takes 128 transfers in and sends 128 out per
  codeword;
* the stream DEMUX and MUX that split and join the packed words;
* the computation unit (DEMUX, R decoders, MUX) and a top with NUM_CU units.

By default there are 4 units of 4 decoders, 16 replicas in all. That is the
largest set-up of the original flow: a 4-core Cortex-A53 board with four
threads and four hardware decoders per thread.

```
            PS thread u (software)                     PL (this RTL)
 ┌──────────────────────────────────┐     ┌──────────────────────────────────────────────┐
 │ R x {random word, encode, BPSK,  │     │ computation_unit u                           │
 │      AWGN, 3-bit LLR}            │     │                 ┌─ decoder_axis 0 ─┐         │
 │ pack: word i = {llr_R-1[i], ..., │ HP/ │ s_* ─► axis_demux ─ decoder_axis 1 ─ axis_mux ─► m_*
 │               llr_0[i]}          │ DMA │   32-bit        ├─   ...           ┤  32-bit │
 │ unpack, compare with reference   │◄───►│                 └─ decoder_axis R-1┘         │
 │ decoder (mismatch) and with the  │     │   each decoder_axis = RX buffer +            │
 │ sent codeword (CER/BER)          │     │   ldpc_nms_decoder + TX serializer           │
 └──────────────────────────────────┘     └──────────────────────────────────────────────┘
                                            fec_verif_pl = NUM_CU such units side by side
```

## The decoder (`ldpc_nms_decoder`)

### The code

H is 64 x 128, made of a 4 x 8 array of 16 x 16 circulants. `P^s` is the
identity with its ones moved s places to the right: row k has its one in
column (k+s) mod 16. `I` is `P^0` and `0` is the all-zero block.

| block row | c0 | c1 | c2 | c3 | c4 | c5 | c6 | c7 |
|---|---|---|---|---|---|---|---|---|
| 0 | I+P^7 | P^2 | P^14 | P^6 | 0 | P^0 | P^13 | I |
| 1 | P^6 | I+P^15 | P^0 | P^1 | I | 0 | P^0 | P^7 |
| 2 | P^4 | P^1 | I+P^15 | P^14 | P^11 | I | 0 | P^3 |
| 3 | P^0 | P^1 | P^9 | I+P^13 | P^14 | P^1 | I | 0 |

Every check has degree 8. Variables in block columns 0-3 have degree 5 and
those in columns 4-7 have degree 3. The table lives in `rtl/ldpc_pkg.sv` as
`H_BASE`: eight (block column, shift) pairs per block row. It was entered
from the CCSDS definition of the code, and the design treats it as an
outside input. The test bench checks it in two ways: H has rank 64, and
codewords drawn from its null space decode correctly. It does **not**
compare it with an official test vector. If your copy of the standard uses a
left shift for `P`, change `vn_index` and the testbench table together.

### Schedule: one block row per clock

The decoder is layered, and each block row (16 checks) is one layer.
Sixteen check-node units work on a layer in one clock, so one iteration
takes 4 clocks. For each of the 128 edges of the current layer:

1. `Q = sat(APP[v] - R_old)`. APP is the variable's a-posteriori value;
   R_old is the message this edge produced in the previous iteration.
2. The check-node unit finds the smallest and second-smallest |Q| and the
   product of the signs. It returns
   `R_new = sign * floor(3 * min(|Q| over the other 7 edges, 31) / 4)`.
   This is the normalized min-sum rule with factor 3/4.
3. Each variable adds the change its edges saw:
   `APP[v] = sat(APP[v] + Σ (R_new - R_old))`.

Step 3 is the subtle part. In an `I+P^s` block, a variable has **two** edges
in the same layer. Plain layered decoding would update it twice in a row.
Here both edges read the same old APP, and both message changes are added at
once (flooding inside a layer, layered between layers). The reference model
in `tb/ldpc_model_pkg.sv` does the same, so the two agree bit for bit.

In hardware terms, each layer's edge-to-variable wiring is fixed. The layer
counter selects one of the four wirings for the edge inputs (`app_in`) and
for the variable updates (`var_update`). The 512 stored messages sit in a
`[layer][row][edge]` array, and one layer's 128 messages are written per
clock.

### Arithmetic

| quantity | width | range / rule |
|---|---|---|
| channel LLR input | `M1` = 3 | two's complement, -4..3; positive means bit 0 |
| APP | `APP_W` = 8 | loaded as `LLR << FRAC` (FRAC = 2); saturates to ±127 |
| Q | APP_W+2 internal | saturated to ±127 |
| R message | `R_W` = 6 | magnitude capped at 31 before scaling, so at most 23 |
| hard decision | 1 | sign bit of APP |

The two fraction bits matter. Without them, the 3/4 scaling turns every
message of magnitude 1 into 0, and the decoder stalls at low LLRs.

### Stopping and timing

Before each iteration, the decoder checks all 64 parity equations on the
current hard decisions. It stops when they all hold, or after `MAX_ITER`
(10) iterations. This is why decoding gets faster at high SNR.

* `start` is a one-clock pulse. It loads `llr` (element i in
  `[i*M1 +: M1]`) and clears all messages.
* `done` rises 1 + 4·iters clock edges after the edge that sampled `start`.
  That is 1 edge if the input is already a codeword and at most 41 edges.
* `bits`, `iters` and `parity_ok` stay valid until the next `start`. `busy`
  is high while the decoder runs.

## Stream format (`decoder_axis`, `axis_demux`, `axis_mux`)

* **Decoder IP.** A codeword is 128 AXI-Stream transfers in and 128 out, in
  element order. Each lane is `LANE_W` = 8 bits wide: the LLR sits in bits
  [2:0] on the way in, and the decoded bit in bit 0 on the way out.
  Framing is done by counting. An input `tlast` is optional, and an
  assertion checks that it is on transfer 127 when present. The output
  `tlast` is on transfer 127.
  The receive buffer is separate from the decoder, so codeword j+1 can be
  received while codeword j is decoded and sent out. A new decode starts
  only after the previous result has left. `last_iters` and
  `last_parity_ok` give the status of the latest codeword. They are
  side-band outputs for the verification software, not part of the stream.
* **Packed HP word** (`HP_W` = 32). Input word i carries element i of R
  codewords, with codeword k in bits `[3k +: 3]`. Output word i carries
  decoded bit i of codeword k in bit k, and the bits above R are zero. A
  batch is 128 words each way. `R*M1` and `R*M2` must fit in `HP_W`;
  elaboration-time assertions check this.
* **DEMUX.** Each output lane has one register. A word is accepted only when
  every lane is free or being drained in the same clock, so a slow decoder
  stalls the input only when it has not taken its previous element yet.
* **MUX.** This is a join. A packed word is formed when all R lanes offer
  data. The lanes always carry the same element index of R codewords, and
  an assertion checks that their `tlast` agree.

All stream signals follow the AXI-Stream rules. Both source sides hold valid
and data stable while stalled, and `decoder_axis` asserts this. No `valid`
depends combinationally on `ready`.

## Top (`fec_verif_pl`) and what lies outside it

The NUM_CU units share only clock and synchronous active-low reset. Every
unit's input and output streams are top-level ports (`[NUM_CU-1:0]` packed
arrays), because everything they connect to is outside the RTL:

* the HP port / DMA data mover, which is generated vendor infrastructure;
* the processor threads and all the software models;
* a second implementation of the decoder, such as one produced by
  high-level synthesis from the C reference, when the matching set-up
  below is used.

### Matching set-up (`HLS_LANES = R/2`)

Instead of comparing hardware results with software, a unit can check its
decoders against a second hardware implementation. With `HLS_LANES = R/2`:

* each input word carries only R/2 codewords, in fields 0..R/2-1;
* the DEMUX (`DUPLICATE` mode) gives codeword k to lane k and to lane
  k + R/2;
* lanes 0..R/2-1 are decoded inside the unit. Lanes R/2..R-1 leave on the
  `x_in_*` ports towards the external decoders, and their answers come back
  on `x_out_*`;
* output word i carries bit i of every codeword twice, in bits k and
  k + R/2, so software compares the two halves.

The MUX is a join, so the slower implementation sets the pace. The default
is `HLS_LANES = 0`. Then the `x_in_*` outputs are driven to zero,
`x_out_tready` is low, and the `x_*` inputs are ignored.

| parameter | default | where it comes from |
|---|---|---|
| `N` | 128 | code length (fixed: the tables are for this code) |
| `M1` / `M2` | 3 / 1 | soft input bits / hard output |
| `R` | 4 | decoders per unit (per processor thread) |
| `NUM_CU` | 4 | units (threads) |
| `HP_W` | 32 | packed word width (design choice; HP ports are 32/64 bit) |
| `MAX_ITER` | 10 | design choice |
| `HLS_LANES` | 0 | R/2 for the matching set-up |
| `APP_W`, `R_W`, `FRAC`, 3/4 | 8, 6, 2 | design choice |

For a dual-core board with 2 threads x 4 decoders, set `NUM_CU = 2`. At
default size, one decoder's storage is 512 x 6 message bits plus
128 x 8 APP bits. Coarse synthesis gives it about 7,000 word-level cells.

## Verification

`tb/ldpc_model_pkg.sv` stands in for the software side. It expands H from
its own copy of the circulant table and draws random codewords by Gaussian
elimination over GF(2). The channel is BPSK at rate 1/2 with noise from a sum
of 12 uniforms, quantised as `clip(round(2y), -4, 3)`. The package also has a
bit-exact reference decoder written with plain integers. That decoder walks
edges from the check side, whereas the RTL gathers them per variable.

| testbench | what it checks |
|---|---|
| `tb_ldpc_nms_decoder` | 177 codewords from 0 to 6 dB, plus noiseless and single-error words. Bits, iteration count, parity flag and latency (1 + 4·iters) match the model. Both stopping causes must occur. |
| `tb_decoder_axis` | 24 codewords with random input gaps and output back-pressure. Every bit, `tlast` and status are checked. Receiving must overlap decoding. |
| `tb_axis_demux`, `tb_axis_mux` | 400 words with independent random stalls per lane. Order, packing, `tlast`, and data held while stalled. |
| `tb_computation_unit` | 14 batches of 4 codewords. Zero mismatches against the model. Status outputs checked. Input back-pressure, output stalls, syndrome stops and iteration-limit stops must all occur. |
| `tb_computation_unit_hls` | Matching set-up (R = 4, `HLS_LANES` = 2). `tb/hls_decoder_model.sv` is a slower behavioural stand-in for the external decoder. Both copies of each codeword must agree and match the model, and the MUX must wait on the external lanes. |
| `tb_fec_verif_pl` | The same at full default size: 4 units x 4 decoders running at once, 112 codewords. |

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and has a
watchdog. A sample run of the full-size bench gives 16/16, 13/16, 10/16 and
then 0 codeword errors from 0 dB to 3-6 dB. This is a waterfall
shape, but the sample is far too small to be an error-rate measurement.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/ldpc_pkg.sv tb/ldpc_model_pkg.sv tb/tb_fec_verif_pl.sv --top tb_fec_verif_pl
./obj_dir/Vtb_fec_verif_pl
```

Compiling the full top (16 decoders) takes about three minutes. The
simulation itself takes under a second.

## How far to trust it, and where it departs from the original

The stream structure follows the original flow: DEMUX, R decoder IPs, MUX,
n transfers per codeword, packed HP words, and one unit per thread. So do
the code size, the 3-bit soft input with hard output, the normalized min-sum
algorithm, early stopping and the 4 x 4 replica count.

The original decoder's internals are not published. It is described only as
a common partially parallel architecture with quantisation matched to a C
model. The following are therefore this design's own choices:

* the layered schedule with one block row per clock, and the in-layer
  summing of double edges;
* all word widths, the saturation points, the 3/4 factor and `FRAC`;
* the 10-iteration limit and the start/done handshake;
* the lane width, the bit order inside HP words, and counted framing;
* receiving the next codeword while decoding (the original leaves buffering
  for batch operation as future work).

Because of these choices, results will not match any other implementation of
this code bit for bit. They do match the reference model in `tb/`, which is
the point of the flow: the hardware and its software model must agree
exactly.
