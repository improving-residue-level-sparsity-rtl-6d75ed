# Residue-sparse RNS CNN accelerator

A residue number system (RNS) splits every integer into independent small
residues, one per modulus, and computes each residue in its own narrow
channel with no carries between channels. If a network's weights are
trained so that many of them are exact multiples of some modulus m, the
weight's residue modulo m is zero and that channel can skip the
multiply. Different moduli end up with different amounts of zero
residues, so the channels become unbalanced. This accelerator gives every
channel its own memory bank and its own pace. It compresses zero residues
out of the weight streams. A channel's PE array is switched off as soon as
that channel has finished.

The architecture is the residue-sparsity accelerator described in
*Improving Residue-Level Sparsity in RNS-based Neural Network Hardware
Accelerators via Regularization* (Kavvousanos et al., ARITH 2023). Where that
description stops, the choices made here are listed under "Design choices
and limits". The RTL is SystemVerilog-2017 in `rtl/`, with self-checking testbenches in
`tb/`. The top module is `rns_cnn_accel`.

## Number system

| | moduli | range |
|---|---|---|
| full base B | 5, 7, 31, 32, 33 | M = 1,145,760 |
| weight sub-base B_weight | 7, 33 | M_weight = 231, read as −115 … +115 |

Weights and feature maps are stored only as residues modulo 7 and 33. The
residues modulo 5, 31 and 32 are produced on the fly by **base extension**.
The channel order used on every port is 7, 33, 5, 31, 32
(`rns_pkg::chan_e`).

## Block structure

```
 weight bank mod 7  --A--> weight_decoder (skip) --w, nz-index--> fmap_addr_gen --> fmap bank mod 7 --A--> PE array mod 7
                   \--B--> weight_decoder (dense) --W[t] mod 7 --\
 weight bank mod 33 --A--> weight_decoder (skip) --w, nz-index--> fmap_addr_gen --> fmap bank mod 33 --A--> PE array mod 33
                   \--B--> weight_decoder (dense) --W[t] mod 33 -+--> base_extension --> PE arrays mod 5, 31, 32
 fmap banks 7 and 33 ----B (address base + t) -------------------/    (one for the weight, one per PE for the feature map)
 channel_ctrl: start, per-channel completion, ch_active (gates each PE array)
```

* **Zero-skipping channels (7 and 33).** The skip-mode decoder returns only
  the non-zero residues, each with its index in the weight vector
  (the *nz-index*). The feature-map bank is read at `fmap_base + nz-index`
  through port A. The 4×4 array accumulates `w · a mod m`. The channel
  costs about one cycle per non-zero residue.
* **Dense channels (5, 31, 32).** Weight residues modulo 7 and 33 are read in
  index order t through port B of the same banks. A second decoder per bank,
  in dense mode, returns every residue, zeros included. The feature-map
  banks are read at `fmap_base + t` through port B. `base_extension`
  converts the weight and the 16 feature-map values. These three arrays take
  one cycle per weight.
* Each bank is dual-ported because the two paths read it at different
  indices in the same cycle.

## The weight code and the decoder

Each residue d of a channel whose modulus needs n bits is stored as

```
G(0) = 0              (1 bit)
G(d) = 1 d[n-1:0]     (n+1 bits), d != 0
```

The codes of one weight vector are concatenated MSB-first into 32-bit
words, starting at a word address of the bank (`w7_addr`, `w33_addr`).
Here n = 3 for modulo 7 and n = 6 for modulo 33. With zero-residue
fractions α7 and α33 the mean code length per weight is
11 − 3·α7 − 6·α33 bits, against 9 bits uncoded. With α7 = 0.8 and
α33 = 0.14 that is 7.76 bits. A zero residue costs one bit, so no index
vector is needed: the position of each non-zero residue follows from the
zeros before it.

`weight_decoder` keeps up to 64 unread code bits, left-aligned, in a bit
buffer. Each cycle:

1. `leading_one_detector` finds p, the number of leading zeros among the
   valid bits. These are p zero weights.
2. In skip mode, if the whole code `1 d` is in the buffer, the decoder
   returns `(idx + p, d)`. It then shifts the buffer left by p + 1 + n
   (`barrel_shifter`) and advances the index by p + 1. If the code is
   incomplete, it drops only the p zeros and waits for more bits. If the
   buffer holds only zeros, all of them are dropped.
3. In dense mode it returns one residue per cycle: a `0` bit gives d = 0,
   and a `1` gives the following n bits.
4. A new 32-bit word is read whenever it will fit behind the valid bits.
   The bank answers one cycle later, and the word is appended in the cycle
   it arrives.

The stream ends when the index reaches `vec_len`. Trailing zeros are never
emitted, and bits after the end of the stream are ignored. Results leave
through a valid/ready register. `done` rises once the last result has been
taken. A coded weight is at most 7 bits and 32 bits arrive per cycle, so
the buffer stays ahead. With one-cycle reads, the skip decoder delivers
one non-zero residue per cycle after a start-up of about 3 cycles; the
testbenches measure exactly this.

## Base extension

`base_extension` takes (x7, x33) and forms the value by mixed-radix
conversion:

```
v = ((x33 − x7) · 19) mod 33        19 = 7⁻¹ mod 33
X = x7 + 7·v                        0 ≤ X < 231
```

X > 115 stands for the negative value X − 231. For a negative value each
output residue is `(X + (m − 231 mod m)) mod m`. That gives 4, 17 and 25
for m = 5, 31 and 32. The extended residues therefore agree with the full
base's representation of negative numbers (M + x), so signed weights and
activations accumulate correctly in all five channels. The unit is
combinational. The accelerator uses 17 of them: one for the weight and one
per PE for the feature map.

## Channel completion and gating

`channel_ctrl` starts all five channels together with a one-cycle
`ch_start`. That pulse restarts the four decoders and clears the arrays.
A channel reports completion when its decoder(s) are done and its
pipeline register is empty. The controller then drops that channel's
`ch_active` bit one cycle later. `ch_active[k]` is wired to the enable of
channel k's PE array, so the array stops toggling. In a physical
implementation this bit is the control for a power switch; the switch
itself is not part of the RTL. `done` rises when all five bits are low.

### What switching off buys

The arrays are not equally costly. Typical modulo-m MAC power for this base
is 5, 14, 37, 16 and 49 µW for m = 5, 7, 31, 32 and 33, or 121 µW in all.
Take residues that are zero in 80 % of weights modulo 7 and in 14 % modulo
33. The channel modulo 7 is then active for about 22 % of the pass, and the
channel modulo 33 for about 86 %. `tb_rns_power_workload` measures this on
a 4096-weight vector. It finds 121 → 103 µW, a saving of about 15 %.
The same run gives 7.8 bits per coded weight, against 9 uncoded.

## Interface of `rns_cnn_accel`

| port | width | use |
|---|---|---|
| `ld_we, ld_sel, ld_addr, ld_wdata` | 1, 2, 12, 96 | write one bank word while not busy; `ld_sel` 0 weight‑7, 1 weight‑33, 2 fmap‑7, 3 fmap‑33 |
| `start` | 1 | begin one pass; `vec_len`, `w7_addr`, `w33_addr`, `fmap_base` are sampled then |
| `vec_len` | 13 | weights in the vector (1 … 4096) |
| `busy`, `done` | 1 | pass running / all channels finished |
| `ch_active` | 5 | per-channel enable (gating) |
| `result` | 5 × 16 × 6 | `result[k][p]`: accumulated residue of PE p in channel k |

**Data layout.** Word `fmap_base + i` of the fmap bank of modulus m holds 16
residues, with PE p in bits `[p·n +: n]`. Each is the feature-map value that
weight i multiplies at PE p's output position. One pass therefore computes
one filter or one neuron at 16 output positions. Residues stay in RNS; no
conversion back to binary is included.

**Timing.** The zero-skipping channels finish about (non-zero residues + 6)
cycles after `start`. The dense channels finish about `vec_len` + 6 cycles
after it. `done` follows the slowest channel by one cycle.

## Parameters

| parameter | default | note |
|---|---|---|
| `M` | 4 | PE array is M × M per modulus |
| `MAX_LEN` | 4096 | longest weight vector, sized for a 4096-input fully connected layer |
| `WORD_W` | 32 | bank word of the coded weights |
| `WMEM_DEPTH` | 1024 | words per weight bank; a 4096-weight stream needs at most 896 |
| `FMEM_DEPTH` | 4096 | words per feature-map bank |

The moduli are constants in `rns_pkg`. `mod_mac_pe` and `pe_array` take any
modulus. `base_extension` is written for {7, 33} → {5, 31, 32}.

## Workloads

The default size takes one output of each of the following layers per
pass:

* a small CIFAR-10 CNN with fan-ins of 27, 288, 576, 1024 and 64;
* the 4096 × 1000 last fully connected layer of VGG-16, at fan-in 4096.

A whole layer is processed as successive passes, with the banks reloaded
in between. The sequencing of those passes is outside this unit.

## Design choices and limits

* Feature maps are held in {7, 33} like the weights, with ±115 range.
* The arrays share one weight per step, and each PE owns an output
  position. The links between neighbouring PEs in a systolic array are not
  used.
* Port B of each weight bank has its own dense-mode decoder, because the
  bank holds coded weights.
* Gating is an enable on the PE registers, not a power switch.
* Accumulation is modulo each channel. Keeping a dot product within the
  signed range of M (±572,879) is the job of quantisation. For example, 4096
  products of ±115 × ±115 can exceed it. The residues are still exact.
* The weight code fields are 3 and 6 bits. A base such as {7, 32} would
  use 3 and 5.
* Not included:
  * the training-time regularizer that creates the zero residues;
  * the weight encoder, which is offline (the testbenches contain one);
  * conversion from RNS back to binary;
  * the alternative bases {5,7,9,16,17,31} and {3,5,7,11,31,32}.

## Simulation

Each testbench prints `TB_RESULT checks=N failures=F`. Each has a cycle
watchdog. For example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/rns_pkg.sv tb/rns_tb_pkg.sv tb/tb_rns_cnn_accel.sv \
  --top-module tb_rns_cnn_accel -o sim && obj_dir/sim
```

| testbench | checks |
|---|---|
| `tb_rns_cnn_accel` | default size, six passes: lengths 4096, 1024, 576, 288, 27 and 64 (one channel all zero); all 80 results against integer dot products; per-channel cycle bounds; counts zero skips, early switch-off, negative base extension and decoder refills |
| `tb_rns_power_workload` | default size, 4096 weights with 80 % / 14 % zero residues; results, power saving from active cycles (13.5–16.5 %), mean code length |
| `tb_weight_decoder` | skip and dense decoders on random coded streams (0–100 % zeros), random back-pressure, one-per-cycle rate |
| `tb_base_extension` | every value −115 … 115 |
| `tb_mod_mac_pe` | every modulus of B, random enable, clear and valid |
| `tb_pe_array` | 4×4 modulo-31 dot products; freezing when disabled |
| `tb_channel_ctrl` | staggered completion; `ch_active` timing; stale done ignored |
| `tb_dp_ram`, `tb_barrel_shifter`, `tb_leading_one_detector`, `tb_fmap_addr_gen` | against reference models |

`tb/rns_tb_pkg.sv` contains the reference encoder for the weight code. The
full-size end-to-end run takes well under a second.
