# Two-level watermark generator for IP-core ownership

A reusable hardware IP core can be copied, or lightly edited to remove any
sign of who designed it. A watermark answers this with a proof of authorship
hidden inside the design itself: a bit string that only the owner can derive,
embedded where it does not change what the circuit does. This RTL implements
the part of such a scheme that is hardware:

1. **Signature generation.** The owner's 16-byte identification string is
   encrypted with AES-128 under a secret key. The ciphertext is hashed with
   MD5. The 128-bit digest is folded down to an 8, 16, 32 or 64 bit
   signature.
2. **Netlist-level embedding.** The signature is cut into 3-bit symbols
   (values 0..7). Each symbol is hidden in the last decimal digit of the delay
   of one non-critical net of a synthesized netlist. A threshold rule decides
   how that digit is rewritten.

The scheme this design follows also embeds the same signature a level higher,
in the output labels of a (hierarchical) state machine's transitions, before
synthesis. That step rewrites a state table in design software and is not a
circuit, so it has no RTL here (see *What is not here*).

```
 message[127:0] ──►┌────────────┐  ct  ┌──────────┐ digest ┌─────┐ sig ┌──────────┐
 key[127:0]     ──►│ aes128_enc │ ───► │ md5_core │ ─────► │ dlb │ ──► │ signature│
 start          ──►└────────────┘ done └──────────┘  done  └─────┘     │ register │
                                  ─────►start                mode ──►  └────┬─────┘
                                                                           │ load
 dly_valid, dly_digit ─────────────────────────────────────────────► ┌─────▼────┐
                                                                     │ delay_wm │──► out_valid, out_digit,
                                                                     └──────────┘    out_kind, groups_left
```

## Files

| file | content |
|------|---------|
| `rtl/wm_pkg.sv` | shared types (`sig_mode_e`, `dw_case_e`), AES byte functions, MD5 constants, the delay-digit rule |
| `rtl/aes128_enc.sv` | AES-128 encryptor, one round per clock |
| `rtl/md5_core.sv` | MD5 of a 16-byte message, one step per clock |
| `rtl/dlb.sv` | "digital logic block": 128-bit digest to 8/16/32/64-bit signature |
| `rtl/delay_wm.sv` | delay-digit watermark encoder |
| `rtl/wm_top.sv` | the chain above |
| `tb/*_tb.sv` | one self-checking testbench per module |

## Signature chain

### AES-128 (`aes128_enc`)

This is standard FIPS-197 AES-128 encryption of one block. A `start` pulse
loads `pt ^ key` and the key. Then one round runs per cycle, with the next
round key derived in the same cycle. `done` pulses 10 cycles after the start
cycle, and `ct` holds the result until the next start. The S-box is not a
stored table. It is computed as the GF(2^8) inverse (x^254) followed by the
affine map, so the logic is larger than a ROM-based S-box but there is no
table to check. Byte 0 of every 128-bit block is in bits `[127:120]`, so a
hex literal reads the same as the usual byte string.

The developer string is exactly one block (16 bytes). The RTL has no mode
(ECB/CBC) and no padding for longer strings.

### MD5 (`md5_core`)

This is standard RFC 1321 MD5, cut down to the one case the chain needs. The
input is always 16 bytes. With MD5 padding (`0x80`, zeros, bit length 128)
that fills exactly one 512-bit block, so the padding words are constants in
the word multiplexer. The 64 steps run one per cycle, and `done` pulses 64
cycles after `start`. The digest is presented in the usual byte order:
`digest[127:120]` is the first byte of the familiar hex string. The round
constants are K[i] = floor(|sin(i+1)|·2^32), listed in `wm_pkg`.

### Digital logic block (`dlb`)

This block reduces the 128-bit digest to the requested length. The reduction
method is this design's choice: **XOR folding**. The two 64-bit halves are
XORed, that result's halves are XORed to 32 bits, and so on down to 8.
Equivalently, signature bit j is the XOR of all digest bits i with
i mod L = j. The output is combinational, zero-extended to 64 bits, and
selected by `mode` (`SIG8`, `SIG16`, `SIG32`, `SIG64`). Replacing the fold
with truncation or another mixing function only touches this file.

### Top-level sequencing (`wm_top`)

`start` (ignored while `busy`) latches `mode` and starts AES. The AES `done`
pulse starts MD5. The MD5 `done` pulse captures the DLB output into
`signature` and raises `sig_valid`. In that same cycle the signature is
loaded into `delay_wm`.

Latency from the start edge to `sig_valid`:
10 (AES) + 1 (AES done starts MD5) + 64 (MD5) + 1 (register) = **76 cycles**.

## Netlist-level embedding (`delay_wm`) — the delay-digit rule

This is the least obvious part of the design. The idea: timing analysis of
the synthesized netlist reports a delay for every net. For nets with plenty
of slack, the last decimal digit of that delay can be changed (by sizing or
placement) without affecting timing. That digit therefore carries the
watermark.

The block only computes the new digits. It does not choose the nets or
change delays: some other tool must supply the last delay digit `Td` of each
non-critical net on `dly_digit`/`td`, one per valid cycle, and apply the
returned digit.

**Symbols.** An L-bit signature is read as a number and zero-extended on the
left to 3·ceil(L/3) bits. It is then cut into 3-bit symbols `Tw`, most
significant first. A 64-bit signature gives 22 symbols; the first symbol holds
only the top bit. The 8, 16 and 32 bit signatures give 3, 6 and 11 symbols.
The grouping order is this design's choice.

**Rule.** The threshold is Th = floor((Tmin + Tmax)/2) with Tmin = 0 and
Tmax = 9, so Th = 4.

| condition | new digit | `kind` |
|-----------|-----------|--------|
| abs(Td − Tw) ≤ 4 | Tw | `DW_CASE1` |
| abs(Td − Tw) > 4 and Td > Tw | Td − Tw | `DW_CASE2` |
| abs(Td − Tw) > 4 and Td < Tw | Td (unchanged) | `DW_KEEP` |
| all symbols already embedded | Td (unchanged) | `DW_PASS` |

Worked example: Td = 9 and Tw = 2 gives |9−2| = 7 > 4 and 9 > 2, so the new
digit is 7 (case 2). Td = 3 and Tw = 6 gives 3 ≤ 4, so the new digit is 6
(case 1).

Notes on the rule:

* The boundary uses ≤. A phrasing with strict "less than" also exists for this
  rule. The two differ only when abs(Td − Tw) = 4.
* The third row is not covered by the original rule. It can happen only when
  Tw is 5..7 and Td < Tw − 4 (for example Td = 0, Tw = 7). Here the digit is
  left unchanged and the symbol still counts as used, so an extractor must
  treat that net as carrying no information. If you prefer to skip such a net
  and keep the symbol for the next one, change the `DW_KEEP` branch in
  `delay_wm.sv` so that it does not decrement `left_q`.
* Case 2 does not store Tw in a directly readable form. Recovering the
  signature needs the original delays, as with most watermark checks.

**Timing.** `out_valid`, `td_out` and `kind` follow `in_valid` by one cycle.
`groups_left` counts down, and `done` is high when it reaches zero (also
after reset, when nothing is loaded). A `load` restarts the symbols. A digit
presented in the load cycle is dropped. An assertion checks that `td` ≤ 9
whenever `in_valid` is high.

## Interfaces at a glance (`wm_top`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | rising-edge clock, asynchronous active-low reset |
| `start` | in | 1 | start signature generation (ignored while `busy`) |
| `message`, `key` | in | 128 | developer string and AES key, byte 0 in `[127:120]` |
| `mode` | in | `sig_mode_e` | signature length 8/16/32/64 |
| `busy` | out | 1 | AES or MD5 running |
| `sig_valid`, `signature` | out | 1, 64 | signature in the low `mode` bits |
| `dly_valid`, `dly_digit` | in | 1, 4 | delay last digit (0..9) of the next non-critical net |
| `out_valid`, `out_digit`, `out_kind` | out | 1, 4, `dw_case_e` | rewritten digit and the rule used |
| `groups_left`, `wm_done` | out | 5, 1 | embedding progress |

## Sizes

The design has no free size parameters. AES-128, MD5 and the 64-bit
maximum signature are fixed by the scheme. After coarse synthesis the top is
about 7.7k word-level cells and 678 flip-flop bits. Most of the logic is the
20 computed S-boxes (16 for the state, 4 for the key schedule).

The scheme was evaluated on eleven small FSM benchmarks (bbara, dk15, dk17,
ex4, s27, s386, ex1, bbtas, lion, s1, s208) with 16, 32 and 64-bit
watermarks. All three lengths are supported here. A 64-bit signature needs 22
non-critical nets in the target netlist.

## Verification

Each testbench compares against values from an independent reference, or
computes its reference differently from the RTL:

* `aes128_enc_tb`: the two FIPS-197 example vectors, an ASCII string and the
  all-zero block. It also checks the 10-cycle latency and that a start while
  busy is ignored.
* `md5_core_tb`: seven 16-byte messages against reference MD5, and the
  64-cycle latency.
* `dlb_tb`: a bit-wise "i mod L" reference on 200 random digests at all four
  lengths, plus one digest with known folds.
* `delay_wm_tb`: random signatures and digits for all lengths, against an
  integer model of the rule with its own symbol extraction. Every rule row is
  exercised.
* `wm_top_tb`: end to end for 4 strings × 4 lengths. It checks signatures
  against reference AES+MD5+fold values, the 76-cycle latency, every rewritten
  digit, a start while busy, and digits sent before a signature exists. It
  counts each of these mechanisms and fails if one never happens. It runs the
  top with its default (and only) configuration.

Every testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/wm_pkg.sv tb/wm_top_tb.sv --top-module wm_top_tb
./obj_dir/Vwm_top_tb
```

Replace `wm_top_tb` with any other testbench name. The simulations take well
under a second.

## What is not here, and where the RTL departs from the scheme

* **FSM-level watermark insertion.** This step picks transitions of a
  (hierarchical) state transition graph whose outputs match the signature
  bits, or adds transitions on free input combinations. It is an algorithm
  over a state table run before synthesis. Its hardware result is a modified
  version of each benchmark FSM, and those state tables are not available
  here. For the same reason, the example hierarchical FSM (states S1–S3, with
  S2 refined into S4/S5) is not written: its master transitions have no
  outputs, two of its edges have no conditions, and its entry and exit states
  are not defined.
* **Choosing non-critical nets and changing their delays** is left to the
  timing and physical-design tools. `delay_wm` computes only the digits.
* **This design's own choices, not the scheme's:** the iterative AES/MD5
  architectures and their latencies; the 16-byte message limit; XOR folding
  in the DLB; the most-significant-first symbol order with left zero padding;
  the `DW_KEEP` and `DW_PASS` behaviour; the start/done handshake; the
  asynchronous active-low reset.
