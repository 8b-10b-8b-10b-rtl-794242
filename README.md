# 8B/10B encoder with a reduced coding table

An 8B/10B encoder maps each byte (plus a flag K for control characters) to a
10-bit code group. That keeps the number of ones and zeros on the line
balanced and guarantees frequent transitions for clock recovery. The
textbook implementation splits the byte into a 5-bit part (ABCDE -> abcdei)
and a 3-bit part (FGH -> fghj), looks each part up in a table indexed by the
data *and* the running disparity, and then selects the primary or
complemented code with "encoding switches". Those lookups are deep logic.

This design removes the running disparity from the tables:

* The pre-encoders produce one fixed ("primary") code per input, without
  knowing the running disparity, together with the sign of that code's own
  disparity. They do not use a 32-row table: the number of ones in A..D
  (a 3-bit adder result) plus E sorts the 5-bit inputs into ten classes, and
  within a class most output bits are copies of input bits. The 3-bit part
  is sorted the same way by F+G and H.
* A separate disparity control compares the code's sign with the running
  disparity and decides whether each sub-block is sent complemented.
* The encoding switch becomes an XOR with the complement decision in front
  of the output register.

The result is a one-stage pipeline: one byte per clock, one clock of latency.

## Block structure

```
 A..E, kin ──► pre_5b6b ── abcdei ───────────────────────────────► out_stage ──► output_10b
                  │ cur_rd6, d7, e/i                                 ▲  ▲  ▲     (XOR, then
                  ▼                                         compls6  │  │  │      register)
              disp_ctrl: disp_check6 ──rd6──► disp_check4 ───────────┘  │  │
                  │  running-disparity register ◄── next_rd   compls4 ──┘  │
                  │ alt7 (S + K)    ▲ cur_rd4, x3                          │
                  ▼                 │                                      │
 F..H ───────► pre_3b4b ────────────┴── fghj ──────────────────────────────┘
```

| Module | Role |
|---|---|
| `enc8b10b_pkg` | `rd_e` disparity enum (NEG, ZERO, POS) and the complement table `disp_decide()` |
| `pre_5b6b` | adder-classified 5B/6B pre-encoder, D.24 and K.28 patches, D.7 flag |
| `pre_3b4b` | adder-classified 3B/4B pre-encoder, alternate-7 select, x.3 flag |
| `disp_check6` | complement decision for the 6-bit part, the S term of the alternate-7 rule |
| `disp_check4` | complement decision for the 4-bit part, K28 and x.3 special cases |
| `disp_ctrl` | chains the two checks and holds the running disparity register |
| `out_stage` | XOR with the complement decisions, 10-bit output register |
| `enc8b10b_top` | the encoder |

## The reduced 5B/6B table

`s` = A+B+C+D. Bits not listed are copied from the input (a is always A).

| E | s | forced bits | code disparity | inputs |
|---|---|---|---|---|
| 0 | 0 | b=1 c=1 e=0 i=0 | − | D.0 → 011000 |
| 0 | 1 | e=1 i=0 | − | D.1, 2, 4, 8 |
| 0 | 2 | e=0 i=1 | 0 | D.3, 5, 6, 9, 10, 12 |
| 0 | 3 | e=0 i=0 | 0 | D.7, 11, 13, 14 |
| 0 | 4 | b=0 d=0 e=0 i=0 | − | D.15 → 101000 |
| 1 | 0 | b=1 c=1 e=1 i=1 | + | D.16 → 011011 |
| 1 | 1 | e=1 i=1 | 0 | D.17, 18, 20 (and D.24, see below) |
| 1 | 2 | e=1 i=0 | 0 | D.19, 21, 22, 25, 26, 28 |
| 1 | 3 | e=1 i=0 | + | D.23, 27, 29, 30 |
| 1 | 4 | b=0 d=0 e=1 i=1 | + | D.31 → 101011 |

Two inputs break the pattern and are patched after the class logic:

* **D.24** (ABCDE = 00011) would give 000111, which is not a valid code;
  it becomes 001100 (c set, e and i cleared), disparity −.
* **K.28** (ABCDE = 00111 with K) is D.28's 001110 with i set: 001111,
  disparity +. This is the code that carries the comma.

## The reduced 3B/4B table

`s` = F+G; h is always H.

| H | s | forced bits | code disparity | inputs |
|---|---|---|---|---|
| 0 | 0 | g=1 j=0 | − | x.0 → 0100 |
| 0 | 1 | j=1 | 0 | x.1, x.2 |
| 0 | 2 | j=0 | 0 | x.3 → 1100 |
| 1 | 0 | j=0 | − | x.4 → 0010 |
| 1 | 1 | j=0 | 0 | x.5, x.6 |
| 1 | 2 | j=0, or f=0 j=1 if `alt7` | + | x.7 → 1110 (P7) or 0111 (A7) |

## Disparity control

This is the part that needs the most care. The pre-encoders' codes are
always primary codes, so every disparity rule lives here.

**Basic rule** (`disp_decide()` in the package). For a sub-block with code
disparity `cur` arriving when the running disparity is `pre`:

| pre | cur | complement | running disparity after |
|---|---|---|---|
| − | − | yes | + |
| − | 0 | no | − |
| − | + | no | + |
| + | − | no | − |
| + | 0 | no | + |
| + | + | yes | − |

The table is also defined for `pre` = 0 (no complement, disparity follows
the code). A stream that starts negative never reaches that case, and an
assertion in `disp_ctrl` checks that.

The 6-bit part is decided first, against the registered running disparity.
Its result `rd6` is the disparity in the middle of the character, and the
4-bit part is decided against `rd6`. The disparity at the end of the
character is registered and used by the next character one clock later.

**Neutral codes that still have two forms.** Three cases have balanced
primary codes that must nevertheless be sent complemented. Otherwise runs of
equal bits get too long, or a comma appears where it must not:

* D.7, 111000 → 000111 after a positive disparity (`d7` flag, forced in
  `disp_check6`).
* x.3, 1100 → 0011 when `rd6` is positive (`x3` flag, forced in
  `disp_check4`). This includes K28.3.
* K28.1, .2, .5, .6: the neutral 4-bit code is complemented when `rd6` is
  *negative* (forced in `disp_check4` from `kin`). This gives, for example,
  K28.5 = 001111 1010 from a negative and 110000 0101 from a positive
  disparity.

A forced complement of a neutral code leaves the running disparity unchanged.

**Alternate 7.** For FGH = 111 the primary 1110/0001 would lengthen a run
after certain 6-bit codes. The alternate 0111/1000 is used when `alt7` = S + K:

* every K character with FGH = 111 (K28.7, K23.7, K27.7, K29.7, K30.7);
* S: `rd6` is negative and the 6-bit code as sent ends in e,i = 11, or `rd6`
  is positive and it ends in 00. In terms of data values, that is D.17, 18,
  20 after a negative and D.11, 13, 14 after a positive disparity.

S needs the running disparity, so `disp_check6` computes it and
`disp_ctrl` sends it back to `pre_3b4b`. P7 and A7 have the same disparity,
so `cur_rd4` does not depend on `alt7`: there is no combinational loop.

## Interface and timing (`enc8b10b_top`)

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk` | in | 1 | clock; one character per rising edge |
| `rst` | in | 1 | asynchronous, active high |
| `kin` | in | 1 | encode the byte as a control (K) character |
| `input_8b` | in | 8 | `[7]` = A, `[6]` = B … `[3]` = E, `[2]` = F, `[1]` = G, `[0]` = H |
| `output_10b` | out | 10 | `[9]` = a … `[4]` = i, `[3]` = f … `[0]` = j |
| `rd_pos` | out | 1 | running disparity after the code group on `output_10b` (1 = +) |

**Bit order.** The byte is written A first, so D6.4 (EDCBA = 6, HGF = 4)
is `input_8b = 8'b0110_0001`, not the HGFEDCBA order that many 8B/10B cores
use. The output is in transmission order abcdeifghj, MSB first; a serializer
sends `output_10b[9]` first. To connect an HGFEDCBA-ordered source,
bit-reverse the byte.

**Timing.** The byte and `kin` present at a rising clock are encoded and
appear on `output_10b` just after that clock. `output_10b` comes straight
from flip-flops. There is no enable: every clock encodes a character.
During and after reset `output_10b` is 0 and the running disparity is
negative.

**Not handled.** `kin` with a byte that is not one of the twelve valid
control characters gives an undefined code group, and nothing flags it.
There is no decoder.

## Design choices beyond the reduced tables

The pre-encoder class tables, the D.24/K.28 patches, the complement table and
the split into 6-bit and 4-bit checks with a registered running disparity
are the architecture described above. The following are choices of this RTL:

* `kin` also feeds `pre_5b6b` (needed for the K.28 patch), and the `d7` and
  `x3` flags tell the disparity control about the neutral-but-complemented
  codes.
* The S term of the alternate-7 rule is defined on the e,i bits as sent and
  computed in `disp_check6`.
* For the K28 special case, the 4-bit part is forced to complement for
  K28.1/.2/.5/.6, and K28.3 goes through the ordinary x.3 rule. This is the
  reading that gives the standard code groups.
* The XOR comes before the output register (registered outputs). The reset
  is asynchronous and active high, and the initial disparity is negative.
  `rd_pos` is an extra observation port.

## Verification

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. Reference values come from
`tb/ref8b10b_pkg.sv`. That model is written independently of the RTL, from the
conventional code tables (negative-disparity codes per 5-bit and 3-bit value,
complement rules, A7 exception list, K28 table). It also has a search-based
`decode()` that acts as a behavioural 10b/8b decoder.

* `tb_pre_5b6b`, `tb_pre_3b4b`, `tb_disp_check6`, `tb_disp_check4`:
  exhaustive over all inputs.
* `tb_disp_ctrl`: 4000 random clocks against a running-disparity model.
* `tb_out_stage`: reset value, 1-clock register, XOR per sub-block.
* `tb_enc8b10b_top` (end to end, top at its defaults):
  * known code groups: D0.0, D31.5, D0.0, K28.5 from a negative start give
    `1001110100 1010111010 0110001011 1100000101`; D6.4 after a positive
    disparity gives `0110010010`, followed by D23.6 → `1110100110`;
  * 500,000 pseudo-random characters (31-bit LFSR, about one in eight a
    valid K character). Each is checked against the model, decoded back, and
    checked against the line rules: 4–6 ones per group, cumulative disparity
    0 or +2, runs of at most 5;
  * latency: each code group appears right after the clock that captures
    its byte, and the previous one is held until then;
  * every one of the 268 valid characters seen at both running disparities;
  * each mechanism counted and required to occur at least once: 6-bit and
    4-bit complement, D.7, x.3 and K28 forced complements, A7 through S and
    through K, the D.24 and K.28 patches.

It runs in a few seconds.

### Running with Verilator

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/enc8b10b_pkg.sv tb/ref8b10b_pkg.sv rtl/*.sv tb/tb_enc8b10b_top.sv \
  --top-module tb_enc8b10b_top -Mdir obj_top
./obj_top/Vtb_enc8b10b_top
```

Replace the last testbench file and the top module name to run a unit test.
Lint the RTL with
`verilator --lint-only -Wall -Irtl rtl/enc8b10b_pkg.sv rtl/*.sv --top-module enc8b10b_top`.

## Size

After generic synthesis the encoder is about 80 word-level cells and 12
flip-flops: 10 output bits and the 2-bit running disparity. The critical
path is one adder class decode, followed by two chained complement decisions
and the alternate-7 select, then the XOR. No timing or area figure for a real
cell library was produced.
