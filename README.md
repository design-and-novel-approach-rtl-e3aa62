# Ternary 2:9 decoder and 9:2 encoder

Ternary (radix-3) logic uses three levels per digit: 0 (low), 1 (middle) and
2 (high). A number needs fewer ternary digits ("trits") than bits. This RTL
builds the two basic ternary address circuits:

* a **2:9 decoder**: two trits `(a, b)` select one of nine lines
  `P Q R S T U V W X`. The selected line goes to 2 and the other eight stay at 0;
* a **9:2 encoder**: the inverse. The line that is at 2 is turned back into its
  two-trit number `(a, b)`.

Both are purely combinational. Both take a parameter `N`, the number of
trits, with the 2:9 / 9:2 size as the default. `N = 3` gives a 3:27 / 27:3
pair and `N = 4` gives a 4:81 / 81:4 pair. The general form follows the
extension the design describes, and it is tested at all three sizes.

The design follows the article "Design and Novel Approach for Ternary Decoder and
Encoder Circuits". Its truth tables and switch diagrams define the behaviour.
Everything the article leaves open is a choice of this RTL, and each one is
listed below.

## Carrying trits on binary wires

The tools are binary, so each trit travels as a 2-bit unsigned code
(`ternary_pkg::trit_t`):

| level  | code  |
|--------|-------|
| 0 low  | 2'd0  |
| 1 mid  | 2'd1  |
| 2 high | 2'd2  |
| —      | 2'd3 is illegal |

A number is a packed `trit_t [N-1:0]`, and element `N-1` is the most
significant trit. For `N = 2`, `digits[1]` is `a` and `digits[0]` is `b`, so the
value is `3*a + b`. Line vectors are `trit_t [3**N-1:0]`, with line `k` at
index `k`. The named lines are therefore `P = [0]`, `Q = [1]`, … `X = [8]`.

A real ternary circuit would use three voltage levels on one wire. The 2-bit
code is the usual way to model that behaviour in a binary HDL. It says nothing
about the transistor-level circuit.

## The decoder as a tree of switches

The decoder is drawn as a two-level switch tree. A switch `a = i` feeds
three switches `b = 0`, `b = 1` and `b = 2`. Each of those closes onto one output:

```
a=0 ─┬─ b=0 → P     a=1 ─┬─ b=0 → S     a=2 ─┬─ b=0 → V
     ├─ b=1 → Q          ├─ b=1 → T          ├─ b=1 → W
     └─ b=2 → R          └─ b=2 → U          └─ b=2 → X
```

An output is high only when every switch on its path is closed.
`ternary_decoder` models this directly. For each line `k` it compares every
input trit with the matching radix-3 digit of `k`, and ANDs the results. With
any `N` this is a tree of depth `N`.

| a b | high line |     | a b | high line |     | a b | high line |
|-----|-----------|-----|-----|-----------|-----|-----|-----------|
| 0 0 | P         |     | 1 0 | S         |     | 2 0 | V         |
| 0 1 | Q         |     | 1 1 | T         |     | 2 1 | W         |
| 0 2 | R         |     | 1 2 | U         |     | 2 2 | X         |

These are choices of this RTL, not the article's: an input trit carrying
the illegal code 3 closes no switch, so every line stays at 0.

## The encoder

The encoder's switch tree runs the other way. Each line, when high, routes its
own constant pair `(k / 3, k % 3)` to the outputs. For example, `U` (line 5)
gives `(1, 2)` and `X` (line 8) gives `(2, 2)`, which is 8 in decimal.

The article defines the encoder only for inputs with exactly one line at 2.
For all other inputs this RTL chooses the following:

* only level 2 counts as "high". Levels 0 and 1 and the code 3 do not;
* if several lines are high, the lowest-numbered line wins, as in a binary
  priority encoder;
* if no line is high, the output is `(0, 0)`. That is the same as for `P`, and
  there is no separate valid output.

If your use needs to tell "P" apart from "nothing", add a valid flag (any line
equal to 2) outside the encoder.

## Top level

`ternary_codec_top` places the decoder and the encoder side by side. Each keeps
its own ports:

| port           | dir | type               | meaning                  |
|----------------|-----|--------------------|--------------------------|
| `dec_digits_i` | in  | `trit_t [N-1:0]`   | number into the decoder  |
| `dec_lines_o`  | out | `trit_t [3**N-1:0]`| decoder lines P..X       |
| `enc_lines_i`  | in  | `trit_t [3**N-1:0]`| lines into the encoder   |
| `enc_digits_o` | out | `trit_t [N-1:0]`   | number out of the encoder|

The two circuits are presented as a pair but are not connected to each other.
The suggested uses, such as memory-cell selection or a ternary processor's
instruction decode, are only named as applications, so they are not built
here. Chaining `dec_lines_o` into `enc_lines_i` gives the identity on legal
inputs, and the end-to-end test checks this.

There is no clock and no reset. Outputs follow inputs after the
combinational delay.

## Files

| file                         | contents |
|------------------------------|----------|
| `rtl/ternary_pkg.sv`         | `trit_t`, level constants, `pow3()`, `trit_of()` |
| `rtl/ternary_decoder.sv`     | N:3**N decoder |
| `rtl/ternary_encoder.sv`     | 3**N:N encoder |
| `rtl/ternary_codec_top.sv`   | both, side by side |
| `tb/tb_ternary_decoder.sv`   | decoder truth table written out row by row; illegal codes; exhaustive N=3 and N=4 |
| `tb/tb_ternary_encoder.sv`   | encoder truth table; middle/illegal levels; two-high priority; random patterns against a reference model; exhaustive N=3 and N=4 |
| `tb/tb_ternary_codec_top.sv` | default-size end-to-end test: decode, re-encode, check the round trip. It also covers illegal decoder inputs and encoder priority, and counts that each of these, and each of the nine lines, was exercised |

Every testbench prints `TB_RESULT checks=<n> failures=<m>` and stops. A
watchdog ends any run that does not finish in time.

## Simulating

With Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/ternary_pkg.sv rtl/ternary_decoder.sv rtl/ternary_encoder.sv \
  rtl/ternary_codec_top.sv tb/tb_ternary_codec_top.sv \
  --top-module tb_ternary_codec_top -o sim
./obj_dir/sim
```

To run a block's own test, swap in `tb/tb_ternary_decoder.sv` or
`tb/tb_ternary_encoder.sv` and set the matching `--top-module`. The testbenches
use only `$urandom`. They read no files. Each run takes well under a second.

To change the size, set `N` on the top or on either block. The line count
`3**N` follows from it.

## How far to trust it

* The default 2:9 decoder and 9:2 encoder are checked against every row of the
  published truth tables. The 3:27, 4:81, 27:3 and 81:4 forms are checked
  exhaustively for legal inputs.
* All behaviour outside those truth tables is this RTL's own choice: illegal
  codes, several or no high lines, and the level 1 on an encoder input.
* The article's claims about area and power describe a ternary circuit
  implementation. This binary-coded model shows nothing about them.
