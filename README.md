# Coupling-aware inversion coding for network-on-chip links

On a long on-chip bus the energy spent per word depends not only on how many
lines switch but also on how *neighbouring* lines switch relative to each other:
the coupling capacitance between two adjacent wires is charged hardest when
they switch in opposite directions. This design encodes every flit sent over
a network-on-chip (NoC) link so that such transitions become rarer. Before a
flit is driven onto the link, the encoder compares it with the word already
on the wires and decides whether to send it unchanged, with its odd-numbered
lines inverted, with its even-numbered lines inverted, or fully inverted,
whichever gives the cheaper set of neighbour transitions. Two flag wires tell
the decoder at the far end which inversion was used, so decoding needs no
memory of earlier words.

The data is Gray coded before the choice is made. A 16x2 character LCD writer
shows the decoded and the encoded word, as on an FPGA demonstration board.

The RTL follows a published FPGA design (Spartan-3E, 9-bit flits, three
coding schemes of increasing strength) whose description names the blocks and
their order but gives few of their insides. The decision rules in particular
are this design's own; see "What is fixed and what is chosen" below.

## Transition types of a wire pair

Every pair of adjacent lines (j+1, j) is classified by comparing the word on
the link (previous) with the candidate word (present):

| Type | What happens on the pair                         | Example (prev -> present) | Cost used |
|------|--------------------------------------------------|---------------------------|-----------|
| I    | exactly one of the two lines switches            | 00 -> 01                  | 1         |
| II   | both switch, in opposite directions              | 01 -> 10                  | 2         |
| III  | both switch, in the same direction               | 00 -> 11                  | 0         |
| IV   | neither switches                                 | 01 -> 01                  | 0         |

A 9-line link has 8 such (overlapping) pairs. The cost column is the coupling
weight the encoder minimises; it counts only coupling between neighbours,
not the self-capacitance of each wire, and not the two flag wires.

## What each inversion does to a pair

This is the core of the encoder and the reason for its particular set of
detector blocks. Inverting a line of the present word flips whether that line
switches. Every adjacent pair holds exactly one odd and one even line, so:

* **Full inversion** flips both lines of every pair. Type I stays Type I;
  Types II and III become Type IV; a Type IV pair becomes Type III if its two
  previous values were equal (00, 11) and Type II if they differed (01, 10).
* **Odd inversion** (the "half" inversion) flips one line of every pair.
  Types II, III and IV all become Type I. A Type I pair becomes Type IV if the
  switching line was the odd one; if it was the even one, both lines now
  switch, giving Type III when the previous values were equal and Type II
  when they differed.
* **Even inversion** is the mirror image of odd inversion.

With P = W-1 pairs and the counts

| Count | Detector block | Pairs counted |
|-------|----------------|---------------|
| n1 | `ty_block` | Type I |
| n2 | `t2_block` | Type II |
| n4 | `t4_block` (T4**) | Type IV with differing previous values |
| no | `te_block` with `EVEN_INV=0` | Type I that odd inversion turns into Type II |
| ne | `te_block` with `EVEN_INV=1` (Te) | Type I that even inversion turns into Type II |

the exact cost of each candidate follows directly:

```
none : n1 + 2*n2
odd  : (P - n1) + 2*no
even : (P - n1) + 2*ne
full : n1 + 2*n4
```

`module_c` evaluates the four sums and picks the smallest; ties go to the
candidate that inverts fewer lines (none, odd, even, full, in that order).
All detectors work from two vectors made by `line_switches`: which lines
would switch (`present ^ previous`) and, per pair, whether the previous
values were equal.

## The three schemes

The encoder's `SCHEME` parameter selects how much of this machinery is used.

| SCHEME | Candidates | Decision block | Counts used |
|--------|-----------|----------------|-------------|
| 3 (default) | none, odd, even, full | `module_c` | n1, n2, n4, no, ne |
| 2 | none, odd, full | `module_a` | n1, n2, n4, no |
| 1 | none, half (odd), full | `majority_votes` | n1, no, switching lines |

Schemes 3 and 2 minimise the cost above over their candidate sets. Scheme 1
is a simpler majority vote: invert everything when more than half the lines
would switch; otherwise invert the odd lines when the Type-I pairs this
removes are a strict majority of the pairs. Scheme 3 is the full design and
the default.

`tb_scheme_compare` runs all three schemes side by side on the same
traffic and measures the words each design actually drives. Results:

| Stream | Measure | Scheme 1 | Scheme 2 | Scheme 3 | plain Gray |
|--------|---------|---------:|---------:|---------:|-----------:|
| 20000 random flits | coupling cost | 92648 | 79182 | 71114 | 120454 |
| 20000 random flits | line toggles (flags included) | 84141 | 88192 | 84877 | 90135 |
| 2048-step counter | coupling cost | 5095 | 5079 | 5079 | 5095 |

On random data Scheme 3 lowers the coupling cost by about 41 % against plain
Gray coding. On a counting sequence there is almost nothing to gain. Part of
the reason is the Gray bit order used here (`b ^ (b << 1)`): unlike the
usual order, it does not change exactly one line per increment. These are
cost-model numbers from simulation, not power measurements.

## Data path

```
in_data --b2g--> gray --+--------------------------------------------+
                        |                                            v
                  line_switches <--- link word (prev_data) <--- invert_xor
                        |                                            ^
          ty / te(odd) / te(even) / t2 / t4 flags                    |
                        |                                            |
                      ones (x5) ---> module_c ---- odd_inv, even_inv-+
```

* `b2g` Gray-codes the flit with `g[0] = b[0]`, `g[i] = b[i] ^ b[i-1]`
  (that is `b ^ (b << 1)`; 100101100 becomes 101110100). Note the bit order:
  it is the reverse of the common `b ^ (b >> 1)`.
* `invert_xor` builds the mask (odd lines get `odd_inv`, even lines get
  `even_inv`, line 0 is even) and XORs it on.
* `prev_data` is the link register: it holds the transmitted word and both
  flags and feeds the word back for the next comparison.
* `decoder` XORs the received word with the mask given by the flags (the
  same `invert_xor`) and converts Gray back to binary (`g2b`,
  `b[i] = g[0] ^ ... ^ g[i]`).

## Interfaces and timing

All logic is on one clock; reset is synchronous and active high.

| Module | Latency | Handshake |
|--------|---------|-----------|
| `encoder` | 1 cycle | `in_valid` qualifies `in_data`; `out_valid` pulses with the new link word. One flit per cycle, no back-pressure. Link word and flags hold while idle. Reset drives the link to all zeros. |
| `decoder` | 1 cycle | `in_valid` qualifies the link word; `out_valid`, `out_data` (held while idle). |
| `noc_coding_top` | 2 cycles in to out | link lines and flags are outputs, so routers could be inserted between encoder and decoder in a larger system. |

Top-level ports: `clk`, `rst`, `in_valid`, `in_data[8:0]`, `link_valid`,
`link_data[8:0]`, `link_odd`, `link_even`, `out_valid`, `out_data[8:0]`,
and the LCD bus `ld1[7:0]`, `rs`, `en`, plus `lcd_frame_done`.

## LCD writer

`lcd_ctrl` drives an HD44780-compatible display over its 8-bit bus (rw is
expected to be tied low). After a power-on wait it sends 0x38 (8-bit bus, two
lines), 0x0C, 0x06 and 0x01 with `rs = 0`, then refreshes forever:

```
OUTPU=<decoded word, 9 bits MSB first>
ENCOD=<link word,    9 bits MSB first>
```

Both words are captured at the start of a refresh. Each byte is set up for
`SETUP_CYC` cycles, strobed with `en` high for `EN_CYC` cycles, then followed
by a wait of `CMD_WAIT_CYC` cycles (`CLR_WAIT_CYC` after the clear). The
defaults assume a 50 MHz clock: 15 ms power-on, 240 ns strobe, 40 us per
byte, 1.64 ms after clear. One refresh takes about 65 k cycles, and the
first one completes about 0.9 M cycles after reset.

## What is fixed and what is chosen

Taken from the original description: Gray coding of the flit and its bit
order (from a printed conversion example); the block chain (line switches,
TY / T2 / T4** / Te detectors, Ones counters, a decision block, inversion,
XOR gates, previous-data feedback, decoder); odd, even and full inversion and
which scheme uses which; full inversion when both flags are set (a printed
example); 9-bit words; the LCD signals and the 0x38 start-up command; the
two labelled display lines.

This design's own choices:

* the definitions of the transition types, the cost weights (1 and 2) and
  the exact decision rules of all three schemes;
* what the detector blocks flag: the original gives only their names. An
  extra Te detector for the odd side is used in Schemes 2 and 3, because the
  cost of odd inversion cannot be computed without it;
* counts are 4 bits wide; the original shows 2-bit signals here, too narrow
  to count eight pairs;
* two flag wires instead of one "inversion bit", so the decoder can tell
  odd from even from full inversion;
* the valid handshake, one-cycle registers, reset values, and the LCD's other
  commands and timing.

Not modelled: the routers and network interfaces the link passes through,
the processing elements, and FPGA power figures.

## Files

Package `rtl/noc_coding_pkg.sv` holds the default width and the inversion
enum. One module per file in `rtl/`; `g2b` is a helper of the decoder.
Each `tb/tb_<module>.sv` is a self-checking testbench that prints
`TB_RESULT checks=N failures=M`. `tb/coding_ref_pkg.sv` is the reference
model they share: it classifies pairs from transition directions and prices
each candidate word directly, so it shares no formula with the count-based
RTL it checks.

* `tb_noc_coding_top` runs the whole design with short LCD delays: about
  3500 flits with idle gaps and a reset mid-stream. It checks every round
  trip and link word, and requires each of the four inversions, idle hold,
  reset and complete LCD refreshes to occur.
* `tb_scheme_compare` produces the comparison table above.
* `tb_noc_coding_top_full` runs the top with all default parameters. It
  sends 172, 174 and 188, waits for the first real LCD refresh (about 0.9 M
  cycles) and checks the power-on wait and both display lines. It takes
  under 10 s.

To run a testbench with Verilator:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
  rtl/noc_coding_pkg.sv tb/coding_ref_pkg.sv tb/tb_noc_coding_top.sv \
  --top-module tb_noc_coding_top
./obj_dir/Vtb_noc_coding_top
```

To change the link width, set `W` on `noc_coding_top` (any W >= 2). The
display lines are 6 + W characters long, so a 16-character display holds at
most W = 10. Set `SCHEME` to 1 or 2 to build the simpler encoders; the
decoder is the same for all three.
