# (31,16) majority-logic error-correcting link

This is a teletype-to-teletype data link that protects text against random line errors. Its
method is simple enough to build from a handful of logic gates. Two 8-bit characters typed on the
sending teletype form 16 information bits. These are encoded into a 31-bit block of the (31,16)
cyclic Euclidean-geometry code and sent at 19.2 kHz. Up to three bits per block can be deliberately
inverted on the way. At the receiver the block is decoded by two-step majority logic: no
arithmetic, no syndrome tables, only XOR trees, "at least four out of six" gates and a shift
register that is rotated 16 times. The corrected characters are then printed at 110 baud.

The RTL follows the experimental unit described in the report *Experimental Unit for (31,16)
Binary Code Using Majority-Logic Decoding* (Coordinated Science Laboratory). That unit was built
from TTL. This is a synchronous SystemVerilog re-implementation of it. Where the original
description leaves a detail open, the choice made here is named in the header comment of the
module concerned, and the main ones are collected under "Where this design makes its own choices"
below.

## The code

| property | value |
|---|---|
| block length n | 31 |
| information bits k | 16 |
| parity bits | 15 |
| minimum distance | 7, so any 3 errors in a block are corrected |
| generator g(X) | 1+X+X²+X³+X⁵+X⁷+X⁸+X⁹+X¹⁰+X¹¹+X¹⁵ |
| parity check h(X) | 1+X+X⁴+X⁹+X¹⁰+X¹¹+X¹²+X¹⁶ (g·h = X³¹+1) |

Bit positions are numbered by powers of X: c_p is the coefficient of X^p. The code is systematic.
The 16 data bits are c_30 … c_15, sent first and in that order, and the parity bits c_14 … c_0
follow. Data bit k (k = 0 is the first character's least significant bit) is therefore c_(30-k).
The same numbering is used for the decoder register stages. All shared constants live in
`rtl/ml_pkg.sv`: the widths, the h(X) taps and the check-set tables.

## What goes on the line

The line idles at mark (1). A block is 32 bit times at 19.2 kHz (16 clocks of 307.2 kHz per bit):

```
 mark ... | start (0) | c30 c29 ... c15 | c14 ... c0 | mark ...
            1 bit       16 data bits      15 parity
```

The framing is start-stop, like a teletype character. The receiver resynchronizes on the start
bit of every block, so the two stations need no shared clock. A block lasts 512 clocks, about
1.67 ms. A pair of characters takes 0.2 s to type (22 units of 1/110 s). The link is therefore
idle most of the time, and the receiver can afford to decode a whole block within one bit time.

## Encoding: a 16-stage register driven by h(X)

`encoder_register` is loaded in parallel with the 16 data bits, with c_30 in the output stage. On
each of 31 shifts the output stage goes to the line. The stage entering at the far end is the XOR
of the stages selected by h_0 … h_15:

    c_j = Σ_{i=0..15} h_i · c_(j+16-i)      for j = 14, 13, …, 0

In words, while the 16 data bits shift out, the register computes each parity bit from the 16 bits
before it. After the 16th shift it holds nothing but parity, which then follows on the line. No
separate parity register and no output multiplexer are needed. With the encoder switched out, the
feedback is forced to 0 and the 15 parity places carry zeros.

## Decoding: two-step majority logic

This is the part that needs the most explanation.

### Step 1: six sets of orthogonal checks

Each parity check of the code used here is the XOR of 8 received bits. For a valid codeword it
is 0; with errors it equals the XOR of the errors at those 8 positions. The checks are arranged in
six sets of six (`CHECK_COMMON`, `CHECK_OTHER` in `ml_pkg`):

| set | common positions | the six checks add these four positions each |
|---|---|---|
| 1 | 0, 7, 11, 30 | 1 2 10 26 / 3 12 14 16 / 4 5 18 28 / 6 15 20 25 / 8 21 24 27 / 9 13 23 29 |
| 2 | 1, 16, 27, 30 | 0 3 10 21 / 2 7 8 14 / 5 13 20 22 / 6 9 17 18 / 11 12 24 26 / 15 19 23 28 |
| 3 | 2, 23, 25, 30 | 0 6 13 26 / 1 7 15 29 / 3 18 22 24 / 4 8 16 19 / 5 12 17 21 / 9 10 11 20 |
| 4 | 4, 10, 17, 30 | 2 5 11 19 / 3 6 27 29 / 7 22 26 28 / 8 12 20 23 / 9 16 21 25 / 13 14 15 24 |
| 5 | 5, 24, 29, 30 | 0 8 9 28 / 1 12 22 25 / 2 3 15 17 / 4 11 13 27 / 6 10 14 19 / 7 18 21 23 |
| 6 | 6, 8, 22, 30 | 0 19 24 25 / 1 5 9 14 / 2 13 16 18 / 3 4 23 26 / 7 17 20 27 / 10 12 28 29 |

Within a set, every check contains the four common positions, and no other position appears in
more than one check. The six checks are *orthogonal* on the modulo-2 sum E = e_a⊕e_b⊕e_c⊕e_30 of the
errors at the common positions:

- If E = 1 and there are at most three errors in all, at least four checks fail.
- If E = 0, at most three fail.

A six-input majority gate therefore outputs E exactly.

`check_xor_network` forms the six checks of a set cheaply. It takes the parity of the four common
bits once, takes the parity of each check's four other bits, and XORs the common parity into each
of them. That is 14 + 7 + 6 two-input XORs per set.

`majority_gate6` is an adder tree. A three-input adder takes inputs 1 to 3 and another takes
inputs 4 to 6. A two-input adder takes their two sum bits and only its carry is used. A final
three-input adder takes the three carries, and its carry is the output. The input count equals
2·(c1+c2+c3) + (s1⊕s2), so the final carry is 1 exactly when four or more inputs are 1. A 3-3 tie
gives 0.

### Step 2: one more majority gate

The six common sets {0,7,11}, {1,16,27}, {2,23,25}, {4,10,17}, {5,24,29} and {6,8,22}, each with
position 30 added, are in turn orthogonal on position 30. A seventh `majority_gate6` over the six
step-1 outputs (`majority_logic`) therefore decides whether bit 30 is wrong. The decoded digit is
c_30 XOR that decision.

### Rotating the register instead of building 16 decoders

The logic above decodes one position only, position 30. That is enough because the code is
cyclic. `decoder_register` is a 31-stage shift register, and it works in two phases:

1. **Receive.** It shifts in the start bit and the 31 code bits from the line: 32 shifts at
   19.2 kHz. The start bit falls off the far end, and stage p then holds c_p.
2. **Decode.** The input switch is turned to feedback. Each shift sends the decoded digit out
   *and* feeds it back into stage 0.

A cyclic shift of a codeword is a codeword, and the corrected digit replaces the wrong one, so the
same gates see a valid block with at most three errors every time. The next data bit is now at
position 30. Sixteen shifts on consecutive 307.2 kHz clocks (52 µs) deliver the 16 data bits into
`decoded_sipo`. The whole decode fits inside one 19.2 kHz bit time, so a new block could follow
immediately.

## Error generator

`error_generator` simulates the noisy channel. It uses one 5-bit maximal-length shift register
with feedback from bits 2 and 5, counting from the least significant bit as bit 1. Starting from
1, the register steps through

    2 5 10 21 11 23 14 29 27 22 12 24 17 3 7 15 31 30 28 25 19 6 13 26 20 9 18 4 8 16 1

A forced 1 keeps it out of the all-zero state. A sixth stage holds the bit shifted out of stage 5.

During each block's start bit, the output control steps the register four times on consecutive 307.2 kHz clocks.
The values after the first three steps are loaded into down-counters A, B and C. When C is
loaded, the sixth stage is latched as the block's control bit. Every transmitted bit decrements
the three counters, and a counter that reads zero inverts the bit then on the line. A counter
loaded with n therefore hits the n-th bit after the start bit, where 1 is the first data bit.

The three addresses of a block are consecutive register values, so they are always distinct. A
block gets either exactly three errors or none: a control bit of 1 suppresses them. Four steps per
block against a period of 31 make the pattern repeat every 31 blocks, which is 62 characters.
With coding switched off, 23 of those 62 characters arrive with damaged data bits. The rest have
their errors only in the unused parity places, or none at all.

## Teletype side and clocks

Each station has two independent clocks, as the original unit had two crystal oscillators per
station:

- A 307.2 kHz clock runs the block logic: 307.2 kHz / 16 = 19.2 kHz.
- An 880 Hz clock runs the teletype interface: 880 Hz / 8 = 110 baud.

`tty_input` waits for a start transition. It then samples the line each time a 3-bit counter of
880 Hz ticks reaches 4, which is the middle of each 1/110 s unit. It shifts the 8 data bits of
each character into a 16-bit register. During the second character's first stop unit it toggles
`xfer_tgl`.

The 307.2 kHz side synchronizes that toggle and loads the encoder register. The 16-bit word is
not synchronized bit by bit. It cannot change for more than two teletype units after the toggle,
which is thousands of fast clocks.

On the receiving side the same toggle-and-quasi-static-word scheme carries the decoded word into
`tty_output`. There a 22-bit register holds two complete characters: start bit, 8 data bits and
2 stop bits each. The register is shifted out at 110 baud.

## Demonstration switches

`ml_system` has the three in/out switches of the original demonstration:

| mode | `enc_in` | `err_in` | `dec_in` | result |
|---|---|---|---|---|
| 1 plain link | 0 | 0 | 0 | text arrives unchanged |
| 2 errors, no coding | 0 | 1 | 0 | 23 of every 62 characters damaged |
| 3 errors and coding | 1 | 1 | 1 | text arrives unchanged despite up to 3 errors per block |

"Out" bypasses the coding function of a unit, not its framing. The block format is always used,
so that mode 2 shows exactly the errors that mode 3 corrects.

## Module hierarchy

```
ml_system                      whole link (top)
├── encoder_station            sending unit
│   ├── tty_input              880 Hz: teletype receiver + 16-bit input register
│   ├── encoder_register       16-stage h(X) encoder
│   ├── error_generator        address register + counters A, B, C
│   └── enc_output_control     framing, 19.2 kHz timing, error XOR
└── decoder_station            receiving unit
    ├── decoder_control        start detection, 32 receive + 16 decode shifts
    ├── decoder_register       31-stage register, feedback switch, correcting XOR
    │   └── majority_logic     6 × (check_xor_network + majority_gate6) + 7th gate
    ├── decoded_sipo           16-bit serial-in, parallel-out register
    └── tty_output             880 Hz: 22-bit output register and 110-baud output
ml_pkg                         constants and check tables
sync2                          two-flop synchronizer
```

Every module has parameters whose defaults are the original rates and sizes: `BIT_DIV` = 16 and
`TTY_DIV` = 8. All resets are synchronous and active high. Hold `rst` for at least two 880 Hz
periods.

## Simulating

Each testbench in `tb/` checks itself and ends by printing
`TB_RESULT checks=N failures=M`. `tb/tb_code_pkg.sv` holds the reference model. It encodes by
long division by g(X) and carries the published error-address sequence, independently of the RTL.
`tb/tty_model.sv` is a behavioural 110-baud teletype line.

Any testbench is run like this, for example the end-to-end one:

```
verilator --binary --timing --assert --timescale 1ns/1ps -y rtl -y tb +libext+.sv \
    rtl/ml_pkg.sv tb/tb_code_pkg.sv tb/tb_ml_system.sv --top-module tb_ml_system
./obj_dir/Vtb_ml_system
```

`tb_ml_system` runs the complete link at the real clock rates. The four clocks are set slightly
apart. It goes through mode 1 (8 characters), mode 2 (62 characters, one full error period) and
mode 3 (62 characters). It checks that mode 2 damages exactly 23 characters and that modes 1 and 3
deliver the text intact. It also counts that every mechanism occurred: each mode, blocks with
three errors, blocks left clean by the control bit, and decoder corrections. The run covers about
15 s of link time and takes a few seconds of wall time.

The block testbenches check the following:

| testbench | checks |
|---|---|
| `tb_majority_gate6` | all 64 inputs |
| `tb_majority_logic` | the decisions of both steps against random errors |
| `tb_encoder_register` | serial output against g(X) division |
| `tb_error_generator` | the published sequence and the 23-of-62 figure |
| `tb_decoder_control`, `tb_enc_output_control` | shift counts, sampling points and block timing (512 clocks per block, 16-clock decode) |

## Where this design makes its own choices

The original description gives the code, the check equations, the register sizes, the rates and
the block diagrams. The following were filled in here:

- **Bit numbering.** No end of the decoder register is numbered in the original. The numbering
  used here is the one for which every listed check equation is a parity check of the code. This
  was verified against g(X) for all 36 equations.
- **Correcting gate.** The prose calls the gate that combines the majority decision with the
  register output an OR. The diagrams draw an exclusive-OR, and only an XOR can correct a 1 to a
  0, so an XOR is used.
- **Majority gate.** The diagram labels the adder on inputs 4 to 6 a half adder but draws three
  inputs into it. It is built as a three-input adder, which the six-input count needs.
- **Encoder taps.** The encoder's feedback taps are derived from h(X). The block diagram shows the
  structure but no tap numbers.
- **Error-generator control bit.** Three details are chosen here: which register steps load A, B
  and C, when the control bit is latched, and its polarity. They are chosen so that the generator
  reproduces the published figure of 23 damaged characters in 62.
- **Switches.** The meaning of the in/out switches inside each unit is chosen here (see
  "Demonstration switches"). In mode 2 the parity places carry zeros.
- **Sampling and synchronizers.** The two-flop synchronizers, the toggle handshakes between clock
  domains, mid-bit sampling at the block receiver and the registered line output are additions
  for a synchronous implementation.
- **Resets.** Every register has a synchronous reset. The original does not discuss reset.
- **Output register.** A word that arrives while the previous pair is still being printed is
  held until that pair is finished.

The crystal oscillators and the teletypes themselves are not modelled in RTL: the clocks are top
ports, and the teletypes are replaced in simulation by `tty_model`. The data channel is a wire,
observable as the `channel` port.
