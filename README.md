# BCH(31,16) encoder with an unfolded LFSR

NAND flash cells, especially multi-level cells, lose and flip bits, so the
data written to them is protected by an error-correcting code. A binary BCH
code is a common choice. Its encoder is simple: the check bits are the
remainder of a polynomial division. The textbook circuit for that division is
a linear feedback shift register (LFSR), a ring of flip-flops and XOR gates
that takes **one bit per clock**. That makes the encoder slow.

This design unrolls the LFSR in time. The technique is *unfolding*: J
consecutive iterations of the bit-serial circuit are drawn as one circuit.
The unfolded LFSR takes **J bits per clock** and still has only the 15
flip-flops of the serial one. The code is BCH(31,16): 16 message bits, 15
parity bits, up to 3 correctable errors. The default unfolding factor is
J = 3, which cuts the encoding of one codeword from 31 LFSR clocks to 11.

The RTL is written from the published description of this design: "High
Throughput LFSR Design for BCH Encoder using Sample Period Reduction Technique
for MLC NAND based Flash Memories". The code, the polynomial, the LFSR form,
the unfolding rule, J = 3 and the worked example come from that paper. The
message register's shape, the controller and the handshake are this
implementation's own. The section on departures at the end lists every
difference.

## The code and its generator polynomial

The code is built over GF(2^5), using the primitive polynomial
p(x) = x^5 + x^2 + 1. Let alpha be a root of p(x). To correct t = 3 errors,
g(x) must have alpha, alpha^3 and alpha^5 among its roots. Each of these
elements has a minimal polynomial over GF(2):

| element | minimal polynomial        |
|---------|---------------------------|
| alpha   | x^5 + x^2 + 1             |
| alpha^3 | x^5 + x^4 + x^3 + x^2 + 1 |
| alpha^5 | x^5 + x^4 + x^2 + x + 1   |

g(x) is their least common multiple. The three polynomials are distinct and
irreducible, so the LCM is their product:

    g(x) = x^15 + x^11 + x^10 + x^9 + x^8 + x^7 + x^5 + x^3 + x^2 + x + 1
         = 16'h8FAF   (bit i = coefficient of x^i)

`rtl/bch_pkg.sv` does not hard-code this number. It computes it at
elaboration time from p(x). It builds each minimal polynomial as the product
of (x + beta^(2^i)) over the conjugates of beta, using GF(2^5) arithmetic. It
then multiplies the distinct ones. The constant is exported as
`bch_pkg::BCH_G`. The LFSR testbench checks that it equals 16'h8FAF.

Encoding is systematic. With i(x) the message polynomial:

    i(x) * x^15 = q(x) * g(x) + r(x)      codeword = { message , r }

## The serial LFSR

The division circuit has 15 registers y14..y0. On each clock it does this:

    fb = y14
    y  = { y13..y0 , in }  XOR  (fb ? g[14:0] : 0)

The incoming bit enters at y0. The bit that leaves y14 feeds back through an
XOR into every register at a non-zero coefficient of g. There are 10 such
taps (x^0, x^1, x^2, x^3, x^5, x^7, x^8, x^9, x^10, x^11). The input stream
is the message, most significant bit first, followed by 15 zeros. The zeros
do the multiplication by x^15. Once the last zero has entered, y holds r(x).

This is the plain division form. The message bit is not added at the
feedback point, which is the premultiplied variant. Both give the same
remainder, but the plain form needs the 15 extra clocks for the zeros.

## Unfolding: J bits per clock

Think of the LFSR as a data-flow graph: XOR nodes joined by edges, with each
edge carrying some number of delays (registers). Unfolding by a factor J
turns it into a new graph:

* every node U becomes J copies U_0 .. U_(J-1);
* every edge U -> V that carries w delays becomes J edges
  U_i -> V_((i+w) mod J), each carrying floor((i+w)/J) delays.

In the LFSR every edge that carries a delay has w = 1. Copy i then feeds
copy i+1 through a plain wire, and only the edges out of copy J-1 keep their
register. The result is J XOR networks in a chain, with the original 15
registers closing the ring after the last one. The registers hold exactly
the serial register contents after every J-th bit. Within a group, copy 0
takes the earliest bit.

```
        din[J-1]      din[J-2]             din[0]
           |             |                   |
 y_q --> [copy 0] --> [copy 1] --> ... --> [copy J-1] --> y_q (15 flip-flops)
```

`rtl/unfolded_lfsr.sv` builds this chain with a generate loop. Each copy is
the one-bit step above, with its taps set by the parameter `G`. The cost of
unfolding is J times the XOR gates: 10 per copy, 30 at J = 3. The critical
path also runs through J XOR stages. In exchange, each clock does J times
the work.

### Why J = 3

The loops of the LFSR graph give an *iteration bound*. This is the largest
ratio, over all loops, of the loop's computation time to its number of
delays. For this g(x) the bound is 10/15 = 2/3 of one XOR time. That is
smaller than the time of one node, and it is not an integer. So the serial
circuit cannot reach it, and retiming cannot help either. Unfolding by J
multiplies the bound by J. J = 3 is the smallest factor for which J x 2/3 is
an integer and is at least one node time. That makes it the default. The
parameter also accepts J = 1 (the serial LFSR) and J = 2, the two
configurations the paper compares against.

## Worked example

Take the message 0000000001000001. The leading zeros do not change the
remainder. If they are dropped, the LFSR sees the 22-bit stream
`1000001` followed by 15 zeros. Its parity is **100101000100010**.

| J | bits per clock | clocks for the 22-bit stream |
|---|----------------|------------------------------|
| 1 | 1              | 22                           |
| 2 | 2              | 11                           |
| 3 | 3              | 8 (2 leading zeros pad the stream to 24 bits) |

`tb/tb_unfolded_lfsr.sv` runs this example at all three factors. It compares
the register contents after every clock with the expected sequence. The
serial sequence starts 000000000000001, 000000000000010, ... and reaches
000110110101111 at clock 16, when the first feedback fires. It ends at
100101000100010.

The encoder itself always streams all 16 message bits (next section). For
this message it therefore runs 11 clocks at J = 3:

| clock | bits in | y14..y0         |
|-------|---------|-----------------|
| 1-3   | 000     | 000000000000000 |
| 4     | 001     | 000000000000001 |
| 5     | 000     | 000000000001000 |
| 6     | 001     | 000000001000001 |
| 7     | 000     | 000001000001000 |
| 8     | 000     | 001000001000000 |
| 9     | 000     | 000110110101111 |
| 10    | 000     | 110110101111000 |
| 11    | 000     | 100101000100010 |

## The encoder (`bch_encoder`)

```
 msg[15:0] --> msg_piso --J bits/clk--> unfolded_lfsr --15--> parity
     |          (W = PAD+16,              (15 regs,             |
     |           zero fill)                J XOR copies)        |
     +--> msg_q ------------------------------------------------+--> codeword[30:0]
```

* **msg_piso** (`rtl/msg_piso.sv`) is a parallel-in, serial-out register.
  Its output is J bits wide. It is loaded with the message behind PAD
  leading zeros, where PAD = ceil(31/J)*J - 31 (2 at J = 3). Each shift moves
  the word up by J bits and fills in zeros. After the message has left, the
  register keeps supplying zeros. These are the 15 appended zeros, so no
  separate source is needed.
* **unfolded_lfsr** is cleared when a word is accepted. It then advances by
  J bits per clock for NCYC = ceil(31/J) clocks: 31, 16 or 11.
* A small controller in the top module (state IDLE/RUN and a clock counter)
  sequences the two blocks. A copy of the message is kept for the codeword,
  which is `{msg, parity}`. The message is in bits 30..15 and the parity in
  bits 14..0.

### Interface and timing

| port      | dir | width | meaning |
|-----------|-----|-------|---------|
| clk       | in  | 1     | clock |
| rst_n     | in  | 1     | asynchronous reset, active low |
| in_valid  | in  | 1     | `msg` holds a word to encode |
| in_ready  | out | 1     | encoder idle; the word is taken on an edge where both are high |
| msg       | in  | 16    | message; msg[15] is the first bit on the line |
| out_valid | out | 1     | one-clock pulse: `codeword` is ready |
| codeword  | out | 31    | `{msg, parity}`; stable until the next word is accepted |

* The edge that accepts a word loads the PISO and clears the LFSR.
* The next NCYC edges advance the LFSR. `out_valid` rises after the NCYC-th
  edge, so it is first seen at the (NCYC+1)-th edge after acceptance: 12 at
  J = 3.
* `in_ready` is high again during the `out_valid` cycle, so the next word can
  be accepted then. Back-to-back codewords come out every NCYC+1 clocks: 12
  at J = 3, against 32 for the serial encoder.
* Assertions check that `out_valid` is a single-cycle pulse, that no word is
  accepted during an encoding, and that the PISO never sees load and shift
  together.

## Parameters

| module        | parameter | default       | meaning |
|---------------|-----------|---------------|---------|
| bch_encoder   | K         | 16            | message bits |
|               | N         | 31            | codeword bits |
|               | J         | 3             | unfolding factor (bits per clock) |
|               | G         | `bch_pkg::BCH_G` (16'h8FAF) | generator polynomial, degree N-K |
| unfolded_lfsr | R, G, J   | 15, 16'h8FAF, 3 | remainder width, polynomial, unfolding factor |
| msg_piso      | W, J      | 18, 3         | word width, bits per shift |

Any J from 1 up works; the unfolded chain simply gets longer. A different
code needs a matching `G` and `N`/`K`. The package functions can derive the
polynomial for another t. For another field size, change `BCH_M` and `BCH_P`.

## Departures from the source and points of interpretation

* **Whole message always encoded.** The paper's example counts 22 clocks for
  the serial LFSR and 8 for J = 3. These counts start at the first 1 of
  0000000001000001, with the nine leading zeros dropped. Hardware cannot skip
  data-dependent leading zeros. This encoder streams all 31 bits (16 message
  bits and 15 zeros), in 31/16/11 clocks for J = 1/2/3. The 22/11/8-clock
  example is reproduced at the LFSR level.
* **Reference values.** The polynomial (with its x^3 term), the example
  parity 100101000100010 and the register values after each clock are the
  ones that the minimal-polynomial product and long division confirm. The
  testbenches compare against those.
* **Design choices not in the source:** the PISO's J-bit output and zero
  fill, the leading-zero padding, the controller, the valid/ready handshake,
  the extra load clock per codeword, the asynchronous reset and the
  codeword's bit layout.
* **Not built.** The iteration-bound analysis that selects J is done at
  design time; it is not hardware. The area and power comparison was made on
  an FPGA and has no RTL counterpart. The decoder and the flash memory are
  outside the described design.

## Verification

Every testbench is self-checking. Each ends with a line
`TB_RESULT checks=<n> failures=<n>` and has a watchdog.

| testbench | what it checks |
|-----------|----------------|
| `tb_unfolded_lfsr` | The derived g(x). The example's register contents after every clock at J = 1, 2, 3. The parity in 8 clocks at J = 3. Hold and clear. 600 random clocks per factor against a bit-serial model. 200 full codewords against long division. |
| `tb_msg_piso` | Random words at W = 18 and W = 16 (J = 3). Every output group, zero fill, hold while idle. |
| `tb_bch_encoder` | Default parameters, 2000 words: the paper's example, all-zero and all-one words, then random words. Each codeword is checked against long division and must be a multiple of g(x). Also checks latency, the back-to-back period and that the codeword is held. It counts stalls, back-to-back accepts, idle gaps and held results, and fails if any never happens. |
| `tb_bch_encoder_unfold` | Encoders at J = 1, 2, 3 side by side. Identical, correct codewords in 31, 16 and 11 LFSR clocks. |

The encoder synthesises to 58 flip-flops. These are 15 in the LFSR, 21 in
the PISO, 16 for the message copy and 6 for control. The LFSR logic is 30
single-bit XORs at J = 3.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
    rtl/bch_pkg.sv tb/tb_bch_encoder.sv --top-module tb_bch_encoder -o sim
./obj_dir/sim
```

Replace `tb_bch_encoder` with any other testbench name. The package must be
listed first; the modules are found through `-y`. Each run takes well under
a second.
