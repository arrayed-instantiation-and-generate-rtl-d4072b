# SHA-256 message padding datapath and a BCD to Excess-3 converter

This repository holds two small, independent pieces of hardware that both show
how one module is replicated many times from a single description:

* **The input preprocessing unit (IPU) datapath of a SHA-256 engine.** Before
  SHA-256 can hash a message, the message must be padded to a whole number of
  512-bit blocks. The IPU takes the message in 64-bit packets, one per clock,
  and hands out complete 512-bit padded blocks.
* **A k-digit BCD8421 to Excess-3 converter.** Every decimal digit's Excess-3
  code is its BCD code plus 3, so the converter is k identical 4-bit adders. It
  is written twice: once with an arrayed instance and once with a generate loop.

Both live side by side in the top module `ami_top`, each with its own ports.

## How padding becomes four kinds of packet

SHA-256 pads a message of l bits by appending a single 1 bit, then k zero bits
so that l + 1 + k = 448 (mod 512), then l itself as a 64-bit big-endian number.
The total is a multiple of 512 bits.

The IPU only accepts messages whose length is a multiple of 64 bits. Then
everything after the message is a multiple of 64 bits too, and it splits into
whole 64-bit packets of just three kinds. So a padded message is a sequence of
four packet types:

| type    | value                              | how many                          |
|---------|------------------------------------|-----------------------------------|
| message | the next 64 bits of the message    | n = l / 64                        |
| padding | `8000_0000_0000_0000` (1, 63 zeros) | exactly 1                         |
| zero    | `0000_0000_0000_0000`              | enough to fill up to the last slot |
| length  | l on 64 bits                       | exactly 1, last packet of the last block |

The number of packets is the smallest multiple of 8 that is at least n + 2.
Examples:

* `"abcd0123"` (8 ASCII bytes, l = 64): one message packet
  `6162636430313233`, the padding packet, five zero packets and the length
  packet `0000000000000040`, which is one 512-bit block.
* A 72-character text (l = 576): nine message packets, padding, five zero
  packets and the length packet, which is two blocks. Block 2 begins with the
  ninth message packet.
* n = 7 (l = 448): the padding packet fills the eighth slot of the first block.
  The second block is seven zero packets followed by the length packet.

Because of this, the datapath never has to shift or mask bits. It only has to
write one of four possible 64-bit values into the right slot of the block.

## The IPU datapath (`ipu_dp`)

```
          pad_pkt zero_pkt mlen_pkt
                 |   |   |
 pkt ---------> +---------+      +-------------------+
                | pktmux  |----> | regfl  8 x 64     | ---> blk[511:0]
 ms_len ------> +---------+  d   |  dec#(3) strobes  |      (reg 0 = bits 511..448)
   ^                             +-------------------+
   |                               ^ s        ^ we
 +---------+                       |          |
 | len_reg | <- +64 per message    idx     st_pkt
 +---------+    packet stored      |
                             +----------+
             st_pkt -------> | cntr (3) | ---> idx
             clr ----------> +----------+
```

* **pktmux** selects the packet to store. If none of `pad_pkt`, `zero_pkt`
  and `mlen_pkt` is high it passes the message packet `pkt`. Otherwise it
  gives the padding packet, a zero packet, or the length `ms_len`. At most one
  of the three selects may be high in a cycle, and an assertion in `ipu_dp`
  checks this.
* **regfl** is eight 64-bit registers. A 3-to-8 decoder `dec`, enabled by
  `we`, turns the address into one write strobe per register. Its output is
  all eight registers concatenated, with register 0 in the most significant
  bits, so the packets appear in message order.
* **cntr** is a 3-bit counter. It advances on every store and gives `idx`, the
  next free slot, which is also the number of packets stored so far in the
  current block. After the eighth store it wraps to 0, and at that point `blk`
  holds a complete block.
* **len_reg** is a 64-bit register that adds 64 for every stored *message*
  packet. When the length packet is selected, `ms_len` is already l.

`clr` clears the counter and the length register. Issue it before a new
message. The register file is not cleared, because every slot is rewritten
before a block is complete.

### Timing

One packet per clock, with no bubbles needed. With `st_pkt` high on a rising
edge, the selected packet is written at `idx`, and `idx` advances after that
same edge. A block is therefore complete 8 cycles after its first packet was
stored. You can see this as `idx` returning to 0. The block then stays on
`blk` until the next store. Cycles with `st_pkt` low change nothing, so the
packet source may stall freely. A consumer should take `blk` in the cycle in
which `idx` has just wrapped to 0. If the next message's first packet is
stored in that same cycle, register 0 of the block changes on the following
edge.

### Driving it

Sequencing the packets is the job of a control unit outside `ipu_dp`. That
controller is not part of this RTL. Its control inputs are ports of `ami_top`.
For a message of n packets it must:

1. pulse `clr` for one cycle;
2. store the n message packets (`st_pkt` = 1, all selects 0);
3. store one packet with `pad_pkt` = 1;
4. store zero packets with `zero_pkt` = 1 until `idx` = 7;
5. store one packet with `mlen_pkt` = 1.

If `idx` is 7 right after step 3, step 4 runs for seven packets of the next
block. `ipu_dp_tb` and `ami_top_tb` contain exactly this sequence, written as
a task.

## The BCD8421 to Excess-3 converter

`bcde3conv` and `bcde3conv_gen` both map a k-digit BCD number (digit i in bits
4i+3..4i) to its Excess-3 code by adding 3 to each digit with an `add4b`
adder. The two differ only in how the k adders are written:

* `bcde3conv` uses one **arrayed instance**, `add4b u_digit [k-1:0]`. A signal
  that is k times as wide as a port is cut into k equal slices, one per
  instance. This happens to `bcd` and `e3`. A signal exactly as wide as the
  port goes to every instance unchanged, as the 4-bit constant 3 does. This
  form suits replicas that are connected identically.
* `bcde3conv_gen` uses a **generate for loop** over a genvar. Each iteration
  is a named block `g_digit[i]` holding one adder, wired to the part-selects
  `[4*i +: 4]`. This form scales to irregular interconnect, since each
  iteration can compute its own indices or use `if`/`case` to vary the
  structure. The `generate`/`endgenerate` keywords are optional in
  SystemVerilog and are left out.

`add4b` has no carry. A BCD digit plus 3 is at most 12. An input digit above 9
is not BCD, and it gives digit + 3 modulo 16.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `ipu_pkg` | `PKT_W`, `NPKT` | 64, 8 | packet width, packets per block (`IDX_W` = 3, `BLK_W` = 512 follow) |
| `regfl` | `W`, `AW` | 64, 3 | register width, address width (2**AW registers) |
| `dec` | `W` | 3 | selection width |
| `cntr` | `W` | 3 | counter width |
| `len_reg` | `W`, `STEP` | 64, 64 | register width, bits added per message packet |
| `pktmux` | `W` | 64 | packet width |
| `bcde3conv`, `bcde3conv_gen` | `k` | 4 | number of digits |
| `ami_top` | `K` | 4 | digits of both converters |

`ipu_dp` is fixed to SHA-256's sizes through `ipu_pkg`. The padding rule
depends on 512-bit blocks and a 64-bit length, so these are not free
parameters.

## Design choices beyond the functional description

These are this design's own decisions. Change them if your system needs
something else.

* **Reset.** Every register has a synchronous, active-high `rst`. `clr` clears
  only the counter and the length register.
* **What the length register counts.** It adds 64 only when a *message* packet
  is stored (`st_pkt` with no select high). A simpler reading, "add 64 on
  every store", would also count the padding and zero packets, and the length
  packet would then be wrong.
* **Decoder enable.** `dec` has an enable input, driven by the register file's
  write enable.
* **Select priority.** If several selects were high despite the one-hot rule,
  `pktmux` would give priority to padding, then zero, then length. In
  simulation the assertion in `ipu_dp` flags that case.
* **Input restriction.** Only messages of whole 64-bit packets are supported.
  Messages of arbitrary bit or byte length would need a partial-packet padding
  path, and none is built.
* **Converter naming.** The generate form is named `bcde3conv_gen` so that
  both forms can be instantiated together.

Not included: the IPU control unit (see "Driving it") and the SHA-256
compression function that consumes the blocks.

## Files

`rtl/`: `ipu_pkg` (shared sizes and types), `add4b`, `bcde3conv`,
`bcde3conv_gen`, `dec`, `cntr`, `len_reg`, `pktmux`, `regfl`, `ipu_dp`,
`ami_top`.

`tb/`: one self-checking testbench per module, `<module>_tb.sv`. Each prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog.

* `add4b_tb`, `dec_tb`: exhaustive.
* `bcde3conv_tb`, `bcde3conv_gen_tb`: all 10000 four-digit numbers plus random
  non-BCD inputs.
* `cntr_tb`, `len_reg_tb`, `regfl_tb`, `pktmux_tb`: random stimulus against a
  model.
* `ipu_dp_tb`: plays the controller for `"abcd0123"` (checked against the
  hand-worked block above), the 72-character text (two blocks) and random
  messages of 0 to 20 packets with random stalls. It checks every block, `idx`
  after every store, and the 8-cycle block time.
* `ami_top_tb`: the whole design at default parameters. It runs both
  converters over every input and compares them. It also runs the IPU over
  messages of 0 to 17 packets, and it counts and requires each mechanism:
  message, padding, zero and length packets, counter wrap, clear, multi-block
  messages, padding in the last slot, and stalls.

Simulating with Verilator, for example the top-level test:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb \
    rtl/ipu_pkg.sv tb/ami_top_tb.sv --top-module ami_top_tb -Mdir obj
./obj/Vami_top_tb
```

Any other testbench works the same way with its own name. `rtl/ipu_pkg.sv`
must come first because several modules import it. All testbenches finish in
well under a second.
