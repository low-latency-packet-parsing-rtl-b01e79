# A programmable packet parser with hardware boundary checking

This is synthesizable SystemVerilog for a protocol-independent packet parser.
It is for SDN switches and routers that must parse Ethernet, VLAN, MPLS, IPv4,
IPv6, GRE, TCP and protocols not yet defined, at line rate and without
buffering the packet. The parser runs a small program: one instruction per
header segment of up to 64 bits. Each instruction says where the segment's
bytes go in the Packet Header Vector (PHV) and which fields the specialised
units should pull out.

The main idea is that the **boundaries of headers and packets are watched by
hardware, not by the program**. Older parsers of this kind spend extra
instructions, and dead cycles, asking "has the IPv4 header ended yet? is
there a payload?" after every variable-length piece. Here, down-counters
loaded from the length fields reach zero in the very cycle a header or packet
ends. The control unit (the *Advanced Program Control*, APC) then jumps
straight to the next header's code, to payload forwarding or to trailer
parsing. As a result, a parse program is simply the full list of instructions
for the longest form of a header, options included. The counters cut it short
wherever the actual packet ends.

The architecture (functional units, their roles, eight packet counters, eight
next-header comparators, the 3-bit condition field, the branch types and their
priorities) follows the published design "Low-latency Packet Parsing in
Software Defined Networks". The instruction format, the stream interface, the
configuration bus, memory sizes, latencies and many details are this
implementation's own choices. They are listed under "Departures and open
points" below.

## Structure

```
             in_data[63:0] (8-byte window)            cfg (program / tables)
                  |                                        |
   +--------------+------+--------------+-------------+    |
   v              v      v              v             v    v
 extraction    extraction  Next Header   Branch       Branch Condition
 (hdr size)   (pkt size)   Resolve Unit  Catalyst     Evaluator
   |              |        (8 cmp/word)  (8 values)   (3-bit cond)
   v              v          | ready/addr   | hit/addr    | taken
 boundary_counters ----------+--------------+-------------+
  1 header + 8 packet          \                          |
   | hdr_exp, pkt_exp, pkt_min  v                         v
   +------------------------->  APC  --next_pc--> instr_mem --instr--> (all units)
                                 |  exec, consume
                                 v
                  phv_filler (8/16/32-bit containers) --> phv_out, phv_valid
                  in_consume, pl_valid/pl_bytes (payload to a buffer)
```

| Module | Role |
|---|---|
| `parser_top` | wires everything; stream, payload, PHV and configuration ports |
| `apc` | Advanced Program Control: next-address priority logic, stall states, return stack |
| `instr_mem` | 256-word program memory, synchronous read of the APC's next address |
| `boundary_counters` | one header-size and eight payload/packet-size byte counters |
| `nh_resolve_unit` | next-header lookup: 8 parallel comparators per store word, iterating over words |
| `branch_catalyst` | one-cycle multi-way branch on flag bits (for example GRE C/K/S) |
| `branch_cond_eval` | field-versus-reference test under a 3-bit condition |
| `phv_filler` | writes the consumed segment into PHV containers, emits the PHV per packet |
| `extraction_engine` | bit-field extractor used inside every unit above |
| `parser_pkg` | instruction word, enums, configuration bus, constants |

## The stream interface

`in_data` shows the next eight bytes of the packet stream, with the first byte
in bits 63:56, whenever `in_valid` is high. In every cycle the parser reports
on `in_consume` how many of them it took (0, 2, 4 or 8 for headers, 1 to 8
for payload). The source then advances by that amount. Nothing is buffered
inside the parser. An instruction that needs bytes while `in_valid` is low
simply waits.

The extraction engines always see the **whole** 8-byte window, even when the
instruction consumes only 2 or 4 bytes. A field that arrives later in the
window can therefore be used one segment early. The Ethernet program starts
the EtherType lookup while it is still consuming the source MAC. The IPv4
program finds the Protocol field in its second 8-byte segment.

## The Advanced Program Control

This is the heart of the design. In every cycle the APC decides two things:
whether the current instruction takes effect (`exec`), and which instruction
comes next (`next_pc`). The instruction memory reads `next_pc`
synchronously, so the decision made in cycle *t* is the instruction executed
in cycle *t+1*. No cycle is lost on a taken branch.

The decision uses a fixed priority:

1. **Restart/reset**: go to the initial subroutine (address 0).
2. **A packet counter reaches zero** (the end of an IP packet): if the return
   stack holds a trailer address, pop it and parse the trailer. Otherwise the
   packet is complete: raise `pkt_done`, clear counters and stack, and go to
   address 0.
3. **The header counter reaches zero** (the end of the current header):
   - if a next-header lookup was started for this header, jump to its result.
     If the lookup is not finished yet, stall in `WAIT_NH`.
   - otherwise, if a packet counter is armed, the rest is payload: enter
     `PAYLOAD`.
   - otherwise continue as in 2.
4. **Otherwise, the instruction's branch type:**

| `br` | meaning |
|---|---|
| `BR_SEQ` | next instruction (this type is added by this implementation) |
| `BR_CATALYST` | target from the Branch Catalyst; no match falls through |
| `BR_NEXT_HDR` | start of the next header's code (as in 3) |
| `BR_NH_CALL` | as `BR_NEXT_HDR`, and push PC+1 (the first trailer instruction) on the return stack |
| `BR_PAYLOAD` | forward the payload (or go to 2 when no packet counter is armed) |
| `BR_EOT` | end of a trailer: pop the next pending trailer or finish the packet |
| `BR_COND` | jump to `br_addr` if the Branch Condition Evaluator says so |

A `BR_NH_CALL` pushes its return address even when the header counter expires
in the same cycle. This lets the last Ethernet instruction both end the header
and register the FCS trailer.

The three states are:

* `RUN`: execute one instruction per cycle.
* `WAIT_NH`: wait, consuming nothing, until the Next Header Resolve Unit is
  ready, then jump to its address.
* `PAYLOAD`: consume `min(8, smallest armed packet counter)` bytes per cycle
  and show them on `pl_valid`/`pl_bytes`/`pl_data`. When the counter reaches
  zero, take path 2.

The return stack is 4 entries deep. An assertion flags a push onto a full
stack.

## Boundary counters

All counters count **bytes**. An instruction can load the header counter and
one of the eight packet counters with

    value = (extracted field << shift) + signed immediate - bytes consumed this cycle

After a load, a counter counts down by `in_consume` in every cycle. It signals
expiry (`hdr_exp`, `pkt_exp`) combinationally, in the cycle its next value is
zero, and then disarms. A result below zero is taken as zero. Some examples
from the test program:

* IPv4: header = `IHL << 2`, packet = `Total Length`, both loaded by the
  first segment (immediate 0).
* IPv6: header = 40 (length 0 extracts nothing, immediate 40), packet =
  `Payload Length + 40`.
* TCP: header = `(Data Offset << 2) - 8`, since the field is in the second
  8-byte segment.
* Ethernet: header = 14.

`pkt_min`, the smallest armed packet counter, limits payload forwarding so the
parser never reads into the next packet.

## Next Header Resolve Unit

A lookup is started by an instruction with `nh_en`. It is given a field
position, a starting store word (`nh_start`), a word count (`nh_iters`) and a
default address. The pipeline is extract and register the ID, read one
comparand word and one address word, compare the ID with all 8 comparands and
register the match, then resolve. The lowest matching lane of the first
matching word wins, so frequent protocols belong early in the table. With no
match the default address is returned.

Timing: with the start in cycle *t*, `ready` is high from cycle *t+4* for a
hit in the first word, one cycle later for each further word. `ready` stays
high until the next start. This latency is what makes short headers wait. An
IPv4 header of 20, 24 or 28 bytes takes the same 6 cycles, because the
Protocol lookup, not the header bytes, sets the pace.

## Branch Catalyst and Branch Condition Evaluator

The **catalyst** extracts up to 16 bits (normally a few flag bits). It
compares them at once with the 8 entries of one of 4 table sets, each entry
holding valid, value and target address, and branches in the same cycle. For
GRE, the 4 bits C,R,K,S select among code blocks that consume 0 to 3 optional
32-bit words.

The **condition evaluator** compares an extracted field with a 16-bit
reference under a 3-bit code: `EQ NE LT GT LE GE` (unsigned), `ANY`
(`field & ref != 0`) and `NONE` (`field & ref == 0`). The test program uses
it to loop over an MPLS label stack until the bottom-of-stack bit is set.

## Packet Header Vector

The PHV has 16 containers each of 8, 16 and 32 bits, each with a valid bit.
An instruction writes its consumed segment into consecutive containers of one
size, starting at `phv_idx`, first byte to the lowest index. Only one size per
segment is possible, so a segment that holds two 8-bit, one 16-bit and one
32-bit field cannot be split into all three in one cycle. When a packet ends,
the vector, including that cycle's write, appears on `c8_out`/`c16_out`/
`c32_out`/`v*_out` with a one-cycle `phv_valid` pulse, and the working vector
is cleared.

## Instruction format (`parser_pkg::instr_t`, 147 bits)

| field | bits | use |
|---|---|---|
| `seg` | 2 | bytes consumed: 0, 2, 4, 8 |
| `phv_mode`, `phv_idx` | 2+4 | container size (none/8/16/32) and first index |
| `hdr_ld`, `hdr_ext`, `hdr_imm` | 1+14+16 | header counter load |
| `pkt_ld`, `pkt_sel`, `pkt_ext`, `pkt_imm` | 1+3+14+16 | packet counter load |
| `nh_en`, `nh_ext`, `nh_start`, `nh_iters`, `nh_default` | 1+14+4+3+8 | next-header lookup |
| `br`, `br_ext`, `bc_set`, `cond`, `cond_ref`, `br_addr` | 3+14+2+3+16+8 | branch |

An extraction spec `ext_spec_t` is `{off[5:0], len[4:0], shl[2:0]}`. The field
starts `off` bits below bit 63 of the window and is `len` bits long (0 to 16,
0 gives 0). It is then shifted left by `shl`.

## Configuration

While `restart` is high, the parser holds at address 0 and ignores the
stream. The tables are then written through `cfg` (one write per cycle,
`cfg.we`):

| `cfg.tgt` | `cfg.addr` | `cfg.data` |
|---|---|---|
| `CFG_IMEM` | instruction address | the `instr_t` |
| `CFG_NH_CMP` | `{word, lane[2:0]}` | `{valid, comparand[15:0]}` |
| `CFG_NH_ADDR` | `{word, lane[2:0]}` | subroutine address |
| `CFG_BC` | `{set[1:0], entry[2:0]}` | `{valid, value[15:0], address[7:0]}` |

`tb/tb_parser_top.sv` (task `load_program`) holds a complete, commented
example program. It covers Ethernet with an FCS trailer, VLAN, MPLS, IPv4 with
options, IPv6 with extension headers, GRE and TCP with options.

## Measured header-parse times

These are at the default parameters, with the example program. Time is
counted from the first Ethernet instruction to the first payload cycle. The
reference values are those reported for the original implementation of this
architecture. The testbench requires the RTL to be no slower.

| stack | this RTL | reference |
|---|---|---|
| Ethernet-IPv4-TCP | 15 | 21 |
| Ethernet-IPv4 (two option words)-TCP | 15 | 22 |
| Ethernet-MPLS-IPv6 (two ext. headers)-TCP | 26 | 35 |
| Ethernet-2xVLAN-2xMPLS-IPv6 (two ext. headers)-TCP | 37 | 40 |

| IPv4 header bytes | 20 | 24 | 28 | 32 | 36 |
|---|---|---|---|---|---|
| cycles, this RTL | 6 | 6 | 6 | 6 | 7 |
| cycles, reference | 6 | 6 | 6 | 7 | 8 |

Most of the difference comes from starting lookups one segment early (see
"The stream interface"). The reference programs and the exact point at which
they start and stop counting are not known. Compare trends, not single
cycles. Payload leaves at 8 bytes per cycle, which is 64 Gbit/s at 1 GHz. The
reference reaches 640 Gbit/s with ten such instances. The clock rate of this
RTL in silicon has not been measured.

## Departures and open points

* The overview figure of the new architecture was not available. The wiring
  follows the textual description of the units and the APC.
* Counters count bytes, and are loaded with field, shift and immediate. The
  reference says only that they count down after being assigned a value.
* Counter expiry acts in the same cycle, combinationally. In the reference,
  extraction results are registered before the counters. Here the counter
  register is that register.
* The next-header latency (4 cycles), the store depth (16 words × 8 lanes),
  the 16-bit comparands and the per-lane valid bits are choices.
* The catalyst's table sets, and fall-through on a miss, are choices.
* The eight condition codes are a choice; only the field width (3 bits) is
  given.
* `BR_SEQ` is added to the six branch types.
* "No next header" means no lookup was started for the current header.
  "No payload" means no packet counter is armed.
* An unknown next header goes to the default address given in the instruction.
  The example program sends it to an end-of-trailer instruction that restarts
  at address 0. Because the packet's length is unknown at that point, the
  stream is then out of step. A real deployment needs a frame length from the
  MAC for this case, which is outside this design.
* The common data buffer that receives the payload is not part of the RTL.
  Its data leaves on `pl_*`.
* The earlier address generation unit with four comparators, against which
  the reference compares, is not built.
* Area, power and clock rate (reported for a 28 nm FD-SOI implementation at
  1 GHz) are not reproduced.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. With
Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl \
    rtl/parser_pkg.sv tb/tb_parser_top.sv --top-module tb_parser_top
./obj_dir/Vtb_parser_top
```

Replace `tb_parser_top` by `tb_apc`, `tb_nh_resolve_unit`,
`tb_boundary_counters`, `tb_branch_catalyst`, `tb_branch_cond_eval`,
`tb_phv_filler`, `tb_extraction_engine` or `tb_instr_mem` for the unit tests.
`tb_parser_top` runs about 80 back-to-back packets of all kinds at the
default parameters. They include IPv4 and GRE inside IPv6, which are found
by a two-word next-header search. After the timed packets, the source pauses
at random. The testbench checks the PHV contents, byte alignment, payload
count and rate, and the cycle bounds above. It also checks that every
mechanism occurred: next-header stall, input stall, header and packet expiry,
payload forwarding, catalyst, conditional branch taken and not taken, call,
trailer and end of trailer.

Changing sizes: `parser_top` parameters set the number of packet counters
(up to 8), the stack depth, the catalyst table and the PHV container counts
(up to 16 each). The program-memory and next-header store address widths,
and the field widths, are constants in `parser_pkg` (`PC_W`, `NH_AW`,
`FIELD_W`, `CNT_W`). Widening them widens the instruction word.
