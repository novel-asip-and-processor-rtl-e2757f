# In-line protocol processor for packet decoding

This is a small programmable processor that decodes packet headers while the
packet is still arriving from the physical layer. It works one 32-bit word
per clock and executes exactly one instruction per clock. No instruction
ever takes an extra cycle, so the program stays locked to the data: the
instruction at a given step of the program always sees a known word of the
frame. The processor decides whether a frame is for this node and which
protocol it carries. It starts checksum and storage accelerators at the
right words. In the end it accepts or discards the frame, and only the wanted
payload is written to memory.

Conditional jumps cost nothing because the program is split over three
small tables that are all read in the same cycle:

- **ILT** (instruction lookup table): 32 instructions of 24 bits, the main
  flow.
- **PCB** (parameter codebook): 16 lines, each with four 32-bit compare
  values.
- **CCB** (control codebook): 8 lines, each with four 8-bit jump values.

A compare instruction names one PCB line. It compares a field of the input
against all four values of that line at once. Through the CCB it then jumps
to one of four targets, or falls through when nothing matched. All of this
happens in one cycle. The single-cycle path is PC → ILT → PCB → comparators
→ CCB → adder → PC. The three tables total 3072 bits of flip-flops.

## The instruction set

Every instruction has a 4-bit code in bits 23:20 and a buffer-control bit in
bit 19. Bits 18:0 depend on the instruction.

| code | name | bits 18:0 | effect |
|------|------|-----------|--------|
| 0000 | NOP | 0 | nothing; used to let data go by |
| 0101 | WAT | input bitmap 18:0 | stay on this instruction until every selected input is 1 |
| 0010 | SET | outputs 9:0 | pulse the selected outputs for this cycle |
| 0100 | JMP | type 18:17, rel 7:0 | type 00: always; type 01: if every selected input 8..0 (bitmap 16:8) is 1; type 10: if the field compare (pointer 16:13, width 12:11, offset 10, new 9) matched any parameter |
| 0001 | CMP | new 18, jump 17, pointer 16:13, width 12:11, offset 10 | compare; if jump=1 and anything matched, jump through CCB line pointer[2:0] |
| 0011 | CPS | CMP fields in 18:10, outputs 9:0 | CMP and SET in one cycle |

Jump values, both `rel` and CCB entries, hold 128 plus the relative jump, so
0x7c jumps back 4 and 0x82 jumps forward 2. The PC wraps modulo 32. Codes
that are not in the table, and JMP type 11, do nothing.

### Field extraction and the comparator array

The input buffer holds the newest word in bits 31:0. When the previous
instruction set its buffer-control bit, the buffer also holds the word
before that in bits 63:32; otherwise bits 63:32 read as zero.

- Offset 0 takes bits 31:0 and offset 1 takes bits 47:16, so a field can
  straddle the two words.
- Width codes 00, 01, 10 and 11 keep the low 4, 8, 16 or 32 bits of the
  field. Only the field is masked: a PCB value has to hold zeros above the
  compare width.
- The four match bits are kept in the compare unit. With new=0, a compare
  ANDs its result with the kept bits. This is how the example matches a
  48-bit MAC address: 32 bits, then 16 bits one word later. Longer keys
  work the same way. The compare unit's testbench matches a 128-bit
  IPv6-sized key over four words.
- When several parameters match, the lowest-numbered one selects the CCB
  value.

### The example program

`tb/tb_pp_top.sv` and `tb/tb_pp_core.sv` load a 29-instruction program. It
accepts Ethernet II frames that carry either ARP or IPv4/UDP to port 2025,
addressed to MAC 0c:5a:80:ac:4a:b7 and IP 130.236.55.5. Broadcast
addresses are also accepted. The program does the following:

1. Waits for frame start.
2. Matches the destination MAC over two words.
3. Branches on the EtherType through the CCB: IPv4 to instruction 8, ARP to
   instruction 23, anything else to discard.
4. Checks the IP protocol, the destination IP and the UDP port.
5. Starts the accelerators at the right words and stops and restarts payload
   storage.
6. Waits for the checksum and CRC results.
7. Accepts the frame, or discards it by jumping to instruction 3.

Reading the PC path in `tb_pp_core.sv` next to the program is the quickest
way to see how the data alignment works.

## Accelerators and how they are wired

The processor reaches its accelerators only through its 19 general-purpose
inputs and 10 outputs. `pp_top` wires them as the example program expects:

| signal | meaning |
|--------|---------|
| in0 | frame start, taken from the input port |
| in1 / in2 | CRC done / CRC correct |
| in3 / in4 | UDP checksum done / correct |
| in5 / in6 | IP header checksum done / correct |
| in18..in7 | `ext_in`, free for the system |
| out0 | start UDP checksum |
| out1 | start IP header checksum |
| out2 | start IP length counter |
| out4 | start (or restart) payload storage |
| out5 | packet accepted: commit the stored payload |
| out6 | stop payload storage |
| out3, out7, out8, out9 | go only to the `outputs` port and the result register; the example uses out8 for "IP packet" and out7 for "ARP packet" |

Each accelerator watches the same word stream as the processor: the word
the current instruction sees. An output pulse and the data it refers to
therefore arrive in the same cycle. The alignment rules below follow from
Ethernet II framing:

- **CRC (`acc_crc32`)** starts by itself at frame start. It runs the
  reflected CRC-32 over the whole frame, FCS included, and accepts when the
  register ends at the residue 0xDEBB20E3.
- **IP header checksum (`acc_ip_csum`)** is started on the word whose bits
  15:0 are the first IP header half-word. It reads IHL there and
  ones-complement adds the whole header.
- **UDP checksum (`acc_udp_csum`)** has the same start as the IP header
  checksum. It numbers the datagram's half-words and collects the pseudo
  header: protocol, addresses, and the UDP length counted twice. It then
  adds the UDP segment, padding an odd last byte with zero. A zero checksum
  field counts as correct.
- **Length counter (`acc_len_counter`)** is started on the word whose bits
  31:16 hold the IP total length. It marks the word holding the last
  datagram byte, so that Ethernet padding and the FCS are not stored.
- **Memory interface (`acc_mem_if`)** starts storing with bits 15:0 of its
  start word and repacks half-words into 32-bit memory words.
  - Storage ends at `stop`, at the datagram end when the length counter is
    running, or at the frame end. For ARP this means the padding and FCS are
    stored too.
  - Payload goes into 32 slots of 512 words, in a 16K-word payload memory.
  - A restart rewinds to the base of the slot. That is how the IP header,
    stored from instruction 6 onward, is overwritten by the UDP payload
    after instruction 17.
  - `commit` publishes `{toggle, slot, byte count}` and moves to the next
    slot. A frame that is never committed is overwritten by the next one.

All accelerators report `done`/`ok` as levels. They stay set until the next
start or the next frame, which is what the WAT instruction needs.

## Configuration port

`pp_config_if` gives the microcontroller an SRAM-like port: `cfg_cs`,
`cfg_we`, a 10-bit word address and 32-bit data. Read data arrives one
cycle after the request.

| address | content |
|---------|---------|
| 0x000–0x01F | ILT entries (read and write) |
| 0x100–0x13F | PCB, address = line×4 + k (read and write) |
| 0x200–0x21F | CCB, address = line×4 + k (read and write) |
| 0x300 | result register (read; ORs every output bitmap, cleared by the read) |
| 0x301 | commit register of the memory interface (read) |

Any table write halts the processor and resets its PC to 0. Writing ILT
entry 0 starts execution, so load entry 0 last. While halted the processor
executes NOPs.

## Input port

`din` is a `pp_pkg::word_t` with these fields:

- `data`: 32 bits, with the first byte on the wire in bits 31:24.
- `valid`, `sof` and `eof` flags.
- `nbytes`: the number of valid bytes (1 to 4) in the `eof` word.

The words of a frame must arrive back to back. The processor has to be
waiting on a WAT when `sof` arrives, or it misses the frame. An assertion
in `pp_input_buffer` checks the port rules: `sof` and `eof` come only on
valid words, and an `eof` word carries 1 to 4 bytes.

At 32 bits per word, the minimum Ethernet gap (12 idle bytes plus 8 bytes
of preamble) is 5 idle words. The example program needs exactly that:

- The accept paths (IP and ARP) reach instruction 0 six clocks after the
  last word is on the port. That is the same clock in which the next
  `sof` can appear there, so they are just in time.
- The late discard path, taken after a bad checksum or a bad CRC, is one
  cycle longer. A frame that follows such a frame at the minimum gap is
  missed. One more idle word avoids this.
- Early discards, such as a wrong address or an unknown type, finish long
  before the frame ends.

A physical-layer interface such as XGMII, which would turn its control
characters into these flags, is not part of this RTL.

## Files

| file | content |
|------|---------|
| `rtl/pp_pkg.sv` | opcodes, field encodings, table sizes, stream word and control structs |
| `rtl/pp_ilt.sv`, `rtl/pp_pcb.sv`, `rtl/pp_ccb.sv` | the three program tables |
| `rtl/pp_input_buffer.sv` | one- or two-word input buffer |
| `rtl/pp_compare_unit.sv` | field extraction, four comparators, kept match array |
| `rtl/pp_decoder.sv` | instruction decoder and output bitmap |
| `rtl/pp_next_pc.sv`, `rtl/pp_pc.sv` | next-PC logic, PC register with start/halt |
| `rtl/pp_core.sv` | the processor |
| `rtl/pp_config_if.sv` | microcontroller port and result register |
| `rtl/acc_*.sv` | the five accelerators |
| `rtl/pp_top.sv` | processor, configuration port and accelerators |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_pkt_pkg.sv` | frame builder with reference CRC and checksums |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself.
To build and run one with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_pp_top \
  -y rtl -y tb -Irtl rtl/pp_pkg.sv tb/tb_pkt_pkg.sv tb/tb_pp_top.sv -o sim
./obj_dir/sim
```

Replace `tb_pp_top` with any other testbench name. Testbenches that do not
import `tb_pkt_pkg` do not need it on the command line. `--assert` turns on
the interface assertions in `pp_input_buffer` and `pp_pc`.

`tb_pp_top` runs the complete system at its default sizes. It loads the
example program through the configuration port and sends 18 frames, one
at a time:

- good UDP frames with 1 to 1471 payload bytes, including broadcast frames
  and one without a UDP checksum;
- ARP frames;
- one frame for each error the program must reject: wrong MAC, wrong IP,
  unknown EtherType, not UDP, wrong port, bad IP checksum, bad UDP checksum
  and bad CRC.

It checks the verdict, the result and commit registers, and the stored
payload byte for byte. It then sends a burst of six good frames, five UDP
and one ARP, with only the minimum gap between them. It requires that all
six are accepted. It also counts WAT stalls, codebook jumps, jumps on
match and on inputs, compare continuations, use of the two-word buffer,
storage stops and restarts, commits and discards, and requires each to
happen at least once.

`tb_pp_core` checks the processor alone, in two parts:

- It traces the example program's path, one instruction per clock, for
  several frames.
- It then runs 20 random programs on a random word stream with random
  inputs, 300 clocks each. The programs use every instruction, every JMP
  type, the buffer-control bit and undefined codes.

A small instruction-set model inside the testbench, written from the
instruction definitions above, predicts the PC and the outputs of every
clock. The data words come from a small pool, so compares match often
enough to exercise codebook jumps and continuations.

## How far to trust it, and where it is this design's own

The instruction formats, opcodes, table sizes, compare semantics, the
128-offset jump encoding and the example program come from the published
design.

Three points are inferred from it:

- **ILT depth of 32.** It follows from the 3072 table flip-flops.
- **Buffer-control bit.** Its meaning, "keep the previous word for the next
  instruction", is inferred from the example program. With this reading all
  of the example's field offsets line up, which the tests confirm.
- **Instruction 15's `new` bit.** Its encoded word has the bit set, and the
  encoded value is what the RTL executes.

These are this design's own choices:

- priority among several matching comparators (lowest wins);
- "every selected input" as the meaning of a WAT or JMP bitmap match;
- halt-on-write and the configuration address map;
- the result register;
- the stream word format;
- all accelerator internals, start alignments and the payload slot layout.
  The published design names the five accelerators and their roles in the
  example, not how they work.

The published timing (281 MHz in a 0.18 µm process, above 9 Gb/s at 32 bits
per cycle) is a property of that implementation. It has not been checked
here. The connection-state microcontroller, the payload memory and the
physical-layer interface sit outside this RTL. `pp_top` brings out their
ports: `cfg_*`, `pmem_*` and `din`.
