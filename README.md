# In-line protocol processor for packet reception

A network terminal on a fast link cannot afford to buffer a received frame,
copy it to kernel memory, checksum it in software and copy it again to the
application. This processor sits in the network interface and does the
reception work *while the frame streams in*, at network speed: it checks that
the frame is intact and addressed to this terminal, decides which protocol and
which connection it belongs to, and writes the payload once, straight into
the application's buffer in host memory.

Its central idea is a control path with a single register. There is no
register file and no data memory: data comes from the input port, and the
program lives in three small lookup tables inside the core. One instruction,
which may be a complete `switch` with up to N cases plus a default, executes
every clock cycle with no branch penalty:

```
        +--------------------------------------------------------------+
        v                                                              |
  PC -> IT (instruction) -> ID --line--> PCB (N reference words)       |
                              |              |                          |
                              |   field ->  N compare units (=)         |
                              |              | N match bits             |
                              +--line--> CCB (N relative jumps) -> NPCG +
                                                                 (PC + jump)
```

The RTL implements this architecture as described by Henriksson, Nordqvist
and Liu ("Embedded Protocol Processor for Fast and Efficient Packet
Reception"), in its rounded configuration: word length l = 32, n = 4 compare
units, k = 8 code-book lines, m = 32 instructions of p = 32 bits. Where that
description stops (instruction format, buffer control, the accelerators'
interfaces, the configuration bus) this design makes its own choices; they
are listed under [Departures and own choices](#departures-and-own-choices).

## The one-cycle branch

Each instruction names a *line* of the two code books and a *field* of the
received data.

* The **parameter code book (PCB)** holds k lines of N reference words. The
  selected line goes to the **compare units**, N equality comparators that
  compare the field with each reference word over all 32 bits.
* The **control code book (CCB)** holds, on the same line, N relative jump
  addresses of log2(m) = 5 bits. The match vector picks one of them.
* The **next-PC generator (NPCG)** adds the picked jump to the PC, or the
  instruction's own *default* jump when no compare unit hit.

Take `switch (ethType) { case 0x0800: ...; case 0x0806: ...; case 0x8035:
...; default: ... }` at instruction address j. PCB line 3 holds 0x0800,
0x0806, 0x8035, 0x0000 and CCB line 3 holds 14, 23, 27, 0. With
ethType = 0x0806 only compare unit 1 matches, the CCB delivers 23, and in the
next cycle the PC is j + 23. The whole `switch` is one cycle.

Rules this design adds:

* A CCB entry of 0 marks an unused slot; its match is ignored. (A jump of 0
  would re-execute the same instruction; use the default jump for that.)
* If several used slots match, the lowest slot wins.
* Jumps wrap modulo M, so a backward jump of d is written as M - d.
* The winning slot index also leaves the core (`sel = line * N + slot`). The
  memory management unit uses it to pick a destination buffer, so "which UDP
  port matched" directly becomes "where the payload goes".

The critical path is the whole loop: IT multiplexer, PCB multiplexer,
32-bit compare, CCB multiplexer, 5-bit add. The instruction decoder adds
nothing between the instruction table and the code books, because the line
pointer is a plain field of the instruction word.

## Instruction word

With the default sizes the fields fill the 32 bits exactly (LSB first):

| bits  | field      | meaning |
|-------|------------|---------|
| 2:0   | `line`     | PCB/CCB line |
| 7:3   | `dflt`     | relative jump when no compare unit hits |
| 8     | `src`      | field source: 0 = dynamic buffer window, 1 = status vector |
| 16:9  | `offset`   | bit offset of the field in the source |
| 21:17 | `width_m1` | field width minus 1 (1..32 bits); the field is zero-extended |
| 22    | `sync`     | consume the next received word; wait while there is none |
| 23    | `crc_clear`| preset the CRC-32 register |
| 24    | `crc_add`  | feed the current word into the CRC-32 |
| 25    | `cs_clear` | clear the 1's complement sum |
| 26    | `cs_add_word` | add the current word to the sum |
| 27    | `cs_add_field`| add the extracted field to the sum |
| 28    | `mm_open`  | open destination `sel` (only if a compare unit hit) |
| 29    | `mm_store` | write the current word to the open destination |
| 30    | `mm_commit`| frame accepted: report it and close the destination |
| 31    | `mm_discard`| frame dropped: report it and close the destination |

Bits 31:22 are the `pp_ctrl_t` struct in `pp_pkg`. The control bits act only
in a cycle in which the instruction really executes: the core is running and
not waiting for a word. `pp_pkg::pp_encode()` builds an instruction word.
With other parameter values the fields keep their order and each takes the
width its range needs (`pp_instr_decoder`, which also decodes the width into the field mask).

## Dynamic buffer, the current word and stalls

Words arrive at most one per cycle, tagged with start of frame, end of frame
and, on the last word, the number of valid bytes. The first byte on the wire
sits in bits 31:24. The input cannot be stopped.

The dynamic buffer is an 8-word shift register plus a count of words that
have arrived but not been consumed. A `sync` instruction consumes the oldest
unconsumed word. If there is none it *stalls*: the PC holds and no controls
are issued. Any other instruction works on the word the last `sync`
consumed. That word is the **current word**. The field extraction unit sees a
window with the current word in bits 31:0, the word before it in bits 63:32,
and so on. A field may therefore straddle two words, or lie several words
back. The receive program, for example, reads the IP destination address
from bits 79:48 while working on the word after it.

In steady state the program consumes one word per cycle and the buffer holds
a single word. A program that spends extra non-`sync` instructions on a word
falls behind. The backlog is absorbed by the buffer and drains during the
gaps between frames. If the backlog would exceed 7 words, the sticky
`overflow` flag is set and the oldest word is lost. `ovf_clear` clears the
flag.

## Accelerators and the status vector

The checksum and memory work touches every byte of the frame, and the same
operation repeats for every word. It runs in three accelerators. They take
the current word in the same cycle as the core, and the core drives them with
the control bits of its instructions.

* **CRC-32** (`pp_crc32_acc`): Ethernet CRC, one word per cycle. After an
  end-of-frame word, `done` is set. `ok` means the register holds the
  residue 0xDEBB20E3, i.e. the frame check sequence was correct.
* **Internet checksum** (`pp_csum_acc`): a 16-bit 1's complement sum of
  words and/or extracted fields. `ok` means sum = 0xFFFF. A field can be
  added as well as a word, so headers that do not start on a word boundary
  can be covered exactly.
* **Memory management** (`pp_mm_acc`): the receive DMA. It holds a table of
  K*N host word addresses, one per code-book slot. `open` picks the entry of
  the matching slot. `store` writes words with byte enables. `commit`
  reports the frame (start address, byte length, destination) and advances
  that entry past the frame, so consecutive frames for one connection land
  one after another. `discard` reports a dropped frame.

The core tests the accelerators' results with the same compare-and-branch.
With `src = 1`, the field comes from a **status vector**:

| bits  | status |
|-------|--------|
| 15:0  | current 1's complement sum |
| 16    | current word starts a frame |
| 17    | current word ends a frame |
| 18    | CRC ok |
| 19    | CRC done |
| 20    | checksum ok (sum = 0xFFFF) |
| 21    | buffer overflow |
| 22    | memory destination open |

"If CRC ok then +1 else drop" is one instruction: a 1-bit field at offset
18, compared on a line whose slot 0 holds 1 with jump 1.

## Configuration bus

A supporting microcontroller writes the tables over a write-only bus
(`cfg_we`, `cfg_addr[11:0]`, `cfg_wdata[31:0]`). It keeps its own copy of
the configuration, so nothing is read back. Writes are allowed at any time,
also while frames are being processed. Opening a new UDP port, for example,
takes one PCB write, one CCB write and one destination-table write.

| `cfg_addr[11:10]` | table | entry `cfg_addr[9:0]` |
|---|---|---|
| 0 | instruction table | instruction address (0..M-1) |
| 1 | PCB | line * N + slot |
| 2 | CCB | line * N + slot |
| 3 | destination table | line * N + slot |

Writes to entries beyond a table are ignored. The lookup tables are not
reset: load all of them before raising `run`. `restart` returns the PC to 0.

## Example: an Ethernet/IPv4/UDP receive program

`tb/tb_pp_top.sv` loads this 17-instruction program. It uses all 8 lines.

| addr | does | field | line: cases -> target | default |
|---|---|---|---|---|
| 0 | sync, CRC preset+add | status SOF | 0: 1 -> 1 | 0 (skip to next frame start) |
| 1 | sync, CRC | previous word = DA[47:16] | 1: own MAC -> 2 | drop |
| 2 | sync, CRC | DA[15:0] (one word back) | 2: own MAC -> 3 | drop |
| 3 | sync, CRC, sum := word, open | EtherType | 3: IP -> 4, ARP -> 13, RARP -> 13 | drop |
| 4-7 | sync, CRC, sum += word | - | - | next |
| 8 | sync, CRC, sum += field | IP dst[15:0] | - | next |
| 9 | sync, CRC | IP dst (look-back, straddles two words) | 5: own IP -> 10 | drop |
| 10 | - | status sum | 7: 0x0800 -> 11 | drop |
| 11 | open | IP protocol (4 words back) | 4: UDP -> 12, TCP -> 13 | drop |
| 12 | open | UDP dst port | 6: port0/1/2 -> 13 | drop |
| 13 | sync, CRC, store | status EOF | 0: 1 -> 14 | 13 (loop) |
| 14 | - | status CRC ok | 0: 1 -> 15 | drop |
| 15 | commit | - | - | 0 |
| 16 (drop) | discard | - | - | 0 |

The IP header begins in the middle of word 3. The sum therefore covers the
whole of word 3, words 4-7 and the upper half of word 8. That includes the
EtherType 0x0800, so a correct header gives a sum of 0x0800 rather than
0xFFFF. Instruction 10 compares the sum with 0x0800 directly.

The payload of an accepted UDP frame is stored from word 10 on. So is that of
a TCP frame, which goes to the microcontroller's buffer. ARP/RARP frames are
stored from word 4. Stored data is whole words: it includes the two bytes of
the UDP checksum field before the payload and the 4 FCS bytes at the end. The
reported length counts every stored byte. The program does not verify UDP
checksums; the test frames carry a checksum of 0, which means "none" in
IPv4.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `L` | 32 | word length (multiple of 16) |
| `N` | 4 | compare units = cases per instruction |
| `K` | 8 | PCB/CCB lines |
| `M` | 32 | instructions |
| `P` | 32 | instruction bits (must hold all fields) |
| `DEPTH` | 8 | dynamic buffer words (own choice) |
| `AW` | 16 | host memory word-address width (own choice) |

These defaults give a 1024-bit instruction table, a 1024-bit PCB and a
160-bit CCB. The top's configuration bus is 32 bits wide, so `L`, `P` and
`AW` may not exceed 32.

## Departures and own choices

Taken from the architecture description:

* The one-cycle PC -> IT -> ID -> PCB -> CU -> CCB -> NPCG loop.
* The three program tables and their sizes.
* Relative jumps, N cases plus a default.
* The line pointer stored in the instruction.
* A dynamic buffer that normally holds one word.
* Run-time reconfiguration by a microcontroller.
* CRC-32, 1's complement checksum and payload placement as accelerators
  driven by start/control signals and reporting flags.

This design's own:

* The instruction format and the `sync`/stall rule. The original says only
  that the PC is updated every cycle.
* The buffer depth, look-back window and overflow behaviour.
* The status vector as the way to evaluate flags.
* Zero-jump slots as "unused" and lowest-slot priority.
* The accelerators' internals and interfaces. The original gives their
  function and points elsewhere for CRC and checksum implementations.
* The destination table and frame events of the memory management unit.
* The configuration address map and the framing signals of the input port.

Example values: in the original switch example the jumps are 14, 23 and 32.
A jump of 32 does not fit the 5-bit CCB entries that m = 32 implies (8 x 4 x
5 = 160 bits). The tests use 27 for the third case.

Not included:

* The Ethernet PHY, the supporting microcontroller, the host processor and
  its memory. They are outside the processor; their signals are ports of
  `pp_top`.
* TCP processing beyond handing TCP frames to the microcontroller.
* Any timing or area claims. The original estimates 6.5 ns per loop in
  0.35 um, and 10 Gb/s in 0.18 um, which needs 312.5 MHz for one 32-bit word
  per cycle. None of this has been checked on this RTL.

## Files and simulation

`rtl/` holds one module per file. The hierarchy:

* `pp_top`
  * `pp_cfg_decoder`
  * `pp_core`
    * `pp_pc`
    * `pp_instr_table`
    * `pp_instr_decoder`
    * `pp_dynamic_buffer`
    * `pp_field_extract`
    * `pp_pcb`
    * `pp_compare_units`
    * `pp_ccb`
    * `pp_npcg`
  * `pp_crc32_acc`
  * `pp_csum_acc`
  * `pp_mm_acc`

`pp_pkg` holds the shared constants and types.

Three assertions guard interface rules: the buffer backlog stays below
`DEPTH`, the configuration decoder selects at most one table, and a program
never commits and discards a frame in the same cycle. `--assert` enables them.

`tb/` holds one self-checking testbench per module, `tb_<module>.sv`. Each
prints `TB_RESULT checks=<n> failures=<n>` and stops itself with a watchdog.
The testbenches are:

* `tb_pp_top`: the full design at default sizes, running the program above
  on about 60 generated frames. Frames are unicast, wrong-address, ARP,
  RARP, TCP, unknown-protocol, bad-CRC, bad-header-checksum and
  unknown-port. The test also covers a port added during operation and a
  forced overflow, and a burst of 20 frames at full line rate: one word per
  cycle with only the Ethernet inter-frame gap. In the burst no frame may be
  lost, the buffer may not overflow, and the last commit must follow the last
  word within 8 cycles. The test checks every frame event and every stored byte
  against its own CRC, checksum and memory model. It checks that the
  EtherType switch lands on its target one cycle later, and counts stalls,
  buffered backlog, cases taken, look-back, rejects and overflow.
* `tb_pp_core`: the switch example on the bare core.
* One testbench per sub-block, each against a reference model.

With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/pp_pkg.sv tb/tb_pp_top.sv \
          --top-module tb_pp_top -o sim && ./obj_dir/sim
```

Substitute any other `tb_*.sv` and its module name for the other tests. Each
test runs in well under a second.
