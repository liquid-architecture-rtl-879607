# Liquid processor system: network control logic for a LEON soft core on the FPX

A "liquid architecture" processor is one whose caches, pipeline or
instruction set can be changed by loading a different FPGA image. To study
such variants you must be able to put a program into the processor, run it,
time it and read its results without a debugger on the bench. This RTL
provides that path for a LEON2 (SPARC V8) soft core on the Washington
University FPX board. The host sends UDP packets. The FPGA parses them,
writes the program into the board's memory, restarts the processor, counts
the cycles the program takes, and answers with UDP packets that carry memory
contents or status.

The processor core, its caches and peripherals, the FPX SDRAM controller and
the IP protocol wrappers are existing components. They are not part of this
RTL; their signals are ports of the top module `liquid_top`. What is here is
the logic that joins them:

| module | role |
|---|---|
| `cpp` | control packet processor: parses IPv4/UDP and extracts LEON commands |
| `leon_ctrl` | supervisory state machine: runs the commands, owns the LEON reset, writes and reads memory |
| `mem_word_port` | helper of `leon_ctrl`: one 32-bit access to 64-bit memory (read-modify-write for stores) |
| `cycle_counter` | times a program from reset release to its end-of-program store |
| `msg_gen` | message generator: builds IPv4/UDP reply packets with header checksum |
| `ahb_mem_adapter` | LEON main-memory controller: AHB slave on a 64-bit FPX SDRAM controller port |
| `boot_rom` | boot code that polls a start flag in memory, then jumps to the user program |
| `ahb_decoder` | AHB address decoding for boot ROM and main memory |
| `liquid_pkg` | shared types: packet words, command records, AHB and SDRAM port bundles |
| `liquid_top` | the system, wired as below |

```
             +------------------------------- liquid_top ---------------------------------+
 net_in ---> | cpp --cmd/dat--> leon_ctrl --msg--> msg_gen | ---> net_out
             |                   |  |   \                                                 |
             |      leon_rst_n <-+  |    +--> cycle_counter (watches the AHB bus)         |
             |                      |                                                     |
             |        sd_user <-----+ mem_word_port                                       |
             |                                                                            |
 LEON AHB -->| ahb_decoder --+--> boot_rom        (0x0xxx_xxxx)                           |
   master <--|               +--> ahb_mem_adapter (0x4xxx_xxxx) ---> sd_leon              |
             +----------------------------------------------------------------------------+
      sd_leon and sd_user are two client ports of the external FPX SDRAM controller,
      which arbitrates between them.
```

## Control protocol

Every control packet is an IPv4 packet holding a UDP datagram sent to
`LEON_PORT` (5000 by default). Packets for any other port or protocol are
dropped. The UDP payload is read as big-endian 32-bit words:

| word | bits 31:24 | bits 23:16 | bits 15:0 |
|---|---|---|---|
| 0 | command code | total data length (32-bit words) | packet sequence number |
| 1 | memory address, a LEON byte address (all 32 bits) | | |
| 2.. | program words (Load program only) | | |

| code | command | action | reply |
|---|---|---|---|
| `0x01` | LEON status | none | `0x81` |
| `0x02` | Load program | write `length` words from `address` up | none |
| `0x03` | Start LEON | restart LEON and start the program | none |
| `0x04` | Read memory | read one word at `address` | `0x84` |

A program too long for one packet is sent in several packets. Each packet
carries its own address, so the order they arrive in does not matter. The
sequence number is only recorded and reported in the status reply. Words in
the packet after the `length` words are ignored. If the packet ends before
`length` words, only the words present are written.

Replies go back to the sender's IP address and UDP port, from `LEON_PORT`.
Their payload starts with `{reply code, 24-bit aux}` and is followed by data
words:

* status `0x81`: aux bits 2:0 = {LEON out of reset, program running,
  program done}; then the cycle count, the number of program words loaded
  since power-up, and the last sequence number;
* read `0x84`: the address, then the word;
* error `0xEE`: aux bits 7:0 = `0x01` unknown command, `0x02` payload ends
  before the address word, `0x03` address outside RAM or not word aligned.

Reply headers are IPv4 without options: TTL 64, an identification number
that counts up, and a correct header checksum. The UDP checksum is 0, which
IPv4 allows.

The packet streams (`net_in_*`, `net_out_*`) carry one 32-bit word per
transfer with `sof`/`eof` marks and valid/ready flow control. They start at
the IP header, which is where the protocol wrappers would deliver and accept
packets. `cpp` skips IP options using the IHL field. It does not verify
incoming checksums.

## How a program is started

LEON cannot be told where to run by a debugger link. Instead, its boot ROM
watches a word in main memory:

1. After system reset, `leon_ctrl` holds LEON in reset. It writes 0 to the
   start-flag word `FLAG_ADDR` = `0x4000_0000`, then releases reset.
2. LEON runs the boot ROM, which loops: load the flag, and if it is zero
   branch back. At this point the status reply reads "out of reset, not
   running".
3. The host loads the program with one or more Load program packets.
4. Start LEON: `leon_ctrl` asserts LEON reset and writes `ENTRY`
   (`0x4000_0100`) into the flag word. After `RST_CYCLES` (16) cycles it
   releases reset and starts the cycle counter in the same cycle.
5. LEON boots again. The first load of the flag now returns `ENTRY`, and
   the ROM jumps there with `jmpl %g2, %g0`.
6. The program ends by storing any value to `DONE_ADDR` (`0x4000_0004`).
   `cycle_counter` sees that store's address phase on the AHB bus and
   freezes. The count is the number of clock edges from reset release to
   that store, so it includes the few boot-ROM instructions.

Start LEON is a restart: sending it again reruns the program loaded in
memory from a clean reset.

The boot code, assembled inside `boot_rom` from SPARC V8 field layouts:

```
0x00  sethi %hi(FLAG_ADDR), %g1         0x0310_0000
0x04  ld    [%g1 + %lo(FLAG_ADDR)], %g2 0xC400_6000
0x08  cmp   %g2, 0                      0x80A0_A000
0x0c  be    0x04                        0x02BF_FFFE
0x10  nop                               0x0100_0000
0x14  jmp   %g2                         0x81C0_A000
0x18  nop                               0x0100_0000
```

The loop depends on LEON's caches being off, which is their state after
reset. If boot code that enabled the data cache ran before this loop, the
flag load would have to bypass the cache.

## Main memory: 32-bit AHB on 64-bit SDRAM

This is the part with the most behaviour to understand. LEON's AHB bus
is 32 bits wide. The SDRAM behind the FPX SDRAM controller is 64 bits wide.
It is reached by requests that give a start address and a burst length (1
to 256 words) before any data moves. `ahb_mem_adapter` bridges the two.

* **Reads: word select.** Address bit 2 picks the 32-bit half of the 64-bit
  word. The order is big-endian, so bit 2 = 0 selects bits 63:32.
* **Reads: short bursts.** AHB incrementing bursts have no length known in
  advance, but LEON never bursts more than four words. So every read that
  starts a burst (NONSEQ, or a SEQ beat outside the buffer) asks for
  exactly enough 64-bit words to cover the addressed word and the three
  after it: 2 words from an 8-byte aligned address, 3 otherwise. The words
  go into a 3-entry line buffer. Further SEQ beats inside it are answered
  with no wait state. A 4-word burst therefore costs one SDRAM handshake,
  and an 8-word cache-line fill costs two. A single read wastes the rest of
  the fetched words.
* **Writes: read-modify-write.** The controller writes whole 64-bit words,
  so each store reads its word (1-word burst), merges the stored bytes, and
  writes the word back (1-word burst). That is two handshakes per store.
  Byte and halfword stores use big-endian byte lanes: the byte at offset 0
  is `HWDATA[31:24]`.
* **No write bursts.** A write burst is handled beat by beat, each beat a
  separate read-modify-write, because the total length is not known when
  the first request must be made.
* **Coherence.** `leon_ctrl` writes the same memory through its own port.
  The line buffer is therefore only trusted within one burst: it is dropped
  on every NONSEQ transfer and every write. A new burst always sees memory
  as it is now.
* **AHB subset.** Single and incrementing transfers, sizes up to 32 bits
  (checked by an assertion), HRESP always OKAY, no split or retry. All
  memory latency is absorbed as wait states.

`mem_word_port` does the same word select and read-modify-write for
`leon_ctrl`. That makes loading a program cost two SDRAM handshakes per
word.

### SDRAM controller client port (`sd_req_t` / `sd_rsp_t`)

This is the contract the external controller must meet. The testbench model
`tb/fpx_sdram_model.sv` implements it.

* The client raises `req` with `we`, `addr` (64-bit word address, 23 bits =
  64 MB) and `len` (1..256), and holds them until `gnt`, a one-cycle
  pulse.
* Read: the controller then returns `len` words, one per `rvalid` pulse.
* Write: the controller takes `wdata` at each `wack` pulse. The client
  presents the next word after each `wack`.
* The controller arbitrates between its clients (up to three). Here
  `sd_leon` and `sd_user` are two of them. The model uses round-robin with
  a 3-cycle latency.

## Memory map seen by LEON

| address | contents |
|---|---|
| `0x0000_0000` (bits 31:28 = 0) | boot ROM, 32 words, zero wait |
| `0x4000_0000` | start flag (boot ROM polls it) |
| `0x4000_0004` | end-of-program marker (stores stop the cycle counter) |
| `0x4000_0100` | default program entry |
| `0x4xxx_xxxx` | main memory (64 MB, address bits 25:0) |
| anything else | zero-wait OKAY, reads return 0 |

The LEON APB peripherals (UART, LED port, timers, interrupt controller) sit
behind LEON's own AHB/APB bridge and are not decoded here.

## Interfaces and timing in brief

* Clock `clk`, asynchronous active-low reset `rst_n` for all modules. The
  FPGA build of this system ran at 30 MHz. No constraint is part of the RTL.
* `cpp` accepts at most one word per cycle and has no buffer: it stalls the
  input while a command waits for `leon_ctrl` and while a program word
  waits to be written.
* `msg_gen` sends one word per cycle when `net_out_ready` is high. A reply
  is 8 to 11 words long.
* AHB slaves follow the usual pipelined address/data phases. The boot ROM
  and buffered read beats have no wait states.

## Simulating

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and stops on a watchdog if it hangs. Run
one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    --top-module tb_liquid_top rtl/liquid_pkg.sv tb/tb_liquid_top.sv
./obj_dir/Vtb_liquid_top
```

Replace `tb_liquid_top` with `tb_cpp`, `tb_leon_ctrl`, `tb_msg_gen`,
`tb_cycle_counter`, `tb_ahb_mem_adapter`, `tb_boot_rom` or `tb_ahb_decoder`
to run another one. Testbench helpers:

* `tb/fpx_sdram_model.sv`: behavioural SDRAM controller with memory;
* `tb/ahb_master_bfm.sv`: behavioural AHB master standing in for LEON;
* `tb/tb_net.svh`: builds IPv4/UDP packets and computes checksums.

`tb_liquid_top` runs the whole system at its default parameters. It sends
real packets, checks every reply, and uses a scripted LEON that does the
following:

* fetches the boot code and polls the flag;
* jumps to the entry it finds, fetches two 8-word code lines and reads
  eight data words;
* stores their sum, patches a byte and a halfword, and stores the marker.

The bench runs the program twice, so it also covers the restart. It then
checks that each of these happened: foreign packets dropped, an
out-of-order multi-packet load, surplus words ignored, both kinds of error
reply, polling before start, buffered beats, the second handshake of 8-word
fills, read-modify-write stores, both SDRAM clients requesting at once, and
back-pressure on both network streams. The reported cycle count must equal
the count the bench measures itself (146 cycles per run with the model's
latency).

## What this RTL is not, and where it is its own

Not included, because they are existing components used unchanged:

* the LEON2 integer unit, its instruction and data caches, and its APB
  peripherals;
* the FPX SDRAM controller and the memory chips;
* the layered IP protocol wrappers;
* the FPX network interface and reconfiguration hardware.

The cache-size experiment this system was built for is a change of LEON
cache parameters: data cache 1 to 16 KB with 32-byte lines, a program
walking a 4 KB array. It cannot be run with this RTL alone, because it
needs the LEON core. The parts built here are sized for it: the 4 KB array
and its code fit easily in the 64 MB memory, and the reported run times of
about 116 000 to 141 000 cycles fit the 32-bit counter.

These parts follow the system description:

* the four commands and their fields;
* packet parsing and reply packets;
* LEON reset control and the polled start flag at `0x4000_0000`;
* counting a program's cycles in hardware;
* error replies;
* the memory adapter's word select, read-modify-write, short 4-word read
  bursts and absence of write bursts;
* arbitration of memory between LEON and the control logic in the SDRAM
  controller.

These are this design's own choices, since the description leaves them
open:

* the numeric command, reply and error codes, and the reply contents;
* the word layout of the payload, and the length field counted in 32-bit
  words;
* the UDP port number;
* dropping non-control traffic;
* the boot ROM code, and jumping through the flag value;
* `ENTRY`, `DONE_ADDR`, and the end-of-program marker store as the way a
  program signals it is done;
* the reset length and the power-up sequence;
* the 3-entry line buffer and its drop-on-NONSEQ rule;
* the 64 MB memory size;
* big-endian byte lanes (SPARC is big-endian);
* the SDRAM client handshake;
* the default slave for unmapped addresses.

Known simplifications:

* `leon_ctrl` writes program words one at a time with read-modify-write.
  It does not pair aligned words into single 64-bit writes.
* A Read memory command returns one word.
* Incoming IP and UDP checksums are not checked.
