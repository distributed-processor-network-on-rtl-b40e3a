# Distributed Processor Chip (DPC)

The DPC is a small network of processors on one die. Two identical 16-bit
controller cores (CPU-III) sit on a 16-bit token-ring bus together with a
serial-flash controller. Each core is a plain sequential controller; heavy
arithmetic is left to external pipelined coprocessors, which the cores step
through a coprocessor interface. The idea is scalability: more cores and
more coprocessors can be added on the same bus without redesigning any of
them, and one software image format serves every core. The ring allows up
to eight members. This chip has three.

This repository holds synthesizable SystemVerilog for everything on the chip
**except the CPU-III instruction-set cores themselves**: per-core dual-port
RAM, the ring interface with its block-transfer (DMA) and boot logic, the
SPI boot sequencer, the JTAG TAP with the two debug shift registers, and the
arbiter that shares the coprocessor interface. Each core's connections are
brought out of the top module as ports, so a core model (or a testbench
playing one) plugs straight in.

```
         core_o[0]/core_i[0]         core_o[1]/core_i[1]        serial flash
               |                           |                         |
        +--------------+  token+data  +--------------+  token+data  +--------------+
  +---> |  member 1    | -----------> |  member 2    | -----------> |  member 0    | ---+
  |     |  cpu3_node   |              |  cpu3_node   |              |  spi_boot    |    |
  |     |  (CPU 1)     |              |  (CPU 2)     |              |  + ring_node |    |
  |     +--------------+              +--------------+              +--------------+    |
  |            handshake wires between every pair of members                            |
  +-------------------------------------------------------------------------------------+

  jtag_tap  -> debug shift register (dbg_dsr) in each cpu3_node
  cop_mux   -> one external coprocessor port shared by both cores
```

## The token ring

This is the part that takes the most care to understand.

**Wiring.** Three kinds of wires join the members:

* `arb_out -> arb_in` of the next member carries the token, a one-cycle
  pulse. The ring order is member 1 (CPU 1), member 2 (CPU 2), member 0
  (SPI controller), then back to member 1.
* `cbus_out -> cbus_in` of the next member is a 16-bit data link along the
  same ring. Each member registers what it receives and passes it on. The
  member that holds the token drives its own word instead. Because every
  link is registered, the ring has no combinational loop, and a word
  needs one cycle per hop.
* Handshake wires are point to point, one wire in each direction between
  every pair of members. A member has `NODES-1` outgoing wires `hs_out[k]`.
  Wire `k` goes to the k-th *other* member, counted in ascending member
  number and skipping the member itself. At the far end it arrives as
  `hs_in[j]`, where `j` is found by the same rule. For member 1 of three,
  `hs_out[0]` goes to member 0 and `hs_out[1]` to member 2.

**Moving one word.** Only the token holder may send. It puts the word on
its `cbus_out` and waits `NODES` cycles, enough for the word to reach every
member. It then raises its handshake wire to the destination (request). The
destination stores the word from its `cbus_in` and raises its wire back
(acknowledge). The sender drops request, and then the receiver drops
acknowledge. Each wire is used as request in one transfer and as
acknowledge in another. This works because only the token holder ever
requests. A member that is sending therefore reads its input wires as
acknowledges, and any other member reads them as requests.

**Blocks and fairness.** A member keeps the token from the first word of a
block until the word marked `tx_last` has gone, so blocks never interleave
at a receiver. It then passes the token on. A member with nothing to send
passes the token on in the cycle after it arrives, so an idle token
circles the ring at one member per cycle.

**Cost.** Once the sender holds the token and takes a word, `tx_ready`
follows `NODES + 2` cycles later. The words of one block go out every
`NODES + 6` cycles. The receiver buffers one word: it acknowledges as soon
as the word is stored, even before its client has taken it.

## Blocks, DMA and booting

Everything sent over the ring is a **block**: a header word holding a count
N, then N data words. This is the flash boot format, used for all traffic.

* `io_dma` (one per CPU) sends a block read from its RAM when the core
  issues a command (`dma_valid`, `dma_dest`, `dma_addr`, `dma_len`). It
  writes every block it receives into RAM from `rx_base` upwards. When the
  block is complete it pulses `rx_done` and reports `rx_src` and `rx_len`.
* `spi_boot` (member 0) serves requests. A request is a block whose first
  data word is a flash word address A. The controller reads the flash from
  byte address 2·A with the standard READ instruction (0x03, SPI mode 0,
  MSB first, high byte of each word first). The first word read is the
  image length N. It goes back to the requester as the block header,
  followed by the next N flash words. A flash image is therefore simply
  `{N, w0 … wN-1}`.

**Boot sequence** (with `boot_en` high after reset):

1. CPU 1 is the boot master. Its `io_dma` sends the request `{1, 0}`, which
   asks for the image at flash word 0. It writes the answer into its RAM
   from address 0.
2. When the image is in, `boot_done[0]` rises and CPU 1's `run` goes high,
   so the core starts at address 0.
3. CPU 2 then requests the image that starts right after CPU 1's, at flash
   word `1 + N1`. It loads that image in the same way and starts.

The two cores can therefore run different programs from a single flash.
With `boot_en` low nothing is loaded, and both `run` outputs are high at
once. Memory can then be loaded through JTAG.

## Memory of a CPU node

Each CPU has one dual-port RAM (`dp_ram`, 4096 × 16) for both program and
data:

* Port A belongs to instruction fetch.
* Port B serves data accesses. It is shared by, in order of priority, the
  debug register, the DMA unit and the core.

When port B is taken, `core_i.d_wait` is high in the cycle of the core's
access. The core must then repeat that access. Reads are synchronous: the
word appears one clock after the request.

## Debug: JTAG TAP and debug shift registers

`jtag_tap` is a standard 16-state TAP controller. Its instruction register
is 4 bits wide and captures `0001`. The codes are:

| IR code | selects |
|---|---|
| 1 | DSR of CPU 1 |
| 2 | DSR of CPU 2 |
| any other (including the reset value `1111`) | one-bit bypass register |

The TAP pins are sampled with the system clock, so TCK must stay below
clk/4. Updates and TDO changes happen at TCK falling edges, as the standard
requires.

Each CPU has a 32-bit debug shift register (`dbg_dsr`). It shifts least
significant bit first. At Update-DR its contents are treated as a command
`{cmd[31:28], addr[27:16], data[15:0]}`:

| cmd | action |
|---|---|
| 1 WRITE | RAM[addr] ← data |
| 2 READ | fetch RAM[addr]; the next scan brings it out in bits 15:0 |
| 3 HALT | hold the core (`run` low) |
| 4 RUN | release it |
| 5 STEP | one-cycle `step` pulse, only while halted |

At Capture-DR the register loads `{halted, busy, 00, last addr, last read
word}`.

## Shared coprocessor interface

Both cores reach the single external coprocessor port through `cop_mux`.
Each core's port carries:

* a request;
* a 2-bit coprocessor/context number (up to four);
* a 4-bit control word that steps the coprocessor pipeline and starts its
  memory transfers;
* the addresses into the coprocessor's X and Y data memories;
* a data word.

A core holds `cop_req` for as long as it needs the port. The grant is
registered and follows one cycle later. Simultaneous requests are served
alternately. `cop_own` tells the coprocessor which core is driving. When
the port is idle, `cop_ctrl` is 0, meaning no operation. Read data from the
coprocessor's exchange registers goes to both cores.

## What is not here

* **The CPU-III core.** No instruction set, pipeline or register banks are
  specified, so the core is not implemented. This includes the per-context
  register banks behind its zero-overhead switching between four
  coprocessor threads. Its interface is the pair of structs `core_out_t` /
  `core_in_t` in `dpc_pkg`.
* **Direct DMA into coprocessor memory.** Block transfers land in the CPU
  RAM only. Streaming a received block straight into a coprocessor's data
  memory would need a defined coding of the coprocessor control word, and
  there is none.
* **Off-chip parts.** The serial flash and the coprocessors are off chip.
  `tb/spi_flash_model.sv` is a behavioural flash model for simulation only.

## Choices made in this RTL

The overall structure follows the original design:

* two 16-bit cores, each with one dual-port RAM;
* a 16-bit token ring with point-to-point handshakes for up to eight
  members;
* booting from one serial flash, with the word count first and CPU 1
  first;
* a 32-bit DSR per core behind a JTAG TAP;
* one coprocessor port shared by both cores, for up to four coprocessors.

The following are this implementation's own choices. Change them freely if
your system differs:

* the member numbering and the start of the token at member 0;
* the four-phase handshake and the `NODES`-cycle settling wait;
* registered ring links;
* the block format for all ring traffic, not only for booting;
* the boot request format and the placement of CPU 2's image after CPU 1's;
* the RAM size (4096 words) and the port-B priority;
* the DSR command layout, the JTAG instruction codes and the oversampled
  JTAG pins;
* the SPI mode and clock divider;
* the request/grant protocol and the round-robin order of the coprocessor
  arbiter.

## Files and parameters

| file | contents |
|---|---|
| `rtl/dpc_pkg.sv` | widths, member numbers, DSR layout, JTAG codes, core structs |
| `rtl/dpc_top.sv` | the chip; parameter `SPI_CLK_DIV` (default 1, SCLK = clk/2) |
| `rtl/cpu3_node.sv` | RAM + ring interface + DMA + DSR of one CPU |
| `rtl/ring_node.sv` | ring member; `NODES` (3), `ID`, `TOKEN_AT_RESET` |
| `rtl/io_dma.sv` | block send/receive and boot loader |
| `rtl/spi_boot.sv` | SPI flash controller; `CLK_DIV` |
| `rtl/dp_ram.sv` | dual-port RAM; `W` (16), `AW` (12) |
| `rtl/dbg_dsr.sv`, `rtl/jtag_tap.sv` | debug register and TAP |
| `rtl/cop_mux.sv` | coprocessor interface arbiter |
| `tb/tb_*.sv` | one self-checking testbench per block and one for the chip |

All logic uses one clock `clk` and the active-low asynchronous reset
`rst_n`.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. Each has a watchdog. Any of them can be built with plain
Verilator, for example the whole-chip test:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/dpc_pkg.sv tb/tb_dpc_top.sv --top-module tb_dpc_top
./obj_dir/Vtb_dpc_top
```

For a block test, replace the testbench name, for example with
`tb_ring_node`.

`tb_dpc_top` runs the chip at its default parameters and makes each
mechanism happen at least once:

* both CPUs boot in order from a two-image flash;
* after booting, CPU 2 fetches a block from the flash again with a request
  block of its own;
* CPU 1 sends a block to CPU 2 while CPU 2's data accesses are stalled by
  the incoming DMA writes;
* JTAG writes and reads CPU 2's RAM;
* JTAG halts CPU 1, single-steps it twice and releases it;
* both cores contend for the coprocessor port.

`tb_dpc_jtag_load` keeps booting disabled, loads both RAMs through JTAG
and checks them through the instruction ports.

`tb_ring_node` runs random block traffic on an eight-member ring (the
largest the bus allows). It checks order and completeness, and that no
block is interleaved with another.

## Limitations to keep in mind

* A sender keeps the token for a whole block. The flash controller
  therefore holds it for the whole answer to a request, and reads the flash
  word by word as the ring takes them. A long image blocks other ring
  traffic for that time.
* A receiver whose client never takes its buffered word stalls the sender,
  and with it the whole ring.
* Read data of RAM port B is valid only in the cycle after the access.
  The next access by any user of the port replaces it.
* JTAG works only while TCK is below a quarter of `clk`.

## How far to trust it

Each block's testbench compares the block's outputs with values the
testbench computes itself. Each testbench was also shown to fail against a
deliberately broken copy of its block. The chip has been checked only in
simulation, and only against a behavioural flash model. It has not been
synthesized for a specific technology. Timing on silicon is not
characterized.
