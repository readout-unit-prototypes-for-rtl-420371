# Readout Unit for a detector data-acquisition column

A Readout Unit (RU) sits between the front-end drivers (FED) of a particle
detector and the builder network (BDN) that assembles complete events. Event
fragments of up to 4 KB arrive at 100 kHz, which is about 400 MB/s. The RU
stores each fragment in a large memory, catalogued by its event number. When
the event manager asks for a fragment, the RU sends it to the builder network.
When told to forget an event, it frees the memory.

The hardware is split across PCI boards:

- **RUM** (Readout Unit Memory) is a dual-port memory board. It has an input
  PCI bus (#1), an output PCI bus (#2) and a bridge to its local bus (#3).
  Its main parts are:
  - the data memory (SDRAM DIMMs, up to 512 MB);
  - a memory management unit (MMU);
  - a memory controller (MC);
  - the PCI interface controllers for bus #1 and bus #2.
- **RUIO** (Readout Unit Input/Output) has a three-port bridge, an I/O
  processor and slots for network cards. One RUIO extends bus #1 towards the
  FED. A second RUIO extends bus #2 towards the BDN.

All three boards also sit on a common host PCI bus, which is used for
configuration. This RTL builds that configuration: one RUM and two RUIO boards.
The logic inside the RUM is built completely. The commercial parts (the
memories, the I/O processors and the network cards) appear only as ports.

## Data path in one picture

```
 FED card ─┐                                              ┌─ BDN card
           │ bus #1                               bus #2  │
 input RUIO bridge ─┤                         ├─ output RUIO bridge
 RUM bridge port 1 ─┤                         ├─ RUM bridge port 2
                    │                         │
              rum_pci_in                 rum_pci_out ◄── requests (send/release)
                    │                         ▲   │
             input FIFO (2 x 2Kx36)   output FIFO │ commands
                    │                 (2 x 2Kx36) ▼
                    └──► mem_ctrl ◄──────────┘  mmu
                           │  ▲   block allocation, read descriptors
                           ▼  │
                       data memory (port of ru_top)
```

1. **Arrival.** A fragment arrives as one PCI write into the RUM input region.
   It consists of an event header word followed by its data words.
2. **Input FIFO.** `rum_pci_in` strips the PCI header, flags the first word
   and pushes the words into the input FIFO.
3. **Storage.** The memory controller takes the event header and asks the MMU
   for a block. It writes the data words into the block, and asks for a
   further block each time one fills up.
4. **Cataloguing.** At the end of the fragment, the memory controller hands
   the header to the MMU, now completed with the first block number. The MMU
   enters it in its event table.
5. **Requests.** A request is a PCI write into the RUM request region, handled
   by `rum_pci_out`. It is either *send event N to address A* or *release
   event N*.
6. **Sending.** For a send, the MMU walks the event's block chain and gives
   the memory controller one read descriptor per block. The memory controller
   puts the header word and the data into the output FIFO. `rum_pci_out` then
   writes them as one PCI transaction to address A, normally the BDN card.
7. **Releasing.** For a release, the MMU walks the same chain and returns
   every block to its free list.

## Transactions and the address map

PCI is modelled at transaction level, not at signal level:

- A transaction is one 64-bit header word followed by `len` payload words, on
  a valid/ready stream.
- The header word holds `addr` in bits [63:32], a free `tag` in [31:16] and
  `len` in [15:0].
- Bits [31:28] of the address select a region (`ru_pkg`).

| region | what                                   | where it sits               |
|-------:|----------------------------------------|-----------------------------|
| 0      | host memory                            | host bus                    |
| 1      | RUM input: event fragments             | bus #1 (`rum_pci_in`)       |
| 2      | RUM output interface: requests         | bus #2 (`rum_pci_out`)      |
| 3      | BDN network card                       | bus #2                      |
| 4      | RUM local bus (#3)                     | fourth port of the RUM bridge |
| 6      | input RUIO local bus (I/O processor)   | third port of the input RUIO bridge |
| 7      | output RUIO local bus (I/O processor)  | third port of the output RUIO bridge |
| 8      | FED network card                       | bus #1                      |

Through the bridges, every region can be reached from every bus.

Routing works as follows:

- Each bus agent and each bridge port claims a 16-bit mask of regions. The
  masks are the `*_REG` localparams in `ru_top.sv`.
- A bus segment delivers a transaction to the one agent that claims its
  region.
- A bridge forwards a transaction to the one port that claims its region.
- A transaction that nobody claims is dropped, and an error bit pulses, as a
  PCI master abort would.

The event header word (`ev_hdr_t`) carries:

| bits    | field                                              |
|---------|----------------------------------------------------|
| [63:56] | status; bit 7 set means the event is missing       |
| [55:32] | 24-bit event number                                |
| [31:20] | 12-bit word count                                  |
| [19:0]  | first block; the sender leaves it 0 and the RUM fills it in |

A request (`ru_cmd_t`) carries:

| bits    | field                                              |
|---------|----------------------------------------------------|
| [63:56] | opcode: 1 = send, 2 = release                      |
| [55:32] | event number                                       |
| [31:0]  | destination address                                |

A request transaction may carry several requests, one per payload word.

## Bus segments, bridges and retry

**`pci_seg`** is one bus.

- It has a round-robin arbiter (`rr_arbiter`). The arbiter holds the grant for
  a whole transaction.
- It decodes the address of the header, then streams the payload to the
  chosen target.

**`pci_bridge`** is the multi-port bridge of both boards: four ports on the
RUM, three on each RUIO.

- Each egress port has two unidirectional FIFOs: a command FIFO of headers and
  a data FIFO of payload words.
- Each egress port has its own round-robin arbiter over the ingress ports.
- A transaction is accepted only when its header and its whole payload fit, so
  a transaction is never split.
- The data FIFO must therefore hold the longest transaction: a fragment's
  header word plus its data words. With the default of 512 entries, a
  fragment can be at most 4 KB including its header word, which leaves 511
  data words.

**Local buses.** The bridge's fourth bus on the RUM (#3) and the I/O
processor bus of each RUIO are 32-bit PCI. The bridges work in 64-bit words on
every port. A `pci_width_conv` on each of these three ports converts between
the two widths:

- each 64-bit word travels as two 32-bit data phases, low half first;
- the packet layout stays the same, so a transaction of `len` payload words
  takes 2 × (len + 1) phases on the narrow side;
- the converter adds no bubbles.

The `lb_*` ports of `ru_top` are these 32-bit buses.

**Retry.** A target may answer a header with `t_retry` instead of taking it:

1. The segment drops the grant.
2. The master keeps its transaction.
3. The master competes for the bus again.

`rum_pci_out` uses retry when its request queue cannot take a whole request
transaction. Without retry, a request could hold bus #2 while the RUM is
waiting for that same bus to send a fragment out: a deadlock. The end-to-end
testbench provokes this case on purpose.

## Memory management unit (`mmu`)

The memory is cut into `NBLK` blocks of `BLOCK_WORDS` words. By default that
is 131072 blocks of 512 words of 8 bytes: 4 KB blocks and 512 MB in all.

The MMU keeps three tables:

- **FPQ**, the free page queue: a FIFO of free block numbers. After reset it
  is filled with 0..NBLK-1, one entry per cycle. The event-table valid bits
  are cleared during the same walk, and `init_done` rises when it ends. At the
  default size this takes 131072 cycles.
- **PBT**, the block table: for each block, the next block of the same event.
- **ET**, the event table: indexed by the low bits of the event number. Each
  entry holds a valid bit and the completed header.

Table access:

- Allocation takes one cycle. The block is granted in the same cycle it is
  asked for.
- Sending and releasing each handle one block per cycle.
- With the FPQ empty, the input stalls until a release returns blocks
  (`stall_nomem`).

Error cases:

- Storing a header over a valid entry of another event overwrites that entry
  and pulses `err_collision`.
- Sending an event that the table does not hold produces a header with the
  missing bit set and no data.
- Releasing an event that the table does not hold pulses
  `err_release_missing`.

On the board these tables live in an external SRAM. Here they are arrays
inside the module.

## Memory controller (`mem_ctrl`)

**Addressing.** The physical word address is `block * BLOCK_WORDS + offset`.
The offset comes from the write counter (WCR) or from the read counter (RCR).

**Write state machine** (input FIFO to memory):

1. Take a header.
2. Get the first block.
3. Write the data words, getting a new block each time one fills up.
4. Hand the header to the MMU.

**Read state machine** (memory to output FIFO):

- It takes one descriptor at a time.
- For the first block of an event, it writes the header word into the output
  FIFO.
- It issues a read only when the output FIFO has room for that read and for
  every read still in flight. Read data therefore never has to be refused.
- It waits until a block's reads have all returned before it takes the next
  descriptor.
- It flags the event's last word as `last`.

**Sharing the memory.** There is one memory access per cycle. When both state
machines want the memory, they alternate word by word, so each direction gets
at least half of the memory bandwidth.

**Memory port.** The port is a plain request/ready interface. Read data
returns in order, some cycles later, with `mem_rvalid`. An SDRAM controller
would sit behind it; refresh and row changes show up only as `mem_ready` low.

**Bandwidth.** At a 133 MHz memory clock, half a word per cycle is 532 MB/s
per direction. The requirement is 4 KB × 100 kHz = 409.6 MB/s.

## Port FIFOs

Each RUM port buffer is two 2048 × 36 `sync_fifo` side by side. Together they
carry 72-bit words (`fifo_word_t`):

- 64 data bits;
- a `first` flag and a `last` flag;
- six spare bits.

`ru_top` asserts that the two halves always move together.

## Parameters of `ru_top`

| parameter        | default | meaning                                             |
|------------------|--------:|-----------------------------------------------------|
| NBLK             | 131072  | memory blocks (512 MB with 4 KB blocks)             |
| BLOCK_WORDS      | 512     | 64-bit words per block                              |
| ET_DEPTH         | 131072  | event table entries (low bits of the event number)  |
| PORT_FIFO_DEPTH  | 2048    | depth of each 36-bit port FIFO                      |
| BR_CMD_DEPTH     | 16      | headers buffered per bridge egress port             |
| BR_DATA_DEPTH    | 512     | payload words buffered per bridge egress port       |

The memory address width follows from these: 26 bits of 64-bit words at the
defaults.

A fragment's word count must not exceed what the bridge data FIFOs can take in
one transaction. That limit is `BR_DATA_DEPTH` words, including the header.

## Status outputs

- `init_done`
- `free_blocks`
- `stall_nomem`
- `bus2_retry`
- fragment counters `frags_in` and `frags_out`
- `errors[7:0]`, one bit per cause, from bit 7 down to bit 0:

| bit | cause                                    |
|----:|------------------------------------------|
| 7   | unknown request opcode                   |
| 6   | stray data word without a header         |
| 5   | release of a missing event               |
| 4   | event-table collision                    |
| 3   | unclaimed transaction in a bridge        |
| 2   | unclaimed transaction on bus #2          |
| 1   | unclaimed transaction on bus #1          |
| 0   | unclaimed transaction on the host bus    |

## Where this departs from the real boards

- **One clock.** There is one clock for all logic. The real boards mix
  33/66 MHz PCI, a 60 MHz processor local bus and DIMMs at up to 133 MHz, so
  the bridges and FIFOs there also cross clock domains.
- **Arbiters per port.** The bridge has one internal arbiter on the boards.
  Here each egress port has its own, so different egress ports can be served
  at the same time.
- **Transaction-level PCI.** PCI is modelled as transactions. There are no
  FRAME#/IRDY#/TRDY# signals, no parity and no configuration space.
- **Own encodings.** The header layout, the request format and the address map
  are this design's own.
- **Direct connections.** The MMU, the memory controller and the interfaces are
  wired to each other directly. On the board they meet on the RUM local bus.
  The RUM bridge's local-bus port is brought out for the I/O processor.
- **Tables on chip.** The MMU tables are on-chip arrays instead of an external
  SRAM.
- **State machine names.** The original memory-controller diagram calls the
  state machine at the input FIFO the READ port (with RCR) and the one at the
  output FIFO the WRITE port (with WCR), naming them from the PCI side. Here
  they are named after what they do to the memory: the write state machine
  and WCR fill the memory from the input FIFO, and the read state machine and
  RCR empty it into the output FIFO.
- **No SET table.** The block diagram of the MMU names a further table, SET,
  whose purpose is not described. It is not built.
- **Only the two-RUIO configuration.** The one-RUIO configuration, where a
  single RUIO serves both input and output, is not built.
- **No programmable-logic flow control.** The alternative flow control, where
  programmable logic replaces the I/O processor with a simple protocol, is not
  built.

## Files

`rtl/`:

| file | contents |
|------|----------|
| `ru_pkg.sv` | types and constants |
| `sync_fifo.sv` | FIFO |
| `rr_arbiter.sv` | round-robin arbiter |
| `pci_seg.sv` | bus segment |
| `pci_bridge.sv` | multi-port bridge |
| `pci_width_conv.sv` | 64/32-bit converter for the local buses |
| `rum_pci_in.sv` | RUM input interface |
| `rum_pci_out.sv` | RUM output interface |
| `mmu.sv` | memory management unit |
| `mem_ctrl.sv` | memory controller |
| `ru_top.sv` | the whole RU |

`tb/` has one self-checking testbench per module, `tb_<module>.sv`, plus:

- `dimm_model.sv`: a behavioural memory with fixed latency and random stalls;
- `tb_ru_top.sv`: the end-to-end test at reduced sizes;
- `tb_ru_full.sv`: `ru_top` at its default sizes.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. A
watchdog ends a testbench that hangs. Build and run one with Verilator 5, for
example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/ru_pkg.sv tb/tb_ru_top.sv --top-module tb_ru_top -Mdir obj_tb_ru_top
./obj_tb_ru_top/Vtb_ru_top
```

**`tb_ru_top`** runs `ru_top` with 128 blocks of 16 words and small FIFOs. It
sends:

- fragments from the FED, the host and the input RUIO's processor;
- fragments spanning several blocks;
- send and release requests from the BDN card and from the host, with the
  fragments going back to either of them;
- a request for an unknown event;
- traffic between the local buses across the bridges.

It checks every word that reaches the BDN or the host against the data that
was sent. It also checks that all memory is freed at the end. It counts each
mechanism, and a mechanism that never happens counts as a failure:

- stall for free memory;
- memory wait states;
- both directions competing for the memory;
- a full bridge;
- dropped transactions;
- an unknown opcode;
- release of a missing event;
- multi-block events;
- bus #2 retries.

It also measures the input and output rates against the 400 MB/s target,
assuming a 133 MHz clock.

**`tb_ru_full`** uses every default. It waits for the 131072-cycle
initialisation, then stores, sends and releases one full 4 KB fragment. Then
it runs the target load:

- the FED card writes 24 fragments of 4 KB back to back;
- the BDN card requests and releases each fragment as soon as it is stored.

Measured on that load, the RU moves 0.489 words per cycle in and 0.486 words
per cycle out. The 4 KB × 100 kHz target needs 0.385 words per cycle in each
direction at 133 MHz. The whole run simulates in well under a second.
