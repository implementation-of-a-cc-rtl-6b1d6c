# One board of an emulated CC-NUMA machine

This design is one board of a multiprocessor emulator: its network
interface, its memory/directory controller and its second-level cache
controller. Each board is a node of a cache-coherent, non-uniform memory
access (CC-NUMA) machine. Its processor runs real code. The caches, the
memory and the network are built from programmable logic, fast SRAM and
DRAM, so that a coherence protocol can be emulated and measured at speed.

The centre of the design is the **memory/directory controller**. It is the
home of the blocks stored in its board's DRAM, and for each block it keeps a
full-map directory: one presence bit for each of the ten nodes, plus a
dirty bit and a lock.

The controller uses one physical DRAM to stand in for an interleaved memory
with several banks. It does this by holding each reply back for as long as
the emulated bank would be busy. During that time the request is
*suspended*: its reply header is saved in a DRAM slot that belongs to the
bank, and a per-bank timer counts down. When the timer expires, the
controller *resumes* the request and sends the reply. A later request for a
busy bank has to wait.

A **network interface** joins three message FIFO pairs and routes messages
between them:
- port 0: the network chip that reaches the other boards;
- port 1: the second-level cache controller;
- port 2: the memory/directory controller.

```
                                          first-level cache requests
                                                    |
                                          slcc_ctrl (second-level cache
                                           control unit, victim_select)
                                                    |  data SRAM (outside)
             network chip (port 0)                  |  (port 1)
                  |  ^                          |  ^
          msg_fifo|  |msg_fifo          msg_fifo|  |msg_fifo
                  v  |                          v  |
            +-------------------- nic -----------------------+
            | nic_ctrl (poll, decode, route, drop errors)    |
            | nic_datapath (3x3 word switch)                 |
            | nic_fifo_ctrl x3 (message counters, limits)    |
            +------------------------------------------------+
                              |  ^
                      msg_fifo|  |msg_fifo                seq6 (pclock phases)
                              v  |                          | tick
            +------------- mem_dir_ctrl ---------------------+
            | main loop / suspend / resume sequencer         |
            | dir_protocol (directory transitions, busy class)|
            | bank_timer x NBANKS                            |
            +------------------------------------------------+
                              |  word-wide DRAM port
                             DRAM (outside)

            flc_mapper: ASI/address decoder of the first-level cache
```

`rpm_board` is the top. It joins two parts:
- `rpm_node`: the six FIFOs, the interface, the memory/directory controller,
  the phase sequencer and the address decoder;
- `slcc_ctrl`: the second-level cache control unit, on the interface's
  port 1.

These parts are outside the board and reach it through ports:
- the network chip;
- the first-level cache controller;
- the cache's data SRAM;
- the DRAM;
- the processor.

## Messages

Every message is a run of 32-bit words:

| word | contents |
|------|----------|
| 0 | `[31:27]` type, `[26:23]` source node, `[22:19]` destination node, `[18:0]` zero |
| 1 | emulated byte address |
| 2.. | data: none, one word (`wword_req`, `rword_reply`), or a whole block (`wback`, `wblock_req`, `miss_reply`, `miss_reply_own`, `rblock_reply`) |

Requests to a memory controller have type bit 4 clear:
- rmiss_req, wmiss_req, own_req, inv_ack, wback;
- the test-mode requests wword_req, rword_req, rblock_req, wblock_req.

Messages to a cache controller have type bit 4 set:
- miss_reply, miss_reply_own, own_reply, invalidation, wback_req,
  wback_req_own, nack;
- the test-mode replies rword_reply, rblock_reply.

The encodings are in `rtl/rpm_pkg.sv`. A block is `BLOCK_WORDS` words, 32 by
default.

## The directory protocol (`dir_protocol`)

Each block's directory entry is 18 bits, stored in the low bits of one DRAM
word:

| field | bits | meaning |
|-------|------|---------|
| `pbits` | 10 | presence bit per node |
| `dbit` | 1 | one node holds the block dirty |
| `locked` | 1 | a transaction is in progress for this block |
| `ltype` | 2 | kind of transaction in progress |
| `req_id` | 4 | node that started it |

An unlocked entry is in one of three states: *uncached* (no presence bit
set), *shared* (some bits set, clean) or *dirty* (exactly one bit set, with
`dbit`). A locked entry carries one of four lock types:

| lock type | started by | waits for |
|-----------|-----------|-----------|
| `Sh_Dty_Own` | own_req while other nodes share | their inv_acks |
| `Sh_Dty_Miss` | wmiss_req while other nodes share | their inv_acks |
| `Dty_Sh` | rmiss_req of a dirty block | the owner's wback |
| `Dty_Dty` | wmiss_req of a dirty block | the owner's wback |

`dir_protocol` is combinational. It takes a message type, the sender and the
current entry, and returns:
- the action: suspend, nack or error;
- the new entry;
- the message to send when the request resumes, and its destination;
- the busy-time class A–F;
- whether the message's block must be written to memory.

The main transitions:

- **Read miss, clean block.** Add the requester's presence bit. Reply
  miss_reply with the data. Class A.
- **Write miss, clean block with no other sharers.** The entry becomes dirty
  and owned by the requester. Reply miss_reply_own. Class A.
- **Write miss or ownership request with other sharers.**
  - Clear the requester's bit, lock the entry (`Sh_Dty_Miss` or
    `Sh_Dty_Own`) and record the requester.
  - On resume, send one invalidation to each node still present. Class C.
  - Each inv_ack clears one bit (class D, nothing sent).
  - The last ack unlocks the entry. It makes the requester the dirty owner
    and sends miss_reply_own (class A) or own_reply (class B).
- **Ownership request from the only sharer.** Set `dbit` and reply
  own_reply. Class B.
- **Miss on a dirty block.**
  - Lock the entry (`Dty_Sh` or `Dty_Dty`) and send wback_req or
    wback_req_own to the owner. Class B.
  - The owner's wback stores the block and unlocks the entry:
    - `Dty_Sh`: both nodes become clean sharers, and the requester gets
      miss_reply with the new data.
    - `Dty_Dty`: the requester becomes the new owner and gets
      miss_reply_own.
  - Class F.
- **Write-back of a dirty block (replacement).** Store the block. The entry
  becomes uncached. Class E.
- **Any miss or ownership request on a locked entry** is nacked at once,
  leaving the entry unchanged. The requester retries.
- **Anything else** is a protocol error: for example a wback from a node
  that is not the owner, or an inv_ack to an unlocked entry. The message is
  dropped and `mc_error` pulses.

Two points are easy to miss:
- **How the owner is found.** The directory has no owner field. For a dirty
  or `Dty_*` entry, the owner is the single presence bit that is set.
- **Counting acks.** An inv_ack is the last one when clearing the sender's
  bit leaves the presence vector empty. That is why the requester's own bit
  is cleared when the invalidations go out.

## Suspend and resume (`mem_dir_ctrl`, `bank_timer`)

The controller is one sequencer that runs a main loop. Each pass does the
first of these that applies:

1. **Resume.** If some bank's timer has expired, take the lowest such bank.
   - Read the two header words saved in its suspend slot.
   - Then send the saved reply:
     - a miss reply: header, address, and the block read from DRAM;
     - a header-only reply: own_reply, wback_req or wback_req_own;
     - invalidations: the directory entry is read again, and one
       invalidation goes to each presence bit;
     - a null reply: nothing is sent.
   - Free the bank.
2. **Start.** If a coherence header is waiting and its bank is free:
   - read the directory entry;
   - count the event in the performance-counter table (read, add one, write
     back);
   - ask `dir_protocol`, then act on the answer:
     - a nack is sent at once;
     - an error drops the message and pulses `mc_error`;
     - otherwise:
       - store the wback block, if there is one;
       - save the reply header and address in the bank's slot;
       - write the new entry;
       - load the bank timer with the busy time of the class.
3. **Fetch.** If the input FIFO holds a message, latch its two header words.
   - Test-mode messages are served at once, without touching the directory
     or the banks: write word, read word, write block, read block.
   - A coherence header stays latched for step 2. A header for a busy bank
     therefore blocks the FIFO behind it, as a real banked memory would
     (`ev_blocked` pulses).

Rules of the timing:
- The busy times are counted in emulated processor clocks.
- `seq6` divides the system clock by eight into eight one-hot phases. Its
  `pclk_start` is the controller's `tick`.
- `bank_timer` loads the count for its class when the request starts and
  counts down once per tick. It raises `timeout` at zero.
- Busy times are the run-time input `susp_time[0..5]`, one per class A–F.
  This makes them programmable, as they are on the board.
- A suspended request's reply cannot go out before its bank's time is up.
  The end-to-end tests check the delay in cycles.

The DRAM holds everything, in word addresses (default 16 M words = 64 MB):

| region | base | contents |
|--------|------|----------|
| data | `0x000000` | the emulated memory |
| directory | `0x800000` | one entry per block, indexed by block number |
| suspend slots | `0xA00000` | two words per bank: saved reply header, address |
| performance | `0xC00000` | counters indexed by {requester[2:0], type, dbit, locked, ltype, pbits[7:0]} |

The bank of a block is the block number modulo `NBANKS` (4 by default).

## Network interface (`nic`, `nic_ctrl`, `nic_datapath`, `nic_fifo_ctrl`)

**Routing.**
- The controller polls the three "message ready" flags in a fixed order:
  network first, then the cache, then the memory controller.
- It peeks at the header of the chosen message.
- It routes the message:
  - destination is another board → port 0;
  - local request (type bit 4 clear) → port 2;
  - local reply (type bit 4 set) → port 1.
- `nic_datapath` then copies the message one word per clock. It stalls when
  the source FIFO is empty or the destination FIFO is full.
- A message addressed to the port it came from is discarded, and
  `nic_error` pulses.

**Message counters.** Each port has a `nic_fifo_ctrl` with two counters:
- complete messages waiting in the FIFO towards the interface, which raises
  `msg_avail`;
- complete messages in the FIFO from it, which raises `in_overflow` at
  `MAX_MSGS` (120).

The unit on the far side pulses `inc` after writing a whole message and
`dec` after reading one. At 120 messages the interface stops writing to that
FIFO. 120 messages of a 34-word block is 4,080 words, so a 4,096-word FIFO
never overflows in the middle of a message.

**Deadlock avoidance.** With fixed priority, one full destination can freeze
the board. The interface waits on the memory controller's full input FIFO,
while the controller waits on its own output FIFO, which only the interface
drains. Two rules prevent this:
- **Skip a blocked source.** When a message's destination is at its limit,
  `nic_ctrl` leaves the message where it is and skips that source. It clears
  the skip once it has started a message from another source, or once no
  other source is ready.
- **Limit the controller's output.** `mem_dir_ctrl` starts a reply only
  while its output FIFO is below the message limit. Its counter therefore
  cannot wrap, even when it sends many nacks or invalidations in a row.

Both rules are this design's own.

## Second-level cache control unit (`slcc_ctrl`)

This is the cache side of the protocol: the unit that sends the requests the
directory answers. It keeps a tag and a state for each blockframe:
- stable states: INV, RO, RW;
- pending states: PEND_RO (read miss sent), PEND_RW_INV (write miss sent),
  PEND_RW_VAL (ownership requested for a valid RO copy).

The block data are in an external SRAM. The tags and states are an array
inside the unit, cleared by a sweep after reset.

Every task starts with a lookup: the set's frames are streamed through
`victim_select`. Then the unit acts.

**Accesses from the first-level cache** (one at a time, `req` held until
`done`):
- Read hit in RO or RW, or write hit in RW: the word is read or written at
  once.
- Write hit in RO: the frame goes to PEND_RW_VAL and own_req is sent.
- Miss: the chosen victim, if dirty, is written back with its block first.
  The frame takes the new tag and goes to PEND_RO or PEND_RW_INV, and
  rmiss_req or wmiss_req is sent.
- Hit on a pending frame, or every frame pending: nothing is sent.

An access that cannot finish stays in the pending access register (PAR).
The PAR is retried after every message the unit receives, until it
completes.

**Messages from the home nodes:**
- miss_reply / miss_reply_own: fill the frame, which becomes RO / RW;
- own_reply: PEND_RW_VAL becomes RW;
- invalidation: RO becomes INV, PEND_RW_VAL becomes PEND_RW_INV, and an
  inv_ack is always sent;
- wback_req / wback_req_own: a frame in RW sends its block back and becomes
  RO / INV. Without an RW frame, the write-back has already left as an
  eviction, so the request is ignored.
- nack: resend what the pending state stands for. PEND_RO resends rmiss_req,
  PEND_RW_VAL resends own_req, and PEND_RW_INV resends wmiss_req. An
  ownership request that lost its copy to an invalidation therefore comes
  back as a write miss.

The home node of an address is byte-address bits 28:25. Each memory
controller holds 32 MB of emulated data.

Not built:
- prefetches and their request buffer;
- read-modify-write and double-word writes;
- test-mode access to the cache SRAM;
- the cache's own performance counters.

## Smaller parts

- **`msg_fifo`** is a show-ahead FIFO of 4,096 32-bit words. `rd_data` is
  the word at the head. It is written as an array, so synthesis can map it
  to memory.
- **`seq6`** is a one-hot ring of eight phases, giving one processor clock
  for every eight system clocks.
- **`flc_mapper`** decodes the processor's address space identifier (ASI)
  and address:
  - ASIs 0x03, 0x02 and 0x01 give test-mode access to the first-level
    cache, second-level cache and memory controller spaces;
  - ASI 0x05 is I/O, with the device in address bits 23:20, 13 devices;
  - anything else is a normal access.

  For each space it names the region: data, tag/state, buffers, performance,
  TLB, directory, interleaving and so on. It flags addresses past the end of
  a space.
- **`victim_select`** does the tag match and replacement choice for one
  second-level cache set.
  - It scans the set's blockframes one per clock and keeps only two
    registers: the match and the best victim.
  - A valid matching tag ends the scan.
  - Otherwise a frame competes by grade: pending < RW < RO < INV. Equal
    grades are broken by a pseudo-random bit.
  - `slcc_ctrl` uses it for every lookup.

## Parameters

| parameter | default | where |
|-----------|---------|-------|
| `BLOCK_WORDS` | 32 | block size in 32-bit words |
| `FIFO_DEPTH` | 4096 | words per message FIFO |
| `MAX_MSGS` | 120 | message limit per FIFO |
| `NBANKS` | 4 | emulated interleaved banks |
| `CNT_W` | 16 | width of the bank busy counters |
| `MEM_AW` | 24 | DRAM word address width (64 MB) |
| `SLC_SETS` | 16384 | second-level cache sets (4 MB of data, 128-byte blocks) |
| `SLC_ASSOC` | 2 | second-level cache ways |

## How far it can be trusted

Every block has a self-checking testbench in `tb/` that compares the block
with values worked out independently:

- **`tb_dir_protocol`** applies every coherence message to random entries in
  every directory state: uncached, shared, dirty and the four locked
  states. It compares the result with a reference model written separately
  from the transition and busy-time tables.
- **`tb_mem_dir_ctrl`** runs the controller against a behavioural DRAM. It
  checks replies, directory contents, performance counters, bank delays and
  test-mode accesses. The output FIFO's message limit is driven randomly.
- **`tb_nic` and its sub-block benches** send random traffic between the
  three ports. They check routing, word order, message counters, limits and
  the drop of misaddressed messages.
- **`tb_rpm_node`** is the end-to-end bench, at reduced sizes.
  - Ten cache models, local and remote, run 40,000 cycles of random read
    misses, write misses and evictions on a few shared blocks.
  - The models answer invalidations and write-back requests, retry after
    nacks, and check every data value against a golden copy.
  - Readers pause at times, to force the message limits.
  - Directed cases add ownership requests, test mode, remote routing, a
    misaddressed message and a protocol error.
  - It counts each mechanism and fails if any never happened: suspend,
    resume, nack, blocked bank, invalidation, overflow, error, and so on.
- **`tb_rpm_board`** is the end-to-end bench of the whole board, at reduced
  sizes: 4 sets of 2 frames and 12 blocks.
  - A processor model issues random reads and writes through `slcc_ctrl`.
  - Nine remote cache models compete for the same blocks through the
    network port.
  - Every word has a golden value: the processor's reads and every remote
    miss reply must match it.
  - It counts these mechanisms, and fails if any count is zero: cache read
    and write misses, ownership requests, victim and requested write-backs,
    inv_acks, nacks to the cache, PAR waits, suspends, resumes,
    invalidations, blocked banks and message limits.
- **`tb_rpm_board_full`** runs the board with every parameter at its
  default. It covers a miss, a hit, a write through an ownership request, a
  remote read that pulls the block back from the cache, a remote write that
  invalidates it, and a miss served by a remote owner's write-back.
- **`tb_rpm_node_full`** runs `rpm_node` at its default sizes with no
  parameter override: 32-word blocks, 4,096-word FIFOs and the 120-message
  limit. It checks a read, sharing, invalidation, a write-back request, the
  class-A bank delay, and the message limit under 300 back-to-back nacks.

Known limits:
- The DRAM is a behavioural model with a fixed latency. The real board's
  DRAM controller chip and its ECC are not modelled.
- Events are counted in DRAM, but the counters are only read back in the
  testbenches.
- The cache interface between the two cache levels is reduced to one
  request and a done pulse.
- Verilator lint reports some unused signals in `rpm_node`. They are the
  FIFO levels, the phase index, the interface's `busy`, and the mapper's
  space flags and device number. These outputs exist for the units that are
  not built yet.

## Where it departs from the original board

- The board splits the memory/directory controller over two programmable
  chips. Here it is one module with one sequencer.
- The header layout and the message type codes are this design's own. So
  is routing by type bit 4.
- The bank of a block is its block number modulo `NBANKS`.
- Busy times are an input table rather than fixed constants.
- The DRAM port is a plain word-wide request/acknowledge handshake.
- A protocol error drops the message and pulses `mc_error`.
- Both deadlock-avoidance rules are additions; see the network interface
  section above.
- `flc_mapper` decodes address spaces only. The mapping of emulated
  addresses onto performance-counter addresses is not covered.
- Not built:
  - the second-level cache's data unit, and the parts of its control unit
    listed above;
  - the first-level cache control unit;
  - the network crossbar;
  - the DRAM/ECC controller;
  - the processor, the network chip, the bus buffers and the I/O devices.

  Their signals are ports of `rpm_board`.

## Simulating with Verilator

Every testbench is self-contained. It prints
`TB_RESULT checks=N failures=M` and stops. To run one, for example the
end-to-end bench:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/rpm_pkg.sv tb/tb_rpm_board.sv --top-module tb_rpm_board
./obj_dir/Vtb_rpm_board +verilator+rand+reset+2 +verilator+seed+7
```

Replace `tb_rpm_board` with any other bench in `tb/`. Each one finishes
in a few seconds. The testbenches use `$urandom`, so `+verilator+seed+N` gives a
different random run. To change a size, edit the parameter list in the
bench, not the default in `rtl/`.
