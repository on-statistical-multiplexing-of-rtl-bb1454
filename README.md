# Statistical multiplexer with dynamic buffer control

Interactive terminals are idle most of the time. A fixed time-slot
multiplexer still gives each of them a slot on the shared line, so most slots
carry nothing. A **statistical multiplexer** (asynchronous time-division
multiplexing) sends only the data that is actually there. Each piece of data
carries the number of the channel it belongs to, so the line's capacity goes
to whichever terminals are active at the moment.

The hard part is buffering. Characters arrive in random bursts while the line
drains at a fixed rate. This design keeps one memory, the **queueing buffer
memory (QBM)**, shared by all channels and cut into fixed-size blocks. Each
channel's queued data is a linked list of blocks. Three small tables keep
track of the lists:

- which block starts and which ends each channel's list;
- which blocks are free;
- the order in which blocks arrived, so that the line is served first-in,
  first-out across channels.

How many blocks one channel may hold depends on how many other channels are
active. This is the *dynamic buffer control*.

The RTL implements the multiplexer described in *On Statistical Multiplexing
of Data Signals with Dynamic Buffer Control*. That description gives the
structure, the tables, the block layout and the two flow charts (storing a
block, sending a block). Widths, depths, the output rate, the frame format
and the exact partitioning rule were not specified and are this
implementation's choices. They are listed under
[Departures and own choices](#departures-and-own-choices).

## Data path

```
 terminal 0 ─► line buffer 0 ─┐
 terminal 1 ─► line buffer 1 ─┤   channel     ┌──────────────────────────┐
 terminal 2 ─► line buffer 2 ─┼─► scanner ───►│ buffer control unit      │
 terminal 3 ─► line buffer 3 ─┘   (round      │  input process           │     output
                  │                robin)     │  output process          ├──► transmitter ─► line
                  └──► waiting buffer ◄──────►│                          │     (1 word per
                       (one block)            └──┬─────┬─────┬─────┬─────┘      SERVICE cycles)
                                                 ATT   BAL   AOL   QBM
```

| Module | Role |
|---|---|
| `line_buffer` | Per-terminal FIFO. Always accepts a character, or drops it when full. Requests service at a threshold (one block of data) or when it holds a complete message. |
| `channel_scanner` | Round-robin choice among the requesting line buffers. |
| `waiting_buffer` | Holds up to one block of one channel's data while the QBM cannot take it. |
| `att` | Address translation table: per channel the first block, the last block, a status bit *b* (channel has data queued) and a block count. |
| `bal` | Block available list: one free bit per QBM block. Gives out the lowest free block. |
| `aol` | Arrival order list: one channel number per stored block, in arrival order. |
| `qbm` | Single-port synchronous RAM, `N_BLK × NBS` words. |
| `buffer_control` | State machine that runs the input and output processes on the tables above. |
| `output_transmitter` | Transmit queue plus a timer that sends one word every `SERVICE` cycles. |
| `stat_mux_top` | Wires all of the above. |
| `smux_pkg`, `sync_fifo` | Shared types and defaults; the generic FIFO inside the queues. |

## The queueing buffer: blocks and chains

A block is `NBS` consecutive QBM words (default 100). The block number *k* is
the pointer; the block's first word is at address `k*NBS`.

| Offset in the block | Contents |
|---|---|
| `0 … NBS-3` | characters, each 9 bits: `{eom, char[7:0]}` (eom = end of message) |
| `NBS-2` | continuation word `{count, C}`: `count` = characters stored in this block; `C` = 1 if another block of the same channel follows |
| `NBS-1` | linkage pointer: the number of the next block when `C` = 1, otherwise 0 |

For each channel, the ATT entry points at the oldest block (`fba`) and the
newest block (`lba`). The newest block always has `C = 0`. Every stored block
adds the channel number to the AOL.

The output process needs no search. The head of the AOL names a channel, and
that channel's `fba` is exactly the block that arrived first among the
channel's blocks. The AOL's order across channels plus the chain order within
a channel give first-in, first-out service at block granularity.

Example (4 channels, 6 blocks of 6 words, after a 10-character message on
channel 1 and a 3-character message on channel 2):

```
ATT  ch1: fba=0 lba=2 b=1 nblk=3      QBM block 0: c0 c1 c2 c3 | {4,C=1} | 1
     ch2: fba=3 lba=3 b=1 nblk=1          block 1: c4 c5 c6 c7 | {4,C=1} | 2
AOL  1 1 1 2                              block 2: c8 c9* - -  | {2,C=0} | 0     (* eom)
BAL  free: 4 5                            block 3: d0 d1 d2* - | {3,C=0} | 0
```

## Storing a block (input process)

The controller is idle until one of two things happens: a line buffer asks
for service (offered by the scanner), or the waiting buffer holds data. It
then goes through these steps, one QBM access per cycle:

1. **Grant check.** Decide whether the channel may take a block (see
   [When the buffer is full](#when-the-buffer-is-full)). If yes, take the
   BAL's lowest free block.
2. **Look up the ATT.**
   - *b = 0*: the new block will become the channel's first block.
   - *b = 1*: read the continuation word of the channel's last block, write
     it back with `C = 1`, then write the new block's number into that block's
     linkage pointer. This takes 3 cycles.
3. **Copy.** Move characters from the line buffer (or the waiting buffer) into
   the block, one per cycle. Stop when the `NBS-2` data words are full, when a
   character with eom has been copied, or when the source runs empty.
4. **Close.** Write `{count, C=0}` and pointer 0. Update the ATT: `lba` = new
   block, `b` = 1, block count + 1, and `fba` too if the list was empty.
   Append the channel to the AOL.

A channel is served one block per turn. The scanner then moves on, so long
messages from several terminals interleave block by block.

## Sending a block (output process)

The output process runs when the AOL is not empty and the transmit queue has
room for a whole frame (`NBS` words):

1. Pop the AOL to get channel *ch*, then read the ATT `fba` of *ch*.
2. Read the continuation word. Push the frame header: `K_CHAN` (value *ch*),
   then `K_LEN` (value `count`).
3. Read the linkage pointer, then `count` characters. Push each character as
   `K_DATA` with its eom bit. The QBM read for the next character overlaps
   the push of the current one, so a character takes one cycle.
4. Return the block to the BAL. If `C = 1`, the linkage pointer becomes the
   new `fba`. If `C = 0`, the block must be the channel's `lba`. Clear `b`;
   if the block is not `lba`, raise the sticky `sys_error`.

Output frame of one block, as words on `out_word` (`tx_word_t`: 2-bit kind,
eom, 8-bit value):

```
K_CHAN ch | K_LEN n | K_DATA c0 | ... | K_DATA c(n-1)      1 <= n <= NBS-2
```

Input and output share the single-port QBM, so the controller runs one
process at a time. When both can make progress, it alternates between them.
A waiting buffer whose channel may not take a block yet does *not* count as
input work. Without this rule the controller could keep preferring input that
cannot proceed, and the output process, the only thing that frees blocks,
would never run.

## When the buffer is full

**Partitioning rule.** Channel *i* may take a free block only if, after
taking it, there is still one free block for every *other* channel that
currently holds none:

    n_free - 1  >=  (number of channels other than i with no blocks)

With `N_BLK` blocks (M) and `N_CH` channels (m), this rule has two effects:

- an idle channel can always get its first block;
- one busy channel can take at most `M - m + 1` blocks, which is 7 of 10 by
  default.

That is the one-to-`M-m+1` range of the original scheme. The share one channel
may take shrinks as more channels become active.

**Overflow.** If the grant check fails, the event is reported:

- `ev.overflow` when no block is free at all;
- `ev.limit` when blocks are free but the channel has reached its share.

If the waiting buffer is vacant, up to one block of the channel's characters
moves there (`ev.wb_load`) to make room in its line buffer. While the waiting
buffer holds data, no line buffer is scanned. The waiting buffer is emptied
into the QBM as soon as its channel may take a block (`ev.wb_serve`).

**Loss.** Terminals are never held off. A character that finds its line buffer
full is lost, and `lb_drop[i]` pulses. Lost characters as a fraction of
offered characters is the overflow probability of the original analysis.

## Timing and throughput

- Storing a block takes one cycle per character plus 5 cycles: the
  decision, the ATT look-up, the end of the copy, and two closing writes.
  Linking to an existing chain adds 2 more cycles.
- Sending a block takes one cycle per character plus 5 cycles: the
  decision, the ATT read, the continuation word, the linkage pointer, and
  the release.
- The line sends one word every `SERVICE` cycles (default 8). With the
  controller alternating between the two processes, it handles roughly
  0.45 characters per cycle each way. The line's rate is 0.125 words per
  cycle, so the controller is not the bottleneck.
- Once the controller picks a request, the first character is written to
  the QBM 2 cycles later, or 4 cycles later when linking.
- `ev` pulses are combinational outputs of the controller, valid in the cycle
  of the action.

## Parameters (`stat_mux_top`)

| Parameter | Default | Origin |
|---|---|---|
| `N_CH` | 4 | four terminals in the original block diagram |
| `N_BLK` | 10 | original table example: blocks at addresses 1, 101, … up to 1000 |
| `NBS` | 100 | same example: 100 words per block (98 characters) |
| `LB_DEPTH` | 256 | own choice |
| `SERVICE` | 8 | own choice: clock cycles per output word (unit service interval) |
| `TX_DEPTH` | `2*NBS` | own choice: transmit queue of two frames |

Derived widths: block numbers are `clog2(N_BLK)` bits; the QBM word is 9 bits,
or wider if `NBS` or `N_BLK` require it (`smux_pkg::qbm_width`). The length
header limits `NBS-2` to 255.

## Top-level interface

| Port | Dir | Meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock; asynchronous active-low reset (all queues and tables empty) |
| `in_valid[i]`, `in_word[i]` | in | one character `{eom, char}` from terminal *i*; no handshake |
| `lb_drop[i]` | out | character from terminal *i* lost in this cycle |
| `lb_level[i]` | out | fill level of line buffer *i* |
| `out_valid`, `out_word` | out | output line: one frame word, at most once per `SERVICE` cycles |
| `ev` | out | event pulses (`smux_ev_t`): block_in, new_chain, append, overflow, limit, wb_load, wb_serve, block_out, chain_end |
| `sys_error` | out | sticky: a released last block was not the channel's recorded last block |

## Departures and own choices

- **Continuation bit polarity.** The original's prose and its flow chart
  describe the continuation bit differently. This design follows the block
  diagram and the flow chart: `C = 1` means another block follows, and the
  last block has `C = 0` with pointer 0.
- **Valid count in the block.** The continuation word also stores how many
  characters the block holds. The original always transmits `NBS-2` data
  words and writes `NBS` as the length. Here the length header carries the
  real count, because a block closed at a message end is rarely full.
- **Closing and re-linking.** Each new block is closed at once as the last
  block. When a further block arrives for the same channel, the old last
  block is re-linked by a read-modify-write. The original keeps the
  controller on one channel until its message ends; here channels are served
  one block per turn.
- **Controller structure.** The original splits the controller into a network
  controller, a message queueing controller and a message editor, and
  describes them only by function. They are one state machine here, with the
  scanning part separate.
- **Partitioning rule.** The original gives the rule as a range: each
  channel holds from one block up to `M-m+1` blocks. The inequality above is
  this design's way of enforcing that range.
- **Output start.** In the original, the output process starts when any
  ATT status bit is 1. Here it starts when the AOL is not empty. The two
  conditions are the same, and an assertion in `stat_mux_top` checks that
  they agree.
- **Pointers.** Pointers and ATT entries are block numbers, not word
  addresses.
- **BAL.** The BAL is a bit vector that hands out the lowest free block. The
  original keeps a list of free addresses; the contents are equivalent.
- **System error.** The original stops on a system error; this design sets
  `sys_error` and continues.
- **Not specified in the original**, chosen here:
  - the line buffer depth and threshold, and the extra request on a complete
    message;
  - the waiting buffer size (one block of one channel);
  - the scan order;
  - the output rate and transmit queue;
  - the character width;
  - the reset behaviour.
- **Not built.** The terminals and the remote computer are outside the
  design. The traffic model the original used for its measurements is named
  there but not specified. The testbenches use geometric burst lengths and
  Poisson burst arrivals instead.

## Verification

Every testbench is self-checking. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| Testbench | What it shows |
|---|---|
| `tb_line_buffer`, `tb_channel_scanner`, `tb_waiting_buffer`, `tb_att`, `tb_bal`, `tb_aol`, `tb_qbm`, `tb_output_transmitter` | each block against a behavioural model under random traffic (`tb_output_transmitter` also checks the exact service interval) |
| `tb_buffer_control` | directed: exact QBM layout and ATT entries of a 3-block chain, a second chain, the partition limit into the waiting buffer, scanning blocked behind it, frame order 1,1,1,2,1,3, an empty BAL (overflow), full drain |
| `tb_stat_mux_top` | end to end at 4 channels × 8 blocks × 10 words; every mechanism above must occur at least once; every accepted character must come out once, in order, on its own channel |
| `tb_stat_mux_full` | the same at the default parameters |
| `tb_smux_load` | default size, traffic intensity ρ = 0.6 / 0.7 / 0.8 / 0.9 of the line rate; mean message length 588 characters (6 blocks); terminals at line speed; reports losses and delays; delay must grow with ρ |
| `tb_smux_bufsize` | default size except the QBM: 6, 10, 16 and 24 blocks side by side on the same traffic, at ρ = 0.6 / 0.7 / 0.8; every copy is checked like `tb_smux_load`; the largest buffer must lose less than the smallest |

`tb_smux_load` results with the default parameters (delays in output word
times):

| ρ | lost | mean character delay | mean message delay | mean packet delay |
|---|---|---|---|---|
| 0.6 | 8.4 % | 578 | 483 | 547 |
| 0.7 | 8.1 % | 594 | 565 | 571 |
| 0.8 | 15.7 % | 785 | 642 | 736 |
| 0.9 | 17.7 % | 856 | 763 | 807 |

How the delays are measured:

- Message delay runs from the arrival of a message's last character to
  that character's transmission.
- Packet delay is the same for the last character of each block.

Delay grows with load, as in the original measurements. The losses are high
because messages averaging 588 characters meet a QBM of 980 characters and a
per-channel cap of 7 blocks. Larger `N_BLK` or `LB_DEPTH` lower them.

`tb_smux_bufsize` results: the fraction of characters lost, against the
QBM size in blocks of 98 characters.

| ρ | 6 blocks | 10 blocks | 16 blocks | 24 blocks |
|---|---|---|---|---|
| 0.6 | 11.7 % | 9.2 % | 6.6 % | 4.5 % |
| 0.7 | 11.8 % | 8.9 % | 6.2 % | 4.1 % |
| 0.8 | 13.7 % | 11.4 % | 8.5 % | 5.9 % |

Losses fall steadily as the buffer grows, and are highest at the highest
load. The original results show the same. At ρ = 0.6 and 0.7 the losses
differ by less than the run-to-run noise.

Assertions inside the RTL check these rules in simulation:

- BAL: no double release; no allocation when no block is free;
- AOL: no overflow or underflow;
- ATT: `b` matches the block count;
- waiting buffer: it holds data of one channel only;
- controller: a frame is started only when it fits in the transmit queue;
  no empty block is ever closed.

With `-Wall`, Verilator's lint gives three warnings on the top:

- `SYNCASYNCNET` on `rst_n`. It comes from the assertions'
  `disable iff`; the flops are reset asynchronously only.
- Two `UNUSEDSIGNAL` warnings, for the fill counts of the FIFOs inside the
  AOL and the waiting buffer.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/smux_pkg.sv \
          tb/tb_stat_mux_top.sv --top-module tb_stat_mux_top
./obj_dir/Vtb_stat_mux_top
```

Replace the testbench name to run any of the others.

To change the size, override the parameters of `stat_mux_top` (see
`tb/tb_stat_mux_top.sv`). The package defaults in `rtl/smux_pkg.sv` set the
defaults of every module.
