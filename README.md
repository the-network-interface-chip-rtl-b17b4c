# NIC — a memory-mapped network interface for the 88100

The NIC connects a Motorola 88100 processor to a PaRC packet-switched network.
Its main idea is to make sending and receiving a message cost almost nothing
in instructions. The chip sits on the processor's P bus in place of one of the
88200 cache chips. The low address bits of an ordinary load or store then carry
a small command word. So one `ld`/`st` moves a 32-bit register value and can
also:

* read or write one of the NIC's 14 interface locations,
* advance to the next incoming message (NEXT), and
* post the outgoing message being composed (SEND, REPLY or FORWARD,
  with a 5-bit type and an optional circuit-switch flag).

A message is always five 32-bit words plus a 5-bit type. The top byte of the
first word is the destination processor. Sending a message takes five stores,
the last one carrying SEND. Receiving one takes a load of `INST`, which already
holds the address of the right handler, then a jump, then loads of the
incoming words, the last one carrying NEXT.

```
            +---------------------------------------------------------+
 PaRC out <-| nic_out_port <-- nic_msg_queue (output) <--+             |
 nodata     |  12-word packets    15 messages            |  nic_pbus_if|<-> P bus (clk)
 noclk      |  (netclk)                                  |  o0..o4     |   da[13:0] r_w ncs dbe
 nowait  -->|                                            |  i0..i4     |   d (in/out/oe)
            |                                            |  CONTROL    |   dr (in/out/oe)
 PaRC in -->| nic_in_port  --> nic_msg_queue (input)  ---+  STATUS     |
 nidata     |  start-of-packet   15 messages               CODE-BASE  |
 niclk      |  (niclk)                                                |
 niwait  <--|  detection                                   INST       |
            +---------------------------------------------------------+
```

## Programmer's model

### Interface locations (`da[3:0]`, the LOC field)

| LOC | location  | access | contents |
|-----|-----------|--------|----------|
| 0–4 | o0–o4     | r/w    | outgoing message being composed |
| 5–9 | i0–i4     | r/w    | current incoming message (writable for testing) |
| A   | CONTROL   | r/w    | `[8:5]` oTHRESH, `[4:1]` iTHRESH, `[0]` F/W |
| B   | STATUS    | r      | `[15:12]` oLENGTH, `[11:8]` iLENGTH, `[7]` oaFULL, `[6]` iaFULL, `[5]` VALID, `[4:0]` iTYPE |
| C   | CODE-BASE | r/w    | handler base address; bits 9:0 read as 0 |
| D   | INST      | r      | computed handler address (below) |
| E–F | —         | r      | reserved, read as 0 |

A write to a read-only or reserved location is ignored. `oaFULL` is
`oLENGTH > oTHRESH`, and `iaFULL` is `iLENGTH > iTHRESH`. The lengths count
messages waiting in each queue. The message held in i0–i4 is not counted.

### Command word (`da[13:0]` = address bits 15:2)

| bits  | field | meaning |
|-------|-------|---------|
| 13    | CSP   | send circuit switched (sets bit 14 of the packet header) |
| 12:10 | SEND  | `x00` none, `x01` SEND, `x10` REPLY, `x11` FORWARD (bit 12 unused) |
| 9     | NEXT  | advance to the next incoming message |
| 8:4   | OTYPE | type of the message sent |
| 3:0   | LOC   | location read or written |

* **SEND** posts o0–o4.
* **REPLY** posts the message with i1, i2 in place of o0, o1. A request
  carries its return address in i1/i2, and i1's top byte is the requester.
* **FORWARD** posts the message with i3, i4 in place of o3, o4.

Within one transaction:

* A store to an o-register that comes with a send is included in the
  message.
* Bypassed i-words are always those of the message current *before* the
  transaction. This holds even when the same transaction stores to them or
  carries NEXT.
* The o-registers are not changed by a send.

The 88100's double-word `ld.d`/`st.d` reach the NIC as two transactions to
LOC and LOC+1. Every command bit in them therefore takes effect twice. The
hardware has no special case for them.

### INST: dispatch in one load

INST is recomputed every cycle from STATUS, CODE-BASE and i1:

```
if VALID and not oaFULL and not iaFULL and iTYPE == 0:
    INST = i1                                   # message carries its handler
else:
    INST = CODE-BASE[31:15] | oaFULL<<14 | iaFULL<<13 | (VALID ? iTYPE : 0)<<8
```

Handler *i* therefore lives at CODE-BASE + 256·*i*. The "no message" handler is
the type-0 slot. When a queue passes its threshold, dispatch moves to a second
(+2¹³, input almost full) or third (+2¹⁴, output almost full) handler table.
This lets software drain or throttle before a queue overflows.

## P bus transactions, replies and overflow

This is the part of the design with the most behaviour packed into a few
signals. All of it is in `nic_pbus_if`.

**Cycle structure.**

* In cycle *t* (address phase) the NIC samples `ncs`, `dbe`, `r_w` and `da`.
* In cycle *t+1* (reply phase) the NIC drives `dr` and, for a read, `d`.
  For a write it takes `d_in`.
* Every effect of the command happens at the clock edge that ends the reply
  phase: the register write, the queue push, the NEXT reload and the VALID
  update.
* Read data is the location's value during the reply phase, i.e. before that
  edge.

The processor may put the next transaction's address on the bus during the
current reply phase. Transactions then run back to back, one per cycle.

**Ignoring a transaction.** The P bus is shared with other slaves. If the
previous cycle held a non-NULL transaction (`dbe` high), the NIC looks at the
reply lines in the current cycle. This is its own reply if it is answering,
otherwise `dr_in`. Unless that reply is SUCCESS, the address on the bus now is
ignored, because the processor will present it again. `dbe` exists only to
recognise NULL cycles.

**Reply codes** (`nic_pkg::dreply_e`): `01` SUCCESS, `10` WAIT, `11` FAULT,
`00` not driving.

**Send into a full output queue**, chosen by CONTROL[F/W]:

* **F/W = 1 (fault).** The reply is FAULT. The send is dropped, and so is a
  NEXT in the same transaction. A load or store in it is still performed.
  The processor takes a trap and can drain incoming messages before trying
  again.
* **F/W = 0 (wait).** The reply is WAIT, cycle after cycle. The wait ends
  once the output port has drained the queue down to oTHRESH messages
  (oaFULL low). It does not end merely when a slot becomes free. The whole
  transaction then executes and SUCCESS is replied. During the wait the
  processor keeps its write data on `d`.

Software can avoid overflow altogether with two rules:

1. A handler sends fewer than 16 − oTHRESH messages.
2. Software checks oaFULL, or uses INST, before dispatching.

**NEXT and VALID.**

* NEXT clears VALID.
* Whenever VALID is low and the input queue holds a message, the head
  message is moved into i0–i4/iTYPE and VALID is set.
* If the queue is not empty, this happens at the same edge that executes the
  NEXT. The very next transaction therefore reads the new message, while a
  read in the NEXT transaction itself still returns the old one.
* After reset, or after a NEXT on an empty queue, the first message to arrive
  is loaded without any command.

## Network side

### Packet format

A message travels as twelve 16-bit words, one per clock:

| word | upper byte | lower byte |
|------|------------|------------|
| 0    | `1, CSP, 1, OTYPE[4:0]` | o0[31:24] (destination) |
| 1    | o0[15:8]   | o0[7:0]   |
| 2    | o0[31:24]  | o0[23:16] |
| 3    | o1[15:8]   | o1[7:0]   |
| 4    | o1[31:24]  | o1[23:16] |
| 5    | o3[7:0]    | o2[7:0]   |
| 6    | o3[23:16]  | o3[15:8]  |
| 7    | o4[7:0]    | o3[31:24] |
| 8    | o4[23:16]  | o4[15:8]  |
| 9    | o2[15:8]   | o4[31:24] |
| 10   | o2[23:16]  | o2[31:24] |
| 11   | 0x55       | 0x55 (ignored) |

The odd placement of o2–o4 lets the words land in the fields of the tokens
used by existing I-structure memory boards: o3/o4 form the value, o0 the frame
pointer and o1 the instruction pointer. Both ports use the same pair of
functions in `nic_pkg` (`msg_to_word`, `words_to_msg`).

### Output port (`nic_out_port`)

* Between packets `nodata` is `0x5555`, whose bit 15 is 0. Every header has
  bit 15 set, and that bit is how a receiver finds packet starts.
* A packet may begin only while `nowait` is low. The port checks `nowait`
  when it is idle and in the last word of a packet. Packets can therefore run
  back to back with no idle word.
* `nodata` is a register. The header appears one cycle after the cycle in
  which the queue was non-empty and `nowait` was low.

### Input port (`nic_in_port`)

* While idle, the port watches bit 15 of `nidata`. A set bit marks a header,
  and the next eleven words are taken whatever their bit 15 is.
* On word 11 the message is pushed onto the input queue.
* `niwait` asks the sender not to start another packet. It is raised as soon
  as the queued messages, plus the packet being received, plus `SLACK` (1)
  packets that could still start before the sender sees `niwait`, reach the
  queue depth.
* The queue therefore never overflows. An assertion guards this.

## Clock domains and reset

The chip has three clocks, and the two message queues are the only places
where data crosses between them:

| domain   | clock    | contents |
|----------|----------|----------|
| P bus    | `clk`    | `nic_pbus_if`, write side of the output queue, read side of the input queue |
| output link | `netclk` | `nic_out_port`, read side of the output queue; `noclk` = `netclk` inverted |
| input link  | `niclk`  | `nic_in_port`, write side of the input queue; `niclk` arrives with `nidata` from the sender |

* **Queue structure.** `nic_msg_queue` is a dual-clock FIFO:
  * It holds 16 entries of storage, of which at most 15 are used.
  * Its pointers are Gray coded and pass through two-flop synchronisers.
  * Each side therefore sees the other's progress two to three of its own
    cycles late.
* **Counts err on the safe side.**
  * oLENGTH (and with it oaFULL, the FAULT/WAIT decision and the WAIT
    release) uses the output queue's write-side count. That count can still
    include a message the output port has already taken.
  * iLENGTH uses the input queue's read-side count. That count can still
    miss a message that has just arrived.
  * `niwait` uses the input queue's write-side count.
  * Status bits may therefore lag by a few cycles. No queue ever over- or
    underflows.
* **Link timing.** `noclk` rises in the middle of each `nodata` word. `nowait`
  is taken as synchronous to `netclk`, and `niwait` is produced on `niclk`.
  The switch on the far side is expected to treat them in the same way.
* **Reset.** `rst_n` is an asynchronous, active-low reset. Each domain has a
  `nic_reset_sync`, which asserts reset at once and releases it two edges of
  that domain's clock later. Reset clears all state, empties both queues and
  sets both thresholds to 15, so no almost-full flag is raised.

## Parameters

| parameter | where | default | meaning |
|-----------|-------|---------|---------|
| `QDEPTH`  | `nic_top` | 15 | messages per queue. The 16th message of each direction is the one in the interface registers. At most 15, because the length fields are 4 bits. |
| `SLACK`   | `nic_top`, `nic_in_port` | 1 | packets that may start after `niwait` rises |
| `DEPTH`   | `nic_msg_queue`, `nic_in_port` | 15 | as `QDEPTH` |

## Departures and readings

* **Network clocks.** The network clocks may be separate from the P bus
  clock, and the input clock may be fully asynchronous. This design treats
  both as unrelated to `clk` and crosses only through the queues. That
  choice costs a few cycles of latency in each queue. Deriving `noclk` as
  the inverse of `netclk` is also this design's choice.
* **Reply and bus timing.** The reply encoding and the one-cycle
  address-to-reply timing are this design's own choices. The 88100 P bus
  specification governs real parts.
* **REPLY bypass.** REPLY replaces o0, o1 with i1, i2. An alternative reading
  (o0, o2) was not taken.
* **WAIT release.** A stalled send is released at `oLENGTH <= oTHRESH`
  ("under the threshold"), so oTHRESH = 0 cannot deadlock.
* **Bidirectional buses.** `d` and `dr` are split into in, out and
  output-enable signals. The tristate pads are outside this RTL.
* **CODE-BASE.** CODE-BASE stores bits 31:10. INST uses bits 31:15.
* **STATUS writes.** Writes to STATUS are ignored.
* **Reload collisions.** A store to an i-register in the same cycle as a
  reload is lost; the reload wins.
* **Received CSP bit.** The CSP bit of a received packet is stored in the
  queue but not visible to software.

## Files

| file | contents |
|------|----------|
| `rtl/nic_pkg.sv` | types (command word, STATUS, CONTROL, message), reply codes, packet packing functions |
| `rtl/nic_top.sv` | the chip: five sections wired together |
| `rtl/nic_pbus_if.sv` | P bus slave, interface locations, message composition, overflow handling |
| `rtl/nic_inst_calc.sv` | INST computation |
| `rtl/nic_msg_queue.sv` | dual-clock message FIFO (used twice) |
| `rtl/nic_sync.sv` | two-flop synchroniser for Gray pointers |
| `rtl/nic_reset_sync.sv` | per-domain reset bridge |
| `rtl/nic_out_port.sv` | PaRC transmitter |
| `rtl/nic_in_port.sv` | PaRC receiver and `niwait` |
| `tb/nic_tb_pkg.sv` | independent reference packer and random messages for the testbenches |
| `tb/*_tb.sv` | one self-checking testbench per module |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and finishes. It has a
cycle watchdog. For example:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb \
    rtl/nic_pkg.sv tb/nic_top_tb.sv --top-module nic_top_tb -Mdir obj_top
./obj_top/Vnic_top_tb
```

Replace `nic_top_tb` with `nic_pbus_if_tb`, `nic_msg_queue_tb`,
`nic_out_port_tb`, `nic_in_port_tb` or `nic_inst_calc_tb` to run the others.

What the testbenches establish:

* **`nic_pbus_if_tb`** runs a cycle-level reference model of the command
  rules. It is written independently of the RTL. Every cycle it compares the
  reply code, read data, queue push (including the composed message) and
  queue pop. Traffic is random loads, stores, NEXT, SEND/REPLY/FORWARD and
  CONTROL changes, arranged so that the output queue fills and both WAIT and
  FAULT occur. Scripted cases cover:
  * a read together with NEXT,
  * a store together with a send,
  * a transaction after another slave's WAIT,
  * back-to-back transactions.
* **`nic_top_tb`** loops `nodata` back to `nidata` and `noclk` back to
  `niclk`. It runs the chip at its default sizes, with a 10 ns P bus clock
  and a 6 ns `netclk`. It sends 15 messages with the link held, so the output queue
  fills. It then forces a FAULT and a WAIT, and lets 16 messages loop back,
  which fills the input queue and raises `niwait`. Finally it receives every
  message, checking words, type and INST, and answers some with REPLY and
  FORWARD. It also issues double-word accesses as two back-to-back
  transactions. A double store with SEND posts two messages, and a double
  load with NEXT advances twice. Every packet word on the link is checked. Each mechanism is
  counted, and any that never occurs is a failure.
* **The port and queue testbenches** check:
  * the packet byte map, using a separate table in `nic_tb_pkg`,
  * idle patterns,
  * start-of-packet detection when body words have bit 15 set,
  * `nowait`/`niwait` flow control,
  * FIFO order, full and empty, against a reference queue,
  * for the queue, two unrelated clocks, with bounds on the lag of both
    counts.
