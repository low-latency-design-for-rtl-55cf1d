# Two-slot DMA address engine

A DMA controller that serves many short transfers loses time between channels.
Before the first word of a new channel can move, its SOURCE, DESTINATION and COUNT
registers have to be fetched and loaded into the logic that generates the bus
addresses. When a channel moves only five or ten words, that setup gap is a
large share of the total time.

This design hides the gap. The address-generating side has two channel slots
instead of one. While the Counter works through the channel in one slot, the
Transfer Engine already loads the next channel into the other. When the active
channel finishes, the engine switches slots and the next channel starts at once.
The setup of channel *k+1* overlaps the transfers of channel *k*.

The architecture comes from an asynchronous (self-timed) DMA controller. This
RTL is a synchronous, single-clock version of it. The block structure, the
register formats and the selection rules follow the original. The clocking and
handshakes are this implementation's own (see "Departures").

```
 register bank                                                       bus
 chan_req/chan_data ──► Transfer Engine ──Engine_Data──► Address Interface ──Interface_Data──► Counter ──► bus_req/src/dst
 chan_ack ◄──────────── (Engine Register,  ◄──ACK─────── (Interface_1,       ◄──Counter_Data── (counter,  ◄── bus_ack
                         COMPARE_1)                        Interface_2,          Comp_Dect────   completion
                                                           DECISION, SELECT_1,                   detection) ──► eot
                                                           SELECT_2, MUX)
```

## The channel record

Every block passes the same record, `dma_pkg::chan_t` (100 bits):

| field   | bits | meaning |
|---------|------|---------|
| `src`   | 32   | address of the next word to read |
| `dst`   | 32   | address of the next word to write |
| `count` | 32   | transfers still to do; a record with `count == 0` is treated as empty |
| `ctrl`  | 4    | CONTROL: `channel_no` [3:2], `drq` [1], `enable` [0] |

`enable` says the channel may be served. `drq` says its data has arrived, and
the completion logic uses it. `channel_no` is reported back when the channel ends.
CONTROL has no bits above bit 3 here.

The design has no separate "valid" bit. A register holds a channel when its
COUNT is non-zero. The same test (`count_detect`) decides whether the Engine
Register is full, which slots are occupied, and whether the Counter has work.

## The Address Interface: two slots and two select signals

This is the block that matters (`address_interface.sv`). It holds two channel
records, Interface_1 and Interface_2, and two control signals steer it.

**SELECT_1** (`select1_gen.sv`) is the occupancy of the slots. Bit 0 is
Interface_1's COUNT != 0 and bit 1 is Interface_2's. A new channel from the
Transfer Engine is stored as follows:

| SELECT_1 | Engine_Data goes to |
|----------|---------------------|
| 00       | Interface_1 |
| 10       | Interface_1 |
| 01       | Interface_2 |
| 11       | nowhere: the engine waits |

**SELECT_2** (`select2_gen.sv`) is the active slot: 0 for Interface_1 and 1 for
Interface_2. The output MUX shows the active slot to the Counter as
Interface_Data. After each transfer, the Counter's updated record is written back
into the active slot. SELECT_2 flips whenever the Counter raises Comp_Dect,
which means the active channel has finished. The Counter then sees the other
slot, which was filled in the background.

One rule in SELECT_2 is not obvious. When SELECT_1 is 00 (both slots empty),
SELECT_2 is forced back to 0. The next channel will be stored into Interface_1,
so the pointer has to be there. Without this rule, the following can happen.
A channel in Interface_1 finishes while Interface_2 is empty, and the pointer
moves to Interface_2. The next channel is then loaded into Interface_1, and the
pointer stays on an empty slot for good. With the rule, the pointer moves only
in two cases: to a slot that holds work, or to Interface_1 when both slots are
empty. So the Counter always serves channels in the order the engine accepted
them.

**DECISION** (`decision.sv`) does the routing. One demultiplexer sends
Counter_Data to the slot named by SELECT_2. The other sends Engine_Data to the
slot chosen by SELECT_1, as in the table. A multiplexer per slot then takes
whichever source targets it. The two sources never target the same slot in
the same cycle, for two reasons:

- the engine writes only into an empty slot;
- the Counter writes only into the active slot, and only while that slot has a
  non-zero COUNT.

The `clash` output flags a violation, and an assertion in the Address
Interface checks it.

A finished channel stays in its slot with COUNT = 0, and its CONTROL bits are
kept. The zero COUNT is enough to mark the slot free. The kept DRQ bit is what
makes Comp_Dect fire.

## Transfer Engine

`transfer_engine.sv` holds one record, the Engine Register, between the
register bank and the Address Interface.

- **Capture.** While the register is empty, a request (`chan_req`) gets a
  one-cycle `chan_ack` and the record is captured. A record is captured only if
  `enable` and `drq` are set and COUNT is non-zero. Other requests are
  acknowledged and dropped. DRQ is required because a channel without it would
  never raise Comp_Dect.
- **Hand-over.** COMPARE_1 combines two signals: the register is full, and the
  Address Interface acknowledged the record. When COMPARE_1 is 1, all four
  register fields are reset to zero in the next cycle, and nothing is captured
  in that cycle.

## Counter and completion detection

`dma_counter.sv` is combinational. The state it updates lives in the active slot.

- **Requests.** `bus_req` is high while the active COUNT is non-zero.
  `bus_src` and `bus_dst` are the active addresses.
- **Update.** On `bus_ack`, the Counter writes back the record with both
  addresses increased by `ADDR_STEP` (4, one 32-bit word) and COUNT decreased
  by 1. CONTROL is unchanged.
- **Comp_Dect.** Comp_Dect = (COUNT == 0) AND DRQ. It is high for the one cycle
  in which the finished channel is still shown, and that cycle switches the slot.
- **End of transfer.** `eot` pulses together with the acknowledge of a
  channel's last transfer, and `eot_channel` carries its `channel_no`. The
  register bank can use it to clear the channel's Enable bit.

## Timing

All state changes on the rising edge of `clk`. Reset is synchronous and active
low: all registers go to zero and SELECT_2 to 0.

- **Register bank side.** `chan_req` is a level and `chan_data` must stay stable
  until `chan_ack`, which is high for one cycle. The engine can take a new
  channel at most every second cycle, because it cannot capture in the cycle
  in which it hands a record over.
- **Bus side.** `bus_req`, `bus_src` and `bus_dst` stay stable until `bus_ack`
  (an assertion checks this). With `bus_ack` held high, one word moves per cycle.
- **Between channels.** After the acknowledge of a channel's last word, there
  is one idle cycle while Comp_Dect flips SELECT_2. The next channel, if it is
  already in the other slot, requests in the cycle after that. *m* back-to-back
  channels of COUNT *n* therefore take *m·n + m − 1* cycles from the first
  transfer to the last.
- **Latency.** An idle cycle can also come from the engine. This happens when
  the next channel is not yet in a slot, for example when the register bank
  is slow.

## Departures from the original design

- **Clocking.** The original is asynchronous: its blocks are self-timed and
  talk through request/acknowledge handshakes. Here everything runs on one clock,
  and each handshake is a level request with a one-cycle acknowledge. The gap
  between channels is one clock cycle. The original reports picosecond
  latencies from gate-level simulation of its own circuit (about 0.1 ns with
  two slots against about 1 ns with one). A cycle count cannot be compared
  with those figures.
- **Circuit-level choices.** The internals of the Detection cell and of the
  SELECT_2 generator are not specified in detail. Detection is a non-zero test
  on COUNT. SELECT_2 is a toggle flip-flop with the return-to-0 rule above,
  which is this design's own addition.
- **Engine and bus handshakes.** The engine's capture condition (empty
  register, Enable and DRQ set, COUNT non-zero), the end-of-transfer pulse and
  the bus handshake are this design's own choices.
- **Not included.** The surrounding controller is not part of this RTL: the
  register bank, the peripheral request interface that maps DMA requests onto
  channels, and the system bus that carries the data. Their signals are ports
  of `async_dma_top`. The single-slot baseline that the two-slot version
  improves on is not included either.

## Files

| file | contents |
|------|----------|
| `rtl/dma_pkg.sv` | record type, widths, SELECT_1 codes |
| `rtl/count_detect.sv` | the COUNT != 0 Detection cell |
| `rtl/transfer_engine.sv` | Engine Register and COMPARE_1 |
| `rtl/select1_gen.sv`, `rtl/select2_gen.sv`, `rtl/decision.sv` | control of the slots |
| `rtl/address_interface.sv` | the two slots and their control |
| `rtl/dma_counter.sv` | address stepping and completion detection |
| `rtl/async_dma_top.sv` | top level |
| `tb/tb_*.sv` | one self-checking testbench per module, named after it |

The top also brings out status signals for monitoring: `engine_full`,
`engine_ack`, `compare_1`, `select_1` and `select_2`.

## Verification

Each testbench computes its expected values on its own and ends by printing
`TB_RESULT checks=N failures=M`. A watchdog stops a run that hangs.

- The unit tests cover every combination of the routing inputs and the SELECT_2
  rules. They also run random traffic against small reference models.
- `tb_address_interface` plays both neighbours of the Address Interface. It
  checks against a FIFO model that channels are served in order, that the
  engine is stalled exactly when both slots are busy, and that a waiting
  channel starts after one idle cycle.
- `tb_async_dma_top` runs the whole design at its default widths. Its first
  phase uses channels of COUNT 5, 10 and 15 (eight each) with the bus always
  ready, and it checks every address and the exact cycle counts: 47, 87 and 127
  cycles. Its second phase runs 200 random channels with random bus waits and
  some channels that must be dropped. It fails if any of these mechanisms
  never occurs:
  - the engine stalling on two full slots;
  - both slots being full;
  - a slot switch;
  - SELECT_2 returning to 0;
  - COMPARE_1 emptying the Engine Register;
  - a bus wait;
  - a dropped request;
  - an end-of-transfer pulse.

To simulate with Verilator, for example the top level:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/dma_pkg.sv tb/tb_async_dma_top.sv --top-module tb_async_dma_top
./obj_dir/Vtb_async_dma_top
```

Every run takes well under a second. Add `--trace` and `$dumpvars` in the
testbench to get waveforms.

## Changing it

- **Step size.** `ADDR_STEP` (a parameter of `dma_counter`) sets the address
  step.
- **Widths.** Address and count widths are `ADDR_W` and `COUNT_W` in
  `dma_pkg`.
- **More than two slots.** This is not a parameter. It would need a wider
  SELECT_1, an occupancy-ordered store rule and a round-robin SELECT_2.
