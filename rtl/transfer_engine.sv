// transfer_engine: Engine Register plus COMPARE_1.
//
// The Transfer Engine takes one channel's register values (SOURCE,
// DESTINATION, COUNT, CONTROL) from the register bank and holds them in the
// Engine Register until the Address Interface has a free slot for them. The
// register is "full" while its COUNT is non-zero (the Detection cell).
// COMPARE_1 is the Detection output combined with the ACK that the Address
// Interface returns when it stores Engine_Data: while COMPARE_1 is 1 the four
// register multiplexers select zero, so the register empties itself; while it
// is 0 the register may capture Channel_Data_in. This reset-on-send behaviour
// and the COMPARE_1 inputs follow the design.
//
// Choices of this implementation, where the design says nothing:
//  * A clocked register (rising edge of clk, active-low synchronous reset)
//    stands in for the self-timed latch of the asynchronous original.
//  * Channel_Data_in is qualified by a level request, chan_req. The engine
//    answers a request with a one-cycle chan_ack only while it is empty, so a
//    request waits while the register is full. A channel is captured only if
//    its Enable and DRQ bits are set and its COUNT is non-zero; other requests
//    are acknowledged and dropped (nothing to transfer).
//  * The register never captures in the cycle in which COMPARE_1 empties it.
//
// Interface:  chan_req/chan_data/chan_ack  from the register bank side
//             engine_data/engine_full      to the Address Interface
//             ack                          Address Interface stored engine_data
// Timing: a request seen at a rising edge while empty is acknowledged in
// that cycle and the channel appears on engine_data after the edge; ack with
// engine_full empties the register at the next edge.
module transfer_engine
  import dma_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  chan_req,
  input  chan_t chan_data,
  output logic  chan_ack,
  output chan_t engine_data,
  output logic  engine_full,
  input  logic  ack,
  output logic  compare_1
);

  chan_t engine_q;
  logic  accept;

  count_detect #(.W(COUNT_W)) u_detect (
    .count  (engine_q.count),
    .nonzero(engine_full)
  );

  assign compare_1 = engine_full & ack;

  // A waiting request is answered only while the register is empty.
  assign chan_ack = chan_req & ~engine_full;
  assign accept   = chan_ack & chan_data.ctrl.enable & chan_data.ctrl.drq
                  & (|chan_data.count);

  always_ff @(posedge clk) begin
    if (!rst_n)            engine_q <= CHAN_EMPTY;
    else if (compare_1)    engine_q <= CHAN_EMPTY;  // sent: MUXes select 0
    else if (accept)       engine_q <= chan_data;   // MUXes select Channel_Data
  end

  assign engine_data = engine_q;

  // The Address Interface may only acknowledge data that is actually held.
  a_ack_when_full: assert property (@(posedge clk) disable iff (!rst_n)
                                    ack |-> engine_full);

endmodule
