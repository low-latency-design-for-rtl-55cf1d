// async_dma_top: low-latency DMA address engine with a two-slot interface.
//
// A DMA controller spends a setup time between the last transfer of one
// channel and the first transfer of the next, while the new channel's
// registers are fetched and loaded into the block that generates addresses.
// For short transfers that gap is a large share of the total. Here the
// initiator side holds two channels: while the Counter works through the
// active one, the Transfer Engine already loads the next one into the idle
// slot, so the switch between channels costs only the slot change.
//
//   register bank --chan_req/chan_data--> Transfer Engine
//       --Engine_Data--> Address Interface (Interface_1 | Interface_2)
//       --Interface_Data--> Counter --bus_req/src/dst--> bus
//   Counter --Counter_Data/Comp_Dect--> Address Interface
//
// The split into these three blocks, their sub-blocks and signals follows the
// design. The original is asynchronous (self-timed, handshake driven); this
// implementation is synchronous to one clock (rising edge, synchronous
// active-low reset), with level request / one-cycle acknowledge handshakes
// in place of the four-phase handshakes.
//
// Interface:
//   chan_req, chan_data   a channel's registers from the register bank; held
//                         until chan_ack (one cycle) accepts them
//   bus_req, bus_src,     one word transfer per bus_ack; addresses stay stable
//   bus_dst, bus_ack      while bus_req is high and bus_ack low
//   eot, eot_channel      one-cycle pulse with the last ACK of a channel
//   engine_full, engine_ack, compare_1, select_1, select_2
//                         internal handshake and slot state, for monitoring
// Timing: with bus_ack held high a channel of COUNT n occupies the bus for n
// consecutive cycles; between the last ACK of one channel and the first
// request of an already loaded next channel there is one idle cycle
// (Comp_Dect is seen, SELECT_2 flips).
module async_dma_top
  import dma_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // register bank side
  input  logic              chan_req,
  input  chan_t             chan_data,
  output logic              chan_ack,
  // bus side
  output logic              bus_req,
  output logic [ADDR_W-1:0] bus_src,
  output logic [ADDR_W-1:0] bus_dst,
  input  logic              bus_ack,
  // end of transfer
  output logic              eot,
  output logic [CHNO_W-1:0] eot_channel,
  // status
  output logic              engine_full,   // Engine Register holds a channel
  output logic              engine_ack,    // it is stored into a slot this cycle
  output logic              compare_1,     // Engine Register empties this cycle
  output logic [1:0]        select_1,      // slot occupancy (bit 0: Interface_1)
  output logic              select_2       // active slot (0: Interface_1)
);

  chan_t      engine_data, counter_data, interface_data;
  logic       counter_we, comp_dect;

  transfer_engine u_engine (
    .clk        (clk),
    .rst_n      (rst_n),
    .chan_req   (chan_req),
    .chan_data  (chan_data),
    .chan_ack   (chan_ack),
    .engine_data(engine_data),
    .engine_full(engine_full),
    .ack        (engine_ack),
    .compare_1  (compare_1)
  );

  address_interface u_addr_if (
    .clk           (clk),
    .rst_n         (rst_n),
    .engine_data   (engine_data),
    .engine_full   (engine_full),
    .engine_ack    (engine_ack),
    .counter_data  (counter_data),
    .counter_we    (counter_we),
    .comp_dect     (comp_dect),
    .interface_data(interface_data),
    .select_1      (select_1),
    .select_2      (select_2)
  );

  dma_counter u_counter (
    .interface_data(interface_data),
    .bus_req       (bus_req),
    .bus_src       (bus_src),
    .bus_dst       (bus_dst),
    .bus_ack       (bus_ack),
    .counter_data  (counter_data),
    .counter_we    (counter_we),
    .comp_dect     (comp_dect),
    .eot           (eot),
    .eot_channel   (eot_channel)
  );

  // Bus rule: a pending request keeps its addresses until acknowledged.
  a_bus_stable: assert property (@(posedge clk) disable iff (!rst_n)
      bus_req && !bus_ack |=> bus_req && $stable(bus_src) && $stable(bus_dst));

endmodule
