// dma_counter: the COUNTER, which drives the bus with the active channel.
//
// Interface_Data (the active slot of the Address Interface) is presented on
// the bus port as a source/destination address pair for as long as its COUNT
// is non-zero. When the bus returns ACK for that transfer, the counter forms
// Counter_Data: both addresses plus ADDR_STEP (4, one 32-bit word) and COUNT
// minus 1, CONTROL unchanged, and has it written back into the active slot.
// Completion detection: Comp_Dect = (COUNT == 0) AND DRQ (CONTROL bit 1); it
// tells the Address Interface to switch slots. The step of 4, the count-down
// and the Comp_Dect equation follow the design.
//
// This implementation's choices: the COUNTER itself is combinational; the
// state it updates lives in the Address Interface slots. The bus handshake
// is a level request (bus_req) held with stable addresses until a one-cycle
// bus_ack, sampled at the rising edge; ACK may stay high for back-to-back
// transfers, one per cycle. eot/eot_channel is an end-of-transfer pulse for
// the register bank, raised with the ACK of a channel's last transfer and
// carrying its Channel_No, so that the bank can clear the channel's Enable.
module dma_counter
  import dma_pkg::*;
#(
  parameter int unsigned ADDR_STEP = 4
) (
  input  chan_t              interface_data,
  // bus side
  output logic               bus_req,
  output logic [ADDR_W-1:0]  bus_src,
  output logic [ADDR_W-1:0]  bus_dst,
  input  logic               bus_ack,
  // back to the Address Interface
  output chan_t              counter_data,
  output logic               counter_we,
  output logic               comp_dect,
  // end of transfer, to the register bank
  output logic               eot,
  output logic [CHNO_W-1:0]  eot_channel
);

  logic active;

  count_detect #(.W(COUNT_W)) u_detect (
    .count  (interface_data.count),
    .nonzero(active)
  );

  assign bus_req = active;
  assign bus_src = interface_data.src;
  assign bus_dst = interface_data.dst;

  always_comb begin
    counter_data       = interface_data;
    counter_data.src   = interface_data.src + ADDR_W'(ADDR_STEP);
    counter_data.dst   = interface_data.dst + ADDR_W'(ADDR_STEP);
    counter_data.count = interface_data.count - COUNT_W'(1);
  end

  assign counter_we  = active & bus_ack;
  assign comp_dect   = ~active & interface_data.ctrl.drq;
  assign eot         = counter_we & (interface_data.count == COUNT_W'(1));
  assign eot_channel = interface_data.ctrl.channel_no;

endmodule
