// address_interface: the two-slot Address Interface.
//
// This is the block that removes the gap between channels. It holds up to
// two channels, one in Interface_1 and one in Interface_2. The slot named by
// SELECT_2 is the active one: the output MUX shows it to the Counter as
// Interface_Data, and the Counter's updated values (Counter_Data) are written
// back into it after every transfer. The other slot is filled from the
// Transfer Engine in the background, so that when the active channel
// finishes (Comp_Dect) SELECT_2 flips and the next channel is ready at once.
// The DECISION routes both writes, SELECT_1 reports which slots are occupied
// (non-zero COUNT), and SELECT_2 tracks the active slot. The structure and
// the SELECT codes follow the design.
//
// This implementation's choices: both slots are clocked registers (rising
// edge, synchronous active-low reset to all zero). Engine_Data is stored
// whenever the engine holds a channel and SELECT_1 is not 11; engine_ack
// tells the Transfer Engine so in the same cycle (it is that block's ACK).
// A finished channel stays in its slot with COUNT = 0 until it is
// overwritten; the zero COUNT already marks the slot free.
//
// Timing: engine_ack and counter_we take effect at the next rising edge;
// interface_data changes one cycle after a write or a SELECT_2 change.
module address_interface
  import dma_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  // from the Transfer Engine
  input  chan_t      engine_data,
  input  logic       engine_full,
  output logic       engine_ack,
  // from / to the Counter
  input  chan_t      counter_data,
  input  logic       counter_we,
  input  logic       comp_dect,
  output chan_t      interface_data,
  // observation
  output logic [1:0] select_1,
  output logic       select_2
);

  chan_t if1_q, if2_q;     // Interface_1, Interface_2
  chan_t if1_d, if2_d;
  logic  if1_we, if2_we;
  logic  clash;

  select1_gen u_sel1 (
    .if1_count(if1_q.count),
    .if2_count(if2_q.count),
    .select_1 (select_1)
  );

  select2_gen u_sel2 (
    .clk      (clk),
    .rst_n    (rst_n),
    .select_1 (select_1),
    .comp_dect(comp_dect),
    .select_2 (select_2)
  );

  assign engine_ack = engine_full & (select_1 != SEL1_BOTH_FULL);

  decision u_decision (
    .counter_data(counter_data),
    .counter_we  (counter_we),
    .engine_data (engine_data),
    .engine_we   (engine_ack),
    .select_1    (select_1),
    .select_2    (select_2),
    .if1_data    (if1_d),
    .if1_we      (if1_we),
    .if2_data    (if2_d),
    .if2_we      (if2_we),
    .clash       (clash)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      if1_q <= CHAN_EMPTY;
      if2_q <= CHAN_EMPTY;
    end else begin
      if (if1_we) if1_q <= if1_d;
      if (if2_we) if2_q <= if2_d;
    end
  end

  // Output MUX, controlled by SELECT_2.
  assign interface_data = select_2 ? if2_q : if1_q;

  a_no_clash: assert property (@(posedge clk) disable iff (!rst_n) !clash);

endmodule
