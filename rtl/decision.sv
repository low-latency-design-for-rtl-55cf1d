// decision: DECISION block of the Address Interface.
//
// Two demultiplexers and two multiplexers route the two data sources into
// the two slots. DEMUX_1 steers Counter_Data (the updated active channel)
// to the slot named by SELECT_2. DEMUX_2 steers Engine_Data (a new channel
// from the Transfer Engine) by SELECT_1: 00 or 10 to Interface_1, 01 to
// Interface_2, 11 nowhere. MUX_1 and MUX_2 pick, per slot, the source that
// targets it. Counter_Data and Engine_Data never target the same slot in the
// same cycle; the clash output flags a violation of that rule. The routing follows the design.
//
// This implementation's choice: each source comes with a write strobe
// (counter_we, engine_we), and the block produces a write enable per slot.
// Purely combinational.
module decision
  import dma_pkg::*;
(
  input  chan_t      counter_data,
  input  logic       counter_we,
  input  chan_t      engine_data,
  input  logic       engine_we,
  input  logic [1:0] select_1,
  input  logic       select_2,
  output chan_t      if1_data,
  output logic       if1_we,
  output chan_t      if2_data,
  output logic       if2_we,
  output logic       clash
);
  logic cnt_to_if1, cnt_to_if2;  // DEMUX_1 outputs
  logic eng_to_if1, eng_to_if2;  // DEMUX_2 outputs

  always_comb begin
    cnt_to_if1 = counter_we & ~select_2;
    cnt_to_if2 = counter_we &  select_2;
    eng_to_if1 = 1'b0;
    eng_to_if2 = 1'b0;
    unique case (select_1)
      SEL1_BOTH_EMPTY,
      SEL1_IF2_FULL:  eng_to_if1 = engine_we;
      SEL1_IF1_FULL:  eng_to_if2 = engine_we;
      default:        ;  // SEL1_BOTH_FULL: Engine_Data cannot be stored
    endcase
  end

  // MUX_1 / MUX_2
  assign if1_data = cnt_to_if1 ? counter_data : engine_data;
  assign if2_data = cnt_to_if2 ? counter_data : engine_data;
  assign if1_we   = cnt_to_if1 | eng_to_if1;
  assign if2_we   = cnt_to_if2 | eng_to_if2;

  // Set when both sources target the same slot; the enclosing Address
  // Interface asserts that this never happens at a clock edge.
  assign clash = (cnt_to_if1 & eng_to_if1) | (cnt_to_if2 & eng_to_if2);

endmodule
