// select2_gen: SELECT_2 generator of the Address Interface.
//
// SELECT_2 names the slot (0 = Interface_1, 1 = Interface_2) whose channel is
// shown to the Counter and which receives the Counter_Data write-back. It
// starts at 0 and changes slot each time the Counter raises Comp_Dect, i.e.
// each time the active channel has finished; the Counter then sees the other
// slot's channel, which was loaded in the background. Reading SELECT_1 and
// Comp_Dect and toggling on Comp_Dect follow the design.
//
// This implementation's choices: SELECT_2 is a flip-flop on the rising edge
// of clk (synchronous active-low reset to 0). It toggles in every cycle in
// which Comp_Dect is 1. When SELECT_1 reports both slots empty (00) it is
// returned to 0, because the next channel will be stored into Interface_1;
// this rule is what keeps the pointer from resting on an empty slot while the
// other slot holds work.
module select2_gen
  import dma_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [1:0] select_1,
  input  logic       comp_dect,
  output logic       select_2
);
  always_ff @(posedge clk) begin
    if (!rst_n)                           select_2 <= 1'b0;
    else if (select_1 == SEL1_BOTH_EMPTY) select_2 <= 1'b0;
    else if (comp_dect)                   select_2 <= ~select_2;
  end
endmodule
