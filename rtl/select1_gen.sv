// select1_gen: SELECT_1 generator of the Address Interface.
//
// Two Detection cells look at the COUNT fields of Interface_1 and
// Interface_2. SELECT_1[0] is 1 while Interface_1 holds a channel with
// transfers left, SELECT_1[1] likewise for Interface_2. The DECISION reads the
// code as: 00 or 10, store Engine_Data into Interface_1; 01, store it into
// Interface_2; 11, both slots busy, Engine_Data cannot be stored. The bit
// assignment follows the design; the Detection cell being a non-zero test is
// this implementation's choice. Purely combinational.
module select1_gen
  import dma_pkg::*;
(
  input  logic [COUNT_W-1:0] if1_count,
  input  logic [COUNT_W-1:0] if2_count,
  output logic [1:0]         select_1
);
  count_detect #(.W(COUNT_W)) u_det1 (.count(if1_count), .nonzero(select_1[0]));
  count_detect #(.W(COUNT_W)) u_det2 (.count(if2_count), .nonzero(select_1[1]));
endmodule
