// tb_select2_gen: self-checking test of the SELECT_2 generator.
// Checks reset to 0, a toggle on each cycle with Comp_Dect, hold without it,
// and the return to 0 when SELECT_1 reports both slots empty, first in a
// directed sequence and then against a reference model under random input.
module tb_select2_gen;
  import dma_pkg::*;

  logic       clk = 0, rst_n = 0;
  logic [1:0] sel1 = 2'b00;
  logic       cd = 0;
  logic       sel2;
  logic       model;
  int checks = 0, failures = 0;

  select2_gen dut (.clk(clk), .rst_n(rst_n), .select_1(sel1), .comp_dect(cd), .select_2(sel2));

  always #5 clk = ~clk;

  task automatic step(input logic [1:0] s1, input logic c, input logic exp_after);
    sel1 = s1; cd = c;  // called at a falling edge
    @(negedge clk);
    checks++;
    if (sel2 !== exp_after) begin
      failures++;
      $display("FAIL s1=%b cd=%b sel2=%b exp=%b", s1, c, sel2, exp_after);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    checks++;
    if (sel2 !== 1'b0) begin failures++; $display("FAIL reset value"); end
    // directed: hold, toggle, hold, toggle back, forced return to 0
    sel1 = 2'b01; cd = 0;
    @(negedge clk); checks++; if (sel2 !== 0) failures++;
    @(negedge clk) cd = 1;
    @(negedge clk) cd = 0;
    checks++; if (sel2 !== 1) begin failures++; $display("FAIL first toggle"); end
    @(negedge clk); checks++; if (sel2 !== 1) begin failures++; $display("FAIL hold"); end
    // one more Comp_Dect cycle takes it back
    sel1 = 2'b10; cd = 1;
    @(negedge clk) cd = 0;
    checks++; if (sel2 !== 0) begin failures++; $display("FAIL second toggle"); end
    // toggle to 1 then both empty forces 0, even with Comp_Dect high
    sel1 = 2'b11; cd = 1;
    @(negedge clk);
    checks++; if (sel2 !== 1) begin failures++; $display("FAIL third toggle"); end
    sel1 = 2'b00; cd = 1;
    @(negedge clk);
    checks++; if (sel2 !== 0) begin failures++; $display("FAIL forced zero"); end
    cd = 0;
    // random against a reference model
    model = 0;
    @(negedge clk);
    for (int i = 0; i < 300; i++) begin
      logic [1:0] s; logic c;
      s = 2'($urandom); c = 1'($urandom);
      if (s == 2'b00) model = 0; else if (c) model = ~model;
      step(s, c, model);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
