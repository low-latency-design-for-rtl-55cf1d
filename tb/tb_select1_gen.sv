// tb_select1_gen: self-checking test of the SELECT_1 generator.
// Drives both slot counts with zero, one, large and random values and checks
// each SELECT_1 bit against "count is non-zero" computed here.
module tb_select1_gen;
  import dma_pkg::*;

  logic [COUNT_W-1:0] c1, c2;
  logic [1:0]         sel;
  int checks = 0, failures = 0;

  select1_gen dut (.if1_count(c1), .if2_count(c2), .select_1(sel));

  task automatic apply(input logic [COUNT_W-1:0] a, input logic [COUNT_W-1:0] b);
    logic [1:0] exp;
    c1 = a; c2 = b;
    #1;
    exp[0] = (a != 0);
    exp[1] = (b != 0);
    checks++;
    if (sel !== exp) begin
      failures++;
      $display("FAIL c1=%0d c2=%0d sel=%b exp=%b", a, b, sel, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apply(0, 0); apply(1, 0); apply(0, 1); apply(5, 7);
    apply(32'h8000_0000, 0); apply(0, 32'h8000_0000);
    apply(32'hFFFF_FFFF, 32'h1);
    for (int i = 0; i < 200; i++)
      apply(($urandom_range(0, 3) == 0) ? 0 : $urandom,
            ($urandom_range(0, 3) == 0) ? 0 : $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
