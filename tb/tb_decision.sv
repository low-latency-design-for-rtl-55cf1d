// tb_decision: self-checking test of the DECISION router.
// Walks every combination of SELECT_1, SELECT_2 and the two write strobes
// with random channel data and checks, against the routing rule written out
// here, which slot each source reaches, the data each slot is offered and
// the clash flag.
module tb_decision;
  import dma_pkg::*;

  chan_t      cnt_d, eng_d, if1_d, if2_d;
  logic       cnt_we, eng_we, if1_we, if2_we, clash;
  logic [1:0] sel1;
  logic       sel2;
  int checks = 0, failures = 0;

  decision dut (
    .counter_data(cnt_d), .counter_we(cnt_we),
    .engine_data (eng_d), .engine_we (eng_we),
    .select_1(sel1), .select_2(sel2),
    .if1_data(if1_d), .if1_we(if1_we),
    .if2_data(if2_d), .if2_we(if2_we),
    .clash(clash)
  );

  function automatic chan_t rand_chan();
    chan_t c;
    c.src = $urandom; c.dst = $urandom; c.count = $urandom;
    c.ctrl = 4'($urandom);
    return c;
  endfunction

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s sel1=%b sel2=%b cwe=%b ewe=%b", what, sel1, sel2, cnt_we, eng_we);
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
    for (int rep = 0; rep < 4; rep++)
      for (int v = 0; v < 32; v++) begin
        logic e_c1, e_c2, e_e1, e_e2;
        {sel1, sel2, cnt_we, eng_we} = 5'(v);
        cnt_d = rand_chan();
        eng_d = rand_chan();
        #1;
        // reference routing
        e_c1 = cnt_we && !sel2;
        e_c2 = cnt_we &&  sel2;
        e_e1 = eng_we && (sel1 == 2'b00 || sel1 == 2'b10);
        e_e2 = eng_we && (sel1 == 2'b01);
        check("if1_we", if1_we == (e_c1 || e_e1));
        check("if2_we", if2_we == (e_c2 || e_e2));
        check("clash",  clash == ((e_c1 && e_e1) || (e_c2 && e_e2)));
        if (e_c1)      check("if1 counter data", if1_d == cnt_d);
        else if (e_e1) check("if1 engine data",  if1_d == eng_d);
        if (e_c2)      check("if2 counter data", if2_d == cnt_d);
        else if (e_e2) check("if2 engine data",  if2_d == eng_d);
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
