// tb_address_interface: self-checking test of the two-slot Address Interface.
// The testbench plays both neighbours: a Transfer Engine that offers random
// channels (COUNT 1..6) and a Counter that, on a random bus ACK, writes back
// the active channel with addresses + 4 and COUNT - 1 and raises Comp_Dect
// when COUNT is 0 with DRQ set. A FIFO model of the held channels checks that
//  * Engine_Data is accepted exactly when fewer than two channels are held,
//  * Interface_Data always shows the oldest unfinished channel, with its
//    updated addresses and count,
//  * after a channel finishes, an already held successor is shown after
//    exactly one idle cycle,
//  * every accepted channel is served to the end, in order.
module tb_address_interface;
  import dma_pkg::*;

  logic       clk = 0, rst_n = 0;
  chan_t      eng_d = '0, cnt_d, idata;
  logic       eng_full = 0, eng_ack, cnt_we, cd;
  logic [1:0] sel1;
  logic       sel2;
  logic       bus_ack = 0;
  int checks = 0, failures = 0;

  address_interface dut (
    .clk(clk), .rst_n(rst_n),
    .engine_data(eng_d), .engine_full(eng_full), .engine_ack(eng_ack),
    .counter_data(cnt_d), .counter_we(cnt_we), .comp_dect(cd),
    .interface_data(idata), .select_1(sel1), .select_2(sel2)
  );

  // Counter stand-in
  always_comb begin
    cnt_d       = idata;
    cnt_d.src   = idata.src + 32'd4;
    cnt_d.dst   = idata.dst + 32'd4;
    cnt_d.count = idata.count - 32'd1;
  end
  assign cnt_we = (idata.count != 0) && bus_ack;
  assign cd     = (idata.count == 0) && idata.ctrl.drq;

  always #5 clk = ~clk;

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  chan_t q[$];
  int    offered = 0, finished = 0, idle_run = 0, switches = 0, stalls = 0;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      logic exp_ack, s_cnt_we, s_eng_ack;
      // inputs for this cycle (set at the falling edge)
      if (!eng_full && offered < 400 && $urandom_range(0, 2) != 0) begin
        eng_d.src   = $urandom & ~32'h3;
        eng_d.dst   = $urandom & ~32'h3;
        eng_d.count = 32'($urandom_range(1, 6));
        eng_d.ctrl  = {2'($urandom), 2'b11};
        eng_full    = 1;
        offered++;
      end
      bus_ack = ($urandom_range(0, 3) != 0);
      #1;
      // checks on the settled outputs
      exp_ack = eng_full && (q.size() < 2);
      check("engine_ack", eng_ack == exp_ack);
      if (eng_full && !exp_ack) stalls++;
      if (idata.count != 0) begin
        check("shows oldest channel", q.size() > 0 && idata == q[0]);
        if (idle_run > 0) switches++;
        idle_run = 0;
      end else if (q.size() > 0) begin
        idle_run++;
        check("at most one idle cycle before the next channel", idle_run <= 1);
      end
      // model update with the values sampled ahead of the rising edge
      s_cnt_we  = cnt_we;
      s_eng_ack = eng_ack;
      @(posedge clk);
      #1;
      if (s_cnt_we && q.size() > 0) begin
        q[0].src   += 32'd4;
        q[0].dst   += 32'd4;
        q[0].count -= 32'd1;
        if (q[0].count == 0) begin
          void'(q.pop_front());
          finished++;
        end
      end
      if (s_eng_ack) begin
        q.push_back(eng_d);
        eng_full = 0;
      end
      @(negedge clk);
    end
    check("all offered channels finished", finished == offered && q.size() == 0);
    check("slot switch with a waiting channel happened", switches > 10);
    check("engine stalled on two full slots", stalls > 10);
    $display("offered=%0d finished=%0d switches=%0d stalls=%0d", offered, finished, switches, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
