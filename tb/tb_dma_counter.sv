// tb_dma_counter: self-checking test of the COUNTER.
// Presents directed and random channels as Interface_Data with ACK high and
// low, and checks the bus request and addresses, the updated Counter_Data
// (addresses + 4, count - 1, CONTROL kept), its write strobe, Comp_Dect
// ((count == 0) and DRQ) and the end-of-transfer pulse, all against values
// computed here. Then walks one channel of COUNT 5 down to zero, feeding
// Counter_Data back as the slot register would, and checks that exactly five
// transfers with consecutive word addresses are issued.
module tb_dma_counter;
  import dma_pkg::*;

  chan_t             idata, cdata;
  logic              bus_ack, bus_req, cwe, cd, eot;
  logic [ADDR_W-1:0] bsrc, bdst;
  logic [CHNO_W-1:0] eot_ch;
  int checks = 0, failures = 0;

  dma_counter dut (
    .interface_data(idata), .bus_req(bus_req), .bus_src(bsrc), .bus_dst(bdst),
    .bus_ack(bus_ack), .counter_data(cdata), .counter_we(cwe), .comp_dect(cd),
    .eot(eot), .eot_channel(eot_ch)
  );

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s src=%h dst=%h count=%0d ctrl=%b ack=%b",
               what, idata.src, idata.dst, idata.count, idata.ctrl, bus_ack);
    end
  endtask

  task automatic apply(input chan_t c, input logic a);
    logic act;
    idata = c; bus_ack = a;
    #1;
    act = (c.count != 0);
    check("bus_req", bus_req == act);
    check("bus_src", bsrc == c.src);
    check("bus_dst", bdst == c.dst);
    check("counter_we", cwe == (act && a));
    check("comp_dect", cd == (!act && c.ctrl.drq));
    check("eot", eot == (a && c.count == 1));
    check("eot_channel", eot_ch == c.ctrl.channel_no);
    if (act) begin
      check("next src",   cdata.src   == c.src + 32'd4);
      check("next dst",   cdata.dst   == c.dst + 32'd4);
      check("next count", cdata.count == c.count - 32'd1);
      check("ctrl kept",  cdata.ctrl  == c.ctrl);
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
    chan_t c;
    int n;
    // directed corner cases
    c = '{src: 32'h1000, dst: 32'h2000, count: 32'd1, ctrl: 4'b0111};
    apply(c, 1); apply(c, 0);
    c.count = 0; apply(c, 0); apply(c, 1);
    c.ctrl.drq = 0; apply(c, 0);
    c = '{src: 32'hFFFF_FFFC, dst: 32'hFFFF_FFFC, count: 32'hFFFF_FFFF, ctrl: 4'b1111};
    apply(c, 1);
    // random
    for (int i = 0; i < 300; i++) begin
      c.src = $urandom; c.dst = $urandom;
      c.count = ($urandom_range(0, 3) == 0) ? 32'($urandom_range(0, 2)) : $urandom;
      c.ctrl = 4'($urandom);
      apply(c, 1'($urandom));
    end
    // one channel of COUNT 5, fed back
    c = '{src: 32'h0000_0100, dst: 32'h0000_8000, count: 32'd5, ctrl: 4'b0110};
    n = 0;
    idata = c; bus_ack = 1;
    #1;
    while (bus_req && n < 20) begin
      check("walk src", bsrc == 32'h100 + 32'(4 * n));
      check("walk dst", bdst == 32'h8000 + 32'(4 * n));
      check("walk eot", eot == (n == 4));
      n++;
      idata = cdata;
      #1;
    end
    check("walk transfers == 5", n == 5);
    check("walk ends in Comp_Dect", cd == 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
