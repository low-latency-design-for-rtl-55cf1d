// tb_async_dma_top: end-to-end test of the DMA address engine at its
// default sizes (32-bit addresses and counts, address step 4).
//
// A register-bank model offers channels one after another on
// chan_req/chan_data; a bus model acknowledges transfers. The testbench
// predicts, independently of the design, the (source, destination) pair of
// every transfer and the end-of-transfer pulses, and checks them in order.
//
// Phase 1 runs the three channel lengths of the latency comparison (COUNT 5,
// 10 and 15), eight channels each, with the bus acknowledging every cycle,
// and checks the cycle counts: a channel of COUNT n takes n consecutive bus
// cycles, and the next, already loaded channel starts after exactly one idle
// cycle, so eight channels take 8n + 7 cycles from first to last transfer.
// Phase 2 runs random lengths, random bus waits and some channels that must
// be dropped (Enable or DRQ clear).
//
// Mechanisms counted (each must occur at least once): engine stalled by two
// full slots, both slots full, slot switch by SELECT_2, SELECT_2 returned to
// 0 on two empty slots, COMPARE_1 emptying the Engine Register, bus wait,
// dropped channel request, end-of-transfer pulse.
module tb_async_dma_top;
  import dma_pkg::*;

  logic              clk = 0, rst_n = 0;
  logic              chan_req = 0, chan_ack;
  chan_t             chan_data = '0;
  logic              bus_req, bus_ack = 0;
  logic [ADDR_W-1:0] bus_src, bus_dst;
  logic              eot;
  logic [CHNO_W-1:0] eot_channel;
  logic              eng_full, eng_ack, cmp1, sel2;
  logic [1:0]        sel1;

  async_dma_top dut (
    .clk(clk), .rst_n(rst_n),
    .chan_req(chan_req), .chan_data(chan_data), .chan_ack(chan_ack),
    .bus_req(bus_req), .bus_src(bus_src), .bus_dst(bus_dst), .bus_ack(bus_ack),
    .eot(eot), .eot_channel(eot_channel),
    .engine_full(eng_full), .engine_ack(eng_ack), .compare_1(cmp1),
    .select_1(sel1), .select_2(sel2)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // ---------------------------------------------------------------------
  // Expected transfers and end-of-transfer pulses, in order.
  typedef struct { logic [31:0] src, dst; logic last; logic [1:0] ch; } xfer_t;
  xfer_t exp_q[$];

  // Register-bank model: channels waiting to be offered.
  chan_t offer_q[$];
  logic  bus_random = 0;

  // Mechanism counters
  int n_stall = 0, n_both_full = 0, n_switch = 0, n_force0 = 0, n_cmp1 = 0,
      n_bus_wait = 0, n_drop = 0, n_eot = 0, n_xfer = 0;
  int cycle = 0, first_xfer_cycle = -1, last_xfer_cycle = -1;
  int last_ch_end = -1, gap_checks = 0;
  logic prev_sel2 = 0;

  function automatic logic will_run(input chan_t c);
    return c.ctrl.enable && c.ctrl.drq && c.count != 0;
  endfunction

  task automatic add_channel(input chan_t c);
    offer_q.push_back(c);
    if (will_run(c))
      for (int unsigned i = 0; i < c.count; i++) begin
        xfer_t x;
        x.src = c.src + 32'(4 * i);
        x.dst = c.dst + 32'(4 * i);
        x.last = (i == c.count - 1);
        x.ch = c.ctrl.channel_no;
        exp_q.push_back(x);
      end
  endtask

  // Drive the register-bank side and the bus at the falling edge.
  always @(negedge clk) if (rst_n) begin
    if (offer_q.size() > 0) begin
      chan_req  <= 1;
      chan_data <= offer_q[0];
    end else begin
      chan_req  <= 0;
    end
    bus_ack <= bus_random ? ($urandom_range(0, 2) != 0) : 1'b1;
  end

  // Observe at the rising edge (values as sampled by the design).
  always @(posedge clk) if (rst_n) begin
    cycle <= cycle + 1;
    if (chan_req && chan_ack) begin
      if (!will_run(chan_data)) n_drop++;
      void'(offer_q.pop_front());
    end
    if (bus_req && !bus_ack) n_bus_wait++;
    if (bus_req && bus_ack) begin
      n_xfer++;
      if (first_xfer_cycle < 0) first_xfer_cycle = cycle;
      last_xfer_cycle = cycle;
      if (exp_q.size() == 0) check("unexpected transfer", 0);
      else begin
        xfer_t x;
        x = exp_q.pop_front();
        check("transfer source address", bus_src == x.src);
        check("transfer destination address", bus_dst == x.dst);
        check("end-of-transfer pulse", eot == x.last);
        if (x.last) check("end-of-transfer channel", eot_channel == x.ch);
      end
    end else check("no stray end-of-transfer", !eot);
    if (eot) n_eot++;
    if (eng_full && !eng_ack) n_stall++;
    if (sel1 == 2'b11) n_both_full++;
    if (cmp1) n_cmp1++;
    if (sel1 == 2'b00 && sel2) n_force0++;
    if (sel2 != prev_sel2) n_switch++;
    prev_sel2 <= sel2;
  end

  task automatic wait_drained(input int limit);
    int n = 0;
    while ((exp_q.size() > 0 || offer_q.size() > 0) && n < limit) begin
      @(posedge clk);
      n++;
    end
    repeat (4) @(posedge clk);
  endtask

  function automatic chan_t mk(input logic [31:0] cnt, input logic [1:0] ch);
    chan_t c;
    c.src = 32'h1000_0000 + ($urandom & 32'h00FF_FFF0);
    c.dst = 32'h2000_0000 + ($urandom & 32'h00FF_FFF0);
    c.count = cnt;
    c.ctrl = '{channel_no: ch, drq: 1'b1, enable: 1'b1};
    return c;
  endfunction

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;

    // Phase 1: COUNT 5, 10, 15; eight channels each; bus always ready.
    for (int k = 0; k < 3; k++) begin
      int unsigned n;
      int xfer_before;
      n = (k == 0) ? 5 : (k == 1) ? 10 : 15;
      first_xfer_cycle = -1;
      xfer_before = n_xfer;
      for (int c = 0; c < 8; c++) add_channel(mk(n, 2'(c)));
      wait_drained(2000);
      check($sformatf("COUNT %0d: all transfers done", n), n_xfer - xfer_before == 8 * n);
      check($sformatf("COUNT %0d: %0d cycles first to last transfer", n, 8 * n + 7),
            last_xfer_cycle - first_xfer_cycle + 1 == int'(8 * n + 7));
      $display("COUNT %0d: 8 channels, %0d cycles from first to last transfer",
               n, last_xfer_cycle - first_xfer_cycle + 1);
    end

    // Phase 2: random lengths, random bus waits, dropped channels.
    bus_random = 1;
    for (int c = 0; c < 200; c++) begin
      chan_t ch;
      ch = mk($urandom_range(1, 6), 2'($urandom));
      case ($urandom_range(0, 9))
        0: ch.ctrl.enable = 0;
        1: ch.ctrl.drq = 0;
        default: ;
      endcase
      add_channel(ch);
      if ($urandom_range(0, 19) == 0) wait_drained(5000);  // let both slots empty
    end
    wait_drained(20000);
    check("all expected transfers seen", exp_q.size() == 0);

    $display("stall=%0d both_full=%0d switch=%0d force0=%0d compare_1=%0d bus_wait=%0d drop=%0d eot=%0d xfer=%0d",
             n_stall, n_both_full, n_switch, n_force0, n_cmp1, n_bus_wait, n_drop, n_eot, n_xfer);
    check("engine stall happened", n_stall > 0);
    check("both slots full happened", n_both_full > 0);
    check("slot switch happened", n_switch > 0);
    check("SELECT_2 return to 0 happened", n_force0 > 0);
    check("COMPARE_1 clear happened", n_cmp1 > 0);
    check("bus wait happened", n_bus_wait > 0);
    check("dropped request happened", n_drop > 0);
    check("end-of-transfer happened", n_eot > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
