// tb_transfer_engine: self-checking test of the Transfer Engine.
// Checks reset to empty, capture of an enabled channel, the wait of a second
// request while full, COMPARE_1 emptying the register on ACK, the refusal to
// capture in that same cycle, and the dropping of disabled, DRQ-less or
// zero-count channels; then runs random traffic against a one-entry model.
module tb_transfer_engine;
  import dma_pkg::*;

  logic  clk = 0, rst_n = 0;
  logic  req = 0, ack = 0;
  chan_t cin = '0;
  logic  cack, full, cmp1;
  chan_t eout;
  int checks = 0, failures = 0;

  transfer_engine dut (
    .clk(clk), .rst_n(rst_n), .chan_req(req), .chan_data(cin), .chan_ack(cack),
    .engine_data(eout), .engine_full(full), .ack(ack), .compare_1(cmp1)
  );

  always #5 clk = ~clk;

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic chan_t mk(input logic [31:0] cnt, input logic [3:0] ctrl);
    chan_t c;
    c.src = $urandom; c.dst = $urandom; c.count = cnt; c.ctrl = ctrl;
    return c;
  endfunction

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    chan_t a, b, held;
    logic  m_full;
    repeat (2) @(negedge clk);
    rst_n = 1;
    check("empty after reset", !full && eout == '0);
    // capture a
    a = mk(5, 4'b0111);
    req = 1; cin = a;
    #1 check("ack while empty", cack);
    @(negedge clk);
    check("captured a", full && eout == a);
    // second request waits while full
    b = mk(3, 4'b1011);
    cin = b;
    #1 check("no ack while full", !cack && !cmp1);
    @(negedge clk);
    check("a kept", eout == a);
    // ACK from the interface: COMPARE_1 empties the register, b not captured
    ack = 1;
    #1 check("COMPARE_1 high", cmp1 && !cack);
    @(negedge clk);
    ack = 0;
    check("emptied by COMPARE_1", !full && eout == '0);
    #1 check("b acknowledged now", cack);
    @(negedge clk);
    check("captured b", full && eout == b);
    ack = 1; req = 0;
    @(negedge clk);
    ack = 0;
    check("emptied again", !full);
    // channels that must be dropped
    cin = mk(4, 4'b0110); req = 1;   // Enable = 0
    #1 check("disabled acked", cack);
    @(negedge clk) check("disabled dropped", !full);
    cin = mk(4, 4'b0101);            // DRQ = 0
    @(negedge clk) check("no-DRQ dropped", !full);
    cin = mk(0, 4'b0111);            // COUNT = 0
    @(negedge clk) check("zero count dropped", !full);
    req = 0;
    // random traffic against a model
    m_full = 0; held = '0;
    for (int i = 0; i < 500; i++) begin
      logic r, k, okc;
      chan_t c;
      @(negedge clk);
      check("random full", full == m_full);
      if (m_full) check("random data", eout == held);
      r = 1'($urandom);
      k = m_full & 1'($urandom);
      c = mk(($urandom_range(0, 4) == 0) ? 0 : $urandom_range(1, 9), 4'($urandom));
      req = r; ack = k; cin = c;
      #1;
      check("random chan_ack", cack == (r && !m_full));
      check("random compare_1", cmp1 == (m_full && k));
      okc = r && !m_full && c.ctrl.enable && c.ctrl.drq && c.count != 0;
      if (m_full && k) begin m_full = 0; held = '0; end
      else if (okc)     begin m_full = 1; held = c; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
