// tb_ts11_clk_sync: self-checking testbench of the clock synchroniser.
//
// Checks, on a 20 MHz clock (50 ns):
//   * clkout toggles every cycle (10 MHz) and ce10 is its inverse;
//   * an immediate start request gives a start pulse of exactly two cycles
//     (100 ns), with clkout high in the first of them;
//   * a time tick sync request raises ippholdoff, which waits for the next
//     time tick; the start pulse follows the tick's rising edge by two
//     clock edges, is two cycles long, and ippholdoff falls after it;
//   * a tick without a request does nothing.
module tb_ts11_clk_sync;
  int checks = 0, failures = 0;
  logic clk = 0, rst, ttin, ttsr, imst;
  logic clkout, ce10, start, ippholdoff;

  ts11_clk_sync dut (.*);

  always #25 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // count cycles of start and check clkout toggles when not being synced
  int start_len = 0, last_start_len = 0, starts = 0;
  logic prev_clk;
  always @(posedge clk) begin
    #1;
    if (!rst) begin
      check(ce10 == ~clkout, "ce10");
      if (start) start_len++;
      else if (start_len != 0) begin last_start_len = start_len; start_len = 0; starts++; end
    end
  end

  task automatic wait_cycles(input int n);
    repeat (n) @(negedge clk);
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0, n;
    rst = 1; ttin = 0; ttsr = 0; imst = 0;
    wait_cycles(2); rst = 0;
    // free running divide by two
    for (int i = 0; i < 10; i++) begin
      prev_clk = clkout; @(negedge clk);
      check(clkout == ~prev_clk, "clkout toggles");
    end
    check(!start && !ippholdoff, "quiet after reset");
    // immediate start, 100 ns request
    imst = 1; wait_cycles(2); imst = 0;
    wait_cycles(6);
    check(starts == 1 && last_start_len == 2, "immediate start: one 100 ns pulse");
    // tick without request
    ttin = 1; wait_cycles(4); ttin = 0; wait_cycles(4);
    check(starts == 1, "tick without sync request ignored");
    // time tick sync request
    ttsr = 1; wait_cycles(2); ttsr = 0;
    wait_cycles(1);
    check(ippholdoff, "holdoff raised by sync request");
    wait_cycles(10);
    check(ippholdoff && starts == 1, "holdoff waits for the tick");
    // tick: start expected at the second rising edge after the tick is applied
    ttin = 1;
    n = 0;
    while (!start && n < 10) begin @(posedge clk); #1; n++; end
    check(n == 2, $sformatf("start two edges after tick, got %0d", n));
    check(clkout == 1'b1, "clkout forced high at sync");
    wait_cycles(6); ttin = 0;
    check(starts == 2 && last_start_len == 2, "tick start: one 100 ns pulse");
    check(!ippholdoff, "holdoff cleared by start");
    // clock keeps running
    for (int i = 0; i < 6; i++) begin
      prev_clk = clkout; @(negedge clk);
      check(clkout == ~prev_clk, "clkout toggles after sync");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
