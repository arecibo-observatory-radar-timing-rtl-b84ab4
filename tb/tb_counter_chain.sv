// tb_counter_chain: self-checking testbench of the down-counter chain.
//
// The look-ahead enables are computed here from the count (counter k counts
// when all lower counters are zero), as the timer decoders do. Checks:
//   * the count against an integer model (load or preload -> preset, else
//     minus one when enabled), over random enables, loads and presets,
//     including borrows across every 4-bit boundary (e.g. 0x10000000 -> 0x0FFFFFFF);
//   * the zero flags of the upper counters;
//   * ql is load one count clock later;
//   * with load = "count is 1", ql repeats every preset counts (periods 5,
//     17 and 300), counting only clocks where ce is high.
module tb_counter_chain;
  int checks = 0, failures = 0;
  logic clk = 0, ce, rst, cnt_en, load, preload, ql;
  logic [31:0] preset, count, m_count;
  logic [7:1] min;
  logic [7:2] e;
  logic m_ql;
  logic self_load;  // load = count is 1

  counter_chain dut (.*);

  always #25 clk = ~clk;

  always_comb for (int k = 2; k < 8; k++) e[k] = ((64'(count) % (64'd1 << (4*k))) == 0);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s count=%h model=%h at %0t", what, count, m_count, $time); end
  endtask

  always @(posedge clk) if (!rst && ce) begin
    m_ql <= load;
    if (load || preload) m_count <= preset;
    else if (cnt_en)     m_count <= m_count - 1;
  end


  task automatic cyc();
    @(posedge clk); #1;
    check(count == m_count, "count");
    check(ql == m_ql, "ql");
    for (int k = 1; k < 8; k++) check(min[k] == (count[4*k +: 4] == 0), "min");
    @(negedge clk);
  endtask

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic load_drv;
  assign load = self_load ? (count == 32'd1) : load_drv;

  // measure the period of ql with the chain reloading itself
  task automatic period_test(input logic [31:0] p);
    int n, first, second;
    self_load = 1; preload = 0; cnt_en = 1; preset = p;
    // force a start by a preload
    preload = 1; cyc(); preload = 0;
    n = 0; first = -1; second = -1;
    while (second < 0 && n < 4 * int'(p) + 20) begin
      ce = ($urandom_range(4) != 0);
      @(posedge clk); #1;
      if (ce) n++;
      if (ce && ql) begin if (first < 0) first = n; else second = n; end
      @(negedge clk);
    end
    ce = 1;
    check(second - first == int'(p), $sformatf("period %0d, got %0d", p, second - first));
    self_load = 0;
  endtask

  initial begin
    self_load = 0; load_drv = 0; preload = 0; cnt_en = 0; preset = '0;
    rst = 1; ce = 1; m_count = '0; m_ql = 0;
    @(negedge clk); rst = 0;
    // borrows across every boundary
    for (int k = 1; k < 8; k++) begin
      preset = 32'd1 << (4*k); preload = 1; cyc(); preload = 0;
      cnt_en = 1; cyc(); cyc();
      check(count == (32'd1 << (4*k)) - 2, "borrow");
    end
    preset = 32'd0; preload = 1; cyc(); preload = 0; cyc();
    check(count == 32'hFFFF_FFFF, "wrap from zero");
    // random
    for (int i = 0; i < 20000; i++) begin
      ce = ($urandom_range(3) != 0);
      cnt_en = ($urandom_range(7) != 0);
      load_drv = ($urandom_range(63) == 0);
      preload = ($urandom_range(127) == 0);
      if ($urandom_range(63) == 0) begin
        preset = $urandom;
        for (int k = 0; k < 8; k++) if ($urandom_range(1) == 0) preset[4*k +: 4] = 0;
      end
      cyc();
    end
    load_drv = 0; ce = 1;
    period_test(32'd5);
    period_test(32'd17);
    period_test(32'd300);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
