// tb_ts6_gw_logic: self-checking testbench of the GW pulse logic.
//
// A 20 MHz clock carries a 10 MHz rx clock made in the testbench, with ce
// high in the cycle before each rx clock rising edge. q1 pulses at random;
// the testbench checks that en is q1 sampled at the previous rx clock edge,
// that gw follows the rx clock high phase while en is set, and that with
// blanking selected the non-gated cal suppresses it. It also counts GW pulses
// for a q1 pattern of period 4 (one GW pulse per 4 rx clocks).
module tb_ts6_gw_logic;
  int checks = 0, failures = 0;
  logic clk = 0, rst, rxclk, ce;
  logic q1, selgwblank, ngcal, en, gw_gate, gw;
  logic m_en;

  ts6_gw_logic dut (.*);

  always #25 clk = ~clk;
  // rx clock: divide by two; ce when rxclk will rise
  always @(posedge clk) rxclk <= rst ? 1'b0 : ~rxclk;
  assign ce = ~rxclk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  always @(posedge clk) if (!rst && ce) m_en <= q1;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int pulses;
    rst = 1; q1 = 0; selgwblank = 0; ngcal = 0; m_en = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      if (rxclk == 1'b0) q1 = ($urandom_range(2) == 0);
      selgwblank = $urandom_range(1);
      ngcal = $urandom_range(1);
      #1;
      check(en == m_en, "en");
      check(gw == (m_en & rxclk & (!selgwblank || !ngcal)), "gw");
      check(gw_gate == (m_en & (!selgwblank || !ngcal)), "gw_gate");
    end
    // count GW rising edges: q1 every 4th rx clock, 40 rx clocks
    selgwblank = 0; ngcal = 0; pulses = 0;
    for (int i = 0; i < 80; i++) begin
      @(negedge clk);
      if (rxclk == 1'b0) q1 = ((i / 2) % 4 == 0);
      if (gw) pulses++;
    end
    check(pulses == 10, $sformatf("10 GW pulses in 40 rx clocks, got %0d", pulses));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
