// tb_ts4_gd_logic: self-checking testbench of the gate delay control.
//
// Random inputs are applied on falling clock edges; a reference model kept
// in this testbench, written from the sum-of-products equations, predicts the
// registers on each enabled rising edge. A directed sequence then checks the
// gate delay behaviour: after an IPP in radar mode the RDIPP trigger stays
// low until qlgd and rises one count clock after it; in continuous mode an
// IPP does not start a gate delay.
module tb_ts4_gd_logic;
  int checks = 0, failures = 0;
  logic clk = 0, ce, rst;
  logic qltxipp, qlrxipp, selfixclk, rxstart, ippholdoff, selrdmode, qlgd;
  logic lden, rxipp, rdipptgr;
  logic m_q, m_rxipp;  // model: trigger flip-flop Q and rxipp

  ts4_gd_logic dut (.*);

  always #25 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic logic sop_ipp();
    return (qltxipp & selrdmode & selfixclk) | (qlrxipp & selrdmode & ~selfixclk);
  endfunction

  always @(posedge clk) if (!rst && ce) begin
    m_q     <= sop_ipp() | rxstart | ippholdoff | (~qlgd & m_q);
    m_rxipp <= sop_ipp() | rxstart;
  end

  task automatic step_check();
    @(posedge clk); #1;
    check(rdipptgr == ~m_q, "rdipptgr");
    check(rxipp == m_rxipp, "rxipp");
    @(negedge clk);
  endtask

  task automatic set_in(input logic tx, rx, fx, st, ho, rd, gd);
    {qltxipp, qlrxipp, selfixclk, rxstart, ippholdoff, selrdmode, qlgd} = {tx, rx, fx, st, ho, rd, gd};
    #1 check(lden == (sop_ipp() | rxstart | ippholdoff), "lden");
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    rst = 1; ce = 1; m_q = 0; m_rxipp = 0;
    set_in(0, 0, 1, 0, 0, 1, 0);
    @(negedge clk); rst = 0;
    check(rdipptgr == 1'b1, "reset trigger high");
    // random
    for (int i = 0; i < 3000; i++) begin
      ce = ($urandom_range(3) != 0);
      set_in($urandom_range(1), $urandom_range(1), $urandom_range(1),
             ($urandom_range(7) == 0), ($urandom_range(7) == 0),
             $urandom_range(1), ($urandom_range(3) == 0));
      step_check();
    end
    // directed: radar mode, fixed clock, TXIPP starts a gate delay of 5 counts
    ce = 1;
    set_in(0, 0, 1, 0, 0, 1, 0); step_check(); step_check();
    set_in(1, 0, 1, 0, 0, 1, 0); step_check();
    check(rdipptgr == 0, "trigger low after TXIPP");
    set_in(0, 0, 1, 0, 0, 1, 0);
    n = 0;
    for (int i = 0; i < 5; i++) begin step_check(); if (!rdipptgr) n++; end
    check(n == 5, "trigger held low during the gate delay");
    set_in(0, 0, 1, 0, 0, 1, 1); step_check();
    check(rdipptgr == 1, "trigger rises one clock after qlgd");
    // drifted clock: RXIPP starts it, TXIPP does not
    set_in(1, 0, 0, 0, 0, 1, 0); step_check();
    check(rdipptgr == 1, "TXIPP ignored with drifted clock");
    set_in(0, 1, 0, 0, 0, 1, 0); step_check();
    check(rdipptgr == 0, "RXIPP starts gate delay with drifted clock");
    set_in(0, 0, 0, 0, 0, 1, 1); step_check();
    // continuous mode: IPPs ignored, start begins a gate delay
    set_in(1, 1, 1, 0, 0, 0, 0); step_check();
    check(rdipptgr == 1 && lden == 0, "continuous mode ignores IPP");
    set_in(0, 0, 1, 1, 0, 0, 0); step_check();
    check(rdipptgr == 0 && rxipp == 1, "start begins gate delay");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
