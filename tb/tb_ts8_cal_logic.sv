// tb_ts8_cal_logic: self-checking testbench of the cal control.
//
// Random pulses on qlgd, qlcaldel and qlcal with a reference model of the
// three flip-flops, then a directed sequence: qlgd enables the cal delay
// timer, qlcaldel ends that enable and starts CAL and non-gated CAL, qlcal
// ends both; with calenable low only the non-gated cal appears.
module tb_ts8_cal_logic;
  int checks = 0, failures = 0;
  logic clk = 0, ce, rst;
  logic qlgd, qlcaldel, qlcal, calenable, cdt_en, cal, ngcal;
  logic m_cdt, m_cal, m_ng;

  ts8_cal_logic dut (.*);

  always #25 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  always @(posedge clk) if (!rst && ce) begin
    m_cdt <= qlgd ? 1'b1 : (qlcaldel ? 1'b0 : m_cdt);
    m_ng  <= qlcaldel ? 1'b1 : (qlcal ? 1'b0 : m_ng);
    m_cal <= !calenable ? 1'b0 : (qlcaldel ? 1'b1 : (qlcal ? 1'b0 : m_cal));
  end

  task automatic cyc(input logic gd, cd, cw, en);
    {qlgd, qlcaldel, qlcal, calenable} = {gd, cd, cw, en};
    @(posedge clk); #1;
    check(cdt_en == m_cdt && cal == m_cal && ngcal == m_ng, "model");
    @(negedge clk);
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; ce = 1; {m_cdt, m_cal, m_ng} = '0;
    {qlgd, qlcaldel, qlcal, calenable} = '0;
    @(negedge clk); rst = 0;
    for (int i = 0; i < 3000; i++) begin
      ce = ($urandom_range(3) != 0);
      cyc(($urandom_range(5) == 0), ($urandom_range(5) == 0), ($urandom_range(5) == 0),
          ($urandom_range(4) != 0));
    end
    ce = 1;
    cyc(0, 0, 1, 1); cyc(0, 0, 0, 1);
    check(!cdt_en && !cal && !ngcal, "idle");
    cyc(1, 0, 0, 1);
    check(cdt_en && !cal, "qlgd enables cal delay timer");
    cyc(0, 0, 0, 1); cyc(0, 1, 0, 1);
    check(!cdt_en && cal && ngcal, "qlcaldel starts cal");
    repeat (3) cyc(0, 0, 0, 1);
    check(cal && ngcal, "cal held");
    cyc(0, 0, 1, 1);
    check(!cal && !ngcal, "qlcal ends cal");
    cyc(1, 0, 0, 0); cyc(0, 1, 0, 0);
    check(!cal && ngcal, "cal disabled, non-gated cal still produced");
    cyc(0, 0, 1, 0);
    check(!ngcal, "non-gated cal ends");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
