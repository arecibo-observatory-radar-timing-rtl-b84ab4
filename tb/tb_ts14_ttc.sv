// tb_ts14_ttc: self-checking testbench of the timing test comparator.
//
// Random latched terminal counts with a model of the sticky flags (set on a
// mismatch with qlrxipp, cleared only by a synchronous clear), then a
// directed case: equal inputs keep the flags clear, a single mismatch on one
// input sets only its flag, and clear resets it.
module tb_ts14_ttc;
  int checks = 0, failures = 0;
  logic clk = 0, ce, rst;
  logic qltxipp, qlrxipp, qlgd, qlgw, qlcaldel, qlcal, clr;
  logic [19:15] st, m;

  ts14_ttc dut (.*);

  always #25 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  always @(posedge clk) if (!rst && ce) begin
    if (clr) m <= '0;
    else begin
      if (qlrxipp != qltxipp)  m[19] <= 1'b1;
      if (qlrxipp != qlgd)     m[18] <= 1'b1;
      if (qlrxipp != qlgw)     m[17] <= 1'b1;
      if (qlrxipp != qlcaldel) m[16] <= 1'b1;
      if (qlrxipp != qlcal)    m[15] <= 1'b1;
    end
  end

  task automatic cyc(input logic [5:0] v, input logic c);
    {qlrxipp, qltxipp, qlgd, qlgw, qlcaldel, qlcal} = v;
    clr = c;
    @(posedge clk); #1;
    check(st == m, "flags");
    @(negedge clk);
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; ce = 1; m = '0; clr = 0;
    {qlrxipp, qltxipp, qlgd, qlgw, qlcaldel, qlcal} = '0;
    @(negedge clk); rst = 0;
    for (int i = 0; i < 2000; i++) begin
      ce = ($urandom_range(3) != 0);
      cyc(($urandom_range(3) == 0) ? 6'($urandom) : (($urandom_range(1) == 1) ? '1 : '0),
          ($urandom_range(15) == 0));
    end
    ce = 1;
    cyc('0, 1'b1);
    repeat (5) begin cyc('1, 1'b0); cyc('0, 1'b0); end
    check(st == '0, "equal counts keep flags clear");
    cyc(6'b100000, 1'b0);  // RXIPP alone
    check(st == 5'b11111, "RXIPP alone sets all flags");
    cyc('0, 1'b1);
    check(st == '0, "clear");
    cyc(6'b000100, 1'b0);  // gate width alone
    check(st == 5'b00100, "gate width mismatch sets status 17 only");
    cyc('0, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
