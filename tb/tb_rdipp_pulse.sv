// tb_rdipp_pulse: self-checking testbench of the RDIPP one-shot.
//
// With the default 1000 counts: a rising edge of the trigger gives a pulse
// exactly 1000 count clocks (100 us at 10 MHz) long, starting one count
// clock after the edge is sampled; a falling edge or a steady level gives
// nothing; ce low stretches the pulse in 20 MHz cycles, not in counts.
module tb_rdipp_pulse;
  int checks = 0, failures = 0;
  logic clk = 0, ce, rst, rdipptgr, rdipp;

  rdipp_pulse dut (.*);

  always #25 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // length of the pulse in enabled clocks
  task automatic measure(output int len);
    len = 0;
    while (!rdipp && len < 5) begin @(posedge clk); #1; len++; end
    check(len == 1, "pulse starts one count after the trigger edge");
    len = 0;
    while (rdipp && len < 3000) begin
      @(posedge clk); #1;
      if (ce) len++;
      @(negedge clk);
      ce = ($urandom_range(1) == 1);
    end
    ce = 1;
  endtask

  initial begin
    #2000000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int len;
    rst = 1; ce = 1; rdipptgr = 1;
    @(negedge clk); rst = 0;
    repeat (5) @(negedge clk);
    check(!rdipp, "no pulse for a steady high trigger");
    rdipptgr = 0;
    repeat (5) @(negedge clk);
    check(!rdipp, "no pulse on a falling edge");
    rdipptgr = 1;
    measure(len);
    check(len == 1000, $sformatf("pulse length 1000 counts, got %0d", len));
    rdipptgr = 0; repeat (3) @(negedge clk);
    rdipptgr = 1;
    measure(len);
    check(len == 1000, $sformatf("second pulse length 1000 counts, got %0d", len));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
