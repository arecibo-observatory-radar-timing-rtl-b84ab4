// tb_ts10_clk_mux: self-checking testbench of the time base multiplexer.
//
// Applies all 2^12 input combinations and checks every output against the
// selection written out per select value.
module tb_ts10_clk_mux;
  int checks = 0, failures = 0;
  logic selfixclk, selonetick, f20meg, d20meg, f10meg, d10meg, fstart, dstart;
  logic fippholdoff, dippholdoff, onetick, tentick;
  logic fixclk, fixstart, rxclk, rxstart, ippholdoff, riclk, ritick;

  ts10_clk_mux dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4096; v++) begin
      {selfixclk, selonetick, f20meg, d20meg, f10meg, d10meg, fstart, dstart,
       fippholdoff, dippholdoff, onetick, tentick} = 12'(v);
      #1;
      check(fixclk == f10meg && fixstart == fstart, "fixed outputs");
      if (selfixclk)
        check({rxclk, rxstart, ippholdoff, riclk} == {f10meg, fstart, fippholdoff, f20meg},
              "fixed selected");
      else
        check({rxclk, rxstart, ippholdoff, riclk} == {d10meg, dstart, dippholdoff, d20meg},
              "drifted selected");
      check(ritick == (selonetick ? onetick : tentick), "tick");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
