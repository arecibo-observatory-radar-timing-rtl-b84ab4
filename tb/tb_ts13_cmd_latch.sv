// tb_ts13_cmd_latch: self-checking testbench of the mode latch.
//
// Sends random command words (bit 23 set three times in four) with a strobe
// and keeps, per mode, the value the command word format table implies:
// field 01 selects the first choice, 1x the second, 00 and words without bit
// 23 leave it. Checks all five outputs after every strobe, and that nothing
// changes held the strobe ends.
module tb_ts13_cmd_latch;
  int checks = 0, failures = 0;
  logic cmd_strb, rst;
  logic [23:0] cmd_word;
  logic selrdmode, selfixclk, calenable, selonetick, selgwblank;
  // expected: radar, fixed, cal on, one tick, gw blank
  logic e_radar, e_fixed, e_cal, e_one, e_blank;

  ts13_cmd_latch dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s word=%h", what, cmd_word); end
  endtask

  function automatic logic upd(input logic cur, input logic [1:0] f, input logic first_is_one);
    // 01 -> first choice, 1x -> second choice
    if (f == 2'b01) return first_is_one;
    if (f[1]) return ~first_is_one;
    return cur;
  endfunction

  task automatic send(input logic [23:0] w);
    logic [4:0] held;
    cmd_word = w;
    #10 cmd_strb = 1;
    #10 held = {selrdmode, selfixclk, calenable, selonetick, selgwblank};
    cmd_strb = 0;
    check(held == {e_radar, e_fixed, e_cal, e_one, e_blank}, "unchanged during strobe");
    if (w[23]) begin
      e_radar = upd(e_radar, w[15:14], 1'b1);
      e_fixed = upd(e_fixed, w[13:12], 1'b0);  // 01 selects drifted
      e_cal   = upd(e_cal,   w[11:10], 1'b1);
      e_one   = upd(e_one,   w[9:8],   1'b1);
      e_blank = upd(e_blank, w[7:6],   1'b1);
    end
    #10;
    check(selrdmode == e_radar, "radar/continuous");
    check(selfixclk == e_fixed, "fixed/drifted");
    check(calenable == e_cal, "cal enable");
    check(selonetick == e_one, "one/ten tick");
    check(selgwblank == e_blank, "gw blank/normal");
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [23:0] w;
    cmd_strb = 0; cmd_word = '0; rst = 0;
    #1 rst = 1;
    #5 rst = 0;
    {e_radar, e_fixed, e_cal, e_one, e_blank} = {1'b1, 1'b0, 1'b1, 1'b1, 1'b1};
    #5 check({selrdmode, selfixclk, calenable, selonetick, selgwblank} == 5'b10111, "reset state");
    send(24'h80_0000 | (24'b10_10_10_10_10 << 6));  // all second choices
    send(24'h80_0000 | (24'b01_01_01_01_01 << 6));  // all first choices
    send(24'h00_0000 | (24'b10_10_10_10_10 << 6));  // not a command word
    for (int i = 0; i < 2000; i++) begin
      w = 24'($urandom);
      w[23] = ($urandom_range(3) != 0);
      send(w);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
