// tb_ts12_cmd_dec: self-checking testbench of the command word decoder.
//
// Applies every combination of bits 23, 19, 4, 3..0 and the strobe, with the
// other bits random, and checks each decoded pulse against the command word
// format table (bit 19 update, bit 4 clear, bits 1..0 01 status / 1x
// verification, bits 3..2 01 time tick arm / 1x immediate start).
module tb_ts12_cmd_dec;
  int checks = 0, failures = 0;
  logic [23:0] cmd_word;
  logic cmd_strb, update, clr, reqstatus, verifreq, timetickarm, immstart;

  ts12_cmd_dec dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s word=%h", what, cmd_word); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic act;
    for (int v = 0; v < 512; v++) begin
      cmd_word = 24'($urandom);
      {cmd_strb, cmd_word[23], cmd_word[19], cmd_word[4], cmd_word[3:0]} = 8'(v);
      if (v >= 256) cmd_strb = 1'b0;
      #1;
      act = cmd_strb && cmd_word[23];
      check(update == (act && cmd_word[19]), "update");
      check(clr == (act && cmd_word[4]), "clear");
      case (cmd_word[1:0])
        2'b00: check(!reqstatus && !verifreq, "status nop");
        2'b01: check(reqstatus == act && !verifreq, "status request");
        default: check(!reqstatus && verifreq == act, "verification request");
      endcase
      case (cmd_word[3:2])
        2'b00: check(!timetickarm && !immstart, "start nop");
        2'b01: check(timetickarm == act && !immstart, "time tick arm");
        default: check(!timetickarm && immstart == act, "immediate start");
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
