// tb_ts1_txipp_dec: self-checking testbench of the TXIPP counter decoder.
//
// Drives the decoder with 32-bit counts, half of them built from nibbles
// that are zero with probability 1/2 so that the long enable terms are
// exercised, plus directed values. The expected outputs are computed from
// the count as an integer: enable E_k is due when the k lowest 4-bit
// counters are all zero (count mod 16^k == 0), q1 when the count is 1
// (or the forcing input is high), q9x when the count is 9, 73, 137 or 201.
module tb_ts1_txipp_dec;
  int checks = 0, failures = 0;
  logic [31:0] cnt;
  logic [7:1]  min;
  logic [7:2]  e;
  logic        q1;
  logic        xin;
  logic       fixstart;
  logic       q9x;

  ts1_txipp_dec dut (.q(cnt[3:0]), .min, .fixstart, .qef(cnt[5:4]), .q9x, .e, .q1);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s count=%h", what, cnt);
    end
  endtask

  task automatic apply(input logic [31:0] v, input logic x);
    cnt = v;
    xin = x;
    for (int k = 1; k < 8; k++) min[k] = (v[4*k +: 4] == 4'd0);
    fixstart = xin;
    #1;
    for (int k = 2; k < 8; k++)
      check(e[k] == ((64'(v) % (64'd1 << (4*k))) == 0), $sformatf("E%0d", k));
    check(q1 == ((v == 32'd1) || xin), "q1");
      check(q9x == ((cnt % 64 == 9) && (cnt < 256)), "q9x");
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] v;
    apply(32'd0, 1'b0); apply(32'd1, 1'b0); apply(32'd2, 1'b0);
    apply(32'd9, 1'b0); apply(32'd73, 1'b0); apply(32'd137, 1'b0);
    apply(32'd201, 1'b0); apply(32'd265, 1'b0); apply(32'h10, 1'b0);
    apply(32'h100, 1'b0); apply(32'h1000_0000, 1'b0); apply(32'h0100_0000, 1'b0);
    apply(32'd17, 1'b0); apply(32'h11, 1'b0); apply(32'h1_0001, 1'b0);
    for (int k = 0; k < 8; k++) apply(32'd1 << (4*k), 1'b0);
    for (int i = 0; i < 4000; i++) begin
      v = $urandom;
      if (i % 2 == 0)
        for (int k = 0; k < 8; k++) if ($urandom_range(1) == 0) v[4*k +: 4] = 4'd0;
      if (i % 7 == 0) v = $urandom_range(300);
      apply(v, ($urandom_range(9) == 0));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
