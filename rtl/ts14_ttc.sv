// ts14_ttc: timing test comparator
//
// Five sticky error flags compare the latched terminal count of the RXIPP
// counter with that of another timer, every rx clock:
//   st[19]  qlrxipp differs from qltxipp
//   st[18]  qlrxipp differs from qlgd     (gate delay)
//   st[17]  qlrxipp differs from qlgw     (gate width)
//   st[16]  qlrxipp differs from qlcaldel (cal delay)
//   st[15]  qlrxipp differs from qlcal    (cal width)
// A flag is set in the cycle after a mismatch and stays set until clr, a
// synchronous clear that takes precedence. With all timers programmed to
// the same count the flags stay clear, which checks the counters against
// each other. The flags are status word bits 19..15.
//
// Timing: registers update on rising edges of clk where ce is high (ce marks
// the rising edge of the 10 MHz rx clock). rst clears them asynchronously
// (power-up state).
module ts14_ttc (
  input  logic        clk,
  input  logic        ce,
  input  logic        rst,
  input  logic        qltxipp,
  input  logic        qlrxipp,
  input  logic        qlgd,
  input  logic        qlgw,
  input  logic        qlcaldel,
  input  logic        qlcal,
  input  logic        clr,       // synchronous clear of all flags
  output logic [19:15] st
);

  logic [19:15] mismatch;
  assign mismatch = {qltxipp, qlgd, qlgw, qlcaldel, qlcal} ^ {5{qlrxipp}};

  always_ff @(posedge clk or posedge rst) begin
    if (rst)     st <= '0;
    else if (ce) st <= clr ? '0 : (st | mismatch);
  end

endmodule
