// ts8_cal_logic: cal delay and cal width control
//
// Three set/reset flip-flops build the calibration pulse after each gate
// delay:
//   cdt_en  cal delay timer enable: set by the latched gate delay terminal
//           count qlgd, cleared by the latched cal delay terminal count.
//   ngcal   non-gated cal: set by qlcaldel, held until the latched cal width
//           terminal count qlcal. Always produced; GW blanking uses it.
//   cal     the CAL output: like ngcal but only set and held while
//           calenable is high.
// So a cal pulse begins one cal delay after the end of the gate delay and
// lasts one cal width.
//
// Timing: registers update on rising edges of clk where ce is high (ce marks
// the rising edge of the 10 MHz rx clock). rst clears them asynchronously,
// the power-up state of the original registered logic.
module ts8_cal_logic (
  input  logic clk,
  input  logic ce,
  input  logic rst,
  input  logic qlgd,       // latched gate delay terminal count
  input  logic qlcaldel,   // latched cal delay terminal count
  input  logic qlcal,      // latched cal width terminal count
  input  logic calenable,  // CAL output enabled
  output logic cdt_en,     // cal delay timer enable
  output logic cal,        // CAL output
  output logic ngcal       // non-gated cal
);

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      cdt_en <= 1'b0;
      cal    <= 1'b0;
      ngcal  <= 1'b0;
    end else if (ce) begin
      cdt_en <= (cdt_en & ~qlcaldel) | qlgd;
      cal    <= (calenable & qlcaldel) | (calenable & ~qlcal & cal);
      ngcal  <= qlcaldel | (~qlcal & ngcal);
    end
  end

endmodule
