// ts5_gw_dec: gate width counter decoder
//
// Purely combinational decoder for the 32-bit down-counter chain of the
// gate width counter. From the four bits of the lowest 4-bit counter (q = QA..QD)
// and the zero flags of the seven upper counters (min[7:1]) it produces the
// look-ahead count enables e[7:2] for counters 2..7 and the terminal decode
// q1 (whole count equal to 1), forced true by the latched end of the gate delay (qlgd) so that the sampling pulse train restarts at every RDIPP. q1 loads the preset into the chain at the
// next rx clock edge, so the chain repeats every "preset" counts.
// The product terms are those of the original programmable-logic decoder;
// ports are active-high logic levels, pin inversions are left to the board.
module ts5_gw_dec
  import rtg_pkg::*;
(
  input  logic [3:0] q,     // QA..QD, bit 0 = QA
  input  logic [7:1] min,   // upper counter k at zero
  input  logic       qlgd,    // latched gate delay terminal count
  output logic [7:2] e,     // look-ahead enables E2..E7
  output logic       q1     // decoder out
);

  always_comb begin
    e  = la_enables(q, min);
    q1 = q1_decode(q, min) | qlgd;
  end

endmodule
