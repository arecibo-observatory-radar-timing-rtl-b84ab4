// ts3_gd_dec: gate delay timer decoder
//
// Purely combinational decoder for the 32-bit down-counter chain of the
// gate delay timer. From the four bits of the lowest 4-bit counter (q = QA..QD)
// and the zero flags of the seven upper counters (min[7:1]) it produces the
// look-ahead count enables e[7:2] for counters 2..7 and the terminal decode
// q1 (whole count equal to 1). q1, once latched, ends the gate delay and raises the RDIPP trigger;
// the chain itself is loaded by the gate delay logic's load enable.
// The product terms are those of the original programmable-logic decoder;
// ports are active-high logic levels, pin inversions are left to the board.
module ts3_gd_dec
  import rtg_pkg::*;
(
  input  logic [3:0] q,     // QA..QD, bit 0 = QA
  input  logic [7:1] min,   // upper counter k at zero
  output logic [7:2] e,     // look-ahead enables E2..E7
  output logic       q1     // decoder out
);

  always_comb begin
    e  = la_enables(q, min);
    q1 = q1_decode(q, min);
  end

endmodule
