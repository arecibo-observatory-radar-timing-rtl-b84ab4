// ts2_rxipp_dec: RXIPP counter decoder
//
// Purely combinational decoder for the 32-bit down-counter chain of the
// RXIPP (receiver inter-pulse period) counter. From the four bits of the lowest 4-bit counter (q = QA..QD)
// and the zero flags of the seven upper counters (min[7:1]) it produces the
// look-ahead count enables e[7:2] for counters 2..7 and the terminal decode
// q1 (whole count equal to 1), forced true by the rx start pulse so that a start restarts the period. q1 loads the preset into the chain at the
// next rx clock edge, so the chain repeats every "preset" counts.
// The product terms are those of the original programmable-logic decoder;
// ports are active-high logic levels, pin inversions are left to the board.
module ts2_rxipp_dec
  import rtg_pkg::*;
(
  input  logic [3:0] q,     // QA..QD, bit 0 = QA
  input  logic [7:1] min,   // upper counter k at zero
  input  logic       rxstart, // 100 ns rx start pulse
  output logic [7:2] e,     // look-ahead enables E2..E7
  output logic       q1     // decoder out
);

  always_comb begin
    e  = la_enables(q, min);
    q1 = q1_decode(q, min) | rxstart;
  end

endmodule
