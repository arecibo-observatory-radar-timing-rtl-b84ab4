// ts1_txipp_dec: TXIPP counter decoder
//
// Combinational decoder for the 32-bit down-counter chain of the TXIPP
// (transmitter inter-pulse period) counter, which runs on the fixed clock.
// Inputs are the four bits of the lowest 4-bit counter (q = QA..QD), bits 4
// and 5 of the count (qef = QE, QF) and the zero flags of the seven upper
// counters (min[7:1]). Outputs:
//   e[7:2]  look-ahead count enables of counters 2..7
//   q1      count equal to 1, or the fixed start pulse: reloads the chain
//   q9x     count equal to 9, 73, 137 or 201 (bits 5..0 = 001001 and
//           counters 2..7 at zero; bits 6 and 7 are not looked at)
// The product terms are those of the original programmable-logic decoder.
// What q9x drives on the board is not known here; it is brought out as is.
// Ports are active-high logic levels.
module ts1_txipp_dec
  import rtg_pkg::*;
(
  input  logic [3:0] q,         // QA..QD, bit 0 = QA
  input  logic [5:4] qef,       // QE, QF
  input  logic [7:1] min,       // upper counter k at zero
  input  logic       fixstart,  // 100 ns fixed start pulse
  output logic [7:2] e,         // look-ahead enables E2..E7
  output logic       q1,        // decoder out (count 1 or fixed start)
  output logic       q9x        // decoder out (count 9, 73, 137, 201)
);

  always_comb begin
    e   = la_enables(q, min);
    q1  = q1_decode(q, min) | fixstart;
    q9x = ({qef, q} == 6'd9) && (&min[7:2]);
  end

endmodule
