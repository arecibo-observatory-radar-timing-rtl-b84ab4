// rtg_pkg: shared decode functions for the radar timing generator.
//
// Every programmable timer of the generator is a chain of eight 4-bit down
// counters (a 32-bit count). The least significant counter exposes its four
// bits (QA..QD, QA = bit 0); each upper counter k = 1..7 only reports a
// "MIN" flag, true when that counter is at zero. Two functions are shared
// by the decoder logic of all six timers:
//   la_enables  look-ahead count enables E2..E7: counter k may count down
//               when counter 0 and counters 1..k-1 are all at zero, i.e. when
//               a borrow from every lower stage is due.
//   q1_decode   true when the whole 32-bit count equals 1, the cycle before
//               the chain reloads its preset.
// Both follow the product terms of the decoder equations; the function form
// and the active-high polarity are this implementation's choice.
package rtg_pkg;

  localparam int unsigned NIB = 8;  // 4-bit counters per timer chain

  // Preset counts of the six timers, in 10 MHz clock periods (100 ns).
  typedef struct packed {
    logic [4*NIB-1:0] txipp;   // transmitter inter-pulse period
    logic [4*NIB-1:0] rxipp;   // receiver inter-pulse period
    logic [4*NIB-1:0] gd;      // gate delay
    logic [4*NIB-1:0] gw;      // gate width (sampling period)
    logic [4*NIB-1:0] caldel;  // cal delay
    logic [4*NIB-1:0] calwth;  // cal width
  } timer_presets_t;

  function automatic logic [7:2] la_enables(input logic [3:0] q, input logic [7:1] min);
    logic [7:2] e;
    logic       all_zero;
    all_zero = (q == 4'd0);
    for (int k = 2; k <= 7; k++) begin
      all_zero = all_zero & min[k-1];
      e[k]     = all_zero;
    end
    return e;
  endfunction

  function automatic logic q1_decode(input logic [3:0] q, input logic [7:1] min);
    return (q == 4'd1) && (&min);
  endfunction

endpackage
