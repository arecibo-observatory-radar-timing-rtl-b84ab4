// ts6_gw_logic: gate width (sampling pulse) output logic
//
// Latches the gate width counter's decoder output q1 into en, and passes one
// rx clock high phase as the GW sampling pulse in every cycle where en is
// set. With GW blanking selected (selgwblank) the pulse is suppressed while
// the non-gated cal pulse ngcal is active.
//   gw_gate  registered-output qualifier: en and not blanked
//   gw       gw_gate AND the 10 MHz rx clock: the GW pulse itself
// On the original board the clock is delayed by about 30 ns through two
// buffers so that the pulse starts after en has settled. Here the register
// and the rx clock change on the same 20 MHz edge (see ce), so the AND is
// free of races without a delay; the delay is therefore not modelled.
//
// Timing: en updates on rising edges of clk where ce is high (ce marks the
// rising edge of rxclk). rst clears en asynchronously (implementation choice).
// gw is combinational in rxclk; it is meant to drive an output pin.
module ts6_gw_logic (
  input  logic clk,
  input  logic ce,
  input  logic rst,
  input  logic rxclk,       // 10 MHz rx clock (as data)
  input  logic q1,          // gate width counter decoder out
  input  logic selgwblank,  // blank GW during cal
  input  logic ngcal,       // non-gated cal pulse
  output logic en,          // latched q1: gate width load enable
  output logic gw_gate,     // GW qualifier
  output logic gw           // GW sampling pulse
);

  always_ff @(posedge clk or posedge rst) begin
    if (rst)     en <= 1'b0;
    else if (ce) en <= q1;
  end

  assign gw_gate = en & (~selgwblank | ~ngcal);
  assign gw      = gw_gate & rxclk;

endmodule
