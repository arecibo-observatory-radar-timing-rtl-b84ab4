// ts10_clk_mux: time base selection (clock conditioner multiplexer)
//
// The generator has two complete time bases, each a 20 MHz clock with its
// own clock synchroniser: "fixed" and "drifted" (the drifted one is offset
// in frequency for Doppler correction). selfixclk picks which one drives the
// receive side (rx clock, rx start, IPP holdoff and the 20 MHz radar
// interface clock). The fixed 10 MHz clock and fixed start are always passed
// on for the transmit side. selonetick picks the one- or ten-second tick sent
// to the radar interface. All outputs are combinational 2:1 selections, as in
// the original multiplexer; ports are active-high logic levels.
module ts10_clk_mux (
  input  logic selfixclk,      // 1: fixed time base, 0: drifted
  input  logic selonetick,     // 1: one-second tick, 0: ten-second tick
  input  logic f20meg,         // fixed 20 MHz clock
  input  logic d20meg,         // drifted 20 MHz clock
  input  logic f10meg,         // fixed 10 MHz clock (from its synchroniser)
  input  logic d10meg,         // drifted 10 MHz clock
  input  logic fstart,         // fixed start pulse
  input  logic dstart,         // drifted start pulse
  input  logic fippholdoff,    // fixed IPP holdoff
  input  logic dippholdoff,    // drifted IPP holdoff
  input  logic onetick,        // one-second tick
  input  logic tentick,        // ten-second tick
  output logic fixclk,         // fixed 10 MHz clock
  output logic fixstart,       // fixed 100 ns start pulse
  output logic rxclk,          // rx 10 MHz clock, fixed or drifted
  output logic rxstart,        // rx 100 ns start pulse, fixed or drifted
  output logic ippholdoff,     // IPP holdoff, fixed or drifted
  output logic riclk,          // radar interface 20 MHz clock
  output logic ritick          // radar interface one or ten second tick
);

  always_comb begin
    fixclk     = f10meg;
    fixstart   = fstart;
    rxclk      = selfixclk  ? f10meg      : d10meg;
    rxstart    = selfixclk  ? fstart      : dstart;
    ippholdoff = selfixclk  ? fippholdoff : dippholdoff;
    riclk      = selfixclk  ? f20meg      : d20meg;
    ritick     = selonetick ? onetick     : tentick;
  end

endmodule
