// ts11_clk_sync: clock synchroniser of one time base
//
// Runs on a 20 MHz clock and divides it by two into the 10 MHz clock clkout.
// The phase of clkout is restarted, and a 100 ns start pulse emitted, on
//   * an immediate start request imst (latched into q4), or
//   * the first rising edge of the time tick ttin (synchronised into q8,
//     delayed into q7) after a time tick sync request ttsr has raised
//     ippholdoff. ippholdoff stays high until the start pulse appears.
// The restart forces clkout high; from then on it toggles every 20 MHz
// cycle. start is held for two 20 MHz cycles (q3 keeps it alive for the
// second one), i.e. one full 10 MHz period.
//
// ce10 is high in every 20 MHz cycle at whose end clkout will rise
// (clkout low). Logic of the 10 MHz domain can run on the 20 MHz clock
// gated by ce10 and then samples exactly what a register clocked by clkout
// would; this output is an addition of this implementation.
//
// rst clears all registers asynchronously, the power-up state of the
// original registered logic.
module ts11_clk_sync (
  input  logic clk,         // 20 MHz
  input  logic rst,
  input  logic ttin,        // time tick
  input  logic ttsr,        // time tick sync request
  input  logic imst,        // immediate start (sync) request
  output logic clkout,      // 10 MHz clock
  output logic ce10,        // clkout rises at the next clk edge
  output logic start,       // 100 ns start pulse
  output logic ippholdoff   // waiting for the synchronising time tick
);

  logic q8, q7, q4, q3;
  logic tick_sync;  // time tick edge while armed

  assign tick_sync = q8 & ~q7 & ippholdoff;
  assign ce10      = ~clkout;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      q8         <= 1'b0;
      q7         <= 1'b0;
      q4         <= 1'b0;
      q3         <= 1'b0;
      clkout     <= 1'b0;
      start      <= 1'b0;
      ippholdoff <= 1'b0;
    end else begin
      q8         <= ttin;
      q7         <= q8;
      ippholdoff <= ttsr | (~start & ippholdoff);
      clkout     <= ~clkout | q4 | tick_sync;
      q4         <= imst & ~q4;
      q3         <= q4 | tick_sync;
      start      <= q3 | q4 | tick_sync;
    end
  end

endmodule
