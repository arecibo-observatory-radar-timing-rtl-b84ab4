// ts4_gd_logic: gate delay timer control
//
// Decides when a gate delay starts and holds the RDIPP trigger low while it
// runs. A gate delay starts on
//   * the latched terminal count of the period counter of the selected time
//     base (TXIPP with the fixed clock, RXIPP with the drifted clock), but
//     only in radar mode (selrdmode), or
//   * the rx start pulse, or
//   * IPP holdoff (held while waiting for a synchronising time tick).
// lden   (combinational) loads the gate delay timer with its preset.
// rxipp  (registered) the period pulse, a front panel test point.
// rdipptgr (registered) low from the start until the latched gate delay
//        terminal count qlgd; its rising edge triggers the RDIPP pulse, and
//        while high it stops the gate delay timer.
// In continuous mode only a start or holdoff begins a gate delay, which gives
// the single RDIPP that mode calls for.
//
// Timing: registers update on rising edges of clk where ce is high (ce marks
// the rising edge of the 10 MHz rx clock; tie it high to clock the block from
// the 10 MHz clock itself). rst is an asynchronous reset to the power-up
// state (registers cleared, so rdipptgr high and the timer stopped), a
// choice of this implementation. lden is taken as combinational and its
// rxstart and ippholdoff terms as separate, following the schematic drawing.
module ts4_gd_logic (
  input  logic clk,
  input  logic ce,
  input  logic rst,
  input  logic qltxipp,     // latched TXIPP terminal count
  input  logic qlrxipp,     // latched RXIPP terminal count
  input  logic selfixclk,   // fixed (1) or drifted (0) time base
  input  logic rxstart,     // rx start pulse
  input  logic ippholdoff,  // IPP holdoff
  input  logic selrdmode,   // radar (1) or continuous (0) mode
  input  logic qlgd,        // latched gate delay terminal count
  output logic lden,        // gate delay timer load enable
  output logic rxipp,       // front panel test point
  output logic rdipptgr     // RDIPP trigger, low during the gate delay
);

  logic ipp_start;  // a new IPP begins in radar mode
  logic gd_run;     // the trigger flip-flop; rdipptgr is its inverse

  assign ipp_start = selrdmode & (selfixclk ? qltxipp : qlrxipp);
  assign lden      = ipp_start | rxstart | ippholdoff;
  assign rdipptgr  = ~gd_run;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      gd_run <= 1'b0;
      rxipp  <= 1'b0;
    end else if (ce) begin
      gd_run <= ipp_start | rxstart | ippholdoff | (gd_run & ~qlgd);
      rxipp  <= ipp_start | rxstart;
    end
  end

endmodule
