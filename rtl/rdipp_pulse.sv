// rdipp_pulse: RDIPP framing pulse generator
//
// The RDIPP (delayed receiver IPP) is a 100 us pulse started by the rising
// edge of the RDIPP trigger, i.e. at the end of each gate delay. The
// document gives only that function; the pulse former used on the board is
// not described, so this block is a digital one-shot: a counter loaded with
// PULSE_CYCLES on the trigger edge and counting down to zero, rdipp being
// high while it is not zero. At the 10 MHz rx clock the default of 1000
// counts gives 100 us. A new trigger edge during the pulse restarts it.
//
// Timing: registers change on rising edges of clk where ce is high (the
// rising edge of the 10 MHz rx clock); rdipp rises one count clock after the
// trigger edge is sampled. rst clears the block asynchronously.
module rdipp_pulse #(
  parameter int unsigned PULSE_CYCLES = 1000
) (
  input  logic clk,
  input  logic ce,
  input  logic rst,
  input  logic rdipptgr,  // RDIPP trigger
  output logic rdipp      // 100 us pulse
);

  localparam int unsigned W = $clog2(PULSE_CYCLES + 1);

  logic         tgr_q;
  logic [W-1:0] remain;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      tgr_q  <= 1'b1;
      remain <= '0;
    end else if (ce) begin
      tgr_q <= rdipptgr;
      if (rdipptgr & ~tgr_q) remain <= W'(PULSE_CYCLES);
      else if (remain != '0) remain <= remain - 1'b1;
    end
  end

  assign rdipp = (remain != '0);

endmodule
