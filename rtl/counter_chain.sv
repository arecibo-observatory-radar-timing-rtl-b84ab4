// counter_chain: presettable down-counter chain of one timer
//
// NIBBLES 4-bit down counters form one binary down counter (8 counters =
// 32 bits). Counter 0 counts whenever cnt_en is high; counter 1 counts when
// counter 0 is at zero; counters 2 and up count when their look-ahead enable
// e[k] is high. The enables come from the timer's decoder, which computes
// them from count[3:0] and the zero flags min[k] this block reports, so the
// borrow does not ripple through the counters. load (the decoder's terminal
// output) copies preset into the chain and takes precedence over counting;
// a chain whose load is its own "count = 1" decode therefore repeats every
// preset counts. preload also copies the preset but is not a terminal
// count; the cal timers use it to rest at their preset while idle. ql is
// load delayed by one count clock: the "latched Q1" that the control logic
// and the timing test comparator use.
// The document gives the chain only as "4-bit counters" enabled by the
// decoder; counter type, synchronous load and reset are this
// implementation's choices.
//
// Timing: all registers change on rising edges of clk where ce is high
// (ce marks the rising edge of the 10 MHz clock). rst clears the count and
// ql asynchronously.
module counter_chain #(
  parameter int unsigned NIBBLES = 8
) (
  input  logic                   clk,
  input  logic                   ce,
  input  logic                   rst,
  input  logic                   cnt_en,   // count enable of counter 0
  input  logic                   load,     // load preset (decoder out)
  input  logic                   preload,  // load preset, not latched
  input  logic [4*NIBBLES-1:0]   preset,
  input  logic [NIBBLES-1:2]     e,        // look-ahead enables
  output logic [4*NIBBLES-1:0]   count,
  output logic [NIBBLES-1:1]     min,      // counter k at zero
  output logic                   ql        // load, latched
);

  logic [NIBBLES-1:0] nib_en;

  always_comb begin
    nib_en[0] = cnt_en;
    nib_en[1] = cnt_en & (count[3:0] == 4'd0);
    for (int k = 2; k < NIBBLES; k++) nib_en[k] = cnt_en & e[k];
    for (int k = 1; k < NIBBLES; k++) min[k] = (count[4*k +: 4] == 4'd0);
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      count <= '0;
      ql    <= 1'b0;
    end else if (ce) begin
      ql <= load;
      for (int k = 0; k < NIBBLES; k++) begin
        if (load | preload) count[4*k +: 4] <= preset[4*k +: 4];
        else if (nib_en[k]) count[4*k +: 4] <= count[4*k +: 4] - 4'd1;
      end
    end
  end

endmodule
