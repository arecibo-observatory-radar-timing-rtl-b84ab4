// ts13_cmd_latch: command word mode latch
//
// Five mode flip-flops, clocked by the end (falling edge) of the command
// word strobe. Each is controlled by a 2-bit field of a command word (bit 23
// set); a word with bit 23 clear leaves all of them alone:
//   field    00    01                    1x
//   15..14   hold  radar mode            continuous mode     -> selrdmode
//   13..12   hold  drifted clock         fixed clock         -> selfixclk
//   11..10   hold  cal output enabled    cal output disabled -> calenable
//   9..8     hold  one-second tick       ten-second tick     -> selonetick
//   7..6     hold  GW blanking           GW normal           -> selgwblank
// Each flip-flop stores "field = 1x" (the second choice); outputs are taken
// from it with the polarity named above.
// rst clears the flip-flops asynchronously (power-up state), which selects
// radar mode, drifted clock, cal enabled, one-second tick and GW blanking
// until the first command word.
module ts13_cmd_latch (
  input  logic        cmd_strb,    // command word strobe (active high here)
  input  logic        rst,
  input  logic [23:0] cmd_word,
  output logic        selrdmode,   // 1: radar mode, 0: continuous mode
  output logic        selfixclk,   // 1: fixed clock, 0: drifted clock
  output logic        calenable,   // 1: CAL output enabled
  output logic        selonetick,  // 1: one-second tick, 0: ten-second
  output logic        selgwblank   // 1: blank GW during cal
);

  typedef struct packed {
    logic mode_cont;
    logic clk_fixed;
    logic cal_off;
    logic tick_ten;
    logic gw_normal;
  } mode_regs_t;

  mode_regs_t r;

  // next value of one flip-flop from its field: 01 clears, 1x sets
  function automatic logic field_next(input logic cur, input logic [1:0] f);
    return f[1] | (cur & ~f[0]);
  endfunction

  always_ff @(negedge cmd_strb or posedge rst) begin
    if (rst) begin
      r <= '0;
    end else if (cmd_word[23]) begin
      r.mode_cont <= field_next(r.mode_cont, cmd_word[15:14]);
      r.clk_fixed <= field_next(r.clk_fixed, cmd_word[13:12]);
      r.cal_off   <= field_next(r.cal_off,   cmd_word[11:10]);
      r.tick_ten  <= field_next(r.tick_ten,  cmd_word[9:8]);
      r.gw_normal <= field_next(r.gw_normal, cmd_word[7:6]);
    end
  end

  assign selrdmode  = ~r.mode_cont;
  assign selfixclk  =  r.clk_fixed;
  assign calenable  = ~r.cal_off;
  assign selonetick = ~r.tick_ten;
  assign selgwblank = ~r.gw_normal;

endmodule
