// ts12_cmd_dec: command word decoder
//
// Decodes a 24-bit command word while the command word strobe is active.
// Bit 23 marks a command word; the command fields are
//   bit 19     1: update parameters
//   bit 4      1: clear error flags
//   bits 1..0  01: status request, 1x: verification request
//   bits 3..2  01: time tick arm,   1x: immediate start
// Each output is a strobe-long pulse. Purely combinational; ports are
// active-high logic levels.
module ts12_cmd_dec (
  input  logic [23:0] cmd_word,
  input  logic        cmd_strb,     // command word strobe (active high here)
  output logic        update,
  output logic        clr,
  output logic        reqstatus,
  output logic        verifreq,
  output logic        timetickarm,
  output logic        immstart
);

  logic cmd;
  assign cmd = cmd_strb & cmd_word[23];

  always_comb begin
    update      = cmd & cmd_word[19];
    clr         = cmd & cmd_word[4];
    reqstatus   = cmd & cmd_word[0] & ~cmd_word[1];
    verifreq    = cmd & cmd_word[1];
    timetickarm = cmd & cmd_word[2] & ~cmd_word[3];
    immstart    = cmd & cmd_word[3];
  end

endmodule
