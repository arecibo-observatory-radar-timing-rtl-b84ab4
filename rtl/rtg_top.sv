// rtg_top: radar timing generator
//
// Produces the timing of a pulsed radar from one of two 20 MHz time bases:
// the transmitter inter-pulse period (TXIPP), the receiver IPP, the gate
// delay from each IPP to the start of sampling (ending in the RDIPP framing
// pulse), the train of gate width (GW) sampling pulses, and a calibration
// (CAL) pulse a programmable delay after the gate delay. A host sets the
// mode with command words and the six timer counts with presets.
//
// Structure (each block is described in its own file):
//   two ts11_clk_sync   fixed and drifted time base: 20 MHz -> 10 MHz clock,
//                       start pulse, IPP holdoff
//   ts10_clk_mux        selects the time base for the receive side
//   ts12_cmd_dec        command word pulses (update, clear, status,
//                       verification, time tick arm, immediate start)
//   ts13_cmd_latch      mode flip-flops
//   six counter_chain   32-bit down counters, each with its decoder
//                       (ts1, ts2, ts3, ts5, ts7, ts9)
//   ts4_gd_logic        gate delay control and RDIPP trigger
//   ts6_gw_logic        GW pulse output
//   ts8_cal_logic       cal delay enable, CAL and non-gated CAL
//   ts14_ttc            timing test comparator (status bits 19..15)
//   rdipp_pulse         100 us RDIPP pulse
//
// Clocking: the 10 MHz logic runs on a 20 MHz clock with a clock enable that
// marks each rising edge of the synchronised 10 MHz clock, which samples the
// same values as clocking it from the divided clock. The receive side uses
// the selected 20 MHz clock (riclk) with ce = NOT rxclk; the TXIPP counter
// uses the fixed 20 MHz clock with ce = NOT fixclk. The command word latch
// is clocked by the end of the command strobe.
//
// Choices of this implementation where the wiring between blocks is open:
// a time tick arm command is the time tick sync request of both
// synchronisers and an immediate start command their immediate start
// request; the tick they synchronise to is the selected one- or ten-second
// tick; TXIPP is the latched TXIPP terminal count; the gate delay timer
// counts while the RDIPP trigger is low; the cal timers rest at their preset
// while idle; CAL is enabled only in radar mode (the cal output stays low in
// continuous mode); rst clears every register.
module rtg_top
  import rtg_pkg::*;
#(
  parameter int unsigned RDIPP_CYCLES = 1000  // 100 us at 10 MHz
) (
  input  logic           rst,
  input  logic           f20meg,      // fixed 20 MHz clock
  input  logic           d20meg,      // drifted 20 MHz clock
  input  logic           onetick,     // one-second time tick
  input  logic           tentick,     // ten-second time tick
  input  logic [23:0]    cmd_word,    // command word
  input  logic           cmd_strb,    // command word strobe
  input  timer_presets_t presets,     // timer counts
  output logic           fixclk,      // fixed 10 MHz clock
  output logic           rxclk,       // rx 10 MHz clock
  output logic           riclk,       // radar interface 20 MHz clock
  output logic           ritick,      // radar interface time tick
  output logic           txipp,       // transmitter trigger
  output logic           txipp_q9x,   // TXIPP count 9/73/137/201 decode
  output logic           rxipp,       // front panel test point
  output logic           rdipptgr,    // RDIPP trigger, low in gate delay
  output logic           rdipp,       // 100 us RDIPP framing pulse
  output logic           gw,          // gate width sampling pulses
  output logic           cal,         // CAL output
  output logic           ngcal,       // non-gated cal
  output logic           update,      // update parameters command
  output logic           reqstatus,   // status request command
  output logic           verifreq,    // verification request command
  output logic [19:15]   status,      // timing test comparator flags
  output logic           selrdmode,   // radar (1) / continuous (0) mode
  output logic           selfixclk    // fixed (1) / drifted (0) time base
);

  localparam int unsigned W = 4 * NIB;

  // ---------------- command interface
  logic clr, timetickarm, immstart;
  logic calenable_cmd, selonetick, selgwblank;

  ts12_cmd_dec u_cmd_dec (
    .cmd_word, .cmd_strb, .update, .clr, .reqstatus, .verifreq,
    .timetickarm, .immstart
  );

  ts13_cmd_latch u_cmd_latch (
    .cmd_strb, .rst, .cmd_word, .selrdmode, .selfixclk,
    .calenable(calenable_cmd), .selonetick, .selgwblank
  );

  // ---------------- time bases
  logic f10meg, d10meg, fce10, dce10, fstart, dstart, fippholdoff, dippholdoff;
  logic fixstart, rxstart, ippholdoff;

  ts11_clk_sync u_fsync (
    .clk(f20meg), .rst, .ttin(ritick), .ttsr(timetickarm), .imst(immstart),
    .clkout(f10meg), .ce10(fce10), .start(fstart), .ippholdoff(fippholdoff)
  );

  ts11_clk_sync u_dsync (
    .clk(d20meg), .rst, .ttin(ritick), .ttsr(timetickarm), .imst(immstart),
    .clkout(d10meg), .ce10(dce10), .start(dstart), .ippholdoff(dippholdoff)
  );

  ts10_clk_mux u_clk_mux (
    .selfixclk, .selonetick, .f20meg, .d20meg, .f10meg, .d10meg,
    .fstart, .dstart, .fippholdoff, .dippholdoff, .onetick, .tentick,
    .fixclk, .fixstart, .rxclk, .rxstart, .ippholdoff, .riclk, .ritick
  );

  logic rx_ce, fix_ce;
  assign rx_ce  = selfixclk ? fce10 : dce10;  // = NOT rxclk
  assign fix_ce = fce10;                      // = NOT fixclk

  // ---------------- TXIPP counter (fixed time base)
  logic [W-1:0] tx_cnt;
  logic [7:1]   tx_min;
  logic [7:2]   tx_e;
  logic         tx_q1, qltxipp;

  ts1_txipp_dec u_tx_dec (
    .q(tx_cnt[3:0]), .qef(tx_cnt[5:4]), .min(tx_min), .fixstart,
    .e(tx_e), .q1(tx_q1), .q9x(txipp_q9x)
  );
  counter_chain #(.NIBBLES(NIB)) u_tx_cnt (
    .clk(f20meg), .ce(fix_ce), .rst, .cnt_en(1'b1), .load(tx_q1),
    .preload(1'b0), .preset(presets.txipp), .e(tx_e), .count(tx_cnt),
    .min(tx_min), .ql(qltxipp)
  );
  assign txipp = qltxipp;

  // ---------------- RXIPP counter
  logic [W-1:0] rx_cnt;
  logic [7:1]   rx_min;
  logic [7:2]   rx_e;
  logic         rx_q1, qlrxipp;

  ts2_rxipp_dec u_rx_dec (
    .q(rx_cnt[3:0]), .min(rx_min), .rxstart, .e(rx_e), .q1(rx_q1)
  );
  counter_chain #(.NIBBLES(NIB)) u_rx_cnt (
    .clk(riclk), .ce(rx_ce), .rst, .cnt_en(1'b1), .load(rx_q1),
    .preload(1'b0), .preset(presets.rxipp), .e(rx_e), .count(rx_cnt),
    .min(rx_min), .ql(qlrxipp)
  );

  // ---------------- gate delay timer
  logic [W-1:0] gd_cnt;
  logic [7:1]   gd_min;
  logic [7:2]   gd_e;
  logic         gd_q1, qlgd, lden;

  ts4_gd_logic u_gd_logic (
    .clk(riclk), .ce(rx_ce), .rst, .qltxipp, .qlrxipp, .selfixclk,
    .rxstart, .ippholdoff, .selrdmode, .qlgd, .lden, .rxipp, .rdipptgr
  );
  ts3_gd_dec u_gd_dec (.q(gd_cnt[3:0]), .min(gd_min), .e(gd_e), .q1(gd_q1));
  counter_chain #(.NIBBLES(NIB)) u_gd_cnt (
    .clk(riclk), .ce(rx_ce), .rst, .cnt_en(~rdipptgr), .load(gd_q1),
    .preload(lden), .preset(presets.gd), .e(gd_e), .count(gd_cnt),
    .min(gd_min), .ql(qlgd)
  );

  rdipp_pulse #(.PULSE_CYCLES(RDIPP_CYCLES)) u_rdipp (
    .clk(riclk), .ce(rx_ce), .rst, .rdipptgr, .rdipp
  );

  // ---------------- gate width counter
  logic [W-1:0] gw_cnt;
  logic [7:1]   gw_min;
  logic [7:2]   gw_e;
  logic         gw_q1, qlgw, gw_en, gw_gate;

  ts5_gw_dec u_gw_dec (
    .q(gw_cnt[3:0]), .min(gw_min), .qlgd, .e(gw_e), .q1(gw_q1)
  );
  counter_chain #(.NIBBLES(NIB)) u_gw_cnt (
    .clk(riclk), .ce(rx_ce), .rst, .cnt_en(1'b1), .load(gw_q1),
    .preload(1'b0), .preset(presets.gw), .e(gw_e), .count(gw_cnt),
    .min(gw_min), .ql(qlgw)
  );
  ts6_gw_logic u_gw_logic (
    .clk(riclk), .ce(rx_ce), .rst, .rxclk, .q1(gw_q1), .selgwblank, .ngcal,
    .en(gw_en), .gw_gate, .gw
  );

  // ---------------- cal delay and cal width timers
  logic [W-1:0] cd_cnt, cw_cnt;
  logic [7:1]   cd_min, cw_min;
  logic [7:2]   cd_e, cw_e;
  logic         cd_q1, cw_q1, qlcaldel, qlcal, cdt_en;

  ts8_cal_logic u_cal_logic (
    .clk(riclk), .ce(rx_ce), .rst, .qlgd, .qlcaldel, .qlcal,
    .calenable(calenable_cmd & selrdmode), .cdt_en, .cal, .ngcal
  );
  ts7_caldel_dec u_cd_dec (.q(cd_cnt[3:0]), .min(cd_min), .e(cd_e), .q1(cd_q1));
  counter_chain #(.NIBBLES(NIB)) u_cd_cnt (
    .clk(riclk), .ce(rx_ce), .rst, .cnt_en(cdt_en), .load(cd_q1),
    .preload(~cdt_en), .preset(presets.caldel), .e(cd_e), .count(cd_cnt),
    .min(cd_min), .ql(qlcaldel)
  );
  ts9_calwth_dec u_cw_dec (.q(cw_cnt[3:0]), .min(cw_min), .e(cw_e), .q1(cw_q1));
  counter_chain #(.NIBBLES(NIB)) u_cw_cnt (
    .clk(riclk), .ce(rx_ce), .rst, .cnt_en(ngcal), .load(cw_q1),
    .preload(~ngcal), .preset(presets.calwth), .e(cw_e), .count(cw_cnt),
    .min(cw_min), .ql(qlcal)
  );

  // ---------------- timing test comparator
  ts14_ttc u_ttc (
    .clk(riclk), .ce(rx_ce), .rst, .qltxipp, .qlrxipp, .qlgd, .qlgw,
    .qlcaldel, .qlcal, .clr, .st(status)
  );

endmodule
