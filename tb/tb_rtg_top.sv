// tb_rtg_top: end-to-end testbench of the radar timing generator.
//
// Runs the whole generator at its default parameters with two free-running
// 20 MHz clocks (fixed: 50 ns; drifted: 50.1 ns), programs it through
// command words and drives timer presets of realistic size:
//   IPP 2000 counts (200 us), gate delay 100, gate width 20, cal delay 300,
//   cal width 200 counts.
// Phases and what is checked (times computed from the presets, one count =
// 100 ns on the fixed time base):
//   1 radar mode, fixed clock, immediate start: TXIPP period = 2000 counts;
//     RDIPP trigger rises gate delay + 2 counts after each TXIPP; RDIPP is
//     1000 counts long; GW pulses every 20 counts, restarted at each RDIPP;
//     CAL rises cal delay + 1 counts after the RDIPP trigger and lasts
//     cal width + 1 counts; GW is blanked during cal; RXIPP and TXIPP agree,
//     so status bit 19 stays clear while bit 18 records the gate delay.
//   2 GW normal: GW pulses continue during cal.
//   3 clear command clears the status flags; status, verification and
//     update commands produce their pulses.
//   4 continuous mode: one RDIPP after a start, none for later IPPs; CAL
//     stays low; GW keeps running.
//   5 drifted clock, radar mode: RXIPP period = 2000 drifted counts
//     (2000 x 100.2 ns), RDIPP follows RXIPP.
//   6 time tick arm: IPP holdoff rises and holds the gate delay off until
//     the selected one-second tick, which starts the generator.
// Each mechanism is counted; one that never happened counts as a failure.
`timescale 1ns/1ps
module tb_rtg_top;
  import rtg_pkg::*;

  int checks = 0, failures = 0;

  logic           rst, f20meg = 0, d20meg = 0, onetick, tentick, cmd_strb;
  logic [23:0]    cmd_word;
  timer_presets_t presets;
  logic fixclk, rxclk, riclk, ritick, txipp, txipp_q9x, rxipp, rdipptgr, rdipp;
  logic gw, cal, ngcal, update, reqstatus, verifreq, selrdmode, selfixclk;
  logic [19:15] status;

  rtg_top dut (.*);

  localparam int P_IPP = 2000, P_GD = 100, P_GW = 20, P_CD = 300, P_CW = 200;
  localparam real T_FIX = 100.0, T_DRIFT = 100.2;

  always #25    f20meg = ~f20meg;
  always #25.05 d20meg = ~d20meg;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic bit near(input realtime a, input real b);
    return (a > b - 1.0) && (a < b + 1.0);
  endfunction

  // ---------------------------------------------------------------- monitors
  realtime t_tx = -1, t_rx = -1, t_tgr_rise = -1, t_rdipp = -1, t_gw = -1, t_cal = -1;
  realtime t_ipp = -1;  // last IPP that starts a gate delay
  int n_tx = 0, n_rx = 0, n_tgr = 0, n_rdipp = 0, n_gw = 0, n_cal = 0, n_blank = 0;
  int n_gw_in_cal = 0, n_tx_bad = 0, n_rx_bad = 0, n_gd_bad = 0, n_rdipp_bad = 0;
  int n_gw_good = 0, n_gw_long = 0, n_cd_bad = 0, n_cw_bad = 0;
  realtime t_start = -1;  // last rx start (re-phases the 10 MHz clock)
  real ipp_period = T_FIX * P_IPP;
  bit  use_rx = 0;      // RDIPP follows RXIPP (drifted clock)
  real count_t = T_FIX;
  bit  armed = 0;       // reset is over

  always @(posedge txipp) begin
    if (t_tx >= 0 && !near($realtime - t_tx, T_FIX * P_IPP)) n_tx_bad++;
    t_tx = $realtime; n_tx++;
    if (!use_rx) t_ipp = $realtime;
  end
  always @(posedge dut.qlrxipp) begin
    if (t_rx >= 0 && !near($realtime - t_rx, ipp_period)) n_rx_bad++;
    t_rx = $realtime; n_rx++;
    if (use_rx) t_ipp = $realtime;
  end
  always @(posedge rdipptgr) begin
    n_tgr++;
    t_tgr_rise = $realtime;
    if (selrdmode && t_ipp >= 0 && !near($realtime - t_ipp, count_t * (P_GD + 2))) n_gd_bad++;
  end
  always @(posedge rdipp) t_rdipp = $realtime;
  always @(negedge rdipp) if (t_rdipp >= 0) begin
    n_rdipp++;
    if (!near($realtime - t_rdipp, count_t * 1000)) n_rdipp_bad++;
  end
  always @(posedge gw) if (armed) begin
    n_gw++;
    if (ngcal) n_gw_in_cal++;
    if (t_gw >= 0) begin
      if (near($realtime - t_gw, count_t * P_GW)) n_gw_good++;
      else if ($realtime - t_gw > count_t * P_GW + 1.0 && !(ngcal || t_cal >= t_gw || t_start >= t_gw)) n_gw_long++;
    end
    t_gw = $realtime;
  end
  always @(posedge cal) begin
    t_cal = $realtime;
    if (!near($realtime - t_tgr_rise, count_t * (P_CD + 1))) n_cd_bad++;
  end
  always @(negedge cal) if (t_cal >= 0) begin
    n_cal++;
    if (!near($realtime - t_cal, count_t * (P_CW + 1))) n_cw_bad++;
  end
  // a GW pulse suppressed by blanking: the latched GW enable is set during cal
  always @(posedge rxclk) if (dut.u_gw_logic.en && ngcal && dut.selgwblank) n_blank++;

  // ---------------------------------------------------------------- commands
  task automatic send(input logic [23:0] w);
    @(posedge f20meg); #10;
    cmd_word = w;
    cmd_strb = 1;
    #100 cmd_strb = 0;
    #10 cmd_word = '0;
  endtask

  // mode field values: 01 = first choice, 10 = second choice
  function automatic logic [23:0] mode_word(input logic [1:0] rdr, clk, cal_f, tick, gwb);
    return 24'h80_0000 | {8'd0, rdr, clk, cal_f, tick, gwb, 6'd0};
  endfunction
  localparam logic [1:0] FIRST = 2'b01, SECOND = 2'b10, NOP = 2'b00;
  localparam logic [23:0] IMM_START = 24'h80_0008, TT_ARM = 24'h80_0004;
  localparam logic [23:0] CLR = 24'h80_0010, REQ_STATUS = 24'h80_0001;
  localparam logic [23:0] VERIF = 24'h80_0002, UPDATE = 24'h88_0000;

  int n_update = 0, n_reqstatus = 0, n_verif = 0, n_clear = 0, n_cont = 0;
  int n_drift = 0, n_tick_sync = 0, n_imm = 0, n_st19 = 0, n_st18 = 0, n_st17_clr = 0;
  always @(posedge dut.rxstart) t_start = $realtime;
  always @(negedge status[17]) n_st17_clr++;
  always @(posedge update)    n_update++;
  always @(posedge reqstatus) n_reqstatus++;
  always @(posedge verifreq)  n_verif++;
  always @(posedge dut.fstart) n_imm++;
  always @(posedge status[18]) n_st18++;
  always @(posedge status[19]) n_st19++;

  task automatic wait_ipps(input real n);
    #(n * ipp_period);
  endtask

  initial begin
    #60ms;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int tgr0, gw0, cal0, blank0, gic0, tx0;
    rst = 0; onetick = 0; tentick = 0; cmd_strb = 0; cmd_word = '0;
    presets.txipp  = P_IPP;  presets.rxipp  = P_IPP;
    presets.gd     = P_GD;   presets.gw     = P_GW;
    presets.caldel = P_CD;   presets.calwth = P_CW;
    #1 rst = 1;
    #200 rst = 0;
    armed = 1;

    // ---- phase 1: radar mode, fixed clock, cal on, one-second tick, GW blanking
    send(mode_word(FIRST, SECOND, FIRST, FIRST, FIRST));
    check(selrdmode && selfixclk, "mode latched");
    send(IMM_START);
    wait_ipps(6.5);
    check(n_tx >= 6 && n_tx_bad == 0, $sformatf("TXIPP period, %0d ipps, %0d bad", n_tx, n_tx_bad));
    check(n_rx >= 6 && n_rx_bad == 0, "RXIPP period equals TXIPP period");
    check(n_tgr >= 6 && n_gd_bad == 0, $sformatf("gate delay, %0d bad", n_gd_bad));
    check(n_rdipp >= 5 && n_rdipp_bad == 0, "RDIPP 100 us");
    check(n_cal >= 5 && n_cd_bad == 0 && n_cw_bad == 0,
          $sformatf("cal delay/width, %0d cal, %0d/%0d bad", n_cal, n_cd_bad, n_cw_bad));
    check(n_gw_good > 50 && n_gw_long == 0, $sformatf("GW period, %0d good %0d long", n_gw_good, n_gw_long));
    check(n_blank > 0 && n_gw_in_cal == 0, "GW blanked during cal");
    check(status[19] == 1'b0 && n_st19 == 0, "TXIPP and RXIPP agree");
    check(status[18] == 1'b1, "gate delay flagged by comparator");

    // ---- phase 2: GW normal, pulses continue during cal
    gic0 = n_gw_in_cal;
    send(mode_word(NOP, NOP, NOP, NOP, SECOND));
    wait_ipps(2);
    check(n_gw_in_cal > gic0, "GW during cal with GW normal");

    // ---- phase 3: commands
    check(status[18:17] == 2'b11, "gate delay and gate width flagged");
    tx0 = n_st17_clr;
    send(CLR);
    #300;
    check(status[19:18] == '0 && status[16:15] == '0 && n_st17_clr > tx0,
          "clear command clears the status flags");
    n_clear++;
    send(REQ_STATUS); send(VERIF); send(UPDATE);
    check(n_reqstatus == 1 && n_verif == 1 && n_update == 1, "command pulses");

    // ---- phase 4: continuous mode
    send(mode_word(SECOND, NOP, NOP, NOP, NOP));
    check(!selrdmode, "continuous mode latched");
    wait_ipps(1.2);
    tgr0 = n_tgr; gw0 = n_gw; cal0 = n_cal; tx0 = n_tx;
    send(IMM_START);
    wait_ipps(4);
    check(n_tgr - tgr0 == 1, $sformatf("one RDIPP in continuous mode, got %0d", n_tgr - tgr0));
    check(n_tx - tx0 >= 3, "IPPs keep running in continuous mode");
    check(n_cal == cal0 && !cal, "CAL low in continuous mode");
    check(n_gw - gw0 > 300, "GW keeps running in continuous mode");
    n_cont++;

    // ---- phase 5: drifted clock, radar mode
    send(mode_word(FIRST, FIRST, NOP, NOP, FIRST));
    check(selrdmode && !selfixclk, "drifted clock latched");
    use_rx = 1; count_t = T_DRIFT; ipp_period = T_DRIFT * P_IPP;
    send(IMM_START);
    #1000;
    t_rx = -1; n_rx_bad = 0; n_gd_bad = 0; tgr0 = n_tgr; n_rdipp_bad = 0; n_cd_bad = 0; n_cw_bad = 0;
    n_gw_long = 0;
    wait_ipps(4);
    check(n_rx_bad == 0, "RXIPP period on the drifted clock");
    check(n_tgr - tgr0 >= 3 && n_gd_bad == 0, "gate delay follows RXIPP on the drifted clock");
    check(n_rdipp_bad == 0 && n_cd_bad == 0 && n_cw_bad == 0, "drifted RDIPP and cal timing");
    n_drift++;

    // ---- phase 6: time tick synchronisation, back on the fixed clock
    send(mode_word(NOP, SECOND, NOP, NOP, NOP));
    use_rx = 0; count_t = T_FIX; ipp_period = T_FIX * P_IPP;
    send(TT_ARM);
    #500;
    check(dut.ippholdoff && !rdipptgr, "IPP holdoff waits for the tick, gate delay held");
    tx0 = n_imm;
    #(3 * P_IPP * T_FIX);
    check(dut.ippholdoff && n_imm == tx0 && !rdipptgr, "still waiting without a tick");
    check(ritick == 1'b0, "no tick yet");
    onetick = 1;
    #400;
    check(n_imm == tx0 + 1 && !dut.ippholdoff, "start on the one-second tick");
    #1000 onetick = 0;
    t_tx = -1; n_tx_bad = 0; n_gd_bad = 0;
    wait_ipps(3);
    check(n_tx_bad == 0 && n_gd_bad == 0, "IPPs after time tick start");
    n_tick_sync++;

    // ---- every mechanism happened
    check(n_tx > 0 && n_rx > 0, "mechanism: IPP counters");
    check(n_tgr > 0 && n_rdipp > 0, "mechanism: gate delay / RDIPP");
    check(n_gw > 0 && n_blank > 0, "mechanism: GW and GW blanking");
    check(n_cal > 0, "mechanism: cal");
    check(n_cont > 0 && n_drift > 0 && n_tick_sync > 0 && n_imm > 0, "mechanism: modes and starts");
    check(n_st18 > 0 && n_clear > 0, "mechanism: timing test comparator and clear");
    check(n_update > 0 && n_reqstatus > 0 && n_verif > 0, "mechanism: command decodes");
    $display("ipps %0d  rdipp %0d  gw %0d  blanked %0d  cal %0d  starts %0d",
             n_tx, n_rdipp, n_gw, n_blank, n_cal, n_imm);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
