// tb_dars_top: end-to-end test of the DARS digital core at its default
// parameters, with a behavioural 8008 on the processor bus.
//
// An operator session is played on the front panel keys and a small program is
// placed in memory. The test checks, against values worked out here from the
// 8008's instruction semantics:
//   numeric entry into the Switch Register and KEY display state; LDA, DA,
//   LPC, RUN and HALT from function keys; the single step and message
//   functions from two-key sequences; saving and restoring the accumulator and
//   the flags across HALT/RUN (flag-restore table reached with DMA); the DX
//   display cycling and the D-state digit blanking; a panel operation started
//   by the processor (OUT 20 octal) and the conditional-halt rule; MASK
//   clearing by MCLR then PRST and the blocking of port interrupts while MASK is
//   set; an output and an input handshake through the DAS port and the
//   isolation delay; CD clearing, and the CLR key locked by the service switch.
// Each of these mechanisms is counted; one that never happened is a failure.
module tb_dars_top;
  import dars_pkg::*;

  localparam int ISO_DELAY = 8;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  cpu_state_t  cpu_state;
  cycle_t      cpu_cycle;
  logic [13:0] cpu_hl, hl_bus;
  logic [7:0]  cpu_d_out, d_bus;
  logic        cpu_int, sys_clr, port_int_req, rtc_tick;
  logic [15:0] num_key = '0;
  logic        prefix1_key = 0, prefix2_key = 0, dx_key = 0, cd_key = 0, clr_key = 0;
  logic        service_sw = 0, tape = 0, prin = 1;
  logic [9:0]  fn_key = '0;
  logic [3:0]  cycle_lamp, flag_lamp, digit_en;
  logic        pwr_lamp, msg_lamp, keybd_lamp, run_lamp, tape_lamp, prefix_lamp;
  logic [6:0]  seg;
  logic [7:0]  das_out_data, das_in_data = 8'h00;
  logic        das_outrdy_n, das_outacc_n = 1, das_inprdy_n = 1, das_inpacc;
  logic [3:0]  das_ext_ctl, cas_ext_ctl;
  logic [5:0]  das_ext_sense = 6'h2A, cas_ext_sense = '0;
  logic [7:0]  cas_out_data, cas_in_data = '0;
  logic        cas_outrdy, cas_outacc_n = 1, cas_inprdy = 0, cas_inpacc;
  logic        fp_busy, fp_mask;
  logic [15:0] fp_adr_reg, fp_switch_reg;
  logic [7:0]  fp_d_reg, fp_save_reg;
  disp_state_t fp_disp_state;

  int checks = 0, failures = 0;

  dars_top dut (.*);

  cpu8008_model cpu (
    .clk, .rst (rst || sys_clr), .d_bus, .int_req (cpu_int),
    .state (cpu_state), .cycle (cpu_cycle), .hl (cpu_hl), .d_out (cpu_d_out)
  );

  // ---------------------------------------------------------------- helpers
  task automatic check(input string what, input logic ok);
    checks++;
    if (ok !== 1'b1) begin
      failures++;
      $display("FAIL: %s  (t=%0t)", what, $time);
    end
  endtask

  task automatic clocks(input int n);
    repeat (n) @(posedge clk);
    #2;
  endtask

  localparam int HOLD = 1200;   // longer than a full keyboard scan (32 x 16)

  task automatic key_num(input int k);
    num_key[k] = 1'b1; clocks(HOLD);
    num_key[k] = 1'b0; clocks(100);
  endtask

  task automatic key_fn(input int f);
    fn_key[f] = 1'b1; clocks(HOLD);
    fn_key[f] = 1'b0; clocks(200);
  endtask

  task automatic key_seq(input logic two, input int k);
    if (two) prefix2_key = 1'b1; else prefix1_key = 1'b1;
    clocks(20);
    prefix1_key = 1'b0; prefix2_key = 1'b0;
    clocks(20);
    key_num(k);
    clocks(100);
  endtask

  task automatic wait_halted(input string what);
    int n = 0;
    while (!(cpu_state == S_STOP && !fp_busy) && n < 5000) begin clocks(1); n++; end
    check({what, ": processor back in STOP"}, cpu_state === S_STOP && !fp_busy);
  endtask

  // ------------------------------------------------------ mechanism counters
  int n_numeric = 0, n_fnop = 0, n_seqop = 0, n_cpuop = 0, n_condhalt_skip = 0;
  int n_step = 0, n_flag_restore = 0, n_mask_clear = 0, n_iso_delay = 0;
  int n_out_hs = 0, n_in_hs = 0, n_int_block = 0, n_dx = 0, n_msg = 0, n_dma = 0;
  int n_busy_ops = 0, n_cd = 0, n_clr_lock = 0, n_rtc = 0;

  logic busy_q = 0;
  always @(posedge clk) begin
    busy_q <= fp_busy;
    if (fp_busy && !busy_q) n_busy_ops++;
    if (dut.dma && cpu_cycle == CYC_READ && cpu_state == S_T3 && hl_bus[13:4] == 10'h3FF) n_dma++;
  end

  // Real-time clock monitor: clock count from the start write to the request.
  int rtc_start_t = 0, rtc_done_t = 0, rtc_ticks = 0, clk_n = 0;
  always @(posedge clk) begin
    clk_n++;
    if (rst) rtc_done_t = 0;
    else if (dut.u_rtc.running && rtc_start_t == 0) rtc_start_t = clk_n;
    if (rtc_start_t != 0 && rtc_done_t == 0 && rtc_tick) rtc_ticks++;
    if (!rst && rtc_start_t != 0 && dut.u_rtc.int_req && rtc_done_t == 0) rtc_done_t = clk_n;
  end

  // Seven-segment reference font, worked out independently.
  function automatic logic [6:0] font(input logic [3:0] v);
    logic [6:0] t [16] = '{7'h3F, 7'h06, 7'h5B, 7'h4F, 7'h66, 7'h6D, 7'h7D, 7'h07,
                           7'h7F, 7'h6F, 7'h77, 7'h7C, 7'h39, 7'h5E, 7'h79, 7'h71};
    return t[v];
  endfunction

  // Reference flags of x + x for the 8008: {S, Z, P, C}.
  function automatic logic [3:0] dbl_flags(input logic [7:0] x);
    logic [8:0] s9;
    s9 = {1'b0, x} + {1'b0, x};
    return {s9[7], s9[7:0] == 0, ~^s9[7:0], s9[8]};
  endfunction

  // Capture the four displayed digits over one multiplex round.
  task automatic read_display(output logic [6:0] dig [4], output logic [3:0] lit);
    lit = '0;
    for (int i = 0; i < 4; i++) dig[i] = '0;
    for (int n = 0; n < 4 * 64 + 8; n++) begin
      for (int i = 0; i < 4; i++)
        if (digit_en[i]) begin dig[i] = seg; lit[i] = 1'b1; end
      clocks(1);
    end
  endtask

  // ---------------------------------------------------------------- program
  // 0100: LAI 81h ; ADA ; LAI A5h ; OUT 9 ; JMP 0106h
  // 0200: LAI 14h ; OUT 16 (panel DA) ; JMP 0203h
  // 0300: OUT 17 (PRST) ; LAI 00h ; OUT 16 (conditional halt) ; LAI 02h ;
  //       OUT 10 (port control: input interrupt enable) ; INP 1 ; LBA ; JMP 030Bh
  // 0400: LAI 02h ; OUT 13 (clock count) ; LAI 80h ; OUT 14 (start, 1 ms range) ;
  //       JMP 0406h
  initial begin
    automatic logic [7:0] prog1 [9]  = '{8'h06, 8'h81, 8'h80, 8'h06, 8'hA5, 8'h53, 8'h44, 8'h06, 8'h01};
    automatic logic [7:0] prog2 [6]  = '{8'h06, 8'h14, 8'h61, 8'h44, 8'h03, 8'h02};
    automatic logic [7:0] prog4 [9]  = '{8'h06, 8'h02, 8'h5B, 8'h06, 8'h80, 8'h5D, 8'h44, 8'h06, 8'h04};
    automatic logic [7:0] prog3 [14] = '{8'h63, 8'h06, 8'h00, 8'h61, 8'h06, 8'h02, 8'h55,
                                         8'h43, 8'hC8, 8'h44, 8'h09, 8'h03, 8'h00, 8'h00};
    #1;
    for (int i = 0; i < 9; i++)  dut.u_mem.ram[16'h0100 + i] = prog1[i];
    for (int i = 0; i < 6; i++)  dut.u_mem.ram[16'h0200 + i] = prog2[i];
    for (int i = 0; i < 14; i++) dut.u_mem.ram[16'h0300 + i] = prog3[i];
    for (int i = 0; i < 9; i++)  dut.u_mem.ram[16'h0400 + i] = prog4[i];
  end

  // DAS output device: accepts each byte some clocks after DAS OUTRDY falls.
  logic [7:0] das_rx;
  int         outrdy_rise_t = 0;
  always @(posedge dut.u_das_port.outrdy) outrdy_rise_t = $time;
  initial begin
    forever begin
      @(negedge das_outrdy_n);
      check("isolation delays OUTRDY by ISO_DELAY clocks",
            ($time - outrdy_rise_t) / 10 >= ISO_DELAY && ($time - outrdy_rise_t) / 10 <= ISO_DELAY + 2);
      n_iso_delay++;
      das_rx = das_out_data;
      repeat (5) @(posedge clk);
      #2 das_outacc_n = 1'b0;
      repeat (2) @(posedge clk);
      #2 das_outacc_n = 1'b1;
      @(posedge clk); #2;
      check("OUTRDY released at once on acceptance", das_outrdy_n === 1'b1);
      n_out_hs++;
    end
  end

  // Watchdog.
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------- the session
  initial begin
    logic [6:0] dig [4];
    logic [3:0] lit, fl;

    int fetch0;

    clocks(5);
    rst = 0;
    clocks(20);
    check("display blank after clear", fp_disp_state === DS_BLANK && digit_en === 4'b0000);
    check("PWR lamp on", pwr_lamp);

    // Numeric entry 1 2 3 4.
    key_num(1); key_num(2); key_num(3); key_num(4);
    n_numeric += 4;
    clocks(300);
    check("switch register 1234", fp_switch_reg === 16'h1234);
    check("KEY display state and KEYBD lamp", fp_disp_state === DS_KEY && keybd_lamp);
    read_display(dig, lit);
    check("display shows 1 2 3 4 (M4..M1)",
          lit == 4'b1111 && dig[3] == font(1) && dig[2] == font(2) && dig[1] == font(3) && dig[0] == font(4));

    // LDA: Save Register <- low switch byte.
    key_fn(4); wait_halted("LDA"); n_fnop++;
    check("LDA loads Save Register with 34", fp_save_reg === 8'h34);
    // DA: D Register <- Save Register, accumulator restored from it.
    key_fn(5); wait_halted("DA"); n_fnop++;
    check("DA copies Save Register to D Register", fp_d_reg === 8'h34);
    check("DA leaves the accumulator equal to the Save Register", cpu.r[0] === 8'h34);
    check("panel operations do not advance the program counter", cpu.pc === 14'h0000);

    // DX: KEY -> D; the D Register shows on M1/M2 only.
    dx_key = 1; clocks(5); dx_key = 0; clocks(5); n_dx++;
    check("DX steps to the D state", fp_disp_state === DS_D);
    read_display(dig, lit);
    check("D state shows 34 on M2 M1 and blanks M4 M3",
          lit == 4'b0011 && dig[1] == font(3) && dig[0] == font(4));
    dx_key = 1; clocks(5); dx_key = 0; clocks(5); n_dx++;
    check("DX steps to the ADR state", fp_disp_state === DS_ADR);

    // CD clears the Switch Register; then enter 0100 and load the PC.
    cd_key = 1; clocks(5); cd_key = 0; clocks(300); n_cd++;
    check("CD clears the Switch Register", fp_switch_reg === 16'h0000 && fp_disp_state === DS_KEY);
    key_num(1); key_num(0); key_num(0); n_numeric += 3;
    clocks(300);
    check("switch register 0100", fp_switch_reg === 16'h0100);
    key_fn(2); wait_halted("LPC"); n_fnop++;
    check("LPC sets the program counter to 0100", cpu.pc === 14'h0100);

    // Restore A from Save (34) on RUN; program sets A5 and outputs it.
    check("MASK still set after panel operations", fp_mask);
    key_fn(0); n_fnop++;
    clocks(400);
    check("RUN: processor executing", cpu_state !== S_STOP && run_lamp);
    check("RUN: display blanked", fp_disp_state === DS_BLANK);
    check("DAS device received A5", das_rx === 8'hA5);

    // HALT while running: accumulator and flags saved.
    key_fn(1); wait_halted("HALT"); n_fnop++;
    fl = dbl_flags(8'h81);
    check("HALT saves the accumulator (A5)", fp_save_reg === 8'hA5);
    check("HALT saves the flags of 81h + 81h", dut.u_data.flag_reg === fl);
    check("HALT selects the ADR display state", fp_disp_state === DS_ADR);
    check("Address Register holds the loop address",
          fp_adr_reg >= 16'h0106 && fp_adr_reg <= 16'h0108);
    service_sw = 1; clocks(2);
    check("Flag lamps follow the Flag Register with the service switch closed", flag_lamp === fl);
    service_sw = 0; clocks(2);
    check("Flag lamps dark with the service switch open", flag_lamp === 4'b0000);

    // Spoil A and flags inside the processor model, then RUN must restore them.
    cpu.r[0] = 8'h00; cpu.fc = 0; cpu.fz = 1; cpu.fs = 1; cpu.fp = 1;
    key_fn(0); n_fnop++;
    clocks(5);
    begin
      int n = 0;
      while (fp_busy && n < 2000) begin clocks(1); n++; end
    end
    check("RUN restores the accumulator", cpu.r[0] === 8'hA5);
    check("RUN restores the flags", {cpu.fs, cpu.fz, cpu.fp, cpu.fc} === fl);
    if (cpu.r[0] == 8'hA5 && {cpu.fs, cpu.fz, cpu.fp, cpu.fc} == fl) n_flag_restore++;
    key_fn(1); wait_halted("HALT 2"); n_fnop++;

    // Single step (prefix I, numeral A): exactly one program instruction.
    fetch0 = cpu.n_fetch;
    key_seq(1'b0, 10); wait_halted("STEP"); n_seqop++;
    check("single step runs one program instruction", cpu.n_fetch - fetch0 === 1);
    if (cpu.n_fetch - fetch0 == 1) n_step++;
    check("single step flip-flop cleared", !dut.u_ctl.single_step);

    // Message lamp (prefix I, numeral B), cleared when the processor starts.
    key_seq(1'b0, 11); wait_halted("MSG"); n_seqop++;
    check("MSG lamp on", msg_lamp);
    if (msg_lamp) n_msg++;

    // Processor-initiated DA: program 0200 loads 14h and executes OUT 20(8).
    cpu.pc = 14'h0200;
    dut.u_data.save_reg = 8'h5C;
    key_fn(0); n_fnop++;
    begin
      int n = 0;
      while (!(cpu_state == S_STOP && !fp_busy) && n < 5000) begin clocks(1); n++; end
    end
    check("MSG lamp reset by START", !msg_lamp);
    check("processor-initiated DA loaded the D Register", fp_d_reg === 8'h5C);
    check("processor halted by the DA miniprogram", cpu_state === S_STOP);
    if (fp_d_reg == 8'h5C) n_cpuop++;

    // MCLR (prefix I, numeral C), then program 0300: PRST clears MASK, the
    // conditional halt is skipped, and the port interrupt passes the chain.
    key_seq(1'b0, 12); wait_halted("MCLR"); n_seqop++;
    check("MASK still set after MCLR alone", fp_mask);
    das_in_data = 8'h3C;
    das_inprdy_n = 0; clocks(ISO_DELAY + 6); das_inprdy_n = 1; clocks(2);
    check("INPACC on the DAS bus after INPRDY", das_inpacc);
    cpu.pc = 14'h0300;
    key_fn(0); n_fnop++;
    clocks(300);
    check("PRST cleared MASK after MCLR", !fp_mask);
    if (!fp_mask) n_mask_clear++;
    check("conditional halt with MASK clear is ignored", cpu_state !== S_STOP);
    if (cpu_state != S_STOP) n_condhalt_skip++;
    check("program read the DAS input byte", cpu.r[1] === 8'h3C);
    check("INPACC on the DAS bus drops when the processor takes the byte", !das_inpacc);
    if (cpu.r[1] == 8'h3C && !das_inpacc) n_in_hs++;
    // A new input raises the port interrupt, which now passes the chain.
    das_in_data = 8'h77;
    das_inprdy_n = 0; clocks(ISO_DELAY + 6); das_inprdy_n = 1; clocks(2);
    check("port interrupt passes with MASK clear", port_int_req);
    // HALT sets MASK again, which blocks the interrupt.
    key_fn(1); wait_halted("HALT 3"); n_fnop++;
    check("port interrupt blocked while MASK is set", !port_int_req && dut.u_das_port.int_req);
    if (!port_int_req && dut.u_das_port.int_req) n_int_block++;

    // CLR key: locked out without the service switch, effective with it.
    clr_key = 1; clocks(3); clr_key = 0; clocks(3);
    check("CLR locked out by the service switch", fp_switch_reg === 16'h0100);
    if (fp_switch_reg == 16'h0100) n_clr_lock++;
    service_sw = 1; clr_key = 1; clocks(3); clr_key = 0; service_sw = 0; clocks(3);
    check("CLR with the service switch clears the panel",
          fp_switch_reg == 16'h0000 && fp_save_reg == 8'h00 && !fp_mask);

    // Real-time clock: the program at 0400 starts a 2 x 1 ms interval.
    cpu.pc = 14'h0400;
    key_fn(0); n_fnop++;
    clocks(600);
    check("program started the real-time clock", rtc_start_t > 0);
    check($sformatf("clock interval 2 ms = %0d clocks (got %0d)", 2 * 250, rtc_done_t - rtc_start_t),
          rtc_done_t - rtc_start_t === 2 * 250);
    check("1 ms time base ticked twice in the interval", rtc_ticks === 2);
    check("clock request blocked while MASK is set", dut.u_rtc.int_req && !port_int_req);
    if (rtc_done_t - rtc_start_t == 2 * 250 && rtc_ticks == 2) n_rtc++;
    key_fn(1); wait_halted("HALT 4"); n_fnop++;

    check("no unknown opcodes executed", cpu.n_unknown === 0);

    // Mechanism coverage.
    check("numeric entry happened", n_numeric > 0);
    check("function-key operations happened", n_fnop > 0);
    check("two-key operations happened", n_seqop > 0);
    check("processor-initiated operation happened", n_cpuop > 0);
    check("conditional halt skip happened", n_condhalt_skip > 0);
    check("single step happened", n_step > 0);
    check("flag restore happened", n_flag_restore > 0);
    check("DMA flag-table access happened", n_dma > 0);
    check("MASK clear happened", n_mask_clear > 0);
    check("isolation delay happened", n_iso_delay > 0);
    check("output handshake happened", n_out_hs > 0);
    check("input handshake happened", n_in_hs > 0);
    check("interrupt blocking happened", n_int_block > 0);
    check("DX stepping happened", n_dx > 0);
    check("message lamp happened", n_msg > 0);
    check("CD happened", n_cd > 0);
    check("CLR lock-out happened", n_clr_lock > 0);
    check("real-time clock interval happened", n_rtc > 0);
    $display("mechanisms: numeric=%0d fnop=%0d seqop=%0d cpuop=%0d condhalt_skip=%0d step=%0d flag_restore=%0d dma=%0d mask_clear=%0d iso_delay=%0d out_hs=%0d in_hs=%0d int_block=%0d dx=%0d msg=%0d cd=%0d clr_lock=%0d rtc=%0d panel_ops=%0d",
             n_numeric, n_fnop, n_seqop, n_cpuop, n_condhalt_skip, n_step, n_flag_restore, n_dma,
             n_mask_clear, n_iso_delay, n_out_hs, n_in_hs, n_int_block, n_dx, n_msg, n_cd,
             n_clr_lock, n_rtc, n_busy_ops);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
