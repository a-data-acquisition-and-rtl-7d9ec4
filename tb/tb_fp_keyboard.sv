// tb_fp_keyboard: self-checking test of the keyboard and display circuit.
//
// Checks that the scan stops on a held numeric key with the key's value on
// K4..K1 whatever K5, that VALID drops and scanning resumes on release; that a
// prefix key sets FFLG and BIT FLAG and the scan then also needs K5 = BIT
// FLAG; that releasing the numeral clears FFLG; that a function key acts as its
// prefix + numeral, even when the scan already sits on its numeral; DX/CD pulses and CD cancelling a prefix; the CLR lock by
// the service switch; lamp gating; the message flip-flop; and the digit
// drive and seven-segment font (reference table written out here).
module tb_fp_keyboard;
  logic clk = 0, clr = 1;
  always #5 clk = ~clk;

  logic        scan_tick = 1;
  logic [15:0] num_key = 0;
  logic        prefix1_key = 0, prefix2_key = 0, dx_key = 0, cd_key = 0, clr_key = 0;
  logic [9:0]  fn_key = 0;
  logic        service_sw = 0, msg_set = 0, start = 0, tape = 1, key_state = 1, run = 0;
  logic [3:0]  cycle_ind = 4'b0101, flag_ind = 4'b1010;
  logic [3:0]  disp_bus = 0, mux_phase = 4'b0001;
  logic        blank = 0;
  logic [4:0]  kbus;
  logic        valid, fflg, bit_flag, dx, cd, sys_clr;
  logic [3:0]  cycle_lamp, flag_lamp, digit_en;
  logic        pwr_lamp, msg_lamp, keybd_lamp, run_lamp, tape_lamp, prefix_lamp;
  logic [6:0]  seg;
  int checks = 0, failures = 0;

  // Function key 3 (DPC) is prefix II, numeral 6 here, to test the K5 path.
  fp_keyboard #(.FKEY_CODE('{5'h00, 5'h01, 5'h02, 5'h16, 5'h04,
                             5'h05, 5'h06, 5'h07, 5'h08, 5'h09})) dut (.*);

  localparam logic [6:0] FONT [16] = '{7'h3F, 7'h06, 7'h5B, 7'h4F, 7'h66, 7'h6D, 7'h7D, 7'h07,
                                       7'h7F, 7'h6F, 7'h77, 7'h7C, 7'h39, 7'h5E, 7'h79, 7'h71};

  task automatic check(input string what, input logic ok);
    checks++;
    if (ok !== 1'b1) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask
  task automatic tick(input int n = 1);
    repeat (n) @(posedge clk); #1;
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    tick(2); clr = 0;
    check("no VALID with no key", !valid && !fflg);
    // Function key 0 (code 00) pressed while the scan sits on numeral 0:
    // VALID must never come without FFLG.
    n = 0;
    fn_key[0] = 1; #1;
    for (int i = 0; i < 80 && !(valid && fflg); i++) begin
      if (valid && !fflg) n++;
      tick();
    end
    check("function key on the scanned numeral is not a numeric entry", n == 0);
    check("function key on the scanned numeral is a function keystroke", valid && fflg && kbus == 5'h00);
    tick(2); fn_key[0] = 0; tick(3);
    // Numeric key 9.
    num_key[9] = 1; tick(40);
    check("scan stops on key 9", valid && kbus[3:0] === 4'd9 && !fflg);
    tick(10);
    check("scan held while key down", valid && kbus[3:0] === 4'd9);
    num_key[9] = 0; tick(3);
    check("VALID drops and scan resumes on release", !valid && kbus[3:0] !== 4'd9);

    // Prefix II then numeral 3: VALID only with K5 = 1.
    prefix2_key = 1; tick(2); prefix2_key = 0; tick(1);
    check("prefix II sets FFLG and BIT FLAG", fflg && bit_flag && prefix_lamp);
    num_key[3] = 1; n = 0;
    while (!valid && n < 80) begin tick(); n++; end
    check("function code II-3 on the keyboard bus", valid && kbus === 5'h13);
    tick(3);
    check("FFLG held while the numeral is down", fflg && valid);
    num_key[3] = 0; tick(2);
    check("releasing the numeral clears FFLG", !fflg && !valid);

    // Prefix I then numeral 3: K5 = 0.
    prefix1_key = 1; tick(2); prefix1_key = 0; tick(1);
    check("prefix I clears BIT FLAG", fflg && !bit_flag);
    num_key[3] = 1; n = 0;
    while (!valid && n < 80) begin tick(); n++; end
    check("function code I-3", valid && kbus === 5'h03);
    num_key[3] = 0; tick(2);

    // Function key 3 = II-6.
    fn_key[3] = 1; n = 0; tick(1);
    while (!valid && n < 80) begin tick(); n++; end
    check("function key behaves as II-6", valid && fflg && kbus === 5'h16);
    tick(3); fn_key[3] = 0; tick(2);
    check("function key release ends the sequence", !valid && !fflg);

    // CD cancels a prefix and pulses; DX pulses once.
    prefix1_key = 1; tick(2); prefix1_key = 0;
    cd_key = 1; #1;
    check("CD pulse", cd);
    tick(1);
    check("CD cancels the prefix", !fflg);
    tick(2);
    check("CD pulse is one clock", !cd);
    cd_key = 0; dx_key = 1; #1;
    check("DX pulse", dx);
    tick(2);
    check("DX pulse is one clock", !dx);
    dx_key = 0;

    // CLR key and service switch; lamp gating.
    clr_key = 1; #1;
    check("CLR locked without the service switch", !sys_clr);
    check("Cycle/Flag lamps dark without the switch", cycle_lamp === 0 && flag_lamp === 0);
    service_sw = 1; #1;
    check("CLR acts with the service switch", sys_clr);
    check("Cycle/Flag lamps lit with the switch", cycle_lamp === 4'b0101 && flag_lamp === 4'b1010);
    clr_key = 0; service_sw = 0;
    check("system status lamps", pwr_lamp && tape_lamp && keybd_lamp && !run_lamp);

    // Message flip-flop.
    msg_set = 1; tick(); msg_set = 0; tick();
    check("MSG lamp set", msg_lamp);
    start = 1; tick(); start = 0; tick();
    check("START clears MSG lamp", !msg_lamp);

    // Digits.
    for (int v = 0; v < 16; v++) begin
      disp_bus = 4'(v); mux_phase = 4'b1 << (v % 4); #1;
      check("segment font", seg === FONT[v] && digit_en === mux_phase);
    end
    blank = 1; #1;
    check("BLANK turns all digits off", digit_en === 4'b0000);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
