// tb_fp_display_mux: self-checking test of the display multiplexer.
//
// Checks numeric entry into the Keyboard Display Register and the KEY state,
// the Switch Bus digits, function keystrokes producing the expected
// miniprogram address and a one-clock LOAD, LOAD held back while BUSY and
// cancelled by SEQ, the EQUAL signal, no LOAD for an unassigned code, CD,
// the DX cycle of display states, the halt and run transitions, and the
// Display Bus and BLANK in each state and phase.
module tb_fp_display_mux;
  import dars_pkg::*;

  logic clk = 0, clr = 1;
  always #5 clk = ~clk;

  logic        mux_tick = 0, valid = 0, fflg = 0, bit_flag = 0, dx = 0, cd = 0;
  logic        busy = 0, seq = 0, run = 0;
  logic [4:0]  kbus = 0;
  logic [15:0] adr_reg = 16'h2A5C;
  logic [7:0]  d_reg = 8'h9E;
  logic        equal, load, start, blank;
  logic [7:0]  mu_addr;
  logic [15:0] kdr;
  logic [3:0]  sw_digit, mux_phase, disp_bus;
  logic [1:0]  sw_phase, phase;
  disp_state_t disp_state;
  int checks = 0, failures = 0, n_load = 0;

  fp_display_mux dut (.*);

  always @(posedge clk) if (load) n_load++;

  task automatic check(input string what, input logic ok);
    checks++;
    if (ok !== 1'b1) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask
  task automatic tick(input int n = 1);
    repeat (n) @(posedge clk); #1;
  endtask
  task automatic stroke(input logic f, input logic [4:0] k);
    fflg = f; kbus = k; valid = 1; tick(3); valid = 0; tick(2);
  endtask
  task automatic pulse_dx();
    dx = 1; tick(); dx = 0; tick();
  endtask
  task automatic step_phase();
    mux_tick = 1; tick(); mux_tick = 0; #1;
  endtask

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    tick(2); clr = 0;
    check("blank after clear", disp_state === DS_BLANK && blank);
    stroke(0, 5'h17); stroke(0, 5'h0C); stroke(0, 5'h00); stroke(0, 5'h09);
    check("KDR shifts in digits (K5 ignored)", kdr === 16'h7C09);
    check("numeric entry selects KEY", disp_state === DS_KEY);
    for (int p = 0; p < 4; p++) begin
      check("phase one-hot", mux_phase === (4'b1 << phase));
      check("KEY display and switch bus digit",
            disp_bus == kdr[4*phase +: 4] && sw_digit == kdr[4*phase +: 4] && sw_phase == phase && !blank);
      step_phase();
    end

    // Function keystroke I-4 (LDA at 10h).
    bit_flag = 0; n_load = 0;
    stroke(1, 5'h04);
    check("EQUAL when K5 matches BIT FLAG", equal);
    check("LOAD with LDA address", n_load === 1 && mu_addr === 8'h10);
    check("function keystroke leaves KDR alone", kdr === 16'h7C09);
    // While BUSY, LOAD waits.
    busy = 1; n_load = 0;
    stroke(1, 5'h05);
    tick(5);
    check("LOAD held while BUSY", n_load === 0);
    busy = 0; tick(2);
    check("LOAD issued after BUSY ends", n_load === 1 && mu_addr === 8'h14);
    // SEQ cancels.
    busy = 1; n_load = 0; stroke(1, 5'h00); seq = 1; tick(); seq = 0; busy = 0; tick(3);
    check("SEQ cancels LOAD", n_load === 0);
    // Unassigned code.
    stroke(1, 5'h1F); tick(2);
    check("no LOAD for unassigned code", n_load === 0);
    bit_flag = 1; kbus = 5'h04; #1;
    check("EQUAL false when K5 differs", !equal);

    // DX cycle KEY -> D -> ADR -> BLANK -> KEY.
    pulse_dx();
    check("DX to D", disp_state === DS_D);
    for (int p = 0; p < 4; p++) begin
      if (phase < 2) check("D digits on M1 M2", !blank && disp_bus === d_reg[4*phase +: 4]);
      else           check("M3 M4 blank in D state", blank);
      step_phase();
    end
    pulse_dx();
    check("DX to ADR", disp_state === DS_ADR);
    for (int p = 0; p < 4; p++) begin
      check("address digits", !blank && disp_bus === adr_reg[4*phase +: 4]);
      step_phase();
    end
    pulse_dx();
    check("DX to BLANK", disp_state === DS_BLANK && blank);
    pulse_dx();
    check("DX back to KEY", disp_state === DS_KEY);

    // Run and halt transitions.
    run = 1; #1;
    check("START on halt-to-run", start);
    tick();
    check("run selects BLANK", disp_state === DS_BLANK && !start);
    run = 0; tick();
    check("halt selects ADR", disp_state === DS_ADR);
    cd = 1; tick(); cd = 0; tick();
    check("CD clears KDR and selects KEY", kdr === 16'h0000 && disp_state === DS_KEY);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
