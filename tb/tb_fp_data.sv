// tb_fp_data: self-checking test of the front panel data circuit.
//
// Drives the enables and bus states the control circuit and the processor
// would produce, and checks each microinstruction class against the document's
// definitions: instruction bytes on the D Bus under INSTENB; G0, GHS, GLS and
// RRST gating in T3; LREG and RSAV loading the Save Register; FSAV taking the
// low D Bus bits in T4; FRST putting the flags on the low L Bus bits with DMA;
// DENB and ADRENB loads; the LASTENB, INSTP, MCLR and EXT11 strobes; the
// Address Register following fetches when idle; and the digit-by-digit
// Switch Register refresh. Expected ROM bytes are written out here from the
// miniprogram listing, not read from the package.
module tb_fp_data;
  import dars_pkg::*;

  logic clk = 0, clr = 1;
  always #5 clk = ~clk;

  cpu_state_t  state = S_STOP;
  cycle_t      cycle = CYC_INST;
  logic [7:0]  mar = 0;
  logic        instenb = 0, contenb = 0, busy = 0;
  logic [7:0]  d_bus = 8'hFF;
  logic [13:0] hl_bus = '0;
  logic [3:0]  sw_digit = 0;
  logic [1:0]  sw_phase = 0;
  logic [7:0]  d_out;
  logic        d_drive;
  logic [13:0] hl_out;
  logic        dma, lastenb, instp, mclr, msg;
  logic [2:0]  ext_unused;
  logic [15:0] adr_reg, switch_reg;
  logic [7:0]  d_reg, save_reg;
  logic [3:0]  flag_reg;
  int checks = 0, failures = 0;

  fp_data dut (.*);

  task automatic check(input string what, input logic ok);
    checks++;
    if (ok !== 1'b1) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  task automatic tick();
    @(posedge clk); #1;
  endtask

  // Load the switch register with v through the Switch Bus.
  task automatic set_switch(input logic [15:0] v);
    for (int i = 0; i < 4; i++) begin
      sw_phase = 2'(i); sw_digit = v[4*i +: 4]; tick();
    end
  endtask

  initial begin
    repeat (300) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic lst, ip, mc, ms;
    repeat (2) tick();
    clr = 0;
    set_switch(16'hBEEF);
    check("switch register refreshed by digits", switch_reg === 16'hBEEF);

    // Instruction bytes: HALT program begins F8 15 41 27 00.
    busy = 1; instenb = 1; cycle = CYC_INST; state = S_T3;
    mar = 8'h00; #1; check("instruction byte 00: F8", d_out === 8'hF8 && d_drive);
    mar = 8'h02; #1; check("instruction byte 02: 41", d_out === 8'h41);
    mar = 8'h24; #1; check("instruction byte 24 (LPC): 44", d_out === 8'h44);
    instenb = 0; #1;
    check("bus released without enables", d_out === 8'hFF && !d_drive && hl_out === 14'h3FFF);

    // GLS (LPC byte 25 = 03) in T3 of a read cycle.
    contenb = 1; cycle = CYC_READ;
    mar = 8'h25; state = S_T2; #1;
    check("no gating outside T3", d_out === 8'hFF);
    state = S_T3; #1;
    check("GLS gates low switch byte", d_out === 8'hEF && d_drive);
    mar = 8'h26; #1;  // GHS + LASTENB
    check("GHS gates high switch byte and LASTENB strobes", d_out === 8'hBE && lastenb);
    mar = 8'h19; #1;  // GHS alone
    check("no LASTENB without the bit", d_out === 8'hBE && !lastenb);

    // LREG (LDA byte 11 = 24) loads Save from the low switch byte.
    mar = 8'h11; tick();
    check("LREG loads Save Register from switches", save_reg === 8'hEF);
    // RSAV + DMA (HALT byte 01 = 15) loads Save from the D Bus.
    cycle = CYC_WRITE; mar = 8'h01; d_bus = 8'h5A; #1;
    check("DMA active with RSAV", dma);
    tick();
    check("RSAV loads Save Register from D Bus", save_reg === 8'h5A);
    // RRST + DENB (DA byte 15 = A6).
    cycle = CYC_READ; mar = 8'h15; #1;
    check("RRST gates Save Register", d_out === 8'h5A);
    d_bus = d_out; tick();
    check("DENB loads D Register from D Bus", d_reg === 8'h5A);
    // FSAV (HALT byte 03 = 27) in T4 of an I/O cycle.
    cycle = CYC_IO; mar = 8'h03; state = S_T3; d_bus = 8'hF9; tick();
    check("FSAV waits for T4", flag_reg === 4'h0);
    state = S_T4; tick();
    check("FSAV takes low D Bus bits in T4", flag_reg === 4'h9);
    // FRST + DMA (RUN byte 09 = 18).
    cycle = CYC_READ; mar = 8'h09; state = S_T2; #1;
    check("FRST drives flags on low L Bus with DMA", hl_out === 14'h3FF9 && dma);
    // ADRENB + LASTENB (DHL byte 21 = 60).
    mar = 8'h21; hl_bus = 14'h1234; state = S_T3; tick();
    check("ADRENB loads Address Register from HL Bus", adr_reg === 16'h1234);
    // Strobes: EXT11 (MSG byte 35 = 2B), MCLR (39 = 2F), INSTP (STEP 40 = 0A).
    mar = 8'h35; #1; ms = msg;
    mar = 8'h39; #1; mc = mclr;
    mar = 8'h40; #1; ip = instp;
    check("EXT11, MCLR and INSTP strobes", ms && mc && ip);
    state = S_T2; #1;
    check("strobes only in T3", !msg && !mclr && !instp && !lastenb);
    // G0 through LD? LD byte 49 = A3: GLS + DENB + LASTENB.
    state = S_T3; mar = 8'h49; #1;
    check("LD gates low switch byte", d_out === 8'hEF && lastenb);

    // Idle: Address Register follows fetch addresses.
    contenb = 0; busy = 0; cycle = CYC_INST; hl_bus = 14'h0ABC; tick();
    check("Address Register follows program counter when idle", adr_reg === 16'h0ABC);
    busy = 1; hl_bus = 14'h0123; tick();
    check("Address Register holds during panel operations", adr_reg === 16'h0ABC);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
