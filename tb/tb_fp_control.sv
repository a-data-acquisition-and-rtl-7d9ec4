// tb_fp_control: self-checking test of the front panel control circuit.
//
// Plays processor bus cycles by hand (one clock per timing state) and checks
// the flip-flop sequence the control circuit must follow: LOAD sets BUSY and
// MASK and loads the address, INT follows BUSY when priority is held, the first
// T1I sets INSTRUCTION, the address counts once per processor cycle, CONTROL
// comes one cycle later and CONTENB only on non-fetch cycles, INSTENB only in
// T3 of fetch cycles, LAST clears INT in T2 and BUSY in T3 of the final fetch,
// MASK survives until PRST after MCLR, the conditional halt rule, no INT
// without priority, and the single-step trigger.
module tb_fp_control;
  import dars_pkg::*;

  logic clk = 0, clr = 1;
  always #5 clk = ~clk;

  cpu_state_t state = S_STOP;
  cycle_t     cycle = CYC_INST;
  logic load = 0, special = 0, lastenb = 0, instp = 0, mclr = 0, prst = 0, prin = 1;
  logic [7:0] mu_addr_bus = 8'h00, l_bus = 8'h00;
  logic [7:0] mar;
  logic busy, mask, int_req, prio_out, instenb, contenb, single_step;
  int checks = 0, failures = 0;
  int n_instenb = 0, n_contenb = 0;

  fp_control dut (.*);

  task automatic check(input string what, input logic ok);
    checks++;
    if (ok !== 1'b1) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  // Present one timing state for one clock; optional strobes during it.
  task automatic st(input cpu_state_t s, input cycle_t c, input logic le = 0);
    state = s; cycle = c; lastenb = le;
    @(negedge clk);
    if (instenb) n_instenb++;
    if (contenb) n_contenb++;
    @(posedge clk); #1;
    lastenb = 0;
  endtask

  task automatic cyc(input logic t1i, input cycle_t c, input logic le = 0);
    st(t1i ? S_T1I : S_T1, c);
    st(S_T2, c);
    st(S_T3, c, le);
  endtask

  initial begin
    repeat (400) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk); #1;
    clr = 0;
    check("idle after clear", !busy && !mask && !int_req && prio_out);

    // Keyboard start at 40h.
    mu_addr_bus = 8'h40; load = 1; @(posedge clk); #1; load = 0;
    check("LOAD sets BUSY and MASK", busy && mask && mar === 8'h40);
    check("MASK blocks priority out", !prio_out);
    @(posedge clk); #1;
    check("INT follows BUSY", int_req);

    // Cycle 1: T1I fetch.
    n_instenb = 0; n_contenb = 0;
    cyc(1, CYC_INST);
    check("INSTENB in T3 of the fetch", n_instenb === 1 && n_contenb === 0);
    check("MAR not yet advanced", mar === 8'h40);
    // Cycle 2: data read (operand) - CONTROL set at its start.
    n_instenb = 0; n_contenb = 0;
    cyc(0, CYC_READ);
    check("MAR advanced once per cycle", mar === 8'h41);
    check("CONTENB from T2 of the first data cycle", n_contenb === 2 && n_instenb === 0);
    // Cycle 3: fetch; cycle 4: I/O cycle carrying LASTENB.
    n_instenb = 0; n_contenb = 0;
    cyc(1, CYC_INST);
    cyc(0, CYC_IO, 1'b1);
    st(S_T4, CYC_IO); st(S_T5, CYC_IO);
    check("MAR at 43h", mar === 8'h43);
    check("fetch and I/O enables", n_instenb === 1 && n_contenb === 5);
    // Final fetch.
    st(S_T1I, CYC_INST);
    check("still busy at T1I of final fetch", busy && int_req);
    st(S_T2, CYC_INST);
    check("LAST clears INT in T2", !int_req && busy);
    n_instenb = 0;
    st(S_T3, CYC_INST);
    check("final instruction still supplied", n_instenb === 1);
    check("LAST clears BUSY in T3", !busy && !dut.instruction && !dut.control && !dut.last);
    check("MASK remains set", mask && !prio_out);
    // Normal processor cycles get no enables.
    n_instenb = 0; n_contenb = 0;
    cyc(0, CYC_INST); cyc(0, CYC_READ);
    check("no enables outside operations", n_instenb === 0 && n_contenb === 0);

    // PRST without MCLR leaves MASK; with MCLR first clears it.
    prst = 1; @(posedge clk); #1; prst = 0;
    check("PRST alone does not clear MASK", mask);
    mclr = 1; @(posedge clk); #1; mclr = 0;
    prst = 1; @(posedge clk); #1; prst = 0;
    check("MCLR then PRST clears MASK", !mask && prio_out);

    // Conditional halt: address zero from the processor ignored without MASK.
    l_bus = 8'h00; special = 1; @(posedge clk); #1; special = 0;
    check("conditional halt ignored when MASK clear", !busy);
    l_bus = 8'h22; special = 1; @(posedge clk); #1; special = 0;
    check("processor start at L Bus address", busy && mar === 8'h22 && mask);
    // Run it to completion quickly: T1I then last.
    cyc(1, CYC_INST);
    cyc(0, CYC_READ, 1'b1);
    cyc(1, CYC_INST);
    check("second operation ended", !busy);
    l_bus = 8'h00; special = 1; @(posedge clk); #1; special = 0;
    check("conditional halt taken when MASK set", busy && mar === 8'h00);
    cyc(1, CYC_INST); cyc(0, CYC_READ, 1'b1); cyc(1, CYC_INST);

    // No priority: no INT.
    prin = 0;
    mu_addr_bus = 8'h10; load = 1; @(posedge clk); #1; load = 0;
    repeat (3) @(posedge clk); #1;
    check("no INT without priority in", busy && !int_req && !prio_out);
    prin = 1; @(posedge clk); #1;
    check("INT once priority returns", int_req);
    cyc(1, CYC_INST); cyc(0, CYC_READ, 1'b1); cyc(1, CYC_INST);

    // Single step: INSTP arms; next plain T1 starts the halt program at 0.
    instp = 1; @(posedge clk); #1; instp = 0;
    check("single step armed", single_step && !busy);
    st(S_T1, CYC_INST);
    check("T1 after single step starts halt program", busy && mar === 8'h00 && !single_step);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
