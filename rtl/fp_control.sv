// fp_control: Front Panel Control circuit.
//
// Sequences a front panel operation ("miniprogram") against the processor's
// bus cycles. A new operation starts when the 8-bit Micromemory Address
// Register (MAR) is loaded: from the keyboard path (load) or by the processor's
// special output instruction (special, address taken from the L Bus). Loading
// sets BUSY and MASK. While the panel holds interrupt priority (prin), BUSY sets
// the INT request flip-flop; the processor then answers every instruction fetch
// with an interrupt cycle (T1I), so the panel supplies every instruction.
// INSTRUCTION is set by the first T1I; from then on the MAR counts up at the
// start of every processor cycle, so one micromemory byte is used per cycle.
// CONTROL follows at the start of the next cycle and enables CONTENB on
// non-fetch cycles; INSTENB marks T3 of fetch cycles. LASTENB from the data
// circuit sets LAST: LAST clears INT in T2 of the next (final) fetch and clears
// BUSY, INSTRUCTION, CONTROL and LAST at the end of its T3, so the final
// miniprogram instruction must be a single-cycle one. MASK blocks the priority
// chain (prio_out) and is only cleared by PRST after MCLR has armed the MASK
// CLEAR flip-flop. A processor-started operation at address zero (conditional
// halt) runs only while MASK is set. INSTP arms the Single Step flip-flop; the
// T1 of the next processor-generated instruction then starts the halt
// miniprogram at HALT_ADDR, so the processor stops after one instruction.
//
// These rules follow the document. The synchronous form (one clock per
// processor timing state, flip-flops updating at the end of the named state),
// active-high internal polarities and HALT_ADDR = 0 are this design's choices.
//
// Interface: state/cycle describe the current processor bus cycle; load,
// special, lastenb, instp, mclr and prst are one-clock strobes.
module fp_control
  import dars_pkg::*;
#(
  parameter logic [7:0] HALT_ADDR = 8'h00
) (
  input  logic       clk,
  input  logic       clr,          // system clear
  input  cpu_state_t state,
  input  cycle_t     cycle,
  input  logic       load,         // keyboard-initiated start
  input  logic [7:0] mu_addr_bus,  // Micromemory Address Bus from the display multiplexer
  input  logic       special,      // processor OUT to the panel, in T3 of the I/O cycle
  input  logic [7:0] l_bus,        // L Bus (accumulator during the I/O cycle)
  input  logic       lastenb,
  input  logic       instp,
  input  logic       mclr,
  input  logic       prst,
  input  logic       prin,         // interrupt priority in
  output logic [7:0] mar,
  output logic       busy,
  output logic       mask,
  output logic       int_req,
  output logic       prio_out,
  output logic       instenb,
  output logic       contenb,
  output logic       single_step
);

  logic instruction, control, last, mask_clear;
  logic cycle_start, ss_trigger, cpu_start, start_op;
  logic [7:0] start_addr;

  assign cycle_start = (state == S_T1) || (state == S_T1I);
  // Single step: first processor-generated fetch after the armed operation.
  assign ss_trigger  = single_step && !busy && (state == S_T1);
  // Processor-initiated start; address zero only while MASK is set.
  assign cpu_start   = special && !busy && ((l_bus != 8'h00) || mask);
  assign start_op    = !busy && (load || cpu_start || ss_trigger);

  always_comb begin
    if (ss_trigger)     start_addr = HALT_ADDR;
    else if (cpu_start) start_addr = l_bus;
    else                start_addr = mu_addr_bus;
  end

  always_ff @(posedge clk) begin
    if (clr) begin
      mar         <= '0;
      busy        <= 1'b0;
      mask        <= 1'b0;
      int_req     <= 1'b0;
      instruction <= 1'b0;
      control     <= 1'b0;
      last        <= 1'b0;
      mask_clear  <= 1'b0;
      single_step <= 1'b0;
    end else begin
      if (start_op) begin
        mar  <= start_addr;
        busy <= 1'b1;
        mask <= 1'b1;
      end else if (instruction && cycle_start) begin
        mar <= mar + 8'd1;
      end

      if (busy && prin && !last) int_req <= 1'b1;
      if (last && state == S_T2) int_req <= 1'b0;

      if (busy && state == S_T1I) instruction <= 1'b1;
      if (instruction && cycle_start) control <= 1'b1;

      if (lastenb) last <= 1'b1;
      if (last && state == S_T3) begin
        busy        <= 1'b0;
        instruction <= 1'b0;
        control     <= 1'b0;
        last        <= 1'b0;
      end

      if (mclr) mask_clear <= 1'b1;
      if (prst && mask_clear) begin
        mask       <= 1'b0;
        mask_clear <= 1'b0;
      end

      if (instp) single_step <= 1'b1;
      else if (ss_trigger) single_step <= 1'b0;
    end
  end

  assign instenb  = instruction && (cycle == CYC_INST) && (state == S_T3);
  assign contenb  = control && (cycle != CYC_INST);
  assign prio_out = prin && !mask;

  // A new operation may only start while none is running.
  property p_no_restart;
    @(posedge clk) disable iff (clr) busy |-> !(start_op);
  endproperty
  assert property (p_no_restart);

endmodule
