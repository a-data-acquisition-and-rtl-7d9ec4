// cpu8008_model: behavioural model of the Intel 8008 bus, for testbenches.
//
// Not synthesizable. It executes the subset of the 8008 instruction set used
// by the front panel miniprograms and the test programs, producing the bus
// cycles one timing state per clock: T1 (or T1I), T2, T3 and, where the 8008
// has them, T4 and T5; STOP while halted. Outputs change one time unit after a
// rising clock edge; D Bus input is sampled at the falling edge of T3.
//
// Subset: HLT (00, 01, FF); Lr,r' / LrM / LMr (11 DDD SSS); LrI and LMI
// (00 DDD 110); INr (00 DDD 000, D != 0); ADr / ADM (10 000 SSS); JMP
// (01 xxx 100); INP (0100 MMM1, flags on D3..D0 in T4 as S Z P C) and OUT
// (01 RRMMM 1, RR != 00). Other opcodes count as unknown.
//
// Interrupts: INT is sampled at the end of every instruction (and in STOP);
// when set, the next instruction is fetched with a T1I cycle and the program
// counter is not advanced for that instruction or its operand bytes.
module cpu8008_model
  import dars_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic [7:0]  d_bus,
  input  logic        int_req,
  output cpu_state_t  state,
  output cycle_t      cycle,
  output logic [13:0] hl,
  output logic [7:0]  d_out
);

  logic [7:0]  r [8];           // A B C D E H L (index 7 unused)
  logic [13:0] pc;
  logic        fc, fz, fs, fp;
  logic        halted;
  int          n_fetch, n_int_fetch, n_unknown;

  function automatic logic [13:0] hl_addr();
    return {r[5][5:0], r[6]};
  endfunction

  task automatic st(input cpu_state_t s, input cycle_t c, input logic [13:0] a,
                    input logic [7:0] dout, output logic [7:0] din);
    state = s;
    cycle = c;
    hl    = a;
    d_out = dout;
    @(negedge clk);
    din = d_bus;
    @(posedge clk);
    #1;
  endtask

  // One memory or I/O cycle; returns the byte read in T3.
  task automatic mcycle(input logic t1i, input cycle_t c, input logic [13:0] a,
                        input logic [7:0] wdata, input int nstates,
                        output logic [7:0] rdata);
    logic [7:0] dummy;
    st(t1i ? S_T1I : S_T1, c, a, 8'hFF, dummy);
    st(S_T2, c, a, 8'hFF, dummy);
    st(S_T3, c, a, (c == CYC_WRITE) ? wdata : 8'hFF, rdata);
    if (nstates > 3) st(S_T4, c, a, (c == CYC_IO) ? {4'hF, fs, fz, fp, fc} : 8'hFF, dummy);
    if (nstates > 4) st(S_T5, c, a, 8'hFF, dummy);
  endtask

  task automatic set_flags(input logic [7:0] v);
    fz = (v == 8'h00);
    fs = v[7];
    fp = ~^v;
  endtask

  initial begin
    state = S_STOP; cycle = CYC_INST; hl = '0; d_out = 8'hFF;
    for (int i = 0; i < 8; i++) r[i] = 8'h00;
    pc = '0; fc = 0; fz = 0; fs = 0; fp = 0;
    halted = 1'b1;
    n_fetch = 0; n_int_fetch = 0; n_unknown = 0;
  end

  initial begin : run_cpu
    logic [7:0] op, b1, b2, dummy;
    logic       ia;
    logic [8:0] sum;
    @(posedge clk);
    #1;
    forever begin
    if (rst) begin
      halted = 1'b1;
      st(S_STOP, CYC_INST, hl, 8'hFF, dummy);
    end else if (halted && !int_req) begin
      st(S_STOP, CYC_INST, hl, 8'hFF, dummy);
    end else begin
      ia = int_req;
      halted = 1'b0;
      // The first state is already under way at this clock.
      mcycle(ia, CYC_INST, pc, 8'hFF, 3, op);
      if (ia) n_int_fetch++; else begin n_fetch++; pc = pc + 1; end
      if (op == 8'h00 || op == 8'h01 || op == 8'hFF) begin
        halted = 1'b1;
      end else if (op[7:6] == 2'b11) begin
        if (op[2:0] == 3'd7) begin
          mcycle(1'b0, CYC_READ, hl_addr(), 8'hFF, 3, b1);
          r[op[5:3]] = b1;
        end else if (op[5:3] == 3'd7) begin
          mcycle(1'b0, CYC_WRITE, hl_addr(), r[op[2:0]], 3, dummy);
        end else begin
          r[op[5:3]] = r[op[2:0]];
          st(S_T4, CYC_INST, pc, 8'hFF, dummy);
          st(S_T5, CYC_INST, pc, 8'hFF, dummy);
        end
      end else if (op[7:6] == 2'b00 && op[2:0] == 3'b110) begin
        mcycle(1'b0, CYC_READ, pc, 8'hFF, 3, b1);
        if (!ia) pc = pc + 1;
        if (op[5:3] == 3'd7) mcycle(1'b0, CYC_WRITE, hl_addr(), b1, 3, dummy);
        else                 r[op[5:3]] = b1;
      end else if (op[7:6] == 2'b00 && op[2:0] == 3'b000 && op[5:3] != 3'd0) begin
        r[op[5:3]] = r[op[5:3]] + 8'd1;
        set_flags(r[op[5:3]]);
        st(S_T4, CYC_INST, pc, 8'hFF, dummy);
        st(S_T5, CYC_INST, pc, 8'hFF, dummy);
      end else if (op[7:3] == 5'b10000) begin
        if (op[2:0] == 3'd7) mcycle(1'b0, CYC_READ, hl_addr(), 8'hFF, 3, b1);
        else begin
          b1 = r[op[2:0]];
          st(S_T4, CYC_INST, pc, 8'hFF, dummy);
        end
        sum  = {1'b0, r[0]} + {1'b0, b1};
        r[0] = sum[7:0];
        fc   = sum[8];
        set_flags(sum[7:0]);
      end else if (op[7:6] == 2'b01 && op[2:0] == 3'b100) begin
        mcycle(1'b0, CYC_READ, pc, 8'hFF, 3, b1);
        if (!ia) pc = pc + 1;
        mcycle(1'b0, CYC_READ, pc, 8'hFF, 3, b2);
        pc = {b2[5:0], b1};
      end else if (op[7:6] == 2'b01 && op[0] == 1'b1) begin
        if (op[5:4] == 2'b00) begin
          mcycle(1'b0, CYC_IO, {op[5:0], r[0]}, 8'hFF, 5, b1);
          r[0] = b1;
        end else begin
          mcycle(1'b0, CYC_IO, {op[5:0], r[0]}, 8'hFF, 3, dummy);
        end
      end else begin
        n_unknown++;
      end
    end
    end
  end

endmodule
