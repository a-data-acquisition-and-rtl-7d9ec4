// fp_display_mux: Front Panel Display Multiplexer circuit.
//
// Acts on keystrokes and drives the four-digit numeric display.
//  * Numeric keystroke (rising VALID with FFLG false): the low four Keyboard
//    Bus bits are shifted into the 16-bit Keyboard Display Register (KDR) as
//    the new least significant digit, and the display goes to the KEY state.
//    CD clears the KDR and also selects KEY.
//  * Function keystroke (rising VALID with FFLG true and EQUAL, i.e. K5 equal
//    to BIT FLAG): the 5-bit code is translated by the key PROM into an 8-bit
//    miniprogram address on the Micromemory Address Bus and a one-clock LOAD
//    is issued. While BUSY is set the LOAD waits until the running operation
//    ends; SEQ (security inhibit) cancels it. Codes with no function
//    produce no LOAD.
//  * MUX CLK (mux_tick) steps the multiplex phase M1..M4. In each phase one
//    digit of the selected source appears on the Display Bus and the same KDR
//    digit is sent over the Switch Bus to the Switch Register.
//  * The Display State Indicator (two-bit modulo-four counter) steps
//    KEY -> D -> ADR -> BLANK on each DX pulse. It is forced to ADR when the
//    processor halts and to BLANK when it starts (START pulse). The D state
//    shows the D Register on M1 and M2 and blanks M3 and M4.
//
// The functions, the four display states and the forced transitions follow
// the document. The counting order of the display states, M1 being the least
// significant digit, the shift direction of the KDR and the synchronous
// edge-detected form are this design's choices.
module fp_display_mux
  import dars_pkg::*;
  import fp_rom_pkg::*;
(
  input  logic        clk,
  input  logic        clr,
  input  logic        mux_tick,
  input  logic        valid,
  input  logic        fflg,
  input  logic        bit_flag,
  input  logic [4:0]  kbus,
  input  logic        dx,
  input  logic        cd,
  input  logic        busy,
  input  logic        seq,        // security inhibit (unused in the system: tie low)
  input  logic        run,        // processor is executing (not in STOP)
  input  logic [15:0] adr_reg,
  input  logic [7:0]  d_reg,
  output logic        equal,
  output logic [7:0]  mu_addr,
  output logic        load,
  output logic        start,      // one clock on the halt -> run transition
  output logic [15:0] kdr,
  output logic [3:0]  sw_digit,
  output logic [1:0]  sw_phase,
  output logic [1:0]  phase,      // 0..3 = M1..M4
  output logic [3:0]  mux_phase,  // one-hot M4..M1
  output logic [3:0]  disp_bus,
  output logic        blank,
  output disp_state_t disp_state
);

  logic valid_q, run_q, pending;
  logic [7:0] code_addr;

  assign equal     = (kbus[4] == bit_flag);
  assign code_addr = key_prom(kbus);
  assign start     = run && !run_q;

  always_ff @(posedge clk) begin
    if (clr) begin
      valid_q    <= 1'b0;
      run_q      <= 1'b0;
      pending    <= 1'b0;
      load       <= 1'b0;
      mu_addr    <= '0;
      kdr        <= '0;
      phase      <= '0;
      disp_state <= DS_BLANK;
    end else begin
      valid_q <= valid;
      run_q   <= run;
      load    <= 1'b0;

      if (mux_tick) phase <= phase + 2'd1;

      // Keystrokes.
      if (valid && !valid_q) begin
        if (!fflg) begin
          kdr        <= {kdr[11:0], kbus[3:0]};
          disp_state <= DS_KEY;
        end else if (equal && code_addr != NO_FUNCTION) begin
          mu_addr <= code_addr;
          pending <= 1'b1;
        end
      end
      if (pending && seq) pending <= 1'b0;
      else if (pending && !busy && !load) begin
        load    <= 1'b1;
        pending <= 1'b0;
      end

      // Display state.
      if (cd) begin
        kdr        <= '0;
        disp_state <= DS_KEY;
      end else if (run && !run_q) disp_state <= DS_BLANK;
      else if (!run && run_q)     disp_state <= DS_ADR;
      else if (dx)                disp_state <= disp_state_t'(disp_state + 2'd1);
    end
  end

  always_comb begin
    mux_phase = 4'b0001 << phase;
    sw_phase  = phase;
    sw_digit  = kdr[4*phase +: 4];
    blank     = 1'b0;
    unique case (disp_state)
      DS_KEY:  disp_bus = kdr[4*phase +: 4];
      DS_ADR:  disp_bus = adr_reg[4*phase +: 4];
      DS_D: begin
        disp_bus = phase[1] ? 4'h0 : d_reg[4*phase[0] +: 4];
        blank    = phase[1];
      end
      default: begin
        disp_bus = 4'h0;
        blank    = 1'b1;
      end
    endcase
  end

endmodule
