// fp_keyboard: Front Panel Keyboard and Display circuit.
//
// Keystroke detection: a 5-bit scan counter is the Keyboard Bus (K5..K1). Its
// low four bits select which of the 16 numeric key lines is examined; it
// advances on every scan_tick until the examined line is active. With FFLG
// false any active line stops the scan (K5 ignored) and raises VALID; with FFLG
// true the scan only stops when K5 also equals BIT FLAG. VALID stays true while
// the key is held; releasing it lets the scan run on and, after a function
// sequence, clears FFLG.
// A prefix key (I or II) sets FFLG and loads BIT FLAG (0 = I, 1 = II). A
// function key does the same and also activates one numeric sense line while it
// is held, so a single function key behaves like its two-key sequence. The
// sense line comes on one clock after the prefix pulse, so FFLG is already set
// when the scan finds it, even if the scan happens to be sitting on that
// numeral when the key goes down.
// DX and CD give one-clock pulses on their press; CD also cancels a prefix.
// The system clear key acts only when the service switch is closed; the same
// switch enables the Cycle and Flag lamps. The message lamp flip-flop is set by
// the panel's EXT11 strobe and reset by START. The numeric display takes the
// Display Bus digit, decodes it to seven segments (hexadecimal) and lights the
// digit of the active multiplex phase unless BLANK is set.
//
// The scanning scheme, the prefix / function behaviour, the lamp gating and
// the message flip-flop follow the document. Key lines are taken as clean
// (debounced, synchronous) levels, and which prefix and numeral each function
// key stands for is this design's own table (FKEY_CODE).
module fp_keyboard #(
  // Function keys in order RUN, HALT, LPC, DPC, LDA, DA, LHL, DHL, LNM, DNM:
  // each entry is {prefix II?, numeral}.
  parameter logic [4:0] FKEY_CODE [10] = '{5'h00, 5'h01, 5'h02, 5'h03, 5'h04,
                                         5'h05, 5'h06, 5'h07, 5'h08, 5'h09}
) (
  input  logic        clk,
  input  logic        clr,
  input  logic        scan_tick,
  input  logic [15:0] num_key,     // numeric keys 0..F, 1 = pressed
  input  logic        prefix1_key,
  input  logic        prefix2_key,
  input  logic [9:0]  fn_key,
  input  logic        dx_key,
  input  logic        cd_key,
  input  logic        clr_key,
  input  logic        service_sw,  // 1 = closed
  // lamp sources
  input  logic [3:0]  cycle_ind,   // {I/O, INST, WRITE, READ}
  input  logic [3:0]  flag_ind,    // {S, Z, P, C}
  input  logic        msg_set,
  input  logic        start,
  input  logic        tape,
  input  logic        key_state,
  input  logic        run,
  // display drive
  input  logic [3:0]  disp_bus,
  input  logic [3:0]  mux_phase,   // one-hot M4..M1
  input  logic        blank,
  // keystroke outputs
  output logic [4:0]  kbus,
  output logic        valid,
  output logic        fflg,
  output logic        bit_flag,
  output logic        dx,
  output logic        cd,
  output logic        sys_clr,
  // lamps and display
  output logic [3:0]  cycle_lamp,
  output logic [3:0]  flag_lamp,
  output logic        pwr_lamp,
  output logic        msg_lamp,
  output logic        keybd_lamp,
  output logic        run_lamp,
  output logic        tape_lamp,
  output logic        prefix_lamp,
  output logic [3:0]  digit_en,    // M4..M1 digit drive
  output logic [6:0]  seg          // {g, f, e, d, c, b, a}
);

  logic [15:0] sense;
  logic [9:0]  fn_q;
  logic        p1_q, p2_q, dx_q, cd_q, hit, valid_q;

  always_comb begin
    sense = num_key;
    for (int i = 0; i < 10; i++)
      if (fn_key[i] && fn_q[i]) sense[FKEY_CODE[i][3:0]] = 1'b1;
  end

  assign hit   = sense[kbus[3:0]] && (!fflg || (kbus[4] == bit_flag));
  assign valid = hit;

  always_ff @(posedge clk) begin
    if (clr) begin
      kbus     <= '0;
      fflg     <= 1'b0;
      bit_flag <= 1'b0;
      fn_q     <= '0;
      p1_q     <= 1'b0;
      p2_q     <= 1'b0;
      dx_q     <= 1'b0;
      cd_q     <= 1'b0;
      valid_q  <= 1'b0;
      msg_lamp <= 1'b0;
    end else begin
      fn_q    <= fn_key;
      p1_q    <= prefix1_key;
      p2_q    <= prefix2_key;
      dx_q    <= dx_key;
      cd_q    <= cd_key;
      valid_q <= valid;

      if (scan_tick && !hit) kbus <= kbus + 5'd1;

      if (prefix1_key && !p1_q) begin
        fflg <= 1'b1; bit_flag <= 1'b0;
      end
      if (prefix2_key && !p2_q) begin
        fflg <= 1'b1; bit_flag <= 1'b1;
      end
      for (int i = 0; i < 10; i++)
        if (fn_key[i] && !fn_q[i]) begin
          fflg     <= 1'b1;
          bit_flag <= FKEY_CODE[i][4];
        end
      if (fflg && valid_q && !valid) fflg <= 1'b0;
      if (cd_key && !cd_q) fflg <= 1'b0;

      if (msg_set)    msg_lamp <= 1'b1;
      else if (start) msg_lamp <= 1'b0;
    end
  end

  assign dx      = dx_key && !dx_q;
  assign cd      = cd_key && !cd_q;
  assign sys_clr = clr_key && service_sw;

  assign cycle_lamp  = service_sw ? cycle_ind : 4'b0000;
  assign flag_lamp   = service_sw ? flag_ind  : 4'b0000;
  assign pwr_lamp    = 1'b1;
  assign keybd_lamp  = key_state;
  assign run_lamp    = run;
  assign tape_lamp   = tape;
  assign prefix_lamp = fflg;
  assign digit_en    = blank ? 4'b0000 : mux_phase;

  // Hexadecimal seven-segment font.
  always_comb begin
    unique case (disp_bus)
      4'h0: seg = 7'b0111111;  4'h1: seg = 7'b0000110;
      4'h2: seg = 7'b1011011;  4'h3: seg = 7'b1001111;
      4'h4: seg = 7'b1100110;  4'h5: seg = 7'b1101101;
      4'h6: seg = 7'b1111101;  4'h7: seg = 7'b0000111;
      4'h8: seg = 7'b1111111;  4'h9: seg = 7'b1101111;
      4'hA: seg = 7'b1110111;  4'hB: seg = 7'b1111100;
      4'hC: seg = 7'b0111001;  4'hD: seg = 7'b1011110;
      4'hE: seg = 7'b1111001;  default: seg = 7'b1110001;
    endcase
  end

endmodule
