// fp_rom_pkg: contents of the two front panel read-only memories.
//
//  * key_prom: the 32-entry table in the Display Multiplexer that turns the
//    5-bit Keyboard Bus code of a keyed function (K5 = prefix II) into the
//    8-bit starting address of its miniprogram. 8'hFF marks a code with no
//    function; the display multiplexer issues no LOAD for it.
//  * mini_rom: the 256-byte microcontrol memory (8 pages of 32 bytes). Bytes
//    read in instruction-fetch cycles are 8008 instructions; bytes read in all
//    other cycles are microinstructions (dars_pkg::microinst_t).
//
// The memory sizes, the microinstruction format and what each function must
// achieve follow the document; the miniprogram code, its placement and the
// key-code assignment are this design's own. Each program keeps the saved
// accumulator in the Save Register, as the document requires:
//   00 HALT  : LMA (write cycle: RSAV, DMA so memory is untouched),
//              INP 0 (I/O cycle: FSAV, LASTENB), HLT
//   08 RUN   : LAM (read: FRST+DMA, flag-restore constant), ADA (restores
//              flags), LAI (read: RRST+LASTENB), LAA (final, one cycle)
//   10 LDA   : LAI (LREG+LASTENB), HLT
//   14 DA    : LAI (RRST+DENB+LASTENB), HLT
//   18 LHL   : LHI (GHS), LLI (GLS), LAM (ADRENB+LASTENB), HLT
//   20 DHL   : LAM (ADRENB+LASTENB), HLT
//   24 LPC   : JMP (GLS, GHS+LASTENB), HLT
//   28 DNM   : INL, LAM (DENB+ADRENB+LASTENB), HLT
//   2C LNM   : INL, LMI (GLS, ADRENB+LASTENB), HLT
//   34 MSG   : LAI (EXT11+LASTENB), HLT
//   38 MCLR  : LAI (MCLR+LASTENB), HLT
//   3C STEP  : as RUN, with an extra LAI whose operand cycle carries INSTP
//   48 LD    : LAI (GLS+DENB+LASTENB), HLT   (switch low byte to D Register)
package fp_rom_pkg;

  localparam logic [7:0] A_HALT = 8'h00, A_RUN = 8'h08, A_LDA = 8'h10, A_DA = 8'h14,
                         A_LHL  = 8'h18, A_DHL = 8'h20, A_LPC = 8'h24, A_DNM = 8'h28,
                         A_LNM  = 8'h2C, A_MSG = 8'h34, A_MCLR = 8'h38, A_STEP = 8'h3C,
                         A_LD   = 8'h48;
  localparam logic [7:0] NO_FUNCTION = 8'hFF;

  function automatic logic [7:0] key_prom(input logic [4:0] code);
    case (code)
      5'h00:   return A_RUN;
      5'h01:   return A_HALT;
      5'h02:   return A_LPC;
      5'h04:   return A_LDA;
      5'h05:   return A_DA;
      5'h06:   return A_LHL;
      5'h07:   return A_DHL;
      5'h08:   return A_LNM;
      5'h09:   return A_DNM;
      5'h0A:   return A_STEP;
      5'h0B:   return A_MSG;
      5'h0C:   return A_MCLR;
      5'h0D:   return A_LD;
      default: return NO_FUNCTION;
    endcase
  endfunction

  function automatic logic [7:0] mini_rom(input logic [7:0] a);
    case (a)
      // HALT
      8'h00: return 8'hF8;  8'h01: return 8'h15;  8'h02: return 8'h41;
      8'h03: return 8'h27;  8'h04: return 8'h00;
      // RUN
      8'h08: return 8'hC7;  8'h09: return 8'h18;  8'h0A: return 8'h80;
      8'h0B: return 8'h06;  8'h0C: return 8'h26;  8'h0D: return 8'hC0;
      // LDA
      8'h10: return 8'h06;  8'h11: return 8'h24;  8'h12: return 8'h00;
      // DA
      8'h14: return 8'h06;  8'h15: return 8'hA6;  8'h16: return 8'h00;
      // LHL
      8'h18: return 8'h2E;  8'h19: return 8'h02;  8'h1A: return 8'h36;
      8'h1B: return 8'h03;  8'h1C: return 8'hC7;  8'h1D: return 8'h60;
      8'h1E: return 8'h00;
      // DHL
      8'h20: return 8'hC7;  8'h21: return 8'h60;  8'h22: return 8'h00;
      // LPC
      8'h24: return 8'h44;  8'h25: return 8'h03;  8'h26: return 8'h22;
      8'h27: return 8'h00;
      // DNM
      8'h28: return 8'h30;  8'h29: return 8'hC7;  8'h2A: return 8'hE0;
      8'h2B: return 8'h00;
      // LNM
      8'h2C: return 8'h30;  8'h2D: return 8'h3E;  8'h2E: return 8'h03;
      8'h2F: return 8'h60;  8'h30: return 8'h00;
      // MSG
      8'h34: return 8'h06;  8'h35: return 8'h2B;  8'h36: return 8'h00;
      // MCLR
      8'h38: return 8'h06;  8'h39: return 8'h2F;  8'h3A: return 8'h00;
      // STEP
      8'h3C: return 8'hC7;  8'h3D: return 8'h18;  8'h3E: return 8'h80;
      8'h3F: return 8'h06;  8'h40: return 8'h0A;  8'h41: return 8'h06;
      8'h42: return 8'h26;  8'h43: return 8'hC0;
      // LD
      8'h48: return 8'h06;  8'h49: return 8'hA3;  8'h4A: return 8'h00;
      default: return 8'h00;
    endcase
  endfunction

endpackage
