// fp_data: Front Panel Data circuit.
//
// Holds the panel's five data registers (Address, D, Switch, Save, Flag), the
// 256-byte microcontrol memory and the microinstruction decoder. The byte at
// the Micromemory Address Register (mar) is read every processor cycle of a
// panel operation:
//  * INSTENB (T3 of a fetch cycle): the byte is an 8008 instruction and is
//    driven onto the D Bus.
//  * CONTENB (any other cycle): the byte is a microinstruction. Control Field 1
//    (B3..B0) selects one of 16 operations; Control Field 2 (B4 DMA, B5
//    LASTENB, B6 ADRENB, B7 DENB) may be combined freely. Bus gating (G0, G1,
//    GHS, GLS, RRST) happens during T3, register loads at the end of T3, FSAV
//    takes the four low D Bus bits at the end of T4, FRST drives the Flag
//    Register onto the low four L Bus bits for the whole cycle (used with DMA,
//    which floats the rest of the HL Bus high, to address the flag-restore
//    table), and the strobes LASTENB, INSTP, MCLR and EXT11..EXT14 are one
//    clock wide at T3.
// Outside panel operations the Address Register follows the program counter:
// it takes the HL Bus at T3 of every fetch cycle while the panel is not busy.
// The Switch Register is refreshed one hexadecimal digit at a time from the
// Switch Bus of the display multiplexer.
//
// Busses are open-collector style: d_out and hl_out are all ones where this
// block does not drive, and are combined by AND with the other sources;
// d_drive tells the memory to stay off the D Bus while the panel gates data.
//
// The operations, their timing states and the bit layout follow the document.
// Where the document's table and prose differ on code 3, the table is followed
// (GLS only gates the bus; code 4, LREG, loads the Save Register). G1 drives
// 8'h01. The flag bit order S Z P C (bits 3..0) is the order in which the 8008
// presents its flags. The memory contents come from fp_rom_pkg.
module fp_data
  import dars_pkg::*;
  import fp_rom_pkg::*;
(
  input  logic        clk,
  input  logic        clr,
  input  cpu_state_t  state,
  input  cycle_t      cycle,
  input  logic [7:0]  mar,
  input  logic        instenb,
  input  logic        contenb,
  input  logic        busy,
  input  logic [7:0]  d_bus,      // resolved D Bus
  input  logic [13:0] hl_bus,     // resolved HL Bus
  input  logic [3:0]  sw_digit,   // Switch Bus digit
  input  logic [1:0]  sw_phase,   // which digit (0 = least significant)
  output logic [7:0]  d_out,      // this block's D Bus drive (8'hFF = released)
  output logic        d_drive,    // this block is driving the D Bus
  output logic [13:0] hl_out,     // this block's HL Bus drive (all ones = released)
  output logic        dma,
  output logic        lastenb,
  output logic        instp,
  output logic        mclr,
  output logic        msg,        // EXT11
  output logic [2:0]  ext_unused, // EXT12..EXT14
  output logic [15:0] adr_reg,
  output logic [7:0]  d_reg,
  output logic [15:0] switch_reg,
  output logic [7:0]  save_reg,
  output logic [3:0]  flag_reg    // {S, Z, P, C}
);

  logic [7:0] mem [256];
  logic [7:0] rom_byte;
  microinst_t mi;
  logic       t3, t4, mi_act;

  initial for (int i = 0; i < 256; i++) mem[i] = mini_rom(8'(i));

  assign rom_byte = mem[mar];
  assign mi       = microinst_t'(rom_byte);
  assign mi_act   = contenb;
  assign t3       = (state == S_T3);
  assign t4       = (state == S_T4);

  // D Bus drive.
  always_comb begin
    d_out   = 8'hFF;
    d_drive = instenb;
    if (instenb) d_out = rom_byte;
    else if (mi_act && t3) begin
      d_drive = 1'b1;
      unique case (mi.cf1)
        CF1_G0:   d_out = 8'h00;
        CF1_G1:   d_out = 8'h01;
        CF1_GHS:  d_out = switch_reg[15:8];
        CF1_GLS:  d_out = switch_reg[7:0];
        CF1_RRST: d_out = save_reg;
        default:  d_drive = 1'b0;
      endcase
    end
  end

  assign dma     = mi_act && mi.dma;
  assign hl_out  = (mi_act && mi.cf1 == CF1_FRST) ? {10'h3FF, flag_reg} : 14'h3FFF;

  assign lastenb    = mi_act && t3 && mi.lastenb;
  assign instp      = mi_act && t3 && (mi.cf1 == CF1_INSTP);
  assign mclr       = mi_act && t3 && (mi.cf1 == CF1_MCLR);
  assign msg        = mi_act && t3 && (mi.cf1 == CF1_EXT11);
  assign ext_unused = {mi_act && t3 && (mi.cf1 == CF1_EXT14),
                       mi_act && t3 && (mi.cf1 == CF1_EXT13),
                       mi_act && t3 && (mi.cf1 == CF1_EXT12)};

  always_ff @(posedge clk) begin
    if (clr) begin
      adr_reg    <= '0;
      d_reg      <= '0;
      switch_reg <= '0;
      save_reg   <= '0;
      flag_reg   <= '0;
    end else begin
      switch_reg[4*sw_phase +: 4] <= sw_digit;

      if (mi_act && t3) begin
        if (mi.denb)   d_reg   <= d_bus;
        if (mi.adrenb) adr_reg <= {2'b00, hl_bus};
        if (mi.cf1 == CF1_LREG) save_reg <= switch_reg[7:0];
        if (mi.cf1 == CF1_RSAV) save_reg <= d_bus;
      end else if (!busy && cycle == CYC_INST && t3) begin
        adr_reg <= {2'b00, hl_bus};
      end

      if (mi_act && t4 && mi.cf1 == CF1_FSAV) flag_reg <= d_bus[3:0];
    end
  end

endmodule
