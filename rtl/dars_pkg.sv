// dars_pkg: types and constants shared by the data acquisition and recording
// system (DARS) blocks.
//
// The processor bus is modelled synchronously: one clock period per processor
// timing state. The state codes and the cycle-type codes are the Intel 8008's
// own encodings (S2 S1 S0 state outputs, D7 D6 at T2); the document names the
// states and cycle types but not their encodings, so taking the 8008's is a
// choice of this design. Everything else here (microinstruction layout, Control
// Field 1 codes, control and status byte bit positions) follows the document.
package dars_pkg;

  // Processor timing states (8008 S2 S1 S0 encoding).
  typedef enum logic [2:0] {
    S_WAIT = 3'b000,
    S_T2   = 3'b001,
    S_T1   = 3'b010,
    S_T1I  = 3'b011,
    S_T3   = 3'b100,
    S_T5   = 3'b101,
    S_STOP = 3'b110,
    S_T4   = 3'b111
  } cpu_state_t;

  // Processor memory-cycle type (8008 D7 D6 at T2).
  typedef enum logic [1:0] {
    CYC_INST  = 2'b00,   // instruction fetch
    CYC_IO    = 2'b01,   // input/output cycle
    CYC_READ  = 2'b10,   // data read
    CYC_WRITE = 2'b11    // data write
  } cycle_t;

  // Control Field 1 of a front panel microinstruction (bits D C B A = B3..B0).
  typedef enum logic [3:0] {
    CF1_G0    = 4'h0,  // gate binary zero onto the D Bus
    CF1_G1    = 4'h1,  // gate binary one onto the D Bus
    CF1_GHS   = 4'h2,  // gate high switch byte onto the D Bus
    CF1_GLS   = 4'h3,  // gate low switch byte onto the D Bus
    CF1_LREG  = 4'h4,  // load Save Register from the switches
    CF1_RSAV  = 4'h5,  // load Save Register from the D Bus
    CF1_RRST  = 4'h6,  // gate Save Register onto the D Bus
    CF1_FSAV  = 4'h7,  // save flags from the D Bus (at T4)
    CF1_FRST  = 4'h8,  // gate Flag Register onto the low L Bus bits
    CF1_NOP   = 4'h9,
    CF1_INSTP = 4'hA,  // instruction step
    CF1_EXT11 = 4'hB,  // message lamp
    CF1_EXT12 = 4'hC,
    CF1_EXT13 = 4'hD,
    CF1_EXT14 = 4'hE,
    CF1_MCLR  = 4'hF   // enable clearing of MASK
  } cf1_t;

  // Microinstruction byte (bit positions of the original microinstruction format).
  typedef struct packed {
    logic denb;     // B7: D Register <- D Bus at T3
    logic adrenb;   // B6: Address Register <- HL Bus at T3
    logic lastenb;  // B5: next instruction is the last one
    logic dma;      // B4: disconnect the processor from the HL Bus
    cf1_t cf1;      // B3..B0
  } microinst_t;

  // I/O port control byte (bit positions of the original port control byte).
  typedef struct packed {
    logic [3:0] ext_ctl;     // EC7..EC4: External Control lines
    logic       status_en;   // EC3
    logic       out_int_en;  // EC2
    logic       in_int_en;   // EC1
    logic       init;        // EC0
  } io_ctl_t;

  // Display State Indicator states.
  typedef enum logic [1:0] {
    DS_KEY   = 2'd0,
    DS_D     = 2'd1,
    DS_ADR   = 2'd2,
    DS_BLANK = 2'd3
  } disp_state_t;

endpackage
