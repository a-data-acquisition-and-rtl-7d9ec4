// dars_memory: the microcomputer's 16K byte memory.
//
// Addresses 0000h-37FFh are read/write memory; 3800h-3FFFh (the upper 2K) are
// read-only. The read data is combinational from the HL Bus address; a write
// takes place at the end of T3 of a write cycle (we) and is ignored in the
// read-only area.
//
// The only read-only contents the system depends on are the sixteen flag
// restore constants in 3FF0h-3FFFh. Entry f (f = {S, Z, P, C}) holds a byte x
// such that the 8008 addition x + x leaves the flags S, Z, P, C equal to f:
// carry = x[7], result r = x << 1, zero = (r == 0), sign = r[7], parity =
// even parity of r. The table is computed by searching x = 0..255 for the
// first byte that gives f exactly; combinations no byte can produce (for
// example zero together with sign) get the first byte matching the most
// flags. All other read-only locations read 00h.
//
// The memory map and the purpose of the table follow the document; the
// contents of the remaining read-only locations are not given and are zero
// here. The read-write area powers up with unknown contents, as real memory
// does.
module dars_memory #(
  parameter int unsigned SIZE     = 16384,
  parameter int unsigned ROM_BASE = 32'h3800
) (
  input  logic        clk,
  input  logic [13:0] addr,
  input  logic        we,
  input  logic [7:0]  wdata,
  output logic [7:0]  rdata
);

  localparam int unsigned ROM_SIZE = SIZE - ROM_BASE;

  logic [7:0] ram [ROM_BASE];
  logic [7:0] rom [ROM_SIZE];

  function automatic logic [3:0] add_flags(input logic [7:0] x);
    logic [7:0] r;
    r = {x[6:0], 1'b0};
    return {r[7], (r == 8'h00), ~^r, x[7]};
  endfunction

  function automatic logic [7:0] flag_const(input logic [3:0] f);
    logic [7:0] best;
    int best_score, score;
    best = 8'h00;
    best_score = -1;
    for (int x = 0; x < 256; x++) begin
      score = 0;
      for (int b = 0; b < 4; b++)
        if (add_flags(8'(x))[b] == f[b]) score++;
      if (score > best_score) begin
        best_score = score;
        best = 8'(x);
      end
    end
    return best;
  endfunction

  initial begin
    for (int i = 0; i < ROM_SIZE; i++) rom[i] = 8'h00;
    for (int f = 0; f < 16; f++) rom[ROM_SIZE - 16 + f] = flag_const(4'(f));
  end

  always_ff @(posedge clk)
    if (we && 32'(addr) < ROM_BASE) ram[addr] <= wdata;

  assign rdata = (32'(addr) < ROM_BASE) ? ram[addr] : rom[32'(addr) - ROM_BASE];

endmodule
