// dars_bus: the D Bus and HL Bus of the microcomputer.
//
// Both busses are idle-high: a source that is not driving presents all ones,
// and the bus carries the AND of all sources (open-collector wiring). The D
// Bus merges N_D sources (memory, I/O ports, front panel, processor). The HL
// Bus is the processor's latched 14-bit address (H Bus = bits 13..8, L Bus =
// bits 7..0); DMA from the front panel disconnects the processor's address
// register, so the bus floats to all ones, and other HL sources (the front
// panel's flag restore) can then pull bits low.
//
// The idle-high sense and the DMA action follow the document; modelling the
// wiring as an AND of released-high sources is this design's form of it.
module dars_bus #(
  parameter int unsigned N_D = 4
) (
  input  logic [7:0]  d_src  [N_D],
  input  logic [13:0] cpu_hl,
  input  logic        dma,
  input  logic [13:0] hl_pull,
  output logic [7:0]  d_bus,
  output logic [13:0] hl_bus
);

  always_comb begin
    d_bus = 8'hFF;
    for (int i = 0; i < N_D; i++) d_bus &= d_src[i];
  end

  assign hl_bus = (dma ? 14'h3FFF : cpu_hl) & hl_pull;

endmodule
