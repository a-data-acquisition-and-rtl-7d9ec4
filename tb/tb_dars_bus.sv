// tb_dars_bus: self-checking test of the wired-AND busses.
//
// Checks that an idle D Bus reads all ones, that one driving source sets the
// bus, that two sources combine as a wired AND, and that the HL Bus carries
// the processor address, is forced to all ones by DMA, and can then be pulled
// low by the front panel.
module tb_dars_bus;
  localparam int N_D = 3;
  logic [7:0]  d_src [N_D];
  logic [13:0] cpu_hl = 14'h0123, hl_pull = 14'h3FFF;
  logic        dma = 0;
  logic [7:0]  d_bus;
  logic [13:0] hl_bus;
  int checks = 0, failures = 0;

  dars_bus #(.N_D(N_D)) dut (.*);

  task automatic check(input string what, input logic ok);
    checks++;
    if (ok !== 1'b1) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  initial begin
    #1000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < N_D; i++) d_src[i] = 8'hFF;
    #1; check("idle D Bus is all ones", d_bus === 8'hFF);
    d_src[1] = 8'h3C; #1; check("single source", d_bus === 8'h3C);
    d_src[2] = 8'hF5; #1; check("wired AND of two sources", d_bus === 8'h34);
    d_src[0] = 8'h00; #1; check("any source can pull low", d_bus === 8'h00);
    #1; check("processor address on HL Bus", hl_bus === 14'h0123);
    dma = 1; #1; check("DMA forces HL Bus to ones", hl_bus === 14'h3FFF);
    hl_pull = 14'h3FF6; #1; check("panel pulls HL Bus under DMA", hl_bus === 14'h3FF6);
    dma = 0; #1; check("both sources when not DMA", hl_bus === (14'h0123 & 14'h3FF6));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
