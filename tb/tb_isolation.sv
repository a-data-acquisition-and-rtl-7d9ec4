// tb_isolation: self-checking test of the isolation system.
//
// Checks that the data, control, sense, OUTACC and INPACC lines pass straight
// through; that the OUTRDY and INPRDY leading edges are delayed by exactly
// DELAY clocks and inverted in sense; that their trailing edges follow at the
// next clock; and that a ready pulse shorter than the delay never reaches the
// other side.
module tb_isolation;
  localparam int DELAY = 6;
  logic clk = 0, clr = 1;
  always #5 clk = ~clk;

  logic [7:0] port_out_data = 8'h5A, das_in_data = 8'hC3;
  logic       port_outrdy = 0, das_outacc_n = 1, das_inprdy_n = 1, port_inpacc = 0;
  logic       das_inpacc;
  logic [3:0] port_ext_ctl = 4'h9;
  logic [5:0] das_ext_sense = 6'h15;
  logic       port_outacc_n, port_inprdy, das_outrdy_n;
  logic [7:0] port_in_data, das_out_data;
  logic [3:0] das_ext_ctl;
  logic [5:0] port_ext_sense;
  int checks = 0, failures = 0;

  isolation #(.DELAY(DELAY)) dut (.*);

  task automatic check(input string what, input logic ok);
    checks++;
    if (ok !== 1'b1) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask
  task automatic tick(input int n = 1);
    repeat (n) @(posedge clk); #1;
  endtask

  initial begin
    repeat (200) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    tick(2); clr = 0; tick();
    check("data, control and sense pass through",
          das_out_data == 8'h5A && port_in_data == 8'hC3 && das_ext_ctl == 4'h9 &&
          port_ext_sense == 6'h15);
    das_outacc_n = 0; #1;
    check("OUTACC passes through", !port_outacc_n);
    das_outacc_n = 1;
    port_inpacc = 1; #1;
    check("INPACC passes through", das_inpacc);
    port_inpacc = 0; #1;
    check("INPACC release passes through", !das_inpacc);
    check("idle ready lines", das_outrdy_n && !port_inprdy);

    // OUTRDY: count clocks to the inverted DAS line.
    port_outrdy = 1; n = 0;
    while (das_outrdy_n && n < 50) begin tick(); n++; end
    check("OUTRDY delayed by DELAY clocks", n === DELAY);
    port_outrdy = 0; tick();
    check("OUTRDY trailing edge at the next clock", das_outrdy_n);

    // INPRDY (active low on the DAS bus).
    das_inprdy_n = 0; n = 0;
    while (!port_inprdy && n < 50) begin tick(); n++; end
    check("INPRDY delayed by DELAY clocks", n === DELAY);
    das_inprdy_n = 1; tick();
    check("INPRDY trailing edge at the next clock", !port_inprdy);

    // Short pulse is swallowed.
    port_outrdy = 1; tick(DELAY - 2); port_outrdy = 0; tick(DELAY + 2);
    check("pulse shorter than delay swallowed", das_outrdy_n);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
