// tb_io_port: self-checking test of the I/O port.
//
// Checks the control byte (External Control lines), the output handshake
// (OUTRDY up on output, down on the OUTACC pulse), the input handshake
// (INPRDY latches data and raises INPACC, the processor's input drops it), the
// status byte format and that status enable acts for one input, both
// interrupt enables, INIT, and that the port ignores other port numbers.
module tb_io_port;
  logic clk = 0, clr = 1;
  always #5 clk = ~clk;

  logic       io_strobe = 0;
  logic [4:0] port_num = 0;
  logic [7:0] l_bus = 0;
  logic [7:0] d_out;
  logic       int_req;
  logic [7:0] out_data;
  logic       outrdy, inpacc;
  logic       outacc_n = 1, inprdy = 0;
  logic [7:0] in_data = 0;
  logic [3:0] ext_ctl;
  logic [5:0] ext_sense = 6'b110_001;
  int checks = 0, failures = 0;

  io_port #(.IN_ADDR(5'd3), .OUT_ADDR(5'd20), .CTL_ADDR(5'd21)) dut (.*);

  task automatic check(input string what, input logic ok);
    checks++;
    if (ok !== 1'b1) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask
  task automatic tick(input int n = 1);
    repeat (n) @(posedge clk); #1;
  endtask
  task automatic cpu_out(input logic [4:0] p, input logic [7:0] v);
    port_num = p; l_bus = v; io_strobe = 1; tick(); io_strobe = 0;
  endtask
  task automatic cpu_in(input logic [4:0] p, output logic [7:0] v);
    port_num = p; io_strobe = 1; #1; v = d_out; tick(); io_strobe = 0;
  endtask

  initial begin
    repeat (300) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] v;
    tick(2); clr = 0;
    check("released D Bus when idle", d_out === 8'hFF && !int_req);
    cpu_out(21, 8'hA4);  // EC7..EC4 = A, output interrupt enable
    check("External Control lines from control byte", ext_ctl === 4'hA);
    cpu_out(19, 8'h77);
    check("other port number ignored", !outrdy);
    cpu_out(20, 8'h3C);
    check("output sets OUTRDY and data", outrdy && out_data === 8'h3C && !int_req);
    tick(3);
    outacc_n = 0; tick(); outacc_n = 1; tick();
    check("OUTACC drops OUTRDY", !outrdy);
    check("output interrupt when enabled", int_req);
    cpu_out(20, 8'h11);
    check("new output clears output-complete", !int_req && outrdy);

    // Input.
    in_data = 8'h96; inprdy = 1; tick(); inprdy = 0; in_data = 8'h00; tick();
    check("INPRDY latches data and raises INPACC", inpacc);
    check("no input interrupt when disabled", !int_req);
    cpu_out(21, 8'h0A);  // status enable + input interrupt enable
    outacc_n = 0; tick(); outacc_n = 1; tick();  // OUTRDY low, INPACC high
    check("input interrupt when enabled", int_req);
    cpu_in(3, v);
    check("status byte {ES7..5, INPACC, ES3..1, OUTRDY}", v === {3'b110, 1'b1, 3'b001, 1'b0});
    check("status read keeps input waiting", inpacc);
    cpu_in(3, v);
    check("next input returns data", v === 8'h96);
    check("input drops INPACC", !inpacc && !int_req);
    cpu_in(3, v);
    check("status enable acted once", v === 8'h96);
    // INIT clears the handshake state.
    cpu_out(21, 8'h01);
    check("INIT clears OUTRDY", !outrdy && !inpacc);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
