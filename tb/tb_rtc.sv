// tb_rtc: self-checking test of the Real Time Clock.
//
// With a short prescaler (CLKS_PER_MS = 3), checks the exact number of clocks
// from the start write to the interrupt request for several counts and all
// five ranges (expected COUNT x 10^RANGE x CLKS_PER_MS, worked out here), the
// one-shot stop, back-to-back repeated intervals, the status byte and its
// clearing of the request, stopping by a control write, that a zero count
// does not start, the free-running 1 ms tick, and the longest interval of
// 255 x 10 s (2,550,000 clocks with a 1-clock millisecond in a second
// instance).
module tb_rtc;
  localparam int C = 3;
  logic clk = 0, clr = 1;
  always #5 clk = ~clk;

  logic       io_strobe = 0;
  logic [4:0] port_num = 0;
  logic [7:0] l_bus = 0;
  logic [7:0] d_out, d_out2;
  logic       int_req, ms_tick, int_req2, ms_tick2;
  logic       io_strobe2 = 0;
  int checks = 0, failures = 0;

  rtc #(.CLKS_PER_MS(C)) dut (.*);
  rtc #(.CLKS_PER_MS(1)) dut2 (.clk, .clr, .io_strobe(io_strobe2), .port_num, .l_bus,
                               .d_out(d_out2), .int_req(int_req2), .ms_tick(ms_tick2));

  task automatic check(input string what, input logic ok);
    checks++;
    if (ok !== 1'b1) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask
  task automatic tick(input int n = 1);
    repeat (n) @(posedge clk); #1;
  endtask
  task automatic wr(input logic [4:0] p, input logic [7:0] v);
    port_num = p; l_bus = v; io_strobe = 1; tick(); io_strobe = 0;
  endtask
  task automatic rd(output logic [7:0] v);
    port_num = 5'd3; io_strobe = 1; #1; v = d_out; tick(); io_strobe = 0;
  endtask
  // Clocks from the start write's edge until int_req (limit lim).
  task automatic measure(input logic [7:0] cnt, input logic [7:0] ctl, input int lim, output int n);
    wr(5'd13, cnt);
    wr(5'd14, ctl);
    n = 0;
    while (!int_req && n < lim) begin tick(); n++; end
  endtask

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n, n2, t;
    logic [7:0] v;
    tick(2); clr = 0;
    // ms tick is free running with period C.
    t = 0;
    for (int i = 0; i < 4 * C; i++) begin tick(); if (ms_tick) t++; end
    check("free-running 1 ms tick", t == 4);

    measure(8'd5, 8'h80, 1000, n);
    check($sformatf("5 x 1 ms = %0d clocks (got %0d)", 5 * C, n), n == 5 * C);
    rd(v);
    check("status: done, stopped, range 0", v == 8'h80);
    check("reading the status clears the request", !int_req);
    tick(50);
    check("one-shot does not restart", !int_req);

    measure(8'd1, 8'h80, 1000, n);
    check("shortest interval 1 ms", n == C);
    rd(v);
    measure(8'd2, 8'h81, 1000, n);
    check("2 x 10 ms", n == 2 * 10 * C);
    rd(v);
    measure(8'd3, 8'h82, 5000, n);
    check("3 x 100 ms", n == 3 * 100 * C);
    rd(v);
    measure(8'd1, 8'h83, 10000, n);
    check("1 x 1 s", n == 1000 * C);
    rd(v);
    measure(8'd1, 8'h84, 100000, n);
    check("1 x 10 s", n == 10000 * C);
    rd(v);

    // Repeat: intervals back to back.
    measure(8'd4, 8'h88, 1000, n);
    check("first repeated interval", n == 4 * C);
    rd(v);
    check("status: done, running, repeat", v == 8'hC8);
    n2 = 0;
    while (!int_req && n2 < 1000) begin tick(); n2++; end
    check("second repeated interval follows without a gap", n2 == 4 * C - 1);
    wr(5'd14, 8'h00);
    check("control write stops the timer and clears the request", !int_req);
    tick(100);
    check("stopped timer stays quiet", !int_req);

    // Zero count does not start.
    wr(5'd13, 8'd0); wr(5'd14, 8'h80); tick(100);
    rd(v);
    check("zero count does not start", v == 8'h00 && !int_req);
    #1;
    check("other devices' reads leave the bus alone", d_out == 8'hFF);

    // Longest interval, 255 x 10 s, with 1 clock per ms.
    port_num = 5'd13; l_bus = 8'd255; io_strobe2 = 1; tick();
    port_num = 5'd14; l_bus = 8'h84; tick(); io_strobe2 = 0;
    n = 0;
    while (!int_req2 && n < 2_600_000) begin tick(); n++; end
    check($sformatf("longest interval 255 x 10 s = 2550000 ms (got %0d)", n), n == 2_550_000);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
