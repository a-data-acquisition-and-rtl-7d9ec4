// tb_dars_memory: self-checking test of the system memory.
//
// Checks that RAM locations store and return bytes over the whole RAM range,
// that the ROM at the top of memory ignores writes, and that each of the 16
// flag-restore constants at 3FF0h..3FFFh, when added to itself, gives back the
// sign, zero, parity and carry flags of its index wherever that combination
// can come from an addition at all. The addition is modelled here with 9-bit
// arithmetic, independently of the design.
module tb_dars_memory;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [13:0] addr = 0;
  logic        we = 0;
  logic [7:0]  wdata = 0;
  logic [7:0]  rdata;
  int checks = 0, failures = 0;

  dars_memory dut (.*);

  task automatic check(input string what, input logic ok);
    checks++;
    if (ok !== 1'b1) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask
  task automatic wr(input logic [13:0] a, input logic [7:0] v);
    addr = a; wdata = v; we = 1; @(posedge clk); #1; we = 0;
  endtask

  // {S, Z, P, C} after x + x.
  function automatic logic [3:0] flags_of_double(input logic [7:0] x);
    logic [8:0] s;
    s = {1'b0, x} + {1'b0, x};
    return {s[7], s[7:0] == 0, ~^s[7:0], s[8]};
  endfunction

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic possible [16];
    #1;
    wr(14'h0000, 8'h12); wr(14'h0001, 8'h34); wr(14'h1F00, 8'hA5); wr(14'h37FF, 8'h5C);
    addr = 14'h0000; #1; check("RAM 0000", rdata === 8'h12);
    addr = 14'h0001; #1; check("RAM 0001", rdata === 8'h34);
    addr = 14'h1F00; #1; check("RAM 1F00", rdata === 8'hA5);
    addr = 14'h37FF; #1; check("RAM top", rdata === 8'h5C);
    for (int i = 0; i < 64; i++) wr(14'(i * 223), 8'(i * 7 + 1));
    for (int i = 0; i < 64; i++) begin
      addr = 14'(i * 223); #1;
      check("RAM pattern", rdata === 8'(i * 7 + 1));
    end
    addr = 14'h3800; #1;
    begin
      logic [7:0] old_v;
      old_v = rdata;
      wr(14'h3800, ~old_v);
      addr = 14'h3800; #1;
      check("ROM ignores writes", rdata === old_v);
    end
    addr = 14'h37FF; #1; check("RAM not disturbed by ROM write", rdata === 8'h5C);

    for (int f = 0; f < 16; f++) possible[f] = 0;
    for (int x = 0; x < 256; x++) possible[flags_of_double(8'(x))] = 1;
    for (int f = 0; f < 16; f++) begin
      addr = 14'h3FF0 | 14'(f); #1;
      if (possible[f]) check($sformatf("flag constant %0h", f), flags_of_double(rdata) === 4'(f));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
