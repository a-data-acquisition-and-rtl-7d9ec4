// rtc: Real Time Clock, a programmable interval timer on the processor bus.
//
// The processor sets an interval of COUNT x RANGE, with COUNT 1..255 and RANGE
// one of 1 ms, 10 ms, 100 ms, 1 s and 10 s, so intervals span 1 ms to 2550 s.
// At the end of the interval the timer raises its interrupt request. In
// repeat mode it then starts the next interval at once, with no gap, so that
// intervals follow one another exactly; otherwise it stops.
//
// How it works: a prescaler divides the clock down to a 1 ms tick
// (CLKS_PER_MS clocks); a decade counter divides that by 1, 10, 100, 1000 or
// 10000 into a unit tick; an 8-bit down counter counts units. All three
// restart when the interval is started, so an interval is exactly
// COUNT x 10^RANGE x CLKS_PER_MS clocks from the start write to the request.
// The prescaler runs all the time; its 1 ms tick is brought out (ms_tick) as
// the time base for other units.
//
// Interface (I/O cycles, strobed in T3 like the I/O ports):
//   OUT CNT_ADDR   interval count (0 = timer not started)
//   OUT CTL_ADDR   control byte {run, 3'b0, repeat, range[2:0]}; writing it
//                  restarts the timer (run = 1) or stops it (run = 0) and
//                  clears a pending request
//   INP IN_ADDR    status byte {done, running, 2'b0, repeat, range[2:0]};
//                  reading it clears the request
// Range codes above 4 are taken as 10 s.
//
// The interval span, the interrupt at the end of an interval, one-shot and
// repeated operation and the time base output follow the document. The
// register layout, the port numbers, the count x decade-range encoding (the
// simplest one that gives exactly the 1 ms to 2550 s span) and deriving the
// time base from the system clock instead of a separate crystal are this
// design's choices.
module rtc #(
  parameter int unsigned CLKS_PER_MS = 250,
  parameter logic [4:0]  IN_ADDR     = 5'd3,
  parameter logic [4:0]  CNT_ADDR    = 5'd13,
  parameter logic [4:0]  CTL_ADDR    = 5'd14
) (
  input  logic       clk,
  input  logic       clr,
  input  logic       io_strobe,   // T3 of an I/O cycle
  input  logic [4:0] port_num,
  input  logic [7:0] l_bus,
  output logic [7:0] d_out,       // 8'hFF unless read
  output logic       int_req,
  output logic       ms_tick
);

  localparam int unsigned PW = $clog2(CLKS_PER_MS + 1);

  logic [PW-1:0] pre;
  logic [13:0]   dec;
  logic [7:0]    count, cnt;
  logic [2:0]    range;
  logic          rpt, running, done;
  logic          unit_tick;
  logic [13:0]   dec_top;

  always_comb begin
    case (range)
      3'd0:    dec_top = 14'd0;
      3'd1:    dec_top = 14'd9;
      3'd2:    dec_top = 14'd99;
      3'd3:    dec_top = 14'd999;
      default: dec_top = 14'd9999;
    endcase
  end

  assign ms_tick   = (pre == PW'(CLKS_PER_MS - 1));
  assign unit_tick = running && ms_tick && (dec == dec_top);

  always_comb begin
    d_out = 8'hFF;
    if (io_strobe && port_num == IN_ADDR)
      d_out = {done, running, 2'b00, rpt, range};
  end

  always_ff @(posedge clk) begin
    if (clr) begin
      pre     <= '0;
      dec     <= '0;
      count   <= '0;
      cnt     <= '0;
      range   <= '0;
      rpt     <= 1'b0;
      running <= 1'b0;
      done    <= 1'b0;
    end else begin
      pre <= ms_tick ? '0 : pre + 1'b1;
      if (running) begin
        if (ms_tick) dec <= unit_tick ? '0 : dec + 1'b1;
        if (unit_tick) begin
          if (cnt == 8'd1) begin
            done <= 1'b1;
            if (rpt) cnt <= count;
            else     running <= 1'b0;
          end else begin
            cnt <= cnt - 1'b1;
          end
        end
      end

      if (io_strobe && port_num == IN_ADDR) done <= 1'b0;
      if (io_strobe && port_num == CNT_ADDR) count <= l_bus;
      if (io_strobe && port_num == CTL_ADDR) begin
        range   <= l_bus[2:0];
        rpt     <= l_bus[3];
        running <= l_bus[7] && (count != 8'd0);
        done    <= 1'b0;
        pre     <= '0;
        dec     <= '0;
        cnt     <= count;
      end
    end
  end

  assign int_req = done;

endmodule
