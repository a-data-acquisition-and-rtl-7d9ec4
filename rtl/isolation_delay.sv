// isolation_delay: one ready-line delay of the Isolation System.
//
// out_active follows in_active, except that a rising in_active is passed on
// only after in_active has stayed high for DELAY clock periods (the one-shot
// pulse); a falling in_active clears out_active in the same clock.
module isolation_delay #(
  parameter int unsigned DELAY = 8
) (
  input  logic clk,
  input  logic clr,
  input  logic in_active,
  output logic out_active
);

  localparam int unsigned CW = $clog2(DELAY + 1);
  logic [CW-1:0] count;

  always_ff @(posedge clk) begin
    if (clr || !in_active) begin
      count      <= '0;
      out_active <= 1'b0;
    end else if (!out_active) begin
      if (count == CW'(DELAY - 1)) out_active <= 1'b1;
      else                         count      <= count + 1'b1;
    end
  end

endmodule
