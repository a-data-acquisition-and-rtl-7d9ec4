// isolation: Isolation System between an I/O port and the DAS bus.
//
// In the hardware every line crosses an optical isolator; as logic this is a
// buffer for the data, External Control, External Sense, OUTACC and INPACC
// lines. The
// two ready lines get special treatment so that a ready edge never overtakes
// the slower data lines: when a ready line becomes active, a one-shot of
// DELAY clock periods is started and the isolated ready line becomes active
// only at its end; when the ready line returns to its inactive level, the
// isolated line follows at once (a pending delay is abandoned). The ready lines
// also change sense on crossing: active-high OUTRDY on the port side is
// active-low on the DAS bus, and active-low INPRDY on the DAS bus is
// active-high on the port side.
//
// The buffering, the delayed leading edge, the undelayed trailing edge and the
// sense inversion follow the document. The delay length (no value is given)
// and its counter form are this design's choices.
module isolation #(
  parameter int unsigned DELAY = 8
) (
  input  logic       clk,
  input  logic       clr,
  // I/O port side
  input  logic [7:0] port_out_data,
  input  logic       port_outrdy,
  output logic       port_outacc_n,
  output logic [7:0] port_in_data,
  output logic       port_inprdy,
  input  logic       port_inpacc,
  input  logic [3:0] port_ext_ctl,
  output logic [5:0] port_ext_sense,
  // DAS bus side
  output logic [7:0] das_out_data,
  output logic       das_outrdy_n,
  input  logic       das_outacc_n,
  input  logic [7:0] das_in_data,
  input  logic       das_inprdy_n,
  output logic       das_inpacc,
  output logic [3:0] das_ext_ctl,
  input  logic [5:0] das_ext_sense
);

  logic outrdy_dly, inprdy_dly;

  isolation_delay #(.DELAY(DELAY)) u_out_dly (
    .clk(clk), .clr(clr), .in_active(port_outrdy),   .out_active(outrdy_dly));
  isolation_delay #(.DELAY(DELAY)) u_in_dly (
    .clk(clk), .clr(clr), .in_active(!das_inprdy_n), .out_active(inprdy_dly));

  assign das_out_data   = port_out_data;
  assign das_outrdy_n   = !outrdy_dly;
  assign das_ext_ctl    = port_ext_ctl;
  assign port_outacc_n  = das_outacc_n;
  assign port_in_data   = das_in_data;
  assign das_inpacc     = port_inpacc;
  assign port_inprdy    = inprdy_dly;
  assign port_ext_sense = das_ext_sense;

endmodule
