// io_port: microcomputer Input/Output Port.
//
// Three processor-addressed sections plus an interrupt section:
//  * Control: an OUT to CTL_ADDR loads the control byte. EC7..EC4 drive the
//    four External Control lines; EC3 status enable, EC2 output interrupt
//    enable, EC1 input interrupt enable, EC0 INIT.
//  * Output: an OUT to OUT_ADDR loads the output data register and raises
//    OUTRDY. The device accepts with a low pulse on outacc_n, which drops
//    OUTRDY and marks the output transfer complete.
//  * Input: a pulse on inprdy latches in_data into the input data register
//    and raises INPACC (input data waiting). An INP from IN_ADDR returns the
//    register and drops INPACC.
//  * Status: with EC3 set, the next INP returns the status byte instead:
//    {ES7, ES6, ES5, input waiting, ES3, ES2, ES1, OUTRDY}; EC3 then clears.
//  * Interrupt: int_req while (EC2 and output complete) or (EC1 and input
//    waiting).
// The processor side is strobed in T3 of an I/O cycle: io_strobe, the port
// number (from the 8008 instruction on the H Bus) and, for outputs, the
// accumulator on the L Bus. An input drives d_out during that T3 (8'hFF
// otherwise; the D Bus is wired-AND).
//
// The sections, flag behaviour and byte formats follow the document; where
// its text and its status byte diagram differ on status bit 0 (OUTACC against OUTRDY) the
// diagram is followed. The port numbers, the meaning given to INIT (clears the
// handshake state), EC3 acting once, and the latched form of the ready flags
// are this design's choices.
module io_port
  import dars_pkg::*;
#(
  parameter logic [4:0] IN_ADDR  = 5'd1,
  parameter logic [4:0] OUT_ADDR = 5'd9,
  parameter logic [4:0] CTL_ADDR = 5'd10
) (
  input  logic       clk,
  input  logic       clr,
  // processor side
  input  logic       io_strobe,
  input  logic [4:0] port_num,
  input  logic [7:0] l_bus,
  output logic [7:0] d_out,
  output logic       int_req,
  // device side
  output logic [7:0] out_data,
  output logic       outrdy,
  input  logic       outacc_n,
  input  logic [7:0] in_data,
  input  logic       inprdy,
  output logic       inpacc,
  output logic [3:0] ext_ctl,
  input  logic [5:0] ext_sense
);

  io_ctl_t ctl;
  logic [7:0] in_reg;
  logic out_done, outacc_q, inprdy_q;
  logic rd_sel;

  assign rd_sel  = io_strobe && (port_num == IN_ADDR);
  assign ext_ctl = ctl.ext_ctl;

  always_comb begin
    d_out = 8'hFF;
    if (rd_sel)
      d_out = ctl.status_en ? {ext_sense[5:3], inpacc, ext_sense[2:0], outrdy} : in_reg;
  end

  always_ff @(posedge clk) begin
    if (clr) begin
      ctl      <= '0;
      in_reg   <= '0;
      out_data <= '0;
      outrdy   <= 1'b0;
      inpacc   <= 1'b0;
      out_done <= 1'b0;
      outacc_q <= 1'b1;
      inprdy_q <= 1'b0;
    end else begin
      outacc_q <= outacc_n;
      inprdy_q <= inprdy;

      if (!outacc_n && outacc_q && outrdy) begin
        outrdy   <= 1'b0;
        out_done <= 1'b1;
      end
      if (inprdy && !inprdy_q) begin
        in_reg <= in_data;
        inpacc <= 1'b1;
      end

      if (io_strobe && port_num == CTL_ADDR) begin
        ctl <= io_ctl_t'(l_bus);
        if (l_bus[0]) begin
          outrdy   <= 1'b0;
          inpacc   <= 1'b0;
          out_done <= 1'b0;
        end
      end
      if (io_strobe && port_num == OUT_ADDR) begin
        out_data <= l_bus;
        outrdy   <= 1'b1;
        out_done <= 1'b0;
      end
      if (rd_sel) begin
        if (ctl.status_en) ctl.status_en <= 1'b0;
        else               inpacc        <= 1'b0;
      end
    end
  end

  assign int_req = (ctl.out_int_en && out_done) || (ctl.in_int_en && inpacc);

endmodule
