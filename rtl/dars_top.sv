// dars_top: data acquisition and recording system (DARS), digital core.
//
// Wires the parts of the system around the bus of an external Intel 8008
// processor: the front panel unit (keyboard/display circuit, display
// multiplexer, control circuit, data circuit), the 16K byte memory, two I/O
// ports (one to the data acquisition (DAS) bus through the isolation system,
// one to the cassette interface), the real-time clock, and the D/HL busses
// that join them.
//
// Processor interface (one clock per processor timing state):
//   cpu_state, cpu_cycle  current timing state and cycle type (8008 codes)
//   cpu_hl                the processor's latched 14-bit address; in an I/O
//                         cycle H = instruction bits 5..0 (port number in
//                         bits 13..9) and L = accumulator
//   cpu_d_out             the processor's D Bus drive (8'hFF when released)
//   d_bus                 the resolved D Bus the processor reads
//   cpu_int               interrupt request from the front panel
//   sys_clr               system clear (power-up reset or the CLR key)
// An I/O cycle's T3 is the transfer strobe. OUT to SPECIAL_PORT starts a
// panel operation at the accumulator's address; OUT to PRST_PORT is the
// Priority Reset. The interrupt requests of the I/O ports and the real-time
// clock pass the panel's priority chain (blocked while MASK is set) and leave
// as port_int_req. Port map: DAS port INP 1 / OUT 9 / control OUT 10,
// cassette port INP 2 / OUT 11 / OUT 12, real-time clock INP 3 / count
// OUT 13 / control OUT 14.
//
// The DAS interface modules, the cassette interface and drive and the
// processor are outside this RTL; their signals are ports.
// EQUAL, the Keyboard Display Register, the phase number and the single-step
// flag are used inside their own blocks and left unconnected here.
// Port numbers, tick dividers and the processor-running detector (not in STOP
// and no panel operation active) are this design's choices; the connections
// follow the system architecture of the document.
module dars_top
  import dars_pkg::*;
#(
  parameter int unsigned SCAN_DIV     = 16,    // clocks per keyboard scan step
  parameter int unsigned MUX_DIV      = 64,    // clocks per display phase
  parameter int unsigned ISO_DELAY    = 8,     // isolation ready-line delay
  parameter logic [4:0]  SPECIAL_PORT = 5'd16, // OUT 20 (octal)
  parameter logic [4:0]  PRST_PORT    = 5'd17,
  parameter int unsigned RTC_CLKS_PER_MS = 250  // clocks (processor states) per ms
) (
  input  logic        clk,
  input  logic        rst,
  // processor bus
  input  cpu_state_t  cpu_state,
  input  cycle_t      cpu_cycle,
  input  logic [13:0] cpu_hl,
  input  logic [7:0]  cpu_d_out,
  output logic [7:0]  d_bus,
  output logic [13:0] hl_bus,
  output logic        cpu_int,
  output logic        sys_clr,
  input  logic        prin,
  output logic        port_int_req,
  output logic        rtc_tick,      // 1 ms time base of the real-time clock
  // front panel keys and switch
  input  logic [15:0] num_key,
  input  logic        prefix1_key,
  input  logic        prefix2_key,
  input  logic [9:0]  fn_key,
  input  logic        dx_key,
  input  logic        cd_key,
  input  logic        clr_key,
  input  logic        service_sw,
  input  logic        tape,
  // front panel lamps and display
  output logic [3:0]  cycle_lamp,
  output logic [3:0]  flag_lamp,
  output logic        pwr_lamp,
  output logic        msg_lamp,
  output logic        keybd_lamp,
  output logic        run_lamp,
  output logic        tape_lamp,
  output logic        prefix_lamp,
  output logic [3:0]  digit_en,
  output logic [6:0]  seg,
  // DAS bus
  output logic [7:0]  das_out_data,
  output logic        das_outrdy_n,
  input  logic        das_outacc_n,
  input  logic [7:0]  das_in_data,
  input  logic        das_inprdy_n,
  output logic        das_inpacc,
  output logic [3:0]  das_ext_ctl,
  input  logic [5:0]  das_ext_sense,
  // cassette interface port
  output logic [7:0]  cas_out_data,
  output logic        cas_outrdy,
  input  logic        cas_outacc_n,
  input  logic [7:0]  cas_in_data,
  input  logic        cas_inprdy,
  output logic        cas_inpacc,
  output logic [3:0]  cas_ext_ctl,
  input  logic [5:0]  cas_ext_sense,
  // panel status, for observation
  output logic        fp_busy,
  output logic        fp_mask,
  output logic [15:0] fp_adr_reg,
  output logic [7:0]  fp_d_reg,
  output logic [15:0] fp_switch_reg,
  output logic [7:0]  fp_save_reg,
  output disp_state_t fp_disp_state
);

  logic clr;
  logic scan_tick, mux_tick;
  logic [$clog2(SCAN_DIV)-1:0] scan_cnt;
  logic [$clog2(MUX_DIV)-1:0]  mux_cnt;

  // keyboard <-> display multiplexer
  logic [4:0] kbus;
  logic valid, fflg, bit_flag, dx, cd, load, start, run, blank;
  logic [7:0] mu_addr;
  logic [3:0] sw_digit, mux_phase, disp_bus;
  logic [1:0] sw_phase;
  // control <-> data
  logic [7:0] mar;
  logic busy, mask, fp_int, prio_out, instenb, contenb;
  logic lastenb, instp, mclr, msg, dma, fp_d_drive;
  logic [2:0] ext_unused;
  logic [7:0] fp_d_out, save_reg, d_reg;
  logic [13:0] fp_hl_out;
  logic [15:0] adr_reg, switch_reg;
  logic [3:0] flag_reg;
  // I/O
  logic io_strobe, special, prst;
  logic [4:0] port_num;
  logic [7:0] das_port_d, cas_port_d, mem_rdata, mem_d;
  logic das_int, cas_int;
  logic [7:0] p_out_data, p_in_data;
  logic p_outrdy, p_outacc_n, p_inprdy, p_inpacc;
  logic [3:0] p_ext_ctl;
  logic [5:0] p_ext_sense;
  logic [7:0] d_src [6];
  logic [7:0] rtc_d;
  logic rtc_int;

  assign clr = rst || sys_clr;

  // Keyboard scan and display multiplex clocks.
  always_ff @(posedge clk) begin
    if (rst) begin
      scan_cnt <= '0;
      mux_cnt  <= '0;
    end else begin
      scan_cnt <= (scan_cnt == ($bits(scan_cnt))'(SCAN_DIV - 1)) ? '0 : scan_cnt + 1'b1;
      mux_cnt  <= (mux_cnt  == ($bits(mux_cnt))'(MUX_DIV - 1))   ? '0 : mux_cnt + 1'b1;
    end
  end
  assign scan_tick = (scan_cnt == '0);
  assign mux_tick  = (mux_cnt == '0);

  // Processor executing a program of its own.
  assign run = (cpu_state != S_STOP) && !busy;

  // I/O cycle decoding.
  assign io_strobe = (cpu_cycle == CYC_IO) && (cpu_state == S_T3);
  assign port_num  = cpu_hl[13:9];
  assign special   = io_strobe && (port_num == SPECIAL_PORT);
  assign prst      = io_strobe && (port_num == PRST_PORT);

  fp_keyboard u_kbd (
    .clk, .clr, .scan_tick,
    .num_key, .prefix1_key, .prefix2_key, .fn_key, .dx_key, .cd_key, .clr_key, .service_sw,
    .cycle_ind ((cpu_state == S_STOP) ? 4'b0000 :
                {cpu_cycle == CYC_IO, cpu_cycle == CYC_INST,
                 cpu_cycle == CYC_WRITE, cpu_cycle == CYC_READ}),
    .flag_ind  (flag_reg),
    .msg_set   (msg),
    .start,
    .tape,
    .key_state (fp_disp_state == DS_KEY),
    .run,
    .disp_bus, .mux_phase, .blank,
    .kbus, .valid, .fflg, .bit_flag, .dx, .cd, .sys_clr,
    .cycle_lamp, .flag_lamp, .pwr_lamp, .msg_lamp, .keybd_lamp, .run_lamp, .tape_lamp,
    .prefix_lamp, .digit_en, .seg
  );

  fp_display_mux u_dmux (
    .clk, .clr, .mux_tick, .valid, .fflg, .bit_flag, .kbus, .dx, .cd, .busy,
    .seq (1'b0), .run, .adr_reg, .d_reg,
    .equal (), .mu_addr, .load, .start, .kdr (), .sw_digit, .sw_phase, .phase (), .mux_phase,
    .disp_bus, .blank, .disp_state (fp_disp_state)
  );

  fp_control u_ctl (
    .clk, .clr, .state (cpu_state), .cycle (cpu_cycle),
    .load, .mu_addr_bus (mu_addr), .special, .l_bus (hl_bus[7:0]),
    .lastenb, .instp, .mclr, .prst, .prin,
    .mar, .busy, .mask, .int_req (fp_int), .prio_out, .instenb, .contenb, .single_step ()
  );

  fp_data u_data (
    .clk, .clr, .state (cpu_state), .cycle (cpu_cycle), .mar, .instenb, .contenb, .busy,
    .d_bus, .hl_bus, .sw_digit, .sw_phase,
    .d_out (fp_d_out), .d_drive (fp_d_drive), .hl_out (fp_hl_out), .dma, .lastenb, .instp,
    .mclr, .msg, .ext_unused, .adr_reg, .d_reg, .switch_reg, .save_reg, .flag_reg
  );

  dars_memory u_mem (
    .clk, .addr (hl_bus), .we ((cpu_cycle == CYC_WRITE) && (cpu_state == S_T3)),
    .wdata (d_bus), .rdata (mem_rdata)
  );
  assign mem_d = ((cpu_cycle == CYC_INST || cpu_cycle == CYC_READ) && cpu_state == S_T3
                  && !fp_d_drive) ? mem_rdata : 8'hFF;

  io_port #(.IN_ADDR(5'd1), .OUT_ADDR(5'd9), .CTL_ADDR(5'd10)) u_das_port (
    .clk, .clr, .io_strobe, .port_num, .l_bus (hl_bus[7:0]), .d_out (das_port_d),
    .int_req (das_int),
    .out_data (p_out_data), .outrdy (p_outrdy), .outacc_n (p_outacc_n),
    .in_data (p_in_data), .inprdy (p_inprdy), .inpacc (p_inpacc),
    .ext_ctl (p_ext_ctl), .ext_sense (p_ext_sense)
  );

  isolation #(.DELAY(ISO_DELAY)) u_iso (
    .clk, .clr,
    .port_out_data (p_out_data), .port_outrdy (p_outrdy), .port_outacc_n (p_outacc_n),
    .port_in_data (p_in_data), .port_inprdy (p_inprdy), .port_inpacc (p_inpacc),
    .port_ext_ctl (p_ext_ctl),
    .port_ext_sense (p_ext_sense),
    .das_out_data, .das_outrdy_n, .das_outacc_n, .das_in_data, .das_inprdy_n, .das_inpacc,
    .das_ext_ctl, .das_ext_sense
  );

  io_port #(.IN_ADDR(5'd2), .OUT_ADDR(5'd11), .CTL_ADDR(5'd12)) u_cas_port (
    .clk, .clr, .io_strobe, .port_num, .l_bus (hl_bus[7:0]), .d_out (cas_port_d),
    .int_req (cas_int),
    .out_data (cas_out_data), .outrdy (cas_outrdy), .outacc_n (cas_outacc_n),
    .in_data (cas_in_data), .inprdy (cas_inprdy), .inpacc (cas_inpacc),
    .ext_ctl (cas_ext_ctl), .ext_sense (cas_ext_sense)
  );

  rtc #(.CLKS_PER_MS(RTC_CLKS_PER_MS), .IN_ADDR(5'd3), .CNT_ADDR(5'd13), .CTL_ADDR(5'd14)) u_rtc (
    .clk, .clr, .io_strobe, .port_num, .l_bus (hl_bus[7:0]), .d_out (rtc_d),
    .int_req (rtc_int), .ms_tick (rtc_tick)
  );

  assign d_src[0] = cpu_d_out;
  assign d_src[1] = mem_d;
  assign d_src[2] = fp_d_out;
  assign d_src[3] = das_port_d;
  assign d_src[4] = cas_port_d;
  assign d_src[5] = rtc_d;

  dars_bus #(.N_D(6)) u_bus (
    .d_src, .cpu_hl, .dma, .hl_pull (fp_hl_out), .d_bus, .hl_bus
  );

  assign cpu_int       = fp_int;
  assign port_int_req  = prio_out && (das_int || cas_int || rtc_int);
  assign fp_busy       = busy;
  assign fp_mask       = mask;
  assign fp_adr_reg    = adr_reg;
  assign fp_d_reg      = d_reg;
  assign fp_switch_reg = switch_reg;
  assign fp_save_reg   = save_reg;

endmodule
