// Reset shift block: module-wide phase alignment of the run-start reset.
//
// All readout ASICs of a tile module sample the common reset with their
// local 625 MHz clock; the cycle in which they see it defines their first
// timestamp. If the reset edge falls into the setup/hold window of one chip,
// that chip ends up one 1.6 ns cycle off. This block delays the reset that
// the front-end board sends to the module, so that the edge can be placed in
// the middle of the clock cycle for every chip at once.
//
// Data path (625 MHz, i_clk625):  i_d -> half_cycle_stage -> ddio_out ->
// delay_chain -> o_d. A 6-bit setting s gives a delay of
//   s[5] * 800 ps  +  s[4:0] * DELTA_T_PS  (22 ps steps),
// covering 64 settings over nearly one clock period, on top of the fixed
// latency of the DDR output register (the reset leaves at the first rising
// edge of i_clk625 that samples it).
// Configuration path: a write to the register slice (rst_shift_reg, on the
// 156.25 MHz register clock i_clk156) stores s and starts the FSM, which runs
// on the 31.25 MHz clock from clk_div, shifts s[4:0] into io_config and,
// 17 FSM cycles after the start, updates the delay chain and the half-cycle
// select together. Reading the register returns s and a busy flag.
// This structure (FSM, divider, flip-flop plus DDR register for the half
// cycle, serially configured delay chain) is the published one; the register
// address and layout, reset handling and CDC synchronizers are this design's
// choices. ddio_out, io_config and delay_chain are behavioural models of FPGA
// IO-element cells. i_reset_n is active low and asynchronous and is expected
// to be released synchronously to the clocks.
`timescale 1ps/1ps
module rst_shift_block
  import rst_shift_pkg::*;
#(
  parameter int unsigned DELTA_T_PS     = 22,
  parameter logic [7:0]  RST_SHIFT_ADDR = 8'h30
) (
  input  logic        i_clk625,
  input  logic        i_clk156,
  input  logic        i_reset_n,
  input  logic        i_d,
  output logic        o_d,
  input  logic [7:0]  i_reg_add,
  input  logic        i_reg_re,
  output logic [31:0] o_reg_rdata,
  input  logic        i_reg_we,
  input  logic [31:0] i_reg_wdata
);

  logic               clk_cfg;
  logic [CDATA_W-1:0] setting;
  logic               start;
  logic               busy;
  logic               cfg_data;
  logic               cfg_ena;
  logic               cfg_update;
  logic               datashift;
  logic [DLY_W-1:0]   dly;
  logic               din_h;
  logic               din_l;
  logic               d_ddr;

  rst_shift_reg #(.RST_SHIFT_ADDR(RST_SHIFT_ADDR)) u_reg (
    .i_clk       (i_clk156),
    .i_reset_n   (i_reset_n),
    .i_reg_add   (i_reg_add),
    .i_reg_re    (i_reg_re),
    .o_reg_rdata (o_reg_rdata),
    .i_reg_we    (i_reg_we),
    .i_reg_wdata (i_reg_wdata),
    .o_cdata     (setting),
    .o_start     (start),
    .i_busy      (busy)
  );

  clk_div u_div (
    .i_clk     (i_clk156),
    .i_reset_n (i_reset_n),
    .o_clk     (clk_cfg)
  );

  rst_shift_fsm u_fsm (
    .i_clk       (clk_cfg),
    .i_reset_n   (i_reset_n),
    .i_start     (start),
    .i_cdata     (setting),
    .o_cdata     (cfg_data),
    .o_cena      (cfg_ena),
    .o_cupdate   (cfg_update),
    .o_datashift (datashift),
    .o_busy      (busy)
  );

  io_config u_ioconfig (
    .clk     (clk_cfg),
    .datain  (cfg_data),
    .ena     (cfg_ena),
    .update  (cfg_update),
    .dataout (dly)
  );

  half_cycle_stage u_half (
    .i_clk       (i_clk625),
    .i_reset_n   (i_reset_n),
    .i_datashift (datashift),
    .i_d         (i_d),
    .o_datain_h  (din_h),
    .o_datain_l  (din_l)
  );

  ddio_out u_ddio (
    .outclock (i_clk625),
    .aclr     (!i_reset_n),
    .datain_h (din_h),
    .datain_l (din_l),
    .dataout  (d_ddr)
  );

  delay_chain #(.DELTA_T_PS(DELTA_T_PS)) u_dly (
    .datain      (d_ddr),
    .delayctrlin (dly),
    .dataout     (o_d)
  );

endmodule
