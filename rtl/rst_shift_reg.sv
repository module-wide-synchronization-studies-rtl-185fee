// Register slice of the reset shift block on the front-end board's register
// bus.
//
// The board's firmware reaches its blocks through a register bus with an
// address, a read enable with read data and a write enable with write data.
// This slice owns one address, RST_SHIFT_ADDR. A write there stores
// wdata[5:0] as the reset shift setting and raises o_start for START_LEN
// cycles, long enough (3 cycles of the 31.25 MHz FSM clock) for the
// configuration FSM, which wants the start seen in two adjacent cycles of its
// own clock. A read of the address returns, one cycle after i_reg_re,
// {busy, start, 24'b0, setting} in the layout
//   [31] FSM busy, [30] start pending, [5:0] setting;
// other addresses read 0. i_busy comes from the FSM clock domain and passes
// a two-flip-flop synchronizer. The bus itself is the board's; the address,
// the auto-start on write and the read layout are this design's choices.
// Reset is active low and asynchronous and clears the setting to 0.
// Write data bits 31..6 are ignored, which lint reports as unused.
`timescale 1ps/1ps
module rst_shift_reg
  import rst_shift_pkg::*;
#(
  parameter logic [7:0]  RST_SHIFT_ADDR = 8'h30,
  parameter int unsigned START_LEN      = 15
) (
  input  logic               i_clk,
  input  logic               i_reset_n,
  input  logic [7:0]         i_reg_add,
  input  logic               i_reg_re,
  output logic [31:0]        o_reg_rdata,
  input  logic               i_reg_we,
  input  logic [31:0]        i_reg_wdata,
  output logic [CDATA_W-1:0] o_cdata,
  output logic               o_start,
  input  logic               i_busy
);

  logic [4:0] start_cnt;
  logic [1:0] busy_sync;

  always_ff @(posedge i_clk or negedge i_reset_n) begin
    if (!i_reset_n) begin
      o_cdata     <= '0;
      start_cnt   <= '0;
      busy_sync   <= '0;
      o_reg_rdata <= '0;
    end else begin
      busy_sync <= {busy_sync[0], i_busy};
      if (i_reg_we && i_reg_add == RST_SHIFT_ADDR) begin
        o_cdata   <= i_reg_wdata[CDATA_W-1:0];
        start_cnt <= 5'(START_LEN);
      end else if (start_cnt != 0) begin
        start_cnt <= start_cnt - 1'b1;
      end
      if (i_reg_re) begin
        if (i_reg_add == RST_SHIFT_ADDR)
          o_reg_rdata <= {busy_sync[1], (start_cnt != 0), {(30-CDATA_W){1'b0}}, o_cdata};
        else
          o_reg_rdata <= '0;
      end
    end
  end

  assign o_start = (start_cnt != 0);

endmodule
