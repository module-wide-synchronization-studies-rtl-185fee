// Integer clock divider.
//
// Produces the slow configuration clock of the reset shift block from the
// 156.25 MHz clock: with DIV = 5 the output runs at 31.25 MHz, as in the
// published design. A counter runs from 0 to DIV-1; the registered output is
// high for the first DIV/2 counts (2 of 5 input cycles, a 40 % duty cycle,
// which is this design's choice for an odd ratio). The output changes one
// input cycle after the counter, so it is glitch free. Reset (active low,
// asynchronous) holds the output low and parks the counter at DIV-1, so the
// first period after reset is complete.
`timescale 1ps/1ps
module clk_div #(
  parameter int unsigned DIV = rst_shift_pkg::CLK_DIV
) (
  input  logic i_clk,
  input  logic i_reset_n,
  output logic o_clk
);

  localparam int unsigned CW = (DIV > 1) ? $clog2(DIV) : 1;

  logic [CW-1:0] cnt;
  logic [CW-1:0] cnt_nxt;

  always_comb begin
    if (32'(cnt) >= DIV - 1) cnt_nxt = '0;
    else                     cnt_nxt = cnt + 1'b1;
  end

  always_ff @(posedge i_clk or negedge i_reset_n) begin
    if (!i_reset_n) begin
      cnt   <= CW'(DIV - 1);
      o_clk <= 1'b0;
    end else begin
      cnt   <= cnt_nxt;
      o_clk <= (32'(cnt_nxt) < DIV / 2);
    end
  end

endmodule
