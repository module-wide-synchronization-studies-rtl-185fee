// Behavioural model of the reset sampling of one readout ASIC on the tile
// module (testbench only; the ASIC itself is an external chip).
//
// The chip receives the 625 MHz clock and the run-start reset over the
// board's buffer tree: T_CLK_PS and T_RST_PS are their arrival delays
// (T_RST_PS >= T_CLK_PS). At each rising edge of its local clock the chip samples the reset with a
// flip-flop; while the reset is high its coarse counter is held at 0, after
// the reset falls it counts clock cycles, so the cycle that sees the reset
// low defines the first timestamp. If the reset changed less than T_WIN_PS
// before the clock edge, the flip-flop is metastable and takes a random value
// (o_nmeta counts such samples). A rising edge of i_inj (a test pulse that
// reaches all chips at the same time as their clock) latches the counter into o_ts.
`timescale 1ps/1ps
module mutrig_rst_model #(
  parameter int T_CLK_PS = 0,
  parameter int T_RST_PS = 0,
  parameter int T_WIN_PS = 40
) (
  input  logic        i_clk,
  input  logic        i_rst,
  input  logic        i_inj,
  output logic [15:0] o_ts,
  output int          o_nmeta
);

  logic        rst_l = 1'b0;
  logic [15:0] cnt   = '0;
  time         t_change = 0;

  initial begin
    o_ts    = '0;
    o_nmeta = 0;
  end

  // Only the reset's delay relative to the clock matters for the sampling,
  // so the model clocks on i_clk and delays the reset by T_RST_PS - T_CLK_PS
  // (reset pulses are many clock cycles long, so one edge at a time is in
  // flight).
  always @(i_rst) begin
    logic v;
    v = i_rst;
    #(T_RST_PS - T_CLK_PS);
    rst_l    = v;
    t_change = $time;
  end

  always @(posedge i_clk) begin
    logic s;
    if (t_change != 0 && $time - t_change < time'(T_WIN_PS)) begin
      s = 1'($urandom_range(0, 1));
      o_nmeta++;
    end else begin
      s = rst_l;
    end
    if (s) cnt <= '0;
    else   cnt <= cnt + 1'b1;
  end

  always @(posedge i_inj) o_ts = cnt;

endmodule
