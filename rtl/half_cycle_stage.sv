// Half-cycle shift stage in front of the DDR output register.
//
// A DDR output register that gets the same bit on its high and low inputs
// passes the reset on at the rising clock edge. If its high input instead
// gets the reset one clock cycle late, a change of the reset first appears
// on the low input, i.e. half a cycle after the rising edge: the reset is
// shifted by 180 degrees (800 ps at 625 MHz). This stage holds the flip-flop
// that makes the one-cycle-late copy and selects, with i_datashift (bit 5 of
// the shift setting), which copy drives the high input. That structure is
// the published one. i_datashift comes from the slow configuration clock
// domain and is a static setting, so it passes a two-flip-flop synchronizer
// first (this design's choice). Reset is active low and asynchronous.
// Timing: o_datain_l follows i_d combinationally; with the shift selected
// o_datain_h is i_d delayed by one i_clk cycle.
`timescale 1ps/1ps
module half_cycle_stage (
  input  logic i_clk,
  input  logic i_reset_n,
  input  logic i_datashift,
  input  logic i_d,
  output logic o_datain_h,
  output logic o_datain_l
);

  logic [1:0] ds_sync;
  logic       d_q;

  always_ff @(posedge i_clk or negedge i_reset_n) begin
    if (!i_reset_n) begin
      ds_sync <= '0;
      d_q     <= 1'b0;
    end else begin
      ds_sync <= {ds_sync[0], i_datashift};
      d_q     <= i_d;
    end
  end

  assign o_datain_h = ds_sync[1] ? d_q : i_d;
  assign o_datain_l = i_d;

endmodule
