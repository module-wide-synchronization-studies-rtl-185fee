// Behavioural model of the FPGA's double-data-rate output register
// (the vendor's altddio_out primitive, one bit wide). It is a model of a
// dedicated IO-element cell, not logic meant for synthesis.
//
// At each rising edge of outclock both datain_h and datain_l are captured.
// dataout shows the captured datain_h while outclock is high and the
// captured datain_l while it is low (the low value is moved to the output
// register at the falling edge), so the output carries two bits per cycle.
// aclr (active high, asynchronous) clears all registers. Port names follow
// the primitive; the one-bit width is what the reset shift block needs.
// Timing: datain_h appears at the rising edge that captures it, datain_l
// half a cycle later.
`timescale 1ps/1ps
module ddio_out (
  input  logic outclock,
  input  logic aclr,
  input  logic datain_h,
  input  logic datain_l,
  output logic dataout
);

  logic q_h;
  logic q_l_cap;
  logic q_l;

  always_ff @(posedge outclock or posedge aclr) begin
    if (aclr) begin
      q_h     <= 1'b0;
      q_l_cap <= 1'b0;
    end else begin
      q_h     <= datain_h;
      q_l_cap <= datain_l;
    end
  end

  always_ff @(negedge outclock or posedge aclr) begin
    if (aclr) q_l <= 1'b0;
    else      q_l <= q_l_cap;
  end

  assign dataout = outclock ? q_h : q_l;

endmodule
