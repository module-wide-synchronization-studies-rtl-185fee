// Behavioural model of the FPGA's programmable IO delay chain.
// It stands for an analog delay line of the IO element; it is not logic
// meant for synthesis.
//
// dataout follows datain after delayctrlin * DELTA_T_PS picoseconds, with
// transport delay so that every edge is kept. The step of 22 ps is the one
// measured on the target FPGA (22.17 ps and 22.42 ps in the two halves of
// the clock cycle); 32 settings then cover about 700 ps, nearly half of the
// 1.6 ns cycle of the 625 MHz reset clock. The model has no insertion delay
// at setting 0 and takes a new setting at once.
`timescale 1ps/1ps
module delay_chain #(
  parameter int unsigned DELTA_T_PS = 22,
  parameter int unsigned DLY_W      = rst_shift_pkg::DLY_W
) (
  input  logic             datain,
  input  logic [DLY_W-1:0] delayctrlin,
  output logic             dataout
);

  initial dataout = 1'b0;

  // Each input edge starts its own delayed update, which keeps every edge
  // (transport delay) rather than cancelling pending ones.
  always @(datain) begin
    if (delayctrlin == '0) begin
      dataout <= datain;
    end else begin
      fork
        begin : edge_delay
          automatic logic        v = datain;
          automatic int unsigned d = int'(delayctrlin) * DELTA_T_PS;
          #(d) dataout <= v;
        end
      join_none
    end
  end

endmodule
