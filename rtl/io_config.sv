// Behavioural model of the IO-element delay-chain configuration block
// (the vendor's ioconfig primitive). It stands for a dedicated cell of the
// FPGA; the published design uses it and does not design it.
//
// While ena is high, each rising edge of clk shifts datain into a DLY_W-bit
// shift register from the top, so a word sent LSB first ends up in place
// after DLY_W shifts. A high update at a rising edge copies the shift register
// to dataout, which drives the delay chain. The published text says the cell
// needs 10 clock cycles after the data before an update is valid; the model
// checks that rule with an assertion and applies the word on the update.
// There is no reset: like the FPGA cell after configuration, the model
// powers up with dataout = 0.
`timescale 1ps/1ps
module io_config #(
  parameter int unsigned DLY_W         = rst_shift_pkg::DLY_W,
  parameter int unsigned SETTLE_CYCLES = 10
) (
  input  logic             clk,
  input  logic             datain,
  input  logic             ena,
  input  logic             update,
  output logic [DLY_W-1:0] dataout = '0
);

  logic [DLY_W-1:0] sr      = '0;
  logic [7:0]       settled = 8'hff;

  always @(posedge clk) begin
    if (ena) begin
      sr      <= {datain, sr[DLY_W-1:1]};
      settled <= '0;
    end else if (settled != 8'hff) begin
      settled <= settled + 1'b1;
    end
    if (update) dataout <= sr;
  end

  a_settle: assert property (@(posedge clk) update |-> (32'(settled) >= SETTLE_CYCLES))
    else $error("io_config: update %0d cycles after data, needs %0d", settled, SETTLE_CYCLES);

endmodule
