// Testbench of clk_div: checks that the divided clock has a period of DIV
// input cycles, is high for DIV/2 of them, and is held low in reset.
`timescale 1ps/1ps
module tb_clk_div;
  localparam int unsigned DIV = 5;
  logic clk = 1'b0, rst_n = 1'b1, oclk;
  int checks = 0, failures = 0;

  clk_div #(.DIV(DIV)) dut (.i_clk(clk), .i_reset_n(rst_n), .o_clk(oclk));

  always #3200 clk = ~clk;   // 156.25 MHz

  initial begin
    #(6400 * 5000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100 rst_n = 1'b0;
    repeat (4) @(posedge clk);
    #1;
    checks++; if (oclk !== 1'b0) begin failures++; $display("o_clk high in reset"); end
    rst_n = 1'b1;
    // After the first rising edge the output must repeat the pattern
    // high for DIV/2 input cycles, low for the rest.
    @(posedge oclk);
    #1;
    for (int n = 0; n < 40 * DIV; n++) begin
      checks++;
      if (oclk !== ((n % DIV) < DIV / 2)) begin
        failures++;
        $display("sample %0d: o_clk=%0b", n, oclk);
      end
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
