// Testbench of the delay-chain configuration model: random 5-bit words are
// shifted in LSB first and applied with an update 11 cycles later; the output
// must change only at the update and then hold the word.
`timescale 1ps/1ps
module tb_io_config;
  logic clk = 1'b0, din = 1'b0, ena = 1'b0, upd = 1'b0;
  logic [4:0] q, w, prev;
  int checks = 0, failures = 0;

  io_config dut (.clk(clk), .datain(din), .ena(ena), .update(upd), .dataout(q));

  always #16000 clk = ~clk;

  initial begin
    #(32000 * 5000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    prev = '0;
    repeat (2) @(negedge clk);
    checks++; if (q !== 5'd0) begin failures++; $display("power-up value %b", q); end
    for (int k = 0; k < 60; k++) begin
      w = 5'($urandom);
      for (int b = 0; b < 5; b++) begin
        @(negedge clk); ena = 1'b1; din = w[b];
      end
      @(negedge clk); ena = 1'b0; din = 1'b0;
      repeat (10) begin
        @(negedge clk);
        checks++; if (q !== prev) begin failures++; $display("output changed before update"); end
      end
      upd = 1'b1;
      @(negedge clk); upd = 1'b0;
      checks++; if (q !== w) begin failures++; $display("word %b, expected %b", q, w); end
      prev = w;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
