// Testbench of the DDR output register model: random bit pairs go in at each
// rising edge; the output must show the high bit during the high phase and
// the low bit during the low phase of that same cycle.
`timescale 1ps/1ps
module tb_ddio_out;
  logic clk = 1'b0, aclr = 1'b1, dh = 1'b0, dl = 1'b0, q;
  logic eh, el;
  int checks = 0, failures = 0;

  ddio_out dut (.outclock(clk), .aclr(aclr), .datain_h(dh), .datain_l(dl), .dataout(q));

  always #800 clk = ~clk;

  initial begin
    #(1600 * 5000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #100;
    checks++; if (q !== 1'b0) begin failures++; $display("not cleared"); end
    @(negedge clk) aclr = 1'b0;
    for (int k = 0; k < 500; k++) begin
      @(negedge clk);
      dh = 1'($urandom_range(0, 1)); dl = 1'($urandom_range(0, 1));
      eh = dh; el = dl;
      @(posedge clk);
      #1; dh = ~dh; dl = ~dl;     // inputs change after the edge: must not matter
      #400;
      checks++; if (q !== eh) begin failures++; $display("high phase %0d: %b, expected %b", k, q, eh); end
      @(negedge clk);
      #400;
      checks++; if (q !== el) begin failures++; $display("low phase %0d: %b, expected %b", k, q, el); end
      // restore inputs for the next pair
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
