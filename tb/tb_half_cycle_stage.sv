// Testbench of half_cycle_stage: with the shift off both DDR inputs carry
// the input; with it on the high input carries the input of the previous
// clock cycle. The select passes a 2-cycle synchronizer, which is checked too.
`timescale 1ps/1ps
module tb_half_cycle_stage;
  logic clk = 1'b0, rst_n = 1'b1, ds = 1'b0, d = 1'b0;
  logic dh, dl;
  logic d_prev;
  int checks = 0, failures = 0;

  half_cycle_stage dut (.i_clk(clk), .i_reset_n(rst_n), .i_datashift(ds), .i_d(d),
                        .o_datain_h(dh), .o_datain_l(dl));

  always #800 clk = ~clk;   // 625 MHz

  initial begin
    #(1600 * 5000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #100 rst_n = 1'b0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    d_prev = 1'b0;
    for (int phase = 0; phase < 4; phase++) begin
      @(negedge clk);
      ds = phase[0];
      // two cycles for the synchronizer
      @(negedge clk); d_prev = d; d = 1'($urandom_range(0, 1));
      @(negedge clk); d_prev = d; d = 1'($urandom_range(0, 1));
      #1;
      check(dh == (phase[0] ? d_prev : d), "select after two cycles");
      for (int k = 0; k < 100; k++) begin
        @(negedge clk);
        d_prev = d;
        d = 1'($urandom_range(0, 1));
        #1;
        check(dl == d, "low input follows i_d");
        check(dh == (phase[0] ? d_prev : d), $sformatf("high input, shift=%0b", phase[0]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
