// Testbench of the delay-chain model: for every setting it measures the
// time from an input edge to the output edge, both rising and falling, and
// compares it with setting * 22 ps.
`timescale 1ps/1ps
module tb_delay_chain;
  localparam int DT = 22;
  logic din = 1'b0, q;
  logic [4:0] sel = '0;
  int checks = 0, failures = 0;
  time t0, t1;

  delay_chain #(.DELTA_T_PS(DT)) dut (.datain(din), .delayctrlin(sel), .dataout(q));

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    for (int s = 0; s < 32; s++) begin
      sel = 5'(s);
      #2000;
      din = 1'b1; t0 = $time;
      if (s != 0) begin
        #1;
        checks++; if (q !== 1'b0) begin failures++; $display("setting %0d: no delay", s); end
      end
      wait (q === 1'b1); t1 = $time;
      checks++;
      if (t1 - t0 != time'(s * DT)) begin failures++; $display("setting %0d: rise delay %0t", s, t1 - t0); end
      #2000;
      din = 1'b0; t0 = $time;
      wait (q === 1'b0); t1 = $time;
      checks++;
      if (t1 - t0 != time'(s * DT)) begin failures++; $display("setting %0d: fall delay %0t", s, t1 - t0); end
    end
    // a short pulse is kept (transport delay)
    sel = 5'd31; #2000;
    din = 1'b1; #100; din = 1'b0;
    #(31 * DT - 100 + 50);
    checks++; if (q !== 1'b1) begin failures++; $display("short pulse lost"); end
    #200;
    checks++; if (q !== 1'b0) begin failures++; $display("short pulse too long"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
