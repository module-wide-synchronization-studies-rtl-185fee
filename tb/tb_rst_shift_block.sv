// End-to-end testbench of rst_shift_block at its default parameters.
//
// For each of the 64 settings it writes the setting over the register bus,
// polls the busy flag, then sends a reset pulse and measures the time from
// the 625 MHz clock edge that samples the reset to the rising and falling
// edges of the shifted reset. Expected: setting[5] * 800 ps +
// setting[4:0] * 22 ps. It also checks that a new setting only takes effect
// once its configuration has finished, the configuration time (17 cycles of
// the 31.25 MHz clock plus the start detection), the register read-back and
// that a firmware reset during a configuration leaves the block usable.
// Each of these mechanisms is counted and must have happened.
`timescale 1ps/1ps
module tb_rst_shift_block;
  localparam int DT = 22;
  localparam int HALF = 800;

  logic clk625 = 1'b0, clk156 = 1'b0, rst_n = 1'b1, d = 1'b0, od;
  logic [7:0]  add = '0;
  logic        re = 1'b0, we = 1'b0;
  logic [31:0] wdata = '0, rdata;
  int checks = 0, failures = 0;
  time meas;   // edge delay captured by the forked waits in pulse()
  int n_half = 0, n_chain = 0, n_deferred = 0, n_abort = 0, n_update = 0;

  rst_shift_block dut (
    .i_clk625(clk625), .i_clk156(clk156), .i_reset_n(rst_n), .i_d(d), .o_d(od),
    .i_reg_add(add), .i_reg_re(re), .o_reg_rdata(rdata), .i_reg_we(we), .i_reg_wdata(wdata));

  always #800  clk625 = ~clk625;   // 625 MHz
  always #3200 clk156 = ~clk156;   // 156.25 MHz

  initial begin
    #(64'd400_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic wr(input logic [31:0] v);
    @(negedge clk156); add = 8'h30; wdata = v; we = 1'b1;
    @(negedge clk156); we = 1'b0;
  endtask

  task automatic rd(output logic [31:0] v);
    @(negedge clk156); add = 8'h30; re = 1'b1;
    @(negedge clk156); re = 1'b0; v = rdata;
  endtask

  // Writes a setting and waits until the FSM is done; returns the time taken.
  task automatic configure(input logic [5:0] s, output time took);
    logic [31:0] v;
    time t0;
    int n;
    wr({26'd0, s});
    t0 = $time;
    n = 0;
    do begin rd(v); n++; end while ((v[31] || v[30]) && n < 200);
    took = $time - t0;
    check(v[5:0] == s, $sformatf("read back %0d, expected %0d", v[5:0], s));
    check(n < 200, "configuration finished");
    n_update++;
  endtask

  // Sends a reset pulse of 4 cycles and returns the delays of both edges.
  task automatic pulse(output time rise, output time fall);
    time tr;
    @(negedge clk625); d = 1'b1;
    @(posedge clk625); tr = $time;
    fork
      begin @(posedge od); meas = $time - tr; end
      begin #(64'd10_000); meas = 64'd99999; end
    join_any
    disable fork;
    rise = meas;
    repeat (3) @(posedge clk625);
    @(negedge clk625); d = 1'b0;
    @(posedge clk625); tr = $time;
    fork
      begin @(negedge od); meas = $time - tr; end
      begin #(64'd10_000); meas = 64'd99999; end
    join_any
    disable fork;
    fall = meas;
    repeat (4) @(posedge clk625);
  endtask

  function automatic time expected(input logic [5:0] s);
    return time'(s[5] * HALF + s[4:0] * DT);
  endfunction

  initial begin
    time took, rise, fall, prev_rise;
    logic [5:0] prev_s;
    #100 rst_n = 1'b0;
    repeat (4) @(posedge clk156);
    @(negedge clk156) rst_n = 1'b1;
    repeat (4) @(posedge clk156);

    // all 64 settings in order
    prev_s = 6'd0;
    for (int k = 0; k < 64; k++) begin
      logic [5:0] s;
      s = 6'(k);
      configure(s, took);
      // start is seen on the 2nd FSM cycle, then 17 FSM cycles of 32 ns
      check(took >= 17 * 32000 && took <= 22 * 32000,
            $sformatf("configuration took %0t ps", took));
      pulse(rise, fall);
      check(rise == expected(s), $sformatf("setting %0d: rise delay %0t, expected %0t", s, rise, expected(s)));
      check(fall == expected(s), $sformatf("setting %0d: fall delay %0t, expected %0t", s, fall, expected(s)));
      if (s[5] && rise >= HALF) n_half++;
      if (s[4:0] != 0 && rise != 0) n_chain++;
      if (k > 0) begin
        check(rise - prev_rise == time'(s == 6'd32 ? HALF - 31 * DT : DT),
              $sformatf("step from %0d to %0d is %0t", prev_s, s, rise - prev_rise));
      end
      prev_rise = rise;
      prev_s = s;
    end

    // a new setting must not change the delay before its update
    configure(6'd26, took);
    wr(32'd60);
    pulse(rise, fall);
    check(rise == expected(6'd26), $sformatf("old setting kept until update, got %0t", rise));
    if (rise == expected(6'd26)) n_deferred++;
    repeat (200) @(posedge clk156);
    pulse(rise, fall);
    check(rise == expected(6'd60), $sformatf("new setting after update, got %0t", rise));

    // firmware reset in the middle of a configuration
    wr(32'd17);
    repeat (20) @(posedge clk156);
    @(negedge clk156) rst_n = 1'b0;
    repeat (2) @(posedge clk156);
    @(negedge clk156) rst_n = 1'b1;
    begin
      logic [31:0] v;
      rd(v);
      check(v[31:30] == 2'b00 && v[5:0] == 6'd0, $sformatf("state after reset %h", v));
      if (v[31:30] == 2'b00) n_abort++;
    end
    configure(6'd45, took);
    pulse(rise, fall);
    check(rise == expected(6'd45), $sformatf("after reset: rise %0t", rise));

    check(n_half > 0,     "half-cycle shift used");
    check(n_chain > 0,    "delay chain used");
    check(n_deferred > 0, "deferred update seen");
    check(n_abort > 0,    "reset abort seen");
    check(n_update > 0,   "configurations done");
    $display("mechanisms: half-cycle=%0d delay-chain=%0d deferred=%0d abort=%0d configurations=%0d",
             n_half, n_chain, n_deferred, n_abort, n_update);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
