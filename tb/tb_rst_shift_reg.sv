// Testbench of the register slice: writes settings, checks the setting
// output, the length of the start request, the read-back layout and
// latency, that other addresses neither write nor read it, and the busy bit.
`timescale 1ps/1ps
module tb_rst_shift_reg;
  logic clk = 1'b0, rst_n = 1'b1;
  logic [7:0] add = '0;
  logic re = 1'b0, we = 1'b0, busy = 1'b0;
  logic [31:0] wdata = '0, rdata;
  logic [5:0] cdata;
  logic start;
  int checks = 0, failures = 0;

  rst_shift_reg dut (.i_clk(clk), .i_reset_n(rst_n), .i_reg_add(add), .i_reg_re(re),
                     .o_reg_rdata(rdata), .i_reg_we(we), .i_reg_wdata(wdata),
                     .o_cdata(cdata), .o_start(start), .i_busy(busy));

  always #3200 clk = ~clk;

  initial begin
    #(6400 * 20000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic wr(input logic [7:0] a, input logic [31:0] v);
    @(negedge clk); add = a; wdata = v; we = 1'b1;
    @(negedge clk); we = 1'b0;
  endtask

  task automatic rd(input logic [7:0] a, output logic [31:0] v);
    @(negedge clk); add = a; re = 1'b1;
    @(negedge clk); re = 1'b0; v = rdata;
  endtask

  initial begin
    logic [31:0] v;
    logic [5:0] cur;
    int n;
    #100 rst_n = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    check(cdata == 0 && !start, "reset values");
    cur = '0;
    for (int k = 0; k < 50; k++) begin
      v = $urandom;
      wr(8'h30, v);
      cur = v[5:0];
      check(cdata == cur, "setting stored");
      // start is high for 15 cycles counted from the write edge
      n = 1;
      while (start) begin @(negedge clk); n++; end
      check(n == 16, $sformatf("start length %0d cycles, expected 15", n - 1));
      rd(8'h30, v);
      check(v == {2'b00, 24'd0, cur}, $sformatf("read back %h", v));
      // a write to another address changes nothing
      wr(8'h31, 32'h3f);
      check(cdata == cur && !start, "other address ignored");
      rd(8'h31, v);
      check(v == 0, "other address reads 0");
    end
    busy = 1'b1;
    repeat (3) @(negedge clk);
    rd(8'h30, v);
    check(v[31] == 1'b1, "busy visible");
    busy = 1'b0;
    repeat (3) @(negedge clk);
    rd(8'h30, v);
    check(v[31] == 1'b0, "busy cleared");
    wr(8'h30, 32'h15);
    rd(8'h30, v);
    check(v[30] == 1'b1, "start pending visible");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
