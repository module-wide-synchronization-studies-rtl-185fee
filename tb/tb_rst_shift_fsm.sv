// Testbench of rst_shift_fsm: for random settings it sends a start, records
// the serial word and the update pulse, and checks the word (LSB first),
// the number of enable cycles (5), the distance from the last serial bit to
// the update pulse (11 cycles), the half-cycle select output, that a
// one-cycle start glitch is ignored and that reset aborts a configuration.
`timescale 1ps/1ps
module tb_rst_shift_fsm;
  logic clk = 1'b0, rst_n = 1'b1, start = 1'b0;
  logic [5:0] cdata = '0;
  logic ocdata, ocena, oupd, ods, obusy;
  int checks = 0, failures = 0;

  rst_shift_fsm dut (
    .i_clk(clk), .i_reset_n(rst_n), .i_start(start), .i_cdata(cdata),
    .o_cdata(ocdata), .o_cena(ocena), .o_cupdate(oupd), .o_datashift(ods), .o_busy(obusy));

  always #16000 clk = ~clk;   // 31.25 MHz

  initial begin
    #(32000 * 20000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // Runs one configuration with setting v and checks what comes out.
  task automatic configure(input logic [5:0] v);
    logic [4:0] word;
    int nena, since_last, cyc, upd_at, start_at;
    word = '0; nena = 0; since_last = -1; cyc = 0; upd_at = -1;
    @(negedge clk);
    cdata = v; start = 1'b1;
    @(negedge clk);
    @(negedge clk);
    start = 1'b0;
    start_at = 0;
    // observe until the FSM is idle again
    do begin
      @(posedge clk); #1;
      cyc++;
      if (ocena) begin
        word = {ocdata, word[4:1]};
        nena++;
        since_last = 0;
      end else if (since_last >= 0) begin
        since_last++;
      end
      if (oupd) begin
        upd_at = since_last;
      end
    end while (obusy && cyc < 100);
    check(nena == 5, $sformatf("enable cycles %0d", nena));
    check(word == v[4:0], $sformatf("word %b, expected %b", word, v[4:0]));
    check(upd_at == 11, $sformatf("update %0d cycles after last bit, expected 11", upd_at));
    check(ods == v[5], "datashift after update");
    // REC before the loop, then 5 send and 11 update cycles, then idle
    check(cyc == 17, $sformatf("%0d cycles to idle, expected 17", cyc));
    check(ocdata == 1'b0 && ocena == 1'b0 && oupd == 1'b0, "outputs zero in idle");
  endtask

  initial begin
    #100 rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    check(!obusy && !ocena && !oupd && !ods, "idle after reset");
    // fixed patterns then random ones
    configure(6'b010110);
    configure(6'b101001);
    configure(6'b111111);
    configure(6'b000000);
    for (int k = 0; k < 40; k++) configure(6'($urandom));
    // a start that is high for only one cycle must be ignored
    @(negedge clk); cdata = 6'h2a; start = 1'b1;
    @(negedge clk); start = 1'b0;
    repeat (5) begin @(posedge clk); #1; check(!obusy, "one-cycle start ignored"); end
    // reset during the send state returns to idle
    @(negedge clk); start = 1'b1;
    @(negedge clk); @(negedge clk); start = 1'b0;
    @(negedge clk); @(negedge clk);
    check(ocena, "sending before reset");
    rst_n = 1'b0; #1;
    check(!obusy && !ocena && !ods, "reset aborts configuration");
    @(negedge clk); rst_n = 1'b1;
    repeat (3) begin @(posedge clk); #1; check(!obusy, "idle after abort"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
