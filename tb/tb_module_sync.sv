// Module-wide synchronization scan of a tile module with 13 readout chips.
//
// The reset shift block drives the run-start reset of two banks of 13 chip
// models (mutrig_rst_model). Clock and reset reach the chips through four
// serial buffer groups (chips 0-2, 3-5, 6-8, 9-12), each about 1 ns later
// than the one before, and every chip has its own clock-to-reset skew. Bank 0
// keeps the skews inside a 41 ps band, as measured on a bare board; bank 1
// spreads them over 180 ps, the chip-to-chip offset seen in pairwise reset
// scans on a running module. For the settings 0 to 62 in steps of 2 the testbench configures the
// block, issues N_RST resets, and after each one latches all chips'
// timestamps with a common test pulse. For the 12 pairs (chip 0, chip i) a
// setting is safe when the timestamp difference is the pair's usual value for
// every reset; the module-wide safe settings are the intersection. The
// result is compared with a prediction made from the skews alone, and the
// setting in the middle of the longest safe run is checked to keep every
// chip's reset edge clear of its sampling window. Settings where a reset edge
// falls into a chip's sampling window (a metastable sample) must occur and
// are excluded from the comparison, since their outcome is random.
`timescale 1ps/1ps
module tb_module_sync;
  localparam int NCHIP = 13;
  localparam int N_RST = 12;
  localparam int DT    = 22;
  localparam int HALF  = 800;
  localparam int PER   = 1600;
  localparam int WIN   = 40;     // sampling window of a chip's reset flip-flop
  localparam int CABLE = 2000;   // common cable delay of clock and reset
  localparam int OFF_R = 400;    // extra reset delay of the path from the board
  localparam int NBANK = 2;
  // clock-to-reset skew of each chip in ps, bank 0 then bank 1
  localparam int SKEW [NBANK * NCHIP] = '{
    0, 8, -12, 15, 20, -5, 3, -18, 10, -21, 6, -9, 12,
    0, -120, -40, 20, -80, -160, -10, -60, 15, -100, -30, -140, 5};

  logic clk625 = 1'b0, clk156 = 1'b0, rst_n = 1'b1, d = 1'b0, od, inj = 1'b0;
  logic [7:0]  add = '0;
  logic        re = 1'b0, we = 1'b0;
  logic [31:0] wdata = '0, rdata;
  logic [15:0] ts    [NBANK][NCHIP];
  int          nmeta [NBANK][NCHIP];
  int checks = 0, failures = 0;

  rst_shift_block dut (
    .i_clk625(clk625), .i_clk156(clk156), .i_reset_n(rst_n), .i_d(d), .o_d(od),
    .i_reg_add(add), .i_reg_re(re), .o_reg_rdata(rdata), .i_reg_we(we), .i_reg_wdata(wdata));

  function automatic int grp(input int i);
    return (i < 12) ? i / 3 : 3;
  endfunction

  for (genvar b = 0; b < NBANK; b++) begin : g_bank
    for (genvar i = 0; i < NCHIP; i++) begin : g_chip
      mutrig_rst_model #(
        .T_CLK_PS(CABLE + 1000 * grp(i)),
        .T_RST_PS(CABLE + 1000 * grp(i) + OFF_R - SKEW[b * NCHIP + i]),
        .T_WIN_PS(WIN)
      ) u_chip (.i_clk(clk625), .i_rst(od), .i_inj(inj), .o_ts(ts[b][i]), .o_nmeta(nmeta[b][i]));
    end
  end

  always #800  clk625 = ~clk625;
  always #3200 clk156 = ~clk156;

  initial begin
    #(64'd2_000_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic configure(input logic [5:0] s);
    logic [31:0] v;
    int n;
    @(negedge clk156); add = 8'h30; wdata = {26'd0, s}; we = 1'b1;
    @(negedge clk156); we = 1'b0;
    n = 0;
    do begin
      @(negedge clk156); re = 1'b1;
      @(negedge clk156); re = 1'b0; v = rdata; n++;
    end while ((v[31] || v[30]) && n < 200);
  endtask

  // Position of chip i's reset edge after the clock edge that launches it.
  function automatic int xpos(input int b, input int s, input int i);
    return (s / 32) * HALF + (s % 32) * DT + OFF_R - SKEW[b * NCHIP + i];
  endfunction
  // First clock edge (index) that samples the reset cleanly low, or -1 when
  // an edge falls inside the sampling window.
  function automatic int release_edge(input int b, input int s, input int i);
    int x, m;
    x = xpos(b, s, i);
    m = (x + PER - 1) / PER;
    if (m * PER - x < WIN) return -1;
    return m;
  endfunction

  int meas_diff [NBANK][32][NCHIP];   // -999: not constant over the resets

  // Compares bank b's measured pair results with the prediction, finds the
  // module-wide safe settings and checks the chosen one.
  task automatic analyse(input int b, input int min_len, input int min_margin);
    int ref_meas [NCHIP];
    int ref_pred [NCHIP];
    int nsafe_meas, best_lo, best_len, run_lo, run_len, mid, jumps, margin, nm;
    bit mod_safe [32];
    // a pair's usual difference: its value at setting 0, which lies far
    // from the crossing in both the measurement and the prediction
    for (int i = 1; i < NCHIP; i++) begin
      ref_meas[i] = meas_diff[b][0][i];
      ref_pred[i] = release_edge(b, 0, i) - release_edge(b, 0, 0);
    end
    jumps = 0;
    for (int k = 0; k < 32; k++) begin
      mod_safe[k] = 1'b1;
      for (int i = 1; i < NCHIP; i++) begin
        bit ms, amb, ps;
        ms  = (meas_diff[b][k][i] == ref_meas[i]);
        amb = (release_edge(b, 2 * k, 0) < 0) || (release_edge(b, 2 * k, i) < 0);
        ps  = !amb && (release_edge(b, 2 * k, i) - release_edge(b, 2 * k, 0) == ref_pred[i]);
        if (!ms) jumps++;
        if (!amb) check(ms == ps, $sformatf("bank %0d setting %0d pair 0-%0d: measured %s, predicted %s",
                                            b, 2 * k, i, ms ? "safe" : "jump", ps ? "safe" : "jump"));
        if (!ms) mod_safe[k] = 1'b0;
      end
    end
    best_lo = 0; best_len = 0; run_len = 0; run_lo = 0; nsafe_meas = 0;
    for (int k = 0; k < 32; k++) begin
      if (mod_safe[k]) begin
        nsafe_meas++;
        if (run_len == 0) run_lo = k;
        run_len++;
        if (run_len > best_len) begin best_len = run_len; best_lo = run_lo; end
      end else begin
        run_len = 0;
      end
    end
    mid = 2 * (best_lo + best_len / 2);
    nm = 0;
    for (int i = 0; i < NCHIP; i++) nm += nmeta[b][i];
    $display("bank %0d: safe settings %0d..%0d (%0d of 32 scanned), chosen setting %0d, pair jumps %0d, metastable samples %0d",
             b, 2 * best_lo, 2 * (best_lo + best_len - 1), nsafe_meas, mid, jumps, nm);
    check(jumps > 0, $sformatf("bank %0d: some setting makes a pair jump by one cycle", b));
    check(best_len >= min_len, $sformatf("bank %0d: safe interval of %0d settings", b, best_len));
    // at the chosen setting every chip's reset edge keeps clear of its clock edges
    margin = PER;
    for (int i = 0; i < NCHIP; i++) begin
      int ph;
      ph = xpos(b, mid, i) % PER;
      if (ph < margin) margin = ph;
      if (PER - ph < margin) margin = PER - ph;
    end
    check(margin >= min_margin, $sformatf("bank %0d: margin at chosen setting %0d ps", b, margin));
  endtask

  initial begin
    #100 rst_n = 1'b0;
    repeat (4) @(posedge clk156);
    @(negedge clk156) rst_n = 1'b1;
    repeat (4) @(posedge clk156);

    for (int k = 0; k < 32; k++) begin
      configure(6'(2 * k));
      for (int r = 0; r < N_RST; r++) begin
        @(negedge clk625); d = 1'b1;
        repeat (8) @(negedge clk625);
        d = 1'b0;
        repeat (40) @(posedge clk625);
        #300 inj = 1'b1;
        #400 inj = 1'b0;
        for (int b = 0; b < NBANK; b++) begin
          for (int i = 1; i < NCHIP; i++) begin
            int df;
            df = int'(ts[b][0]) - int'(ts[b][i]);
            if (r == 0) meas_diff[b][k][i] = df;
            else if (meas_diff[b][k][i] != df) meas_diff[b][k][i] = -999;
          end
        end
      end
    end

    analyse(0, 16, 200);
    analyse(1, 12, 100);
    begin
      int nm;
      nm = 0;
      for (int b = 0; b < NBANK; b++)
        for (int i = 0; i < NCHIP; i++) nm += nmeta[b][i];
      check(nm > 0, "some reset edge fell into a sampling window");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
