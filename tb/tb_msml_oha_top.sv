// tb_msml_oha_top: end-to-end testbench of the three addressers at their
// default sizes (4x4, 4x4x4 and 4x4x4), with no parameter overridden.
//
// Each addresser gets its own clock (periods 10, 14 and 6 time units) and its
// own reset, released at different times, so a clock or reset wired to the
// wrong addresser shows up as a wrong select. For every addresser a checker
// counts clocks since reset, k, and after each clock compares sel, every
// segment's selects and (for the triple-level one) the intermediate selects
// with 1 << position worked out from k. Each addresser is run through more
// than three complete address cycles, is reset once in mid-count, and then
// counts through another full cycle.
//
// Mechanisms counted (each must occur at least once, and each step count
// must equal the number of clocks divided by the segment's period):
//   first-segment rollover, second-segment step, third-segment step,
//   full address-space wrap, asynchronous reset in mid-count.
module tb_msml_oha_top;

  logic d_clk = 1'b0, t_clk = 1'b0, l_clk = 1'b0;
  logic d_rst_n = 1'b0, t_rst_n = 1'b0, l_rst_n = 1'b0;

  logic [3:0]  d_fsel, d_ssel;                 logic [15:0] d_sel;
  logic [3:0]  t_fsel, t_ssel, t_thdsel;       logic [63:0] t_sel;
  logic [3:0]  l_fsel, l_ssel, l_thdsel;       logic [15:0] l_intsel; logic [63:0] l_sel;

  int checks = 0;
  int failures = 0;
  int done = 0;

  msml_oha_top dut (
    .dsdl_aclk(d_clk), .dsdl_rst_n(d_rst_n),
    .dsdl_fsel(d_fsel), .dsdl_ssel(d_ssel), .dsdl_sel(d_sel),
    .tsdl_aclk(t_clk), .tsdl_rst_n(t_rst_n),
    .tsdl_fsel(t_fsel), .tsdl_ssel(t_ssel), .tsdl_thdsel(t_thdsel), .tsdl_sel(t_sel),
    .tstl_aclk(l_clk), .tstl_rst_n(l_rst_n),
    .tstl_fsel(l_fsel), .tstl_ssel(l_ssel), .tstl_thdsel(l_thdsel),
    .tstl_intsel(l_intsel), .tstl_sel(l_sel)
  );

  always #5 d_clk = ~d_clk;
  always #7 t_clk = ~t_clk;
  always #3 l_clk = ~l_clk;

  task automatic expect_eq(string what, int k, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s k=%0d: %h expected %h", what, k, got, exp);
    end
  endtask

  task automatic expect_seen(string what, int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never happened: %s", what);
    end else begin
      $display("%s: %0d", what, n);
    end
  endtask

  // ---------------------------------------------------------------- dsdl 4x4
  initial begin
    int k, f_roll, s_step, wraps, resets;
    logic [3:0] s_prev;
    k = 0; f_roll = 0; s_step = 0; wraps = 0; resets = 0;
    repeat (3) @(negedge d_clk);
    d_rst_n = 1'b1;
    for (int run = 0; run < 2; run++) begin
      for (int t = 0; t < (run == 0 ? 56 : 20); t++) begin
        s_prev = d_ssel;
        @(negedge d_clk);
        if (d_fsel[0] && k % 4 == 3) f_roll++;
        k++;
        if (d_ssel != s_prev) s_step++;
        if (k % 16 == 0) wraps++;
        expect_eq("dsdl sel",  k, 64'(d_sel),  64'(1) << (k % 16));
        expect_eq("dsdl fsel", k, 64'(d_fsel), 64'(1) << (k % 4));
        expect_eq("dsdl ssel", k, 64'(d_ssel), 64'(1) << ((k / 4) % 4));
      end
      if (run == 0) begin
        expect_eq("dsdl second-segment steps", k, 64'(s_step), 64'(k / 4));
        #2 d_rst_n = 1'b0;
        #1 k = 0;
        resets++;
        expect_eq("dsdl sel in reset", k, 64'(d_sel), 64'(1));
        @(negedge d_clk);
        d_rst_n = 1'b1;
      end
    end
    expect_seen("dsdl first-segment rollovers", f_roll);
    expect_seen("dsdl second-segment steps", s_step);
    expect_seen("dsdl full wraps", wraps);
    expect_seen("dsdl mid-count resets", resets);
    done++;
  end

  // ------------------------------------------------------------- tsdl 4x4x4
  initial begin
    int k, f_roll, s_step, th_step, wraps, resets;
    logic [3:0] s_prev, th_prev;
    k = 0; f_roll = 0; s_step = 0; th_step = 0; wraps = 0; resets = 0;
    repeat (5) @(negedge t_clk);
    t_rst_n = 1'b1;
    for (int run = 0; run < 2; run++) begin
      for (int t = 0; t < (run == 0 ? 200 : 70); t++) begin
        s_prev = t_ssel;
        th_prev = t_thdsel;
        @(negedge t_clk);
        if (k % 4 == 3) f_roll++;
        k++;
        if (t_ssel != s_prev) s_step++;
        if (t_thdsel != th_prev) th_step++;
        if (k % 64 == 0) wraps++;
        expect_eq("tsdl sel",    k, t_sel,          64'(1) << (k % 64));
        expect_eq("tsdl fsel",   k, 64'(t_fsel),    64'(1) << (k % 4));
        expect_eq("tsdl ssel",   k, 64'(t_ssel),    64'(1) << ((k / 4) % 4));
        expect_eq("tsdl thdsel", k, 64'(t_thdsel),  64'(1) << ((k / 16) % 4));
      end
      if (run == 0) begin
        expect_eq("tsdl third-segment steps", k, 64'(th_step), 64'(k / 16));
        #3 t_rst_n = 1'b0;
        #1 k = 0;
        resets++;
        expect_eq("tsdl sel in reset", k, t_sel, 64'(1));
        @(negedge t_clk);
        t_rst_n = 1'b1;
      end
    end
    expect_seen("tsdl first-segment rollovers", f_roll);
    expect_seen("tsdl second-segment steps", s_step);
    expect_seen("tsdl third-segment steps", th_step);
    expect_seen("tsdl full wraps", wraps);
    expect_seen("tsdl mid-count resets", resets);
    done++;
  end

  // ------------------------------------------------------------- tstl 4x4x4
  initial begin
    int k, f_roll, s_step, th_step, wraps, resets;
    logic [3:0] s_prev, th_prev;
    k = 0; f_roll = 0; s_step = 0; th_step = 0; wraps = 0; resets = 0;
    repeat (9) @(negedge l_clk);
    l_rst_n = 1'b1;
    for (int run = 0; run < 2; run++) begin
      for (int t = 0; t < (run == 0 ? 230 : 80); t++) begin
        s_prev = l_ssel;
        th_prev = l_thdsel;
        @(negedge l_clk);
        if (k % 4 == 3) f_roll++;
        k++;
        if (l_ssel != s_prev) s_step++;
        if (l_thdsel != th_prev) th_step++;
        if (k % 64 == 0) wraps++;
        expect_eq("tstl sel",    k, l_sel,          64'(1) << (k % 64));
        expect_eq("tstl intsel", k, 64'(l_intsel),  64'(1) << (k % 16));
        expect_eq("tstl fsel",   k, 64'(l_fsel),    64'(1) << (k % 4));
        expect_eq("tstl ssel",   k, 64'(l_ssel),    64'(1) << ((k / 4) % 4));
        expect_eq("tstl thdsel", k, 64'(l_thdsel),  64'(1) << ((k / 16) % 4));
      end
      if (run == 0) begin
        expect_eq("tstl third-segment steps", k, 64'(th_step), 64'(k / 16));
        #1 l_rst_n = 1'b0;
        #1 k = 0;
        resets++;
        expect_eq("tstl sel in reset", k, l_sel, 64'(1));
        @(negedge l_clk);
        l_rst_n = 1'b1;
      end
    end
    expect_seen("tstl first-segment rollovers", f_roll);
    expect_seen("tstl second-segment steps", s_step);
    expect_seen("tstl third-segment steps", th_step);
    expect_seen("tstl full wraps", wraps);
    expect_seen("tstl mid-count resets", resets);
    done++;
  end

  initial begin
    wait (done == 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge d_clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
