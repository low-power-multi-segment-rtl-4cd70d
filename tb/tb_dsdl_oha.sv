// tb_dsdl_oha: self-checking testbench for the double-segment double-level
// one-hot addresser.
//
// The default 4x4 addresser (16 selects) is run alongside a 4x2 (8 selects)
// and an 8x4 (32 selects) one. The testbench counts clocks since reset, k,
// and expects, for an N1 x N2 addresser, sel = 1 << (k mod N1*N2),
// fsel = 1 << (k mod N1) and ssel = 1 << ((k / N1) mod N2): one select step
// per clock, with the second segment stepping only on every N1-th clock. It
// also counts the second segment's steps and checks that exactly one in N1
// clocks produced one, and that the full address space wrapped.
module tb_dsdl_oha;

  logic aclk = 1'b0;
  logic rst_n = 1'b0;

  logic [3:0]  a_fsel; logic [3:0] a_ssel; logic [15:0] a_sel;
  logic [3:0]  b_fsel; logic [1:0] b_ssel; logic [7:0]  b_sel;
  logic [7:0]  c_fsel; logic [3:0] c_ssel; logic [31:0] c_sel;

  int checks = 0;
  int failures = 0;
  int k = 0;
  int second_steps = 0;
  int wraps = 0;
  logic [3:0] a_ssel_prev;

  dsdl_oha dut_a (.aclk(aclk), .rst_n(rst_n), .fsel(a_fsel), .ssel(a_ssel), .sel(a_sel));
  dsdl_oha #(.N1(4), .N2(2)) dut_b (.aclk(aclk), .rst_n(rst_n), .fsel(b_fsel), .ssel(b_ssel), .sel(b_sel));
  dsdl_oha #(.N1(8), .N2(4)) dut_c (.aclk(aclk), .rst_n(rst_n), .fsel(c_fsel), .ssel(c_ssel), .sel(c_sel));

  always #5 aclk = ~aclk;

  task automatic expect_eq(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL k=%0d %s = %h expected %h", k, what, got, exp);
    end
  endtask

  task automatic check_all();
    expect_eq("4x4 sel",  64'(a_sel),  64'(1) << (k % 16));
    expect_eq("4x4 fsel", 64'(a_fsel), 64'(1) << (k % 4));
    expect_eq("4x4 ssel", 64'(a_ssel), 64'(1) << ((k / 4) % 4));
    expect_eq("4x2 sel",  64'(b_sel),  64'(1) << (k % 8));
    expect_eq("4x2 ssel", 64'(b_ssel), 64'(1) << ((k / 4) % 2));
    expect_eq("8x4 sel",  64'(c_sel),  64'(1) << (k % 32));
    expect_eq("8x4 ssel", 64'(c_ssel), 64'(1) << ((k / 8) % 4));
  endtask

  initial begin
    repeat (2) @(negedge aclk);
    check_all();
    rst_n = 1'b1;
    for (int t = 0; t < 100; t++) begin
      a_ssel_prev = a_ssel;
      @(negedge aclk);
      k++;
      if (a_ssel != a_ssel_prev) second_steps++;
      if (k % 16 == 0) wraps++;
      check_all();
    end
    // The second segment of the 4x4 addresser moves on every 4th clock.
    expect_eq("second segment steps", 64'(second_steps), 64'(100 / 4));
    expect_eq("4x4 wraps", 64'(wraps), 64'(100 / 16));
    // Reset in mid-count returns every addresser to select 0.
    #2 rst_n = 1'b0;
    #1 k = 0;
    check_all();
    @(negedge aclk);
    rst_n = 1'b1;
    for (int t = 0; t < 40; t++) begin
      @(negedge aclk);
      k++;
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge aclk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
