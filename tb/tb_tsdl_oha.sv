// tb_tsdl_oha: self-checking testbench for the triple-segment double-level
// one-hot addresser.
//
// The default 4x4x4 addresser (64 selects) and a 4x2x2 one (16 selects) are
// clocked through more than two full address cycles. With k clocks since
// reset, an N1 x N2 x N3 addresser must show sel = 1 << (k mod N1*N2*N3),
// fsel = 1 << (k mod N1), ssel = 1 << ((k / N1) mod N2) and
// thdsel = 1 << ((k / (N1*N2)) mod N3). The third segment's steps are counted
// and must come exactly once per N1*N2 clocks: it may move only when the
// first two segments roll over together.
module tb_tsdl_oha;

  logic aclk = 1'b0;
  logic rst_n = 1'b0;

  logic [3:0] a_fsel, a_ssel, a_thdsel; logic [63:0] a_sel;
  logic [3:0] b_fsel; logic [1:0] b_ssel, b_thdsel; logic [15:0] b_sel;

  int checks = 0;
  int failures = 0;
  int k = 0;
  int third_steps = 0;
  logic [3:0] a_thdsel_prev;

  tsdl_oha dut_a (.aclk(aclk), .rst_n(rst_n), .fsel(a_fsel), .ssel(a_ssel),
                  .thdsel(a_thdsel), .sel(a_sel));
  tsdl_oha #(.N1(4), .N2(2), .N3(2)) dut_b (.aclk(aclk), .rst_n(rst_n), .fsel(b_fsel),
                  .ssel(b_ssel), .thdsel(b_thdsel), .sel(b_sel));

  always #5 aclk = ~aclk;

  task automatic expect_eq(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL k=%0d %s = %h expected %h", k, what, got, exp);
    end
  endtask

  task automatic check_all();
    expect_eq("4x4x4 sel",    a_sel,           64'(1) << (k % 64));
    expect_eq("4x4x4 fsel",   64'(a_fsel),     64'(1) << (k % 4));
    expect_eq("4x4x4 ssel",   64'(a_ssel),     64'(1) << ((k / 4) % 4));
    expect_eq("4x4x4 thdsel", 64'(a_thdsel),   64'(1) << ((k / 16) % 4));
    expect_eq("4x2x2 sel",    64'(b_sel),      64'(1) << (k % 16));
    expect_eq("4x2x2 thdsel", 64'(b_thdsel),   64'(1) << ((k / 8) % 2));
  endtask

  initial begin
    repeat (2) @(negedge aclk);
    check_all();
    rst_n = 1'b1;
    for (int t = 0; t < 160; t++) begin
      a_thdsel_prev = a_thdsel;
      @(negedge aclk);
      k++;
      if (a_thdsel != a_thdsel_prev) third_steps++;
      check_all();
    end
    expect_eq("third segment steps", 64'(third_steps), 64'(160 / 16));
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
