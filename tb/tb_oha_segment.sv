// tb_oha_segment: self-checking testbench for the one-hot ring segment.
//
// Two segments are driven: the default 4-flip-flop segment with a random
// advance enable, and an 8-flip-flop segment with the enable tied high, which
// must reproduce the 8-output select sequence clock by clock (select 0 after
// reset, then 1, 2, ..., 7, 0, 1, ... over 16 clock events). The expected
// output is a bit position kept by the testbench, 1 << position, which moves
// only when the enable was high. A reset in the middle of the run must return
// both segments to select 0 at once, without a clock edge.
module tb_oha_segment;

  localparam int unsigned N8 = 8;

  logic          aclk = 1'b0;
  logic          rst_n = 1'b0;
  logic          adv = 1'b0;
  logic [3:0]    q4;
  logic [N8-1:0] q8;

  int checks = 0;
  int failures = 0;
  int pos4 = 0;
  int pos8 = 0;
  int holds = 0;

  oha_segment dut4 (.aclk(aclk), .rst_n(rst_n), .adv(adv),  .q(q4));
  oha_segment #(.N(N8)) dut8 (.aclk(aclk), .rst_n(rst_n), .adv(1'b1), .q(q8));

  always #5 aclk = ~aclk;

  task automatic check(string what);
    checks += 2;
    if (q4 !== 4'(1 << pos4)) begin
      failures++;
      $display("FAIL %s: q4=%b expected %b", what, q4, 4'(1 << pos4));
    end
    if (q8 !== N8'(1 << pos8)) begin
      failures++;
      $display("FAIL %s: q8=%b expected %b", what, q8, N8'(1 << pos8));
    end
  endtask

  initial begin
    repeat (2) @(negedge aclk);
    check("in reset");
    rst_n = 1'b1;
    for (int t = 1; t <= 150; t++) begin
      adv = ($urandom_range(0, 3) != 0);
      @(negedge aclk);
      if (adv) pos4 = (pos4 + 1) % 4;
      else     holds++;
      pos8 = t % N8;
      check($sformatf("clock %0d", t));
    end
    // Asynchronous reset between clock edges.
    #2 rst_n = 1'b0;
    #1;
    pos4 = 0;
    pos8 = 0;
    check("async reset");
    @(negedge aclk);
    check("held in reset");
    rst_n = 1'b1;
    for (int t = 1; t <= 40; t++) begin
      adv = 1'b1;
      @(negedge aclk);
      pos4 = (pos4 + 1) % 4;
      pos8 = t % N8;
      check($sformatf("after reset, clock %0d", t));
    end
    checks++;
    if (holds == 0) begin
      failures++;
      $display("FAIL enable never low");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge aclk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
