// tb_msml_workloads: every addresser configuration of the power evaluation,
// each run for 1028 clock events, the length of the evaluation runs.
//
// Covered: the single one-hot ring at depths 4, 8 and 16; the double-segment
// double-level addresser as 4x2, 8x2, 4x4, 8x4, 4x8, 16x4, 8x8, 4x16, 16x8,
// 8x16 and 4x32; and both triple-segment addressers as 4x2x2, 4x4x2, 4x4x4,
// 4x4x8, 8x4x4, 4x8x4, 4x8x8, 8x4x8, 8x8x4, 4x4x16, 4x16x4 and 16x4x4.
// Each configuration is one msml_cfg_runner, which compares the select
// output after every clock with 1 << (clocks since reset mod depth). The
// test also checks, per configuration, that select 0 came back exactly
// floor(1028 / depth) times: every configuration, the deepest being 256,
// wraps at least four times.
module tb_msml_workloads;

  localparam int NCFG   = 38;
  localparam int CYCLES = 1028;

  logic aclk = 1'b0;
  logic rst_n = 1'b0;
  logic [NCFG-1:0] done;
  int cfg_checks   [NCFG];
  int cfg_failures [NCFG];
  int cfg_wraps    [NCFG];
  int cfg_depth    [NCFG];

  always #5 aclk = ~aclk;

  // OHA-4
  msml_cfg_runner #(.ARCH(0), .N1(4), .N2(1), .N3(1), .CYCLES(CYCLES)) u_cfg0 (
    .aclk(aclk), .rst_n(rst_n), .done(done[0]), .checks(cfg_checks[0]), .failures(cfg_failures[0]), .wraps(cfg_wraps[0])
  );
  // OHA-8
  msml_cfg_runner #(.ARCH(0), .N1(8), .N2(1), .N3(1), .CYCLES(CYCLES)) u_cfg1 (
    .aclk(aclk), .rst_n(rst_n), .done(done[1]), .checks(cfg_checks[1]), .failures(cfg_failures[1]), .wraps(cfg_wraps[1])
  );
  // OHA-16
  msml_cfg_runner #(.ARCH(0), .N1(16), .N2(1), .N3(1), .CYCLES(CYCLES)) u_cfg2 (
    .aclk(aclk), .rst_n(rst_n), .done(done[2]), .checks(cfg_checks[2]), .failures(cfg_failures[2]), .wraps(cfg_wraps[2])
  );
  // DSDL-4x2
  msml_cfg_runner #(.ARCH(1), .N1(4), .N2(2), .N3(1), .CYCLES(CYCLES)) u_cfg3 (
    .aclk(aclk), .rst_n(rst_n), .done(done[3]), .checks(cfg_checks[3]), .failures(cfg_failures[3]), .wraps(cfg_wraps[3])
  );
  // DSDL-8x2
  msml_cfg_runner #(.ARCH(1), .N1(8), .N2(2), .N3(1), .CYCLES(CYCLES)) u_cfg4 (
    .aclk(aclk), .rst_n(rst_n), .done(done[4]), .checks(cfg_checks[4]), .failures(cfg_failures[4]), .wraps(cfg_wraps[4])
  );
  // DSDL-4x4
  msml_cfg_runner #(.ARCH(1), .N1(4), .N2(4), .N3(1), .CYCLES(CYCLES)) u_cfg5 (
    .aclk(aclk), .rst_n(rst_n), .done(done[5]), .checks(cfg_checks[5]), .failures(cfg_failures[5]), .wraps(cfg_wraps[5])
  );
  // DSDL-8x4
  msml_cfg_runner #(.ARCH(1), .N1(8), .N2(4), .N3(1), .CYCLES(CYCLES)) u_cfg6 (
    .aclk(aclk), .rst_n(rst_n), .done(done[6]), .checks(cfg_checks[6]), .failures(cfg_failures[6]), .wraps(cfg_wraps[6])
  );
  // DSDL-4x8
  msml_cfg_runner #(.ARCH(1), .N1(4), .N2(8), .N3(1), .CYCLES(CYCLES)) u_cfg7 (
    .aclk(aclk), .rst_n(rst_n), .done(done[7]), .checks(cfg_checks[7]), .failures(cfg_failures[7]), .wraps(cfg_wraps[7])
  );
  // DSDL-16x4
  msml_cfg_runner #(.ARCH(1), .N1(16), .N2(4), .N3(1), .CYCLES(CYCLES)) u_cfg8 (
    .aclk(aclk), .rst_n(rst_n), .done(done[8]), .checks(cfg_checks[8]), .failures(cfg_failures[8]), .wraps(cfg_wraps[8])
  );
  // DSDL-8x8
  msml_cfg_runner #(.ARCH(1), .N1(8), .N2(8), .N3(1), .CYCLES(CYCLES)) u_cfg9 (
    .aclk(aclk), .rst_n(rst_n), .done(done[9]), .checks(cfg_checks[9]), .failures(cfg_failures[9]), .wraps(cfg_wraps[9])
  );
  // DSDL-4x16
  msml_cfg_runner #(.ARCH(1), .N1(4), .N2(16), .N3(1), .CYCLES(CYCLES)) u_cfg10 (
    .aclk(aclk), .rst_n(rst_n), .done(done[10]), .checks(cfg_checks[10]), .failures(cfg_failures[10]), .wraps(cfg_wraps[10])
  );
  // DSDL-16x8
  msml_cfg_runner #(.ARCH(1), .N1(16), .N2(8), .N3(1), .CYCLES(CYCLES)) u_cfg11 (
    .aclk(aclk), .rst_n(rst_n), .done(done[11]), .checks(cfg_checks[11]), .failures(cfg_failures[11]), .wraps(cfg_wraps[11])
  );
  // DSDL-8x16
  msml_cfg_runner #(.ARCH(1), .N1(8), .N2(16), .N3(1), .CYCLES(CYCLES)) u_cfg12 (
    .aclk(aclk), .rst_n(rst_n), .done(done[12]), .checks(cfg_checks[12]), .failures(cfg_failures[12]), .wraps(cfg_wraps[12])
  );
  // DSDL-4x32
  msml_cfg_runner #(.ARCH(1), .N1(4), .N2(32), .N3(1), .CYCLES(CYCLES)) u_cfg13 (
    .aclk(aclk), .rst_n(rst_n), .done(done[13]), .checks(cfg_checks[13]), .failures(cfg_failures[13]), .wraps(cfg_wraps[13])
  );
  // TSDL-4x2x2
  msml_cfg_runner #(.ARCH(2), .N1(4), .N2(2), .N3(2), .CYCLES(CYCLES)) u_cfg14 (
    .aclk(aclk), .rst_n(rst_n), .done(done[14]), .checks(cfg_checks[14]), .failures(cfg_failures[14]), .wraps(cfg_wraps[14])
  );
  // TSDL-4x4x2
  msml_cfg_runner #(.ARCH(2), .N1(4), .N2(4), .N3(2), .CYCLES(CYCLES)) u_cfg15 (
    .aclk(aclk), .rst_n(rst_n), .done(done[15]), .checks(cfg_checks[15]), .failures(cfg_failures[15]), .wraps(cfg_wraps[15])
  );
  // TSDL-4x4x4
  msml_cfg_runner #(.ARCH(2), .N1(4), .N2(4), .N3(4), .CYCLES(CYCLES)) u_cfg16 (
    .aclk(aclk), .rst_n(rst_n), .done(done[16]), .checks(cfg_checks[16]), .failures(cfg_failures[16]), .wraps(cfg_wraps[16])
  );
  // TSDL-4x4x8
  msml_cfg_runner #(.ARCH(2), .N1(4), .N2(4), .N3(8), .CYCLES(CYCLES)) u_cfg17 (
    .aclk(aclk), .rst_n(rst_n), .done(done[17]), .checks(cfg_checks[17]), .failures(cfg_failures[17]), .wraps(cfg_wraps[17])
  );
  // TSDL-8x4x4
  msml_cfg_runner #(.ARCH(2), .N1(8), .N2(4), .N3(4), .CYCLES(CYCLES)) u_cfg18 (
    .aclk(aclk), .rst_n(rst_n), .done(done[18]), .checks(cfg_checks[18]), .failures(cfg_failures[18]), .wraps(cfg_wraps[18])
  );
  // TSDL-4x8x4
  msml_cfg_runner #(.ARCH(2), .N1(4), .N2(8), .N3(4), .CYCLES(CYCLES)) u_cfg19 (
    .aclk(aclk), .rst_n(rst_n), .done(done[19]), .checks(cfg_checks[19]), .failures(cfg_failures[19]), .wraps(cfg_wraps[19])
  );
  // TSDL-4x8x8
  msml_cfg_runner #(.ARCH(2), .N1(4), .N2(8), .N3(8), .CYCLES(CYCLES)) u_cfg20 (
    .aclk(aclk), .rst_n(rst_n), .done(done[20]), .checks(cfg_checks[20]), .failures(cfg_failures[20]), .wraps(cfg_wraps[20])
  );
  // TSDL-8x4x8
  msml_cfg_runner #(.ARCH(2), .N1(8), .N2(4), .N3(8), .CYCLES(CYCLES)) u_cfg21 (
    .aclk(aclk), .rst_n(rst_n), .done(done[21]), .checks(cfg_checks[21]), .failures(cfg_failures[21]), .wraps(cfg_wraps[21])
  );
  // TSDL-8x8x4
  msml_cfg_runner #(.ARCH(2), .N1(8), .N2(8), .N3(4), .CYCLES(CYCLES)) u_cfg22 (
    .aclk(aclk), .rst_n(rst_n), .done(done[22]), .checks(cfg_checks[22]), .failures(cfg_failures[22]), .wraps(cfg_wraps[22])
  );
  // TSDL-4x4x16
  msml_cfg_runner #(.ARCH(2), .N1(4), .N2(4), .N3(16), .CYCLES(CYCLES)) u_cfg23 (
    .aclk(aclk), .rst_n(rst_n), .done(done[23]), .checks(cfg_checks[23]), .failures(cfg_failures[23]), .wraps(cfg_wraps[23])
  );
  // TSDL-4x16x4
  msml_cfg_runner #(.ARCH(2), .N1(4), .N2(16), .N3(4), .CYCLES(CYCLES)) u_cfg24 (
    .aclk(aclk), .rst_n(rst_n), .done(done[24]), .checks(cfg_checks[24]), .failures(cfg_failures[24]), .wraps(cfg_wraps[24])
  );
  // TSDL-16x4x4
  msml_cfg_runner #(.ARCH(2), .N1(16), .N2(4), .N3(4), .CYCLES(CYCLES)) u_cfg25 (
    .aclk(aclk), .rst_n(rst_n), .done(done[25]), .checks(cfg_checks[25]), .failures(cfg_failures[25]), .wraps(cfg_wraps[25])
  );
  // TSTL-4x2x2
  msml_cfg_runner #(.ARCH(3), .N1(4), .N2(2), .N3(2), .CYCLES(CYCLES)) u_cfg26 (
    .aclk(aclk), .rst_n(rst_n), .done(done[26]), .checks(cfg_checks[26]), .failures(cfg_failures[26]), .wraps(cfg_wraps[26])
  );
  // TSTL-4x4x2
  msml_cfg_runner #(.ARCH(3), .N1(4), .N2(4), .N3(2), .CYCLES(CYCLES)) u_cfg27 (
    .aclk(aclk), .rst_n(rst_n), .done(done[27]), .checks(cfg_checks[27]), .failures(cfg_failures[27]), .wraps(cfg_wraps[27])
  );
  // TSTL-4x4x4
  msml_cfg_runner #(.ARCH(3), .N1(4), .N2(4), .N3(4), .CYCLES(CYCLES)) u_cfg28 (
    .aclk(aclk), .rst_n(rst_n), .done(done[28]), .checks(cfg_checks[28]), .failures(cfg_failures[28]), .wraps(cfg_wraps[28])
  );
  // TSTL-4x4x8
  msml_cfg_runner #(.ARCH(3), .N1(4), .N2(4), .N3(8), .CYCLES(CYCLES)) u_cfg29 (
    .aclk(aclk), .rst_n(rst_n), .done(done[29]), .checks(cfg_checks[29]), .failures(cfg_failures[29]), .wraps(cfg_wraps[29])
  );
  // TSTL-8x4x4
  msml_cfg_runner #(.ARCH(3), .N1(8), .N2(4), .N3(4), .CYCLES(CYCLES)) u_cfg30 (
    .aclk(aclk), .rst_n(rst_n), .done(done[30]), .checks(cfg_checks[30]), .failures(cfg_failures[30]), .wraps(cfg_wraps[30])
  );
  // TSTL-4x8x4
  msml_cfg_runner #(.ARCH(3), .N1(4), .N2(8), .N3(4), .CYCLES(CYCLES)) u_cfg31 (
    .aclk(aclk), .rst_n(rst_n), .done(done[31]), .checks(cfg_checks[31]), .failures(cfg_failures[31]), .wraps(cfg_wraps[31])
  );
  // TSTL-4x8x8
  msml_cfg_runner #(.ARCH(3), .N1(4), .N2(8), .N3(8), .CYCLES(CYCLES)) u_cfg32 (
    .aclk(aclk), .rst_n(rst_n), .done(done[32]), .checks(cfg_checks[32]), .failures(cfg_failures[32]), .wraps(cfg_wraps[32])
  );
  // TSTL-8x4x8
  msml_cfg_runner #(.ARCH(3), .N1(8), .N2(4), .N3(8), .CYCLES(CYCLES)) u_cfg33 (
    .aclk(aclk), .rst_n(rst_n), .done(done[33]), .checks(cfg_checks[33]), .failures(cfg_failures[33]), .wraps(cfg_wraps[33])
  );
  // TSTL-8x8x4
  msml_cfg_runner #(.ARCH(3), .N1(8), .N2(8), .N3(4), .CYCLES(CYCLES)) u_cfg34 (
    .aclk(aclk), .rst_n(rst_n), .done(done[34]), .checks(cfg_checks[34]), .failures(cfg_failures[34]), .wraps(cfg_wraps[34])
  );
  // TSTL-4x4x16
  msml_cfg_runner #(.ARCH(3), .N1(4), .N2(4), .N3(16), .CYCLES(CYCLES)) u_cfg35 (
    .aclk(aclk), .rst_n(rst_n), .done(done[35]), .checks(cfg_checks[35]), .failures(cfg_failures[35]), .wraps(cfg_wraps[35])
  );
  // TSTL-4x16x4
  msml_cfg_runner #(.ARCH(3), .N1(4), .N2(16), .N3(4), .CYCLES(CYCLES)) u_cfg36 (
    .aclk(aclk), .rst_n(rst_n), .done(done[36]), .checks(cfg_checks[36]), .failures(cfg_failures[36]), .wraps(cfg_wraps[36])
  );
  // TSTL-16x4x4
  msml_cfg_runner #(.ARCH(3), .N1(16), .N2(4), .N3(4), .CYCLES(CYCLES)) u_cfg37 (
    .aclk(aclk), .rst_n(rst_n), .done(done[37]), .checks(cfg_checks[37]), .failures(cfg_failures[37]), .wraps(cfg_wraps[37])
  );

  initial begin
    int checks, failures;
    cfg_depth[0] = 4;
    cfg_depth[1] = 8;
    cfg_depth[2] = 16;
    cfg_depth[3] = 8;
    cfg_depth[4] = 16;
    cfg_depth[5] = 16;
    cfg_depth[6] = 32;
    cfg_depth[7] = 32;
    cfg_depth[8] = 64;
    cfg_depth[9] = 64;
    cfg_depth[10] = 64;
    cfg_depth[11] = 128;
    cfg_depth[12] = 128;
    cfg_depth[13] = 128;
    cfg_depth[14] = 16;
    cfg_depth[15] = 32;
    cfg_depth[16] = 64;
    cfg_depth[17] = 128;
    cfg_depth[18] = 128;
    cfg_depth[19] = 128;
    cfg_depth[20] = 256;
    cfg_depth[21] = 256;
    cfg_depth[22] = 256;
    cfg_depth[23] = 256;
    cfg_depth[24] = 256;
    cfg_depth[25] = 256;
    cfg_depth[26] = 16;
    cfg_depth[27] = 32;
    cfg_depth[28] = 64;
    cfg_depth[29] = 128;
    cfg_depth[30] = 128;
    cfg_depth[31] = 128;
    cfg_depth[32] = 256;
    cfg_depth[33] = 256;
    cfg_depth[34] = 256;
    cfg_depth[35] = 256;
    cfg_depth[36] = 256;
    cfg_depth[37] = 256;
    repeat (3) @(negedge aclk);
    rst_n = 1'b1;
    wait (&done);
    #1;
    checks = 0;
    failures = 0;
    for (int i = 0; i < NCFG; i++) begin
      checks   += cfg_checks[i];
      failures += cfg_failures[i];
      checks++;
      if (cfg_wraps[i] != CYCLES / cfg_depth[i] || cfg_wraps[i] == 0) begin
        failures++;
        $display("FAIL configuration %0d: %0d wraps, expected %0d", i, cfg_wraps[i], CYCLES / cfg_depth[i]);
      end
    end
    $display("configurations run: %0d, clock events each: %0d", NCFG, CYCLES);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (CYCLES + 100) @(posedge aclk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=0 failures=1");
    $finish;
  end

endmodule
