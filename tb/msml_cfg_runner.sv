// msml_cfg_runner: testbench helper that builds one addresser configuration
// and checks its select sequence for a fixed number of clock events.
//
// ARCH chooses the arrangement: 0 a single one-hot segment of N1 flip-flops,
// 1 double-segment double-level N1 x N2, 2 triple-segment double-level
// N1 x N2 x N3, 3 triple-segment triple-level N1 x N2 x N3. After rst_n rises
// the runner counts clocks, k, and after each of CYCLES clock events compares
// sel with 1 << (k mod DEPTH), and counts the clocks on which select 0 came
// back (address-space wraps). It then raises done and holds its counts.
module msml_cfg_runner #(
  parameter int          ARCH   = 1,
  parameter int unsigned N1     = 4,
  parameter int unsigned N2     = 4,
  parameter int unsigned N3     = 4,
  parameter int          CYCLES = 1028
) (
  input  logic aclk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures,
  output int   wraps
);

  localparam int unsigned DEPTH = (ARCH == 0) ? N1 : (ARCH == 1) ? N1 * N2 : N1 * N2 * N3;

  logic [DEPTH-1:0] sel;

  if (ARCH == 0) begin : g_oha
    oha_segment #(.N(N1)) u_dut (.aclk(aclk), .rst_n(rst_n), .adv(1'b1), .q(sel));
  end else if (ARCH == 1) begin : g_dsdl
    logic [N1-1:0] fsel;
    logic [N2-1:0] ssel;
    dsdl_oha #(.N1(N1), .N2(N2)) u_dut (.aclk(aclk), .rst_n(rst_n), .fsel(fsel),
                                         .ssel(ssel), .sel(sel));
  end else if (ARCH == 2) begin : g_tsdl
    logic [N1-1:0] fsel;
    logic [N2-1:0] ssel;
    logic [N3-1:0] thdsel;
    tsdl_oha #(.N1(N1), .N2(N2), .N3(N3)) u_dut (.aclk(aclk), .rst_n(rst_n), .fsel(fsel),
                                                  .ssel(ssel), .thdsel(thdsel), .sel(sel));
  end else begin : g_tstl
    logic [N1-1:0]    fsel;
    logic [N2-1:0]    ssel;
    logic [N3-1:0]    thdsel;
    logic [N1*N2-1:0] intsel;
    tstl_oha #(.N1(N1), .N2(N2), .N3(N3)) u_dut (.aclk(aclk), .rst_n(rst_n), .fsel(fsel),
                                                  .ssel(ssel), .thdsel(thdsel), .intsel(intsel),
                                                  .sel(sel));
  end

  initial begin
    done = 1'b0;
    checks = 0;
    failures = 0;
    wraps = 0;
    // rst_n rises between clock edges; select 0 must still be active.
    @(posedge rst_n);
    #1;
    checks++;
    if (sel !== DEPTH'(1)) begin
      failures++;
      $display("FAIL arch %0d %0dx%0dx%0d: select 0 not active after reset", ARCH, N1, N2, N3);
    end
    for (int k = 1; k <= CYCLES; k++) begin
      @(negedge aclk);
      checks++;
      if (sel !== (DEPTH'(1) << (k % DEPTH))) begin
        failures++;
        if (failures < 5) begin
          $display("FAIL arch %0d %0dx%0dx%0d clock %0d: sel=%h", ARCH, N1, N2, N3, k, sel);
        end
      end
      if (sel[0]) wraps++;
    end
    done = 1'b1;
  end

endmodule
