// tstl_oha: triple-segment triple-level one-hot addresser
// (N1 x N2 x N3 selects).
//
// The same three one-hot rings as tsdl_oha (first ring every clock, second
// when the first rolls over, third when the first two roll over together),
// but the outputs are formed in two levels of two-input AND gate arrays:
//   level 1: N2 arrays of width N1, array s gates fsel with ssel[s] into
//            intsel[s*N1 +: N1], so intsel[s*N1 + f] = ssel[s] & fsel[f];
//   level 2: N3 arrays of width N1*N2, array t gates all of intsel with
//            thdsel[t] into sel[t*N1*N2 +: N1*N2].
// Hence sel[t*N1*N2 + s*N1 + f] = thdsel[t] & ssel[s] & fsel[f], stepping
// through 0 .. N1*N2*N3-1 one place per clock. Compared with the
// double-level version, each first-segment select fans out to only N2 gates
// instead of N2*N3, at the cost of one more gate delay.
//
// Interface: aclk, rst_n (asynchronous, active low; selects sel[0]) in;
// sel[N1*N2*N3-1:0], the intermediate selects intsel and the segment selects
// out. Outputs settle two gate delays after the flip-flops.
//
// The two levels, which segment feeds which level and the intsel/sel
// numbering follow the published 4x4x4 circuit, the default. The third
// segment advances on both last selects, as explained in tsdl_oha; clock
// enables replace the gated clocks, as in oha_segment.
module tstl_oha
  import msml_oha_pkg::SEG_N_DEFAULT;
#(
  parameter int unsigned N1 = SEG_N_DEFAULT,  // first segment (fastest)
  parameter int unsigned N2 = SEG_N_DEFAULT,  // second segment
  parameter int unsigned N3 = SEG_N_DEFAULT   // third segment (slowest)
) (
  input  logic                 aclk,
  input  logic                 rst_n,
  output logic [N1-1:0]        fsel,
  output logic [N2-1:0]        ssel,
  output logic [N3-1:0]        thdsel,
  output logic [N1*N2-1:0]     intsel,
  output logic [N1*N2*N3-1:0]  sel
);

  logic adv_second, adv_third;

  always_comb begin
    adv_second = fsel[N1-1];
    adv_third  = fsel[N1-1] & ssel[N2-1];
  end

  oha_segment #(.N(N1)) u_first (
    .aclk(aclk), .rst_n(rst_n), .adv(1'b1), .q(fsel)
  );

  oha_segment #(.N(N2)) u_second (
    .aclk(aclk), .rst_n(rst_n), .adv(adv_second), .q(ssel)
  );

  oha_segment #(.N(N3)) u_third (
    .aclk(aclk), .rst_n(rst_n), .adv(adv_third), .q(thdsel)
  );

  // Level 1: first segment gated by second segment.
  for (genvar s = 0; s < int'(N2); s++) begin : g_level1
    and_gate_array #(.N(N1)) u_and (
      .in_sig (fsel),
      .enb_in (ssel[s]),
      .out_sig(intsel[s*N1 +: N1])
    );
  end

  // Level 2: intermediate selects gated by third segment.
  for (genvar t = 0; t < int'(N3); t++) begin : g_level2
    and_gate_array #(.N(N1*N2)) u_and (
      .in_sig (intsel),
      .enb_in (thdsel[t]),
      .out_sig(sel[t*N1*N2 +: N1*N2])
    );
  end

endmodule
