// tsdl_oha: triple-segment double-level one-hot addresser
// (N1 x N2 x N3 selects).
//
// Three one-hot rings: the first (fsel, N1) advances on every aclk edge, the
// second (ssel, N2) on the edges where fsel[N1-1] is active, the third
// (thdsel, N3) on the edges where both fsel[N1-1] and ssel[N2-1] are active,
// i.e. when the first two rings roll over together. A single level of
// N2*N3 three-input AND gate arrays forms the outputs: the array for (t, s)
// takes fsel on its main inputs and ssel[s], thdsel[t] on its enables, and
// drives sel[(t*N2 + s)*N1 +: N1]. Hence
//     sel[t*N1*N2 + s*N1 + f] = thdsel[t] & ssel[s] & fsel[f]
// and sel steps through 0 .. N1*N2*N3-1 one place per clock.
//
// Interface: aclk, rst_n (asynchronous, active low; selects sel[0]) in;
// sel[N1*N2*N3-1:0] and the segment selects out. Outputs settle one
// three-input gate delay after the flip-flops.
//
// The three segments, the single level of three-input gating and the output
// mapping follow the published 4x4x4 circuit, which is the default. The
// published drawing labels the third segment's clock gate with Ssel_3 alone;
// taken literally that would step the third ring on each of the N1 clocks
// that ssel[N2-1] stays active. This design follows the described behaviour
// instead (the depth is the product of the segment lengths and a rollover
// ripples from the first segment through to the third), so the third ring
// needs both last selects. Clock enables replace the gated clocks, as in
// oha_segment.
module tsdl_oha
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

  for (genvar t = 0; t < int'(N3); t++) begin : g_third
    for (genvar s = 0; s < int'(N2); s++) begin : g_second
      and3_gate_array #(.N(N1)) u_and3 (
        .in_sig (fsel),
        .enb_a  (ssel[s]),
        .enb_b  (thdsel[t]),
        .out_sig(sel[(t*N2 + s)*N1 +: N1])
      );
    end
  end

endmodule
