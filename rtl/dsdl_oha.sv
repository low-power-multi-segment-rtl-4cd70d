// dsdl_oha: double-segment double-level one-hot addresser (N1 x N2 selects).
//
// Two one-hot rings replace one long ring of N1*N2 flip-flops. The first
// segment (fsel, N1 flip-flops) advances on every aclk edge. The second
// segment (ssel, N2 flip-flops) advances only on the edge at which the first
// segment's last select fsel[N1-1] is active, i.e. once every N1 clocks when
// the first ring rolls over. One level of N2 AND gate arrays forms the
// outputs: array s takes all of fsel on its main inputs and ssel[s] on its
// enable, and drives sel[s*N1 +: N1]. Hence
//     sel[s*N1 + f] = ssel[s] & fsel[f]
// and sel steps through 0, 1, ..., N1*N2-1, 0, ... one place per clock, the
// same sequence as a log2(N1*N2)-bit counter and decoder. Only N1+N2
// flip-flops are clocked, and only the first ring switches on most clocks.
//
// Interface: aclk, rst_n (asynchronous, active low; selects sel[0]) in;
// sel[N1*N2-1:0], plus the segment selects fsel and ssel, out. sel changes
// one AND gate delay after the flip-flops, which change just after aclk.
//
// The segment arrangement, the rollover condition (second segment moves only
// when fsel[N1-1] is active) and the output mapping follow the published
// 4x4 circuit; the default 4x4 is that circuit. Driving the second segment
// with a clock enable instead of a gated clock is this design's choice (see
// oha_segment).
module dsdl_oha
  import msml_oha_pkg::SEG_N_DEFAULT;
#(
  parameter int unsigned N1 = SEG_N_DEFAULT,  // first segment (fastest)
  parameter int unsigned N2 = SEG_N_DEFAULT   // second segment
) (
  input  logic              aclk,
  input  logic              rst_n,
  output logic [N1-1:0]     fsel,
  output logic [N2-1:0]     ssel,
  output logic [N1*N2-1:0]  sel
);

  oha_segment #(.N(N1)) u_first (
    .aclk (aclk),
    .rst_n(rst_n),
    .adv  (1'b1),
    .q    (fsel)
  );

  oha_segment #(.N(N2)) u_second (
    .aclk (aclk),
    .rst_n(rst_n),
    .adv  (fsel[N1-1]),
    .q    (ssel)
  );

  for (genvar s = 0; s < int'(N2); s++) begin : g_and
    and_gate_array #(.N(N1)) u_and (
      .in_sig (fsel),
      .enb_in (ssel[s]),
      .out_sig(sel[s*N1 +: N1])
    );
  end

endmodule
