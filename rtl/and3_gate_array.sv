// and3_gate_array: a row of N three-input AND gates sharing two enables.
//
// out_sig[i] = in_sig[i] & enb_a & enb_b. This is the single level of gating
// of the triple-segment double-level addresser: the main inputs carry the
// first segment's selects, enb_a one select of the second segment and enb_b
// one select of the third, so an output is active only when all three
// segments point at it.
//
// Interface: in_sig[N-1:0], enb_a, enb_b in, out_sig[N-1:0] out. Purely
// combinational, one (three-input) gate delay. That the array uses
// three-input AND gates follows the published design; the port names are this
// design's.
module and3_gate_array
  import msml_oha_pkg::SEG_N_DEFAULT;
#(
  parameter int unsigned N = SEG_N_DEFAULT
) (
  input  logic [N-1:0] in_sig,
  input  logic         enb_a,
  input  logic         enb_b,
  output logic [N-1:0] out_sig
);

  always_comb begin
    out_sig = in_sig & {N{enb_a & enb_b}};
  end

endmodule
