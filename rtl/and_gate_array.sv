// and_gate_array: a row of N two-input AND gates sharing one enable.
//
// out_sig[i] = in_sig[i] & enb_in. While enb_in is high the main inputs pass
// to the outputs; while it is low every output stays low. In a multi-segment
// one-hot addresser the main inputs carry the one-hot selects of an earlier
// segment and enb_in one select of a later segment, so only the one array
// whose enable is active drives an active output.
//
// Interface: in_sig[N-1:0] and enb_in in, out_sig[N-1:0] out. Purely
// combinational, one gate delay. The structure is the published AND gate
// array; the bus port names are this design's.
module and_gate_array
  import msml_oha_pkg::SEG_N_DEFAULT;
#(
  parameter int unsigned N = SEG_N_DEFAULT
) (
  input  logic [N-1:0] in_sig,
  input  logic         enb_in,
  output logic [N-1:0] out_sig
);

  always_comb begin
    out_sig = in_sig & {N{enb_in}};
  end

endmodule
