// oha_segment: one segment of one-hot addressing, a ring of N flip-flops.
//
// The segment holds a single active bit. Reset (asynchronous, active low)
// sets flip-flop 0 and clears the rest, so select 0 is active. Each rising
// edge of aclk on which adv is high moves the active bit one place down the
// chain, from output N-1 back to output 0, so the outputs step through
// 0, 1, ..., N-1, 0, ... exactly as a counter followed by a decoder would,
// with two flip-flops toggling per advance and no decoding logic at all.
//
// Interface: aclk, rst_n, adv in; q[N-1:0] out, q[i] is select i. The
// outputs come straight from the flip-flops and change just after the aclk
// edge that advances the segment.
//
// The ring, the set-on-reset first flip-flop and the cleared others follow
// the published one-hot shift register. The adv input is this design's own:
// where the published multi-segment circuits gate a later segment's clock so
// it only sees an edge when the earlier segment rolls over, this module keeps
// one clock and uses adv as a synchronous enable. The sequence of outputs is
// the same; a clock-gating synthesis flow turns the enable back into a gated
// clock. A stand-alone segment ties adv high.
module oha_segment
  import msml_oha_pkg::*;
#(
  parameter int unsigned N = SEG_N_DEFAULT
) (
  input  logic         aclk,
  input  logic         rst_n,
  input  logic         adv,
  output logic [N-1:0] q
);

  if (N < SEG_N_MIN) begin : g_bad_n
    $error("oha_segment: N must be at least 2");
  end

  always_ff @(posedge aclk or negedge rst_n) begin
    if (!rst_n) begin
      q <= N'(1);
    end else begin
      // Exactly one output is active at every clock edge out of reset.
      a_one_hot : assert ((q != '0) && ((q & (q - N'(1))) == '0))
        else $error("oha_segment: outputs are not one-hot: %b", q);
      if (adv) begin
        q <= {q[N-2:0], q[N-1]};
      end
    end
  end

endmodule
