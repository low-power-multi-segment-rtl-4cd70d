// msml_oha_pkg: constants shared by the multi-segment one-hot addressing
// modules.
//
// Every segment of a multi-segment one-hot addresser is a short ring of
// flip-flops. Four flip-flops per segment is the arrangement drawn for all
// three multi-segment configurations (4x4, 4x4x4, 4x4x4), and four is also the
// smallest segment length for which a single ring beats a counter plus decoder,
// so it is the default length of every segment here. Two is the shortest
// segment the evaluated configurations use (4x2, 4x2x2) and the shortest ring
// that still shifts.
package msml_oha_pkg;

  // Default number of flip-flops (and select outputs) in one segment.
  localparam int unsigned SEG_N_DEFAULT = 4;

  // Shortest ring a segment may be built with.
  localparam int unsigned SEG_N_MIN = 2;

endpackage
