// msml_oha_top: the three multi-segment multi-level one-hot addressers side
// by side.
//
// Each addresser replaces a counter and decoder: after reset its select
// output sel[0] is active, and every clock moves the single active select one
// place up, wrapping after the last. The three differ only in how the rings
// are split and how their selects are combined:
//   dsdl: two rings, N1 x N2 (default 4 x 4 = 16 selects), one gate level;
//   tsdl: three rings, N1 x N2 x N3 (default 4 x 4 x 4 = 64 selects), one
//         level of three-input gates;
//   tstl: three rings, N1 x N2 x N3 (default 4 x 4 x 4 = 64 selects), two
//         levels of two-input gates.
// They are alternative arrangements of the same idea, so each keeps its own
// clock, reset and outputs; nothing is shared between them.
//
// Interface: for each of dsdl_, tsdl_, tstl_: aclk and rst_n (asynchronous,
// active low) in, sel out, plus the segment selects of each. Timing as in the
// instantiated modules. The defaults are the configurations drawn for each
// arrangement; instantiating all three in one top is this design's choice.
module msml_oha_top
  import msml_oha_pkg::SEG_N_DEFAULT;
#(
  parameter int unsigned DSDL_N1 = SEG_N_DEFAULT,
  parameter int unsigned DSDL_N2 = SEG_N_DEFAULT,
  parameter int unsigned TSDL_N1 = SEG_N_DEFAULT,
  parameter int unsigned TSDL_N2 = SEG_N_DEFAULT,
  parameter int unsigned TSDL_N3 = SEG_N_DEFAULT,
  parameter int unsigned TSTL_N1 = SEG_N_DEFAULT,
  parameter int unsigned TSTL_N2 = SEG_N_DEFAULT,
  parameter int unsigned TSTL_N3 = SEG_N_DEFAULT
) (
  // Double-segment double-level addresser
  input  logic                                dsdl_aclk,
  input  logic                                dsdl_rst_n,
  output logic [DSDL_N1-1:0]                  dsdl_fsel,
  output logic [DSDL_N2-1:0]                  dsdl_ssel,
  output logic [DSDL_N1*DSDL_N2-1:0]          dsdl_sel,
  // Triple-segment double-level addresser
  input  logic                                tsdl_aclk,
  input  logic                                tsdl_rst_n,
  output logic [TSDL_N1-1:0]                  tsdl_fsel,
  output logic [TSDL_N2-1:0]                  tsdl_ssel,
  output logic [TSDL_N3-1:0]                  tsdl_thdsel,
  output logic [TSDL_N1*TSDL_N2*TSDL_N3-1:0]  tsdl_sel,
  // Triple-segment triple-level addresser
  input  logic                                tstl_aclk,
  input  logic                                tstl_rst_n,
  output logic [TSTL_N1-1:0]                  tstl_fsel,
  output logic [TSTL_N2-1:0]                  tstl_ssel,
  output logic [TSTL_N3-1:0]                  tstl_thdsel,
  output logic [TSTL_N1*TSTL_N2-1:0]          tstl_intsel,
  output logic [TSTL_N1*TSTL_N2*TSTL_N3-1:0]  tstl_sel
);

  dsdl_oha #(.N1(DSDL_N1), .N2(DSDL_N2)) u_dsdl (
    .aclk (dsdl_aclk),
    .rst_n(dsdl_rst_n),
    .fsel (dsdl_fsel),
    .ssel (dsdl_ssel),
    .sel  (dsdl_sel)
  );

  tsdl_oha #(.N1(TSDL_N1), .N2(TSDL_N2), .N3(TSDL_N3)) u_tsdl (
    .aclk  (tsdl_aclk),
    .rst_n (tsdl_rst_n),
    .fsel  (tsdl_fsel),
    .ssel  (tsdl_ssel),
    .thdsel(tsdl_thdsel),
    .sel   (tsdl_sel)
  );

  tstl_oha #(.N1(TSTL_N1), .N2(TSTL_N2), .N3(TSTL_N3)) u_tstl (
    .aclk  (tstl_aclk),
    .rst_n (tstl_rst_n),
    .fsel  (tstl_fsel),
    .ssel  (tstl_ssel),
    .thdsel(tstl_thdsel),
    .intsel(tstl_intsel),
    .sel   (tstl_sel)
  );

endmodule
