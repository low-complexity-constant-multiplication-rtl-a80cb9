// w16_ccm: modified complex constant multiplier for a twiddle factor
// resolution of 16 points (W16).
//
// After octave symmetry a W16 rotation needs the factors 1, cos(pi/8),
// sin(pi/8) and sin(pi/4) = cos(pi/4). Only two constant multipliers are
// used, cos(pi/8) and sin(pi/8); the third factor comes from the identity
// sin(pi/4) = 2 sin(pi/8) cos(pi/8): the cos(pi/8) product is doubled (a
// wired shift) and fed through the sin(pi/8) multiplier. Doing cos(pi/8)
// first and sin(pi/8) second lowers the round-off noise of the sin(pi/4)
// path compared with the opposite order. Two output multiplexers give the
// factor 1 (o1 = x, o2 = 0).
//
//   m  s1 s0 | o1             o2
//   0   1  0 | x              0
//   1   0  0 | cos(pi/8)*x    sin(pi/8)*x
//   2   0  1 | sin(pi/4)*x    sin(pi/4)*x
//
// The structure and the selects follow the document's figure of the
// multiplier; widths, rounding (half up after each constant multiplication)
// and the CSD shift-and-add networks are this design's choices.
//
// Interface: x (WD bits, signed), selects s1, s0; outputs o1 (cosine lane)
// and o2 (sine lane), WD bits each. Timing: combinational.
module w16_ccm
  import twiddle_pkg::*;
#(
  parameter int unsigned WD      = DATA_W,
  parameter int unsigned C8_NUM  = W16_C8_NUM,
  parameter int unsigned C8_FRAC = W16_C8_FRAC,
  parameter int unsigned S8_NUM  = W16_S8_NUM,
  parameter int unsigned S8_FRAC = W16_S8_FRAC
) (
  input  logic signed [WD-1:0] x,
  input  logic                 s1,
  input  logic                 s0,
  output logic signed [WD-1:0] o1,
  output logic signed [WD-1:0] o2
);

  logic signed [WD-1:0] c8;      // cos(pi/8)*x
  logic signed [WD:0]   s8_in;   // x or 2*cos(pi/8)*x
  logic signed [WD-1:0] s8;      // sin(pi/8)*s8_in
  logic signed [WD-1:0] mux_a;

  const_mult #(.WI(WD), .WO(WD), .COEF(C8_NUM), .FRAC(C8_FRAC)) u_c8 (
    .x(x), .y(c8)
  );

  assign s8_in = s0 ? {c8, 1'b0} : (WD+1)'(x);

  const_mult #(.WI(WD+1), .WO(WD), .COEF(S8_NUM), .FRAC(S8_FRAC)) u_s8 (
    .x(s8_in), .y(s8)
  );

  assign mux_a = s1 ? x : c8;
  assign o1    = s0 ? s8 : mux_a;
  assign o2    = s1 ? '0 : s8;

endmodule
