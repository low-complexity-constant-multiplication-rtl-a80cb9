// w8_ccm: complex constant multiplier for a twiddle factor resolution of
// 8 points (W8).
//
// After octave symmetry a W8 rotation needs only the factors 1 and
// sin(pi/4) = cos(pi/4). One shift-and-add constant multiplier computes
// sin(pi/4)*x and a multiplexer chooses between the input and that product,
// as the document describes. The second output, the sine lane, must be 0 for
// the factor 1 and sin(pi/4)*x otherwise; the document names only the one
// multiplexer, so the zero on O2 is this design's addition.
//
//   s0 = 0 : o1 = x,             o2 = 0
//   s0 = 1 : o1 = sin(pi/4)*x,   o2 = sin(pi/4)*x
//
// Interface: x (WD bits, signed), select s0; outputs o1 (cosine lane) and o2
// (sine lane), WD bits each. Timing: combinational.
module w8_ccm
  import twiddle_pkg::*;
#(
  parameter int unsigned WD      = DATA_W,
  parameter int unsigned S4_NUM  = W8_S4_NUM,
  parameter int unsigned S4_FRAC = W8_S4_FRAC
) (
  input  logic signed [WD-1:0] x,
  input  logic                 s0,
  output logic signed [WD-1:0] o1,
  output logic signed [WD-1:0] o2
);

  logic signed [WD-1:0] p;

  const_mult #(.WI(WD), .WO(WD), .COEF(S4_NUM), .FRAC(S4_FRAC)) u_s4 (
    .x(x), .y(p)
  );

  assign o1 = s0 ? p : x;
  assign o2 = s0 ? p : '0;

endmodule
