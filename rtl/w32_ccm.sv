// w32_ccm: complex constant multiplier for a twiddle factor resolution of
// 32 points (W32).
//
// After octave symmetry a W32 rotation needs the factors 1, cos/sin(pi/16),
// cos/sin(pi/8), cos/sin(3pi/16) and sin(pi/4). Three constant multipliers,
// cos(pi/8), cos(pi/16) and sin(pi/16), produce all of them through the
// identities
//   sin(pi/8)   = 2 cos(pi/16) sin(pi/16)
//   sin(pi/4)   = 4 cos(pi/8) cos(pi/16) sin(pi/16)
//   sin(3pi/16) = sin(pi/16) (2 cos(pi/8) + 1)
//   cos(3pi/16) = cos(pi/16) (2 cos(pi/8) - 1)
// The cos(pi/8) product (optionally doubled, select s2) is added to and
// subtracted from the input; multiplexers route the input, these sums or the
// doubled cos(pi/16) product into the cos(pi/16) and sin(pi/16) multipliers,
// and four more multiplexers form the outputs. Nine multiplexers in all.
//
//   m  s0 s1 s2 s3 s4 | o1              o2
//   0   1  0  0  0  1 | x               0
//   1   0  0  0  1  1 | sin(pi/16)*x    cos(pi/16)*x
//   2   1  0  0  1  1 | sin(pi/8)*x     cos(pi/8)*x
//   3   0  1  1  1  1 | sin(3pi/16)*x   cos(3pi/16)*x
//   4   1  0  1  1  0 | sin(pi/4)*x     sin(pi/4)*x
//
// The wiring and the select table follow the document (s1 and s2 are
// "don't care" for m = 0 and driven 0 here). Following the wiring, o1
// carries the factor 1 for m = 0 and the sine factor for m = 1..3; the
// rotator's swap network sorts the lanes. Only these five select words are
// valid: others can overflow the WD-bit outputs. Widths, rounding (half up
// after each constant multiplication) and the CSD shift-and-add networks are
// this design's choices.
//
// Interface: x (WD bits, signed), selects s0..s4; outputs o1, o2 (WD bits).
// Timing: combinational.
module w32_ccm
  import twiddle_pkg::*;
#(
  parameter int unsigned WD       = DATA_W,
  parameter int unsigned C8_NUM   = W32_C8_NUM,
  parameter int unsigned C8_FRAC  = W32_C8_FRAC,
  parameter int unsigned S16_NUM  = W32_S16_NUM,
  parameter int unsigned S16_FRAC = W32_S16_FRAC,
  parameter int unsigned C16_NUM  = W32_C16_NUM,
  parameter int unsigned C16_FRAC = W32_C16_FRAC
) (
  input  logic signed [WD-1:0] x,
  input  logic                 s0,
  input  logic                 s1,
  input  logic                 s2,
  input  logic                 s3,
  input  logic                 s4,
  output logic signed [WD-1:0] o1,
  output logic signed [WD-1:0] o2
);

  localparam int unsigned WI = WD + 2;   // internal width, |value| < 3.7|x|

  logic signed [WD-1:0] c8;      // cos(pi/8)*x
  logic signed [WI-1:0] xi;      // x, sign extended
  logic signed [WI-1:0] m2;      // c8 or 2*c8
  logic signed [WI-1:0] add_p;   // m2 + x
  logic signed [WI-1:0] add_m;   // m2 - x
  logic signed [WI-1:0] top_s1;  // x or m2 + x
  logic signed [WI-1:0] low_s2;  // x or m2
  logic signed [WI-1:0] c16_in;  // input of the cos(pi/16) multiplier
  logic signed [WI-1:0] c16;     // cos(pi/16)*c16_in
  logic signed [WI-1:0] s16_in;  // input of the sin(pi/16) multiplier
  logic signed [WD-1:0] s16;     // sin(pi/16)*s16_in
  logic signed [WI-1:0] bot_s3;  // 0 or m2
  logic signed [WI-1:0] rgt_s0;  // c16 or bot_s3

  assign xi = WI'(x);

  const_mult #(.WI(WD), .WO(WD), .COEF(C8_NUM), .FRAC(C8_FRAC)) u_c8 (
    .x(x), .y(c8)
  );

  assign m2     = s2 ? (WI'(c8) <<< 1) : WI'(c8);
  assign add_p  = m2 + xi;
  assign add_m  = m2 - xi;
  assign top_s1 = s1 ? add_p : xi;
  assign low_s2 = s2 ? m2 : xi;
  assign c16_in = s1 ? add_m : low_s2;

  const_mult #(.WI(WI), .WO(WI), .COEF(C16_NUM), .FRAC(C16_FRAC)) u_c16 (
    .x(c16_in), .y(c16)
  );

  assign s16_in = s0 ? (c16 <<< 1) : top_s1;

  const_mult #(.WI(WI), .WO(WD), .COEF(S16_NUM), .FRAC(S16_FRAC)) u_s16 (
    .x(s16_in), .y(s16)
  );

  assign bot_s3 = s3 ? m2 : '0;
  assign rgt_s0 = s0 ? bot_s3 : c16;
  assign o1     = s3 ? s16 : x;
  assign o2     = s4 ? rgt_s0[WD-1:0] : o1;

endmodule
