// twiddle_ctrl: decodes a twiddle factor index k of W_N^k (N = 8, 16 or 32)
// into the control of a rotator: the select word of its complex constant
// multipliers, the two output negations and the lane swap.
//
// Octave symmetry reduces the angle theta = 2*pi*k/N to an angle
// alpha_m = 2*pi*m/N with 0 <= m <= N/8:
//   quadrant q = k / (N/4), remainder r = k mod (N/4)
//   r <= N/8 : m = r,       cos/sin of the quadrant angle are cos/sin alpha_m
//   r >  N/8 : m = N/4 - r, cos and sin are exchanged
// The quadrant then exchanges cos and sin again when q is odd, negates the
// cosine for q = 1, 2 and negates the sine for q = 2, 3:
//   W_N^k = cos(theta) - j sin(theta),
//   x W_N^k = (a cos + b sin) + j (b cos - a sin)  for x = a + j b.
// The W32 multiplier delivers its sine factor on o1 and its cosine factor on
// o2 for m = 1..4 (its factor 1 is on o1 for m = 0); that extra exchange is
// folded into the swap bit. swap = 1 means o2 feeds the cosine lane.
//
// The use of octave symmetry with swaps and negations and the W32 select
// table follow the document; the decoding equations are this design's.
//
// Interface: k (log2(N) bits) in; ctrl (rot_ctrl_t) and m out.
// Timing: combinational.
module twiddle_ctrl
  import twiddle_pkg::*;
#(
  parameter int unsigned N  = 32,
  localparam int unsigned LK = $clog2(N)
) (
  input  logic [LK-1:0] k,
  output logic [LK-1:0] m,
  output rot_ctrl_t     ctrl
);

  localparam int unsigned N4 = N / 4;
  localparam int unsigned N8 = N / 8;

  logic [1:0]    q;
  logic [LK-1:0] r;
  logic          oct_swap;
  logic          quad_swap;
  logic          neg_cos;
  logic          neg_sin;
  logic          ccm_flip;
  logic          lane_x;

  always_comb begin
    q         = k[LK-1 -: 2];
    r         = k & LK'(N4 - 1);
    oct_swap  = (r > LK'(N8));
    m         = oct_swap ? LK'(N4) - r : r;
    quad_swap = q[0];
    neg_cos   = (q == 2'd1) || (q == 2'd2);
    neg_sin   = (q == 2'd2) || (q == 2'd3);
    ccm_flip  = (N == 32) && (m != '0);
    lane_x     = oct_swap ^ quad_swap ^ ccm_flip;

    ctrl.swap = lane_x;
    ctrl.neg1 = lane_x ? neg_sin : neg_cos;
    ctrl.neg2 = lane_x ? neg_cos : neg_sin;

    ctrl.sel  = '0;
    if (N == 8) begin
      ctrl.sel.s0 = (m == LK'(1));
    end else if (N == 16) begin
      ctrl.sel.s1 = (m == LK'(0));
      ctrl.sel.s0 = (m == LK'(2));
    end else begin
      // select words of the W32 multiplier, one per m
      unique case (m)
        LK'(0):  ctrl.sel = '{s4: 1'b1, s3: 1'b0, s2: 1'b0, s1: 1'b0, s0: 1'b1};
        LK'(1):  ctrl.sel = '{s4: 1'b1, s3: 1'b1, s2: 1'b0, s1: 1'b0, s0: 1'b0};
        LK'(2):  ctrl.sel = '{s4: 1'b1, s3: 1'b1, s2: 1'b0, s1: 1'b0, s0: 1'b1};
        LK'(3):  ctrl.sel = '{s4: 1'b1, s3: 1'b1, s2: 1'b1, s1: 1'b1, s0: 1'b0};
        default: ctrl.sel = '{s4: 1'b0, s3: 1'b1, s2: 1'b1, s1: 1'b0, s0: 1'b1};
      endcase
    end
  end

  initial begin
    assert (N == 8 || N == 16 || N == 32)
      else $error("twiddle_ctrl: N must be 8, 16 or 32");
  end

endmodule
