// twiddle_rotator: complete complex twiddle factor multiplier
// o = x * W_N^k, W_N = exp(-j 2 pi / N), for N = 8, 16 or 32.
//
// The real and the imaginary part of x each pass through one complex
// constant multiplier (W8, W16 or W32 variant, chosen by N) that yields
// the products of the part with cos(alpha_m) and sin(alpha_m), alpha_m in
// [0, pi/4]. Each of the four products can be negated, each pair can be
// swapped, and two adders combine them:
//   Re(o) = a1 + b2,  Im(o) = b1 - a2
// where a1/b1 are the cosine lanes and a2/b2 the sine lanes of the real (a)
// and imaginary (b) part after negation and swap. twiddle_ctrl derives the
// selects, negations and swap from k.
//
// This structure follows the document's block diagram of a complex
// multiplier built from complex constant multipliers. The output register,
// the valid flag and the widths are this design's choices.
//
// Interface: x_re, x_im (WD bits, signed), k (log2(N) bits) and in_valid are
// sampled at a rising clk edge; o_re, o_im (WD+1 bits, signed) and out_valid
// appear one cycle later (latency 1, one new input every cycle). rst_n is an
// asynchronous active-low reset that clears out_valid and the outputs.
module twiddle_rotator
  import twiddle_pkg::*;
#(
  parameter int unsigned N  = 32,
  parameter int unsigned WD = DATA_W,
  localparam int unsigned LK = $clog2(N)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [WD-1:0] x_re,
  input  logic signed [WD-1:0] x_im,
  input  logic [LK-1:0]        k,
  output logic                 out_valid,
  output logic signed [WD:0]   o_re,
  output logic signed [WD:0]   o_im
);

  rot_ctrl_t ctrl;
  logic [LK-1:0] m;

  twiddle_ctrl #(.N(N)) u_ctrl (.k(k), .m(m), .ctrl(ctrl));

  logic signed [WD-1:0] a_o1, a_o2, b_o1, b_o2;

  if (N == 8) begin : g_w8
    w8_ccm #(.WD(WD)) u_re (.x(x_re), .s0(ctrl.sel.s0), .o1(a_o1), .o2(a_o2));
    w8_ccm #(.WD(WD)) u_im (.x(x_im), .s0(ctrl.sel.s0), .o1(b_o1), .o2(b_o2));
  end else if (N == 16) begin : g_w16
    w16_ccm #(.WD(WD)) u_re (.x(x_re), .s1(ctrl.sel.s1), .s0(ctrl.sel.s0),
                             .o1(a_o1), .o2(a_o2));
    w16_ccm #(.WD(WD)) u_im (.x(x_im), .s1(ctrl.sel.s1), .s0(ctrl.sel.s0),
                             .o1(b_o1), .o2(b_o2));
  end else begin : g_w32
    w32_ccm #(.WD(WD)) u_re (.x(x_re), .s0(ctrl.sel.s0), .s1(ctrl.sel.s1),
                             .s2(ctrl.sel.s2), .s3(ctrl.sel.s3),
                             .s4(ctrl.sel.s4), .o1(a_o1), .o2(a_o2));
    w32_ccm #(.WD(WD)) u_im (.x(x_im), .s0(ctrl.sel.s0), .s1(ctrl.sel.s1),
                             .s2(ctrl.sel.s2), .s3(ctrl.sel.s3),
                             .s4(ctrl.sel.s4), .o1(b_o1), .o2(b_o2));
  end

  // Optional negation of each constant multiplier output.
  logic signed [WD:0] a_n1, a_n2, b_n1, b_n2;
  assign a_n1 = ctrl.neg1 ? -(WD+1)'(a_o1) : (WD+1)'(a_o1);
  assign a_n2 = ctrl.neg2 ? -(WD+1)'(a_o2) : (WD+1)'(a_o2);
  assign b_n1 = ctrl.neg1 ? -(WD+1)'(b_o1) : (WD+1)'(b_o1);
  assign b_n2 = ctrl.neg2 ? -(WD+1)'(b_o2) : (WD+1)'(b_o2);

  // Swap network: lane 1 carries the cosine term, lane 2 the sine term.
  logic signed [WD:0] a_l1, a_l2, b_l1, b_l2;
  assign a_l1 = ctrl.swap ? a_n2 : a_n1;
  assign a_l2 = ctrl.swap ? a_n1 : a_n2;
  assign b_l1 = ctrl.swap ? b_n2 : b_n1;
  assign b_l2 = ctrl.swap ? b_n1 : b_n2;

  logic signed [WD:0] sum_re, sum_im;
  assign sum_re = a_l1 + b_l2;
  assign sum_im = b_l1 - a_l2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      o_re      <= '0;
      o_im      <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        o_re <= sum_re;
        o_im <= sum_im;
      end
    end
  end

  logic unused_m;
  assign unused_m = ^m;

endmodule
