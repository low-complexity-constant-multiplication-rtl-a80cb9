// twiddle_mult_top: the three low-complexity twiddle factor multipliers,
// W8, W16 and W32, side by side. In a radix-2^5 single-path delay feedback
// pipelined FFT of 256 points these are the rotators between butterfly
// stages 1-2, 2-3 and 3-4 (a W256 general rotator and trivial W4 rotations
// complete that pipeline and are not part of this design).
//
// Each rotator has its own input and output ports and computes
// o = x * W_N^k with latency one clock cycle and one input per cycle; see
// twiddle_rotator for the arithmetic.
//
// Interface per rotator N in {8, 16, 32}: wN_in_valid, wN_x_re, wN_x_im
// (WD bits, signed), wN_k (log2(N) bits) in; wN_out_valid, wN_o_re, wN_o_im
// (WD+1 bits, signed) out. clk and the asynchronous active-low rst_n are
// shared.
module twiddle_mult_top
  import twiddle_pkg::*;
#(
  parameter int unsigned WD = DATA_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // W8 rotator
  input  logic                 w8_in_valid,
  input  logic signed [WD-1:0] w8_x_re,
  input  logic signed [WD-1:0] w8_x_im,
  input  logic [2:0]           w8_k,
  output logic                 w8_out_valid,
  output logic signed [WD:0]   w8_o_re,
  output logic signed [WD:0]   w8_o_im,
  // W16 rotator
  input  logic                 w16_in_valid,
  input  logic signed [WD-1:0] w16_x_re,
  input  logic signed [WD-1:0] w16_x_im,
  input  logic [3:0]           w16_k,
  output logic                 w16_out_valid,
  output logic signed [WD:0]   w16_o_re,
  output logic signed [WD:0]   w16_o_im,
  // W32 rotator
  input  logic                 w32_in_valid,
  input  logic signed [WD-1:0] w32_x_re,
  input  logic signed [WD-1:0] w32_x_im,
  input  logic [4:0]           w32_k,
  output logic                 w32_out_valid,
  output logic signed [WD:0]   w32_o_re,
  output logic signed [WD:0]   w32_o_im
);

  twiddle_rotator #(.N(8), .WD(WD)) u_w8 (
    .clk(clk), .rst_n(rst_n), .in_valid(w8_in_valid),
    .x_re(w8_x_re), .x_im(w8_x_im), .k(w8_k),
    .out_valid(w8_out_valid), .o_re(w8_o_re), .o_im(w8_o_im)
  );

  twiddle_rotator #(.N(16), .WD(WD)) u_w16 (
    .clk(clk), .rst_n(rst_n), .in_valid(w16_in_valid),
    .x_re(w16_x_re), .x_im(w16_x_im), .k(w16_k),
    .out_valid(w16_out_valid), .o_re(w16_o_re), .o_im(w16_o_im)
  );

  twiddle_rotator #(.N(32), .WD(WD)) u_w32 (
    .clk(clk), .rst_n(rst_n), .in_valid(w32_in_valid),
    .x_re(w32_x_re), .x_im(w32_x_im), .k(w32_k),
    .out_valid(w32_out_valid), .o_re(w32_o_re), .o_im(w32_o_im)
  );

endmodule
