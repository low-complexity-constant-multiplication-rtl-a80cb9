// const_mult: multiplication of a signed data word by one fixed positive
// constant, built as a shift-and-add network, with the product rounded back
// to the scale of the input.
//
// The constant is COEF / 2**FRAC. At elaboration the numerator is recoded into
// canonic signed digits (CSD); every non-zero digit becomes one shifted copy
// of the input that is added or subtracted, so the network holds one adder
// less than it has non-zero digits. The exact sum x*COEF is then rounded to
// integer scale, round half up: (x*COEF + 2**(FRAC-1)) >>> FRAC, i.e. the
// product is quantised right after each constant multiplication, which is
// where the round-off noise sources of the error analysis sit.
//
// The coefficients and the quantisation point follow the document; the CSD
// recoding is this design's choice (the document prefers minimum-adder
// graphs, whose adder graphs it does not list), as is the rounding mode.
//
// Interface: x (WI bits, signed) in, y (WO bits, signed) out.
// Timing: purely combinational.
module const_mult #(
  parameter int unsigned WI   = 16,     // input width
  parameter int unsigned WO   = 16,     // output width
  parameter int unsigned COEF = 2896,   // constant numerator (positive)
  parameter int unsigned FRAC = 12      // constant fractional bits (>= 1)
) (
  input  logic signed [WI-1:0] x,
  output logic signed [WO-1:0] y
);
  import twiddle_pkg::*;

  localparam int NDIG = FRAC + 3;        // CSD digits examined
  localparam int WP   = WI + FRAC + 4;   // exact product width

  logic signed [WP-1:0] x_ext;
  logic signed [WP-1:0] prod;
  logic signed [WP-1:0] rounded;

  assign x_ext = WP'(x);

  // Shift-and-add network: one term per non-zero CSD digit.
  always_comb begin
    prod = '0;
    for (int i = 0; i < NDIG; i++) begin
      if (csd_digit(longint'(COEF), i) == 1)
        prod = prod + (x_ext <<< i);
      else if (csd_digit(longint'(COEF), i) == -1)
        prod = prod - (x_ext <<< i);
    end
  end

  assign rounded = (prod + (WP'(1) <<< (FRAC - 1))) >>> FRAC;
  assign y       = rounded[WO-1:0];

  initial begin
    assert (FRAC >= 1) else $error("const_mult: FRAC must be at least 1");
    assert (COEF > 0) else $error("const_mult: COEF must be positive");
  end

endmodule
