// twiddle_pkg: shared types, constants and elaboration-time helpers for the
// trigonometric-identity twiddle factor multipliers.
//
// The default coefficients are optimised (addition aware) sets taken from
// the published coefficient tables for a precision requirement of about 12
// fractional bits. Whole sets are chosen so that the errors of the composite
// factors (e.g. 4*C8*C16*S16 for sin(pi/4)) stay small, not each constant on
// its own. Precision, as -log2(max |factor error|) - 1 over all factors:
// W8 12.69 bits, W16 13.25 bits, W32 11.73 bits.
//   W8  : sin(pi/4)  = 2896/4096
//   W16 : cos(pi/8)  = 7568/8192,   sin(pi/8)  = 3135/8192
//   W32 : cos(pi/8)  = 60547/65536, sin(pi/16) = 12783/65536,
//         cos(pi/16) = 16069/16384
// Each coefficient is stored as an integer numerator and a number of
// fractional bits, the value being NUM / 2**FRAC.
//
// All complex constant multipliers share one select word (s4..s0); the W16
// multiplier uses s1 and s0, the W8 multiplier uses s0 only.
package twiddle_pkg;

  // ---- default coefficients (numerator, fractional bits) ----
  localparam int unsigned W8_S4_NUM   = 2896;
  localparam int unsigned W8_S4_FRAC  = 12;

  localparam int unsigned W16_C8_NUM  = 7568;
  localparam int unsigned W16_C8_FRAC = 13;
  localparam int unsigned W16_S8_NUM  = 3135;
  localparam int unsigned W16_S8_FRAC = 13;

  localparam int unsigned W32_C8_NUM   = 60547;
  localparam int unsigned W32_C8_FRAC  = 16;
  localparam int unsigned W32_S16_NUM  = 12783;
  localparam int unsigned W32_S16_FRAC = 16;
  localparam int unsigned W32_C16_NUM  = 16069;
  localparam int unsigned W32_C16_FRAC = 14;

  // Data word length of the multiplier inputs.
  localparam int unsigned DATA_W = 16;

  // Select word of a complex constant multiplier.
  typedef struct packed {
    logic s4;
    logic s3;
    logic s2;
    logic s1;
    logic s0;
  } ccm_sel_t;

  // Everything a rotator needs besides the data, decoded from the twiddle
  // index: multiplier selects, output negations and the swap of Fig. 2.
  typedef struct packed {
    ccm_sel_t sel;
    logic     neg1;   // negate CCM output O1
    logic     neg2;   // negate CCM output O2
    logic     swap;   // route O2 to the cosine lane and O1 to the sine lane
  } rot_ctrl_t;

  // Canonic signed-digit (CSD) digit number pos of a positive constant c:
  // +1, 0 or -1. Used at elaboration time to build shift-and-add networks.
  function automatic int csd_digit(longint c, int pos);
    longint v;
    int d;
    v = c;
    d = 0;
    for (int i = 0; i <= pos; i++) begin
      if ((v % 2) != 0) begin
        d = ((v % 4) == 3) ? -1 : 1;
        v = v - longint'(d);
      end else begin
        d = 0;
      end
      v = v / 2;
    end
    return d;
  endfunction

  // Number of non-zero CSD digits of c within the lowest ndig digits.
  function automatic int csd_weight(longint c, int ndig);
    int n;
    n = 0;
    for (int i = 0; i < ndig; i++) if (csd_digit(c, i) != 0) n++;
    return n;
  endfunction

endpackage
