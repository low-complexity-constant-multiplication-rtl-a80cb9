// tb_coef_precision: measures the coefficient precision of the W8, W16 and
// W32 constant multipliers with their default coefficients.
// The multipliers are instantiated with a 40-bit data path and driven with
// x = 2**37, so that data rounding is negligible and o/x is the composite
// factor the hardware realises (e.g. 4*C8*C16*S16 for sin(pi/4)). For every
// factor the error against the exact cosine/sine is taken; the precision of
// a multiplier is -log2(max |error|) - 1, in bits. The expected values are
// those of the default coefficient sets: W8 12.69, W16 13.25, W32 11.73
// (checked to 0.02 bit). A multiplier whose factors are off by more than
// 2**-12 also fails. Finally the adders of the CSD shift-and-add networks
// of the default constants are counted (non-zero digits - 1 per constant):
// W8 4, W16 3 + 3 = 6 (the published count for 12 fractional bits), W32
// 5 + 4 + 4 = 13 plus its adder and subtractor.
module tb_coef_precision;
  import twiddle_pkg::*;
  int checks = 0;
  int failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam real PI = 3.14159265358979;
  localparam int  W  = 40;

  logic signed [W-1:0] x, p1, p2, q1, q2, r1, r2;
  logic ps0, qs1, qs0, s0, s1, s2, s3, s4;

  w8_ccm  #(.WD(W)) u8  (.x(x), .s0(ps0), .o1(p1), .o2(p2));
  w16_ccm #(.WD(W)) u16 (.x(x), .s1(qs1), .s0(qs0), .o1(q1), .o2(q2));
  w32_ccm #(.WD(W)) u32 (.x(x), .s0(s0), .s1(s1), .s2(s2), .s3(s3), .s4(s4),
                         .o1(r1), .o2(r2));

  function automatic real rabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  real worst;

  task automatic factor(string nm, logic signed [W-1:0] o, real ideal);
    real e;
    e = rabs(real'(o) / real'(x) - ideal);
    if (e > worst) worst = e;
    checks++;
    if (e > 2.0 ** (-12)) begin
      failures++;
      $display("FAIL %s: factor error %e", nm, e);
    end
  endtask

  task automatic report(string nm, real expect_bits);
    real bits;
    bits = -$ln(worst) / $ln(2.0) - 1.0;
    $display("%s: precision %f bits", nm, bits);
    checks++;
    if (rabs(bits - expect_bits) > 0.02) begin
      failures++;
      $display("FAIL %s: expected %f bits", nm, expect_bits);
    end
  endtask

  initial begin
    x = W'(1) <<< 37;
    // W8
    worst = 0.0;
    ps0 = 1'b1; #1;
    factor("W8 sin(pi/4)", p1, $sin(PI / 4.0));
    report("W8", 12.69);
    // W16
    worst = 0.0;
    qs1 = 1'b0; qs0 = 1'b0; #1;
    factor("W16 cos(pi/8)", q1, $cos(PI / 8.0));
    factor("W16 sin(pi/8)", q2, $sin(PI / 8.0));
    qs0 = 1'b1; #1;
    factor("W16 sin(pi/4)", q1, $sin(PI / 4.0));
    report("W16", 13.25);
    // W32, selects {s0, s1, s2, s3, s4}
    worst = 0.0;
    {s0, s1, s2, s3, s4} = 5'b00011; #1;
    factor("W32 sin(pi/16)", r1, $sin(PI / 16.0));
    factor("W32 cos(pi/16)", r2, $cos(PI / 16.0));
    {s0, s1, s2, s3, s4} = 5'b10011; #1;
    factor("W32 sin(pi/8)", r1, $sin(PI / 8.0));
    factor("W32 cos(pi/8)", r2, $cos(PI / 8.0));
    {s0, s1, s2, s3, s4} = 5'b01111; #1;
    factor("W32 sin(3pi/16)", r1, $sin(3.0 * PI / 16.0));
    factor("W32 cos(3pi/16)", r2, $cos(3.0 * PI / 16.0));
    {s0, s1, s2, s3, s4} = 5'b10110; #1;
    factor("W32 sin(pi/4)", r1, $sin(PI / 4.0));
    report("W32", 11.73);
    checks += 3;
    if (csd_weight(W8_S4_NUM, 24) - 1 != 4) begin
      failures++; $display("FAIL W8 adder count");
    end
    if (csd_weight(W16_C8_NUM, 24) + csd_weight(W16_S8_NUM, 24) - 2 != 6) begin
      failures++; $display("FAIL W16 adder count");
    end
    if (csd_weight(W32_C8_NUM, 24) + csd_weight(W32_S16_NUM, 24)
        + csd_weight(W32_C16_NUM, 24) - 3 != 13) begin
      failures++; $display("FAIL W32 adder count");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
