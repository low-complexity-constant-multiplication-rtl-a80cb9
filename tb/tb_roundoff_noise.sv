// tb_roundoff_noise: measures the data round-off noise of the W16 and W32
// constant multipliers and compares it with the noise model in which every
// rounded constant multiplication adds white noise of variance 1/12 LSB^2,
// carried to the output by the gain of the stages that follow it:
//   W16 sin(pi/4) : 1 + (2 sin(pi/8))^2
//   W32 sin(pi/4) : 1 + (2 sin(pi/16))^2 + (4 cos(pi/16) sin(pi/16))^2
//   W32 sin(pi/8), sin(3pi/16) : 1 + (2 sin(pi/16))^2
//   W32 cos(3pi/16) : 1 + (2 cos(pi/16))^2
//   single multiplications : 1
// For each factor the output error against the composite quantised
// coefficient times x is accumulated over random 16-bit inputs; its variance
// must lie within 10 % of the model. The W16 sin(pi/4) noise must also stay
// below the model of the opposite multiplication order, 1 + (2 cos(pi/8))^2.
module tb_roundoff_noise;
  int checks = 0;
  int failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam real PI = 3.14159265358979;
  localparam int  NS = 60000;

  // quantised coefficients (defaults of the multipliers)
  localparam real C8_16  = 7568.0 / 8192.0;
  localparam real S8_16  = 3135.0 / 8192.0;
  localparam real C8_32  = 60547.0 / 65536.0;
  localparam real S16_32 = 12783.0 / 65536.0;
  localparam real C16_32 = 16069.0 / 16384.0;

  logic signed [15:0] x, a1, a2, b1, b2;
  logic t1, t0;
  logic s0, s1, s2, s3, s4;

  w16_ccm u16 (.x(x), .s1(t1), .s0(t0), .o1(a1), .o2(a2));
  w32_ccm u32 (.x(x), .s0(s0), .s1(s1), .s2(s2), .s3(s3), .s4(s4), .o1(b1), .o2(b2));

  function automatic real rabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  // Variance of (out - coef*x) over NS random inputs for one output.
  // which: 0 = W16 o1, 1 = W16 o2, 2 = W32 o1, 3 = W32 o2
  task automatic measure(string nm, int which, real coef, real gain);
    real e, sum, sum2, var_m, var_p;
    sum = 0.0;
    sum2 = 0.0;
    for (int i = 0; i < NS; i++) begin
      x = 16'($urandom);
      #1;
      case (which)
        0: e = real'(a1) - coef * real'(x);
        1: e = real'(a2) - coef * real'(x);
        2: e = real'(b1) - coef * real'(x);
        default: e = real'(b2) - coef * real'(x);
      endcase
      sum += e;
      sum2 += e * e;
    end
    var_m = sum2 / NS - (sum / NS) * (sum / NS);
    var_p = gain / 12.0;
    checks++;
    if (rabs(var_m - var_p) > 0.1 * var_p) begin
      failures++;
      $display("FAIL %s: noise variance %f, model %f", nm, var_m, var_p);
    end else begin
      $display("%s: noise variance %f LSB^2, model %f", nm, var_m, var_p);
    end
    if (nm == "W16 sin(pi/4)") begin
      checks++;
      if (var_m >= (1.0 + 4.0 * $cos(PI / 8.0) ** 2) / 12.0) begin
        failures++;
        $display("FAIL %s: not below the opposite-order noise", nm);
      end
    end
  endtask

  initial begin
    real s16, c16;
    s16 = $sin(PI / 16.0);
    c16 = $cos(PI / 16.0);
    // W16
    t1 = 1'b0; t0 = 1'b0;
    measure("W16 cos(pi/8)", 0, C8_16, 1.0);
    measure("W16 sin(pi/8)", 1, S8_16, 1.0);
    t1 = 1'b0; t0 = 1'b1;
    measure("W16 sin(pi/4)", 0, 2.0 * C8_16 * S8_16, 1.0 + (2.0 * $sin(PI / 8.0)) ** 2);
    // W32, selects {s0, s1, s2, s3, s4}
    {s0, s1, s2, s3, s4} = 5'b00011;
    measure("W32 sin(pi/16)", 2, S16_32, 1.0);
    measure("W32 cos(pi/16)", 3, C16_32, 1.0);
    {s0, s1, s2, s3, s4} = 5'b10011;
    measure("W32 sin(pi/8)", 2, 2.0 * C16_32 * S16_32, 1.0 + (2.0 * s16) ** 2);
    measure("W32 cos(pi/8)", 3, C8_32, 1.0);
    {s0, s1, s2, s3, s4} = 5'b01111;
    measure("W32 sin(3pi/16)", 2, S16_32 * (2.0 * C8_32 + 1.0), 1.0 + (2.0 * s16) ** 2);
    measure("W32 cos(3pi/16)", 3, C16_32 * (2.0 * C8_32 - 1.0), 1.0 + (2.0 * c16) ** 2);
    {s0, s1, s2, s3, s4} = 5'b10110;
    measure("W32 sin(pi/4)", 2, 4.0 * C8_32 * C16_32 * S16_32,
            1.0 + (2.0 * s16) ** 2 + (4.0 * c16 * s16) ** 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
