// tb_w32_ccm: self-checking testbench of w32_ccm.
// The five valid select words are applied to edge and random inputs. The
// expected outputs are built from the trigonometric identities, quantising
// after every constant multiplication (r() = round half up, coefficients
// C8 = 60547/2^16, S16 = 12783/2^16, C16 = 16069/2^14):
//   m=0: o1 = x,                     o2 = 0
//   m=1: o1 = r(x*S16),              o2 = r(x*C16)
//   m=2: o1 = r(2 r(x*C16) * S16),   o2 = r(x*C8)
//   m=3: o1 = r((2 r(x*C8) + x)*S16), o2 = r((2 r(x*C8) - x)*C16)
//   m=4: o1 = o2 = r(2 r(2 r(x*C8) * C16) * S16)
// and every output is also held against the exact real product.
module tb_w32_ccm;
  int checks = 0;
  int failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam real PI = 3.14159265358979;

  logic signed [15:0] x, o1, o2;
  logic s0, s1, s2, s3, s4;

  w32_ccm dut (.x(x), .s0(s0), .s1(s1), .s2(s2), .s3(s3), .s4(s4),
               .o1(o1), .o2(o2));

  function automatic real rabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  function automatic longint rprod(longint v, longint c, int f);
    return (v * c + (longint'(1) <<< (f - 1))) >>> f;
  endfunction
  function automatic longint rc8(longint v);  return rprod(v, 60547, 16); endfunction
  function automatic longint rs16(longint v); return rprod(v, 12783, 16); endfunction
  function automatic longint rc16(longint v); return rprod(v, 16069, 14); endfunction

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: x=%0d got %0d expected %0d", what, x, got, exp);
    end
  endtask

  task automatic near(string what, longint got, real ideal);
    checks++;
    if (rabs(real'(got) - ideal) > 2.0 + rabs(ideal) / 2048.0) begin
      failures++;
      $display("FAIL %s: x=%0d got %0d ideal %f", what, x, got, ideal);
    end
  endtask

  task automatic sel(logic [4:0] s);   // {s0, s1, s2, s3, s4} as in the table
    {s0, s1, s2, s3, s4} = s;
    #1;
  endtask

  task automatic apply(logic signed [15:0] v);
    longint xv, c8;
    real xr;
    xv = longint'(v);
    xr = real'(v);
    x = v;
    c8 = rc8(xv);
    sel(5'b10001);
    check("m0 o1", longint'(o1), xv);
    check("m0 o2", longint'(o2), 0);
    sel(5'b00011);
    check("m1 o1", longint'(o1), rs16(xv));
    check("m1 o2", longint'(o2), rc16(xv));
    near("m1 sin", longint'(o1), $sin(PI / 16.0) * xr);
    near("m1 cos", longint'(o2), $cos(PI / 16.0) * xr);
    sel(5'b10011);
    check("m2 o1", longint'(o1), rs16(2 * rc16(xv)));
    check("m2 o2", longint'(o2), c8);
    near("m2 sin", longint'(o1), $sin(PI / 8.0) * xr);
    near("m2 cos", longint'(o2), $cos(PI / 8.0) * xr);
    sel(5'b01111);
    check("m3 o1", longint'(o1), rs16(2 * c8 + xv));
    check("m3 o2", longint'(o2), rc16(2 * c8 - xv));
    near("m3 sin", longint'(o1), $sin(3.0 * PI / 16.0) * xr);
    near("m3 cos", longint'(o2), $cos(3.0 * PI / 16.0) * xr);
    sel(5'b10110);
    check("m4 o1", longint'(o1), rs16(2 * rc16(2 * c8)));
    check("m4 o2", longint'(o2), rs16(2 * rc16(2 * c8)));
    near("m4 sin", longint'(o1), $sin(PI / 4.0) * xr);
  endtask

  initial begin
    apply(16'sd0);
    apply(16'sh7fff);
    apply(16'sh8000);
    apply(16'sd1);
    apply(-16'sd1);
    for (int i = 0; i < 5000; i++) apply($urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
