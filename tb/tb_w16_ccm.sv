// tb_w16_ccm: self-checking testbench of w16_ccm.
// Each of the three select settings is applied to edge and random inputs.
// The expected outputs are built from the identities of the multiplier,
// quantising after every constant multiplication:
//   m=0: (x, 0)
//   m=1: (r(x*cos(pi/8)), r(x*sin(pi/8)))
//   m=2: both r(2*r(x*cos(pi/8)) * sin(pi/8))
// with the default coefficients 7568/8192 and 3135/8192 and r() rounding
// half up. Each result is also held against the exact real product.
module tb_w16_ccm;
  int checks = 0;
  int failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam real PI = 3.14159265358979;

  logic signed [15:0] x, o1, o2;
  logic s1, s0;

  w16_ccm dut (.x(x), .s1(s1), .s0(s0), .o1(o1), .o2(o2));

  function automatic real rabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  function automatic longint rprod(longint v, longint c, int f);
    return (v * c + (longint'(1) <<< (f - 1))) >>> f;
  endfunction

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

  task automatic apply(logic signed [15:0] v);
    longint xv, c, s, d;
    xv = longint'(v);
    x = v;
    s1 = 1'b1; s0 = 1'b0;
    #1;
    check("m0 o1", longint'(o1), xv);
    check("m0 o2", longint'(o2), 0);
    s1 = 1'b0; s0 = 1'b0;
    #1;
    c = rprod(xv, 7568, 13);
    s = rprod(xv, 3135, 13);
    check("m1 o1", longint'(o1), c);
    check("m1 o2", longint'(o2), s);
    near("m1 o1 accuracy", longint'(o1), $cos(PI / 8.0) * real'(v));
    near("m1 o2 accuracy", longint'(o2), $sin(PI / 8.0) * real'(v));
    s1 = 1'b0; s0 = 1'b1;
    #1;
    d = rprod(2 * c, 3135, 13);
    check("m2 o1", longint'(o1), d);
    check("m2 o2", longint'(o2), d);
    near("m2 o1 accuracy", longint'(o1), $sin(PI / 4.0) * real'(v));
  endtask

  initial begin
    apply(16'sd0);
    apply(16'sh7fff);
    apply(16'sh8000);
    apply(16'sd1);
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
