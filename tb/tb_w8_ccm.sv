// tb_w8_ccm: self-checking testbench of w8_ccm.
// For s0 = 0 the outputs must be (x, 0); for s0 = 1 both outputs must equal
// round(x*2896/4096), and lie within rounding plus coefficient error of
// sin(pi/4)*x (2 LSB plus a relative 2**-11).
module tb_w8_ccm;
  int checks = 0;
  int failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic signed [15:0] x, o1, o2;
  logic s0;

  w8_ccm dut (.x(x), .s0(s0), .o1(o1), .o2(o2));

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
      $display("FAIL %s: x=%0d s0=%0d got %0d expected %0d", what, x, s0, got, exp);
    end
  endtask

  task automatic apply(logic signed [15:0] v);
    real ideal;
    x = v;
    s0 = 1'b0;
    #1;
    check("o1 factor 1", longint'(o1), longint'(v));
    check("o2 factor 1", longint'(o2), 0);
    s0 = 1'b1;
    #1;
    check("o1 sin(pi/4)", longint'(o1), rprod(longint'(v), 2896, 12));
    check("o2 sin(pi/4)", longint'(o2), rprod(longint'(v), 2896, 12));
    ideal = $sin(3.14159265358979 / 4.0) * real'(v);
    checks++;
    if (rabs(real'(o1) - ideal) > 2.0 + rabs(ideal) / 2048.0) begin
      failures++;
      $display("FAIL accuracy: x=%0d o1=%0d ideal %f", v, o1, ideal);
    end
  endtask

  initial begin
    apply(16'sd0);
    apply(16'sh7fff);
    apply(16'sh8000);
    apply(-16'sd3);
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
