// tb_const_mult: self-checking testbench of const_mult.
// Three instances with different constants and widths are driven with edge
// values and random inputs; every output is compared with the rounded
// product (x*COEF + 2**(FRAC-1)) >>> FRAC computed here in 64-bit integers.
module tb_const_mult;
  int checks = 0;
  int failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic signed [15:0] x16;
  logic signed [17:0] x18;
  logic signed [15:0] y_a;
  logic signed [17:0] y_b;
  logic signed [15:0] y_c;

  const_mult #(.WI(16), .WO(16), .COEF(2895),  .FRAC(12)) u_a (.x(x16), .y(y_a));
  const_mult #(.WI(18), .WO(18), .COEF(16069), .FRAC(14)) u_b (.x(x18), .y(y_b));
  const_mult #(.WI(18), .WO(16), .COEF(12783), .FRAC(16)) u_c (.x(x18), .y(y_c));

  function automatic longint rprod(longint x, longint c, int f);
    return (x * c + (longint'(1) <<< (f - 1))) >>> f;
  endfunction

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: x16=%0d x18=%0d got %0d expected %0d", what, x16, x18, got, exp);
    end
  endtask

  task automatic apply(logic signed [15:0] a, logic signed [17:0] b);
    x16 = a;
    x18 = b;
    #1;
    check("2895/2^12", longint'(y_a), rprod(longint'(a), 2895, 12));
    check("16069/2^14", longint'(y_b), rprod(longint'(b), 16069, 14));
    check("12783/2^16", longint'(y_c), rprod(longint'(b), 12783, 16));
  endtask

  initial begin
    apply(16'sd0, 18'sd0);
    apply(16'sd1, 18'sd1);
    apply(-16'sd1, -18'sd1);
    apply(16'sh7fff, 18'sh1ffff);
    apply(16'sh8000, 18'sh20000);
    for (int i = 0; i < 20000; i++) apply($urandom, $urandom);
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
