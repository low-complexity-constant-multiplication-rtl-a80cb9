// tb_twiddle_ctrl: self-checking testbench of twiddle_ctrl.
// For N = 8, 16 and 32 and every index k, the decoded control is applied to
// the exact factors the constant multiplier delivers for the reduced index m
// (o1/o2 = cos/sin of 2*pi*m/N; the W32 multiplier puts sine on o1 and cosine
// on o2 for m > 0). After the decoded negations and swap, lane 1 must hold
// cos(2*pi*k/N) and lane 2 sin(2*pi*k/N). The select words are also compared
// with the multipliers' select tables and m must lie in 0..N/8.
module tb_twiddle_ctrl;
  import twiddle_pkg::*;
  int checks = 0;
  int failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam real PI = 3.14159265358979;

  logic [2:0] k8;
  logic [3:0] k16;
  logic [4:0] k32;
  logic [2:0] m8;
  logic [3:0] m16;
  logic [4:0] m32;
  rot_ctrl_t c8, c16, c32;

  twiddle_ctrl #(.N(8))  u8  (.k(k8),  .m(m8),  .ctrl(c8));
  twiddle_ctrl #(.N(16)) u16 (.k(k16), .m(m16), .ctrl(c16));
  twiddle_ctrl #(.N(32)) u32 (.k(k32), .m(m32), .ctrl(c32));

  function automatic real rabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  task automatic check_bit(string what, int k, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s k=%0d: got %0b expected %0b", what, k, got, exp);
    end
  endtask

  // Apply control c to the factors for index m of an N-point multiplier.
  task automatic check_lanes(int n, int k, int m, rot_ctrl_t c);
    real alpha, f1, f2, n1, n2, l1, l2, theta;
    alpha = 2.0 * PI * real'(m) / real'(n);
    if (n == 32 && m != 0) begin
      f1 = $sin(alpha); f2 = $cos(alpha);
    end else begin
      f1 = $cos(alpha); f2 = $sin(alpha);
    end
    n1 = c.neg1 ? -f1 : f1;
    n2 = c.neg2 ? -f2 : f2;
    l1 = c.swap ? n2 : n1;
    l2 = c.swap ? n1 : n2;
    theta = 2.0 * PI * real'(k) / real'(n);
    checks++;
    if (rabs(l1 - $cos(theta)) > 1e-9 || rabs(l2 - $sin(theta)) > 1e-9) begin
      failures++;
      $display("FAIL N=%0d k=%0d m=%0d: lanes %f %f expected %f %f",
               n, k, m, l1, l2, $cos(theta), $sin(theta));
    end
    checks++;
    if (m < 0 || m > n / 8) begin
      failures++;
      $display("FAIL N=%0d k=%0d: m=%0d out of range", n, k, m);
    end
  endtask

  initial begin
    logic [4:0] exp_sel;
    for (int k = 0; k < 8; k++) begin
      k8 = 3'(k); #1;
      check_lanes(8, k, int'(m8), c8);
      check_bit("W8 s0", k, c8.sel.s0, (m8 == 3'd1));
    end
    for (int k = 0; k < 16; k++) begin
      k16 = 4'(k); #1;
      check_lanes(16, k, int'(m16), c16);
      check_bit("W16 s1", k, c16.sel.s1, (m16 == 4'd0));
      check_bit("W16 s0", k, c16.sel.s0, (m16 == 4'd2));
    end
    for (int k = 0; k < 32; k++) begin
      k32 = 5'(k); #1;
      check_lanes(32, k, int'(m32), c32);
      // {s0, s1, s2, s3, s4} per m
      case (m32)
        5'd0: exp_sel = 5'b10001;
        5'd1: exp_sel = 5'b00011;
        5'd2: exp_sel = 5'b10011;
        5'd3: exp_sel = 5'b01111;
        default: exp_sel = 5'b10110;
      endcase
      checks++;
      if ({c32.sel.s0, c32.sel.s1, c32.sel.s2, c32.sel.s3, c32.sel.s4} !== exp_sel) begin
        failures++;
        $display("FAIL W32 selects k=%0d m=%0d", k, m32);
      end
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
