// tb_twiddle_rotator: self-checking testbench of twiddle_rotator (N = 32,
// the default). Random complex inputs with every index k stream in at one
// sample per clock with gaps in in_valid. Each output must appear exactly
// one cycle after its input and match x * exp(-j*2*pi*k/32) within
// 3 LSB plus a relative 2**-10; for k = 0 the output must equal x exactly and
// for k = 8 exactly -j*x.
module tb_twiddle_rotator;
  int checks = 0;
  int failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam real PI = 3.14159265358979;
  localparam int N = 32;

  logic rst_n, in_valid, out_valid;
  logic signed [15:0] x_re, x_im;
  logic [4:0] k;
  logic signed [16:0] o_re, o_im;

  twiddle_rotator dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid),
                       .x_re(x_re), .x_im(x_im), .k(k), .out_valid(out_valid),
                       .o_re(o_re), .o_im(o_im));

  function automatic real rabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  // expectation of the sample sent in the previous cycle
  logic exp_valid;
  logic signed [15:0] e_re, e_im;
  logic [4:0] e_k;

  task automatic check_out();
    real th, ir, ii, tol;
    checks++;
    if (out_valid !== exp_valid) begin
      failures++;
      $display("FAIL out_valid=%0b expected %0b", out_valid, exp_valid);
    end
    if (exp_valid) begin
      th = 2.0 * PI * real'(e_k) / real'(N);
      ir = real'(e_re) * $cos(th) + real'(e_im) * $sin(th);
      ii = real'(e_im) * $cos(th) - real'(e_re) * $sin(th);
      tol = 3.0 + (rabs(real'(e_re)) + rabs(real'(e_im))) / 1024.0;
      checks++;
      if (rabs(real'(o_re) - ir) > tol || rabs(real'(o_im) - ii) > tol) begin
        failures++;
        $display("FAIL x=(%0d,%0d) k=%0d: o=(%0d,%0d) ideal (%f,%f)",
                 e_re, e_im, e_k, o_re, o_im, ir, ii);
      end
      if (e_k == 5'd0) begin
        checks++;
        if (o_re != 17'(e_re) || o_im != 17'(e_im)) begin
          failures++;
          $display("FAIL k=0 not exact");
        end
      end
      if (e_k == 5'd8) begin
        checks++;
        if (o_re != 17'(e_im) || o_im != -17'(e_re)) begin
          failures++;
          $display("FAIL k=8 not exact");
        end
      end
    end
  endtask

  initial begin
    rst_n = 1'b0;
    in_valid = 1'b0;
    x_re = '0; x_im = '0; k = '0;
    exp_valid = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < 6000; i++) begin
      @(negedge clk);
      in_valid = ($urandom % 5) != 0;
      x_re = (i < 64) ? ((i % 2 == 0) ? 16'sh7fff : 16'sh8000) : 16'($urandom);
      x_im = (i < 64) ? ((i % 4 < 2) ? 16'sh8000 : 16'sh7fff) : 16'($urandom);
      k = 5'(i);
      @(posedge clk);
      #1;
      exp_valid = in_valid;
      e_re = x_re; e_im = x_im; e_k = k;
      check_out();
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
