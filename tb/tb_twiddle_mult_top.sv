// tb_twiddle_mult_top: end-to-end testbench of twiddle_mult_top at its
// default parameters. The W8, W16 and W32 rotators are driven at the same
// time with random complex samples, every twiddle index in turn, and random
// gaps in the valid inputs. Every output is compared, one cycle after its
// input, with x * exp(-j*2*pi*k/N) within 3 LSB plus a relative 2**-10.
// The testbench counts how often each mechanism of the design occurs: each
// reduced angle index m of each multiplier (m = 0 is the factor-1 bypass),
// the lane swap, the two output negations, and idle cycles; a mechanism that
// never occurs counts as a failure.
module tb_twiddle_mult_top;
  int checks = 0;
  int failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam real PI = 3.14159265358979;

  logic rst_n;
  logic v8, v16, v32, ov8, ov16, ov32;
  logic signed [15:0] xr8, xi8, xr16, xi16, xr32, xi32;
  logic [2:0] k8;
  logic [3:0] k16;
  logic [4:0] k32;
  logic signed [16:0] or8, oi8, or16, oi16, or32, oi32;

  twiddle_mult_top dut (
    .clk(clk), .rst_n(rst_n),
    .w8_in_valid(v8), .w8_x_re(xr8), .w8_x_im(xi8), .w8_k(k8),
    .w8_out_valid(ov8), .w8_o_re(or8), .w8_o_im(oi8),
    .w16_in_valid(v16), .w16_x_re(xr16), .w16_x_im(xi16), .w16_k(k16),
    .w16_out_valid(ov16), .w16_o_re(or16), .w16_o_im(oi16),
    .w32_in_valid(v32), .w32_x_re(xr32), .w32_x_im(xi32), .w32_k(k32),
    .w32_out_valid(ov32), .w32_o_re(or32), .w32_o_im(oi32)
  );

  function automatic real rabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  // mechanism counters, index 0/1/2 = W8/W16/W32
  int m_seen [3][5];
  int swap_seen [3];
  int neg1_seen [3];
  int neg2_seen [3];
  int idle_seen [3];

  task automatic check_one(string nm, int n, logic ov, logic ev,
                           logic signed [15:0] er, logic signed [15:0] ei,
                           int ek, logic signed [16:0] gr,
                           logic signed [16:0] gi);
    real th, ir, ii, tol;
    checks++;
    if (ov !== ev) begin
      failures++;
      $display("FAIL %s out_valid=%0b expected %0b", nm, ov, ev);
    end
    if (ev) begin
      th = 2.0 * PI * real'(ek) / real'(n);
      ir = real'(er) * $cos(th) + real'(ei) * $sin(th);
      ii = real'(ei) * $cos(th) - real'(er) * $sin(th);
      tol = 3.0 + (rabs(real'(er)) + rabs(real'(ei))) / 1024.0;
      checks++;
      if (rabs(real'(gr) - ir) > tol || rabs(real'(gi) - ii) > tol) begin
        failures++;
        $display("FAIL %s x=(%0d,%0d) k=%0d: o=(%0d,%0d) ideal (%f,%f)",
                 nm, er, ei, ek, gr, gi, ir, ii);
      end
    end
  endtask

  task automatic count(int idx, logic v, int m, logic sw, logic n1, logic n2);
    if (!v) begin
      idle_seen[idx]++;
    end else begin
      m_seen[idx][m]++;
      if (sw) swap_seen[idx]++;
      if (n1) neg1_seen[idx]++;
      if (n2) neg2_seen[idx]++;
    end
  endtask

  logic e8, e16, e32;
  logic signed [15:0] er8, ei8, er16, ei16, er32, ei32;
  int ek8, ek16, ek32;

  initial begin
    rst_n = 1'b0;
    {v8, v16, v32} = '0;
    {xr8, xi8, xr16, xi16, xr32, xi32} = '0;
    {k8, k16, k32} = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      v8  = ($urandom % 6) != 0;
      v16 = ($urandom % 6) != 0;
      v32 = ($urandom % 6) != 0;
      xr8  = 16'($urandom); xi8  = 16'($urandom);
      xr16 = 16'($urandom); xi16 = 16'($urandom);
      xr32 = 16'($urandom); xi32 = 16'($urandom);
      k8  = 3'($urandom);
      k16 = 4'(i);
      k32 = 5'(i * 7);
      #1;
      count(0, v8,  int'(dut.u_w8.m),  dut.u_w8.ctrl.swap,  dut.u_w8.ctrl.neg1,  dut.u_w8.ctrl.neg2);
      count(1, v16, int'(dut.u_w16.m), dut.u_w16.ctrl.swap, dut.u_w16.ctrl.neg1, dut.u_w16.ctrl.neg2);
      count(2, v32, int'(dut.u_w32.m), dut.u_w32.ctrl.swap, dut.u_w32.ctrl.neg1, dut.u_w32.ctrl.neg2);
      e8 = v8;   er8 = xr8;   ei8 = xi8;   ek8 = int'(k8);
      e16 = v16; er16 = xr16; ei16 = xi16; ek16 = int'(k16);
      e32 = v32; er32 = xr32; ei32 = xi32; ek32 = int'(k32);
      @(posedge clk);
      #1;
      check_one("W8",  8,  ov8,  e8,  er8,  ei8,  ek8,  or8,  oi8);
      check_one("W16", 16, ov16, e16, er16, ei16, ek16, or16, oi16);
      check_one("W32", 32, ov32, e32, er32, ei32, ek32, or32, oi32);
    end
    for (int idx = 0; idx < 3; idx++) begin
      int nm;
      nm = (idx == 0) ? 1 : (idx == 1) ? 2 : 4;
      for (int m = 0; m <= nm; m++) begin
        checks++;
        if (m_seen[idx][m] == 0) begin
          failures++;
          $display("FAIL rotator %0d: reduced index m=%0d never used", idx, m);
        end
      end
      checks += 4;
      if (swap_seen[idx] == 0) begin failures++; $display("FAIL rotator %0d: no swap", idx); end
      if (neg1_seen[idx] == 0) begin failures++; $display("FAIL rotator %0d: no negation of o1", idx); end
      if (neg2_seen[idx] == 0) begin failures++; $display("FAIL rotator %0d: no negation of o2", idx); end
      if (idle_seen[idx] == 0) begin failures++; $display("FAIL rotator %0d: no idle cycle", idx); end
      $display("rotator %0d: m counts %0d %0d %0d %0d %0d, swap %0d, neg1 %0d, neg2 %0d, idle %0d",
               idx, m_seen[idx][0], m_seen[idx][1], m_seen[idx][2], m_seen[idx][3],
               m_seen[idx][4], swap_seen[idx], neg1_seen[idx], neg2_seen[idx], idle_seen[idx]);
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
