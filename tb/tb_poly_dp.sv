// tb_poly_dp: self-checking test of the polynomial datapath.
//
// Applies random select words, load words and operands every clock and checks
// R1, R2 and RO after each edge against a register-transfer model written from
// the mux tables (multiplier left {a, c, R1, R2} times x; adder {R1, R2} plus
// {b, d, R2, x}; R1/R2 from multiplier or adder; RO from the adder). Then runs
// the five-step schedule by hand and checks a*x^3 + b*x^2 + c*x + d mod 256.
module tb_poly_dp;
  import pb_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  poly_ms_t ms;
  poly_rl_t rl;
  word_t a, b, c, d, x, r1, r2, ro;
  word_t m1, m2, mo, ml, al, ar, mul, add;
  int checks = 0, failures = 0;

  poly_dp dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t: r1=%h/%h r2=%h/%h ro=%h/%h", what, $time, r1, m1, r2, m2, ro, mo);
    end
  endtask

  task automatic apply(input poly_ms_t s, input poly_rl_t l);
    ms = s; rl = l;
    #1;
    ml = (s.mul_l == 0) ? a : (s.mul_l == 1) ? c : (s.mul_l == 2) ? m1 : m2;
    al = s.add_l ? m2 : m1;
    ar = (s.add_r == 0) ? b : (s.add_r == 1) ? d : (s.add_r == 2) ? m2 : x;
    mul = 8'((16'(ml) * 16'(x)) & 16'hFF);
    add = 8'(al + ar);
    @(posedge clk);
    if (l.r1) m1 = s.r1_src ? add : mul;
    if (l.r2) m2 = s.r2_src ? add : mul;
    if (l.ro) mo = add;
    #1 check(r1 == m1 && r2 == m2 && ro == mo, "register transfer");
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    poly_ms_t s;
    poly_rl_t l;
    word_t expect_y;
    ms = '0; rl = '0; a = 0; b = 0; c = 0; d = 0; x = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    m1 = 0; m2 = 0; mo = 0;
    #1 check(r1 == 0 && r2 == 0 && ro == 0, "reset");
    for (int i = 0; i < 300; i++) begin
      {a, b, c, d, x} = 40'({$urandom, $urandom});
      apply(poly_ms_t'($urandom), poly_rl_t'($urandom));
    end
    for (int i = 0; i < 50; i++) begin
      {a, b, c, d, x} = 40'({$urandom, $urandom});
      s = '0; l = '0; s.mul_l = 0; l.r1 = 1;                                   apply(s, l);
      s = '0; l = '0; s.mul_l = 1; s.add_r = 0; s.r1_src = 1; l.r1 = 1; l.r2 = 1; apply(s, l);
      s = '0; l = '0; s.mul_l = 2; s.add_l = 1; s.add_r = 1; s.r2_src = 1; l.r1 = 1; l.r2 = 1; apply(s, l);
      s = '0; l = '0; s.mul_l = 2; l.r1 = 1;                                   apply(s, l);
      s = '0; l = '0; s.add_r = 2; l.ro = 1;                                   apply(s, l);
      expect_y = 8'(a*x*x*x + b*x*x + c*x + d);
      check(ro == expect_y, "polynomial value");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
