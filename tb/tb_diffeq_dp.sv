// tb_diffeq_dp: self-checking test of the differential-equation datapath.
//
// Applies random select and load words and operands every clock and checks all
// seven registers after each edge against a register-transfer model written
// from the mux tables. Then runs load step plus loop body by hand for random
// operands and checks x, y, u and the status bit against the loop equations
// x1 = x + dx, y1 = y + u*dx, u1 = u - 3*x*u*dx - 3*y*dx, c = x1 < a (mod 256).
module tb_diffeq_dp;
  import pb_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  de_ms_t ms;
  de_rl_t rl;
  word_t x_in, y_in, u_in, dx, a, x, y, u, t1, t2, t3;
  logic  c;
  word_t mx, my, mu, m1, m2, m3;
  logic  mc;
  int checks = 0, failures = 0;

  diffeq_dp dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic apply(input de_ms_t s, input de_rl_t l);
    word_t ml, mr, mul, add, sub;
    logic  lt;
    ms = s; rl = l;
    #1;
    case (s.mul_l)
      0: ml = mx;  1: ml = my;  2: ml = m2; 3: ml = mu;
      4: ml = m1;  5: ml = m3;  6: ml = dx; default: ml = a;
    endcase
    case (s.mul_r)
      0: mr = 8'd3; 1: mr = dx; 2: mr = m3; default: mr = mu;
    endcase
    mul = 8'((16'(ml) * 16'(mr)) & 16'hFF);
    add = 8'((s.add_l ? my : mx) + (s.add_r ? m3 : dx));
    sub = 8'(mu - (s.sub_r ? m1 : m2));
    lt  = (mx < a);
    @(posedge clk);
    if (l.x)  mx = s.x_src ? x_in : add;
    if (l.y)  my = s.y_src ? y_in : add;
    if (l.u)  mu = s.u_src ? u_in : sub;
    if (l.t1) m1 = s.t1_src ? add : mul;
    if (l.t2) m2 = mul;
    if (l.t3) m3 = mul;
    if (l.c)  mc = lt;
    #1 check({x, y, u, t1, t2, t3, c} == {mx, my, mu, m1, m2, m3, mc}, "register transfer");
  endtask

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    de_ms_t s;
    de_rl_t l;
    word_t ex, ey, eu;
    ms = '0; rl = '0; {x_in, y_in, u_in, dx, a} = '0;
    mx = 0; my = 0; mu = 0; m1 = 0; m2 = 0; m3 = 0; mc = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 400; i++) begin
      {x_in, y_in, u_in, dx, a} = 40'({$urandom, $urandom});
      apply(de_ms_t'($urandom), de_rl_t'($urandom));
    end
    for (int i = 0; i < 50; i++) begin
      {x_in, y_in, u_in, dx, a} = 40'({$urandom, $urandom});
      if (i % 3 == 0) a = 8'(x_in + dx);        // boundary: x1 == a must exit
      if (i % 3 == 1) a = 8'(x_in + dx + 1);    // boundary: x1 == a - 1 loops
      s = '0; l = '0; s.x_src = 1; s.y_src = 1; s.u_src = 1; l.x = 1; l.y = 1; l.u = 1; apply(s, l);
      s = '0; l = '0; s.mul_l = 0; s.mul_r = 0; l.t1 = 1; l.x = 1;                   apply(s, l);
      s = '0; l = '0; s.mul_l = 1; s.mul_r = 0; l.t2 = 1; l.c = 1;                   apply(s, l);
      s = '0; l = '0; s.mul_l = 2; s.mul_r = 1; l.t2 = 1;                            apply(s, l);
      s = '0; l = '0; s.mul_l = 3; s.mul_r = 1; l.t3 = 1; l.u = 1;                   apply(s, l);
      s = '0; l = '0; s.mul_l = 4; s.mul_r = 2; l.t1 = 1; s.add_l = 1; s.add_r = 1; l.y = 1; apply(s, l);
      s = '0; l = '0; s.sub_r = 1; l.u = 1;                                          apply(s, l);
      ex = 8'(x_in + dx);
      ey = 8'(y_in + u_in * dx);
      eu = 8'(u_in - 3 * x_in * u_in * dx - 3 * y_in * dx);
      check(x == ex && y == ey && u == eu, "loop equations");
      check(c == (ex < a), "status x1 < a");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
