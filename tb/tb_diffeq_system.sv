// tb_diffeq_system: self-checking test of the differential equation solver
// with its piggyback self-test.
//
// A cycle model written here from the documented behaviour (schedule table
// with the loop branch, piggyback truth table, mux tables, TPGR and MISR
// recurrences) runs beside the design and every clock the outputs, done, the
// status line, the controller step, Q and the signature are compared with it.
// Scenarios: normal mode runs whose x, y, u must match the loop
//   do { x1 = x+dx; y1 = y+u*dx; u1 = u-3*x*u*dx-3*y*dx; } while (x1 < a)
// evaluated here (mod 256) and whose length must be 1 + 6 * iterations clocks;
// test-mode runs that must take exactly twice as many clocks; and BIST with
// TPGR-driven inputs and the MISR in both observation settings.
module tb_diffeq_system;
  import pb_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic bist = 1'b0, test_mode = 1'b0, misr_clr = 1'b0, start = 1'b0;
  word_t x_in, y_in, u_in, dx, a, x_out, y_out, u_out;
  logic done, pb_q, status_c;
  logic [23:0] signature;
  de_state_t ctl_state;
  int checks = 0, failures = 0;
  int loops_taken = 0;

  diffeq_system dut (.*);

  always #5 clk = ~clk;

  // ---------------- reference model ----------------
  // index 0 IDLE, 1 LOAD, 2..7 loop steps S1..S6
  localparam logic [11:0] TMS [0:7] = '{12'b0, 12'b0_000_00_0_0_0_1_1_1, 12'b0_000_00_0_0_0_0_0_0,
                                       12'b0_001_00_0_0_0_0_0_0, 12'b0_010_01_0_0_0_0_0_0,
                                       12'b0_011_01_0_0_0_0_0_0, 12'b0_100_10_1_1_0_0_0_0,
                                       12'b0_000_00_0_0_1_0_0_0};
  localparam logic [6:0]  TRL [0:7] = '{7'b0, 7'b0000111, 7'b0001001, 7'b1010000, 7'b0010000,
                                       7'b0100100, 7'b0001010, 7'b0000100};
  int          m_st;
  logic        m_q, m_done, m_c;
  word_t       m_x, m_y, m_u, m_t1, m_t2, m_t3;
  logic [40:0] m_pat;
  logic [23:0] m_sig;

  always @(posedge clk) begin
    logic [11:0] s;
    logic [6:0]  l;
    logic        mask, st_i, lt;
    word_t       xi, yi, ui, dxi, ai, ml, mr, mul, add, sub;
    logic [23:0] obs;
    if (!rst_n) begin
      m_st = 0; m_q = 0; m_done = 0; m_c = 0;
      m_x = 0; m_y = 0; m_u = 0; m_t1 = 0; m_t2 = 0; m_t3 = 0;
      m_pat = 41'd1; m_sig = 0;
    end else begin
      if (bist) {st_i, xi, yi, ui, dxi, ai} = m_pat;
      else      {st_i, xi, yi, ui, dxi, ai} = {start, x_in, y_in, u_in, dx, a};
      mask = test_mode && !m_q;
      s = TMS[m_st] ^ {12{mask}};
      l = TRL[m_st] | {7{mask}};
      case (s[10:8])
        0: ml = m_x;  1: ml = m_y;  2: ml = m_t2; 3: ml = m_u;
        4: ml = m_t1; 5: ml = m_t3; 6: ml = dxi;  default: ml = ai;
      endcase
      case (s[7:6]) 0: mr = 8'd3; 1: mr = dxi; 2: mr = m_t3; default: mr = m_u; endcase
      mul = 8'(ml * mr);
      add = 8'((s[5] ? m_y : m_x) + (s[4] ? m_t3 : dxi));
      sub = 8'(m_u - (s[3] ? m_t1 : m_t2));
      lt  = m_x < ai;
      obs = test_mode ? {16'b0, m_done, m_c, m_t3[0], m_t2[0], m_t1[0], m_u[0], m_y[0], m_x[0]}
                      : {m_x, m_y, m_u};
      if (!mask) begin
        if (m_st == 7 && !m_c) m_done = 1;
        else if (m_st == 0 && st_i) m_done = 0;
        if (m_st == 7 && m_c) loops_taken++;
        case (m_st)
          0: m_st = st_i ? 1 : 0;
          7: m_st = m_c ? 2 : 0;
          default: m_st = m_st + 1;
        endcase
      end
      if (l[0]) m_x = s[2] ? xi : add;
      if (l[1]) m_y = s[1] ? yi : add;
      if (l[2]) m_u = s[0] ? ui : sub;
      if (l[3]) m_t1 = s[11] ? add : mul;
      if (l[4]) m_t2 = mul;
      if (l[5]) m_t3 = mul;
      if (l[6]) m_c = lt;
      m_q = mask;
      if (misr_clr) m_sig = 0;
      else if (bist) m_sig = {m_sig[22:0], m_sig[23] ^ m_sig[22] ^ m_sig[21] ^ m_sig[16]} ^ obs;
      if (bist) m_pat = {m_pat[39:0], m_pat[40] ^ m_pat[37]};
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  always @(negedge clk) if (rst_n) begin
    check({x_out, y_out, u_out, done, status_c, pb_q} == {m_x, m_y, m_u, m_done, m_c, m_q}
          && int'(ctl_state) == m_st, "outputs follow model");
    check(signature == m_sig, "signature follows model");
  end

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Start a run and return the clocks spent outside IDLE.
  task automatic run(input bit tm, output int lat);
    test_mode = tm;
    x_in = 8'($urandom % 200); y_in = 8'($urandom); u_in = 8'($urandom);
    dx = 8'(1 + $urandom % 40);
    // In test mode the extra steps reload X from x_in, so the status bit seen
    // at the end of an iteration is x_in < a: a held operand set only leaves
    // the loop if a <= x_in.
    a = tm ? 8'($urandom % (int'(x_in) + 1)) : 8'($urandom % 200);
    start = 1'b1;
    do begin @(posedge clk); #1; end while (ctl_state == D_IDLE);
    start = 1'b0;
    lat = 1;
    while (ctl_state != D_IDLE) begin
      @(posedge clk);
      #1;
      if (ctl_state != D_IDLE) lat++;
    end
    check(done == 1'b1, "done raised on return to IDLE");
  endtask

  initial begin
    int lat, iters, lat_n;
    word_t ex, ey, eu, nx, ny, nu;
    x_in = 0; y_in = 0; u_in = 0; dx = 0; a = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < 60; i++) begin
      run(i[0], lat);
      ex = x_in; ey = y_in; eu = u_in; iters = 0;
      do begin
        nx = 8'(ex + dx);
        ny = 8'(ey + eu * dx);
        nu = 8'(eu - 3 * ex * eu * dx - 3 * ey * dx);
        ex = nx; ey = ny; eu = nu;
        iters++;
      end while (ex < a);
      lat_n = 1 + 6 * iters;
      if (!i[0]) begin
        check(x_out == ex && y_out == ey && u_out == eu, "solver result");
        check(lat == lat_n, "normal latency: load step + 6 steps per iteration");
      end else begin
        check(lat == 2 * lat_n, "test mode runs the schedule at half speed");
      end
      repeat ($urandom % 3) @(posedge clk);
      #1;
    end
    test_mode = 1'b0;
    repeat (3) @(posedge clk);
    #1 bist = 1'b1; test_mode = 1'b1; misr_clr = 1'b1;
    @(posedge clk);
    #1 misr_clr = 1'b0;
    repeat (600) @(posedge clk);
    #1 test_mode = 1'b0;
    repeat (300) @(posedge clk);
    #1 check(signature != 0, "signature accumulated");
    check(loops_taken > 0, "loop branch taken");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
