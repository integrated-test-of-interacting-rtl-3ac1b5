// tb_poly_system: self-checking test of the polynomial evaluator with its
// piggyback self-test.
//
// A cycle model written here from the documented behaviour (schedule table,
// piggyback truth table, mux tables, TPGR and MISR recurrences) runs beside the
// design; every clock the result register, done, the controller step, Q and
// the signature are compared with it. Scenarios:
//   normal mode   - random operands, y must equal a*x^3+b*x^2+c*x+d mod 256
//                   and done must come 5 clocks after start is taken;
//   piggyback     - test mode with port operands: done must come exactly twice
//                   as many controller steps later (10 clocks + the split IDLE
//                   step) and every register value must follow the model;
//   BIST          - TPGR-driven inputs with the MISR watching one bit per
//                   register plus done (test mode) or y (normal mode).
module tb_poly_system;
  import pb_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic bist = 1'b0, test_mode = 1'b0, misr_clr = 1'b0, start = 1'b0;
  word_t a, b, c, d, x, y;
  logic done, pb_q;
  logic [7:0] signature;
  poly_state_t ctl_state;
  int checks = 0, failures = 0;

  poly_system dut (.*);

  always #5 clk = ~clk;

  // ---------------- reference model ----------------
  localparam logic [6:0] TMS [0:5] = '{7'b00_0_00_0_0, 7'b00_0_00_0_0, 7'b01_0_00_1_0,
                                      7'b10_1_01_0_1, 7'b10_0_00_0_0, 7'b00_0_10_0_0};
  localparam logic [2:0] TRL [0:5] = '{3'b000, 3'b001, 3'b011, 3'b011, 3'b001, 3'b100};
  int         m_st;
  logic       m_q, m_done;
  word_t      m_r1, m_r2, m_ro;
  logic [40:0] m_pat;
  logic [7:0] m_sig;

  always @(posedge clk) begin
    logic [6:0] s;
    logic [2:0] l;
    logic       mask, st_i;
    word_t      ai, bi, ci, di, xi, ml, al, ar, mul, add;
    logic [7:0] obs;
    if (!rst_n) begin
      m_st = 0; m_q = 0; m_done = 0; m_r1 = 0; m_r2 = 0; m_ro = 0;
      m_pat = 41'd1; m_sig = 0;
    end else begin
      if (bist) {st_i, ai, bi, ci, di, xi} = m_pat;
      else      {st_i, ai, bi, ci, di, xi} = {start, a, b, c, d, x};
      mask = test_mode && !m_q;
      s = TMS[m_st] ^ {7{mask}};
      l = TRL[m_st] | {3{mask}};
      case (s[6:5]) 0: ml = ai; 1: ml = ci; 2: ml = m_r1; default: ml = m_r2; endcase
      al = s[4] ? m_r2 : m_r1;
      case (s[3:2]) 0: ar = bi; 1: ar = di; 2: ar = m_r2; default: ar = xi; endcase
      mul = 8'(ml * xi);
      add = 8'(al + ar);
      obs = test_mode ? {4'b0, m_done, m_ro[0], m_r2[0], m_r1[0]} : m_ro;
      // register updates
      if (l[0]) m_r1 = s[1] ? add : mul;
      if (l[1]) m_r2 = s[0] ? add : mul;
      if (l[2]) m_ro = add;
      if (!mask) begin
        if (m_st == 5) m_done = 1;
        else if (m_st == 0 && st_i) m_done = 0;
        m_st = (m_st == 0) ? (st_i ? 1 : 0) : (m_st == 5 ? 0 : m_st + 1);
      end
      m_q = mask;
      if (misr_clr) m_sig = 0;
      else if (bist) m_sig = {m_sig[6:0], m_sig[7] ^ m_sig[5] ^ m_sig[4] ^ m_sig[3]} ^ obs;
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
    check(y == m_ro && done == m_done && int'(ctl_state) == m_st && pb_q == m_q,
          "outputs follow model");
    check(signature == m_sig, "signature follows model");
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Start a computation and return the clocks spent outside IDLE.
  task automatic run(input bit tm, output int lat);
    test_mode = tm;
    {a, b, c, d, x} = 40'({$urandom, $urandom});
    start = 1'b1;
    do begin @(posedge clk); #1; end while (ctl_state == P_IDLE);
    start = 1'b0;
    lat = 1;
    while (ctl_state != P_IDLE) begin
      @(posedge clk);
      #1;
      if (ctl_state != P_IDLE) lat++;
    end
    check(done == 1'b1, "done raised on return to IDLE");
  endtask

  initial begin
    int lat;
    a = 0; b = 0; c = 0; d = 0; x = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < 30; i++) begin
      run(1'b0, lat);
      check(y == 8'(a*x*x*x + b*x*x + c*x + d), "polynomial value");
      check(lat == 5, "normal latency: 5 control steps");
      repeat ($urandom % 3) @(posedge clk);
      #1;
    end
    for (int i = 0; i < 30; i++) begin
      run(1'b1, lat);
      check(lat == 10, "test mode runs the 5 steps at half speed");
      repeat ($urandom % 3) @(posedge clk);
      #1;
    end
    test_mode = 1'b0;
    repeat (3) @(posedge clk);
    #1 bist = 1'b1; test_mode = 1'b1; misr_clr = 1'b1;
    @(posedge clk);
    #1 misr_clr = 1'b0;
    repeat (400) @(posedge clk);
    #1 test_mode = 1'b0;
    repeat (200) @(posedge clk);
    #1 check(signature != 0, "signature accumulated");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
