// tb_pb_top: end-to-end test of both example systems at their default sizes.
//
// For each system it runs, in order: normal computations checked against the
// arithmetic worked out here; piggyback test-mode runs with held operands,
// which must take exactly twice the clocks of the same schedule in normal mode;
// a piggyback BIST session (TPGR inputs, MISR on one bit per register plus
// done); and a BIST session observing the data outputs. Each BIST session is
// run twice from reset and must give the same non-zero signature, and the two
// observation settings must give different signatures.
// It counts how often each mechanism of the scheme occurred and fails any that
// never did: complemented/forced extra steps, controller holds, completed
// normal and test-mode runs, loop iterations taken on the status line, loop
// exits, MISR compaction in both settings, TPGR-started runs.
module tb_pb_top;
  import pb_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic p_bist = 0, p_test_mode = 0, p_misr_clr = 0, p_start = 0;
  word_t p_a = 0, p_b = 0, p_c = 0, p_d = 0, p_x = 0, p_y;
  logic p_done, p_pb_q;
  logic [7:0] p_signature;
  poly_state_t p_state;
  logic d_bist = 0, d_test_mode = 0, d_misr_clr = 0, d_start = 0;
  word_t d_x_in = 0, d_y_in = 0, d_u_in = 0, d_dx = 0, d_a = 0, d_x_out, d_y_out, d_u_out;
  logic d_done, d_status_c, d_pb_q;
  logic [23:0] d_signature;
  de_state_t d_state;
  int checks = 0, failures = 0;

  // mechanism counters
  int n_extra_step = 0, n_ctl_hold = 0, n_loop_back = 0, n_loop_exit = 0;
  int n_misr_regbits = 0, n_misr_outputs = 0, n_bist_runs = 0;
  int n_normal_runs = 0, n_test_runs = 0;

  pb_top dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (p_test_mode && !p_pb_q) begin n_extra_step++; n_ctl_hold++; end
    if (d_test_mode && !d_pb_q) begin n_extra_step++; n_ctl_hold++; end
    if (d_state == D_S6 && !(d_test_mode && !d_pb_q)) begin
      if (d_status_c) n_loop_back++; else n_loop_exit++;
    end
    if (p_bist && p_test_mode) n_misr_regbits++;
    if (d_bist && d_test_mode) n_misr_regbits++;
    if (p_bist && !p_test_mode) n_misr_outputs++;
    if (d_bist && !d_test_mode) n_misr_outputs++;
    if (p_bist && p_state == P_S5 && !(p_test_mode && !p_pb_q)) n_bist_runs++;
    if (d_bist && d_state == D_LOAD && !(d_test_mode && !d_pb_q)) n_bist_runs++;
  end

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic poly_run(input bit tm, output int lat);
    p_test_mode = tm;
    p_start = 1'b1;
    do begin @(posedge clk); #1; end while (p_state == P_IDLE);
    p_start = 1'b0;
    lat = 1;
    while (p_state != P_IDLE) begin
      @(posedge clk);
      #1;
      if (p_state != P_IDLE) lat++;
    end
    check(p_done, "poly done");
  endtask

  task automatic diffeq_run(input bit tm, output int lat);
    d_test_mode = tm;
    d_start = 1'b1;
    do begin @(posedge clk); #1; end while (d_state == D_IDLE);
    d_start = 1'b0;
    lat = 1;
    while (d_state != D_IDLE) begin
      @(posedge clk);
      #1;
      if (d_state != D_IDLE) lat++;
    end
    check(d_done, "diffeq done");
  endtask

  task automatic do_reset();
    rst_n = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
  endtask

  // Runs a BIST session of n clocks on both systems from reset.
  task automatic bist_session(input bit tm, input int n, output logic [7:0] ps,
                              output logic [23:0] ds);
    do_reset();
    p_bist = 1'b1; d_bist = 1'b1; p_test_mode = tm; d_test_mode = tm;
    repeat (n) @(posedge clk);
    #1;
    ps = p_signature; ds = d_signature;
    p_bist = 1'b0; d_bist = 1'b0; p_test_mode = 1'b0; d_test_mode = 1'b0;
  endtask

  initial begin
    int lat, lat2, iters;
    word_t ex, ey, eu, nx, ny, nu;
    logic [7:0]  ps1, ps2, ps3;
    logic [23:0] ds1, ds2, ds3;
    do_reset();
    // ---- polynomial: normal and piggyback runs ----
    for (int i = 0; i < 20; i++) begin
      {p_a, p_b, p_c, p_d, p_x} = 40'({$urandom, $urandom});
      poly_run(1'b0, lat);
      n_normal_runs++;
      check(p_y == 8'(p_a*p_x*p_x*p_x + p_b*p_x*p_x + p_c*p_x + p_d), "polynomial value");
      check(lat == 5, "polynomial schedule is five control steps");
      poly_run(1'b1, lat2);
      n_test_runs++;
      check(lat2 == 2 * lat, "piggyback halves the schedule speed (poly)");
    end
    // ---- differential equation solver ----
    for (int i = 0; i < 20; i++) begin
      d_x_in = 8'($urandom % 200); d_y_in = 8'($urandom); d_u_in = 8'($urandom);
      d_dx = 8'(1 + $urandom % 40);
      d_a = (i % 2 == 0) ? 8'($urandom % 256) : 8'($urandom % (int'(d_x_in) + 1));
      diffeq_run(1'b0, lat);
      n_normal_runs++;
      ex = d_x_in; ey = d_y_in; eu = d_u_in; iters = 0;
      do begin
        nx = 8'(ex + d_dx);
        ny = 8'(ey + eu * d_dx);
        nu = 8'(eu - 3 * ex * eu * d_dx - 3 * ey * d_dx);
        ex = nx; ey = ny; eu = nu;
        iters++;
      end while (ex < d_a);
      check(d_x_out == ex && d_y_out == ey && d_u_out == eu, "solver result");
      check(lat == 1 + 6 * iters, "solver schedule length");
      if (d_a <= d_x_in) begin
        // held operands only leave the test-mode loop when a <= x_in
        diffeq_run(1'b1, lat2);
        n_test_runs++;
        check(lat2 == 2 * lat, "piggyback halves the schedule speed (diffeq)");
      end
    end
    // ---- BIST sessions ----
    bist_session(1'b1, 2000, ps1, ds1);
    bist_session(1'b1, 2000, ps2, ds2);
    check(ps1 == ps2 && ds1 == ds2, "piggyback signatures repeatable");
    check(ps1 != 0 && ds1 != 0, "piggyback signatures non-zero");
    bist_session(1'b0, 2000, ps3, ds3);
    check(ps3 != ps1 || ds3 != ds1, "observation settings give different signatures");
    bist_session(1'b0, 2000, ps2, ds2);
    check(ps2 == ps3 && ds2 == ds3, "output signatures repeatable");

    $display("mechanisms: extra_step=%0d ctl_hold=%0d loop_back=%0d loop_exit=%0d",
             n_extra_step, n_ctl_hold, n_loop_back, n_loop_exit);
    $display("mechanisms: misr_regbits=%0d misr_outputs=%0d bist_runs=%0d normal=%0d test=%0d",
             n_misr_regbits, n_misr_outputs, n_bist_runs, n_normal_runs, n_test_runs);
    check(n_extra_step > 0, "extra complemented step happened");
    check(n_ctl_hold > 0, "controller hold happened");
    check(n_loop_back > 0, "loop iteration on status happened");
    check(n_loop_exit > 0, "loop exit happened");
    check(n_misr_regbits > 0, "register-bit compaction happened");
    check(n_misr_outputs > 0, "output compaction happened");
    check(n_bist_runs > 0, "TPGR-started runs happened");
    check(n_normal_runs > 0 && n_test_runs > 0, "normal and test-mode runs happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
