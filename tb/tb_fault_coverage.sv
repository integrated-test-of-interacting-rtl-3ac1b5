// tb_fault_coverage: controller-line fault experiment on both example systems.
//
// For every select line and every load line leaving each controller, a
// stuck-at-0 and a stuck-at-1 fault is injected (by forcing the line on its way
// into the piggyback FSM) and a BIST session of SESSION clocks is run from
// reset, twice:
//   piggyback - test_mode = 1, MISR on one bit per register plus done;
//   outputs   - test_mode = 0, MISR on the data outputs only, no extra steps
//               (the pair tested as it is, with nothing added at the
//               controller/datapath interface).
// A fault counts as detected when the signature at the end differs from the
// fault-free one; the first clock where the signature trace departs from the
// fault-free trace is recorded as the detection time.
// A fault that changes the controller's output in some step (stuck-at-v on a
// line that the fault-free controller drives to the other value at least once
// during the session) must be detected by the piggyback session. A line that
// never leaves v makes a stuck-at-v fault invisible at the controller outputs;
// such faults are counted apart. The outputs-only session is reported for
// comparison and must not detect more. The latest first-detection time of
// each scheme is printed. A second copy of each system observes the most
// significant instead of the least significant bit of every register; it
// must detect the same faults.
module tb_fault_coverage;
  import pb_pkg::*;
  localparam int SESSION = 1500;

  logic clk = 1'b0, rst_n = 1'b0;
  logic p_bist = 0, p_test_mode = 0, p_misr_clr = 0;
  logic d_bist = 0, d_test_mode = 0, d_misr_clr = 0;
  word_t p_y, d_x_out, d_y_out, d_u_out;
  logic p_done, p_pb_q, d_done, d_status_c, d_pb_q;
  logic [7:0] p_signature;
  logic [23:0] d_signature;
  poly_state_t p_state;
  de_state_t d_state;
  int checks = 0, failures = 0;

  // fault masks: a 1 in *_sa0 holds the line at 0, a 1 in *_sa1 at 1
  logic [POLY_M-1:0] pm_sa0 = '0, pm_sa1 = '0;
  logic [POLY_R-1:0] pr_sa0 = '0, pr_sa1 = '0;
  logic [DE_M-1:0]   dm_sa0 = '0, dm_sa1 = '0;
  logic [DE_R-1:0]   dr_sa0 = '0, dr_sa1 = '0;

  pb_top dut (
    .clk, .rst_n,
    .p_bist, .p_test_mode, .p_misr_clr, .p_a(8'd0), .p_b(8'd0), .p_c(8'd0), .p_d(8'd0),
    .p_x(8'd0), .p_start(1'b0), .p_y, .p_done, .p_signature, .p_state, .p_pb_q,
    .d_bist, .d_test_mode, .d_misr_clr, .d_x_in(8'd0), .d_y_in(8'd0), .d_u_in(8'd0),
    .d_dx(8'd0), .d_a(8'd0), .d_start(1'b0), .d_x_out, .d_y_out, .d_u_out, .d_done,
    .d_signature, .d_state, .d_status_c, .d_pb_q);

  // The same two systems observing the most significant bit of each register
  // instead of the least significant one.
  logic [7:0]  pm_signature;
  logic [23:0] dm_signature;
  poly_system #(.OBS_BIT(7)) u_poly_msb (
    .clk, .rst_n, .bist(p_bist), .test_mode(p_test_mode), .misr_clr(1'b0),
    .a(8'd0), .b(8'd0), .c(8'd0), .d(8'd0), .x(8'd0), .start(1'b0),
    .y(), .done(), .signature(pm_signature), .ctl_state(), .pb_q());
  diffeq_system #(.OBS_BIT(7)) u_diffeq_msb (
    .clk, .rst_n, .bist(d_bist), .test_mode(d_test_mode), .misr_clr(1'b0),
    .x_in(8'd0), .y_in(8'd0), .u_in(8'd0), .dx(8'd0), .a(8'd0), .start(1'b0),
    .x_out(), .y_out(), .u_out(), .done(), .signature(dm_signature), .ctl_state(),
    .status_c(), .pb_q());

  initial begin
    force u_poly_msb.u_pb.ms   = (u_poly_msb.ms   & ~pm_sa0) | pm_sa1;
    force u_poly_msb.u_pb.rl   = (u_poly_msb.rl   & ~pr_sa0) | pr_sa1;
    force u_diffeq_msb.u_pb.ms = (u_diffeq_msb.ms & ~dm_sa0) | dm_sa1;
    force u_diffeq_msb.u_pb.rl = (u_diffeq_msb.rl & ~dr_sa0) | dr_sa1;
    force dut.u_poly.u_pb.ms   = (dut.u_poly.ms   & ~pm_sa0) | pm_sa1;
    force dut.u_poly.u_pb.rl   = (dut.u_poly.rl   & ~pr_sa0) | pr_sa1;
    force dut.u_diffeq.u_pb.ms = (dut.u_diffeq.ms & ~dm_sa0) | dm_sa1;
    force dut.u_diffeq.u_pb.rl = (dut.u_diffeq.rl & ~dr_sa0) | dr_sa1;
  end

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // values each controller line took in the fault-free sessions
  logic [POLY_M+POLY_R-1:0] p_seen0 = '0, p_seen1 = '0;
  logic [DE_M+DE_R-1:0]     d_seen0 = '0, d_seen1 = '0;
  bit recording = 1'b0;
  always @(posedge clk) if (recording && rst_n) begin
    p_seen0 |= ~{dut.u_poly.rl, dut.u_poly.ms};
    p_seen1 |=  {dut.u_poly.rl, dut.u_poly.ms};
    d_seen0 |= ~{dut.u_diffeq.rl, dut.u_diffeq.ms};
    d_seen1 |=  {dut.u_diffeq.rl, dut.u_diffeq.ms};
  end

  logic [7:0]  p_gold [2][SESSION];
  logic [7:0]  pm_gold [2];
  logic [23:0] dm_gold [2];
  bit pm_det, dm_det;
  logic [23:0] d_gold [2][SESSION];

  // One session on both systems; records the trace or compares with it.
  task automatic session(input bit tm, input bit record,
                         output bit p_det, output bit d_det, output int p_t, output int d_t);
    rst_n = 1'b0;
    p_bist = 1'b0; d_bist = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    p_bist = 1'b1; d_bist = 1'b1; p_test_mode = tm; d_test_mode = tm;
    p_t = -1; d_t = -1;
    for (int i = 0; i < SESSION; i++) begin
      @(posedge clk);
      #1;
      if (record) begin
        p_gold[tm][i] = p_signature;
        d_gold[tm][i] = d_signature;
      end else begin
        if (p_t < 0 && p_signature != p_gold[tm][i]) p_t = i + 1;
        if (d_t < 0 && d_signature != d_gold[tm][i]) d_t = i + 1;
      end
    end
    if (record) begin
      pm_gold[tm] = pm_signature;
      dm_gold[tm] = dm_signature;
    end
    pm_det = !record && (pm_signature != pm_gold[tm]);
    dm_det = !record && (dm_signature != dm_gold[tm]);
    p_det = !record && (p_signature != p_gold[tm][SESSION-1]);
    d_det = !record && (d_signature != d_gold[tm][SESSION-1]);
  endtask

  initial begin
    bit pd, dd;
    int pt, dt;
    int n_p, n_d;                          // faults per system
    int det_pb_p, det_pb_d, det_out_p, det_out_d;
    int worst_pb, worst_out;
    int cfr_p, cfr_d, msb_p, msb_d;
    bit cfi;
    n_p = 2 * (POLY_M + POLY_R);
    n_d = 2 * (DE_M + DE_R);
    det_pb_p = 0; det_pb_d = 0; det_out_p = 0; det_out_d = 0;
    worst_pb = 0; worst_out = 0;
    recording = 1'b1;
    session(1'b1, 1'b1, pd, dd, pt, dt);
    session(1'b0, 1'b1, pd, dd, pt, dt);
    recording = 1'b0;
    cfr_p = 0; cfr_d = 0; msb_p = 0; msb_d = 0;
    for (int f = 0; f < n_d; f++) begin
      for (int tm = 1; tm >= 0; tm--) begin
        // fault number f: line f/2, value f%2; select lines first, then loads
        pm_sa0 = '0; pm_sa1 = '0; pr_sa0 = '0; pr_sa1 = '0;
        dm_sa0 = '0; dm_sa1 = '0; dr_sa0 = '0; dr_sa1 = '0;
        if (f < n_p) begin
          if (f / 2 < POLY_M) begin
            if (f % 2) pm_sa1[f/2] = 1'b1; else pm_sa0[f/2] = 1'b1;
          end else begin
            if (f % 2) pr_sa1[f/2 - POLY_M] = 1'b1; else pr_sa0[f/2 - POLY_M] = 1'b1;
          end
        end
        if (f / 2 < DE_M) begin
          if (f % 2) dm_sa1[f/2] = 1'b1; else dm_sa0[f/2] = 1'b1;
        end else begin
          if (f % 2) dr_sa1[f/2 - DE_M] = 1'b1; else dr_sa0[f/2 - DE_M] = 1'b1;
        end
        session(tm[0], 1'b0, pd, dd, pt, dt);
        if (tm == 1) begin
          if (f < n_p) begin
            cfi = (f % 2) ? p_seen0[f/2] : p_seen1[f/2];
            det_pb_p += int'(pd);
            if (cfi) begin
              check(pd, $sformatf("poly fault %0d detected by piggyback", f));
              check(pm_det, $sformatf("poly fault %0d detected by piggyback on MSBs", f));
            end else cfr_p++;
            msb_p += int'(pm_det);
            if (pt > worst_pb) worst_pb = pt;
          end
          cfi = (f % 2) ? d_seen0[f/2] : d_seen1[f/2];
          det_pb_d += int'(dd);
          if (cfi) begin
            check(dd, $sformatf("diffeq fault %0d detected by piggyback", f));
            check(dm_det, $sformatf("diffeq fault %0d detected by piggyback on MSBs", f));
          end else cfr_d++;
          msb_d += int'(dm_det);
          if (dt > worst_pb) worst_pb = dt;
        end else begin
          if (f < n_p) begin
            det_out_p += int'(pd);
            if (pd && pt > worst_out) worst_out = pt;
          end
          det_out_d += int'(dd);
          if (dd && dt > worst_out) worst_out = dt;
        end
      end
    end
    pm_sa0 = '0; pm_sa1 = '0; pr_sa0 = '0; pr_sa1 = '0;
    dm_sa0 = '0; dm_sa1 = '0; dr_sa0 = '0; dr_sa1 = '0;
    $display("poly   : %0d control-line faults (%0d invisible at the controller outputs), piggyback detects %0d, outputs-only detects %0d",
             n_p, cfr_p, det_pb_p, det_out_p);
    $display("diffeq : %0d control-line faults (%0d invisible at the controller outputs), piggyback detects %0d, outputs-only detects %0d",
             n_d, cfr_d, det_pb_d, det_out_d);
    $display("piggyback observing MSBs instead of LSBs detects %0d (poly) and %0d (diffeq)",
             msb_p, msb_d);
    $display("latest first detection: piggyback %0d clocks, outputs-only %0d clocks",
             worst_pb, worst_out);
    check(det_out_p <= det_pb_p && det_out_d <= det_pb_d, "piggyback detects at least as many");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
