// tb_diffeq_ctrl: self-checking test of the differential-equation controller.
//
// Checks IDLE -> LOAD -> S1..S6, the select/load word of each step against
// 12-bit MS and 7-bit RL constants listed here, the loop back from S6 to S1
// while the status line is 1, the exit to IDLE with done when it is 0, and that
// the controller holds its step while the advance enable is low. Each run uses
// a random number of loop iterations; the number of enabled clocks from start
// to done must be 1 + 6 * iterations.
module tb_diffeq_ctrl;
  import pb_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b1, start = 1'b0, c = 1'b0;
  de_ms_t ms;
  de_rl_t rl;
  logic done;
  de_state_t state;
  int checks = 0, failures = 0;

  // MS = {t1_src, mul_l[3], mul_r[2], add_l, add_r, sub_r, x_src, y_src, u_src}
  // RL = {c, t3, t2, t1, u, y, x}; index 0 is LOAD, 1..6 the loop steps.
  localparam logic [11:0] EMS [0:6] = '{12'b0_000_00_0_0_0_1_1_1, 12'b0_000_00_0_0_0_0_0_0,
                                       12'b0_001_00_0_0_0_0_0_0, 12'b0_010_01_0_0_0_0_0_0,
                                       12'b0_011_01_0_0_0_0_0_0, 12'b0_100_10_1_1_0_0_0_0,
                                       12'b0_000_00_0_0_1_0_0_0};
  localparam logic [6:0]  ERL [0:6] = '{7'b0000111, 7'b0001001, 7'b1010000, 7'b0010000,
                                       7'b0100100, 7'b0001010, 7'b0000100};

  diffeq_ctrl dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t state=%0d ms=%b rl=%b", what, $time, state, ms, rl);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int step, enabled, iters, it;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    #1 check(state == D_IDLE && done == 0 && rl == '0, "reset to idle");
    for (int run = 0; run < 30; run++) begin
      iters = 1 + ($urandom % 4);
      start = 1'b1; en = 1'b1;
      @(posedge clk);
      #1 start = 1'b0;
      check(done == 0, "done cleared by start");
      enabled = 0; step = 0; it = 1;
      while (!(step == 7)) begin
        check(int'(state) == step + 1, "step order");
        check(ms == EMS[step] && rl == ERL[step], "control word");
        c = (it < iters);
        en = (run < 3) ? 1'b1 : 1'($urandom);
        @(posedge clk);
        #1;
        if (en) begin
          enabled++;
          if (step == 6) begin
            if (c) begin step = 1; it++; end
            else step = 7;
          end else step++;
        end
      end
      check(enabled == 1 + 6 * iters, "loop length");
      check(state == D_IDLE && done == 1, "done after loop exit");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
