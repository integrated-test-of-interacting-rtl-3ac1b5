// tb_poly_ctrl: self-checking test of the polynomial controller.
//
// Checks that the controller waits in IDLE with all loads 0, takes start, emits
// for each of the five steps the select/load word of the schedule (listed here
// as expected 7-bit MS and 3-bit RL constants), returns to IDLE, sets done at
// the end of the fifth step and clears it on the next start. The advance enable
// is toggled randomly: the controller must hold its step while en is low, and a
// run must take exactly five enabled clocks.
module tb_poly_ctrl;
  import pb_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b1, start = 1'b0;
  poly_ms_t ms;
  poly_rl_t rl;
  logic done;
  poly_state_t state;
  int checks = 0, failures = 0;

  // Expected {mul_l, add_l, add_r, r1_src, r2_src} and {ro, r2, r1} per step.
  localparam logic [6:0] EMS [1:5] = '{7'b00_0_00_0_0, 7'b01_0_00_1_0, 7'b10_1_01_0_1,
                                      7'b10_0_00_0_0, 7'b00_0_10_0_0};
  localparam logic [2:0] ERL [1:5] = '{3'b001, 3'b011, 3'b011, 3'b001, 3'b100};

  poly_ctrl dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t state=%0d ms=%b rl=%b", what, $time, state, ms, rl);
    end
  endtask

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int step, enabled;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    #1 check(state == P_IDLE && done == 0 && rl == '0, "reset to idle");
    repeat (3) @(posedge clk);
    #1 check(state == P_IDLE && rl == '0, "idle without start");
    for (int run = 0; run < 40; run++) begin
      start = 1'b1; en = 1'b1;
      @(posedge clk);
      #1 start = 1'b0;
      check(done == 0, "done cleared by start");
      step = 1; enabled = 0;
      while (step <= 5) begin
        check(int'(state) == step, "step order");
        check(ms == EMS[step] && rl == ERL[step], "control word");
        check(done == 0, "done low while running");
        en = (run < 5) ? 1'b1 : 1'($urandom);
        @(posedge clk);
        #1;
        if (en) begin step++; enabled++; end
      end
      check(enabled == 5, "five control steps");
      check(state == P_IDLE && done == 1, "done after step 5");
      repeat (2) @(posedge clk);
      #1 check(done == 1 && state == P_IDLE, "done held in idle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
