// tb_piggyback_fsm: self-checking test of the piggyback FSM.
//
// Drives random select/load words and mode changes and compares MS*, RL*, the
// controller advance enable and Q every clock with a model of the truth table:
// test mode with Q = 0 gives complemented selects, all loads 1, controller held
// and Q+ = 1; test mode with Q = 1 passes MS/RL through, lets the controller
// advance and gives Q+ = 0; normal mode passes everything through. It also
// checks that in test mode the controller advances exactly once every two
// clocks (half-speed schedule).
module tb_piggyback_fsm;
  localparam int unsigned M = 7;
  localparam int unsigned R = 3;

  logic clk = 1'b0, rst_n = 1'b0, test_mode = 1'b0;
  logic [M-1:0] ms, ms_star;
  logic [R-1:0] rl, rl_star;
  logic ctl_en, q;
  int checks = 0, failures = 0;
  logic q_model;
  int en_count, tm_cycles;

  piggyback_fsm #(.M(M), .R(R)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ms = '0; rl = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    q_model = 1'b0;
    for (int phase = 0; phase < 6; phase++) begin
      test_mode = phase[0];
      en_count = 0; tm_cycles = 0;
      for (int i = 0; i < 40; i++) begin
        ms = M'($urandom); rl = R'($urandom);
        #1;
        check(q == q_model, "q");
        if (test_mode && !q_model) begin
          check(ms_star == ~ms, "ms complemented");
          check(rl_star == '1, "rl forced");
          check(ctl_en == 1'b0, "controller held");
        end else begin
          check(ms_star == ms, "ms passed");
          check(rl_star == rl, "rl passed");
          check(ctl_en == 1'b1, "controller advances");
        end
        en_count += int'(ctl_en);
        tm_cycles++;
        @(posedge clk);
        q_model = test_mode && !q_model;
      end
      #1;
      if (test_mode) check(en_count * 2 == tm_cycles, "half-speed advance");
      else           check(en_count == tm_cycles, "full-speed advance");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
