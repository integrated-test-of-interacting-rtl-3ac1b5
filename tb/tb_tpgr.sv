// tb_tpgr: self-checking test of the pattern generator.
//
// Part 1, at the default 41-bit width: after reset the register holds the seed,
// holds its value while en is low, and follows the recurrence
// new bit 0 = q[40] ^ q[37] computed here bit by bit.
// Part 2, an 8-bit instance with taps x^8 + x^6 + x^5 + x^4 + 1: the sequence
// from seed 1 returns to the seed after exactly 255 steps and not before
// (maximal length).
module tb_tpgr;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [40:0] q, model;
  logic [7:0]  q8;
  int checks = 0, failures = 0;
  int period;

  tpgr dut (.clk, .rst_n, .en, .q);
  tpgr #(.WIDTH(8), .TAPS(8'hB8), .SEED(8'h01)) dut8 (.clk, .rst_n, .en, .q(q8));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    #1;
    check(q == 41'd1, "seed");
    model = 41'd1;
    repeat (3) @(posedge clk);
    #1;
    check(q == model, "hold while disabled");
    en = 1'b1;
    period = 0;
    for (int i = 0; i < 300; i++) begin
      @(posedge clk);
      #1;
      model = {model[39:0], model[40] ^ model[37]};
      check(q == model, "41-bit recurrence");
      if (period == 0 && q8 == 8'h01) period = i + 1;
    end
    check(period == 255, "8-bit maximal period");
    check(q != '0, "never all zero");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
