// tb_misr: self-checking test of the signature register.
//
// Feeds random words and compares the signature each clock with a bit-level
// model: sig' = {sig[6:0], sig[7]^sig[5]^sig[4]^sig[3]} ^ d. Also checks hold
// while en is low, synchronous clear, and that a single flipped input bit in a
// long stream changes the final signature.
module tb_misr;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, clr = 1'b0;
  logic [7:0] d, sig, model;
  int checks = 0, failures = 0;
  logic [7:0] stream [64];
  logic [7:0] good_sig;

  misr dut (.clk, .rst_n, .en, .clr, .d, .sig);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t: sig=%h model=%h", what, $time, sig, model);
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
    d = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    #1 check(sig == '0, "reset");
    model = '0;
    en = 1'b1;
    for (int i = 0; i < 64; i++) begin
      stream[i] = 8'($urandom);
      d = stream[i];
      @(posedge clk);
      #1;
      model = {model[6:0], model[7] ^ model[5] ^ model[4] ^ model[3]} ^ stream[i];
      check(sig == model, "compaction");
    end
    good_sig = sig;
    en = 1'b0; d = 8'hFF;
    repeat (3) @(posedge clk);
    #1 check(sig == good_sig, "hold");
    clr = 1'b1;
    @(posedge clk);
    #1 check(sig == '0, "clear");
    clr = 1'b0;
    en = 1'b1;
    for (int i = 0; i < 64; i++) begin
      d = (i == 20) ? (stream[i] ^ 8'h04) : stream[i];
      @(posedge clk);
    end
    #1 check(sig != good_sig, "single-bit error changes signature");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
