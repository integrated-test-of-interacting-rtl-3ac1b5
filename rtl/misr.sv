// misr: multiple-input signature register that compacts the observed test
// responses into a signature.
//
// While en is high, every clock the register shifts one place towards the MSB,
// takes the XOR of the TAPS-selected bits as new bit 0, and XORs the parallel
// input d into the result:  sig <= {sig[W-2:0], ^(sig & TAPS)} ^ d.
// clr (synchronous) and reset return the signature to 0. The document gives
// only the register's role and, per test scheme, its width; the feedback
// polynomial is this design's choice.
module misr #(
  parameter int unsigned      WIDTH = 8,
  parameter logic [WIDTH-1:0] TAPS  = 8'hB8   // x^8 + x^6 + x^5 + x^4 + 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic             clr,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] sig
);

  always_ff @(posedge clk) begin
    if (!rst_n || clr) sig <= '0;
    else if (en)       sig <= {sig[WIDTH-2:0], ^(sig & TAPS)} ^ d;
  end

endmodule
