// tpgr: test pattern generation register, a Fibonacci linear feedback shift
// register used as the built-in pseudo-random pattern source.
//
// While en is high the register shifts one place towards the MSB every clock
// and takes as new bit 0 the XOR of the bits selected by TAPS. Reset loads SEED,
// which must be non-zero. The pattern is available on q. The document gives
// only the register's role and its width (d_in + 1: every data input plus the
// controller's start input); the feedback polynomial and seed are this
// design's choice (x^41 + x^38 + 1, maximal length, for the default width).
module tpgr #(
  parameter int unsigned         WIDTH = pb_pkg::TPGR_W,
  parameter logic [WIDTH-1:0]    TAPS  = pb_pkg::TPGR_TAPS,
  parameter logic [WIDTH-1:0]    SEED  = WIDTH'(1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  output logic [WIDTH-1:0] q
);

  logic fb;
  assign fb = ^(q & TAPS);

  always_ff @(posedge clk) begin
    if (!rst_n)  q <= SEED;
    else if (en) q <= {q[WIDTH-2:0], fb};
  end

endmodule
