// poly_dp: eight-bit datapath of the polynomial evaluator.
//
// Built from functional blocks of the kind the document uses (operand
// multiplexers, an ALU, a loadable register): one multiplier whose left operand
// comes from a four-input mux {a, c, R1, R2} and whose right operand is x; one
// adder with operand muxes {R1, R2} and {b, d, R2, x}; registers R1 and R2, each
// fed by a two-input mux {multiplier, adder}; output register RO fed by the
// adder. Every mux has all of its inputs in use, so a complemented select (as
// the piggyback FSM issues) always forwards different data.
// Arithmetic is modulo 2^8: the multiplier keeps the low byte of the product.
// Registers load on the clock edge when their RL bit is 1 and reset to 0.
// The inputs a..x are read directly and must be held while a computation runs.
// The document fixes the function and the 8-bit width; the unit allocation,
// register binding and mux encodings here are this design's own.
module poly_dp
  import pb_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  poly_ms_t ms,
  input  poly_rl_t rl,
  input  word_t    a,
  input  word_t    b,
  input  word_t    c,
  input  word_t    d,
  input  word_t    x,
  output word_t    r1,
  output word_t    r2,
  output word_t    ro
);

  word_t mul_l, add_l, add_r, mul_o, add_o;

  always_comb begin
    unique case (ms.mul_l)
      2'd0: mul_l = a;
      2'd1: mul_l = c;
      2'd2: mul_l = r1;
      default: mul_l = r2;
    endcase
    add_l = ms.add_l ? r2 : r1;
    unique case (ms.add_r)
      2'd0: add_r = b;
      2'd1: add_r = d;
      2'd2: add_r = r2;
      default: add_r = x;
    endcase
    mul_o = word_t'(mul_l * x);
    add_o = add_l + add_r;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      r1 <= '0;
      r2 <= '0;
      ro <= '0;
    end else begin
      if (rl.r1) r1 <= ms.r1_src ? add_o : mul_o;
      if (rl.r2) r2 <= ms.r2_src ? add_o : mul_o;
      if (rl.ro) ro <= add_o;
    end
  end

endmodule
