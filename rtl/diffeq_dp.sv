// diffeq_dp: eight-bit datapath of the differential equation solver.
//
// Units: one multiplier (left operand mux {X, Y, T2, U, T1, T3, DX, A}, right
// operand mux {3, DX, T3, U}), one adder (left {X, Y}, right {DX, T3}), one
// subtractor (U minus {T2, T1}) and one less-than comparator (X < A, unsigned).
// Registers: X and Y take the adder or their input port, U takes the
// subtractor or its input port, T2 and T3 take the multiplier, T1 takes the
// multiplier or the adder, and the one-bit
// register C takes the comparator and is the status line to the controller.
// Every mux input is a live signal, so a complemented select always forwards
// different data. The schedule only ever loads T1 from the multiplier; its
// adder input exists so that T1 and T2, the two subtractor operands, are not
// written with the same value in the piggyback FSM's forced-load step, which
// would hide faults on the subtractor's select line. All arithmetic is modulo 2^8 (products keep the low byte).
// Registers load on the clock edge when their RL bit is 1 and reset to 0.
// dx and a are read directly from the ports and must be held during a run.
// The document names this benchmark and fixes the 8-bit width; the unit
// allocation, register binding and mux encodings here are this design's own.
module diffeq_dp
  import pb_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  de_ms_t ms,
  input  de_rl_t rl,
  input  word_t  x_in,
  input  word_t  y_in,
  input  word_t  u_in,
  input  word_t  dx,
  input  word_t  a,
  output word_t  x,
  output word_t  y,
  output word_t  u,
  output word_t  t1,
  output word_t  t2,
  output word_t  t3,
  output logic   c
);

  word_t mul_l, mul_r, add_l, add_r, sub_r, mul_o, add_o, sub_o;
  logic  lt;

  always_comb begin
    unique case (ms.mul_l)
      3'd0: mul_l = x;
      3'd1: mul_l = y;
      3'd2: mul_l = t2;
      3'd3: mul_l = u;
      3'd4: mul_l = t1;
      3'd5: mul_l = t3;
      3'd6: mul_l = dx;
      default: mul_l = a;
    endcase
    unique case (ms.mul_r)
      2'd0: mul_r = word_t'(3);
      2'd1: mul_r = dx;
      2'd2: mul_r = t3;
      default: mul_r = u;
    endcase
    add_l = ms.add_l ? y  : x;
    add_r = ms.add_r ? t3 : dx;
    sub_r = ms.sub_r ? t1 : t2;
    mul_o = word_t'(mul_l * mul_r);
    add_o = add_l + add_r;
    sub_o = u - sub_r;
    lt    = (x < a);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      x <= '0; y <= '0; u <= '0;
      t1 <= '0; t2 <= '0; t3 <= '0;
      c <= 1'b0;
    end else begin
      if (rl.x)  x  <= ms.x_src ? x_in : add_o;
      if (rl.y)  y  <= ms.y_src ? y_in : add_o;
      if (rl.u)  u  <= ms.u_src ? u_in : sub_o;
      if (rl.t1) t1 <= ms.t1_src ? add_o : mul_o;
      if (rl.t2) t2 <= mul_o;
      if (rl.t3) t3 <= mul_o;
      if (rl.c)  c  <= lt;
    end
  end

endmodule
