// poly_ctrl: controller of the polynomial evaluator y = a*x^3 + b*x^2 + c*x + d.
//
// A Moore FSM that waits in IDLE for start and then walks the five control
// steps of the schedule, one per enabled clock:
//   S1: R1 <= a*x
//   S2: R1 <= R1 + b        R2 <= c*x
//   S3: R1 <= R1 * x        R2 <= R2 + d
//   S4: R1 <= R1 * x
//   S5: RO <= R1 + R2       (= ((a*x + b)*x)*x + c*x + d)
// The document fixes the function, the eight-bit width and the five control
// steps; the binding and this schedule are this design's own. MS and RL are
// decoded from the state only; lines a step does not use are driven 0.
// done rises at the end of S5 and stays high until the next start is taken.
// en is the advance enable from the piggyback FSM: the state, and done, change
// only in clocks where en is high (always, outside test mode).
module poly_ctrl
  import pb_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     en,
  input  logic     start,
  output poly_ms_t ms,
  output poly_rl_t rl,
  output logic     done,
  output poly_state_t state
);

  poly_state_t next;

  always_comb begin
    unique case (state)
      P_IDLE:  next = start ? P_S1 : P_IDLE;
      P_S1:    next = P_S2;
      P_S2:    next = P_S3;
      P_S3:    next = P_S4;
      P_S4:    next = P_S5;
      P_S5:    next = P_IDLE;
      default: next = P_IDLE;
    endcase
  end

  always_comb begin
    ms = '0;
    rl = '0;
    unique case (state)
      P_S1: begin ms.mul_l = 2'd0;                              rl.r1 = 1'b1; end
      P_S2: begin ms.mul_l = 2'd1; ms.add_l = 1'b0; ms.add_r = 2'd0;
                  ms.r1_src = 1'b1; ms.r2_src = 1'b0;           rl.r1 = 1'b1; rl.r2 = 1'b1; end
      P_S3: begin ms.mul_l = 2'd2; ms.add_l = 1'b1; ms.add_r = 2'd1;
                  ms.r1_src = 1'b0; ms.r2_src = 1'b1;           rl.r1 = 1'b1; rl.r2 = 1'b1; end
      P_S4: begin ms.mul_l = 2'd2; ms.r1_src = 1'b0;            rl.r1 = 1'b1; end
      P_S5: begin ms.add_l = 1'b0; ms.add_r = 2'd2;             rl.ro = 1'b1; end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= P_IDLE;
      done  <= 1'b0;
    end else if (en) begin
      state <= next;
      if (state == P_S5)                 done <= 1'b1;
      else if (state == P_IDLE && start) done <= 1'b0;
    end
  end

endmodule
