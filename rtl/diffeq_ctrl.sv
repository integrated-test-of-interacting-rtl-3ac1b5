// diffeq_ctrl: controller of the differential equation solver.
//
// A Moore FSM: IDLE waits for start; LOAD copies the initial x, y, u from the
// input ports into X, Y, U; then the six-step loop body runs
//   S1: T1 <= 3*X          X  <= X + DX
//   S2: T2 <= 3*Y          C  <= (X < A)          (X is already x + dx)
//   S3: T2 <= T2 * DX
//   S4: T3 <= U * DX       U  <= U - T2
//   S5: T1 <= T1 * T3      Y  <= Y + T3
//   S6:                    U  <= U - T1
// and from S6 returns to S1 while the status line c is 1, otherwise to IDLE,
// raising done. The body therefore runs at least once. The loop equations are
// those of the well-known high-level synthesis benchmark the document names;
// schedule, binding and encoding are this design's own. Unused select lines are
// driven 0; the select ms.t1_src is 0 in every step (T1's second source exists
// only for the piggyback test, see diffeq_dp), so that output is constant. en is the piggyback FSM's advance enable: state and done change
// only in clocks where it is high. done stays high until the next start.
module diffeq_ctrl
  import pb_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      en,
  input  logic      start,
  input  logic      c,       // status line from the datapath
  output de_ms_t    ms,
  output de_rl_t    rl,
  output logic      done,
  output de_state_t state
);

  de_state_t next;

  always_comb begin
    unique case (state)
      D_IDLE:  next = start ? D_LOAD : D_IDLE;
      D_LOAD:  next = D_S1;
      D_S1:    next = D_S2;
      D_S2:    next = D_S3;
      D_S3:    next = D_S4;
      D_S4:    next = D_S5;
      D_S5:    next = D_S6;
      D_S6:    next = c ? D_S1 : D_IDLE;
      default: next = D_IDLE;
    endcase
  end

  always_comb begin
    ms = '0;
    rl = '0;
    unique case (state)
      D_LOAD: begin ms.x_src = 1'b1; ms.y_src = 1'b1; ms.u_src = 1'b1;
                    rl.x = 1'b1; rl.y = 1'b1; rl.u = 1'b1; end
      D_S1:   begin ms.mul_l = 3'd0; ms.mul_r = 2'd0; rl.t1 = 1'b1;
                    ms.add_l = 1'b0; ms.add_r = 1'b0; ms.x_src = 1'b0; rl.x = 1'b1; end
      D_S2:   begin ms.mul_l = 3'd1; ms.mul_r = 2'd0; rl.t2 = 1'b1; rl.c = 1'b1; end
      D_S3:   begin ms.mul_l = 3'd2; ms.mul_r = 2'd1; rl.t2 = 1'b1; end
      D_S4:   begin ms.mul_l = 3'd3; ms.mul_r = 2'd1; rl.t3 = 1'b1;
                    ms.sub_r = 1'b0; ms.u_src = 1'b0; rl.u = 1'b1; end
      D_S5:   begin ms.mul_l = 3'd4; ms.mul_r = 2'd2; rl.t1 = 1'b1;
                    ms.add_l = 1'b1; ms.add_r = 1'b1; ms.y_src = 1'b0; rl.y = 1'b1; end
      D_S6:   begin ms.sub_r = 1'b1; ms.u_src = 1'b0; rl.u = 1'b1; end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= D_IDLE;
      done  <= 1'b0;
    end else if (en) begin
      state <= next;
      if (state == D_S6 && !c)           done <= 1'b1;
      else if (state == D_IDLE && start) done <= 1'b0;
    end
  end

endmodule
