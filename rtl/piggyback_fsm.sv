// piggyback_fsm: the small FSM that sits between a controller and its datapath
// and pushes controller fault effects into the datapath registers.
//
// Normal mode (test_mode = 0): the select lines and load lines pass straight
// through and the controller advances every clock.
// Test mode (test_mode = 1): every controller step is stretched into two clock
// steps. In the first (q = 0) every mux select line is complemented and every
// register load line is forced to 1, so each register receives a known value
// that differs from its normal one; the controller is held. In the second
// (q = 1) the controller's own MS/RL are passed through and the controller is
// allowed to move to its next state at the end of the step. A controller
// schedule therefore runs at half speed in test mode.
//
// The logic follows the document's gate-level drawing and truth table: one
// flip-flop Q, a mask that is high in test mode while Q is 0, m XOR gates on the
// select lines, r OR gates on the load lines, and Q+ = mask.
// Interface: ms/rl from the controller, ms_star/rl_star to the datapath.
// ctl_en is this design's synchronous replacement for the document's gated
// controller clock (CTL_Clock): the controller flops must be clocked by the
// same clock and update only when ctl_en is high. The controller advances at
// the end of the second (normal) step, as the document's state diagram and text
// describe.
module piggyback_fsm #(
  parameter int unsigned M = 7,   // number of multiplexer select lines
  parameter int unsigned R = 3    // number of register load lines
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         test_mode,
  input  logic [M-1:0] ms,
  input  logic [R-1:0] rl,
  output logic [M-1:0] ms_star,
  output logic [R-1:0] rl_star,
  output logic         ctl_en,
  output logic         q
);

  logic mask;

  assign mask    = test_mode & ~q;
  assign ms_star = ms ^ {M{mask}};
  assign rl_star = rl | {R{mask}};
  assign ctl_en  = ~mask;

  always_ff @(posedge clk) begin
    if (!rst_n) q <= 1'b0;
    else        q <= mask;
  end

  // In test mode Q toggles every clock; outside it Q returns to 0.
  a_toggle: assert property (@(posedge clk) disable iff (!rst_n)
                             test_mode |=> (q != $past(q)));
  a_idle:   assert property (@(posedge clk) disable iff (!rst_n)
                             !test_mode |=> !q);

endmodule
