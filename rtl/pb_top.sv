// pb_top: the two example controller/datapath pairs, each fitted with the
// piggyback built-in self-test, side by side.
//
// The idea of the scheme: rather than tapping every controller output into a
// signature register, a one-flop FSM between controller and datapath makes
// each controller step run twice in test mode, first with all mux selects
// complemented and all registers loaded, then normally. Any change of a select
// or load line in a step then changes the data written into some register, so
// controller faults are seen through one bit per datapath register.
// The two systems share only clock and reset; each has its own mode inputs,
// data ports and signature. See poly_system and diffeq_system for ports and
// timing.
module pb_top
  import pb_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // polynomial evaluator
  input  logic        p_bist,
  input  logic        p_test_mode,
  input  logic        p_misr_clr,
  input  word_t       p_a,
  input  word_t       p_b,
  input  word_t       p_c,
  input  word_t       p_d,
  input  word_t       p_x,
  input  logic        p_start,
  output word_t       p_y,
  output logic        p_done,
  output logic [max_u(POLY_R + 1, POLY_DOUT)-1:0] p_signature,
  output poly_state_t p_state,
  output logic        p_pb_q,
  // differential equation solver
  input  logic        d_bist,
  input  logic        d_test_mode,
  input  logic        d_misr_clr,
  input  word_t       d_x_in,
  input  word_t       d_y_in,
  input  word_t       d_u_in,
  input  word_t       d_dx,
  input  word_t       d_a,
  input  logic        d_start,
  output word_t       d_x_out,
  output word_t       d_y_out,
  output word_t       d_u_out,
  output logic        d_done,
  output logic [max_u(DE_R + 1, DE_DOUT)-1:0] d_signature,
  output de_state_t   d_state,
  output logic        d_status_c,
  output logic        d_pb_q
);

  poly_system u_poly (
    .clk, .rst_n, .bist(p_bist), .test_mode(p_test_mode), .misr_clr(p_misr_clr),
    .a(p_a), .b(p_b), .c(p_c), .d(p_d), .x(p_x), .start(p_start),
    .y(p_y), .done(p_done), .signature(p_signature), .ctl_state(p_state), .pb_q(p_pb_q));

  diffeq_system u_diffeq (
    .clk, .rst_n, .bist(d_bist), .test_mode(d_test_mode), .misr_clr(d_misr_clr),
    .x_in(d_x_in), .y_in(d_y_in), .u_in(d_u_in), .dx(d_dx), .a(d_a), .start(d_start),
    .x_out(d_x_out), .y_out(d_y_out), .u_out(d_u_out), .done(d_done),
    .signature(d_signature), .ctl_state(d_state), .status_c(d_status_c), .pb_q(d_pb_q));

endmodule
