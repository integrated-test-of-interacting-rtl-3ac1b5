// diffeq_system: the differential equation solver with the piggyback built-in
// self-test.
//
// Same arrangement as poly_system: a 41-bit TPGR (d_in + 1: x, y, u, dx, a and
// start) feeds the inputs through multiplexers when bist = 1; the controller
// reaches the datapath through the piggyback FSM; a MISR of width
// max(r + 1, d_out) = 24 compacts, when test_mode = 1, one bit (OBS_BIT) of each
// of the r = 7 datapath registers plus done, and otherwise the 24 output bits.
// The status line c goes from the datapath straight back to the controller; the
// document's scheme modifies only the select and load lines.
// Modes: bist = 0, test_mode = 0 normal; bist = 1, test_mode = 1 piggyback test;
// bist = 1, test_mode = 0 pattern-driven run observing the outputs only.
// Synchronous active-low reset; polynomials and OBS_BIT are this design's
// choice.
module diffeq_system
  import pb_pkg::*;
#(
  parameter int unsigned OBS_BIT = 0,
  parameter int unsigned MISR_W  = max_u(DE_R + 1, DE_DOUT),
  parameter logic [MISR_W-1:0] MISR_TAPS = MISR_W'(24'hE10000) // x^24+x^23+x^22+x^17+1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              bist,
  input  logic              test_mode,
  input  logic              misr_clr,
  input  word_t             x_in,
  input  word_t             y_in,
  input  word_t             u_in,
  input  word_t             dx,
  input  word_t             a,
  input  logic              start,
  output word_t             x_out,
  output word_t             y_out,
  output word_t             u_out,
  output logic              done,
  output logic [MISR_W-1:0] signature,
  output de_state_t         ctl_state,
  output logic              status_c,
  output logic              pb_q
);

  // ---- pattern source and input multiplexers ----
  logic [TPGR_W-1:0] pat;
  word_t x_i, y_i, u_i, dx_i, a_i;
  logic  start_i;

  tpgr u_tpgr (.clk, .rst_n, .en(bist), .q(pat));

  always_comb begin
    if (bist) {start_i, x_i, y_i, u_i, dx_i, a_i} = pat[DE_DIN:0];
    else      {start_i, x_i, y_i, u_i, dx_i, a_i} = {start, x_in, y_in, u_in, dx, a};
  end

  // ---- controller, piggyback FSM, datapath ----
  de_ms_t ms, ms_star;
  de_rl_t rl, rl_star;
  logic   ctl_en;
  word_t  t1, t2, t3;

  diffeq_ctrl u_ctrl (.clk, .rst_n, .en(ctl_en), .start(start_i), .c(status_c),
                      .ms, .rl, .done, .state(ctl_state));

  piggyback_fsm #(.M(DE_M), .R(DE_R)) u_pb (
    .clk, .rst_n, .test_mode,
    .ms(ms), .rl(rl), .ms_star(ms_star), .rl_star(rl_star),
    .ctl_en, .q(pb_q));

  diffeq_dp u_dp (.clk, .rst_n, .ms(ms_star), .rl(rl_star),
                  .x_in(x_i), .y_in(y_i), .u_in(u_i), .dx(dx_i), .a(a_i),
                  .x(x_out), .y(y_out), .u(u_out), .t1, .t2, .t3, .c(status_c));

  // ---- observation multiplexers and MISR ----
  logic [MISR_W-1:0] obs;
  always_comb begin
    if (test_mode) obs = MISR_W'({done, status_c, t3[OBS_BIT], t2[OBS_BIT], t1[OBS_BIT],
                                  u_out[OBS_BIT], y_out[OBS_BIT], x_out[OBS_BIT]});
    else           obs = MISR_W'({x_out, y_out, u_out});
  end

  misr #(.WIDTH(MISR_W), .TAPS(MISR_TAPS)) u_misr (
    .clk, .rst_n, .en(bist), .clr(misr_clr), .d(obs), .sig(signature));

endmodule
