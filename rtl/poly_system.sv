// poly_system: the polynomial evaluator with the piggyback built-in self-test.
//
// Controller (poly_ctrl) and datapath (poly_dp) talk through the piggyback FSM,
// which in test mode complements the select lines and forces the load lines in
// an extra step before every controller step (see piggyback_fsm).
// Test resources, after the document's piggyback column of its test-circuit
// table:
//   * a TPGR of width d_in + 1 = 41 drives the five data inputs and start when
//     bist = 1, through d_in + 1 input multiplexers (otherwise the ports drive
//     them);
//   * a MISR of width max(r + 1, d_out) = 8 compacts, when test_mode = 1, one
//     chosen bit (OBS_BIT) of each of the r = 3 datapath registers plus done,
//     and otherwise the data output y; min(r + 1, d_out) = 4 multiplexers pick
//     between the two. It runs while bist = 1.
// Modes: bist = 0, test_mode = 0 is normal operation; bist = 1, test_mode = 1 is
// the piggyback test of the controller through the datapath; bist = 1,
// test_mode = 0 drives the pair from the TPGR and watches y only.
// Everything is clocked by clk; reset is synchronous, active low. The TPGR and
// MISR polynomials and the bit observed are this design's choice (the document
// reports that the MSB or the LSB serve equally well).
module poly_system
  import pb_pkg::*;
#(
  parameter int unsigned OBS_BIT = 0,
  parameter int unsigned MISR_W  = max_u(POLY_R + 1, POLY_DOUT),
  parameter logic [MISR_W-1:0] MISR_TAPS = MISR_W'(8'hB8)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              bist,
  input  logic              test_mode,
  input  logic              misr_clr,
  input  word_t             a,
  input  word_t             b,
  input  word_t             c,
  input  word_t             d,
  input  word_t             x,
  input  logic              start,
  output word_t             y,
  output logic              done,
  output logic [MISR_W-1:0] signature,
  output poly_state_t       ctl_state,
  output logic              pb_q
);

  // ---- pattern source and input multiplexers ----
  logic [TPGR_W-1:0] pat;
  word_t a_i, b_i, c_i, d_i, x_i;
  logic  start_i;

  tpgr u_tpgr (.clk, .rst_n, .en(bist), .q(pat));

  always_comb begin
    if (bist) {start_i, a_i, b_i, c_i, d_i, x_i} = pat[POLY_DIN:0];
    else      {start_i, a_i, b_i, c_i, d_i, x_i} = {start, a, b, c, d, x};
  end

  // ---- controller, piggyback FSM, datapath ----
  poly_ms_t ms, ms_star;
  poly_rl_t rl, rl_star;
  logic     ctl_en;
  word_t    r1, r2, ro;

  poly_ctrl u_ctrl (.clk, .rst_n, .en(ctl_en), .start(start_i),
                    .ms, .rl, .done, .state(ctl_state));

  piggyback_fsm #(.M(POLY_M), .R(POLY_R)) u_pb (
    .clk, .rst_n, .test_mode,
    .ms(ms), .rl(rl), .ms_star(ms_star), .rl_star(rl_star),
    .ctl_en, .q(pb_q));

  poly_dp u_dp (.clk, .rst_n, .ms(ms_star), .rl(rl_star),
                .a(a_i), .b(b_i), .c(c_i), .d(d_i), .x(x_i),
                .r1, .r2, .ro);

  assign y = ro;

  // ---- observation multiplexers and MISR ----
  logic [MISR_W-1:0] obs;
  always_comb begin
    if (test_mode) obs = MISR_W'({done, ro[OBS_BIT], r2[OBS_BIT], r1[OBS_BIT]});
    else           obs = MISR_W'(ro);
  end

  misr #(.WIDTH(MISR_W), .TAPS(MISR_TAPS)) u_misr (
    .clk, .rst_n, .en(bist), .clr(misr_clr), .d(obs), .sig(signature));

endmodule
