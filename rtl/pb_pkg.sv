// pb_pkg: types and constants shared by the piggyback-tested controller/datapath
// pairs.
//
// Both example systems use eight-bit datapaths. Each controller talks to its
// datapath through two bundles: the multiplexer select lines (MS, m bits) and
// the register load lines (RL, r bits). They are packed structs here so that the
// controllers and datapaths name the fields, while the piggyback FSM, which
// treats every select line alike, sees them as plain m- and r-bit vectors.
// The field encodings (which mux input a select value picks) are this design's
// own; the document does not give the datapaths' binding.
package pb_pkg;

  // Data word width: "all with eight bit wide datapaths".
  localparam int unsigned DW = 8;
  typedef logic [DW-1:0] word_t;

  // ------------------------------------------------------------------
  // Polynomial evaluator a*x^3 + b*x^2 + c*x + d
  // ------------------------------------------------------------------
  // Multiplier left operand: 0:a 1:c 2:R1 3:R2 (right operand is always x).
  // Adder left operand:      0:R1 1:R2
  // Adder right operand:     0:b 1:d 2:R2 3:x
  // R1 / R2 source:          0:multiplier 1:adder   (RO always takes the adder)
  typedef struct packed {
    logic [1:0] mul_l;
    logic       add_l;
    logic [1:0] add_r;
    logic       r1_src;
    logic       r2_src;
  } poly_ms_t;

  typedef struct packed {
    logic ro;
    logic r2;
    logic r1;
  } poly_rl_t;

  localparam int unsigned POLY_M   = $bits(poly_ms_t);  // 7 select lines
  localparam int unsigned POLY_R   = $bits(poly_rl_t);  // 3 registers
  localparam int unsigned POLY_DIN = 5 * DW;            // a, b, c, d, x
  localparam int unsigned POLY_DOUT = DW;               // y

  typedef enum logic [2:0] {
    P_IDLE = 3'd0,
    P_S1   = 3'd1,
    P_S2   = 3'd2,
    P_S3   = 3'd3,
    P_S4   = 3'd4,
    P_S5   = 3'd5
  } poly_state_t;

  // ------------------------------------------------------------------
  // Differential equation solver (HAL benchmark), one loop iteration:
  //   x1 = x + dx;  u1 = u - 3*x*u*dx - 3*y*dx;  y1 = y + u*dx;  c = x1 < a
  // ------------------------------------------------------------------
  // Multiplier left operand:  0:X 1:Y 2:T2 3:U 4:T1 5:T3 6:DX 7:A
  // Multiplier right operand: 0:constant 3 1:DX 2:T3 3:U
  // Adder left operand:       0:X 1:Y
  // Adder right operand:      0:DX 1:T3
  // Subtractor right operand: 0:T2 1:T1 (left operand is always U)
  // X / Y source:             0:adder 1:input port
  // U source:                 0:subtractor 1:input port
  // T1 source:                0:multiplier 1:adder
  typedef struct packed {
    logic       t1_src;
    logic [2:0] mul_l;
    logic [1:0] mul_r;
    logic       add_l;
    logic       add_r;
    logic       sub_r;
    logic       x_src;
    logic       y_src;
    logic       u_src;
  } de_ms_t;

  typedef struct packed {
    logic c;
    logic t3;
    logic t2;
    logic t1;
    logic u;
    logic y;
    logic x;
  } de_rl_t;

  localparam int unsigned DE_M    = $bits(de_ms_t);  // 12 select lines
  localparam int unsigned DE_R    = $bits(de_rl_t);  // 7 registers
  localparam int unsigned DE_S    = 1;               // status line: c
  localparam int unsigned DE_DIN  = 5 * DW;          // x, y, u, dx, a
  localparam int unsigned DE_DOUT = 3 * DW;          // x, y, u

  typedef enum logic [2:0] {
    D_IDLE = 3'd0,
    D_LOAD = 3'd1,
    D_S1   = 3'd2,
    D_S2   = 3'd3,
    D_S3   = 3'd4,
    D_S4   = 3'd5,
    D_S5   = 3'd6,
    D_S6   = 3'd7
  } de_state_t;

  // ------------------------------------------------------------------
  // BIST registers
  // ------------------------------------------------------------------
  // Test pattern generator width is d_in + 1 (data inputs plus start).
  localparam int unsigned TPGR_W = POLY_DIN + 1;  // 41 for both examples
  // x^41 + x^38 + 1 (maximal length), as a feedback tap mask.
  localparam logic [TPGR_W-1:0] TPGR_TAPS = (TPGR_W'(1) << 40) | (TPGR_W'(1) << 37);

  function automatic int unsigned max_u(int unsigned a, int unsigned b);
    return (a > b) ? a : b;
  endfunction

endpackage
