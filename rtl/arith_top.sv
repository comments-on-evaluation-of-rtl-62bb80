// arith_top: two independent carry-free / reduced-width arithmetic units side
// by side.
//
// cm_*: the polynomial-encoding complex multiplier (poly_cmult). It multiplies
// A = cm_a_re + j*cm_a_im by B = cm_b_re + j*cm_b_im, unsigned CM_N-bit parts,
// using only (CM_N/2^CM_M)-bit table multipliers, and returns P + jQ and the
// cyclic convolution terms c_k.
// eq_*: the carry-save A + B = K evaluator (apb_eq_k), eq_e = 1 when
// eq_a + eq_b = eq_k modulo 2^EQ_N.
// The two units share nothing. Both are purely combinational.
module arith_top #(
  parameter int CM_N = 8,
  parameter int CM_M = 2,
  parameter int EQ_N = 32,
  localparam int CM_L  = 2 ** (CM_M + 1),
  localparam int CM_CW = 2 * CM_N + CM_M + 3,
  localparam int CM_OW = 2 * CM_N + 2
) (
  input  logic [CM_N-1:0]         cm_a_re,
  input  logic [CM_N-1:0]         cm_a_im,
  input  logic [CM_N-1:0]         cm_b_re,
  input  logic [CM_N-1:0]         cm_b_im,
  output logic signed [CM_CW-1:0] cm_c [CM_L],
  output logic signed [CM_OW-1:0] cm_p,
  output logic signed [CM_OW-1:0] cm_q,
  input  logic [EQ_N-1:0]         eq_a,
  input  logic [EQ_N-1:0]         eq_b,
  input  logic [EQ_N-1:0]         eq_k,
  output logic                    eq_e
);

  poly_cmult #(.N(CM_N), .M(CM_M)) u_cmult (
    .a_re(cm_a_re), .a_im(cm_a_im), .b_re(cm_b_re), .b_im(cm_b_im),
    .c(cm_c), .p(cm_p), .q(cm_q)
  );

  apb_eq_k #(.N(EQ_N)) u_eq (.a(eq_a), .b(eq_b), .k(eq_k), .e(eq_e));

endmodule
