// poly_cmult: complex multiplier built from short table multipliers by
// polynomial encoding.
//
// A = a_re + j*a_im and B = b_re + j*b_im have unsigned N-bit parts. Each part
// is cut into 2^M digits of DW = N/2^M bits, and each complex operand becomes
// the L = 2^(M+1) coefficients of a polynomial in x = j: coefficient 2t holds
// the real digit of rank 2^M-1-t, coefficient 2t+1 the imaginary digit of the
// same rank, each weighted by 2^(rank*DW) and negated for odd t (for N = 8,
// M = 2: 2^6 R3, 2^6 I3, -2^4 R2, -2^4 I2, 2^2 R1, 2^2 I1, -R0, -I0). The
// encoding is pure wiring: the digits are bit fields of the inputs, and the
// weight exponents and signs are per-position constants from cm_pkg.
// cyclic_conv forms the L-point cyclic convolution c_k of the two coefficient
// vectors using only DW x DW-bit table multipliers, and pq_eval evaluates the
// result at x = j, giving P + jQ = A * B exactly. With the defaults every
// table has 16 words. The c_k are brought out as well.
// Purely combinational. Unsigned operands, the generalisation from M = 2 to
// other M, and the output widths are this design's choices.
module poly_cmult
  import cm_pkg::*;
#(
  parameter int N = 8,
  parameter int M = 2,
  localparam int L  = 2 ** (M + 1),
  localparam int DW = N / (2 ** M),
  localparam int SW = $clog2(N) + 1,
  localparam int CW = 2 * N + M + 3,
  localparam int OW = 2 * N + 2
) (
  input  logic [N-1:0]         a_re,
  input  logic [N-1:0]         a_im,
  input  logic [N-1:0]         b_re,
  input  logic [N-1:0]         b_im,
  output logic signed [CW-1:0] c [L],
  output logic signed [OW-1:0] p,
  output logic signed [OW-1:0] q
);

  if (M < 1 || N % (2 ** M) != 0) begin : g_bad_params
    $error("poly_cmult needs M >= 1 and N a multiple of 2^M");
  end

  logic [DW-1:0] a_dig [L], b_dig [L];
  logic [SW-1:0] shf [L];
  logic          neg [L];

  // Polynomial encoding of A and B.
  for (genvar i = 0; i < L; i++) begin : g_coef
    localparam int RANK = coef_rank(i, M);
    if (i % 2 == 0) begin : g_re
      assign a_dig[i] = a_re[RANK*DW +: DW];
      assign b_dig[i] = b_re[RANK*DW +: DW];
    end else begin : g_im
      assign a_dig[i] = a_im[RANK*DW +: DW];
      assign b_dig[i] = b_im[RANK*DW +: DW];
    end
    assign shf[i] = SW'(coef_shift(i, N, M));
    assign neg[i] = coef_neg(i);
  end

  cyclic_conv #(.N(N), .M(M)) u_conv (
    .a_dig(a_dig), .a_shf(shf), .a_neg(neg),
    .b_dig(b_dig), .b_shf(shf), .b_neg(neg),
    .c(c)
  );

  pq_eval #(.N(N), .M(M)) u_pq (.c(c), .p(p), .q(q));

endmodule
