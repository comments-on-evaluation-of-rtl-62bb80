// cyclic_conv: L-point cyclic convolution of two encoded polynomials.
//
// Computes c_k = sum over i of a_i * b_((k-i) mod L), the product of the two
// polynomials modulo x^L - 1. Every coefficient is a DW-bit digit with a
// power-of-two weight 2^shf and a sign, so each of the L*L terms is one digit
// product from a rom_mult table, shifted left by shf_a + shf_b and negated when
// exactly one of the two coefficients is negative. The L terms of each c_k are
// summed in a plain adder chain. Purely combinational. Interface: digit,
// shift and sign arrays of A and B in; c[L] signed CW-bit out. The parallel
// array of L*L table multipliers and the adder structure are this design's
// choices; the convolution itself follows the method.
module cyclic_conv #(
  parameter int N = 8,
  parameter int M = 2,
  localparam int L  = 2 ** (M + 1),
  localparam int DW = N / (2 ** M),
  localparam int SW = $clog2(N) + 1,
  localparam int CW = 2 * N + M + 3,
  localparam int LB = M + 1
) (
  input  logic [DW-1:0]        a_dig [L],
  input  logic [SW-1:0]        a_shf [L],
  input  logic                 a_neg [L],
  input  logic [DW-1:0]        b_dig [L],
  input  logic [SW-1:0]        b_shf [L],
  input  logic                 b_neg [L],
  output logic signed [CW-1:0] c     [L]
);

  logic [2*DW-1:0] prod [L][L];   // prod[k][i] = dig(a_i) * dig(b_(k-i))

  for (genvar k = 0; k < L; k++) begin : g_k
    for (genvar i = 0; i < L; i++) begin : g_i
      localparam int J = (k - i + L) % L;
      rom_mult #(.DW(DW)) u_mult (
        .x(a_dig[i]),
        .y(b_dig[J]),
        .p(prod[k][i])
      );
    end
  end

  always_comb begin
    for (int k = 0; k < L; k++) begin
      logic signed [CW-1:0] acc;
      acc = '0;
      for (int i = 0; i < L; i++) begin
        logic [LB-1:0] j;
        logic signed [CW-1:0] term;
        j    = LB'(k - i);              // (k - i) mod L, L = 2^LB
        term = CW'(prod[k][i]) << (a_shf[i] + b_shf[j]);
        if (a_neg[i] ^ b_neg[j]) acc = acc - term;
        else                     acc = acc + term;
      end
      c[k] = acc;
    end
  end

endmodule
