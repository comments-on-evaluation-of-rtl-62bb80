// csa_row: carry-save reduction of A + B + ~K to two numbers S and C.
//
// A row of full adders (fa_cell) with no carry propagation between them:
// slice i adds a_i, b_i and the complement of k_i, giving sum bit s_i and a
// carry of weight 2^(i+1). The top slice only needs the sum half of its full
// adder, as its carry would have weight 2^N. The carries are returned already aligned: c[0] is 0
// and c[i+1] is the carry of slice i, so that A + B + (2^N - 1 - K) = S + C
// modulo 2^N. The carry of the top slice is dropped, as the equality test
// works modulo 2^N. Purely combinational, one full-adder delay.
module csa_row #(
  parameter int N = 32
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic [N-1:0] k,
  output logic [N-1:0] s,
  output logic [N-1:0] c
);

  if (N < 2) begin : g_bad_params
    $error("csa_row needs N >= 2");
  end

  logic [N-2:0] cy;

  for (genvar i = 0; i < N - 1; i++) begin : g_fa
    fa_cell u_fa (.x(a[i]), .y(b[i]), .z(~k[i]), .s(s[i]), .c(cy[i]));
  end

  // The top slice's carry would leave the N-bit word, so only its sum is
  // formed.
  assign s[N-1] = a[N-1] ^ b[N-1] ^ ~k[N-1];

  assign c = {cy, 1'b0};

endmodule
