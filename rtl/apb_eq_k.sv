// apb_eq_k: carry-free evaluation of the condition A + B = K.
//
// A + B = K (modulo 2^N) holds exactly when A + B + ~K = 2^N - 1, the all-ones
// word. A carry-save row (csa_row) turns A + B + ~K into S + C without any
// carry propagation; S + C is all ones exactly when S = ~C, which a row of N
// XOR gates tests bit by bit (every s_i ^ c_i must be 1) and an N-input AND
// tree (and_tree) collects into E. The critical path is one full adder, one
// XOR and the log-depth AND tree, independent of carry propagation.
// Works the same for 2's-complement and unsigned operands. Purely
// combinational: a, b, k in, e out. The word width N = 32 is this design's
// choice.
module apb_eq_k #(
  parameter int N = 32
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic [N-1:0] k,
  output logic         e
);

  logic [N-1:0] s, c, z;

  csa_row #(.N(N)) u_csa (.a(a), .b(b), .k(k), .s(s), .c(c));

  assign z = s ^ c;

  and_tree #(.N(N)) u_and (.x(z), .y(e));

endmodule
