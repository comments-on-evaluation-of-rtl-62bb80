// pq_eval: evaluation of the product polynomial at x = j.
//
// With x = j, x^k cycles through 1, j, -1, -j, so the real part of the product
// is P = c0 - c2 + c4 - c6 + ... and the imaginary part Q = c1 - c3 + c5 - ...
// (for L = 8 exactly P = c0 - c2 + c4 - c6, Q = c1 - c3 + c5 - c7). The sums
// are formed in CW+M bits and returned in OW = 2N+2 bits, which hold any
// product of two complex numbers with unsigned N-bit parts; the output width
// is this design's choice. Purely combinational.
module pq_eval #(
  parameter int N = 8,
  parameter int M = 2,
  localparam int L  = 2 ** (M + 1),
  localparam int CW = 2 * N + M + 3,
  localparam int OW = 2 * N + 2
) (
  input  logic signed [CW-1:0] c [L],
  output logic signed [OW-1:0] p,
  output logic signed [OW-1:0] q
);

  localparam int AW = CW + M;

  always_comb begin
    logic signed [AW-1:0] sp, sq;
    sp = '0;
    sq = '0;
    for (int t = 0; t < L / 2; t++) begin
      if (t % 2 == 0) begin
        sp = sp + AW'(c[2*t]);
        sq = sq + AW'(c[2*t+1]);
      end else begin
        sp = sp - AW'(c[2*t]);
        sq = sq - AW'(c[2*t+1]);
      end
    end
    p = OW'(sp);
    q = OW'(sq);
  end

endmodule
