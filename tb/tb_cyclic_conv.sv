// tb_cyclic_conv: checks the L-point cyclic convolution.
// First the encoded operands of the worked example (A = 150 + j230,
// B = 102 + j218) must give c = 7216, 37104, 31856, -13352, -7956, 4104,
// 2244, -1600. Then random digits, weight exponents and signs are applied
// and every c_k is compared with sum_i a_i * b_((k-i) mod 8) computed in
// 64-bit integers.
module tb_cyclic_conv;
  localparam int L = 8;
  int checks = 0, failures = 0;

  logic [1:0]         a_dig [L], b_dig [L];
  logic [3:0]         a_shf [L], b_shf [L];
  logic               a_neg [L], b_neg [L];
  logic signed [20:0] c [L];

  cyclic_conv dut (.a_dig(a_dig), .a_shf(a_shf), .a_neg(a_neg),
                   .b_dig(b_dig), .b_shf(b_shf), .b_neg(b_neg), .c(c));

  function automatic longint val(input logic [1:0] d, input logic [3:0] s, input logic n);
    automatic longint v = longint'(d) << s;
    return n ? -v : v;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic longint ex [L] = '{7216, 37104, 31856, -13352, -7956, 4104, 2244, -1600};
    automatic int     da [L] = '{2, 3, 1, 2, 1, 1, 2, 2};
    automatic int     db [L] = '{1, 3, 2, 1, 1, 2, 2, 2};
    automatic int     sh [L] = '{6, 6, 4, 4, 2, 2, 0, 0};
    for (int i = 0; i < L; i++) begin
      a_dig[i] = 2'(da[i]); b_dig[i] = 2'(db[i]);
      a_shf[i] = 4'(sh[i]); b_shf[i] = 4'(sh[i]);
      a_neg[i] = logic'((i / 2) % 2); b_neg[i] = logic'((i / 2) % 2);
    end
    #1;
    for (int k = 0; k < L; k++) begin
      checks++;
      if (longint'(c[k]) != ex[k]) begin
        failures++;
        $display("FAIL example c%0d = %0d expected %0d", k, c[k], ex[k]);
      end
    end

    repeat (2000) begin
      for (int i = 0; i < L; i++) begin
        a_dig[i] = 2'($urandom); b_dig[i] = 2'($urandom);
        a_shf[i] = 4'($urandom_range(0, 6)); b_shf[i] = 4'($urandom_range(0, 6));
        a_neg[i] = 1'($urandom); b_neg[i] = 1'($urandom);
      end
      #1;
      for (int k = 0; k < L; k++) begin
        automatic longint r = 0;
        for (int i = 0; i < L; i++)
          r += val(a_dig[i], a_shf[i], a_neg[i]) * val(b_dig[(k - i + L) % L], b_shf[(k - i + L) % L], b_neg[(k - i + L) % L]);
        checks++;
        if (longint'(c[k]) != r) begin
          failures++;
          $display("FAIL random c%0d = %0d expected %0d", k, c[k], r);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
