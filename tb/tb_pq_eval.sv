// tb_pq_eval: checks the evaluation of the product polynomial at x = j.
// The worked example's c_k must give P = -34840, Q = 56160; then random c_k
// that keep P and Q inside the 18-bit output are compared with
// P = c0 - c2 + c4 - c6 and Q = c1 - c3 + c5 - c7.
module tb_pq_eval;
  localparam int L = 8;
  int checks = 0, failures = 0;

  logic signed [20:0] c [L];
  logic signed [17:0] p, q;

  pq_eval dut (.c(c), .p(p), .q(q));

  task automatic check_eq(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic longint ex [L] = '{7216, 37104, 31856, -13352, -7956, 4104, 2244, -1600};
    for (int k = 0; k < L; k++) c[k] = 21'(ex[k]);
    #1;
    check_eq("example P", longint'(p), -34840);
    check_eq("example Q", longint'(q), 56160);
    repeat (2000) begin
      longint v [L];
      for (int k = 0; k < L; k++) begin
        v[k] = longint'($urandom_range(0, 60000)) - 30000;
        c[k] = 21'(v[k]);
      end
      #1;
      check_eq("P", longint'(p), v[0] - v[2] + v[4] - v[6]);
      check_eq("Q", longint'(q), v[1] - v[3] + v[5] - v[7]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
