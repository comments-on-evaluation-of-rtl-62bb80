// tb_arith_top: end-to-end test of both units at the top level, every
// parameter at its default (CM_N = 8, CM_M = 2, EQ_N = 32).
//
// Complex multiplier: the worked example (150 + j230)(102 + j218), which
// must give c_0..c_7 = 7216, 37104, 31856, -13352, -7956, 4104, 2244, -1600
// and P + jQ = -34840 + j56160, then random operands against the complex
// product. A + B = K evaluator: random triples with K = A + B, K one off, and
// K = A + B where the sum carries through at least 16 bit positions (the
// case a carry-propagate adder is slow on), against the ordinary sum.
// Each case the design distinguishes is counted: a negative and a
// non-negative real part, an equality found, an inequality found, an
// equality across a long carry chain, and an operand with the sign bit set.
// A case that never occurs counts as a failure.
module tb_arith_top;
  int checks = 0, failures = 0;
  int n_p_neg = 0, n_p_pos = 0, n_eq = 0, n_ne = 0, n_long = 0, n_signed = 0;

  logic [7:0]         cm_a_re, cm_a_im, cm_b_re, cm_b_im;
  logic signed [20:0] cm_c [8];
  logic signed [17:0] cm_p, cm_q;
  logic [31:0]        eq_a, eq_b, eq_k;
  logic               eq_e;

  arith_top dut (
    .cm_a_re(cm_a_re), .cm_a_im(cm_a_im), .cm_b_re(cm_b_re), .cm_b_im(cm_b_im),
    .cm_c(cm_c), .cm_p(cm_p), .cm_q(cm_q),
    .eq_a(eq_a), .eq_b(eq_b), .eq_k(eq_k), .eq_e(eq_e)
  );

  task automatic check_eq(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cmult(input logic [7:0] xr, input logic [7:0] xi, input logic [7:0] yr, input logic [7:0] yi);
    longint r, i;
    cm_a_re = xr; cm_a_im = xi; cm_b_re = yr; cm_b_im = yi;
    #1;
    r = longint'(xr) * longint'(yr) - longint'(xi) * longint'(yi);
    i = longint'(xr) * longint'(yi) + longint'(xi) * longint'(yr);
    check_eq("P", longint'(cm_p), r);
    check_eq("Q", longint'(cm_q), i);
    if (cm_p < 0) n_p_neg++;
    else          n_p_pos++;
  endtask

  // Number of positions at which adding x and y produces a carry.
  function automatic int carry_count(input logic [31:0] x, input logic [31:0] y);
    logic [32:0] s = {1'b0, x} + {1'b0, y};
    logic [32:0] carries = ({1'b0, x} ^ {1'b0, y} ^ s) >> 1;
    return $countones(carries);
  endfunction

  task automatic eqk(input logic [31:0] xa, input logic [31:0] xb, input logic [31:0] xk);
    logic want;
    eq_a = xa; eq_b = xb; eq_k = xk;
    #1;
    want = (32'(xa + xb) == xk);
    checks++;
    if (eq_e != want) begin
      failures++;
      $display("FAIL eq a=%h b=%h k=%h e=%b", xa, xb, xk, eq_e);
    end
    if (want) n_eq++;
    else      n_ne++;
    if (want && carry_count(xa, xb) >= 16) n_long++;
    if (xa[31] || xb[31]) n_signed++;
  endtask

  initial begin
    automatic longint ex [8] = '{7216, 37104, 31856, -13352, -7956, 4104, 2244, -1600};
    eq_a = '0; eq_b = '0; eq_k = '0;
    cmult(8'd150, 8'd230, 8'd102, 8'd218);
    for (int k = 0; k < 8; k++) check_eq($sformatf("example c%0d", k), longint'(cm_c[k]), ex[k]);
    check_eq("example P", longint'(cm_p), -34840);
    check_eq("example Q", longint'(cm_q), 56160);
    cmult('1, '1, '1, '1);
    cmult('0, '0, '0, '0);
    repeat (2000) cmult(8'($urandom), 8'($urandom), 8'($urandom), 8'($urandom));

    eqk(32'hFFFF_FFFF, 32'h0000_0001, 32'h0000_0000);
    eqk(32'h7FFF_FFFF, 32'h0000_0001, 32'h8000_0000);
    repeat (2000) begin
      logic [31:0] a, b, lo;
      a = $urandom; b = $urandom;
      eqk(a, b, a + b);
      eqk(a, b, a + b + 1);
      eqk(a, b, a + b - 32'(1 << $urandom_range(0, 31)));
      lo = 32'hFFFF_FFFF >> $urandom_range(0, 16);
      a = a | lo;
      b = (b & ~lo) | 32'h1;
      eqk(a, b, a + b);
    end

    $display("cases: P<0 %0d, P>=0 %0d, equal %0d, unequal %0d, long carry %0d, sign bit %0d",
             n_p_neg, n_p_pos, n_eq, n_ne, n_long, n_signed);
    checks++; if (n_p_neg == 0)  begin failures++; $display("FAIL no negative real part"); end
    checks++; if (n_p_pos == 0)  begin failures++; $display("FAIL no non-negative real part"); end
    checks++; if (n_eq == 0)     begin failures++; $display("FAIL no equality"); end
    checks++; if (n_ne == 0)     begin failures++; $display("FAIL no inequality"); end
    checks++; if (n_long == 0)   begin failures++; $display("FAIL no long carry chain"); end
    checks++; if (n_signed == 0) begin failures++; $display("FAIL no signed operand"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
