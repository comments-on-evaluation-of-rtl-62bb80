// tb_apb_eq_k: checks the A + B = K evaluator. At N = 4 every one of the
// 4096 operand triples is applied; at the default N = 32 random triples are
// applied with K = A + B (must give 1, including sums that overflow and
// negative 2's-complement operands) and with K = A + B + d for random nonzero
// d (must give 0), the reference being the ordinary sum.
module tb_apb_eq_k;
  int checks = 0, failures = 0;
  int hits = 0;
  logic [3:0]  a4, b4, k4;
  logic        e4;
  logic [31:0] a, b, k;
  logic        e;

  apb_eq_k #(.N(4)) dut4 (.a(a4), .b(b4), .k(k4), .e(e4));
  apb_eq_k dut (.a(a), .b(b), .k(k), .e(e));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [31:0] ta, input logic [31:0] tb, input logic [31:0] tk);
    logic [31:0] sum;
    a = ta; b = tb; k = tk;
    #1;
    sum = ta + tb;
    checks++;
    if (e != (sum == tk)) begin
      failures++;
      $display("FAIL N=32 a=%h b=%h k=%h e=%b", ta, tb, tk, e);
    end
    if (e) hits++;
  endtask

  initial begin
    for (int v = 0; v < 4096; v++) begin
      {a4, b4, k4} = 12'(v);
      #1;
      checks++;
      if (e4 != (4'(a4 + b4) == k4)) begin
        failures++;
        $display("FAIL N=4 a=%0d b=%0d k=%0d e=%b", a4, b4, k4, e4);
      end
    end
    apply(32'hFFFF_FFFF, 32'h1, 32'h0);
    apply(32'hFFFF_FFFF, 32'h1, 32'h1);
    apply(32'hFFFF_FFFB, 32'h3, 32'hFFFF_FFFE);   // -5 + 3 = -2
    repeat (2000) begin
      logic [31:0] ra, rb, d;
      ra = $urandom; rb = $urandom;
      apply(ra, rb, ra + rb);
      d = $urandom;
      if (d == 0) d = 1;
      apply(ra, rb, ra + rb + d);
      d = 32'h1 << $urandom_range(0, 31);
      apply(ra, rb, ra + rb - d);
    end
    checks++;
    if (hits < 2000) begin
      failures++;
      $display("FAIL only %0d equal cases were recognised", hits);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
