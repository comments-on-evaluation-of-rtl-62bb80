// tb_csa_row: checks the carry-save row at N = 32 with random and corner
// operands: S + C must equal A + B + ~K modulo 2^32, S must be the carry-free
// bitwise sum A ^ B ^ ~K, and bit 0 of C must be 0.
module tb_csa_row;
  int checks = 0, failures = 0;
  logic [31:0] a, b, k, s, c;

  csa_row dut (.a(a), .b(b), .k(k), .s(s), .c(c));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [31:0] ta, input logic [31:0] tb, input logic [31:0] tk);
    logic [31:0] want;
    a = ta; b = tb; k = tk;
    #1;
    want = ta + tb + ~tk;
    checks++;
    if (s + c != want) begin
      failures++;
      $display("FAIL sum: a=%h b=%h k=%h s=%h c=%h", ta, tb, tk, s, c);
    end
    checks++;
    if (s != (ta ^ tb ^ ~tk) || c[0] != 1'b0) begin
      failures++;
      $display("FAIL shape: a=%h b=%h k=%h s=%h c=%h", ta, tb, tk, s, c);
    end
  endtask

  initial begin
    apply('0, '0, '0);
    apply('1, '1, '0);
    apply('1, '1, '1);
    apply(32'h8000_0000, 32'h8000_0000, 32'h0);
    repeat (3000) apply($urandom, $urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
