// tb_poly_cmult: end-to-end check of the polynomial-encoding complex
// multiplier. The worked example (150 + j230)(102 + j218) must give the
// listed c_k and P + jQ = -34840 + j56160. Random operands are then checked
// against the complex product computed in 64-bit integers, at the default
// N = 8, M = 2, and at N = 16 with M = 2 (4-bit digits) and M = 3 (2-bit
// digits, 16-point convolution). Corner operands (all zeros, all ones) are
// included.
module tb_poly_cmult;
  int checks = 0, failures = 0;

  logic [7:0]          ar8, ai8, br8, bi8;
  logic signed [20:0]  c8 [8];
  logic signed [17:0]  p8, q8;

  logic [15:0]         ar16, ai16, br16, bi16;
  logic signed [36:0]  c16a [8];
  logic signed [33:0]  p16a, q16a;
  logic signed [37:0]  c16b [16];
  logic signed [33:0]  p16b, q16b;

  poly_cmult dut8 (.a_re(ar8), .a_im(ai8), .b_re(br8), .b_im(bi8), .c(c8), .p(p8), .q(q8));
  poly_cmult #(.N(16), .M(2)) dut16a (.a_re(ar16), .a_im(ai16), .b_re(br16), .b_im(bi16), .c(c16a), .p(p16a), .q(q16a));
  poly_cmult #(.N(16), .M(3)) dut16b (.a_re(ar16), .a_im(ai16), .b_re(br16), .b_im(bi16), .c(c16b), .p(p16b), .q(q16b));

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

  task automatic apply(input longint xr, input longint xi, input longint yr, input longint yi);
    ar8 = 8'(xr); ai8 = 8'(xi); br8 = 8'(yr); bi8 = 8'(yi);
    ar16 = 16'(xr); ai16 = 16'(xi); br16 = 16'(yr); bi16 = 16'(yi);
    #1;
    begin
      longint r8, i8, r16, i16;
      r8  = longint'(ar8) * longint'(br8) - longint'(ai8) * longint'(bi8);
      i8  = longint'(ar8) * longint'(bi8) + longint'(ai8) * longint'(br8);
      r16 = longint'(ar16) * longint'(br16) - longint'(ai16) * longint'(bi16);
      i16 = longint'(ar16) * longint'(bi16) + longint'(ai16) * longint'(br16);
      check_eq("N=8 P", longint'(p8), r8);
      check_eq("N=8 Q", longint'(q8), i8);
      check_eq("N=16 M=2 P", longint'(p16a), r16);
      check_eq("N=16 M=2 Q", longint'(q16a), i16);
      check_eq("N=16 M=3 P", longint'(p16b), r16);
      check_eq("N=16 M=3 Q", longint'(q16b), i16);
    end
  endtask

  initial begin
    automatic longint ex [8] = '{7216, 37104, 31856, -13352, -7956, 4104, 2244, -1600};
    apply(150, 230, 102, 218);
    for (int k = 0; k < 8; k++) check_eq($sformatf("example c%0d", k), longint'(c8[k]), ex[k]);
    check_eq("example P", longint'(p8), -34840);
    check_eq("example Q", longint'(q8), 56160);
    apply(0, 0, 0, 0);
    apply(65535, 65535, 65535, 65535);
    apply(0, 65535, 0, 65535);
    apply(65535, 0, 0, 65535);
    repeat (3000) apply(longint'($urandom), longint'($urandom), longint'($urandom), longint'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
