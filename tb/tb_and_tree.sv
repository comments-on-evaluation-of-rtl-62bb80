// tb_and_tree: checks the AND tree at N = 32 (default), N = 5 and N = 1:
// all ones gives 1, a single zero at any position gives 0, and random words
// are compared with the reduction &x.
module tb_and_tree;
  int checks = 0, failures = 0;
  logic [31:0] x32;
  logic [4:0]  x5;
  logic [0:0]  x1;
  logic        y32, y5, y1;

  and_tree dut32 (.x(x32), .y(y32));
  and_tree #(.N(5)) dut5 (.x(x5), .y(y5));
  and_tree #(.N(1)) dut1 (.x(x1), .y(y1));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [31:0] v);
    x32 = v; x5 = v[4:0]; x1 = v[0:0];
    #1;
    checks += 3;
    if (y32 != &x32) begin failures++; $display("FAIL N=32 x=%h y=%b", x32, y32); end
    if (y5 != &x5)   begin failures++; $display("FAIL N=5 x=%b y=%b", x5, y5); end
    if (y1 != x1[0]) begin failures++; $display("FAIL N=1 x=%b y=%b", x1, y1); end
  endtask

  initial begin
    apply('1);
    apply('0);
    for (int i = 0; i < 32; i++) apply(~(32'h1 << i));
    for (int i = 0; i < 32; i++) apply(32'h1 << i);
    repeat (500) apply($urandom | $urandom | $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
