// tb_fa_cell: exhaustive check of the (3,2)-counter: 2*c + s must equal the
// number of ones among the three inputs.
module tb_fa_cell;
  int checks = 0, failures = 0;
  logic x, y, z, s, c;

  fa_cell dut (.x(x), .y(y), .z(z), .s(s), .c(c));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {x, y, z} = 3'(v);
      #1;
      checks++;
      if (2 * int'(c) + int'(s) != int'(x) + int'(y) + int'(z)) begin
        failures++;
        $display("FAIL %b%b%b -> c=%b s=%b", x, y, z, c, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
