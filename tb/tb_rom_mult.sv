// tb_rom_mult: exhaustive check of the digit table multiplier.
// Every pair of digits is applied to a DW = 2 instance (the default) and a
// DW = 3 instance, and the output is compared with the integer product.
module tb_rom_mult;
  int checks = 0, failures = 0;

  logic [1:0] x2, y2;
  logic [3:0] p2;
  logic [2:0] x3, y3;
  logic [5:0] p3;

  rom_mult dut2 (.x(x2), .y(y2), .p(p2));
  rom_mult #(.DW(3)) dut3 (.x(x3), .y(y3), .p(p3));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) begin
        x2 = 2'(i); y2 = 2'(j);
        #1;
        checks++;
        if (int'(p2) != i * j) begin
          failures++;
          $display("FAIL DW=2 %0d*%0d gave %0d", i, j, p2);
        end
      end
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++) begin
        x3 = 3'(i); y3 = 3'(j);
        #1;
        checks++;
        if (int'(p3) != i * j) begin
          failures++;
          $display("FAIL DW=3 %0d*%0d gave %0d", i, j, p3);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
