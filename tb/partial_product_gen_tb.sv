// partial_product_gen_tb - checks every partial-product row against the
// arithmetic value x * y[j] * 2**j, and that the rows add up to x * y,
// for all 65536 operand pairs.
module partial_product_gen_tb;
  logic [7:0]       x, y;
  logic [7:0][15:0] pp;
  int checks = 0, failures = 0;

  partial_product_gen dut (.x(x), .y(y), .pp(pp));

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int total;
    for (int i = 0; i < 65536; i++) begin
      {x, y} = 16'(i);
      #1;
      total = 0;
      for (int j = 0; j < 8; j++) begin
        checks++;
        if (int'(pp[j]) != (y[j] ? int'(x) << j : 0)) begin
          failures++;
          if (failures < 10) $display("FAIL x=%0d y=%0d row %0d = %h", x, y, j, pp[j]);
        end
        total += int'(pp[j]);
      end
      checks++;
      if (total != int'(x) * int'(y)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
