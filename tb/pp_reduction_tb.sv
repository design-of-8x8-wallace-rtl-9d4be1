// pp_reduction_tb - feeds the reduction the partial-product rows of every
// 8x8 operand pair (formed here, independently of the design) and checks
// that its two output rows add up to the product.
module pp_reduction_tb;
  logic [7:0][15:0] pp;
  logic [15:0]      sum, carry;
  int checks = 0, failures = 0;

  pp_reduction dut (.pp(pp), .sum(sum), .carry(carry));

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 256; x++) begin
      for (int y = 0; y < 256; y++) begin
        for (int j = 0; j < 8; j++) pp[j] = ((y >> j) & 1) != 0 ? 16'(x << j) : 16'd0;
        #1;
        checks++;
        if (16'(sum + carry) !== 16'(x * y)) begin
          failures++;
          if (failures < 10) $display("FAIL x=%0d y=%0d: sum=%h carry=%h", x, y, sum, carry);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
