// csa_block_tb - exhaustive check of the 4-bit carry-select block: every
// operand pair with the carry-in at 0 and at 1, so both precomputed results
// are selected and must be right.
module csa_block_tb;
  logic [3:0] a, b, s;
  logic       cin, cout;
  int checks = 0, failures = 0;

  csa_block dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 512; i++) begin
      {cin, a, b} = 9'(i);
      #1;
      checks++;
      if ({cout, s} !== 5'(int'(a) + int'(b) + int'(cin))) begin
        failures++;
        $display("FAIL %0d+%0d+%0d = %0d", a, b, cin, {cout, s});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
