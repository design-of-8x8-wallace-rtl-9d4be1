// ripple_carry_adder_tb - exhaustive check of the 4-bit ripple-carry adder
// (all operands and both carry-ins) and a random check of a 9-bit instance.
module ripple_carry_adder_tb;
  logic [3:0] a, b, s;
  logic       cin, cout;
  logic [8:0] a9, b9, s9;
  logic       cin9, cout9;
  int checks = 0, failures = 0;

  ripple_carry_adder dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));
  ripple_carry_adder #(.W(9)) dut9 (.a(a9), .b(b9), .cin(cin9), .s(s9), .cout(cout9));

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a9 = '0; b9 = '0; cin9 = 1'b0;
    for (int i = 0; i < 512; i++) begin
      {cin, a, b} = 9'(i);
      #1;
      checks++;
      if ({cout, s} !== 5'(int'(a) + int'(b) + int'(cin))) begin
        failures++;
        $display("FAIL %0d+%0d+%0d = %0d", a, b, cin, {cout, s});
      end
    end
    for (int i = 0; i < 2000; i++) begin
      a9 = 9'($urandom); b9 = 9'($urandom); cin9 = 1'($urandom);
      #1;
      checks++;
      if ({cout9, s9} !== 10'(int'(a9) + int'(b9) + int'(cin9))) begin
        failures++;
        $display("FAIL W=9 %0d+%0d+%0d = %0d", a9, b9, cin9, {cout9, s9});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
