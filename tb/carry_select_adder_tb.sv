// carry_select_adder_tb - checks the 16-bit carry-select adder with
// corner cases (carries that run through every block) and random operands.
module carry_select_adder_tb;
  logic [15:0] a, b, s;
  logic        cin, cout;
  int checks = 0, failures = 0;

  carry_select_adder dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [15:0] ta, input logic [15:0] tb_, input logic tc);
    a = ta; b = tb_; cin = tc;
    #1;
    checks++;
    if ({cout, s} !== 17'(int'(ta) + int'(tb_) + int'(tc))) begin
      failures++;
      $display("FAIL %0d+%0d+%0d = %0d", ta, tb_, tc, {cout, s});
    end
  endtask

  initial begin
    check(16'hffff, 16'h0000, 1'b1);   // carry through all four blocks
    check(16'hffff, 16'hffff, 1'b1);
    check(16'h0fff, 16'h0001, 1'b0);
    check(16'h00f0, 16'h0010, 1'b0);
    check(16'h0000, 16'h0000, 1'b0);
    check(16'h8000, 16'h8000, 1'b0);
    for (int i = 0; i < 20000; i++) check(16'($urandom), 16'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
