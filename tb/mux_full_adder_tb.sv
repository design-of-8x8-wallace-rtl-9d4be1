// mux_full_adder_tb - checks the 8:1-multiplexer full adder against the
// full-adder truth table, written out row by row (A, B, Cin -> S, Cout).
module mux_full_adder_tb;
  logic a, b, cin, s, cout;
  int checks = 0, failures = 0;

  // {A, B, Cin, S, Cout} for the eight rows of the truth table
  localparam logic [4:0] TABLE [8] = '{
    5'b000_00, 5'b001_10, 5'b010_10, 5'b011_01,
    5'b100_10, 5'b101_01, 5'b110_01, 5'b111_11
  };

  mux_full_adder dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));

  initial begin : watchdog
    #10_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 8; r++) begin
      {a, b, cin} = TABLE[r][4:2];
      #1;
      checks++;
      if ({s, cout} !== TABLE[r][1:0]) begin
        failures++;
        $display("FAIL a=%b b=%b cin=%b: s=%b cout=%b expected %b", a, b, cin, s, cout, TABLE[r][1:0]);
      end
      // same row, also checked arithmetically
      checks++;
      if (2 * int'(cout) + int'(s) != int'(a) + int'(b) + int'(cin)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
