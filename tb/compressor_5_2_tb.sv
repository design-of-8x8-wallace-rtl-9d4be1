// compressor_5_2_tb - exhaustive check of the 5:2 compressor over all 128
// input combinations: the weighted output count must equal the number of
// ones in, and cout1, cout2 must not change when only cin1, cin2 change.
module compressor_5_2_tb;
  logic x1, x2, x3, x4, x5, cin1, cin2;
  logic sum, carry, cout1, cout2;
  logic [1:0] couts_ref;
  int checks = 0, failures = 0;

  compressor_5_2 dut (
    .x1(x1), .x2(x2), .x3(x3), .x4(x4), .x5(x5), .cin1(cin1), .cin2(cin2),
    .sum(sum), .carry(carry), .cout1(cout1), .cout2(cout2)
  );

  initial begin : watchdog
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int xs = 0; xs < 32; xs++) begin
      for (int cs = 0; cs < 4; cs++) begin
        {x5, x4, x3, x2, x1} = 5'(xs);
        {cin2, cin1} = 2'(cs);
        #1;
        checks++;
        if (int'(sum) + 2 * (int'(carry) + int'(cout1) + int'(cout2)) != $countones(xs) + $countones(cs)) begin
          failures++;
          $display("FAIL x=%b cin=%b: sum=%b carry=%b cout1=%b cout2=%b", 5'(xs), 2'(cs), sum, carry, cout1, cout2);
        end
        if (cs == 0) couts_ref = {cout2, cout1};
        checks++;
        if ({cout2, cout1} !== couts_ref) begin
          failures++;
          $display("FAIL couts depend on cin: x=%b cin=%b", 5'(xs), 2'(cs));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
