// multiplier_tb - end-to-end check of the 8x8 multiplier at its default
// (and only) size: all 65536 operand pairs, compared with x*y computed here.
// It first applies the reference vector 234 x 142 = 33228, then 10 x 0 = 0.
// It also counts how often each mechanism of the datapath was exercised and
// counts a failure for any that never happened:
//   - a carry-select block taking its carry-in = 1 result (in any block;
//     block 1 never gets a carry, because the reduced rows never carry out
//     of the low four columns, so the count is printed per block),
//   - a carry-select block taking its carry-in = 0 result (per block 1..3),
//   - a 5:2 compressor passing a cout1 / cout2 to its upper neighbour, in
//     each of the two compressor layers.
module multiplier_tb;
  logic [7:0]  x, y;
  logic [15:0] result;
  int checks = 0, failures = 0;
  int sel1 [1:3];
  int sel0 [1:3];
  int l1_cout1 = 0, l1_cout2 = 0, l2_cout1 = 0, l2_cout2 = 0;

  multiplier dut (.x(x), .y(y), .result(result));

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input int xv, input int yv);
    x = 8'(xv);
    y = 8'(yv);
    #1;
    checks++;
    if (int'(result) != xv * yv) begin
      failures++;
      if (failures < 10) $display("FAIL %0d x %0d = %0d", xv, yv, result);
    end
    for (int k = 1; k <= 3; k++) begin
      if (dut.u_cpa.c[k]) sel1[k]++;
      else                sel0[k]++;
    end
    if (dut.u_red.u_layer1.c1[15:1] != 0) l1_cout1++;
    if (dut.u_red.u_layer1.c2[15:1] != 0) l1_cout2++;
    if (dut.u_red.u_layer2.c1[15:1] != 0) l2_cout1++;
    if (dut.u_red.u_layer2.c2[15:1] != 0) l2_cout2++;
  endtask

  initial begin
    for (int k = 1; k <= 3; k++) begin
      sel1[k] = 0;
      sel0[k] = 0;
    end
    apply(234, 142);
    checks++;
    if (result != 16'd33228) failures++;
    apply(10, 0);
    for (int xv = 0; xv < 256; xv++)
      for (int yv = 0; yv < 256; yv++)
        apply(xv, yv);

    for (int k = 1; k <= 3; k++) begin
      $display("carry-select block %0d: carry-in 1 result taken %0d times, carry-in 0 result %0d times",
               k, sel1[k], sel0[k]);
      checks++;
      if (sel0[k] == 0) failures++;
    end
    checks++;
    if (sel1[1] + sel1[2] + sel1[3] == 0) failures++;
    $display("compressor layer 1: cout1 passed on %0d times, cout2 %0d times", l1_cout1, l1_cout2);
    $display("compressor layer 2: cout1 passed on %0d times, cout2 %0d times", l2_cout1, l2_cout2);
    checks += 4;
    if (l1_cout1 == 0) failures++;
    if (l1_cout2 == 0) failures++;
    if (l2_cout1 == 0) failures++;
    if (l2_cout2 == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
