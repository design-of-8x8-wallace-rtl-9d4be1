// mux8to1_tb - exhaustive self-check of the 8:1 multiplexer.
// For every select code and many data words, y must equal d[s].
module mux8to1_tb;
  logic [7:0] d;
  logic [2:0] s;
  logic       y;
  int checks = 0, failures = 0;

  mux8to1 dut (.d(d), .s(s), .y(y));

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int dv = 0; dv < 256; dv++) begin
      for (int sv = 0; sv < 8; sv++) begin
        d = 8'(dv);
        s = 3'(sv);
        #1;
        checks++;
        if (y !== ((dv >> sv) & 1)) begin
          failures++;
          $display("FAIL d=%b s=%0d y=%b", d, s, y);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
