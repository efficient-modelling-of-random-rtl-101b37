// tb_qca_maj3 -- exhaustive self-checking test of the three-input majority
// gate. For all eight input combinations the expected output is worked out by
// counting the ones among the inputs (two or more -> 1), independently of the
// gate's sum-of-products form. Also checks the AND (one input 0) and OR (one
// input 1) uses the multiplexer relies on.
module tb_qca_maj3;
  logic a, b, c, y;
  int checks = 0, failures = 0;

  qca_maj3 dut (.a(a), .b(b), .c(c), .y(y));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      int ones;
      logic exp_y;
      {a, b, c} = 3'(i);
      #1;
      ones  = int'(a) + int'(b) + int'(c);
      exp_y = (ones >= 2);
      checks++;
      if (y !== exp_y) begin
        failures++;
        $display("FAIL maj(%b,%b,%b) = %b, expected %b", a, b, c, y, exp_y);
      end
    end
    // Majority as AND / OR
    for (int i = 0; i < 4; i++) begin
      {a, b} = 2'(i);
      c = 1'b0; #1; checks++;
      if (y !== (i == 3)) begin failures++; $display("FAIL AND use %b%b", a, b); end
      c = 1'b1; #1; checks++;
      if (y !== (i != 0)) begin failures++; $display("FAIL OR use %b%b", a, b); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
