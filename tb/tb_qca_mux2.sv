// tb_qca_mux2 -- exhaustive self-checking test of the majority-gate 2:1
// multiplexer. The expected output of each of the eight (a, b, s) cases comes
// from a truth table written out as a constant (bit index {s,b,a}), not from
// the multiplexer's equation.
module tb_qca_mux2;
  logic a, b, s, y;
  int checks = 0, failures = 0;
  // index {s,b,a}: s=0 -> a, s=1 -> b
  //   idx: 7 6 5 4 3 2 1 0
  //   exp: 1 1 0 0 1 0 1 0
  localparam logic [7:0] EXPECTED = 8'b1100_1010;

  qca_mux2 dut (.a(a), .b(b), .s(s), .y(y));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 2; rep++) begin
      for (int i = 0; i < 8; i++) begin
        {s, b, a} = 3'(i);
        #1;
        checks++;
        if (y !== EXPECTED[i]) begin
          failures++;
          $display("FAIL mux(a=%b,b=%b,s=%b) = %b, expected %b", a, b, s, y, EXPECTED[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
