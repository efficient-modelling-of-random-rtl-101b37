// tb_qca_inv -- self-checking test of the QCA inverter: both input values,
// several times in alternation, against a fixed table of expected outputs.
module tb_qca_inv;
  logic a, y;
  int checks = 0, failures = 0;
  localparam logic [1:0] EXPECTED = 2'b01;  // EXPECTED[a] = ~a

  qca_inv dut (.a(a), .y(y));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 6; i++) begin
      a = 1'(i);
      #1;
      checks++;
      if (y !== EXPECTED[a]) begin
        failures++;
        $display("FAIL inv(%b) = %b", a, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
