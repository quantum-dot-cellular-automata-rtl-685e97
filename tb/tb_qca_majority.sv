// tb_qca_majority: exhaustive check of the majority gate against a count of
// ones (output 1 when at least two inputs are 1), including its use as AND
// (c = 0) and OR (c = 1).
module tb_qca_majority;
  logic a, b, c, y;
  int checks = 0, failures = 0;

  qca_majority dut (.a(a), .b(b), .c(c), .y(y));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      checks++;
      if (y !== ((int'(a) + int'(b) + int'(c)) >= 2)) begin
        failures++;
        $display("FAIL majority a=%0b b=%0b c=%0b y=%0b", a, b, c, y);
      end
      checks++;
      if (!c && y !== (a & b)) failures++;
      if (c && y !== (a | b)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
