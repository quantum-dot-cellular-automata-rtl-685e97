// tb_qca_array_mult: exhaustive check of the 4x4 array multiplier (all 256
// operand pairs) and of a 6x6 instance (all 4096 pairs) against integer
// multiplication.
module tb_qca_array_mult;
  logic [3:0] a4, b4;
  logic [7:0] p4;
  logic [5:0] a6, b6;
  logic [11:0] p6;
  int checks = 0, failures = 0;

  qca_array_mult dut4 (.a(a4), .b(b4), .p(p4));
  qca_array_mult #(.W(6)) dut6 (.a(a6), .b(b6), .p(p6));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 16; x++) begin
      for (int y = 0; y < 16; y++) begin
        a4 = 4'(x); b4 = 4'(y);
        #1;
        checks++;
        if (int'(p4) != x * y) begin
          failures++;
          $display("FAIL 4x4 %0d*%0d got %0d", x, y, p4);
        end
      end
    end
    for (int x = 0; x < 64; x++) begin
      for (int y = 0; y < 64; y++) begin
        a6 = 6'(x); b6 = 6'(y);
        #1;
        checks++;
        if (int'(p6) != x * y) begin
          failures++;
          if (failures < 10) $display("FAIL 6x6 %0d*%0d got %0d", x, y, p6);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
