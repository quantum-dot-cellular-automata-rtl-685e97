// tb_rsa_mod_reduce: all 256 8-bit inputs reduced modulo 10 (the default),
// plus a modulus-7 (3-bit result) and a modulus-13 instance, compared with
// the % operator.
module tb_rsa_mod_reduce;
  logic [7:0] p;
  logic [3:0] r10, r13;
  logic [2:0] r7;
  int checks = 0, failures = 0;

  rsa_mod_reduce dut10 (.p(p), .r(r10));
  rsa_mod_reduce #(.IN_W(8), .OUT_W(3), .MODULUS(7))  dut7  (.p(p), .r(r7));
  rsa_mod_reduce #(.IN_W(8), .OUT_W(4), .MODULUS(13)) dut13 (.p(p), .r(r13));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      p = 8'(v);
      #1;
      checks += 3;
      if (int'(r10) != v % 10) begin
        failures++;
        $display("FAIL mod10 %0d got %0d", v, r10);
      end
      if (int'(r7) != v % 7) begin
        failures++;
        $display("FAIL mod7 %0d got %0d", v, r7);
      end
      if (int'(r13) != v % 13) begin
        failures++;
        $display("FAIL mod13 %0d got %0d", v, r13);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
