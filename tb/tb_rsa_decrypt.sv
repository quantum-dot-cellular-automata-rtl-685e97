// tb_rsa_decrypt: every 4-bit ciphertext through the decrypter, compared with
// C^7 mod 10 from seven integer multiplications; then, for every message
// below 10, the ciphertext M^3 mod 10 (computed here) must decrypt to M.
module tb_rsa_decrypt;
  logic [3:0] c, m;
  int checks = 0, failures = 0;

  rsa_decrypt dut (.c(c), .m(m));

  function automatic int pow_mod(int base, int e, int n);
    int r = 1;
    for (int k = 0; k < e; k++) r = (r * base) % n;
    return r;
  endfunction

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      c = 4'(v);
      #1;
      checks++;
      if (int'(m) != pow_mod(v, 7, 10)) begin
        failures++;
        $display("FAIL D(%0d) got %0d expected %0d", v, m, pow_mod(v, 7, 10));
      end
    end
    for (int msg = 0; msg < 10; msg++) begin
      c = 4'(pow_mod(msg, 3, 10));
      #1;
      checks++;
      if (int'(m) != msg) begin
        failures++;
        $display("FAIL round trip M=%0d C=%0d got %0d", msg, c, m);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
