// tb_rsa_encrypt: every 4-bit message through the encrypter. The ciphertext
// must equal M^3 mod 10 and the square output M^2 mod 10, both worked out by
// repeated multiplication with integers. For the valid messages 0..9 the
// ciphertexts must also be a permutation of 0..9 (RSA is a bijection on Z_n).
module tb_rsa_encrypt;
  logic [3:0] m, c, m_sq;
  int checks = 0, failures = 0;
  bit seen [10];

  rsa_encrypt dut (.m(m), .c(c), .m_sq(m_sq));

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
    foreach (seen[i]) seen[i] = 1'b0;
    for (int v = 0; v < 16; v++) begin
      m = 4'(v);
      #1;
      checks += 2;
      if (int'(c) != pow_mod(v, 3, 10)) begin
        failures++;
        $display("FAIL C(%0d) got %0d expected %0d", v, c, pow_mod(v, 3, 10));
      end
      if (int'(m_sq) != pow_mod(v, 2, 10)) begin
        failures++;
        $display("FAIL M^2(%0d) got %0d", v, m_sq);
      end
      if (v < 10 && c < 10) seen[c] = 1'b1;
    end
    for (int i = 0; i < 10; i++) begin
      checks++;
      if (!seen[i]) begin
        failures++;
        $display("FAIL ciphertext %0d never produced", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
