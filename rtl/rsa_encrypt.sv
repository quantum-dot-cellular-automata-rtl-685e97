// rsa_encrypt: RSA encryption C = M^3 mod n with the public key {3, 10}.
//
// The exponent e = 3 is unrolled into two multiplications. The message is
// squared in a 4-bit array multiplier, the 8-bit square is reduced to a 4-bit
// residue mod n, and that residue is multiplied by the message once more and
// reduced again. The intermediate square M^2 mod n is brought out as well,
// because decryption reuses the same first stage.
//
// Structure (square, reduce, multiply, reduce) follows the design; reducing
// each product all the way to 0..n-1 is this implementation's choice. The
// message must be below n for the result to be an RSA ciphertext; larger
// inputs still give M^3 mod n. Combinational.
module rsa_encrypt
#(
  parameter int unsigned MSG_W = rsa_qca_pkg::MSG_W,
  parameter int unsigned KEY_N = rsa_qca_pkg::KEY_N
) (
  input  logic [MSG_W-1:0] m,
  output logic [MSG_W-1:0] c,
  output logic [MSG_W-1:0] m_sq
);
  logic [2*MSG_W-1:0] prod_sq, prod_cube;

  qca_array_mult #(.W(MSG_W)) u_mul_sq (.a(m), .b(m), .p(prod_sq));
  rsa_mod_reduce #(.IN_W(2*MSG_W), .OUT_W(MSG_W), .MODULUS(KEY_N))
    u_red_sq (.p(prod_sq), .r(m_sq));

  qca_array_mult #(.W(MSG_W)) u_mul_cube (.a(m_sq), .b(m), .p(prod_cube));
  rsa_mod_reduce #(.IN_W(2*MSG_W), .OUT_W(MSG_W), .MODULUS(KEY_N))
    u_red_cube (.p(prod_cube), .r(c));
endmodule
