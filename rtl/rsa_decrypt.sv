// rsa_decrypt: RSA decryption M = C^7 mod n with the private key {7, 10},
// using three multiplications instead of seven.
//
//   multiplier 1 and 2 (an rsa_encrypt instance): s2 = C^2, s3 = C^3 mod n
//   multiplier 3:                                  s4 = s2 * s2 = C^4 mod n
//   selection logic:                               M  = C^4 * C^3 mod n
//
// Modulo 10, C^4 can only be 0, 1, 5 or 6, so the last product needs no
// multiplier: 0 gives 0, 1 gives C^3, 6 gives C^3 as well (6*y = y mod 10
// for even y, and C^4 = 6 only for even C, so C^3 is even), and 5 gives 5
// (C^4 = 5 only for C = 5, whose C^3 is odd). The selection is one majority
// gate used as AND, one XOR and an AND-OR output stage; it reads only bits 0
// and 2 of C^4, which is why the lint tool reports bits 1 and 3 unused.
//
// Three multiplications plus gate logic, and the reuse of the encryption
// stage, follow the design; the exact gate function is derived here from the
// arithmetic above and is only valid for n = 10, which an elaboration check
// enforces. Combinational.
module rsa_decrypt
#(
  parameter int unsigned MSG_W = rsa_qca_pkg::MSG_W,
  parameter int unsigned KEY_N = rsa_qca_pkg::KEY_N
) (
  input  logic [MSG_W-1:0] c,
  output logic [MSG_W-1:0] m
);
  initial begin : check_params
    assert (KEY_N == 10 && MSG_W >= 4)
      else $fatal(1, "rsa_decrypt: the selection logic is derived for n = 10");
  end

  logic [MSG_W-1:0]   s2, s3, s4;
  logic [2*MSG_W-1:0] prod_4;

  rsa_encrypt #(.MSG_W(MSG_W), .KEY_N(KEY_N)) u_cube (.m(c), .c(s3), .m_sq(s2));

  qca_array_mult #(.W(MSG_W)) u_mul_4 (.a(s2), .b(s2), .p(prod_4));
  rsa_mod_reduce #(.IN_W(2*MSG_W), .OUT_W(MSG_W), .MODULUS(KEY_N))
    u_red_4 (.p(prod_4), .r(s4));

  // s4 is one of 0 (0000), 1 (0001), 5 (0101) or 6 (0110): bits 0 and 2
  // alone tell them apart, so bits 1 and 3 of s4 are not used.
  logic sel_pass, sel_five;
  qca_majority u_five (.a(s4[0]), .b(s4[2]), .c(1'b0), .y(sel_five)); // 5
  assign sel_pass = s4[0] ^ s4[2];                                     // 1 or 6

  assign m = ({MSG_W{sel_pass}} & s3) | ({MSG_W{sel_five}} & MSG_W'(5));
endmodule
