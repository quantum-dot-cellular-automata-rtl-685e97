// rsa_qca_pkg: key constants and sizes shared by the RSA datapath.
//
// The key pair is the small textbook one the design is built around:
// primes p = 2 and q = 5 give n = 10 and phi(n) = 4; e = 3 is coprime with
// phi(n) and d = 7 satisfies e*d = 21 = 1 mod 4. The public key is {3, 10},
// the private key {7, 10}. Messages are 4 bits wide and must be below n.
// The exponents are not run-time values: e = 3 is built into rsa_encrypt as
// two multiplications and d = 7 into rsa_decrypt as three multiplications
// plus selection logic, so the constants here document and check them.
package rsa_qca_pkg;

  localparam int unsigned KEY_P  = 2;
  localparam int unsigned KEY_Q  = 5;
  localparam int unsigned KEY_N  = KEY_P * KEY_Q;               // 10
  localparam int unsigned KEY_PHI = (KEY_P - 1) * (KEY_Q - 1);  // 4
  localparam int unsigned KEY_E  = 3;
  localparam int unsigned KEY_D  = 7;

  localparam int unsigned MSG_W  = 4;          // message / ciphertext width

  typedef logic [MSG_W-1:0] msg_t;

endpackage
