// rsa_qca_top: 4-bit RSA transmitter and receiver with the key pair
// PU = {3, 10}, PR = {7, 10}.
//
// A message is encrypted with the public key, the ciphertext is held in a
// register as the transmitted word, and the receiver side decrypts it with
// the private key. Three register stages clock the chain:
//   cycle 0  in_valid/msg_in sampled into the input register
//   cycle 1  rsa_encrypt works; ciphertext registered at the end of it
//   cycle 2  cipher_valid/cipher_out/range_err visible; rsa_decrypt works
//   cycle 3  plain_valid/plain_out visible
// so a new message can enter every cycle, the ciphertext appears 2 cycles
// and the recovered message 3 cycles after in_valid. range_err marks a
// message that was not below n (RSA requires M < n); it is still encrypted
// and decrypted, but its plaintext will not come back unchanged.
//
// The encrypt and decrypt datapaths follow the design; the registers, the
// valid bits, the range flag and the synchronous active-low reset are this
// implementation's own, standing in for the QCA clock zones that move data
// through the original circuit. The encrypter's square output (m_sq) is left
// open here: only the decrypter uses it.
module rsa_qca_top
  import rsa_qca_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [MSG_W-1:0] msg_in,
  output logic             cipher_valid,
  output logic [MSG_W-1:0] cipher_out,
  output logic             range_err,
  output logic             plain_valid,
  output logic [MSG_W-1:0] plain_out
);
  initial begin : check_keys
    assert (KEY_N == KEY_P * KEY_Q && (KEY_E * KEY_D) % KEY_PHI == 1)
      else $fatal(1, "rsa_qca_top: inconsistent key constants");
  end

  msg_t m_q;
  logic v_q;
  msg_t c_d, m_sq_unused, p_d;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v_q          <= 1'b0;
      m_q          <= '0;
      cipher_valid <= 1'b0;
      cipher_out   <= '0;
      range_err    <= 1'b0;
      plain_valid  <= 1'b0;
      plain_out    <= '0;
    end else begin
      v_q          <= in_valid;
      m_q          <= msg_in;
      cipher_valid <= v_q;
      cipher_out   <= c_d;
      range_err    <= v_q && (m_q >= msg_t'(KEY_N));
      plain_valid  <= cipher_valid;
      plain_out    <= p_d;
    end
  end

  rsa_encrypt u_enc (.m(m_q), .c(c_d), .m_sq(m_sq_unused));
  rsa_decrypt u_dec (.c(cipher_out), .m(p_d));
endmodule
