// rsa_mod_reduce: reduce an IN_W-bit product to its residue modulo MODULUS,
// with ripple rows of majority-gate full adders.
//
// The low OUT_W product bits are the starting value. Each higher bit i is
// worth 2^i mod n, so one adder row adds that constant when the bit is set;
// for n = 10 that puts bit 4 (16 = 6) into bits 1 and 2, bit 5 (32 = 2) into
// bit 1, bit 6 (64 = 4) into bit 2 and bit 7 (128 = 8) into bit 3. A carry
// out of the top bit is worth 2^OUT_W = K mod n (K = 2^OUT_W - n, 6 for
// n = 10), so a second row adds K when the first row carried ("end-around"
// carry). With 2^(OUT_W-1) < n <= 2^OUT_W that second row can never carry
// again. The value left is below 2^OUT_W but may still be n or more, so a
// last row corrects it like a BCD digit: it adds K, and if that carries the
// sum (value - n) is taken, otherwise the value itself.
//
// Folding high bits into the low word, the end-around carry and the BCD-style
// correction follow the design's description of its 8-to-4-bit reducer. That
// every high bit gets its exact weight 2^i mod n, and that the result is
// always the canonical residue 0..n-1, are this implementation's reading.
// The end-around rows' own carry outs are always 0 and stay unconnected.
// Combinational: 2*(IN_W-OUT_W)+1 rows of OUT_W full adders in series.
module rsa_mod_reduce #(
  parameter int unsigned IN_W    = 8,
  parameter int unsigned OUT_W   = 4,
  parameter int unsigned MODULUS = 10
) (
  input  logic [IN_W-1:0]  p,
  output logic [OUT_W-1:0] r
);
  localparam int unsigned NH = IN_W - OUT_W;            // bits to fold
  localparam logic [OUT_W-1:0] K = OUT_W'((1 << OUT_W) - MODULUS);

  // Weight of product bit i modulo MODULUS.
  function automatic logic [OUT_W-1:0] bit_weight(input int unsigned i);
    int unsigned w = 1 % MODULUS;
    for (int unsigned k = 0; k < i; k++) w = (w * 2) % MODULUS;
    return OUT_W'(w);
  endfunction

  initial begin : check_params
    assert (IN_W > OUT_W && MODULUS > (1 << (OUT_W - 1)) && MODULUS <= (1 << OUT_W))
      else $fatal(1, "rsa_mod_reduce: need IN_W > OUT_W and 2^(OUT_W-1) < MODULUS <= 2^OUT_W");
  end

  // acc[k]: running value after k high bits have been folded in.
  logic [OUT_W-1:0] acc [NH+1];
  assign acc[0] = p[OUT_W-1:0];

  for (genvar k = 0; k < NH; k++) begin : g_fold
    localparam logic [OUT_W-1:0] WK = bit_weight(OUT_W + k);
    logic [OUT_W-1:0] add_b, s1, wrap_b;
    logic [OUT_W:0]   c1, c2;

    // Row 1: acc + (p[OUT_W+k] ? WK : 0)
    assign c1[0] = 1'b0;
    for (genvar j = 0; j < OUT_W; j++) begin : g_add
      qca_majority u_and (.a(p[OUT_W+k]), .b(WK[j]), .c(1'b0), .y(add_b[j]));
      qca_full_adder u_fa (.a(acc[k][j]), .b(add_b[j]), .cin(c1[j]),
                           .sum(s1[j]), .cout(c1[j+1]));
    end

    // Row 2: end-around carry, s1 + (carry ? K : 0)
    assign c2[0] = 1'b0;
    for (genvar j = 0; j < OUT_W; j++) begin : g_wrap
      qca_majority u_and (.a(c1[OUT_W]), .b(K[j]), .c(1'b0), .y(wrap_b[j]));
      qca_full_adder u_fa (.a(s1[j]), .b(wrap_b[j]), .cin(c2[j]),
                           .sum(acc[k+1][j]), .cout(c2[j+1]));
    end
  end

  // Final BCD-style correction: acc + K carries exactly when acc >= n.
  logic [OUT_W-1:0] t;
  logic [OUT_W:0]   ct;
  assign ct[0] = 1'b0;
  for (genvar j = 0; j < OUT_W; j++) begin : g_corr
    qca_full_adder u_fa (.a(acc[NH][j]), .b(K[j]), .cin(ct[j]),
                         .sum(t[j]), .cout(ct[j+1]));
  end

  assign r = ct[OUT_W] ? t : acc[NH];
endmodule
