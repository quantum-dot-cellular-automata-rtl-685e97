// qca_array_mult: unsigned W x W carry-ripple array multiplier.
//
// Partial product bit pp[i][j] = a[j] AND b[i] is a majority gate with its
// third input tied to 0. Row 0 is the first running sum. Each later row i
// adds pp[i] to the upper W bits of the running sum with a W-bit ripple chain
// of qca_full_adder cells (carry in 0); the low bit of each row is a finished
// product bit and the row's carry out becomes the new top bit. After the last
// row the remaining W bits are the top half of the product.
//
// The design only calls this a "4-bit multiplier"; the array form, the
// majority-gate AND and W = 4 as the default are this implementation's
// reading of it. Combinational; the critical path runs through W-1 ripple
// rows.
module qca_array_mult #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic [2*W-1:0] p
);
  // pp[i][j] = a[j] & b[i]
  logic [W-1:0] pp [W];
  // upper[i]: bits i+1 .. i+W of the running sum after row i
  logic [W-1:0] upper [W];

  for (genvar i = 0; i < W; i++) begin : g_pp_row
    for (genvar j = 0; j < W; j++) begin : g_pp_bit
      qca_majority u_and (.a(a[j]), .b(b[i]), .c(1'b0), .y(pp[i][j]));
    end
  end

  // Row 0: the first partial product itself.
  assign p[0]     = pp[0][0];
  assign upper[0] = {1'b0, pp[0][W-1:1]};

  for (genvar i = 1; i < W; i++) begin : g_row
    logic [W-1:0] s;
    logic [W:0]   c;
    assign c[0] = 1'b0;
    for (genvar j = 0; j < W; j++) begin : g_fa
      qca_full_adder u_fa (
        .a   (upper[i-1][j]),
        .b   (pp[i][j]),
        .cin (c[j]),
        .sum (s[j]),
        .cout(c[j+1])
      );
    end
    assign p[i]     = s[0];
    assign upper[i] = {c[W], s[W-1:1]};
  end

  assign p[2*W-1:W] = upper[W-1];
endmodule
