// vedic_8x8: 8x8 Vedic multiplier built from four 4x4 Vedic multipliers.
//
// The operands are split into halves, a = {ah, al} and b = {bh, bl}, and four
// 4x4 blocks form the partial products
//   m0 = al*bl,  m1 = ah*bl,  m2 = al*bh,  m3 = ah*bh.
// Three binary parallel adders combine them, as in the source's 8x8 diagram:
//   s_lo  (8 bits) = m1 + {4'd0, m0[7:4]}
//   s_hi  (12 bits) = {m3, 4'd0} + {4'd0, m2}
//   q[15:4] (12 bits) = s_hi + {4'd0, s_lo}
//   q[3:0] = m0[3:0]
// The adders' carry outputs are dropped: at these alignments the sums cannot
// overflow, so the 16-bit product is exact. Pairing m2 with m3 and m1 with m0
// follows the source's figures and text.
//
// bin_field = 1 turns every block below into its binary-field form (carries
// suppressed), so q is then the carry-less GF(2) polynomial product of a and b.
//
// Purely combinational.
module vedic_8x8 (
  input  logic [7:0] a,
  input  logic [7:0] b,
  input  logic        bin_field,
  output logic [15:0] q
);

  logic [7:0] m0, m1, m2, m3;
  logic [7:0] s_lo;
  logic [11:0] s_hi, s_fin;
  logic        c_lo, c_hi, c_fin;  // carries, always 0 at these alignments (asserted)

  vedic_4x4 u_m0 (.a(a[3:0]),  .b(b[3:0]),  .bin_field(bin_field), .q(m0));
  vedic_4x4 u_m1 (.a(a[7:4]), .b(b[3:0]),  .bin_field(bin_field), .q(m1));
  vedic_4x4 u_m2 (.a(a[3:0]),  .b(b[7:4]), .bin_field(bin_field), .q(m2));
  vedic_4x4 u_m3 (.a(a[7:4]), .b(b[7:4]), .bin_field(bin_field), .q(m3));

  bpa_adder #(.WIDTH(8)) u_add_lo (
    .a(m1), .b({4'd0, m0[7:4]}), .bin_field(bin_field), .sum(s_lo), .cout(c_lo)
  );

  bpa_adder #(.WIDTH(12)) u_add_hi (
    .a({m3, 4'd0}), .b({4'd0, m2}), .bin_field(bin_field), .sum(s_hi), .cout(c_hi)
  );

  bpa_adder #(.WIDTH(12)) u_add_fin (
    .a(s_hi), .b({4'd0, s_lo}), .bin_field(bin_field), .sum(s_fin), .cout(c_fin)
  );

  assign q = {s_fin, m0[3:0]};

  // The operand alignment guarantees that no adder overflows.
  always_comb begin
    assert final (!(c_lo || c_hi || c_fin))
      else $error("vedic_8x8: adder carry out set for a=%h b=%h", a, b);
  end

endmodule
