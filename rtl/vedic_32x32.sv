// vedic_32x32: 32x32 Vedic multiplier built from four 16x16 Vedic multipliers.
//
// The operands are split into halves, a = {ah, al} and b = {bh, bl}, and four
// 16x16 blocks form the partial products
//   m0 = al*bl,  m1 = ah*bl,  m2 = al*bh,  m3 = ah*bh.
// Three binary parallel adders combine them, as in the source's 32x32 diagram:
//   s_lo  (32 bits) = m1 + {16'd0, m0[31:16]}
//   s_hi  (48 bits) = {m3, 16'd0} + {16'd0, m2}
//   q[63:16] (48 bits) = s_hi + {16'd0, s_lo}
//   q[15:0] = m0[15:0]
// The adders' carry outputs are dropped: at these alignments the sums cannot
// overflow, so the 64-bit product is exact. Pairing m2 with m3 and m1 with m0
// follows the source's figures and text.
//
// bin_field = 1 turns every block below into its binary-field form (carries
// suppressed), so q is then the carry-less GF(2) polynomial product of a and b.
//
// Purely combinational.
module vedic_32x32 (
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  logic        bin_field,
  output logic [63:0] q
);

  logic [31:0] m0, m1, m2, m3;
  logic [31:0] s_lo;
  logic [47:0] s_hi, s_fin;
  logic        c_lo, c_hi, c_fin;  // carries, always 0 at these alignments (asserted)

  vedic_16x16 u_m0 (.a(a[15:0]),  .b(b[15:0]),  .bin_field(bin_field), .q(m0));
  vedic_16x16 u_m1 (.a(a[31:16]), .b(b[15:0]),  .bin_field(bin_field), .q(m1));
  vedic_16x16 u_m2 (.a(a[15:0]),  .b(b[31:16]), .bin_field(bin_field), .q(m2));
  vedic_16x16 u_m3 (.a(a[31:16]), .b(b[31:16]), .bin_field(bin_field), .q(m3));

  bpa_adder #(.WIDTH(32)) u_add_lo (
    .a(m1), .b({16'd0, m0[31:16]}), .bin_field(bin_field), .sum(s_lo), .cout(c_lo)
  );

  bpa_adder #(.WIDTH(48)) u_add_hi (
    .a({m3, 16'd0}), .b({16'd0, m2}), .bin_field(bin_field), .sum(s_hi), .cout(c_hi)
  );

  bpa_adder #(.WIDTH(48)) u_add_fin (
    .a(s_hi), .b({16'd0, s_lo}), .bin_field(bin_field), .sum(s_fin), .cout(c_fin)
  );

  assign q = {s_fin, m0[15:0]};

  // The operand alignment guarantees that no adder overflows.
  always_comb begin
    assert final (!(c_lo || c_hi || c_fin))
      else $error("vedic_32x32: adder carry out set for a=%h b=%h", a, b);
  end

endmodule
