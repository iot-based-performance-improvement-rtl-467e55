// vedic_2x2: 2x2 Urdhva-Tiryagbhyam ("vertically and crosswise") multiplier.
//
// Four 2-input AND gates form the partial products t1 = a1&b0, t2 = a0&b1,
// t4 = a1&b1 and q0 = a0&b0; two half adders combine them:
//   q1 = t1 ^ t2,  t3 = t1 & t2   (first half adder: the crosswise column)
//   q2 = t3 ^ t4,  q3 = t3 & t4   (second half adder: the vertical high column)
// This is the gate structure of the source's 2x2 figure.
//
// bin_field = 1 selects binary-field (carry-less) multiplication: the carry t3
// of the first half adder is suppressed, so q = {0, a1&b1, a1&b0 ^ a0&b1, a0&b0},
// the GF(2) polynomial product. The carry gating is this design's own choice.
//
// Purely combinational.
module vedic_2x2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  input  logic       bin_field,
  output logic [3:0] q
);

  logic t1, t2, t3, t4;

  always_comb begin
    q[0] = a[0] & b[0];
    t1   = a[1] & b[0];
    t2   = a[0] & b[1];
    t4   = a[1] & b[1];
    // first half adder
    q[1] = t1 ^ t2;
    t3   = t1 & t2 & ~bin_field;
    // second half adder
    q[2] = t3 ^ t4;
    q[3] = t3 & t4;
  end

endmodule
