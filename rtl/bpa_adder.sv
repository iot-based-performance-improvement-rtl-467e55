// bpa_adder: binary parallel adder (ripple-carry), with a dual-field switch.
//
// Bit 0 is a half adder and every higher bit a full adder fed by the carry of
// the bit below; the carry of the top bit leaves as cout. This is the chain
// drawn for the 32-bit and 48-bit adders of the multiplier, and the same cell
// chain serves every adder width the multiplier tree needs (4 to 48 bits).
//
// bin_field = 0: prime-field (integer) addition, sum = a + b, cout = carry.
// bin_field = 1: binary-field (GF(2)) addition: each cell's carry is forced to
//                zero, so sum = a ^ b and cout = 0. Suppressing the carries is
//                this design's own reading of "dual field"; the source only
//                names the two fields.
//
// Purely combinational; no clock.
module bpa_adder #(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             bin_field,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  // carry[i] is the carry into bit i; carry[0] is 0 because bit 0 is a half adder.
  logic [WIDTH:0] carry;

  assign carry[0] = 1'b0;

  for (genvar i = 0; i < WIDTH; i++) begin : g_cell
    assign sum[i]       = a[i] ^ b[i] ^ carry[i];
    assign carry[i + 1] = ((a[i] & b[i]) | (carry[i] & (a[i] ^ b[i]))) & ~bin_field;
  end

  assign cout = carry[WIDTH];

endmodule
