// mac_unit: dual-field multiply-accumulate unit, one per SIMD lane.
//
// A 32x32 Vedic multiplier forms the 64-bit product of a and b; an ACC_W-bit
// binary parallel adder adds it to the accumulator register. Both follow the
// field select of the instruction: in the prime field they compute integer
// product and sum, in the binary field the GF(2) polynomial product and an XOR
// accumulation. The accumulator wraps modulo 2^ACC_W in the prime field; the
// adder's carry out is dropped.
//
// Operations (simd_pkg::opcode_e), applied at the rising clock edge:
//   OP_NOP  acc holds          OP_MUL  acc <= zero-extended a*b
//   OP_CLR  acc <= 0           OP_MAC  acc <= acc + a*b
// Timing: single cycle. Operands and opcode are sampled at a rising edge and
// the new accumulator value is visible right after it; a new operation can be
// issued every cycle. rst_n clears the accumulator asynchronously.
//
// The source states only that each SIMD lane holds a MAC unit built on the
// dual-field Vedic multiplier. The opcode set, the single-cycle timing, the
// accumulator width and its wrap-around are this design's own choices.
module mac_unit
  import simd_pkg::*;
#(
  parameter int unsigned ACC_W = 64
) (
  input  logic               clk,
  input  logic               rst_n,
  input  opcode_e            op,
  input  field_e             field,
  input  logic [DATA_W-1:0]  a,
  input  logic [DATA_W-1:0]  b,
  output logic [ACC_W-1:0]   acc
);

  logic               bin_field;
  logic [PROD_W-1:0]  product;
  logic [ACC_W-1:0]   acc_sum;
  logic               acc_cout;   // dropped: the accumulator wraps

  assign bin_field = (field == FIELD_BINARY);

  vedic_32x32 u_mul (
    .a(a), .b(b), .bin_field(bin_field), .q(product)
  );

  bpa_adder #(.WIDTH(ACC_W)) u_acc_add (
    .a(acc), .b(ACC_W'(product)), .bin_field(bin_field), .sum(acc_sum), .cout(acc_cout)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc <= '0;
    end else begin
      unique case (op)
        OP_NOP: acc <= acc;
        OP_CLR: acc <= '0;
        OP_MUL: acc <= ACC_W'(product);
        OP_MAC: acc <= acc_sum;
      endcase
    end
  end

  // The accumulator must hold a whole product.
  initial begin
    assert (ACC_W >= PROD_W)
      else $fatal(1, "mac_unit: ACC_W (%0d) must be at least %0d", ACC_W, PROD_W);
  end

endmodule
