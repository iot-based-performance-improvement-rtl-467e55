// simd_array: SIMD processor array of dual-field MAC lanes (top level).
//
// LANES identical processing elements share one instruction stream: each cycle
// a single instruction (opcode and field select, simd_pkg::instr_t) is
// broadcast to all lanes, and every lane applies it to its own operand pair
// op_a[i], op_b[i] and its own accumulator acc[i]. Each lane is a mac_unit,
// whose multiplier is the 32x32 dual-field Vedic multiplier. A whole vector of
// LANES multiplications or multiply-accumulates thus completes per cycle, in
// either the prime (integer) or the binary (GF(2) polynomial) field.
//
// Timing: an instruction and its operands are sampled at a rising edge; the
// accumulators show the result right after that edge, and result_valid is high
// for that cycle when the instruction was OP_MUL or OP_MAC. One instruction per
// cycle, no stalls. rst_n (asynchronous, active low) clears all accumulators.
//
// The source describes the array only as a SIMD processor array whose lanes
// carry the dual-field Vedic MAC unit. The lane count, the instruction set and
// the one-cycle timing are this design's own choices.
module simd_array
  import simd_pkg::*;
#(
  parameter int unsigned LANES = 4,
  parameter int unsigned ACC_W = 64
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  instr_t                        instr,
  input  logic [LANES-1:0][DATA_W-1:0]  op_a,
  input  logic [LANES-1:0][DATA_W-1:0]  op_b,
  output logic [LANES-1:0][ACC_W-1:0]   acc,
  output logic                          result_valid
);

  for (genvar i = 0; i < LANES; i++) begin : g_lane
    mac_unit #(.ACC_W(ACC_W)) u_mac (
      .clk   (clk),
      .rst_n (rst_n),
      .op    (instr.op),
      .field (instr.field),
      .a     (op_a[i]),
      .b     (op_b[i]),
      .acc   (acc[i])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) result_valid <= 1'b0;
    else        result_valid <= (instr.op == OP_MUL) || (instr.op == OP_MAC);
  end

endmodule
