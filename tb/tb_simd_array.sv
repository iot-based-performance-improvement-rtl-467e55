// tb_simd_array: end-to-end, self-checking test of the SIMD MAC array at its
// default size (4 lanes, 64-bit accumulators, no parameter overrides).
//
// A reference model in this testbench keeps one accumulator per lane. The test
//   1. checks reset and the one-cycle latency of a broadcast MUL;
//   2. runs a vector dot-product workload: every lane accumulates its own
//      16-element dot product with one MAC instruction per element, first in
//      the prime field (integer) and then in the binary field (GF(2)
//      polynomial, XOR accumulation), reading the results after the last MAC;
//   3. forces the prime-field accumulators to wrap around;
//   4. drives a long random stream of NOP / CLR / MUL / MAC instructions with
//      random field selects and per-lane operands.
// After every edge all lane accumulators and result_valid are compared with
// the model. Each mechanism (every opcode, MAC in both fields, NOP hold with
// changing operands, accumulator wrap, result_valid pulse) is counted and a
// failure is recorded for any that never occurred. A watchdog ends the run if
// it stalls.
module tb_simd_array;
  import simd_pkg::*;

  localparam int unsigned LANES = 4;
  localparam int unsigned ACC_W = 64;
  localparam int unsigned DOT_LEN = 16;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic                         rst_n;
  instr_t                       instr;
  logic [LANES-1:0][DATA_W-1:0] op_a, op_b;
  logic [LANES-1:0][ACC_W-1:0]  acc;
  logic                         result_valid;

  logic [ACC_W-1:0] model [LANES];
  logic             valid_model;

  int n_op[4];
  int n_bin_mac, n_prime_mac, n_wrap, n_valid, n_hold;

  simd_array dut (
    .clk(clk), .rst_n(rst_n), .instr(instr), .op_a(op_a), .op_b(op_b),
    .acc(acc), .result_valid(result_valid)
  );

  function automatic logic [63:0] clmul(input logic [31:0] x, input logic [31:0] y);
    logic [63:0] r = '0;
    for (int i = 0; i < 32; i++) if (y[i]) r ^= 64'(x) << i;
    return r;
  endfunction

  function automatic logic [63:0] prod(input logic [31:0] x, input logic [31:0] y, input field_e f);
    return (f == FIELD_BINARY) ? clmul(x, y) : 64'(x) * 64'(y);
  endfunction

  task automatic compare(input string what);
    checks++;
    if (result_valid !== valid_model) begin
      failures++;
      if (failures < 20) $display("FAIL %s: result_valid=%b expected %b", what, result_valid, valid_model);
    end
    for (int l = 0; l < LANES; l++) begin
      checks++;
      if (acc[l] !== model[l]) begin
        failures++;
        if (failures < 20) $display("FAIL %s: lane %0d acc=%h expected %h", what, l, acc[l], model[l]);
      end
    end
  endtask

  // Issue one instruction with the given per-lane operands for one clock.
  task automatic issue(input opcode_e o, input field_e f,
                       input logic [LANES-1:0][DATA_W-1:0] xa,
                       input logic [LANES-1:0][DATA_W-1:0] xb,
                       input string what);
    logic [64:0] wide;
    @(negedge clk);
    instr.op = o; instr.field = f; op_a = xa; op_b = xb;
    for (int l = 0; l < LANES; l++) begin
      unique case (o)
        OP_NOP: ;
        OP_CLR: model[l] = '0;
        OP_MUL: model[l] = prod(xa[l], xb[l], f);
        OP_MAC:
          if (f == FIELD_BINARY) model[l] = model[l] ^ prod(xa[l], xb[l], f);
          else begin
            wide = {1'b0, model[l]} + {1'b0, prod(xa[l], xb[l], f)};
            if (wide[64]) n_wrap++;
            model[l] = wide[63:0];
          end
      endcase
    end
    valid_model = (o == OP_MUL) || (o == OP_MAC);
    n_op[o]++;
    if (o == OP_MAC && f == FIELD_BINARY) n_bin_mac++;
    if (o == OP_MAC && f == FIELD_PRIME)  n_prime_mac++;
    if (o == OP_NOP && xa != '0)          n_hold++;
    @(posedge clk);
    #1;
    if (result_valid) n_valid++;
    compare(what);
  endtask

  function automatic logic [LANES-1:0][DATA_W-1:0] rnd_vec();
    logic [LANES-1:0][DATA_W-1:0] v;
    for (int l = 0; l < LANES; l++) v[l] = $urandom;
    return v;
  endfunction

  initial begin
    logic [LANES-1:0][DATA_W-1:0] va, vb;
    logic [ACC_W-1:0] dot [LANES];

    instr = '{op: OP_NOP, field: FIELD_PRIME};
    op_a = '0; op_b = '0;
    foreach (model[l]) model[l] = '0;
    valid_model = 1'b0;
    foreach (n_op[i]) n_op[i] = 0;
    n_bin_mac = 0; n_prime_mac = 0; n_wrap = 0; n_valid = 0; n_hold = 0;

    rst_n = 1'b0;
    repeat (2) @(posedge clk);
    #1;
    compare("reset");
    rst_n = 1'b1;

    // 1. latency of a broadcast MUL: nothing before the edge, result after it
    @(negedge clk);
    va = rnd_vec(); vb = rnd_vec();
    instr = '{op: OP_MUL, field: FIELD_PRIME}; op_a = va; op_b = vb;
    #2;
    compare("before edge");
    @(posedge clk); #1;
    for (int l = 0; l < LANES; l++) model[l] = prod(va[l], vb[l], FIELD_PRIME);
    valid_model = 1'b1;
    n_op[OP_MUL]++; n_valid++;
    compare("MUL after one edge");

    // 2. dot-product workload, one per lane, in both fields
    for (int f = 0; f < 2; f++) begin
      foreach (dot[l]) dot[l] = '0;
      issue(OP_CLR, field_e'(f), '0, '0, "dot clear");
      for (int k = 0; k < DOT_LEN; k++) begin
        va = rnd_vec(); vb = rnd_vec();
        for (int l = 0; l < LANES; l++)
          dot[l] = (f == 1) ? dot[l] ^ clmul(va[l], vb[l])
                            : dot[l] + 64'(va[l]) * 64'(vb[l]);
        issue(OP_MAC, field_e'(f), va, vb, "dot MAC");
      end
      issue(OP_NOP, field_e'(f), rnd_vec(), rnd_vec(), "dot hold");
      for (int l = 0; l < LANES; l++) begin
        checks++;
        if (acc[l] !== dot[l]) begin
          failures++;
          $display("FAIL dot product field %0d lane %0d: %h expected %h", f, l, acc[l], dot[l]);
        end
      end
    end

    // 3. prime-field wrap-around in every lane
    va = '1; vb = '1;
    issue(OP_MUL, FIELD_PRIME, va, vb, "wrap MUL");
    repeat (3) issue(OP_MAC, FIELD_PRIME, va, vb, "wrap MAC");

    // 4. random instruction stream
    for (int n = 0; n < 4000; n++)
      issue(opcode_e'($urandom_range(3)), field_e'($urandom_range(1)), rnd_vec(), rnd_vec(), "random");

    // asynchronous reset clears every lane
    @(negedge clk); instr.op = OP_NOP; #2;
    rst_n = 1'b0; #1;
    foreach (model[l]) model[l] = '0;
    valid_model = 1'b0;
    compare("async reset");
    rst_n = 1'b1;

    foreach (n_op[i]) if (n_op[i] == 0) begin
      failures++; $display("FAIL opcode %0d never issued", i);
    end
    if (n_bin_mac == 0 || n_prime_mac == 0 || n_wrap == 0 || n_valid == 0 || n_hold == 0) begin
      failures++;
      $display("FAIL mechanism missing: bin_mac=%0d prime_mac=%0d wrap=%0d valid=%0d hold=%0d",
               n_bin_mac, n_prime_mac, n_wrap, n_valid, n_hold);
    end
    $display("instructions NOP=%0d CLR=%0d MUL=%0d MAC=%0d; binary MAC=%0d prime MAC=%0d; lane wraps=%0d; result_valid pulses=%0d; NOP holds=%0d",
             n_op[0], n_op[1], n_op[2], n_op[3], n_bin_mac, n_prime_mac, n_wrap, n_valid, n_hold);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
