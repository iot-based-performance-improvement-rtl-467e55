// tb_mac_unit: self-checking test of one dual-field MAC lane.
//
// Drives a random stream of NOP / CLR / MUL / MAC operations with random field
// selects and operands and compares the accumulator after every edge with a
// reference model kept in this testbench (integer product and wrap-around sum
// in the prime field, carry-less product and XOR in the binary field). It also
// runs a dot product in each field, checks the one-cycle latency (the result
// must be visible after the first edge, not before), the asynchronous reset,
// and the accumulator wrap-around. Every mechanism is counted and a failure
// is recorded for any that never occurred.
module tb_mac_unit;
  import simd_pkg::*;

  localparam int unsigned ACC_W = 64;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic              rst_n;
  opcode_e           op;
  field_e            field;
  logic [DATA_W-1:0] a, b;
  logic [ACC_W-1:0]  acc;
  logic [ACC_W-1:0]  model;

  int n_op[4];
  int n_bin_mac, n_prime_mac, n_wrap;

  mac_unit dut (.clk(clk), .rst_n(rst_n), .op(op), .field(field), .a(a), .b(b), .acc(acc));

  function automatic logic [63:0] clmul(input logic [31:0] x, input logic [31:0] y);
    logic [63:0] r = '0;
    for (int i = 0; i < 32; i++) if (y[i]) r ^= 64'(x) << i;
    return r;
  endfunction

  function automatic logic [63:0] prod(input logic [31:0] x, input logic [31:0] y, input field_e f);
    return (f == FIELD_BINARY) ? clmul(x, y) : 64'(x) * 64'(y);
  endfunction

  // Apply one operation for one clock and check the accumulator.
  task automatic step(input opcode_e o, input field_e f, input logic [31:0] x, input logic [31:0] y);
    logic [64:0] wide;
    @(negedge clk);
    op = o; field = f; a = x; b = y;
    unique case (o)
      OP_NOP: ;
      OP_CLR: model = '0;
      OP_MUL: model = prod(x, y, f);
      OP_MAC: begin
        if (f == FIELD_BINARY) begin
          model = model ^ prod(x, y, f);
          n_bin_mac++;
        end else begin
          wide = {1'b0, model} + {1'b0, prod(x, y, f)};
          if (wide[64]) n_wrap++;
          model = wide[63:0];
          n_prime_mac++;
        end
      end
    endcase
    n_op[o]++;
    @(posedge clk);
    #1;
    checks++;
    if (acc !== model) begin
      failures++;
      if (failures < 20)
        $display("FAIL op=%s field=%s a=%h b=%h acc=%h expected %h", o.name(), f.name(), x, y, acc, model);
    end
  endtask

  initial begin
    op = OP_NOP; field = FIELD_PRIME; a = '0; b = '0; model = '0;
    n_bin_mac = 0; n_prime_mac = 0; n_wrap = 0;
    foreach (n_op[i]) n_op[i] = 0;
    rst_n = 1'b0;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (acc !== '0) begin failures++; $display("FAIL accumulator not cleared by reset"); end
    rst_n = 1'b1;

    // latency: a MUL issued before an edge is not visible before it, and is after it
    @(negedge clk);
    op = OP_MUL; field = FIELD_PRIME; a = 32'd1234; b = 32'd5678;
    #2;
    checks++;
    if (acc !== '0) begin failures++; $display("FAIL result visible before the clock edge"); end
    @(posedge clk); #1;
    model = 64'd1234 * 64'd5678;
    checks++;
    if (acc !== model) begin failures++; $display("FAIL MUL latency: acc=%h", acc); end

    // dot products of length 8 in each field
    for (int f = 0; f < 2; f++) begin
      step(OP_CLR, field_e'(f), '0, '0);
      for (int k = 0; k < 8; k++) step(OP_MAC, field_e'(f), $urandom, $urandom);
      step(OP_NOP, field_e'(f), $urandom, $urandom);
    end

    // wrap-around of the prime-field accumulator
    step(OP_MUL, FIELD_PRIME, 32'hFFFF_FFFF, 32'hFFFF_FFFF);
    step(OP_MAC, FIELD_PRIME, 32'hFFFF_FFFF, 32'hFFFF_FFFF);
    step(OP_MAC, FIELD_PRIME, 32'hFFFF_FFFF, 32'hFFFF_FFFF);

    // random stream
    for (int n = 0; n < 3000; n++)
      step(opcode_e'($urandom_range(3)), field_e'($urandom_range(1)), $urandom, $urandom);

    // asynchronous reset in mid-cycle
    @(negedge clk); op = OP_NOP; #2;
    rst_n = 1'b0; #1;
    checks++;
    if (acc !== '0) begin failures++; $display("FAIL asynchronous reset"); end
    rst_n = 1'b1;

    foreach (n_op[i]) if (n_op[i] == 0) begin
      failures++; $display("FAIL opcode %0d never exercised", i);
    end
    if (n_bin_mac == 0 || n_prime_mac == 0 || n_wrap == 0) begin
      failures++; $display("FAIL mechanism missing: bin_mac=%0d prime_mac=%0d wrap=%0d", n_bin_mac, n_prime_mac, n_wrap);
    end
    $display("ops NOP=%0d CLR=%0d MUL=%0d MAC=%0d, binary MAC=%0d, prime MAC=%0d, wraps=%0d",
             n_op[0], n_op[1], n_op[2], n_op[3], n_bin_mac, n_prime_mac, n_wrap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
