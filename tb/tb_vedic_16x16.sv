// tb_vedic_16x16: self-checking test of the 16x16 Vedic multiplier.
//
// Corner operands (all ones, one, zero, top bit, half patterns) in both
// fields, then 20000 random operand pairs alternating between the fields.
// In the prime field the 32-bit result must equal the integer product a*b;
// in the binary field it must equal the carry-less (GF(2) polynomial) product,
// which the reference function below forms by XOR-ing shifted copies of a.
// A watchdog ends the run if it stalls.
module tb_vedic_16x16;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic [15:0] a, b;
  logic        bin;
  logic [31:0] q;

  vedic_16x16 dut (.a(a), .b(b), .bin_field(bin), .q(q));

  function automatic logic [31:0] clmul(input logic [15:0] x, input logic [15:0] y);
    logic [31:0] r = '0;
    for (int i = 0; i < 16; i++) if (y[i]) r ^= 32'(x) << i;
    return r;
  endfunction

  task automatic check(input logic [15:0] x, input logic [15:0] y, input logic f);
    logic [31:0] exp;
    a = x; b = y; bin = f;
    #1;
    exp = f ? clmul(x, y) : 32'(x) * 32'(y);
    checks++;
    if (q !== exp) begin
      failures++;
      if (failures < 20)
        $display("FAIL bin=%0d %h * %h = %h, expected %h", f, x, y, q, exp);
    end
  endtask

  initial begin
    for (int f = 0; f < 2; f++) begin
      check('1, '1, f[0]);
      check('1, 16'd1, f[0]);
      check(16'd0, '1, f[0]);
      check({1'b1, 15'd0}, {1'b1, 15'd0}, f[0]);
      check({8'd0, {8{1'b1}}}, {{8{1'b1}}, 8'd0}, f[0]);
    end
    for (int n = 0; n < 20000; n++)
      check(16'({$urandom, $urandom}), 16'({$urandom, $urandom}), n[0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
