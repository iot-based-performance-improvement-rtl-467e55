// tb_vedic_4x4: self-checking test of the 4x4 Vedic multiplier.
//
// All 16 x 16 operand pairs are applied in both fields. It also checks the
// worked example 1011 x 1101 = 10001111 (11 x 13 = 143).
// In the prime field the 8-bit result must equal the integer product a*b;
// in the binary field it must equal the carry-less (GF(2) polynomial) product,
// which the reference function below forms by XOR-ing shifted copies of a.
// A watchdog ends the run if it stalls.
module tb_vedic_4x4;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic [3:0] a, b;
  logic        bin;
  logic [7:0] q;

  vedic_4x4 dut (.a(a), .b(b), .bin_field(bin), .q(q));

  function automatic logic [7:0] clmul(input logic [3:0] x, input logic [3:0] y);
    logic [7:0] r = '0;
    for (int i = 0; i < 4; i++) if (y[i]) r ^= 8'(x) << i;
    return r;
  endfunction

  task automatic check(input logic [3:0] x, input logic [3:0] y, input logic f);
    logic [7:0] exp;
    a = x; b = y; bin = f;
    #1;
    exp = f ? clmul(x, y) : 8'(x) * 8'(y);
    checks++;
    if (q !== exp) begin
      failures++;
      if (failures < 20)
        $display("FAIL bin=%0d %h * %h = %h, expected %h", f, x, y, q, exp);
    end
  endtask

  initial begin
    // worked example of the line-diagram method: 1011 x 1101 = 10001111 (11 x 13 = 143)
    a = 4'b1011; b = 4'b1101; bin = 1'b0;
    #1;
    checks++;
    if (q !== 8'b1000_1111) begin
      failures++;
      $display("FAIL 1011 x 1101 = %b, expected 10001111", q);
    end
    for (int f = 0; f < 2; f++)
      for (int x = 0; x < 16; x++)
        for (int y = 0; y < 16; y++)
          check(4'(x), 4'(y), f[0]);
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
