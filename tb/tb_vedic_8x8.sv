// tb_vedic_8x8: self-checking test of the 8x8 Vedic multiplier.
//
// All 256 x 256 operand pairs are applied in both fields.
// In the prime field the 16-bit result must equal the integer product a*b;
// in the binary field it must equal the carry-less (GF(2) polynomial) product,
// which the reference function below forms by XOR-ing shifted copies of a.
// A watchdog ends the run if it stalls.
module tb_vedic_8x8;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic [7:0] a, b;
  logic        bin;
  logic [15:0] q;

  vedic_8x8 dut (.a(a), .b(b), .bin_field(bin), .q(q));

  function automatic logic [15:0] clmul(input logic [7:0] x, input logic [7:0] y);
    logic [15:0] r = '0;
    for (int i = 0; i < 8; i++) if (y[i]) r ^= 16'(x) << i;
    return r;
  endfunction

  task automatic check(input logic [7:0] x, input logic [7:0] y, input logic f);
    logic [15:0] exp;
    a = x; b = y; bin = f;
    #1;
    exp = f ? clmul(x, y) : 16'(x) * 16'(y);
    checks++;
    if (q !== exp) begin
      failures++;
      if (failures < 20)
        $display("FAIL bin=%0d %h * %h = %h, expected %h", f, x, y, q, exp);
    end
  endtask

  initial begin
    for (int f = 0; f < 2; f++)
      for (int x = 0; x < 256; x++)
        for (int y = 0; y < 256; y++)
          check(8'(x), 8'(y), f[0]);
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
