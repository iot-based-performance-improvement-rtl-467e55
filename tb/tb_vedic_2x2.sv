// tb_vedic_2x2: exhaustive self-checking test of the 2x2 Vedic multiplier.
//
// All 16 operand pairs are applied in both fields. The prime-field result must
// equal the integer product a*b; the binary-field result must equal the
// carry-less (GF(2) polynomial) product, computed here bit by bit.
module tb_vedic_2x2;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic [1:0] a, b;
  logic       bin;
  logic [3:0] q;

  vedic_2x2 dut (.a(a), .b(b), .bin_field(bin), .q(q));

  function automatic logic [3:0] clmul2(input logic [1:0] x, input logic [1:0] y);
    logic [3:0] r = '0;
    for (int i = 0; i < 2; i++) if (y[i]) r ^= 4'(x) << i;
    return r;
  endfunction

  initial begin
    for (int f = 0; f < 2; f++)
      for (int x = 0; x < 4; x++)
        for (int y = 0; y < 4; y++) begin
          logic [3:0] exp;
          a = 2'(x); b = 2'(y); bin = f[0];
          #1;
          exp = f[0] ? clmul2(a, b) : 4'(x * y);
          checks++;
          if (q !== exp) begin
            failures++;
            $display("FAIL bin=%0d %0d * %0d = %0d, expected %0d", f, x, y, q, exp);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
