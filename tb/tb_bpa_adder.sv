// tb_bpa_adder: self-checking test of the ripple-carry binary parallel adder.
//
// Instantiates the adder at its default width (32 bits) and at 48 bits, the
// two widths drawn as separate adders in the multiplier, and at 4 bits for an
// exhaustive sweep. In the prime field the sum and carry are compared with
// the integer sum a + b; in the binary field the sum must be a ^ b and the
// carry 0. Corner cases (all ones, carry through the whole chain) and random
// operands are used. A watchdog ends the run if it stalls.
module tb_bpa_adder;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic [31:0] a32, b32, s32;
  logic [47:0] a48, b48, s48;
  logic [3:0]  a4, b4, s4;
  logic        c32, c48, c4, bin;

  bpa_adder              dut32 (.a(a32), .b(b32), .bin_field(bin), .sum(s32), .cout(c32));
  bpa_adder #(.WIDTH(48)) dut48 (.a(a48), .b(b48), .bin_field(bin), .sum(s48), .cout(c48));
  bpa_adder #(.WIDTH(4))  dut4  (.a(a4),  .b(b4),  .bin_field(bin), .sum(s4),  .cout(c4));

  task automatic check32(input logic [31:0] x, input logic [31:0] y, input logic f);
    logic [32:0] exp;
    a32 = x; b32 = y; bin = f;
    #1;
    exp = f ? {1'b0, x ^ y} : {1'b0, x} + {1'b0, y};
    checks++;
    if ({c32, s32} !== exp) begin
      failures++;
      $display("FAIL add32 bin=%0d %h + %h = %0h_%h, expected %h", f, x, y, c32, s32, exp);
    end
  endtask

  task automatic check48(input logic [47:0] x, input logic [47:0] y, input logic f);
    logic [48:0] exp;
    a48 = x; b48 = y; bin = f;
    #1;
    exp = f ? {1'b0, x ^ y} : {1'b0, x} + {1'b0, y};
    checks++;
    if ({c48, s48} !== exp) begin
      failures++;
      $display("FAIL add48 bin=%0d %h + %h = %0h_%h, expected %h", f, x, y, c48, s48, exp);
    end
  endtask

  initial begin
    // exhaustive 4-bit, both fields
    for (int f = 0; f < 2; f++)
      for (int x = 0; x < 16; x++)
        for (int y = 0; y < 16; y++) begin
          a4 = 4'(x); b4 = 4'(y); bin = f[0];
          #1;
          checks++;
          if ({c4, s4} !== (f[0] ? {1'b0, 4'(x) ^ 4'(y)} : 5'(x + y))) begin
            failures++;
            $display("FAIL add4 bin=%0d %0d + %0d = %0d", f, x, y, {c4, s4});
          end
        end
    // corners: full carry ripple and overflow
    for (int f = 0; f < 2; f++) begin
      check32(32'hFFFF_FFFF, 32'h1, f[0]);
      check32(32'hFFFF_FFFF, 32'hFFFF_FFFF, f[0]);
      check32(32'h0, 32'h0, f[0]);
      check32(32'h8000_0000, 32'h8000_0000, f[0]);
      check48(48'hFFFF_FFFF_FFFF, 48'h1, f[0]);
      check48(48'hFFFF_FFFF_FFFF, 48'hFFFF_FFFF_FFFF, f[0]);
      check48(48'h7FFF_FFFF_FFFF, 48'h1, f[0]);
    end
    // random
    for (int n = 0; n < 4000; n++) begin
      check32($urandom, $urandom, n[0]);
      check48({$urandom, $urandom} >> 16, {$urandom, $urandom} >> 16, n[1]);
    end
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
