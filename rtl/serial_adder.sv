// serial_adder: digit-serial two's-complement adder/subtractor that adds two
// bits of each operand per cycle, least significant digit first.
//
// Two chained full adders form the 2-bit digit sum; the carry out of the
// upper full adder is held in one D flip-flop for the next digit. At the
// first digit of a word the stored carry is replaced by the word's initial
// carry (0 for add, 1 for subtract), which is how the flip-flop is reset
// between words. With SUB=1 the b operand is inverted, giving a - b.
//
// Interface: en advances the carry flip-flop; first marks the least
// significant digit of a word. The sum s is combinational from a, b and the
// stored carry, so chains of serial adders settle within one cycle.
// The two-full-adder-plus-DFF structure follows the original chip; the subtract
// option is this implementation's way of forming negative terms.
module serial_adder #(
  parameter bit SUB = 1'b0
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  logic       first,
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [1:0] s
);
  logic [1:0] bb;
  logic       cin, c1, c2, carry_q;

  assign bb  = SUB ? ~b : b;
  assign cin = first ? SUB : carry_q;

  // full adder 0
  assign s[0] = a[0] ^ bb[0] ^ cin;
  assign c1   = (a[0] & bb[0]) | (a[0] & cin) | (bb[0] & cin);
  // full adder 1
  assign s[1] = a[1] ^ bb[1] ^ c1;
  assign c2   = (a[1] & bb[1]) | (a[1] & c1) | (bb[1] & c1);

  always_ff @(posedge clk) begin
    if (!rst_n)  carry_q <= 1'b0;
    else if (en) carry_q <= c2;
  end
endmodule
