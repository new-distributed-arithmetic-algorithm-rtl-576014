// shift_adder: accumulates one inner product from the two 16-bit words a
// summation network delivers per cycle.
//
// Word w0 holds the low bit and w1 the high bit of the current 2-bit digit of
// every bit-column sum S(j), bit j of the word weighing 2^j. Over the 8
// digits t = 0..7 (LSB first) the inner product is
//   y = sum_t 4^t * (w0_t + 2*w1_t),
// except that the top bit of the last digit is the sign of the 16-bit serial
// words and so counts negatively. Each cycle the accumulator is shifted
// right by two bits and the new digit, scaled by 2^14, is added:
//   acc <- (acc >>> 2) + (w0 + 2*w1) * 2^14     (acc cleared on dig 0)
// which after 8 digits leaves exactly y in acc, with no bits lost.
// The three operands are first reduced by a carry-save adder to a sum and a
// carry word, then one carry-propagate adder (written as '+', so synthesis
// picks its carry-lookahead structure) forms the new accumulator; on the
// last digit the w1 operand is inverted and the carry-in set, subtracting it.
//
// Timing: valid/first/last come with the words; acc is valid and done is high
// in the cycle after the last digit. acc keeps its value until the next
// vector's first digit has been clocked in.
// The CSA plus carry-propagate adder pair follows the original chip; the exact
// right-shifting accumulator and its width are this implementation's.
module shift_adder
  import idct_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    valid,
  input  logic                    first,
  input  logic                    last,
  input  logic [CW-1:0]           w0,
  input  logic [CW-1:0]           w1,
  output logic signed [ACC_W-1:0] acc,
  output logic                    done
);
  logic signed [ACC_W-1:0] op_acc, op_a, op_b, csa_s, csa_c, acc_d;

  always_comb begin
    op_acc = first ? '0 : (acc >>> DIG);
    op_a   = ACC_W'({w0, 14'b0});
    op_b   = ACC_W'({w1, 15'b0});
    if (last) op_b = ~op_b;
    // carry-save adder: three operands to sum and carry words
    csa_s = op_acc ^ op_a ^ op_b;
    csa_c = ((op_acc & op_a) | (op_acc & op_b) | (op_a & op_b)) <<< 1;
    // carry-propagate adder, carry-in completes the negation of op_b
    acc_d = csa_s + csa_c + ACC_W'(last);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc  <= '0;
      done <= 1'b0;
    end else begin
      done <= valid && last;
      if (valid) acc <= acc_d;
    end
  end
endmodule
