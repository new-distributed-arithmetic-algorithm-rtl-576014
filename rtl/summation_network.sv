// summation_network: the shared bit-column adder network of adder-based DA
// for one 4x4 coefficient kernel (KERNEL[n][i], see idct_pkg).
//
// For output n and coefficient bit j the inner product needs the bit-column
// sum S(n,j) = sum_i sign(n,i) * bit_j(|KERNEL[n][i]|) * X_i. Only distinct,
// nonzero combinations are built, each once: build_net() lists them and
// forms every term as a smaller term plus or minus one input, so partial
// sums are shared between bit positions and between outputs. A term of one
// positive input is a wire; every other term costs one serial_adder.
//
// Inputs X_i arrive two bits per cycle, LSB first, as 16-bit two's
// complement words (8 digits); dig_first/dig_last mark digits 0 and 7.
// The terms settle combinationally and are captured in output registers
// (the term latches), so outputs lag the inputs by one cycle. The latched
// terms are then fanned out by fixed wiring: w0[n][j] / w1[n][j] are the
// low / high bit of this cycle's digit of S(n,j), i.e. two 16-bit words per
// output per cycle, weight 2^j within a word. Word bits whose coefficient
// bit is zero for every input are constant zero by construction.
//
// The term-sharing structure follows the original chip; the term list comes from a
// greedy search at elaboration rather than an exhaustive one, and edge
// triggered registers stand in for the output latches.
module summation_network
  import idct_pkg::*;
#(
  parameter kernel_t KERNEL = EVEN_KERNEL
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      dig_valid,
  input  logic                      dig_first,
  input  logic                      dig_last,
  input  logic [NIN-1:0][DIG-1:0]   x_dig,
  output logic                      out_valid,
  output logic                      out_first,
  output logic                      out_last,
  output logic [NOUT-1:0][CW-1:0]   w0,
  output logic [NOUT-1:0][CW-1:0]   w1
);
  localparam net_t NET = build_net(KERNEL);
  localparam int   NT  = int'(NET.count);

  for (genvar t = 0; t < MAXT; t++) begin : g_term
    if (t < NT) begin : g_on
      localparam term_t T = NET.list[t];
      logic [DIG-1:0] s;  // this cycle's digit of the term

      if (n_inputs(T.code) == 1 && !T.neg) begin : g_wire
        assign s = x_dig[T.inp];
      end else if (n_inputs(T.code) == 1) begin : g_negate
        serial_adder #(.SUB(1'b1)) u_add (
          .clk, .rst_n, .en(dig_valid), .first(dig_first),
          .a('0), .b(x_dig[T.inp]), .s(s)
        );
      end else begin : g_add
        serial_adder #(.SUB(T.neg)) u_add (
          .clk, .rst_n, .en(dig_valid), .first(dig_first),
          .a(g_term[T.parent].g_on.s), .b(x_dig[T.inp]), .s(s)
        );
      end

      // only terms that reach a shift-adder get an output latch
      if (is_output_term(KERNEL, T.code)) begin : g_latch
        logic [DIG-1:0] q;  // latched digit
        always_ff @(posedge clk) begin
          if (!rst_n)         q <= '0;
          else if (dig_valid) q <= s;
        end
      end
    end
  end

  // fixed fan-out of latched terms to the shift-adder words
  for (genvar n = 0; n < NOUT; n++) begin : g_out
    for (genvar j = 0; j < CW; j++) begin : g_bit
      localparam tcode_t C   = bit_code(KERNEL, n, j);
      localparam int     IDX = find_term(NET, C);
      if (C == '0) begin : g_zero
        assign w0[n][j] = 1'b0;
        assign w1[n][j] = 1'b0;
      end else begin : g_term_bit
        assign w0[n][j] = g_term[IDX].g_on.g_latch.q[0];
        assign w1[n][j] = g_term[IDX].g_on.g_latch.q[1];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_first <= 1'b0;
      out_last  <= 1'b0;
    end else begin
      out_valid <= dig_valid;
      out_first <= dig_valid & dig_first;
      out_last  <= dig_valid & dig_last;
    end
  end
endmodule
