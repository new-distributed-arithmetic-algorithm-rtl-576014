// idct1d: 8-point 1-D IDCT built on adder-based distributed arithmetic.
//
// The 8x8 IDCT kernel is split into an even 4x4 kernel acting on U0, U2, U4,
// U6 that yields V_n + V_7-n and an odd 4x4 kernel acting on U1, U3, U5, U7
// that yields V_n - V_7-n (n = 0..3); all coefficients are scaled by sqrt(2).
// Data path: ps_converter turns the eight input words into 2-bit digits;
// summation network 1 (even) and network 2 (odd) form the shared bit-column
// sums; eight shift_adders turn those into the eight inner products; the
// output_unit latches them and emits V0..V7 through one add/subtract unit.
//
// Interface: one input word per cycle while in_valid (U0 first); outputs
// V0..V7 one per cycle with out_valid. Throughput is one vector per 8 cycles,
// i.e. one sample per cycle. V0 is valid 12 cycles after the cycle in which
// U7 is presented (vector load 1, 8 digits, term latch 1, shift-adder
// result 1, output register 1), V7 seven cycles later.
//
// Output scaling: out_data = round(sqrt(2) * V * 2^(16 - ROUND_SHIFT) /
// 2^IN_FRAC) where V is the orthonormal 1-D IDCT of the input read as an
// integer; the caller picks ROUND_SHIFT to set the output's fraction bits.
// The block structure follows the original chip; the scaling constants, widths and
// handshake are this implementation's.
module idct1d
  import idct_pkg::*;
#(
  parameter int IN_W        = 12,
  parameter int OUT_W       = 14,
  parameter int ROUND_SHIFT = 14
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic [IN_W-1:0]         in_data,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] out_data,
  output logic                    sat
);
  logic                    dig_valid, dig_first, dig_last;
  logic [7:0][DIG-1:0]     dig;
  logic [NIN-1:0][DIG-1:0] even_dig, odd_dig;

  ps_converter #(.IN_W(IN_W)) u_ps (
    .clk, .rst_n, .in_valid, .in_data,
    .dig_valid, .dig_first, .dig_last, .dig
  );

  always_comb begin
    for (int m = 0; m < NIN; m++) begin
      even_dig[m] = dig[2*m];
      odd_dig[m]  = dig[2*m+1];
    end
  end

  logic                   ev_valid, ev_first, ev_last;
  logic                   od_valid, od_first, od_last;
  logic [NOUT-1:0][CW-1:0] ev_w0, ev_w1, od_w0, od_w1;

  summation_network #(.KERNEL(EVEN_KERNEL)) u_net_even (
    .clk, .rst_n, .dig_valid, .dig_first, .dig_last, .x_dig(even_dig),
    .out_valid(ev_valid), .out_first(ev_first), .out_last(ev_last),
    .w0(ev_w0), .w1(ev_w1)
  );

  summation_network #(.KERNEL(ODD_KERNEL)) u_net_odd (
    .clk, .rst_n, .dig_valid, .dig_first, .dig_last, .x_dig(odd_dig),
    .out_valid(od_valid), .out_first(od_first), .out_last(od_last),
    .w0(od_w0), .w1(od_w1)
  );

  logic [NOUT-1:0][ACC_W-1:0] e_acc, o_acc;
  logic [NOUT-1:0]            e_done, o_done;

  for (genvar n = 0; n < NOUT; n++) begin : g_sa
    shift_adder u_sa_even (
      .clk, .rst_n, .valid(ev_valid), .first(ev_first), .last(ev_last),
      .w0(ev_w0[n]), .w1(ev_w1[n]), .acc(e_acc[n]), .done(e_done[n])
    );
    shift_adder u_sa_odd (
      .clk, .rst_n, .valid(od_valid), .first(od_first), .last(od_last),
      .w0(od_w0[n]), .w1(od_w1[n]), .acc(o_acc[n]), .done(o_done[n])
    );
  end

  output_unit #(.OUT_W(OUT_W), .SHIFT(ROUND_SHIFT)) u_out (
    .clk, .rst_n, .load(e_done[0]), .e_in(e_acc), .o_in(o_acc),
    .out_valid, .out_data, .sat
  );

  // all eight shift-adders run in lock step
  assert property (@(posedge clk) disable iff (!rst_n)
                   e_done[0] |-> (&e_done && &o_done));
endmodule
