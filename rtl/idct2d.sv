// idct2d: 8x8 2-D IDCT processor, row-column decomposition of two 1-D
// adder-based distributed-arithmetic IDCTs around a transpose buffer.
//
// Coefficients F(u,v) enter one per cycle, a block in row-major order (v
// fastest). The row unit transforms each row of eight into G(u,y); the
// transpose buffer reorders a whole block so that the column unit receives
// the eight G(0..7,y) of one column at a time and produces f(x,y) for
// x = 0..7. Pixels therefore leave column by column (x fastest). Both passes
// use sqrt(2)-scaled kernels; the combined gain of 2 is removed in the column
// unit's final rounding shift. The row results are kept with MID_FRAC = 3
// fraction bits in MID_W = 14-bit words, a range of +-1024 that holds the
// row results of any block computed from pixels in -256..255; larger row
// results are clipped (row_sat). Pixels are rounded to nearest and clipped
// to -256..255. With these widths the processor meets the IEEE 1180
// accuracy limits.
//
// Interface: in_valid/in_coef, out_valid/out_pix, no back-pressure. The
// processor accepts and delivers one sample per cycle (the original chip's 50
// Mpixel/s at 50 MHz); row_sat/col_sat pulse when a row result or a pixel is
// clipped. The first pixel of a block leaves 40 cycles after the block's
// last coefficient (row unit 12 + 7, transpose buffer 2, column unit 7 + 12).
// The two 1-D units and their throughput follow the original chip; the
// intermediate precision, output clipping and pixel order are this
// implementation's choices.
module idct2d
  import idct_pkg::*;
#(
  parameter int IN_W     = 12,
  parameter int MID_W    = 14,
  parameter int MID_FRAC = 3,
  parameter int OUT_W    = 9
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic [IN_W-1:0]         in_coef,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] out_pix,
  output logic                    row_sat,
  output logic                    col_sat
);
  logic                    row_valid, tr_valid;
  logic signed [MID_W-1:0] row_data;
  logic [MID_W-1:0]        tr_data;

  idct1d #(.IN_W(IN_W), .OUT_W(MID_W), .ROUND_SHIFT(16 - MID_FRAC)) u_row (
    .clk, .rst_n, .in_valid, .in_data(in_coef),
    .out_valid(row_valid), .out_data(row_data), .sat(row_sat)
  );

  transpose_buffer #(.W(MID_W)) u_tr (
    .clk, .rst_n, .in_valid(row_valid), .in_data(row_data),
    .out_valid(tr_valid), .out_data(tr_data)
  );

  idct1d #(.IN_W(MID_W), .OUT_W(OUT_W), .ROUND_SHIFT(17 + MID_FRAC)) u_col (
    .clk, .rst_n, .in_valid(tr_valid), .in_data(tr_data),
    .out_valid, .out_data(out_pix), .sat(col_sat)
  );
endmodule
