// tb_idct2d: end-to-end test of the 8x8 2-D IDCT processor at its default
// parameters. Blocks of several kinds are sent, most back to back and some
// with gaps in in_valid:
//  - random pixel blocks in -256..255 turned into 12-bit coefficients by a
//    real-valued forward DCT (rounded, clipped to -2048..2047);
//  - an all-zero block, which must give all-zero pixels;
//  - maximum and minimum DC-only blocks, whose pixels clip to 255 / -256;
//  - a block whose first row is all 2047, which overflows the row results.
// Each pixel is compared with a double-precision IDCT of the coefficients,
// rounded and clipped to -256..255: it may differ by at most 1, except in the
// row-overflow block, which is only checked for the overflow flag.
// Checked timing: first pixel 40 cycles after the last coefficient of its
// block, and an unbroken pixel stream (one pixel per cycle) for blocks sent
// back to back. Every mechanism is counted and must occur: row-result
// clipping, pixel clipping, input gaps, both transpose banks, back-to-back
// blocks, subtract path of the output unit (V4..V7).
module tb_idct2d;
  import idct_pkg::*;
  localparam real PI = 3.14159265358979323846;
  localparam int NB = 24;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic [11:0] in_coef = '0;
  logic out_valid, row_sat, col_sat;
  logic signed [8:0] out_pix;
  int checks = 0, failures = 0;
  int n_row_sat = 0, n_col_sat = 0, n_gaps = 0, n_bank [2] = '{0, 0};
  int n_b2b = 0, n_sub = 0, max_err = 0;

  always #5 clk = ~clk;

  idct2d dut (.*);

  initial begin
    repeat (NB * 64 * 3 + 2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real cc(int k);
    return (k == 0) ? $sqrt(0.5) : 1.0;
  endfunction

  int    coef [NB][8][8];
  int    refp [NB][8][8];
  bit    skip [NB];
  int    last_cycle [NB];
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    int p [8][8];
    real s;
    for (int b = 0; b < NB; b++) begin
      skip[b] = 1'b0;
      for (int x = 0; x < 8; x++)
        for (int y = 0; y < 8; y++) p[x][y] = $urandom_range(0, 511) - 256;
      for (int u = 0; u < 8; u++)
        for (int v = 0; v < 8; v++) begin
          s = 0.0;
          for (int x = 0; x < 8; x++)
            for (int y = 0; y < 8; y++)
              s += p[x][y] * $cos((2 * x + 1) * u * PI / 16.0) * $cos((2 * y + 1) * v * PI / 16.0);
          s = s * cc(u) * cc(v) / 4.0;
          coef[b][u][v] = $rtoi($floor(s + 0.5));
          if (coef[b][u][v] > 2047) coef[b][u][v] = 2047;
          if (coef[b][u][v] < -2048) coef[b][u][v] = -2048;
          case (b)
            3: coef[b][u][v] = 0;
            4: coef[b][u][v] = (u == 0 && v == 0) ? 2047 : 0;
            5: coef[b][u][v] = (u == 0 && v == 0) ? -2048 : 0;
            6: coef[b][u][v] = (u == 0) ? 2047 : 0;
            default: ;
          endcase
        end
      if (b == 6) skip[b] = 1'b1;
      for (int x = 0; x < 8; x++)
        for (int y = 0; y < 8; y++) begin
          s = 0.0;
          for (int u = 0; u < 8; u++)
            for (int v = 0; v < 8; v++)
              s += cc(u) * cc(v) / 4.0 * coef[b][u][v] *
                   $cos((2 * x + 1) * u * PI / 16.0) * $cos((2 * y + 1) * v * PI / 16.0);
          refp[b][x][y] = $rtoi($floor(s + 0.5));
          if (refp[b][x][y] > 255) refp[b][x][y] = 255;
          if (refp[b][x][y] < -256) refp[b][x][y] = -256;
        end
    end

    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (2) @(posedge clk);
    for (int b = 0; b < NB; b++)
      for (int u = 0; u < 8; u++)
        for (int v = 0; v < 8; v++) begin
          // blocks 16 and up are sent with random gaps
          if (b >= 16) while ($urandom_range(6) == 0) begin
            @(negedge clk) in_valid = 1'b0;
            n_gaps++;
          end
          @(negedge clk);
          in_valid = 1'b1;
          in_coef  = 12'(coef[b][u][v]);
          if (u == 7 && v == 7) last_cycle[b] = cycle;
        end
    @(negedge clk) in_valid = 1'b0;
  end

  always @(negedge clk) if (rst_n) begin
    if (row_sat) n_row_sat++;
    if (col_sat) n_col_sat++;
    if (dut.u_tr.reading && dut.u_tr.rcnt == 0) n_bank[dut.u_tr.rbank]++;
  end

  // pixels leave column by column: k = 8*y + x
  initial begin
    int b, k, prev, err;
    prev = -100;
    for (b = 0; b < NB; b++)
      for (k = 0; k < 64; k++) begin
        do @(negedge clk); while (!out_valid);
        if (k == 0) begin
          checks++;
          if (cycle - last_cycle[b] != 40) begin
            failures++;
            $display("block %0d: first pixel %0d cycles after last coefficient", b, cycle - last_cycle[b]);
          end
          if (b > 0 && b < 16 && cycle == prev + 1) n_b2b++;
        end
        if (b < 16 && (k > 0 || b > 0)) begin
          checks++;
          if (cycle != prev + 1) begin
            failures++;
            $display("block %0d pixel %0d: gap in the output stream", b, k);
          end
        end
        prev = cycle;
        if (k % 8 >= 4) n_sub++;
        if (!skip[b]) begin
          err = int'(out_pix) - refp[b][k % 8][k / 8];
          if (err < 0) err = -err;
          if (err > max_err) max_err = err;
          checks++;
          if (err > 1 || ((b == 3) && out_pix != 0)) begin
            failures++;
            $display("block %0d pixel (%0d,%0d): got %0d expected %0d",
                     b, k % 8, k / 8, out_pix, refp[b][k % 8][k / 8]);
          end
        end
      end
    repeat (5) @(posedge clk);
    $display("row clips %0d, pixel clips %0d, input gaps %0d, bank0 %0d bank1 %0d, back-to-back %0d, subtract outputs %0d, max error %0d",
             n_row_sat, n_col_sat, n_gaps, n_bank[0], n_bank[1], n_b2b, n_sub, max_err);
    checks += 6;
    if (n_row_sat == 0) begin failures++; $display("row clipping never happened"); end
    if (n_col_sat == 0) begin failures++; $display("pixel clipping never happened"); end
    if (n_gaps == 0) begin failures++; $display("no input gaps"); end
    if (n_bank[0] == 0 || n_bank[1] == 0) begin failures++; $display("a bank was never used"); end
    if (n_b2b == 0) begin failures++; $display("no back-to-back blocks"); end
    if (n_sub == 0) begin failures++; $display("subtract path never used"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
