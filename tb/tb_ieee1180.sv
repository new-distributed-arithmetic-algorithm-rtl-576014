// tb_ieee1180: accuracy test of the 2-D IDCT processor in the manner of IEEE
// Std 1180-1990. For each pixel range (L,H) = (256,255), (5,5), (300,300),
// and each of these with the sign of the input data reversed, NBLK random
// pixel blocks in -L..H are transformed by a double-precision forward DCT,
// rounded and clipped to -2048..2047, and passed through the processor. The
// outputs are compared with a double-precision IDCT of the same
// coefficients, rounded and clipped to -256..255, and the standard's
// statistics are formed and checked against its limits:
//   pixel peak error <= 1, peak mean square error (per position) <= 0.06,
//   overall mean square error <= 0.02, peak mean error (per position)
//   <= 0.015, overall mean error <= 0.0015, all-zero in gives all-zero out.
// The random numbers come from $urandom, not from the standard's own
// generator, so the figures are comparable with, not identical to, a
// certified run. Blocks are streamed back to back.
module tb_ieee1180;
  localparam real PI = 3.14159265358979323846;
  localparam int NBLK = 10000;   // blocks per range and sign
  localparam int NSET = 6;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic [11:0] in_coef = '0;
  logic out_valid, row_sat, col_sat;
  logic signed [8:0] out_pix;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  idct2d dut (.*);

  initial begin
    repeat (NSET * (NBLK + 1) * 64 + 5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real cm [8][8];   // cm[k][x] = C(k)/2 * cos((2x+1) k pi / 16)

  // separable real 2-D transforms
  function automatic void fdct(input int p [8][8], output int f [8][8]);
    real t [8][8];
    real s;
    for (int x = 0; x < 8; x++)
      for (int v = 0; v < 8; v++) begin
        s = 0.0;
        for (int y = 0; y < 8; y++) s += cm[v][y] * p[x][y];
        t[x][v] = s;
      end
    for (int u = 0; u < 8; u++)
      for (int v = 0; v < 8; v++) begin
        s = 0.0;
        for (int x = 0; x < 8; x++) s += cm[u][x] * t[x][v];
        f[u][v] = $rtoi($floor(s + 0.5));
        if (f[u][v] > 2047) f[u][v] = 2047;
        if (f[u][v] < -2048) f[u][v] = -2048;
      end
  endfunction

  function automatic void idct(input int f [8][8], output int p [8][8]);
    real t [8][8];
    real s;
    for (int u = 0; u < 8; u++)
      for (int y = 0; y < 8; y++) begin
        s = 0.0;
        for (int v = 0; v < 8; v++) s += cm[v][y] * f[u][v];
        t[u][y] = s;
      end
    for (int x = 0; x < 8; x++)
      for (int y = 0; y < 8; y++) begin
        s = 0.0;
        for (int u = 0; u < 8; u++) s += cm[u][x] * t[u][y];
        p[x][y] = $rtoi($floor(s + 0.5));
        if (p[x][y] > 255) p[x][y] = 255;
        if (p[x][y] < -256) p[x][y] = -256;
      end
  endfunction

  // reference pixels waiting for the processor's output, one block at a time
  int refq [$];
  bit zero_blk [$];

  initial begin
    int p [8][8], f [8][8], r [8][8];
    int lo, hi, sg;
    for (int k = 0; k < 8; k++)
      for (int x = 0; x < 8; x++)
        cm[k][x] = ((k == 0) ? $sqrt(0.125) : 0.5) * $cos((2 * x + 1) * k * PI / 16.0);
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (2) @(posedge clk);
    for (int set = 0; set < NSET; set++) begin
      case (set % 3)
        0: begin lo = 256; hi = 255; end
        1: begin lo = 5;   hi = 5;   end
        default: begin lo = 300; hi = 300; end
      endcase
      sg = (set < 3) ? 1 : -1;
      for (int b = 0; b < NBLK; b++) begin
        for (int x = 0; x < 8; x++)
          for (int y = 0; y < 8; y++)
            p[x][y] = sg * (int'($urandom_range(0, lo + hi)) - lo);
        fdct(p, f);
        idct(f, r);
        // output order: column by column
        for (int y = 0; y < 8; y++)
          for (int x = 0; x < 8; x++) refq.push_back(r[x][y]);
        zero_blk.push_back(1'b0);
        for (int u = 0; u < 8; u++)
          for (int v = 0; v < 8; v++) begin
            @(negedge clk);
            in_valid = 1'b1;
            in_coef  = 12'(f[u][v]);
          end
      end
    end
    // all-zero block
    for (int i = 0; i < 64; i++) refq.push_back(0);
    zero_blk.push_back(1'b1);
    for (int i = 0; i < 64; i++) begin
      @(negedge clk);
      in_valid = 1'b1;
      in_coef  = '0;
    end
    @(negedge clk) in_valid = 1'b0;
  end

  initial begin
    real sum_e [64], sum_e2 [64];
    real pme, pmse, ome, omse, me, mse, n;
    int  peak, e, blk_zero_ok;
    bit  zb;
    for (int set = 0; set < NSET; set++) begin
      for (int i = 0; i < 64; i++) begin sum_e[i] = 0.0; sum_e2[i] = 0.0; end
      peak = 0;
      for (int b = 0; b < NBLK; b++) begin
        zb = zero_blk.pop_front();
        for (int k = 0; k < 64; k++) begin
          do @(negedge clk); while (!out_valid);
          e = int'(out_pix) - refq.pop_front();
          sum_e[k]  += e;
          sum_e2[k] += e * e;
          if (e > peak) peak = e;
          if (-e > peak) peak = -e;
        end
      end
      n = real'(NBLK);
      pme = 0.0; pmse = 0.0; ome = 0.0; omse = 0.0;
      for (int k = 0; k < 64; k++) begin
        me  = sum_e[k] / n;
        mse = sum_e2[k] / n;
        if (me > pme) pme = me;
        if (-me > pme) pme = -me;
        if (mse > pmse) pmse = mse;
        ome  += sum_e[k];
        omse += sum_e2[k];
      end
      ome  = ome / (64.0 * n);
      omse = omse / (64.0 * n);
      $display("range -%0d..%0d sign %s: peak error %0d, peak mse %f, overall mse %f, peak mean error %f, overall mean error %f",
               (set % 3 == 0) ? 256 : (set % 3 == 1) ? 5 : 300,
               (set % 3 == 0) ? 255 : (set % 3 == 1) ? 5 : 300,
               (set < 3) ? "+" : "-", peak, pmse, omse, pme, (ome < 0) ? -ome : ome);
      checks += 5;
      if (peak > 1)        begin failures++; $display("  pixel peak error above 1"); end
      if (pmse > 0.06)     begin failures++; $display("  peak mean square error above 0.06"); end
      if (omse > 0.02)     begin failures++; $display("  overall mean square error above 0.02"); end
      if (pme > 0.015)     begin failures++; $display("  peak mean error above 0.015"); end
      if (ome > 0.0015 || -ome > 0.0015) begin failures++; $display("  overall mean error above 0.0015"); end
    end
    zb = zero_blk.pop_front();
    blk_zero_ok = 1;
    for (int k = 0; k < 64; k++) begin
      do @(negedge clk); while (!out_valid);
      e = refq.pop_front();
      if (out_pix != 0) blk_zero_ok = 0;
    end
    checks++;
    if (!blk_zero_ok) begin failures++; $display("all-zero block did not give all-zero pixels"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
