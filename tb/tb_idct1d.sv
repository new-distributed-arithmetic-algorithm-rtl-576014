// tb_idct1d: end-to-end test of the 1-D adder-based DA IDCT at its default
// parameters (12-bit input, 14-bit output with 2 fraction bits).
// Expected outputs are computed here in two ways:
//  - bit-exact: integer inner products with coefficients
//    round(2^15 * sqrt(2) * cos(k*pi/16)) derived from $cos, then
//    round((E +- O) / 2^14) and clipping to 14 bits;
//  - real-valued: sqrt(2) * orthonormal IDCT, which must agree with the
//    output within 0.4 (output LSB is 0.25) when no clipping occurs.
// It also checks the latency (12 cycles from U7 to V0), that back-to-back
// vectors give an unbroken output stream (one sample per cycle), and that
// clipping occurs and is flagged.
module tb_idct1d;
  localparam int IN_W = 12, OUT_W = 14, SH = 14;
  localparam real PI = 3.14159265358979323846;
  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic [IN_W-1:0] in_data = '0;
  logic out_valid, sat;
  logic signed [OUT_W-1:0] out_data;
  int checks = 0, failures = 0, n_sat = 0, n_gap_vec = 0;

  always #5 clk = ~clk;

  idct1d dut (.*);

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint q(int k);
    return longint'($rtoi($floor(32768.0 * $sqrt(2.0) * $cos(k * PI / 16.0) + 0.5)));
  endfunction

  function automatic longint rnd_clip(longint x, output bit clipped);
    longint r, mx, mn;
    r  = (x + (longint'(1) << (SH - 1))) >>> SH;
    mx = (longint'(1) << (OUT_W - 1)) - 1;
    mn = -(longint'(1) << (OUT_W - 1));
    clipped = (r > mx) || (r < mn);
    return (r > mx) ? mx : (r < mn) ? mn : r;
  endfunction

  longint exp_q [$];
  real    ref_q [$];
  bit     clip_q [$];
  int     u7_cycle [$];
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  localparam int NV = 300;

  initial begin
    int u [8];
    longint e [4], o [4], ev;
    real x;
    bit cl;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int v = 0; v < NV; v++) begin
      for (int i = 0; i < 8; i++) begin
        case (v % 10)
          0: u[i] = (i == 0) ? 2047 : 0;                       // DC only
          1: u[i] = (i[0]) ? -2048 : 2047;                     // extremes
          2: u[i] = 0;                                         // all zero
          default: u[i] = $urandom_range(0, 1023) - 512;
        endcase
        if (v % 10 == 5) u[i] = $urandom_range(0, 4095) - 2048;
      end
      for (int n = 0; n < 4; n++) begin
        e[n] = 0; o[n] = 0;
        for (int m = 0; m < 4; m++) begin
          e[n] += ((m == 0) ? longint'(32768) : q(2 * m * (2 * n + 1))) * u[2*m];
          o[n] += q((2 * m + 1) * (2 * n + 1)) * u[2*m+1];
        end
      end
      for (int n = 0; n < 8; n++) begin
        ev = (n < 4) ? rnd_clip(e[n] + o[n], cl) : rnd_clip(e[7-n] - o[7-n], cl);
        exp_q.push_back(ev);
        clip_q.push_back(cl);
        x = 0.0;
        for (int k = 0; k < 8; k++)
          x += ((k == 0) ? $sqrt(0.125) : 0.5) * u[k] * $cos((2 * n + 1) * k * PI / 16.0);
        ref_q.push_back($sqrt(2.0) * x);
      end
      for (int i = 0; i < 8; i++) begin
        if (v >= NV / 2 && $urandom_range(5) == 0) begin
          @(negedge clk) in_valid = 1'b0;
          if (i == 0) n_gap_vec++;
        end
        @(negedge clk);
        in_valid = 1'b1;
        in_data  = IN_W'(u[i]);
        if (i == 7) u7_cycle.push_back(cycle);
      end
    end
    @(negedge clk) in_valid = 1'b0;
    repeat (30) @(posedge clk);
    checks++;
    if (exp_q.size() != 0 || n_sat == 0) begin
      failures++;
      $display("outputs missing (%0d) or clipping never seen (%0d)", exp_q.size(), n_sat);
    end
    $display("clipped outputs %0d", n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int k = 0, prev_valid_cycle = -100;
  always @(negedge clk) if (rst_n && out_valid) begin
    longint ev;
    real    r;
    bit     cl;
    ev = exp_q.pop_front();
    r  = ref_q.pop_front();
    cl = clip_q.pop_front();
    checks++;
    if (longint'(out_data) != ev) begin
      failures++;
      $display("vector %0d V%0d: got %0d expected %0d", k / 8, k % 8, out_data, ev);
    end
    if (!cl) begin
      checks++;
      if (out_data / 4.0 - r > 0.4 || r - out_data / 4.0 > 0.4) begin
        failures++;
        $display("vector %0d V%0d: %f far from real %f", k / 8, k % 8, out_data / 4.0, r);
      end
    end
    checks++;
    if (sat != cl) begin
      failures++;
      $display("clip flag wrong");
    end
    if (sat) n_sat++;
    if (k % 8 == 0) begin
      int c7;
      c7 = u7_cycle.pop_front();
      checks++;
      if (cycle - c7 != 12) begin
        failures++;
        $display("vector %0d: latency %0d, expected 12", k / 8, cycle - c7);
      end
    end
    // first half of the vectors are sent back to back: no output gaps
    if (k > 0 && k < (NV / 2) * 8) begin
      checks++;
      if (cycle != prev_valid_cycle + 1) begin
        failures++;
        $display("gap in output stream before sample %0d", k);
      end
    end
    prev_valid_cycle = cycle;
    k++;
  end
endmodule
