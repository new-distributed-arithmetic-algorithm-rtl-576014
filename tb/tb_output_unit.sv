// tb_output_unit: loads random even/odd sums and checks the eight outputs
// V0..V7 = round((E_n +- O_n) / 2^SHIFT), clipped to OUT_W bits, including
// the clip flag, the cycle after load and with loads back to back.
module tb_output_unit;
  import idct_pkg::*;
  localparam int OUT_W = 14, SHIFT = 14;
  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0;
  logic [NOUT-1:0][ACC_W-1:0] e_in = '0, o_in = '0;
  logic out_valid, sat;
  logic signed [OUT_W-1:0] out_data;
  int checks = 0, failures = 0, n_sat = 0;

  always #5 clk = ~clk;

  output_unit #(.OUT_W(OUT_W), .SHIFT(SHIFT)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint expq [$];
  int load_cyc [$];
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  function automatic longint rnd_clip(longint x);
    longint r, mx, mn;
    r  = (x + (longint'(1) << (SHIFT - 1))) >>> SHIFT;
    mx = (longint'(1) << (OUT_W - 1)) - 1;
    mn = -(longint'(1) << (OUT_W - 1));
    return (r > mx) ? mx : (r < mn) ? mn : r;
  endfunction

  initial begin
    longint e [4], o [4];
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int v = 0; v < 200; v++) begin
      for (int n = 0; n < 4; n++) begin
        // mostly in range, every fourth vector large enough to clip
        e[n] = (v % 4 == 3) ? longint'($urandom_range(0, 1 << 30)) - (1 << 29)
                            : longint'($urandom_range(0, 1 << 27)) - (1 << 26);
        o[n] = longint'($urandom_range(0, 1 << 27)) - (1 << 26);
        e_in[n] = ACC_W'(e[n]);
        o_in[n] = ACC_W'(o[n]);
      end
      for (int n = 0; n < 4; n++) expq.push_back(rnd_clip(e[n] + o[n]));
      for (int n = 3; n >= 0; n--) expq.push_back(rnd_clip(e[n] - o[n]));
      @(negedge clk) load = 1'b1;
      load_cyc.push_back(cycle);
      @(negedge clk) load = 1'b0;
      repeat ((v % 3 == 0) ? 6 : 7) @(negedge clk);
    end
    repeat (12) @(posedge clk);
    checks++;
    if (expq.size() != 0 || n_sat == 0) begin
      failures++;
      $display("missing outputs (%0d) or clipping never seen (%0d)", expq.size(), n_sat);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int k = 0;
  always @(negedge clk) if (rst_n && out_valid) begin
    longint e, mx;
    e  = expq.pop_front();
    mx = (longint'(1) << (OUT_W - 1)) - 1;
    checks++;
    if (k % 8 == 0) begin
      int lc;
      lc = load_cyc.pop_front();
      checks++;
      if (cycle != lc + 2) begin
        failures++;
        $display("V0 came %0d cycles after load", cycle - lc);
      end
    end
    if (longint'(out_data) != e) begin
      failures++;
      $display("output %0d: got %0d expected %0d", k % 8, out_data, e);
    end
    if (sat != (e == mx || e == -mx - 1)) begin
      failures++;
      $display("clip flag wrong");
    end
    if (sat) n_sat++;
    k++;
  end
endmodule
