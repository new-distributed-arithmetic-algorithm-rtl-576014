// tb_shift_adder: presents random 16-bit bit-column sums S(j) digit by digit
// as the two words w0/w1 (bit j of w0/w1 = low/high bit of digit t of S(j))
// and checks that acc equals sum_j S(j) * 2^j, with S(j) read as 16-bit two's
// complement, one cycle after the last digit; vectors run back to back.
module tb_shift_adder;
  import idct_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic valid = 1'b0, first = 1'b0, last = 1'b0;
  logic [CW-1:0] w0 = '0, w1 = '0;
  logic signed [ACC_W-1:0] acc;
  logic done;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  shift_adder dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint expq [$];

  initial begin
    logic [15:0] s [CW];
    longint e;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int v = 0; v < 400; v++) begin
      e = 0;
      for (int j = 0; j < CW; j++) begin
        s[j] = 16'($urandom);
        if (v == 0) s[j] = 16'h8000;   // most negative
        if (v == 1) s[j] = 16'h7FFF;   // most positive
        e += longint'(signed'(s[j])) * (longint'(1) << j);
      end
      expq.push_back(e);
      if (v % 7 == 3) begin
        @(negedge clk) valid = 1'b0;
      end
      for (int t = 0; t < 8; t++) begin
        @(negedge clk);
        valid = 1'b1; first = (t == 0); last = (t == 7);
        for (int j = 0; j < CW; j++) begin
          w0[j] = s[j][2*t];
          w1[j] = s[j][2*t+1];
        end
      end
    end
    @(negedge clk) valid = 1'b0;
    repeat (3) @(posedge clk);
    checks++;
    if (expq.size() != 0) begin
      failures++;
      $display("%0d results never came", expq.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n && done) begin
    longint e;
    e = expq.pop_front();
    checks++;
    if (longint'(acc) != e) begin
      failures++;
      $display("acc %0d expected %0d", acc, e);
    end
  end
endmodule
