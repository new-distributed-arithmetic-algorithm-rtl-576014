// tb_ps_converter: sends vectors of eight random 12-bit words, both back to
// back and with gaps in in_valid, rebuilds each 16-bit serial word from the
// 2-bit digits and checks it equals the sign-extended input. Also checks
// that digits start the cycle after the eighth word and that back-to-back
// vectors give an unbroken stream of 8-cycle digit groups.
module tb_ps_converter;
  import idct_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic [11:0] in_data = '0;
  logic dig_valid, dig_first, dig_last;
  logic [7:0][DIG-1:0] dig;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ps_converter #(.IN_W(12)) dut (.*);

  logic [11:0] vecs [$];
  int load_cycle [$];
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // driver
  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int v = 0; v < 60; v++) begin
      for (int i = 0; i < 8; i++) begin
        if (v >= 30) while ($urandom_range(3) == 0) begin
          @(negedge clk) in_valid = 1'b0;
        end
        @(negedge clk);
        in_valid = 1'b1;
        in_data  = 12'($urandom);
        if (v == 0) in_data = (i[0]) ? 12'h800 : 12'h7FF;
        vecs.push_back(in_data);
        if (i == 7) load_cycle.push_back(cycle);
      end
    end
    @(negedge clk) in_valid = 1'b0;
  end

  // monitor
  initial begin
    logic [7:0][15:0] rebuilt;
    int d, first_cycle, prev_end;
    logic [11:0] exp_w;
    prev_end = -1;
    for (int v = 0; v < 60; v++) begin
      d = 0;
      while (d < 8) begin
        @(posedge clk);
        if (dig_valid) begin
          if (d == 0) first_cycle = cycle;
          if (dig_first != (d == 0) || dig_last != (d == 7)) begin
            failures++;
            $display("first/last markers wrong at digit %0d", d);
          end
          for (int i = 0; i < 8; i++) rebuilt[i][2*d +: 2] = dig[i];
          d++;
        end
      end
      checks++;
      if (first_cycle != load_cycle[v] + 1) begin
        failures++;
        $display("vector %0d: digits start %0d cycles after the eighth word",
                 v, first_cycle - load_cycle[v]);
      end
      if (v > 0 && v < 30) begin
        checks++;
        if (first_cycle != prev_end + 1) begin
          failures++;
          $display("vector %0d: gap in back-to-back digit stream", v);
        end
      end
      prev_end = first_cycle + 7;
      for (int i = 0; i < 8; i++) begin
        exp_w = vecs.pop_front();
        checks++;
        if (rebuilt[i] != 16'(signed'(exp_w))) begin
          failures++;
          $display("vector %0d word %0d: got %h expected %h", v, i, rebuilt[i], exp_w);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
