// tb_serial_adder: feeds random 16-bit words, two bits per cycle LSB first,
// into an adding and a subtracting serial_adder and compares the serial
// results with a + b and a - b (mod 2^16), word after word with no gap so
// that the carry clear at each first digit is exercised.
module tb_serial_adder;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, first = 1'b0;
  logic [1:0] a, b, s_add, s_sub;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  serial_adder #(.SUB(1'b0)) dut_add (.clk, .rst_n, .en, .first, .a, .b, .s(s_add));
  serial_adder #(.SUB(1'b1)) dut_sub (.clk, .rst_n, .en, .first, .a, .b, .s(s_sub));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] wa, wb, ra, rs;
    a = '0; b = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int w = 0; w < 300; w++) begin
      wa = 16'($urandom);
      wb = 16'($urandom);
      if (w == 0) begin wa = 16'hFFFF; wb = 16'h0001; end  // carry through all digits
      if (w == 1) begin wa = 16'h0000; wb = 16'h0001; end  // borrow through all digits
      for (int d = 0; d < 8; d++) begin
        @(negedge clk);
        en = 1'b1; first = (d == 0);
        a = wa[2*d +: 2]; b = wb[2*d +: 2];
        #1;
        ra[2*d +: 2] = s_add;
        rs[2*d +: 2] = s_sub;
      end
      checks += 2;
      if (ra != 16'(wa + wb)) begin
        failures++;
        $display("add %h + %h = %h, expected %h", wa, wb, ra, 16'(wa + wb));
      end
      if (rs != 16'(wa - wb)) begin
        failures++;
        $display("sub %h - %h = %h, expected %h", wa, wb, rs, 16'(wa - wb));
      end
    end
    @(negedge clk) en = 1'b0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
