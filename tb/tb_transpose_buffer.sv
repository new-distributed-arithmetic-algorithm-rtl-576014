// tb_transpose_buffer: writes blocks of 64 words in row-major order, back to
// back and with gaps, and checks that each block is read out transposed
// (column by column), one word per cycle without gaps inside a block, and
// that both banks are used alternately.
module tb_transpose_buffer;
  localparam int W = 14;
  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic [W-1:0] in_data = '0, out_data;
  logic out_valid;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  transpose_buffer #(.W(W)) dut (.*);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int NB = 12;
  logic [W-1:0] blk [NB][64];

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int b = 0; b < NB; b++)
      for (int a = 0; a < 64; a++) begin
        if (b >= 8) while ($urandom_range(4) == 0) @(negedge clk) in_valid = 1'b0;
        @(negedge clk);
        in_valid = 1'b1;
        in_data  = W'($urandom);
        blk[b][a] = in_data;
      end
    @(negedge clk) in_valid = 1'b0;
  end

  initial begin
    int k, run, bank_switches;
    logic last_bank;
    k = 0; run = 0; bank_switches = 0; last_bank = 1'b0;
    while (k < NB * 64) begin
      @(negedge clk);
      if (out_valid) begin
        int b, r, c;
        b = k / 64; c = (k % 64) / 8; r = k % 8;
        checks++;
        if (out_data != blk[b][8*r + c]) begin
          failures++;
          $display("block %0d out %0d: got %h expected element (%0d,%0d) %h",
                   b, k % 64, out_data, r, c, blk[b][8*r + c]);
        end
        if (k % 64 == 0) begin
          if (k > 0 && dut.rbank == last_bank) begin
            failures++;
            $display("block %0d read from the same bank as the one before", b);
          end
          last_bank = dut.rbank;
          bank_switches++;
        end
        run = (k % 64 == 0) ? 1 : run + 1;
        k++;
      end else if (k % 64 != 0) begin
        failures++;
        $display("gap inside an output block at word %0d", k);
      end
    end
    checks++;
    if (bank_switches != NB) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
