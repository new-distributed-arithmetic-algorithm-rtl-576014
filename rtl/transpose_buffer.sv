// transpose_buffer: the transposition memory between the row and the column
// passes of the row-column 2-D IDCT.
//
// Two banks of 64 words are used in ping-pong fashion. Row results arrive
// one word per cycle in row-major order (address = 8*row + col) and are
// written into the write bank; when its 64th word is written the bank is
// marked full and the writer moves to the other bank. A full bank is read
// out, starting in the cycle its last word is written, column by column (address = 8*row + col with row running fastest),
// one word per cycle, after which it is free again. Writing and reading
// therefore overlap and the buffer sustains one word per cycle.
//
// Timing: the read is registered, so out_valid follows the read address by
// one cycle; the first word of a block leaves 2 cycles after its last word
// was written, and consecutive blocks leave without a gap. Writing into a bank that is still full is a protocol error
// and is flagged by an assertion.
// The need for this buffer follows from the row-column decomposition of the
// original chip; its organisation is this implementation's.
module transpose_buffer #(
  parameter int W = 14
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [W-1:0] in_data,
  output logic         out_valid,
  output logic [W-1:0] out_data
);
  logic [W-1:0] mem [2][64];
  logic         wbank, rbank, reading;
  logic [5:0]   wcnt, rcnt;
  logic [1:0]   full;
  logic [5:0]   raddr;

  assign raddr = {rcnt[2:0], rcnt[5:3]};

  // a bank may be read once it is full or its last word is being written
  function automatic logic ready(logic bank);
    return full[bank] || (in_valid && wcnt == 6'd63 && wbank == bank);
  endfunction

  always_ff @(posedge clk) begin
    if (in_valid) mem[wbank][wcnt] <= in_data;
    if (reading)  out_data <= mem[rbank][raddr];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wbank     <= 1'b0;
      rbank     <= 1'b0;
      wcnt      <= '0;
      rcnt      <= '0;
      full      <= '0;
      reading   <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= reading;
      if (in_valid) begin
        wcnt <= wcnt + 6'd1;
        if (wcnt == 6'd63) begin
          full[wbank] <= 1'b1;
          wbank       <= ~wbank;
        end
      end
      if (reading) begin
        rcnt <= rcnt + 6'd1;
        if (rcnt == 6'd63) begin
          full[rbank] <= 1'b0;
          rbank       <= ~rbank;
          reading     <= ready(~rbank);
        end
      end else if (ready(rbank)) begin
        reading <= 1'b1;
        rcnt    <= '0;
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n)
                   in_valid |-> !full[wbank])
    else $error("transpose_buffer: write into a bank not yet read out");
endmodule
