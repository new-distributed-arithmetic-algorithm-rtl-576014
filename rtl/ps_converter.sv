// ps_converter: input buffer (parallel-to-serial converter) of the 1-D IDCT.
//
// Input words arrive one per cycle (in_valid) as U0, U1, ..., U7. They are
// collected in a holding register; when the eighth word arrives the whole
// vector, sign-extended from IN_W to 16 bits, is copied into eight shift
// registers, and the collector is free for the next vector at once. The
// shift registers then emit two bits of every word per cycle, least
// significant digit first, for 8 cycles (dig_valid high, dig_first on digit
// 0, dig_last on digit 7). With continuous input a new vector is loaded in
// the same cycle as the last digit of the previous one, so the serial side
// runs without gaps at one vector per 8 cycles; gaps in in_valid simply
// delay the next load.
//
// Two bits per cycle over 8 cycles follows the original chip (12-bit input, eight
// cycles per 1-D transform); the four spare digits carry the sign extension
// that lets sums of up to four inputs stay exact in 16 bits. The word order
// and the valid handshake are this implementation's choice.
module ps_converter
  import idct_pkg::*;
#(
  parameter int IN_W = 12
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic [IN_W-1:0]        in_data,
  output logic                   dig_valid,
  output logic                   dig_first,
  output logic                   dig_last,
  output logic [7:0][DIG-1:0]    dig
);
  logic [6:0][IN_W-1:0] hold;
  logic [2:0]           wcnt;
  logic [7:0][SW-1:0]   sh;
  logic [2:0]           dcnt;
  logic                 active;
  logic                 load;

  assign load = in_valid && (wcnt == 3'd7);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wcnt   <= '0;
      dcnt   <= '0;
      active <= 1'b0;
      hold   <= '0;
      sh     <= '0;
    end else begin
      if (in_valid) begin
        wcnt <= wcnt + 3'd1;
        if (!load) hold[wcnt] <= in_data;
      end
      if (load) begin
        for (int i = 0; i < 7; i++) sh[i] <= SW'(signed'(hold[i]));
        sh[7]  <= SW'(signed'(in_data));
        active <= 1'b1;
        dcnt   <= '0;
      end else if (active) begin
        for (int i = 0; i < 8; i++) sh[i] <= SW'(signed'(sh[i]) >>> DIG);
        dcnt   <= dcnt + 3'd1;
        if (dcnt == 3'd7) active <= 1'b0;
      end
    end
  end

  always_comb begin
    for (int i = 0; i < 8; i++) dig[i] = sh[i][DIG-1:0];
  end
  assign dig_valid = active;
  assign dig_first = active && (dcnt == 3'd0);
  assign dig_last  = active && (dcnt == 3'd7);

  initial assert (IN_W <= SW - 2)
    else $error("IN_W must leave two guard bits for the sums of four inputs");
endmodule
