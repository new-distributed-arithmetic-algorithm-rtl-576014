// output_unit: output latches and the single add/subtract unit of the 1-D
// IDCT.
//
// When load is high the four even-kernel results E0..E3 (E_n = V_n + V_7-n)
// and the four odd-kernel results O0..O3 (O_n = V_n - V_7-n) are latched.
// During the next 8 cycles one pair is enabled onto the adder per cycle and
// V0..V7 leave in order, one per cycle:
//   V_n = (E_n + O_n) / 2          for n = 0..3
//   V_n = (E_7-n - O_7-n) / 2      for n = 4..7
// The halving is folded into a final rounding shift: the sum is rounded to
// nearest (half rounds up) by dropping SHIFT bits and then clipped to a
// signed OUT_W-bit result; sat flags a clipped output.
//
// Timing: out_valid/out_data are registered; V0 appears the cycle after load.
// A new load may arrive in the same cycle as V7 is being formed.
// The latches with output enable and the +/- unit follow the original chip; the
// rounding rule and clipping are this implementation's.
module output_unit
  import idct_pkg::*;
#(
  parameter int OUT_W = 14,
  parameter int SHIFT = 14
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              load,
  input  logic [NOUT-1:0][ACC_W-1:0]        e_in,
  input  logic [NOUT-1:0][ACC_W-1:0]        o_in,
  output logic                              out_valid,
  output logic signed [OUT_W-1:0]           out_data,
  output logic                              sat
);
  localparam int SUM_W = ACC_W + 1;
  localparam logic signed [SUM_W-1:0] MAXV = SUM_W'((64'sd1 <<< (OUT_W - 1)) - 1);
  localparam logic signed [SUM_W-1:0] MINV = -SUM_W'(64'sd1 <<< (OUT_W - 1));

  logic [NOUT-1:0][ACC_W-1:0] e_q, o_q;
  logic [2:0]                 cnt;
  logic                       active;
  logic [1:0]                 sel;
  logic signed [SUM_W-1:0]    e_sel, o_sel, sum, rnd;
  logic signed [OUT_W-1:0]    clip;
  logic                       clipped;

  always_comb begin
    sel   = cnt[2] ? ~cnt[1:0] : cnt[1:0];   // n or 7-n
    e_sel = SUM_W'(signed'(e_q[sel]));
    o_sel = SUM_W'(signed'(o_q[sel]));
    sum   = cnt[2] ? (e_sel - o_sel) : (e_sel + o_sel);
    rnd   = (sum + (SUM_W'(1) <<< (SHIFT - 1))) >>> SHIFT;
    clipped = 1'b0;
    if (rnd > MAXV) begin
      clip = OUT_W'(MAXV);
      clipped = 1'b1;
    end else if (rnd < MINV) begin
      clip = OUT_W'(MINV);
      clipped = 1'b1;
    end else begin
      clip = OUT_W'(rnd);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      e_q       <= '0;
      o_q       <= '0;
      cnt       <= '0;
      active    <= 1'b0;
      out_valid <= 1'b0;
      out_data  <= '0;
      sat       <= 1'b0;
    end else begin
      out_valid <= active;
      if (active) begin
        out_data <= clip;
        sat      <= clipped;
      end
      if (active) begin
        cnt <= cnt + 3'd1;
        if (cnt == 3'd7) active <= 1'b0;
      end
      if (load) begin
        e_q    <= e_in;
        o_q    <= o_in;
        cnt    <= '0;
        active <= 1'b1;
      end
    end
  end
endmodule
