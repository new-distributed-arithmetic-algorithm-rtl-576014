// tb_summation_network: drives two networks with random serial inputs and
// rebuilds every bit-column sum S(n,j) from the output words.
//  - the four-input example kernel with coefficients 1011, 0101, 0011 (X1, X2,
//    X3; fourth input unused), whose distinct terms are X1, X2, X1+X3 and
//    X1+X2+X3 and which must be built with only two serial adders;
//  - the even and the odd IDCT kernels (signed coefficients).
// Expected sums are computed here from the coefficient bits, independently of
// the term list, and the outputs must arrive one cycle after the inputs.
module tb_summation_network;
  import idct_pkg::*;

  function automatic kernel_t example_kernel();
    kernel_t k;
    k = '0;
    k[0][0] = 17'sd11;  // X1 * 1011
    k[0][1] = 17'sd5;   // X2 * 0101
    k[0][2] = 17'sd3;   // X3 * 0011
    return k;
  endfunction
  localparam kernel_t EX_K = example_kernel();
  localparam kernel_t EV_K = EVEN_KERNEL;
  localparam kernel_t OD_K = ODD_KERNEL;

  logic clk = 1'b0, rst_n = 1'b0;
  logic dig_valid = 1'b0, dig_first = 1'b0, dig_last = 1'b0;
  logic [NIN-1:0][DIG-1:0] x_dig = '0;
  logic ex_v, ex_f, ex_l, ev_v, ev_f, ev_l;
  logic [NOUT-1:0][CW-1:0] ex_w0, ex_w1, ev_w0, ev_w1, od_w0, od_w1;
  logic od_v, od_f, od_l;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  summation_network #(.KERNEL(EX_K)) dut_ex (
    .clk, .rst_n, .dig_valid, .dig_first, .dig_last, .x_dig,
    .out_valid(ex_v), .out_first(ex_f), .out_last(ex_l), .w0(ex_w0), .w1(ex_w1));
  summation_network #(.KERNEL(EV_K)) dut_ev (
    .clk, .rst_n, .dig_valid, .dig_first, .dig_last, .x_dig,
    .out_valid(ev_v), .out_first(ev_f), .out_last(ev_l), .w0(ev_w0), .w1(ev_w1));
  summation_network #(.KERNEL(OD_K)) dut_od (
    .clk, .rst_n, .dig_valid, .dig_first, .dig_last, .x_dig,
    .out_valid(od_v), .out_first(od_f), .out_last(od_l), .w0(od_w0), .w1(od_w1));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected S(n,j) for a kernel, from the coefficient bits directly
  function automatic logic [15:0] col_sum(kernel_t k, int n, int j, logic [3:0][15:0] x);
    int s = 0;
    int c, mag;
    for (int i = 0; i < 4; i++) begin
      c = int'(k[n][i]);
      mag = (c < 0) ? -c : c;
      if ((mag >> j) & 1) s += (c < 0) ? -int'(signed'(x[i])) : int'(signed'(x[i]));
    end
    return 16'(s);
  endfunction

  initial begin
    logic [3:0][15:0] x;
    logic [NOUT-1:0][CW-1:0][15:0] got_ex, got_ev, got_od;
    checks++;
    if (n_adders(build_net(EX_K)) != 2) begin
      failures++;
      $display("example network uses %0d serial adders, expected 2",
               n_adders(build_net(EX_K)));
    end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int v = 0; v < 200; v++) begin
      for (int i = 0; i < 4; i++) x[i] = 16'(signed'(14'($urandom)));
      if (v == 0) x = {4{16'h2000 ^ 16'hFFFF}};  // all -8192 (sign-extended 14-bit minimum)
      for (int t = 0; t < 8; t++) begin
        @(negedge clk);
        dig_valid = 1'b1; dig_first = (t == 0); dig_last = (t == 7);
        for (int i = 0; i < 4; i++) x_dig[i] = x[i][2*t +: 2];
        @(posedge clk); #1;
        // outputs of this digit are visible one cycle later
        @(negedge clk);
        dig_valid = 1'b0;
        checks++;
        if (!(ex_v && ev_v && od_v) || ex_f != (t == 0) || ev_l != (t == 7) ||
            od_f != (t == 0) || od_l != (t == 7)) begin
          failures++;
          $display("valid/first/last not delayed by one cycle at digit %0d", t);
        end
        for (int n = 0; n < 4; n++)
          for (int j = 0; j < CW; j++) begin
            got_ex[n][j][2*t] = ex_w0[n][j]; got_ex[n][j][2*t+1] = ex_w1[n][j];
            got_ev[n][j][2*t] = ev_w0[n][j]; got_ev[n][j][2*t+1] = ev_w1[n][j];
            got_od[n][j][2*t] = od_w0[n][j]; got_od[n][j][2*t+1] = od_w1[n][j];
          end
      end
      for (int n = 0; n < 4; n++)
        for (int j = 0; j < CW; j++) begin
          checks += 3;
          if (got_od[n][j] != col_sum(OD_K, n, j, x)) begin
            failures++;
            $display("odd S(%0d,%0d) = %h expected %h", n, j, got_od[n][j], col_sum(OD_K, n, j, x));
          end
          if (got_ex[n][j] != col_sum(EX_K, n, j, x)) begin
            failures++;
            $display("example S(%0d,%0d) = %h expected %h", n, j, got_ex[n][j], col_sum(EX_K, n, j, x));
          end
          if (got_ev[n][j] != col_sum(EV_K, n, j, x)) begin
            failures++;
            $display("even S(%0d,%0d) = %h expected %h", n, j, got_ev[n][j], col_sum(EV_K, n, j, x));
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
