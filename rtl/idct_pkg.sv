// idct_pkg: shared constants, types and elaboration-time functions of the
// adder-based distributed-arithmetic (DA) 8x8 IDCT.
//
// The 1-D eight-point IDCT is split into an even 4x4 kernel (inputs U0, U2,
// U4, U6 -> sums V(n)+V(7-n)) and an odd 4x4 kernel (inputs U1, U3, U5, U7 ->
// differences V(n)-V(7-n)). Every kernel coefficient is scaled by sqrt(2), so
// the DC and U4 terms become exactly +-1; the row and column passes together
// then carry a gain of 2, removed by one shift at the very end.
//
// Coefficients are signed integers equal to round(2^15 * sqrt(2) * cos(k*pi/16)),
// i.e. a sign plus a 16-bit magnitude in 1.15 format (bit 15 weighs 1).
//
// Adder-based DA works on the bits of these fixed coefficients: for output n
// and coefficient bit j, the bit-column sum S(n,j) = sum_i sign(n,i)*bit_j|c(n,i)|*X_i
// is a signed combination of the inputs. build_net() lists every distinct
// nonzero combination once ("term") and describes how each is formed from a
// smaller term plus or minus one input, so common partial sums are shared.
// The search for a parent term is greedy (reuse an existing term if one
// differs by a single input, else create the cheapest missing parent), not
// an exhaustive search.
package idct_pkg;

  localparam int NIN   = 4;   // inputs per summation network
  localparam int NOUT  = 4;   // inner products per summation network
  localparam int CW    = 16;  // coefficient magnitude bits (1.15)
  localparam int DIG   = 2;   // bits added per cycle by a serial adder
  localparam int NDIG  = 8;   // cycles per vector (one pixel per cycle)
  localparam int SW    = DIG * NDIG;  // serial word length, 16 bits
  localparam int ACC_W = 34;  // shift-adder accumulator width
  localparam int MAXT  = 80;  // upper bound on distinct terms (3^4 - 1)

  typedef logic signed [CW:0] coef_t;
  typedef coef_t [NOUT-1:0][NIN-1:0] kernel_t;  // [output n][input i]

  // A term code holds, per input i, bit 2i = input used, bit 2i+1 = negated.
  typedef logic [2*NIN-1:0] tcode_t;

  typedef struct packed {
    tcode_t     code;    // which inputs, with which signs
    logic [6:0] parent;  // term this one extends (terms of two or more inputs)
    logic [1:0] inp;     // input added to the parent (or the single input)
    logic       neg;     // that input is subtracted
  } term_t;

  typedef struct packed {
    logic [7:0]            count;
    term_t [MAXT-1:0]      list;
  } net_t;

  // round(2^15 * sqrt(2) * cos(k*pi/16)) for k = 0..8
  function automatic coef_t cos_q(int k);
    int kk;
    coef_t t;
    kk = k % 32;
    if (kk > 16) kk = 32 - kk;
    case (kk)
      0:  t = 46341;
      1:  t = 45451;
      2:  t = 42813;
      3:  t = 38531;
      4:  t = 32768;
      5:  t = 25746;
      6:  t = 17734;
      7:  t = 9041;
      8:  t = 0;
      default: t = -cos_q(16 - kk);  // cos(pi - a) = -cos(a)
    endcase
    return t;
  endfunction

  // Even kernel: V(n)+V(7-n) = sum_m sqrt2*C(2m)*cos((2n+1)*2m*pi/16) * U(2m)
  function automatic kernel_t even_kernel();
    kernel_t k;
    for (int n = 0; n < NOUT; n++)
      for (int m = 0; m < NIN; m++)
        k[n][m] = (m == 0) ? coef_t'(32768) : cos_q(2 * m * (2 * n + 1));
    return k;
  endfunction

  // Odd kernel: V(n)-V(7-n) = sum_m sqrt2*cos((2n+1)(2m+1)*pi/16) * U(2m+1)
  function automatic kernel_t odd_kernel();
    kernel_t k;
    for (int n = 0; n < NOUT; n++)
      for (int m = 0; m < NIN; m++)
        k[n][m] = cos_q((2 * m + 1) * (2 * n + 1));
    return k;
  endfunction

  localparam kernel_t EVEN_KERNEL = even_kernel();
  localparam kernel_t ODD_KERNEL  = odd_kernel();

  // Signed input combination needed for output n at coefficient bit j.
  function automatic tcode_t bit_code(kernel_t k, int n, int j);
    tcode_t c;
    logic [CW-1:0] mag;
    c = '0;
    for (int i = 0; i < NIN; i++) begin
      mag = CW'((k[n][i] < 0) ? -k[n][i] : k[n][i]);
      if (((mag >> j) & CW'(1)) != '0) begin
        c[2*i]   = 1'b1;
        c[2*i+1] = (k[n][i] < 0);
      end
    end
    return c;
  endfunction

  // Does some output/bit position use this term directly?
  function automatic bit is_output_term(kernel_t k, tcode_t c);
    for (int n = 0; n < NOUT; n++)
      for (int j = 0; j < CW; j++)
        if (bit_code(k, n, j) == c) return 1'b1;
    return 1'b0;
  endfunction

  function automatic int n_inputs(tcode_t c);
    int cnt = 0;
    for (int i = 0; i < NIN; i++) cnt += int'(c[2*i]);
    return cnt;
  endfunction

  function automatic int find_term(net_t net, tcode_t c);
    for (int t = 0; t < MAXT; t++)
      if (t < int'(net.count) && net.list[t].code == c) return t;
    return -1;
  endfunction

  // List the distinct terms of a kernel and how each is built.
  function automatic net_t build_net(kernel_t k);
    net_t   net;
    tcode_t c, p;
    int     best, bi, nt, bs, sc;
    net = '0;
    nt  = 0;
    for (int n = 0; n < NOUT; n++)
      for (int j = 0; j < CW; j++) begin
        c = bit_code(k, n, j);
        net.count = 8'(nt);
        if (c != '0 && find_term(net, c) < 0) begin
          net.list[nt].code = c;
          nt++;
        end
      end
    net.count = 8'(nt);
    // Give every term a parent; parents that do not exist yet are appended,
    // so the loop runs until the list is closed.
    for (int t = 0; t < MAXT; t++) begin
      if (t < nt) begin
        c = net.list[t].code;
        if (n_inputs(c) == 1) begin
          for (int i = 0; i < NIN; i++)
            if (c[2*i]) begin
              net.list[t].inp = 2'(i);
              net.list[t].neg = c[2*i+1];
            end
        end else begin
          best = -1;
          bi   = 0;
          // reuse a term that differs by one input
          for (int i = 0; i < NIN; i++)
            if (c[2*i] && best < 0) begin
              p = c & ~(tcode_t'(3) << (2 * i));
              if (find_term(net, p) >= 0) begin
                best = find_term(net, p);
                bi   = i;
              end
            end
          if (best < 0) begin
            // otherwise peel off the input that leaves the cheapest new
            // parent: a single positive input (a wire), else one that still
            // holds a positive input, else any; ties go to the highest input
            bs = 4;
            for (int i = 0; i < NIN; i++)
              if (c[2*i]) begin
                p = c & ~(tcode_t'(3) << (2 * i));
                sc = 3;
                for (int q = 0; q < NIN; q++)
                  if (p[2*q] && !p[2*q+1]) sc = (n_inputs(p) == 1) ? 1 : 2;
                if (sc <= bs) begin
                  bs = sc;
                  bi = i;
                end
              end
            p = c & ~(tcode_t'(3) << (2 * bi));
            net.list[nt].code = p;
            best = nt;
            nt++;
            net.count = 8'(nt);
          end
          net.list[t].parent = 7'(best);
          net.list[t].inp    = 2'(bi);
          net.list[t].neg    = c[2*bi+1];
        end
      end
    end
    net.count = 8'(nt);
    return net;
  endfunction

  // Number of serial adders a network needs (terms other than plain inputs).
  function automatic int n_adders(net_t net);
    int cnt = 0;
    for (int t = 0; t < MAXT; t++)
      if (t < int'(net.count) &&
          (n_inputs(net.list[t].code) > 1 || net.list[t].neg)) cnt++;
    return cnt;
  endfunction

endpackage
