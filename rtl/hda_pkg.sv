// hda_pkg -- shared types, constants and the variable radix-2 multi-bit coder
//
// The idea behind hardwired distributed arithmetic (HDA) is that a product
// with a fixed coefficient never needs a multiplier: the coefficient is
// recoded into signed digits that are each 0 or +-2^a, so every partial
// product is just the multiplicand shifted (and possibly negated), and all
// partial products of an inner product are summed in one fixed compressor
// tree.  This package holds the recoder that finds those digits.  It is a
// constant function: modules call it at elaboration time on their
// coefficient parameters and wire the resulting shifts.
//
// Recoding (vr2_encode).  The coefficient Y (w bits, two's complement,
// y[-1] = 0) is cut into overlapping groups, like modified Booth recoding
// but with a variable group length m >= 3.  A group starting at bit p and
// ending at bit t = p + m - 1 has the digit
//     D = y[p] + sum_{j=1..m-2} y[p+j] * 2^(j-1) - y[t] * 2^(m-2)
// with weight 2^(p+1); the next group starts at t (one bit of overlap), so
// sum D_i * 2^(p_i+1) = Y.  Scanning from the LSB, each group starts with
// m = 3 (a radix-4 Booth digit, always 0, +-1 or +-2) and is grown one bit
// at a time while its digit stays 0 or a signed power of two and its top
// bit does not pass the MSB; it stops at the first length that fails.  The
// last group may reach past the MSB, where bits are sign copies.  Every
// nonzero digit becomes one partial product +-(X << shift).
//
// The group test on the digit value is this design's formulation of the
// scan condition of the original flow chart; the DCT and DWT coefficient
// values are standard (Chen DCT with 0.5*cos(k*pi/16), Daubechies N=6 and
// N=4), kept
// here at 20 fractional bits and rounded to the precision a module asks for.
package hda_pkg;

  // Largest number of nonzero digits a code can hold.
  localparam int MAXD = 16;

  typedef struct packed {
    logic [4:0]            count;  // number of nonzero digits
    logic [MAXD-1:0]       neg;    // digit i is -2^shift[i]
    logic [MAXD-1:0][5:0]  shift;  // digit i is +-2^shift[i]
  } sd_code_t;

  // Operating mode of the DCT/IDCT datapath.
  typedef enum logic {
    MODE_DCT  = 1'b0,
    MODE_IDCT = 1'b1
  } dct_mode_t;

  // Bit j of y, with y[-1] = 0 and sign copies above bit 62.
  function automatic longint ybit(input longint y, input int j);
    int jj;
    if (j < 0) return 0;
    jj = (j > 62) ? 62 : j;
    return (y >>> jj) & 64'sd1;
  endfunction

  // Digit of the group starting at bit p with m bits.
  function automatic longint group_digit(input longint y, input int p, input int m);
    longint d;
    d = ybit(y, p);
    for (int j = 1; j <= m - 2; j++) d += ybit(y, p + j) << (j - 1);
    d -= ybit(y, p + m - 1) << (m - 2);
    return d;
  endfunction

  // True when d is 0 or +-2^a.
  function automatic bit is_sd(input longint d);
    longint a;
    a = (d < 0) ? -d : d;
    return (a & (a - 1)) == 0;
  endfunction

  // Recode y (w bits, two's complement) into 2^k signed digits.
  function automatic sd_code_t vr2_encode(input longint y, input int w);
    sd_code_t c;
    int     p, m, n, e;
    longint d, a;
    bit     grow;
    c = '0;
    p = -1;
    n = 0;
    for (int g = 0; g < 64; g++) begin
      if (p < w - 1) begin
        m = 3;
        grow = 1'b1;
        for (int k = 0; k < 64; k++) begin
          if (grow && (p + m <= w - 1) && is_sd(group_digit(y, p, m + 1))) m++;
          else grow = 1'b0;
        end
        d = group_digit(y, p, m);
        if (d != 0 && n < MAXD) begin
          a = (d < 0) ? -d : d;
          e = 0;
          for (int b = 0; b < 63; b++) if (a == (64'sd1 <<< b)) e = b;
          c.neg[n]   = (d < 0);
          c.shift[n] = 6'(p + 1 + e);
          n++;
        end
        p = p + m - 1;
      end
    end
    c.count = 5'(n);
    return c;
  endfunction

  // Value of a code, for checking: sum of +-2^shift.
  function automatic longint sd_value(input sd_code_t c);
    longint v;
    v = 0;
    for (int i = 0; i < MAXD; i++)
      if (i < int'(c.count)) v += c.neg[i] ? -(64'sd1 <<< c.shift[i]) : (64'sd1 <<< c.shift[i]);
    return v;
  endfunction

  // Number of negative digits of a code.
  function automatic int sd_negs(input sd_code_t c);
    int n;
    n = 0;
    for (int i = 0; i < MAXD; i++) if (i < int'(c.count) && c.neg[i]) n++;
    return n;
  endfunction

  // Round a coefficient held with 20 fractional bits to frac bits
  // (magnitude rounded half up, then the sign applied).
  function automatic int round_coef(input int c20, input int frac);
    int m, q;
    m = (c20 < 0) ? -c20 : c20;
    q = (frac >= 20) ? m : ((m + (1 << (19 - frac))) >>> (20 - frac));
    return (c20 < 0) ? -q : q;
  endfunction

  // 0.5*cos(k*pi/16) * 2^20, k = 0..7.
  function automatic int dct_cos20(input int k);
    case (k)
      0: return 524288;
      1: return 514214;
      2: return 484379;
      3: return 435930;
      4: return 370728;
      5: return 291279;
      6: return 200636;
      default: return 102284;
    endcase
  endfunction

  // Chen 8-point DCT, even (odd = 0) or odd (odd = 1) 4x4 matrix, entry
  // [r][n]: output X(2r) or X(2r+1) from input pair n.  Entries are
  // +-0.5*cos(k*pi/16), k given by the table below, with frac fraction bits.
  function automatic int dct_coef(input bit odd, input int r, input int n, input int frac);
    int k, s;
    int ke [4][4];
    int se [4][4];
    int ko [4][4];
    int so [4][4];
    ke = '{'{4, 4, 4, 4}, '{2, 6, 6, 2}, '{4, 4, 4, 4}, '{6, 2, 2, 6}};
    se = '{'{1, 1, 1, 1}, '{1, 1, -1, -1}, '{1, -1, -1, 1}, '{1, -1, 1, -1}};
    ko = '{'{1, 3, 5, 7}, '{3, 7, 1, 5}, '{5, 1, 7, 3}, '{7, 5, 3, 1}};
    so = '{'{1, 1, 1, 1}, '{1, -1, -1, -1}, '{1, -1, 1, 1}, '{1, -1, 1, -1}};
    k = odd ? ko[r][n] : ke[r][n];
    s = odd ? so[r][n] : se[r][n];
    return s * round_coef(dct_cos20(k), frac);
  endfunction

  // Daubechies low-pass filter h(j) * 2^20, j = 0..n-1, for n = 6 (the
  // default filter bank) or n = 4.  The high-pass filter is
  // g(k) = (-1)^k * h(n-1-k).
  function automatic int dwt_h20(input int n, input int j);
    if (n == 4) begin
      case (j)
        0: return 506423;
        1: return 877151;
        2: return 235032;
        default: return -135696;
      endcase
    end
    case (j)
      0: return 348830;
      1: return 846087;
      2: return 482217;
      3: return -141569;
      4: return -89592;
      default: return 36937;
    endcase
  endfunction

endpackage
