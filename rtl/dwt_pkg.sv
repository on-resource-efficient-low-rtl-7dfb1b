// Shared types and constants of the MAC-level limited-resource DWT processor.
//
// The controller is a look-up table derived from the four scheduling
// matrices of the limited-resource scheduling algorithm:
//   CM   which filter coefficient each MAC multiplies in each cycle,
//   DM   which buffered sample (B1 = older, B2 = newer of the pair) it uses,
//   AccM which output register receives the MAC result,
//   FbM  which output register is fed back as the addend (none = zero).
// sched_op() computes one entry of that table from the slot number
// p = mac + 1 + r*row of the single-MAC schedule CM_1: first the coefficients
// of odd order (L2, L4, .., H2, H4, ..) on the older sample, then those of
// even order (L1, L3, .., H1, H3, ..) on the newer sample.  Lowpass tap L_i
// accumulates into R_i, highpass tap H_i into R_{m+i}; R_i is fed by R_{i+1}
// except at the last tap of each filter.  Register indices here are 0-based
// (R_1 is index 0).
//
// The inverse transform reuses the same table format (isched_op): a period
// takes one approximation x and one detail y of a level; x multiplies every
// coefficient of the synthesis lowpass L' and y every coefficient of the
// synthesis highpass H'.  Because the upsampled input is zero on every second
// sample, register R_i is fed by R_{i+2} (two taps further on), and the
// two reconstructed samples of the period are R_1 + R_{m'+1} (even) and
// R_2 + R_{m'+2} (odd), which two extra adders form.  Here b2 = 1 selects
// the detail y.  The synthesis filters are L'(z) = -H(-z), H'(z) = L(-z),
// which cancel the aliasing of the analysis pair; reconstruction is then
// the input delayed by 7 samples (for the (9,7) pair).
package dwt_pkg;
  localparam int unsigned NUM_MAC   = 4;   // r, MACs of the fabricated core
  localparam int unsigned LP_TAPS   = 9;   // m, Daubechies (9,7) lowpass
  localparam int unsigned HP_TAPS   = 7;   // n, Daubechies (9,7) highpass
  localparam int unsigned STAGES    = 3;   // S, octaves
  localparam int unsigned DATA_W    = 16;  // b, sample width
  localparam int unsigned COEF_W    = 16;
  localparam int unsigned COEF_FRAC = 14;  // coefficients in Q2.14
  localparam int unsigned IDX_W     = 6;   // register/coefficient index width

  typedef struct packed {
    logic             en;     // slot holds a coefficient
    logic             b2;     // DM: 0 = B1 (older sample), 1 = B2 (newer)
    logic [IDX_W-1:0] coef;   // CM: coefficient bank index (L1..Lm, H1..Hn)
    logic [IDX_W-1:0] acc;    // AccM: destination register
    logic             fb_en;  // FbM: addend register present
    logic [IDX_W-1:0] fb;     // FbM: addend register
  } mac_op_t;

  function automatic int unsigned sched_period(int unsigned m, int unsigned n, int unsigned r);
    return (m + n + r - 1) / r;   // q = ceil((m+n)/r)
  endfunction

  function automatic mac_op_t sched_op(int unsigned row, int unsigned mac,
                                       int unsigned m, int unsigned n, int unsigned r);
    mac_op_t     op;
    int unsigned p, fm, fn, f, cm, i;
    logic        hp;
    p  = mac + 1 + r * row;
    fm = m / 2;  fn = n / 2;  f = fm + fn;  cm = m - fm;
    op = '0;
    hp = 1'b0;
    i  = 0;
    if (p <= fm)               begin hp = 1'b0; i = 2 * p;                end
    else if (p <= f)           begin hp = 1'b1; i = 2 * (p - fm);         end
    else if (p <= f + cm)      begin hp = 1'b0; i = 2 * (p - f) - 1;      end
    else if (p <= m + n)       begin hp = 1'b1; i = 2 * (p - f - cm) - 1; end
    if (i != 0) begin
      op.en    = 1'b1;
      op.b2    = (i % 2 == 1);
      op.coef  = IDX_W'(hp ? m + i - 1 : i - 1);
      op.acc   = IDX_W'(hp ? m + i - 1 : i - 1);
      op.fb_en = hp ? (i != n) : (i != m);
      op.fb    = op.fb_en ? IDX_W'(hp ? m + i : i) : '0;
    end
    return op;
  endfunction

  // One entry of the inverse (synthesis) schedule: product p = mac + r*row,
  // first the ml taps of L' on x, then the nh taps of H' on y.
  function automatic mac_op_t isched_op(int unsigned row, int unsigned mac,
                                        int unsigned ml, int unsigned nh, int unsigned r);
    mac_op_t     op;
    int unsigned p, t;
    p  = mac + r * row;
    op = '0;
    if (p < ml + nh) begin
      op.en    = 1'b1;
      op.b2    = (p >= ml);
      t        = (p < ml) ? p : p - ml;
      op.coef  = IDX_W'(p);
      op.acc   = IDX_W'(p);
      op.fb_en = (t + 2 < ((p < ml) ? ml : nh));
      op.fb    = op.fb_en ? IDX_W'(p + 2) : '0;
    end
    return op;
  endfunction

  // Daubechies (9,7) synthesis filters in Q2.14: index 0..6 = L' (7 taps),
  // 7..15 = H' (9 taps).
  function automatic logic signed [COEF_W-1:0] cdf97_syn_coef(int unsigned idx);
    case (idx)
      0, 6:   return -16'sd1057;
      1, 5:   return -16'sd667;
      2, 4:   return 16'sd6850;
      3:      return 16'sd12919;
      7, 15:  return 16'sd620;
      8, 14:  return 16'sd391;
      9, 13:  return -16'sd1812;
      10, 12: return -16'sd6183;
      11:     return 16'sd13971;
      default: return '0;
    endcase
  endfunction

  // Daubechies (9,7) analysis filters in Q2.14, L_i / H_i = (i-1)th order.
  function automatic logic signed [COEF_W-1:0] cdf97_coef(int unsigned idx);
    case (idx)
      0, 8:  return 16'sd620;     //  0.037828455
      1, 7:  return -16'sd391;    // -0.023849465
      2, 6:  return -16'sd1812;   // -0.110624404
      3, 5:  return 16'sd6183;    //  0.377402856
      4:     return 16'sd13971;   //  0.852698679
      9, 15: return 16'sd1057;    //  0.064538882
      10, 14: return -16'sd667;   // -0.040689417
      11, 13: return -16'sd6850;  // -0.418092273
      12:    return 16'sd12919;   //  0.788485616
      default: return '0;
    endcase
  endfunction
endpackage
