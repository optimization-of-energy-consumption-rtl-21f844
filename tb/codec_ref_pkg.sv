// Reference model of the link coding schemes, for the testbenches.
//
// Written independently of the RTL: pairs are classified by looking the
// 2-bit before/after values up in the transition tables (even lane written
// first, odd lane second) instead of by toggle logic, and the decisions and
// decoders are re-derived from the counts. Fixed to the 32-bit link of the
// reference configuration. Also holds a link activity model: self
// transitions (lanes that toggle) and coupling cost between neighbouring
// lanes, 1 per Type I pair and 2 per Type II pair.
package codec_ref_pkg;

  localparam int W  = 32;
  localparam int D  = W - 1;
  localparam int NP = D - 1;

  typedef logic [D-1:0] pay_t;
  typedef logic [W-1:0] word_t;

  typedef struct {
    int ty, te, t2, t4;
  } counts_t;

  // Pair i as (even lane, odd lane).
  function automatic logic [1:0] pair_of(pay_t v, int i);
    return (i % 2 == 0) ? {v[i], v[i+1]} : {v[i+1], v[i]};
  endfunction

  function automatic bit is_ty(logic [1:0] p, logic [1:0] c);
    case ({p, c})
      4'b00_10, 4'b11_01: return 1;                           // T1*
      4'b00_01, 4'b11_10, 4'b01_00, 4'b10_11: return 1;       // T1**
      4'b01_10, 4'b10_01: return 1;                           // Type II
      default: return 0;
    endcase
  endfunction

  function automatic bit is_te(logic [1:0] p, logic [1:0] c);
    case ({p, c})
      4'b00_10, 4'b11_01, 4'b01_11, 4'b10_00: return 1;       // even lane alone
      4'b00_01, 4'b11_10: return 1;                           // odd alone, equal
      4'b01_10, 4'b10_01: return 1;                           // Type II
      default: return 0;
    endcase
  endfunction

  function automatic bit is_t2(logic [1:0] p, logic [1:0] c);
    return ({p, c} == 4'b01_10) || ({p, c} == 4'b10_01);
  endfunction

  function automatic bit is_t4(logic [1:0] p, logic [1:0] c);
    return ({p, c} == 4'b01_01) || ({p, c} == 4'b10_10);
  endfunction

  function automatic counts_t counts(pay_t cur, pay_t prev);
    counts_t r = '{0, 0, 0, 0};
    for (int i = 0; i < NP; i++) begin
      logic [1:0] p = pair_of(prev, i);
      logic [1:0] c = pair_of(cur, i);
      r.ty += int'(is_ty(p, c));
      r.te += int'(is_te(p, c));
      r.t2 += int'(is_t2(p, c));
      r.t4 += int'(is_t4(p, c));
    end
    return r;
  endfunction

  // Odd lanes are 1, 3, 5, ...
  function automatic pay_t odd_mask();
    pay_t m = '0;
    for (int i = 1; i < D; i += 2) m[i] = 1'b1;
    return m;
  endfunction

  // Action codes: none 0, even 1, odd 2, full 3.
  function automatic pay_t apply(int act, pay_t x);
    case (act)
      1: return x ^ ~odd_mask();
      2: return x ^ odd_mask();
      3: return ~x;
      default: return x;
    endcase
  endfunction

  function automatic bit over_half(int cnt);
    return 2 * cnt > W - 1;
  endfunction

  function automatic int enc1(pay_t x, pay_t y);
    return over_half(counts(x, y).ty) ? 2 : 0;
  endfunction

  function automatic int enc2(pay_t x, pay_t y);
    counts_t c = counts(x, y);
    bit full_ok = over_half(counts(~x, y).ty);
    if (!over_half(c.ty)) return 0;
    return (c.t2 > c.t4 && full_ok) ? 3 : 2;
  endfunction

  function automatic int enc3(pay_t x, pay_t y);
    counts_t c = counts(x, y);
    counts_t cf = counts(~x, y);
    counts_t ce = counts(apply(1, x), y);
    if (over_half(c.ty))
      return (c.t2 > c.t4 && over_half(cf.ty) && over_half(cf.te)) ? 3 : 2;
    if (over_half(c.te) && over_half(ce.ty)) return 1;
    return 0;
  endfunction

  function automatic int dec2(word_t z, pay_t r);
    if (!z[W-1]) return 0;
    return over_half(counts(z[D-1:0], r).ty) ? 3 : 2;
  endfunction

  function automatic int dec3(word_t z, pay_t r);
    counts_t c;
    if (!z[W-1]) return 0;
    c = counts(z[D-1:0], r);
    if (!over_half(c.ty)) return 2;
    if (!over_half(c.te)) return 1;
    return 3;
  endfunction

  // Link activity between two consecutive w-bit words.
  function automatic int self_toggles(word_t a, word_t b);
    return $countones(a ^ b);
  endfunction

  function automatic int coupling_cost(word_t a, word_t b);
    int cost = 0;
    for (int i = 0; i < W - 1; i++) begin
      bit t0 = a[i] ^ b[i];
      bit t1 = a[i+1] ^ b[i+1];
      if (t0 != t1) cost += 1;                              // Type I
      else if (t0 && t1 && (a[i] != a[i+1])) cost += 2;     // Type II
    end
    return cost;
  endfunction

endpackage
