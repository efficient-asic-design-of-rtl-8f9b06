// ddc_ref.svh: reference arithmetic for the down-converter test benches.
//
// Included inside a test bench module (after ddc_pkg is imported). Works in
// 64-bit integers, direct form, with no folding or serialisation, so it is
// independent of the hardware's structure; it only shares the coefficient
// values and the promised rounding rule (round half up, then saturate).

// Round v / 2^sh half up, then clamp to a signed w-bit range.
function automatic longint ref_round_sat(longint v, int sh, int w);
  longint r, hi, lo;
  hi = (longint'(1) <<< (w - 1)) - 1;
  lo = -(longint'(1) <<< (w - 1));
  r = (sh > 0) ? ((v + (longint'(1) <<< (sh - 1))) >>> sh) : (v <<< -sh);
  return (r > hi) ? hi : ((r < lo) ? lo : r);
endfunction

// One decimate-by-2 stage: y[m] = sum_k h[k] x[2m+1-k].
function automatic void ref_decimate(ddc_pkg::coef_set_e set, int in_w, int out_w,
                                     const ref longint x[$], ref longint y[$]);
  int n;
  n = ddc_pkg::stage_taps(set);
  y.delete();
  for (int j = 1; j < x.size(); j += 2) begin
    longint acc;
    acc = 0;
    for (int k = 0; k < n; k++)
      if (j - k >= 0) acc += longint'(ddc_pkg::stage_coef(set, k)) * x[j - k];
    y.push_back(ref_round_sat(acc, ddc_pkg::COEF_FRAC - (out_w - in_w), out_w));
  end
endfunction

// The three-stage chain.
function automatic void ref_chain(int in_w, int out_w, const ref longint x[$], ref longint y[$]);
  longint a[$], b[$];
  ref_decimate(ddc_pkg::CS_HB1, in_w, out_w, x, a);
  ref_decimate(ddc_pkg::CS_HB2, out_w, out_w, a, b);
  ref_decimate(ddc_pkg::CS_RRC, out_w, out_w, b, y);
endfunction
