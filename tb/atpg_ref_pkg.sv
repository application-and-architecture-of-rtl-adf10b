// atpg_ref_pkg: bit-level reference models used by the testbenches.
//
// Each function recomputes one block's behaviour from its definition, written
// independently of the RTL: Gray conversion bit by bit from the MSB rule,
// LFSR and MISR next-state per stage, half-adder outputs from integer
// addition, and the FIR output from the real-valued coefficients scaled by
// 4096 and rounded.
package atpg_ref_pkg;

  function automatic int unsigned ref_gray(int unsigned b, int unsigned w);
    int unsigned g = 0;
    g[w-1] = b[w-1];
    for (int i = int'(w) - 2; i >= 0; i--) g[i] = (b[i+1] != b[i]);
    return g;
  endfunction

  // Left shift, new bit 0 = XOR of selected bits.
  function automatic int unsigned ref_lfsr_next(int unsigned s, int unsigned taps, int unsigned w);
    int unsigned fb = 0;
    for (int i = 0; i < int'(w); i++) if (taps[i]) fb ^= s[i];
    return ((s << 1) & ((1 << w) - 1)) | fb;
  endfunction

  // Stage i takes stage i-1 xor d[i]; stage 0 takes last stage (xor taps) xor d[0].
  function automatic int unsigned ref_misr_next(int unsigned s, int unsigned d, int unsigned taps, int unsigned w);
    int unsigned n = 0;
    int unsigned fb = s[w-1];
    for (int i = 0; i < int'(w); i++) if (taps[i]) fb ^= s[i];
    n[0] = fb ^ d[0];
    for (int i = 1; i < int'(w); i++) n[i] = s[i-1] ^ d[i];
    return n;
  endfunction

  // Upper half A, lower half B; response = {sum bits, carry bits}.
  function automatic int unsigned ref_ha(int unsigned p, int unsigned w);
    int unsigned h = w / 2;
    int unsigned a = p >> h;
    int unsigned b = p & ((1 << h) - 1);
    int unsigned s = 0, c = 0;
    for (int i = 0; i < int'(h); i++) begin
      int unsigned t = a[i] + b[i];
      s[i] = t[0];
      c[i] = t[1];
    end
    return (s << h) | c;
  endfunction

  function automatic int unsigned coef_q12(int k);
    real c [5] = '{0.0000, 0.1083, 0.5000, 0.1081, 0.0000};
    return int'($floor(c[k] * 4096.0 + 0.5));
  endfunction

  // x0 = x(n), x1 = x(n-1), ...
  function automatic int unsigned ref_fir(int unsigned x0, int unsigned x1, int unsigned x2,
                                          int unsigned x3, int unsigned x4);
    longint unsigned acc;
    acc = longint'(coef_q12(0)) * x0 + longint'(coef_q12(1)) * x1 + longint'(coef_q12(2)) * x2
        + longint'(coef_q12(3)) * x3 + longint'(coef_q12(4)) * x4;
    return int'(acc / 4096);
  endfunction

endpackage
