// tb_mstc_ref_pkg: reference models for the testbenches of the 3D-MSTC.
//
// Written independently of the RTL: the constituent code is described in
// shift-register form (feedback node f = A^B^s1^s3, parity f^s2^s3), the
// circular start state is found by trying all eight states, and the
// interleaver is computed from its closed formula on whole-frame indices.
package tb_mstc_ref_pkg;
  import mstc_pkg::*;

  // one trellis step in shift-register form; returns {y, s3', s2', s1'}
  function automatic logic [3:0] ref_step(input logic [2:0] s, input logic a, input logic b);
    logic f, s1, s2, s3;
    s1 = s[0]; s2 = s[1]; s3 = s[2];
    f = a ^ b ^ s1 ^ s3;
    return {f ^ s2 ^ s3, s2 ^ b, s1 ^ b, f};
  endfunction

  // circular start state of a slice: the state that the slice leads back to
  function automatic logic [2:0] ref_circ(input logic [1:0] sym [], input int m);
    logic [2:0] s;
    logic [3:0] r;
    for (int c = 0; c < 8; c++) begin
      s = 3'(c);
      for (int t = 0; t < m; t++) begin r = ref_step(s, sym[t][1], sym[t][0]); s = r[2:0]; end
      if (s == 3'(c)) return 3'(c);
    end
    return 3'bxxx;
  endfunction

  // natural-order frame index of interleaved index k = M*r + t of dimension d
  function automatic int ref_pi(input int d, input int k, input int m, input int p, input ilv_cfg_t c);
    int t, r, bank, addr;
    t = k % m; r = k / m;
    if (d == 0) return k;
    bank = (int'(c.rot[t % p]) + r) % p;
    addr = (int'(c.alpha) * t + int'(c.beta[t % 4])) % m;
    return bank * m + addr;
  endfunction

  function automatic bit ref_swap(input int d, input int k);
    return (d == 1) ? (k % 2 == 0) : (d == 2) ? (k % 2 == 1) : 1'b0;
  endfunction

  // parity bits of dimension d for a frame (index = interleaved index)
  function automatic void ref_encode(input logic [1:0] frame [], input int d, input int m, input int p,
                                     input ilv_cfg_t c1, input ilv_cfg_t c2, output logic par []);
    logic [1:0] sl [];
    logic [2:0] s;
    logic [3:0] r;
    int n;
    n = m * p;
    par = new[n];
    sl  = new[m];
    for (int q = 0; q < p; q++) begin
      for (int t = 0; t < m; t++) begin
        logic [1:0] v;
        v = frame[ref_pi(d, q * m + t, m, p, (d == 2) ? c2 : c1)];
        sl[t] = ref_swap(d, q * m + t) ? {v[0], v[1]} : v;
      end
      s = ref_circ(sl, m);
      for (int t = 0; t < m; t++) begin
        r = ref_step(s, sl[t][1], sl[t][0]);
        par[q * m + t] = r[3];
        s = r[2:0];
      end
    end
  endfunction

  // approximately Gaussian integer noise: sum of four uniforms, std ~ sd
  function automatic int ref_noise(input int sd);
    int acc;
    acc = 0;
    for (int i = 0; i < 4; i++) acc += int'($urandom_range(0, 2000)) - 1000;
    // std of the sum is 1000*sqrt(4/3) ~ 1155
    return (acc * sd) / 1155;
  endfunction

  function automatic logic signed [W_CH-1:0] ref_llr(input logic bitv, input int amp, input int sd);
    int v;
    v = (bitv ? amp : -amp) + ref_noise(sd);
    if (v > 2 ** (W_CH - 1) - 1) v = 2 ** (W_CH - 1) - 1;
    if (v < -(2 ** (W_CH - 1) - 1)) v = -(2 ** (W_CH - 1) - 1);
    return W_CH'(v);
  endfunction
endpackage
