// ldpc_ref_pkg -- testbench reference model of the code and the decoder.
//
// Independent of the RTL structure: it expands the base matrix into the full
// parity check matrix of expansion factor L, encodes by back-substitution
// through the upper-dual-diagonal parity part, and decodes with a plain
// flooding sum-product loop (all checks, then all variables) in the same
// fixed-point format as the hardware. phi is evaluated here with real
// arithmetic, round(4 * ln((e^x + 1) / (e^x - 1))) at x = k / 4, not taken
// from the RTL table. Only the base matrix (the definition of the code) is
// shared with the RTL package.
package ldpc_ref_pkg;
  import ldpc_pkg::*;

  typedef int          int_q_t [];
  typedef bit          bit_q_t [];

  function automatic int ref_phi(input int k);
    real x, v;
    if (k <= 0) return 31;
    x = real'(k) / 4.0;
    v = 4.0 * $ln(($exp(x) + 1.0) / ($exp(x) - 1.0));
    if (v > 31.0) return 31;
    return int'($floor(v + 0.5));
  endfunction

  function automatic int ref_sat(input int v);
    if (v > 31)  return 31;
    if (v < -31) return -31;
    return v;
  endfunction

  // Expanded edge list: edge_chk[e] is the check index, edge_var[e] the
  // variable index of every one in H.
  function automatic void expand(input int l, output int_q_t edge_chk, output int_q_t edge_var);
    int n = 0;
    edge_chk = new[0];
    edge_var = new[0];
    for (int r = 0; r < MB; r++)
      for (int c = 0; c < NB; c++) begin
        int s = base_shift(r, c);
        if (s >= 0) begin
          s = (s * l) / 96;
          edge_chk = new[n + l](edge_chk);
          edge_var = new[n + l](edge_var);
          for (int i = 0; i < l; i++) begin
            edge_chk[n + i] = r * l + i;
            edge_var[n + i] = c * l + (i + s) % l;
          end
          n += l;
        end
      end
  endfunction

  // Systematic encoding: info bits fill columns 0..KB-1; parity block p_r
  // (column KB + r) solves rows bottom-up: p_{MB-1} = s_{MB-1},
  // p_r = s_r ^ p_{r+1}, where s_r is the row's syndrome of the info part.
  function automatic bit_q_t encode(input int l, input bit_q_t info);
    bit_q_t cw = new[NB * l];
    bit     syn [];
    syn = new[MB * l];
    for (int v = 0; v < KB * l; v++) cw[v] = info[v];
    for (int r = 0; r < MB; r++)
      for (int i = 0; i < l; i++) begin
        bit p = 1'b0;
        for (int c = 0; c < KB; c++) begin
          int s = base_shift(r, c);
          if (s >= 0) p ^= info[c * l + (i + (s * l) / 96) % l];
        end
        syn[r * l + i] = p;
      end
    for (int r = MB - 1; r >= 0; r--)
      for (int i = 0; i < l; i++)
        cw[(KB + r) * l + i] = (r == MB - 1) ? syn[r * l + i]
                                             : syn[r * l + i] ^ cw[(KB + r + 1) * l + i];
    return cw;
  endfunction

  // Number of unsatisfied parity checks of a word.
  function automatic int syndrome_weight(input int l, input bit_q_t w);
    int_q_t ec, ev;
    bit     chk [];
    int     n = 0;
    expand(l, ec, ev);
    chk = new[MB * l];
    foreach (chk[i]) chk[i] = 1'b0;
    foreach (ec[e]) chk[ec[e]] ^= w[ev[e]];
    foreach (chk[i]) n += int'(chk[i]);
    return n;
  endfunction

  // Flooding fixed-point sum-product decoder.
  function automatic bit_q_t decode(input int l, input int n_iter, input int_q_t llr_in);
    int_q_t ec, ev, q, rr, ssum, tot, llr;
    bit     sgn [];
    bit_q_t hard;
    expand(l, ec, ev);
    q    = new[ec.size()];
    rr   = new[ec.size()];
    ssum = new[MB * l];
    sgn  = new[MB * l];
    tot  = new[NB * l];
    hard = new[NB * l];
    llr  = new[NB * l];
    foreach (llr[v]) llr[v] = ref_sat(llr_in[v]);
    foreach (q[e]) q[e] = llr[ev[e]];
    for (int it = 0; it < n_iter; it++) begin
      foreach (ssum[i]) begin ssum[i] = 0; sgn[i] = 1'b0; end
      foreach (q[e]) begin
        int a = q[e] < 0 ? -q[e] : q[e];
        ssum[ec[e]] += ref_phi(a);
        sgn[ec[e]]  ^= (q[e] < 0);
      end
      foreach (q[e]) begin
        int a = q[e] < 0 ? -q[e] : q[e];
        int x = ssum[ec[e]] - ref_phi(a);
        int m = ref_phi(x > 31 ? 31 : x);
        rr[e] = (sgn[ec[e]] ^ (q[e] < 0)) ? -m : m;
      end
      foreach (tot[v]) tot[v] = llr[v];
      foreach (rr[e]) tot[ev[e]] += rr[e];
      foreach (q[e]) q[e] = ref_sat(tot[ev[e]] - rr[e]);
      foreach (tot[v]) hard[v] = (tot[v] < 0);
    end
    return hard;
  endfunction

  // Channel model: BPSK amplitude amp (in LSBs) plus uniform noise in
  // [-noise, noise], quantised to the 6-bit range (a -32 may appear and must
  // be saturated by the decoder input).
  function automatic int_q_t channel(input bit_q_t cw, input int amp, input int noise);
    int_q_t llr = new[cw.size()];
    foreach (cw[v]) begin
      int x = (cw[v] ? -amp : amp);
      if (noise > 0) x += int'($urandom_range(2 * noise, 0)) - noise;
      if (x > 31)  x = 31;
      if (x < -32) x = -32;
      llr[v] = x;
    end
    return llr;
  endfunction

endpackage
