// tb_ref_pkg: reference models used by the testbenches, written
// independently of the RTL.
//   conv_ref_encode   rate 1/2, k=3 encoder, generators 7 and 5 (octal),
//                     symbol {c0, c1}, starting from the all-zero state.
//   viterbi_ref       hard-decision Viterbi decoding with unbounded integer
//                     path metrics: S0 starts at 0, the others at 4; ties keep
//                     the upper (x = 0) predecessor; every 16 steps the group
//                     is traced back from the lowest-numbered best state.
//   huff_ref_code     the six code words as strings of '0' and '1'.
package tb_ref_pkg;

  typedef bit [1:0] bsym_t;

  function automatic void conv_ref_encode(input bit data[$], output bsym_t syms[$]);
    bit u1, u2;
    u1 = 0; u2 = 0;
    syms = {};
    foreach (data[i]) begin
      bit u;
      u = data[i];
      syms.push_back({u ^ u1 ^ u2, u ^ u2});
      u2 = u1;
      u1 = u;
    end
  endfunction

  function automatic int ham(bsym_t a, bsym_t b);
    bsym_t d;
    d = a ^ b;
    return int'(d[0]) + int'(d[1]);
  endfunction

  // expected symbol leaving state p (bit1 = older, bit0 = newer input) with input u
  function automatic bsym_t exp_sym(int p, bit u);
    bit m1, m2;
    m1 = p[0];
    m2 = p[1];
    return {u ^ m1 ^ m2, u ^ m2};
  endfunction

  function automatic void viterbi_ref(input bsym_t rx[$], input int group,
                                      output bit out[$]);
    int pm[4], npm[4];
    bit dec[$][4];
    bit grp_bits[$];
    pm = '{0, 4, 4, 4};
    out = {};
    foreach (rx[t]) begin
      bit d[4];
      for (int n = 0; n < 4; n++) begin
        int pu, pl, su, sl;
        pu = (n >> 1);
        pl = 2 + (n >> 1);
        su = pm[pu] + ham(rx[t], exp_sym(pu, n[0]));
        sl = pm[pl] + ham(rx[t], exp_sym(pl, n[0]));
        d[n]   = (sl < su);
        npm[n] = (sl < su) ? sl : su;
      end
      pm = npm;
      dec.push_back(d);
      if ((t % group) == group - 1) begin
        int s, best;
        best = 0;
        for (int n = 1; n < 4; n++) if (pm[n] < pm[best]) best = n;
        s = best;
        grp_bits = {};
        for (int k = t; k > t - group; k--) begin
          grp_bits.push_front(bit'(s & 1));
          s = (int'(dec[k][s]) << 1) | (s >> 1);
        end
        foreach (grp_bits[i]) out.push_back(grp_bits[i]);
      end
    end
  endfunction

  function automatic string huff_ref_code(int sym);
    case (sym)
      0: return "0";
      1: return "101";
      2: return "100";
      3: return "111";
      4: return "1101";
      default: return "1100";
    endcase
  endfunction

endpackage
