// ldpc_ref_pkg: reference models used by the testbenches.
//
// Written independently of the RTL datapath, straight from the algorithm:
//   encode()   systematic encoder of the 802.11n rate-1/2 n=648 code, solving
//              the parity blocks one block row at a time (the first parity
//              block is the sum of all block-row partial syndromes, the
//              others follow from the dual-diagonal part)
//   syndrome() H * c^T, one bit per check
//   decode()   flooding min-sum (all rows, then all columns, per iteration)
//              with the same 6-bit arithmetic as the hardware: magnitudes
//              saturate at 31, variable-to-check messages saturate to
//              [-31, 31], bit = 1 when the soft value is negative.
// Only the base matrix is taken from ldpc_pkg.
package ldpc_ref_pkg;
  import ldpc_pkg::*;

  typedef bit     bits_t [N];
  typedef int     llrs_t [N];

  function automatic bit cbit(const ref bits_t c, int blk, int lane);
    return c[blk*Z + lane];
  endfunction

  function automatic void syndrome(const ref bits_t c, output bit s [M]);
    for (int r = 0; r < MB; r++)
      for (int z = 0; z < Z; z++) begin
        bit acc = 0;
        for (int b = 0; b < NB; b++)
          if (BASE[r][b] >= 0) acc ^= c[b*Z + (z + BASE[r][b]) % Z];
        s[r*Z + z] = acc;
      end
  endfunction

  function automatic bit is_codeword(const ref bits_t c);
    bit s [M];
    syndrome(c, s);
    foreach (s[i]) if (s[i]) return 0;
    return 1;
  endfunction

  // Random information bits in blocks 0..11, parity in blocks 12..23.
  function automatic void encode(output bits_t c);
    bit lam [MB][Z];
    for (int i = 0; i < N; i++) c[i] = (i < 12*Z) ? bit'($urandom & 1) : 0;
    for (int r = 0; r < MB; r++)
      for (int z = 0; z < Z; z++) begin
        lam[r][z] = 0;
        for (int b = 0; b < 12; b++)
          if (BASE[r][b] >= 0) lam[r][z] ^= c[b*Z + (z + BASE[r][b]) % Z];
      end
    // block 12: sum of all partial syndromes (its three circulants add to I)
    for (int z = 0; z < Z; z++) begin
      bit acc = 0;
      for (int r = 0; r < MB; r++) acc ^= lam[r][z];
      c[12*Z + z] = acc;
    end
    // block 13 + r from block row r (identity circulant, all else known)
    for (int r = 0; r < 11; r++)
      for (int z = 0; z < Z; z++) begin
        bit acc = lam[r][z];
        for (int b = 12; b < 13 + r; b++)
          if (BASE[r][b] >= 0) acc ^= c[b*Z + (z + BASE[r][b]) % Z];
        c[(13 + r)*Z + z] = acc;
      end
  endfunction

  // BPSK over an additive noise channel, quantised to 6 bits.
  // amp: signal level, spread: noise is the sum of 4 uniforms in +-spread.
  function automatic void channel(const ref bits_t c, int amp, int spread,
                                  output llrs_t l);
    for (int i = 0; i < N; i++) begin
      int v = c[i] ? -amp : amp;
      if (spread > 0)
        for (int k = 0; k < 4; k++)
          v += int'($urandom % (2*spread + 1)) - spread;
      if (v > 31) v = 31;
      if (v < -32) v = -32;
      l[i] = v;
    end
  endfunction

  function automatic int sat31(int v);
    return (v > 31) ? 31 : (v < -31) ? -31 : v;
  endfunction

  // Flooding min-sum decoder.
  function automatic void decode(const ref llrs_t l, input int max_iter,
                                 input bit early, output bits_t hd,
                                 output int iters, output bit stopped_early);
    int q [MB][NB][Z];   // indexed by bit lane
    int rm[MB][NB][Z];
    for (int r = 0; r < MB; r++)
      for (int b = 0; b < NB; b++)
        for (int z = 0; z < Z; z++) q[r][b][z] = l[b*Z + z];
    iters = 0;
    stopped_early = 0;
    for (int i = 0; i < N; i++) hd[i] = 0;
    for (int it = 0; it < max_iter; it++) begin
      // check nodes
      for (int r = 0; r < MB; r++)
        for (int z = 0; z < Z; z++)
          for (int b = 0; b < NB; b++) begin
            int mn = 31;
            bit sg = 0;
            if (BASE[r][b] < 0) continue;
            for (int k = 0; k < NB; k++) begin
              int v, a;
              if (k == b || BASE[r][k] < 0) continue;
              v = q[r][k][(z + BASE[r][k]) % Z];
              a = (v < 0) ? -v : v;
              if (a > 31) a = 31;
              if (a < mn) mn = a;
              sg ^= (v < 0);
            end
            rm[r][b][(z + BASE[r][b]) % Z] = sg ? -mn : mn;
          end
      // variable nodes
      for (int b = 0; b < NB; b++)
        for (int z = 0; z < Z; z++) begin
          int s = l[b*Z + z];
          for (int r = 0; r < MB; r++) if (BASE[r][b] >= 0) s += rm[r][b][z];
          for (int r = 0; r < MB; r++)
            if (BASE[r][b] >= 0) q[r][b][z] = sat31(s - rm[r][b][z]);
          hd[b*Z + z] = (s < 0);
        end
      iters = it + 1;
      if (early && is_codeword(hd)) begin
        stopped_early = 1;
        break;
      end
    end
  endfunction
endpackage
