// tb_ldpc_ref_pkg: independent reference model used by the decoder testbenches.
//
// It rebuilds the Tanner graph as a plain edge list from the base matrix, and models the
// decoder the straightforward way: check node outputs as min / XOR over the other edges by
// explicit loops, variable node outputs as (total - own), quantization by comparing against
// the thresholds, reconstruction by table lookup. None of the RTL's trees, ROMs or routing
// layers is reused, so agreement is a real check. It also holds an encoder for the
// dual-diagonal 802.11n parity structure and a syndrome check.
package tb_ldpc_ref_pkg;
  import ldpc_pkg::*;

  localparam int NE = N_CN * CDEG_MAX;   // upper bound on the number of edges

  int e_cn [NE];   // check node of edge e
  int e_vn [NE];   // variable node of edge e
  int n_edges = 0;

  // statistics of the last call to ref_decode
  int clip_events = 0;

  function automatic void build_graph();
    n_edges = 0;
    for (int j = 0; j < MB; j++)
      for (int z = 0; z < Z; z++)
        for (int y = 0; y < NB; y++)
          if (H_BASE[j][y] >= 0) begin
            e_cn[n_edges] = j*Z + z;
            e_vn[n_edges] = y*Z + (z + H_BASE[j][y]) % Z;
            n_edges++;
          end
  endfunction

  // sign-magnitude quantization of eq. (2.10)/(2.11)
  function automatic int ref_q(int version, int h);
    int mag = (h < 0) ? -h : h;
    int idx = 0;
    for (int k = 0; k < N_LEVELS-1; k++) if (mag > Q_THRESH[version-1][k]) idx = k + 1;
    return ((h < 0) ? N_LEVELS : 0) + idx;
  endfunction

  function automatic int ref_r(int version, int d);
    int m = R_TABLE[version-1][d % N_LEVELS];
    return (d >= N_LEVELS) ? -m : m;
  endfunction

  function automatic int clip_add(int r, int t, ref int events);
    int hi = QMAX - t, lo = -QMAX - t, rc = r;
    if (r > hi) rc = hi;
    if (r < lo) rc = lo;
    if (rc != r) events++;
    return rc + t;
  endfunction

  // Full decode of one frame; llr values in [-64, 63]; returns a-posteriori LLRs.
  function automatic void ref_decode(input int n_iter, input int llr [N_VN], output int app [N_VN]);
    int q0 [N_VN], rl [N_VN];
    int v2c [NE], c2vq [NE], c2v [NE];
    int total [N_VN];
    clip_events = 0;
    if (n_edges == 0) build_graph();
    for (int n = 0; n < N_VN; n++) begin
      q0[n] = ref_q(LLR_QUANT_VERSION, llr[n]);
      rl[n] = ref_r(LLR_QUANT_VERSION, q0[n]);
    end
    for (int e = 0; e < n_edges; e++) v2c[e] = q0[e_vn[e]];
    for (int t = 0; t < n_iter; t++) begin
      int ver = RCQ_TABLE_SEL[t];
      // check nodes
      for (int e = 0; e < n_edges; e++) begin
        int mn = N_LEVELS - 1, sg = 0;
        for (int f = 0; f < n_edges; f++)
          if (f != e && e_cn[f] == e_cn[e]) begin
            if ((v2c[f] % N_LEVELS) < mn) mn = v2c[f] % N_LEVELS;
            sg ^= (v2c[f] >= N_LEVELS);
          end
        mn = (mn > int'(OFFSET)) ? mn - int'(OFFSET) : 0;
        c2vq[e] = sg * N_LEVELS + mn;
        c2v[e]  = ref_r(ver, c2vq[e]);
      end
      // variable nodes
      for (int n = 0; n < N_VN; n++) total[n] = 0;
      for (int e = 0; e < n_edges; e++) total[e_vn[e]] += c2v[e];
      if (t < n_iter - 1) begin
        for (int e = 0; e < n_edges; e++)
          v2c[e] = ref_q(ver, clip_add(total[e_vn[e]] - c2v[e], rl[e_vn[e]], clip_events));
      end else begin
        for (int n = 0; n < N_VN; n++) app[n] = clip_add(total[n], rl[n], clip_events);
      end
    end
  endfunction

  // (P^s x)[z] = x[(z+s) mod Z]: the block of row j, column y seen by check (j,z).
  function automatic bit hbit(input bit v [N_VN], int y, int s, int z);
    return v[y*Z + (z + s) % Z];
  endfunction

  // Systematic encoder for the dual-diagonal 802.11n parity part: columns NB-MB .. NB-1.
  function automatic void encode(input bit info [K_INFO], output bit cw [N_VN]);
    bit lam [MB][Z];
    bit p [MB][Z];
    for (int n = 0; n < N_VN; n++) cw[n] = (n < K_INFO) ? info[n] : 1'b0;
    for (int j = 0; j < MB; j++)
      for (int z = 0; z < Z; z++) begin
        lam[j][z] = 1'b0;
        for (int y = 0; y < NB-MB; y++)
          if (H_BASE[j][y] >= 0) lam[j][z] ^= hbit(cw, y, H_BASE[j][y], z);
      end
    // p0: sum of all block rows cancels the other parity blocks
    for (int z = 0; z < Z; z++) begin
      p[0][z] = 1'b0;
      for (int j = 0; j < MB; j++) p[0][z] ^= lam[j][z];
    end
    // p0 has shift H_BASE[0][NB-MB]; solve rows 0..MB-2 for p1..p(MB-1)
    for (int j = 0; j < MB-1; j++)
      for (int z = 0; z < Z; z++) begin
        bit acc = lam[j][z];
        if (H_BASE[j][NB-MB] >= 0) acc ^= p[0][(z + H_BASE[j][NB-MB]) % Z];
        if (j > 0) acc ^= p[j][z];
        p[j+1][z] = acc;
      end
    for (int j = 0; j < MB; j++)
      for (int z = 0; z < Z; z++) cw[(NB-MB+j)*Z + z] = p[j][z];
  endfunction

  // number of unsatisfied parity checks
  function automatic int syndrome_weight(input bit cw [N_VN]);
    int w = 0;
    for (int j = 0; j < MB; j++)
      for (int z = 0; z < Z; z++) begin
        bit s = 1'b0;
        for (int y = 0; y < NB; y++)
          if (H_BASE[j][y] >= 0) s ^= hbit(cw, y, H_BASE[j][y], z);
        w += s;
      end
    return w;
  endfunction

  // Channel LLR of a BPSK symbol: +A for bit 0, -A for bit 1, plus uniform noise in
  // [-noise, noise], saturated to [-QMAX, QMAX].
  function automatic int chan_llr(bit b, int amp, int noise);
    int v = (b ? -amp : amp);
    if (noise > 0) v += int'($urandom_range(2*noise)) - noise;
    if (v > QMAX) v = QMAX;
    if (v < -QMAX) v = -QMAX;
    return v;
  endfunction
endpackage
