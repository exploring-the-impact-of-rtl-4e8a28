// ldpc_pkg: constants and helper functions shared by the unrolled RCQ LDPC decoder.
//
// The code is the IEEE 802.11n (648,540) rate-5/6 QC-LDPC code: a 4 x 24 base matrix
// expanded with lifting factor 27. An entry s >= 0 stands for the 27x27 identity matrix
// circularly shifted by s, so check node m = j*Z+z is connected to variable node
// n = y*Z + (z+s) mod Z; -1 means an all-zero block. Node degrees, network sizes and the
// slot each edge occupies on the check-node side and on the variable-node side are computed
// here from the base matrix at elaboration time, so another base matrix only needs a new
// H_BASE (and matching dimensions).
//
// Message formats:
//   * full-precision messages (channel LLRs, variable node inputs and outputs, a-posteriori
//     LLRs) are DWIDTH-bit two's complement, limited to +-QMAX by message clipping;
//   * quantized RCQ messages (everything that enters or leaves a check node layer) are
//     QBITS-bit sign-magnitude indices: bit QBITS-1 is the sign, the rest the magnitude index.
//
// RCQ tables: version 1 maps the channel LLRs, version 2 is used by iterations 1..5 and
// version 3 by iterations 6..10. Each version has 2^(QBITS-1) reconstruction magnitudes and
// 2^(QBITS-1)-1 quantization thresholds. The structure, widths and version schedule follow
// the published design; the table contents themselves are this design's own choice (levels
// roughly doubling, thresholds halfway between neighbouring levels) and can be replaced here.
package ldpc_pkg;

  // ---------------- code structure ----------------
  localparam int unsigned Z          = 27;            // lifting factor
  localparam int unsigned NB         = 24;            // base-matrix columns (HorizontalIterations)
  localparam int unsigned MB         = 4;             // base-matrix rows (NumLayers)
  localparam int unsigned N_VN       = NB * Z;        // code length, 648
  localparam int unsigned N_CN       = MB * Z;        // parity checks, 108
  localparam int unsigned K_INFO     = N_VN - N_CN;   // information bits, 540
  localparam int unsigned MAX_ITER   = 10;            // unrolled iterations

  // ---------------- arithmetic ----------------
  localparam int unsigned DWIDTH     = 7;             // full-precision message width
  localparam int unsigned LLR_BITS   = 7;             // channel LLR width
  localparam int unsigned QBITS      = 3;             // quantized message width
  localparam int unsigned QMAG       = QBITS - 1;     // magnitude index bits
  localparam int          QMAX       = (1 << (DWIDTH-1)) - 1;  // clipping bound, 63
  localparam int unsigned OFFSET     = 0;             // OMS offset; 0 gives plain min-sum

  // ---------------- base matrix ----------------
  typedef int hbase_t [MB][NB];
  localparam hbase_t H_BASE = '{
    '{17,13, 8,21, 9, 3,18,12,10, 0, 4,15,19, 2, 5,10,26,19,13,13, 1, 0,-1,-1},
    '{ 3,12,11,14,11,25, 5,18, 0, 9, 2,26,26,10,24, 7,14,20, 4, 2,-1, 0, 0,-1},
    '{22,16, 4, 3,10,21,12, 5,21,14,19, 5,-1, 8, 5,18,11, 5, 5,15, 0,-1, 0, 0},
    '{ 7, 7,14,14, 4,16,16,24,24,10, 1, 7,15, 6,10,26, 8,18,21,14, 1,-1,-1, 0}
  };

  // Degree of the check nodes of block row j.
  function automatic int cn_deg(int j);
    int d = 0;
    for (int y = 0; y < NB; y++) if (H_BASE[j][y] >= 0) d++;
    return d;
  endfunction

  // Degree of the variable nodes of block column y.
  function automatic int vn_deg(int y);
    int d = 0;
    for (int j = 0; j < MB; j++) if (H_BASE[j][y] >= 0) d++;
    return d;
  endfunction

  // Smallest power of two >= d (at least 2): the size of a node's calculation network.
  function automatic int net_size(int d);
    int s = 2;
    while (s < d) s = s * 2;
    return s;
  endfunction

  function automatic int max_cn_deg();
    int m = 0;
    for (int j = 0; j < MB; j++) if (cn_deg(j) > m) m = cn_deg(j);
    return m;
  endfunction

  function automatic int max_vn_deg();
    int m = 0;
    for (int y = 0; y < NB; y++) if (vn_deg(y) > m) m = vn_deg(y);
    return m;
  endfunction

  localparam int unsigned CDEG_MAX = max_cn_deg();   // 22 for this code
  localparam int unsigned VDEG_MAX = max_vn_deg();   // 4 for this code

  // ---------------- connection tables (computed once at elaboration) ----------------
  typedef int deg_cn_t  [MB];
  typedef int deg_vn_t  [NB];
  typedef int col_tab_t [MB*CDEG_MAX];   // index j*CDEG_MAX + c
  typedef int row_tab_t [NB*VDEG_MAX];   // index y*VDEG_MAX + r
  typedef int slot_t    [MB*NB];         // index j*NB + y

  function automatic deg_cn_t f_cn_deg();
    for (int j = 0; j < MB; j++) f_cn_deg[j] = cn_deg(j);
  endfunction
  function automatic deg_vn_t f_vn_deg();
    for (int y = 0; y < NB; y++) f_vn_deg[y] = vn_deg(y);
  endfunction
  function automatic col_tab_t f_cn_col();
    col_tab_t t;
    for (int j = 0; j < MB; j++) begin
      int c = 0;
      for (int k = 0; k < CDEG_MAX; k++) t[j*CDEG_MAX+k] = -1;
      for (int y = 0; y < NB; y++)
        if (H_BASE[j][y] >= 0) begin
          t[j*CDEG_MAX+c] = y;
          c++;
        end
    end
    return t;
  endfunction
  function automatic row_tab_t f_vn_row();
    row_tab_t t;
    for (int y = 0; y < NB; y++) begin
      int r = 0;
      for (int k = 0; k < VDEG_MAX; k++) t[y*VDEG_MAX+k] = -1;
      for (int j = 0; j < MB; j++)
        if (H_BASE[j][y] >= 0) begin
          t[y*VDEG_MAX+r] = j;
          r++;
        end
    end
    return t;
  endfunction
  function automatic slot_t f_cn_slot();
    slot_t t;
    for (int j = 0; j < MB; j++) begin
      int c = 0;
      for (int y = 0; y < NB; y++) begin
        t[j*NB+y] = c;
        if (H_BASE[j][y] >= 0) c++;
      end
    end
    return t;
  endfunction
  function automatic slot_t f_vn_slot();
    slot_t t;
    for (int y = 0; y < NB; y++) begin
      int r = 0;
      for (int j = 0; j < MB; j++) begin
        t[j*NB+y] = r;
        if (H_BASE[j][y] >= 0) r++;
      end
    end
    return t;
  endfunction

  localparam deg_cn_t  CN_DEG  = f_cn_deg();   // degree of block row j
  localparam deg_vn_t  VN_DEG  = f_vn_deg();   // degree of block column y
  localparam col_tab_t CN_COL  = f_cn_col();   // column of slot c of row j (-1: none), [j*CDEG_MAX+c]
  localparam row_tab_t VN_ROW  = f_vn_row();   // row of slot r of column y (-1: none), [y*VDEG_MAX+r]
  localparam slot_t    CN_SLOT = f_cn_slot();  // CN-side slot of edge (j,y), [j*NB+y]
  localparam slot_t    VN_SLOT = f_vn_slot();  // VN-side slot of edge (j,y), [j*NB+y]

  // Messages travel between layers as unpacked arrays indexed [node][slot]: a check node
  // has CDEG_MAX slots, a variable node VDEG_MAX; slots beyond a node's degree carry 0.

  // ---------------- RCQ tables ----------------
  localparam int unsigned N_VERSIONS = 3;
  localparam int unsigned N_LEVELS   = 1 << QMAG;    // 4 magnitude indices for 3 bits
  typedef int rtab_t [N_VERSIONS][N_LEVELS];
  typedef int qtab_t [N_VERSIONS][N_LEVELS-1];
  // Reconstruction magnitudes R*(index), per version (index 0 = version 1).
  localparam rtab_t R_TABLE = '{
    '{2, 8, 16, 30},
    '{2, 7, 14, 28},
    '{4, 12, 24, 48}
  };
  // Quantization thresholds tau_0..tau_2, per version.
  localparam qtab_t Q_THRESH = '{
    '{4, 11, 22},
    '{4, 10, 20},
    '{7, 17, 35}
  };

  // Table versions: channel LLRs use version 1; iteration t (1-based) uses RCQ_TABLE_SEL[t-1].
  localparam int unsigned LLR_QUANT_VERSION = 1;
  typedef int unsigned sel_t [MAX_ITER];
  localparam sel_t RCQ_TABLE_SEL = '{2, 2, 2, 2, 2, 3, 3, 3, 3, 3};

  // Magnitude quantizer Q*(h) of eq. (2.11) for one table version (1-based).
  function automatic int q_star(int version, int h);
    int j = N_LEVELS - 1;
    for (int k = N_LEVELS - 2; k >= 0; k--)
      if (h <= Q_THRESH[version-1][k]) j = k;
    return j;
  endfunction

endpackage
