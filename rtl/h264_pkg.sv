// h264_pkg: types, mode encodings and standard H.264 tables shared by the
// intra encoding flow.
//
// Samples are 8-bit. The eight-pixel parallel datapath moves one 8-lane vector
// per cycle: two 4-sample rows (or columns) of a 4x4 block, or one 8-sample
// row (or column) of an 8x8 block. Transform coefficients are 16-bit signed
// inside the datapath; the prediction residual SRAM keeps 15 bits of each
// (8 x 15 = 120-bit luma words). Quantized levels are 14-bit signed
// (16 x 14 = 224-bit coefficient buffer words).
//
// The quantization and de-quantization multiplier tables are the ones of the
// H.264 standard (flat scaling matrices); the rows for QP%6 = 4 are the
// values of the QP = 28 parameter table of the design. The deblocking
// threshold tables (alpha, beta, tc0) are also the standard's.
//
// Origin: the QP-28 scaling values and the ESATD 4x4 weights and shifts are
// the original design's; the full scaling, deblocking and prediction tables
// follow the H.264 standard, and the 8x8 ESATD weights (32*sqrt(MF/MF00) per
// class) are this design's own derivation.
package h264_pkg;

  typedef logic        [7:0]  pix_t;
  typedef logic signed [8:0]  res_t;    // prediction residual
  typedef logic signed [15:0] coef_t;   // transform coefficient
  typedef logic signed [13:0] level_t;  // quantized level

  localparam int LANES = 8;             // eight-pixel parallelism

  typedef pix_t  pix_vec_t  [LANES];
  typedef res_t  res_vec_t  [LANES];
  typedef coef_t coef_vec_t [LANES];

  // Transform / block shapes handled by the shared units.
  typedef enum logic [1:0] {
    TR_DCT4 = 2'd0,   // 4x4 integer DCT, two 4-lines per vector
    TR_DCT8 = 2'd1,   // 8x8 integer DCT, one 8-line per vector
    TR_DHT4 = 2'd2,   // 4x4 Hadamard of luma 16x16 DC values
    TR_DHT2 = 2'd3    // 2x2 Hadamard of chroma DC values (lanes 0,1 / 4,5)
  } tr_mode_t;

  // Intra 4x4 / 8x8 prediction modes (numbering of the standard).
  typedef enum logic [3:0] {
    M_VERT = 4'd0, M_HOR = 4'd1, M_DC = 4'd2, M_DDL = 4'd3, M_DDR = 4'd4,
    M_VR = 4'd5, M_HD = 4'd6, M_VL = 4'd7, M_HU = 4'd8,
    M_DCX = 4'd9      // DC with an externally computed mean (16x16 / chroma)
  } ipred_mode_t;

  // Quantization multipliers MF[qp%6][class]; 4x4 classes:
  // 0 = (even,even), 1 = (odd,odd), 2 = otherwise.
  function automatic int unsigned qmf4(input int unsigned m, input int unsigned c);
    int unsigned t [6][3] = '{'{13107, 5243, 8066}, '{11916, 4660, 7490},
                              '{10082, 4194, 6554}, '{ 9362, 3647, 5825},
                              '{ 8192, 3355, 5243}, '{ 7282, 2893, 4559}};
    return t[m][c];
  endfunction

  function automatic int unsigned dqv4(input int unsigned m, input int unsigned c);
    int unsigned t [6][3] = '{'{10, 16, 13}, '{11, 18, 14}, '{13, 20, 16},
                              '{14, 23, 18}, '{16, 25, 20}, '{18, 29, 23}};
    return t[m][c];
  endfunction

  // 8x8 classes: 0 (i%4==0,j%4==0) 1 (i odd,j odd) 2 (i%4==2,j%4==2)
  // 3 (one index %4==0, the other odd) 4 (one %4==0, other %4==2) 5 otherwise
  function automatic int unsigned qmf8(input int unsigned m, input int unsigned c);
    int unsigned t [6][6] = '{
      '{13107, 11428, 20972, 12222, 16777, 15481},
      '{11916, 10826, 19174, 11058, 14980, 14290},
      '{10082,  8943, 15978,  9675, 12710, 11985},
      '{ 9362,  8228, 14913,  8931, 11984, 11259},
      '{ 8192,  7346, 13159,  7740, 10486,  9777},
      '{ 7282,  6428, 11570,  6830,  9118,  8640}};
    return t[m][c];
  endfunction

  function automatic int unsigned dqv8(input int unsigned m, input int unsigned c);
    int unsigned t [6][6] = '{
      '{20, 18, 32, 19, 25, 24}, '{22, 19, 35, 21, 28, 26},
      '{26, 23, 42, 24, 33, 31}, '{28, 25, 45, 26, 35, 33},
      '{32, 28, 51, 30, 40, 38}, '{36, 32, 58, 34, 46, 43}};
    return t[m][c];
  endfunction

  function automatic int unsigned cls4(input int unsigned i, input int unsigned j);
    if (i[0] == 1'b0 && j[0] == 1'b0) return 0;
    if (i[0] == 1'b1 && j[0] == 1'b1) return 1;
    return 2;
  endfunction

  function automatic int unsigned cls8(input int unsigned i, input int unsigned j);
    if (i % 4 == 0 && j % 4 == 0) return 0;
    if (i[0] && j[0])             return 1;
    if (i % 4 == 2 && j % 4 == 2) return 2;
    if ((i % 4 == 0 && j[0]) || (i[0] && j % 4 == 0)) return 3;
    if ((i % 4 == 0 && j % 4 == 2) || (i % 4 == 2 && j % 4 == 0)) return 4;
    return 5;
  endfunction

  // Deblocking thresholds of the standard, indexed by indexA / indexB (0..51).
  function automatic int unsigned dbf_alpha(input int unsigned idx);
    int unsigned t [36] = '{4,4,5,6,7,8,9,10,12,13,15,17,20,22,25,28,32,36,40,45,
                            50,56,63,71,80,90,101,113,127,144,162,182,203,226,255,255};
    return (idx < 16) ? 0 : t[idx-16];
  endfunction

  function automatic int unsigned dbf_beta(input int unsigned idx);
    int unsigned t [36] = '{2,2,2,3,3,3,3,4,4,4,6,6,7,7,8,8,9,9,10,10,11,11,12,12,
                            13,13,14,14,15,15,16,16,17,17,18,18};
    return (idx < 16) ? 0 : t[idx-16];
  endfunction

  // tc0 for bS = 1, 2, 3
  function automatic int unsigned dbf_tc0(input int unsigned idx, input int unsigned bs);
    int unsigned t [35][3] = '{
      '{0,0,1},'{0,0,1},'{0,0,1},'{0,0,1},'{0,1,1},'{0,1,1},'{1,1,1},'{1,1,1},
      '{1,1,1},'{1,1,1},'{1,1,2},'{1,1,2},'{1,1,2},'{1,1,2},'{1,2,3},'{1,2,3},
      '{2,2,3},'{2,2,4},'{2,3,4},'{2,3,4},'{3,3,5},'{3,4,6},'{3,4,6},'{4,5,7},
      '{4,5,8},'{4,6,9},'{5,7,10},'{6,8,11},'{6,8,13},'{7,10,14},'{8,11,16},
      '{9,12,18},'{10,13,20},'{11,15,23},'{13,17,25}};
    if (idx < 17 || bs == 0 || bs > 3) return 0;
    return t[idx-17][bs-1];
  endfunction

  // One intra prediction sample of an N x N block (N = 4 or 8), following the
  // zone equations of the standard. t[k] holds p[k-1,-1] (t[0] is the corner
  // M), l[k] holds p[-1,k-1] (l[0] is also the corner); 16 + 1 entries so both
  // block sizes fit. dcv is the DC value to use for M_DC / M_DCX.
  function automatic pix_t ipred_sample(input ipred_mode_t mode, input int n,
                                        input int x, input int y,
                                        input pix_t t [17], input pix_t l [17],
                                        input pix_t dcv);
    int z, v, a, b, c;
    v = 0;
    unique case (mode)
      M_VERT: v = t[x+1];
      M_HOR:  v = l[y+1];
      M_DC, M_DCX: v = dcv;
      M_DDL: begin
        if (x == n-1 && y == n-1) v = (t[2*n-1] + 3*t[2*n] + 2) >> 2;
        else v = (t[x+y+1] + 2*t[x+y+2] + t[x+y+3] + 2) >> 2;
      end
      M_DDR: begin
        if (x > y)      v = (t[x-y-1] + 2*t[x-y] + t[x-y+1] + 2) >> 2;
        else if (x < y) v = (l[y-x-1] + 2*l[y-x] + l[y-x+1] + 2) >> 2;
        else            v = (t[1] + 2*t[0] + l[1] + 2) >> 2;
      end
      M_VR: begin
        z = 2*x - y;
        a = x - (y >> 1);
        if (z >= 0 && z % 2 == 0) v = (t[a] + t[a+1] + 1) >> 1;
        else if (z >= 0)          v = (t[a-1] + 2*t[a] + t[a+1] + 2) >> 2;
        else if (z == -1)         v = (l[1] + 2*t[0] + t[1] + 2) >> 2;
        else                      v = (l[y-2*x] + 2*l[y-2*x-1] + l[y-2*x-2] + 2) >> 2;
      end
      M_HD: begin
        z = 2*y - x;
        a = y - (x >> 1);
        if (z >= 0 && z % 2 == 0) v = (l[a] + l[a+1] + 1) >> 1;
        else if (z >= 0)          v = (l[a-1] + 2*l[a] + l[a+1] + 2) >> 2;
        else if (z == -1)         v = (l[1] + 2*t[0] + t[1] + 2) >> 2;
        else                      v = (t[x-2*y] + 2*t[x-2*y-1] + t[x-2*y-2] + 2) >> 2;
      end
      M_VL: begin
        a = x + (y >> 1);
        if (y % 2 == 0) v = (t[a+1] + t[a+2] + 1) >> 1;
        else            v = (t[a+1] + 2*t[a+2] + t[a+3] + 2) >> 2;
      end
      M_HU: begin
        z = x + 2*y;
        b = y + (x >> 1);
        c = 2*n - 3;              // 5 for 4x4, 13 for 8x8
        if (z < c && z % 2 == 0) v = (l[b+1] + l[b+2] + 1) >> 1;
        else if (z < c)          v = (l[b+1] + 2*l[b+2] + l[b+3] + 2) >> 2;
        else if (z == c)         v = (l[n-1] + 3*l[n] + 2) >> 2;
        else                     v = l[n];
      end
      default: v = 0;
    endcase
    return pix_t'(v);
  endfunction

endpackage
