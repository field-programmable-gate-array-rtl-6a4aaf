// mwofdm_pkg: constants, types and transform coefficients shared by the
// multiwavelet OFDM transmitter and receiver.
//
// Frame format: N_F = 16 subcarriers, of which N_C = 12 carry QPSK data on
// subcarriers 2..13 and subcarriers 0, 1, 14, 15 are held at zero. These
// numbers and the QPSK level 0.70703125 (181/256, so 8 fraction bits) follow
// the design description. Word widths beyond the 8 fraction bits, the
// coefficient format and the clock plan are this design's own choices.
//
// Clock plan: one clock domain running at the serial sample rate. A QPSK
// symbol occupies SYM_CLKS = N_F clocks, a bit BIT_CLKS = SYM_CLKS/2 clocks,
// and an OFDM frame N_C*SYM_CLKS = 192 clocks, the same ratios as the
// multi-rate original, where the parallel-to-serial stage runs N_F times
// faster than the symbol stream.
//
// Transform: the discrete multiwavelet critical-sampling transform (DMWCST)
// is taken here as the single-level periodic GHM multiwavelet transform. The
// input vector of 16 samples is read as 8 two-component vector samples; block
// row r of the low band holds the 2x2 matrices H0..H3 starting at vector
// column 2r (modulo 8), and block row r of the high band holds G0..G3 in the
// same place. The 16x16 matrix W is orthogonal, so the inverse transform is
// W transposed. Every row and every column of W has at most 7 nonzero
// entries, which is why each output needs one 7-input adder tree.
//
//   H0 = [ 3/(5r)  4/5      ;  -1/20  -3/(10r) ]   r = sqrt(2)
//   H1 = [ 3/(5r)  0        ;   9/20   1/r     ]
//   H2 = [ 0       0        ;   9/20  -3/(10r) ]
//   H3 = [ 0       0        ;  -1/20   0       ]
//   G0 = [ -1/20   -3/(10r) ;   1/(10r)   3/10 ]
//   G1 = [ 9/20    -1/r     ;  -9/(10r)   0    ]
//   G2 = [ 9/20    -3/(10r) ;   9/(10r)  -3/10 ]
//   G3 = [ -1/20    0       ;  -1/(10r)   0    ]
//
// Coefficients are signed COEF_W-bit integers with COEF_FRAC fraction bits,
// each the rounded value of the expression above times 2**COEF_FRAC.
package mwofdm_pkg;

  localparam int N_F       = 16;   // subcarriers per OFDM symbol
  localparam int N_C       = 12;   // data subcarriers
  localparam int N_LEAD    = 2;    // null subcarriers at the start (and at the end)
  localparam int DATA_W    = 16;   // sample width
  localparam int DATA_FRAC = 8;    // sample fraction bits
  localparam int COEF_W    = 16;   // coefficient width
  localparam int COEF_FRAC = 14;   // coefficient fraction bits
  localparam int MAX_NZ    = 7;    // nonzero coefficients per row/column of W
  localparam int SYM_CLKS  = N_F;  // clocks per QPSK symbol
  localparam int BIT_CLKS  = SYM_CLKS / 2;  // clocks per bit

  // QPSK amplitude 0.70703125 in DATA_FRAC fraction bits
  localparam int QPSK_AMP  = 181;

  typedef logic signed [DATA_W-1:0] sample_t;
  typedef sample_t [N_F-1:0]        svec_t;   // element k = subcarrier / sample k

  // One vector on its way through a transform: the I part and the Q part of a
  // symbol pass one after the other, marked by is_q.
  typedef struct packed {
    logic  valid;
    logic  is_q;
    svec_t data;
  } vbeat_t;

  // Distinct coefficient magnitudes, times 2**14.
  localparam int C_3_5R  = 6951;   // 3/(5*sqrt2)
  localparam int C_4_5   = 13107;  // 4/5
  localparam int C_1_20  = 819;    // 1/20
  localparam int C_3_10R = 3476;   // 3/(10*sqrt2)
  localparam int C_9_20  = 7373;   // 9/20
  localparam int C_1_R   = 11585;  // 1/sqrt2
  localparam int C_1_10R = 1159;   // 1/(10*sqrt2)
  localparam int C_3_10  = 4915;   // 3/10
  localparam int C_9_10R = 10427;  // 9/(10*sqrt2)

  // Entry (r, c) of GHM matrix H_k (hi = 0) or G_k (hi = 1).
  function automatic int ghm_tap(input bit hi, input int k, input int r, input int c);
    int idx;
    idx = k * 4 + r * 2 + c;
    if (!hi) begin
      case (idx)
        0: return  C_3_5R;   1: return  C_4_5;    2: return -C_1_20;   3: return -C_3_10R;
        4: return  C_3_5R;   5: return  0;        6: return  C_9_20;   7: return  C_1_R;
        8: return  0;        9: return  0;       10: return  C_9_20;  11: return -C_3_10R;
        12: return 0;       13: return  0;       14: return -C_1_20;  15: return  0;
        default: return 0;
      endcase
    end else begin
      case (idx)
        0: return -C_1_20;   1: return -C_3_10R;  2: return  C_1_10R;  3: return  C_3_10;
        4: return  C_9_20;   5: return -C_1_R;    6: return -C_9_10R;  7: return  0;
        8: return  C_9_20;   9: return -C_3_10R; 10: return  C_9_10R; 11: return -C_3_10;
        12: return -C_1_20; 13: return  0;       14: return -C_1_10R; 15: return  0;
        default: return 0;
      endcase
    end
  endfunction

  // Entry (row, col) of the forward transform matrix W (N_F x N_F).
  function automatic int dmwcst_coef(input int row, input int col);
    int  m, rb, cb, k;
    bit  hi;
    m  = N_F / 2;
    hi = (row >= N_F / 2);
    rb = (hi ? row - N_F / 2 : row) / 2;
    cb = col / 2;
    k  = ((cb - 2 * rb) % m + m) % m;
    if (k > 3) return 0;
    return ghm_tap(hi, k, row % 2, col % 2);
  endfunction

  // Entry (row, col) of the matrix actually applied: W or its transpose.
  function automatic int mw_coef(input bit inverse, input int row, input int col);
    return inverse ? dmwcst_coef(col, row) : dmwcst_coef(row, col);
  endfunction

  // Column of the n-th nonzero entry of row `row`, or -1 if the row has fewer.
  function automatic int mw_nz_col(input bit inverse, input int row, input int n);
    int seen;
    seen = 0;
    for (int c = 0; c < N_F; c++) begin
      if (mw_coef(inverse, row, c) != 0) begin
        if (seen == n) return c;
        seen++;
      end
    end
    return -1;
  endfunction

endpackage
