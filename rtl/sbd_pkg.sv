// sbd_pkg -- parity-check matrix construction for systematic odd-weight-column
// SEC-DED-SBD codes that also correct any odd number of erroneous bits per byte.
//
// A code is described by its byte length B (bits per memory chip), its number
// of check bits R and its number of data bytes K (k = B*K data bits).  The
// parity-check matrix is H = [B_1 ... B_K  I_R].  Every data-byte block B_i is
// an identity I_B stacked with an (R-B) x B matrix whose columns are all equal
// to one even-weight vector.  A data byte is therefore fully described by
//   * where its identity sits (rows 0..B-1, or rows R-B..R-1), and
//   * its "byte column" h: the shared even-weight column, with zeros in the
//     identity rows.
// Bit t of that byte then has H column  h | (1 << (ioff + t)).
//
// The three constructions choose the set of byte descriptors:
//   C1 (R == 2B):      h over rows 0..B-1 with I below, then I on top with h
//                      over rows B..2B-1; K_max = 2^B - 2.
//   C2 (R  > 2B):      h over rows 0..R-B-1 with I below (2^(R-B-1)-1 bytes),
//                      then I on top with h = [M; N], M over the R-2B middle
//                      rows and N over the last B rows, both even weight and
//                      not both zero (2^(R-B-2)-1 bytes).
//   C3 (B+2 <= R < 2B): h over rows 0..R-B-1 with I below; K_max = 2^(R-B-1)-1.
// Even-weight tuples are enumerated by increasing weight, then by decreasing
// value with the first row as the most significant bit; this order reproduces
// the column order of the published example matrices.  C3 allows both block
// forms: by default the identity is placed below h (the [H; I] form of the
// published C3 example), so the full-length check byte is the last B check
// bits; with c3_i_above the identity goes on top ([I; H]) and the full-length
// check byte is the first B check bits.
//
// Row numbering: bit i of every R-bit vector in this package is row i of H
// (row 0 is the first row).  Check bit i is the parity of row i.
//
// When K is smaller than K_max, bytes are either taken in construction order
// or, with the row-balanced selection, picked greedily so that the largest
// number of ones in any row of H (which sets the depth of the XOR tree for
// that check bit) stays as small as possible; the picked bytes keep their
// construction order.  The greedy rule is this design's own way of applying
// the "fewest ones per row" criterion.
package sbd_pkg;

  // Largest number of check bits and byte candidates the functions handle.
  localparam int unsigned MAX_R    = 24;
  localparam int unsigned MAX_CAND = 512;

  typedef logic [MAX_R-1:0] rvec_t;

  typedef enum logic [1:0] {
    CONS_NONE = 2'd0,   // R < B+2 or B < 3: no code of this class
    CONS_C1   = 2'd1,
    CONS_C2   = 2'd2,
    CONS_C3   = 2'd3
  } cons_e;

  // Decoder verdict on a read word.
  typedef enum logic [1:0] {
    ST_CLEAN     = 2'd0,  // syndrome zero
    ST_CE_SINGLE = 2'd1,  // one bit corrected
    ST_CE_BYTE   = 2'd2,  // odd number (>= 3) of bits corrected inside one byte
    ST_UE        = 2'd3   // detected, not correctable
  } status_e;

  // One data byte of the code.
  typedef struct packed {
    logic  i_top;   // 1: identity in rows 0..B-1; 0: identity in rows R-B..R-1
    rvec_t h;       // shared even-weight column, zero in the identity rows
  } cand_t;

  typedef logic [MAX_CAND-1:0][15:0] sel_t;

  function automatic cons_e construction(int b, int r);
    if (b < 3 || r < b + 2) return CONS_NONE;
    if (r == 2 * b)         return CONS_C1;
    if (r > 2 * b)          return CONS_C2;
    return CONS_C3;
  endfunction

  // Maximum number of data bytes, equations (4), (5) and (6).
  function automatic int kmax(int b, int r);
    case (construction(b, r))
      CONS_C1: return (1 << b) - 2;
      CONS_C2: return (1 << (r - b - 1)) + (1 << (r - b - 2)) - 2;
      CONS_C3: return (1 << (r - b - 1)) - 1;
      default: return 0;
    endcase
  endfunction

  // Fewest check bits that protect k data bits with bytes of b bits.
  function automatic int min_check_bits(int b, int k);
    int nbytes;
    nbytes = (k + b - 1) / b;
    for (int r = b + 2; r <= MAX_R; r++)
      if (kmax(b, r) >= nbytes) return r;
    return 0;
  endfunction

  function automatic int popcount(rvec_t v);
    int n;
    n = 0;
    for (int i = 0; i < MAX_R; i++) n += int'(v[i]);
    return n;
  endfunction

  // idx-th n-bit tuple of even weight (zero tuple excluded if nonzero is set),
  // ordered by weight, then by decreasing value.  Bit n-1 is the first row.
  function automatic rvec_t even_tuple(int n, bit nonzero, int idx);
    int cnt;
    cnt = 0;
    for (int w = (nonzero ? 2 : 0); w <= n; w += 2)
      for (int x = (1 << n) - 1; x >= 0; x--)
        if (popcount(rvec_t'(x)) == w) begin
          if (cnt == idx) return rvec_t'(x);
          cnt++;
        end
    return '0;
  endfunction

  // Place an n-bit tuple (bit n-1 first) into rows top..top+n-1.
  function automatic rvec_t place(rvec_t x, int n, int top);
    rvec_t v;
    v = '0;
    for (int f = 0; f < n; f++) v[top + f] = x[n - 1 - f];
    return v;
  endfunction

  // idx-th data byte of the full code, in construction order.
  function automatic cand_t candidate(int b, int r, int idx, bit c3_i_above);
    cand_t c;
    int    k0, nn, j;
    c = '0;
    case (construction(b, r))
      CONS_C1: begin
        k0 = (1 << (b - 1)) - 1;
        if (idx < k0) begin
          c.i_top = 1'b0;
          c.h     = place(even_tuple(b, 1'b1, idx), b, 0);
        end else begin
          c.i_top = 1'b1;
          c.h     = place(even_tuple(b, 1'b1, idx - k0), b, b);
        end
      end
      CONS_C2: begin
        k0 = (1 << (r - b - 1)) - 1;
        if (idx < k0) begin
          c.i_top = 1'b0;
          c.h     = place(even_tuple(r - b, 1'b1, idx), r - b, 0);
        end else begin
          nn      = 1 << (b - 1);           // number of even b-tuples, zero included
          j       = idx - k0 + 1;           // pair 0 is (M=0, N=0): skipped
          c.i_top = 1'b1;
          c.h     = place(even_tuple(r - 2 * b, 1'b0, j / nn), r - 2 * b, b)
                  | place(even_tuple(b, 1'b0, j % nn), b, r - b);
        end
      end
      CONS_C3: begin
        c.i_top = c3_i_above;
        c.h     = place(even_tuple(r - b, 1'b1, idx), r - b, c3_i_above ? b : 0);
      end
      default: c = '0;
    endcase
    return c;
  endfunction

  // First row of the identity block of a byte.
  function automatic int ioff(int b, int r, logic i_top);
    return i_top ? 0 : r - b;
  endfunction

  // Choose k of the kmax(b, r) bytes; returns candidate indices in increasing
  // order.  balanced = 0 keeps the first k bytes.
  function automatic sel_t select_bytes(int b, int r, int k, bit balanced, bit c3_i_above);
    sel_t                   sel;
    logic [MAX_CAND-1:0]    taken;
    int                     w   [MAX_R];
    int                     n, best, best_max, best_sum, mx, sm, off, nw, pos;
    cand_t                  c;
    sel   = '0;
    taken = '0;
    n     = kmax(b, r);
    for (int i = 0; i < MAX_R; i++) w[i] = (i < r) ? 1 : 0;   // check-bit columns
    if (!balanced || k >= n) begin
      for (int i = 0; i < k && i < n; i++) taken[i] = 1'b1;
    end else begin
      for (int step = 0; step < k; step++) begin
        best = -1; best_max = 0; best_sum = 0;
        for (int ci = 0; ci < n; ci++) begin
          if (!taken[ci]) begin
            c   = candidate(b, r, ci, c3_i_above);
            off = ioff(b, r, c.i_top);
            mx  = 0; sm = 0;
            for (int i = 0; i < r; i++) begin
              nw = w[i] + (c.h[i] ? b : 0) + ((i >= off && i < off + b) ? 1 : 0);
              if (nw > mx) mx = nw;
              sm += nw;
            end
            if (best < 0 || mx < best_max || (mx == best_max && sm < best_sum)) begin
              best = ci; best_max = mx; best_sum = sm;
            end
          end
        end
        taken[best] = 1'b1;
        c   = candidate(b, r, best, c3_i_above);
        off = ioff(b, r, c.i_top);
        for (int i = 0; i < r; i++)
          w[i] += (c.h[i] ? b : 0) + ((i >= off && i < off + b) ? 1 : 0);
      end
    end
    pos = 0;
    for (int ci = 0; ci < n; ci++)
      if (taken[ci]) begin
        sel[pos] = 16'(ci);
        pos++;
      end
    return sel;
  endfunction

  // Check bytes: the check bits are grouped like the rows of H.
  //   C1: rows 0..B-1, B..2B-1
  //   C2: rows 0..B-1, B..R-B-1 (short byte), R-B..R-1
  //   C3: rows 0..R-B-1 (short byte), R-B..R-1; with the identity above h
  //       (c3_i_above): rows 0..B-1, B..R-1 (short byte)
  function automatic int num_check_bytes(int b, int r);
    case (construction(b, r))
      CONS_C2: return 3;
      default: return 2;
    endcase
  endfunction

  // Row mask of check byte j.
  function automatic rvec_t check_byte_mask(int b, int r, int j, bit c3_i_above);
    rvec_t m;
    int    lo, hi;
    m = '0;
    case (construction(b, r))
      CONS_C1: begin lo = (j == 0) ? 0 : b; hi = (j == 0) ? b : 2 * b; end
      CONS_C2: begin
        lo = (j == 0) ? 0 : (j == 1) ? b     : r - b;
        hi = (j == 0) ? b : (j == 1) ? r - b : r;
      end
      default: begin
        if (c3_i_above) begin lo = (j == 0) ? 0 : b;     hi = (j == 0) ? b     : r; end
        else            begin lo = (j == 0) ? 0 : r - b; hi = (j == 0) ? r - b : r; end
      end
    endcase
    for (int i = 0; i < MAX_R; i++) m[i] = (i >= lo && i < hi);
    return m;
  endfunction

endpackage
