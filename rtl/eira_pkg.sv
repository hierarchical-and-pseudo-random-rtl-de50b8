// eira_pkg: construction of the hierarchical eIRA parity check matrix.
//
// The parity check matrix is H = [H1 | H2]. H2 is the dual-diagonal eIRA
// part (it is not stored anywhere: the encoder's accumulator implements it).
// H1 is a grid of R x C square blocks of size N, each either zero or a
// permutation matrix. Which blocks are non-zero (the "top matrix") comes
// from the balanced incomplete block design BIBD(7,3,1), the Fano plane:
//   CODE_R050 : all 7 lines, 7 columns               -> rate 1/2  (7x7 top)
//   CODE_R060 : lines 1,2,4,7, last column removed    -> rate 0.6  (4x6 top)
//   CODE_R075 : the rate-0.6 matrix cloned side by side -> rate 0.75 (4x12 top)
// and from larger designs of the same kind (lambda = 1), for rate 1/2:
//   CODE_PG3/5/7 : projective plane PG(2,q), q = 3, 5, 7: (q*q+q+1) square
//                  top matrix, q+1 blocks per row and per column
//   CODE_AG7     : PG(2,7) without the 8 lines through one point and the 8
//                  points of one line missing it: 49x49 top matrix, 7 blocks
//                  per row and per column (equivalently the lines y = mx + k
//                  of the affine plane over GF(7)); with N = 41 it gives the
//                  (4018, 2009) frame.
//   CODE_AG7_IRR : the same 49x49 matrix with blocks removed so that H1 is
//                  irregular: 21 columns keep degree 7, 6 get degree 4 and
//                  22 get degree 3 (42% / 12% / 46% of the columns); every
//                  row keeps 4 or 5 blocks. This is the default code.
// Each non-zero block (r,c) is defined by a primitive generator
// i_{k+1} = (i_k + root) mod N with i_0 = init: block row k has its single
// one in block column i_k. Within a top-level row the non-zero blocks are
// numbered by "slots" 0..W-1 in increasing column order; in the irregular
// code a removed block leaves its slot empty.
//
// Following the construction: the root of each block is also its
// init_value; the blocks of the cloned (right) half reuse the root of the
// block they copy, and their init_value is the top-level row number (1..R).
// The construction selects roots with a design-time optimisation; this
// package uses the fixed rule root = 1 + ((7*c + 11*r) mod (N-1)), with c the
// column inside the original BIBD and r the top-level row, which is always a
// valid (non-zero) root because N is prime. With this rule the rate-0.75
// code is free of length-four cycles for N = 41 and most other primes, but
// not for every prime (it has them for N = 7, 11, 31).
//
// Information bit u[c*N + x] is bit x of top-level column c; parity bit
// p[r*N + k] belongs to block row k of top-level row r.
package eira_pkg;

  typedef enum int {
    CODE_R050 = 0,
    CODE_R060 = 1,
    CODE_R075 = 2,
    CODE_PG3  = 3,
    CODE_PG5  = 4,
    CODE_PG7  = 5,
    CODE_AG7  = 6,
    CODE_AG7_IRR = 7
  } code_e;

  // Lines of BIBD(7,3,1) in the row order of the top matrix, columns 1-based.
  localparam int FANO_LINES [7][3] = '{
    '{1, 2, 3},
    '{1, 4, 5},
    '{1, 6, 7},
    '{2, 4, 6},
    '{2, 5, 7},
    '{3, 4, 7},
    '{3, 5, 6}
  };

  // Lines (0-based) kept for the rate-0.6 and rate-0.75 codes: rows 1,2,4,7.
  localparam int SUBSET_LINES [4] = '{0, 1, 3, 6};

  // Order q of the projective or affine plane behind a code.
  function automatic int code_q(input int code);
    case (code)
      CODE_PG3: return 3;
      CODE_PG5: return 5;
      CODE_PG7, CODE_AG7, CODE_AG7_IRR: return 7;
      default: return 2;
    endcase
  endfunction

  function automatic bit code_is_fano(input int code);
    return code == CODE_R050 || code == CODE_R060 || code == CODE_R075;
  endfunction

  // Codes on the 49x49 matrix (lines y = m*x + k over GF(7)).
  function automatic bit code_is_ag(input int code);
    return code == CODE_AG7 || code == CODE_AG7_IRR;
  endfunction

  // Column degree of point (x, y) in the irregular 49x49 code: the columns
  // with x < 3 keep all 7 blocks, x = 3 with y < 6 keep 4, the rest keep 3.
  function automatic int ag_irr_degree(input int x, input int y);
    if (x < 3) return 7;
    if (x == 3 && y < 6) return 4;
    return 3;
  endfunction

  // Whether the irregular code keeps the block of point (x, y) on a line of
  // slope m: each column keeps the slopes 2x, 2x+1, ... (mod 7), as many as
  // its degree. The offset 2x spreads the removals evenly over the rows.
  function automatic bit ag_irr_keep(input int m, input int x, input int y);
    return ((m - 2 * x + 14) % 7) < ag_irr_degree(x, y);
  endfunction
  function automatic int code_rows(input int code);
    int q;
    q = code_q(code);
    if (code == CODE_R060 || code == CODE_R075) return 4;
    if (code_is_ag(code)) return q * q;
    return q * q + q + 1;
  endfunction

  // Columns of the original design that are kept (before cloning).
  function automatic int code_base_cols(input int code);
    int q;
    q = code_q(code);
    if (code == CODE_R060 || code == CODE_R075) return 6;
    if (code_is_ag(code)) return q * q;
    return q * q + q + 1;
  endfunction

  function automatic int code_copies(input int code);
    return (code == CODE_R075) ? 2 : 1;
  endfunction

  function automatic int code_cols(input int code);
    return code_base_cols(code) * code_copies(code);
  endfunction

  // Blocks per top-level row of the original design.
  function automatic int code_base_slots(input int code);
    if (code_is_fano(code)) return 3;
    if (code_is_ag(code)) return code_q(code);
    return code_q(code) + 1;
  endfunction

  // Slots per top-level row (check degree of H1).
  function automatic int code_slots(input int code);
    return code_base_slots(code) * code_copies(code);
  endfunction

  // Coordinate j (0: x, 1: y, 2: z) of point number idx of PG(2,q) as a
  // normalised vector: idx = a*q + b -> (1,a,b); q*q + b -> (0,1,b);
  // q*q + q -> (0,0,1). Lines use the same numbering for their
  // coefficient vectors.
  function automatic int pg_coord(input int q, input int idx, input int j);
    if (idx < q * q) return (j == 0) ? 1 : (j == 1) ? idx / q : idx % q;
    if (idx < q * q + q) return (j == 0) ? 0 : (j == 1) ? 1 : idx - q * q;
    return (j == 2) ? 1 : 0;
  endfunction

  // Whether point p lies on line l of PG(2,q).
  function automatic bit pg_incident(input int q, input int l, input int p);
    int dot;
    dot = 0;
    for (int j = 0; j < 3; j++) dot += pg_coord(q, l, j) * pg_coord(q, p, j);
    return (dot % q) == 0;
  endfunction

  // Column (0-based, before cloning) of block w%base_slots of top-level
  // row r in the original design, or -1 when the column was removed.
  function automatic int code_base_col(input int code, input int r, input int w);
    int c, q, wb, cnt;
    q  = code_q(code);
    wb = w % code_base_slots(code);
    if (code_is_fano(code)) begin
      c = FANO_LINES[(code == CODE_R050) ? r : SUBSET_LINES[r]][wb] - 1;
      if (c >= code_base_cols(code)) return -1;
      return c;
    end
    if (code_is_ag(code)) begin
      // row r = m*q + k is the line y = m*x + k; its block wb is x = wb
      c = ((r / q) * wb + r % q) % q;
      if (code == CODE_AG7_IRR && !ag_irr_keep(r / q, wb, c)) return -1;
      return wb * q + c;
    end
    // projective plane: the wb-th point (in numbering order) on line r
    cnt = 0;
    for (int p = 0; p < q * q + q + 1; p++) begin
      if (pg_incident(q, r, p)) begin
        if (cnt == wb) return p;
        cnt++;
      end
    end
    return -1;
  endfunction

  // Top-level column of slot w of row r, or -1 when the slot is empty.
  function automatic int code_col(input int code, input int r, input int w);
    int c;
    if (r >= code_rows(code) || w >= code_slots(code)) return -1;
    c = code_base_col(code, r, w);
    if (c < 0) return -1;
    return c + (w / code_base_slots(code)) * code_base_cols(code);
  endfunction

  function automatic int code_root(input int code, input int n, input int r, input int w);
    int c;
    c = code_base_col(code, r, w);
    if (c < 0) return 1;
    return 1 + ((7 * c + 11 * r) % (n - 1));
  endfunction

  function automatic int code_init(input int code, input int n, input int r, input int w);
    if (w < code_base_slots(code)) return code_root(code, n, r, w);
    return (r + 1) % n;
  endfunction

endpackage
