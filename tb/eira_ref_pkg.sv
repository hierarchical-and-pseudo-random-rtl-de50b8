// eira_ref_pkg: reference model of the hierarchical eIRA code for the
// testbenches, written independently of the RTL's construction functions.
//
// It restates the BIBD(7,3,1) top matrices of the three example codes
// (rate 1/2: all seven lines; rate 0.6: lines 1,2,4,7 without column 7;
// rate 0.75: the rate-0.6 matrix twice side by side), places the ones of
// each permutation block with the closed form i_k = (i_0 + k*root) mod N
// rather than the recursion the hardware uses, and encodes by solving the
// dual-diagonal H2 part bit by bit. It also covers the larger rate-1/2
// codes built on PG(2,3), PG(2,5), PG(2,7) and the 49x49 affine part of
// PG(2,7), computing their incidences from homogeneous coordinates, and
// the irregular version of the 49x49 code (columns 0..20 of degree 7,
// 21..26 of degree 4, 27..48 of degree 3). The root rule
// (1 + (7c + 11r) mod (N-1),
// root also used as init_value, cloned blocks start at the row number) is
// the encoder's own choice and is repeated here.
package eira_ref_pkg;

  typedef int int_q[$];

  // Plane order of the larger codes: 3 -> PG(2,3), 4 -> PG(2,5),
  // 5 -> PG(2,7), 6 -> the 49-line affine part of PG(2,7), 7 -> its
  // irregular version.
  function automatic int ref_q(input int code);
    case (code)
      3: return 3;
      4: return 5;
      default: return 7;
    endcase
  endfunction

  function automatic int ref_rows(input int code);
    if (code == 0) return 7;
    if (code <= 2) return 4;
    if (code >= 6) return 49;
    return ref_q(code) * ref_q(code) + ref_q(code) + 1;
  endfunction

  function automatic int ref_base_cols(input int code);
    if (code == 0) return 7;
    if (code <= 2) return 6;
    return ref_rows(code);
  endfunction

  // Homogeneous coordinates of point or line number i of PG(2,q):
  // the q*q points (1,a,b), then the q points (0,1,b), then (0,0,1).
  function automatic void ref_pg(input int q, input int i, output int v[3]);
    if (i < q * q) v = '{1, i / q, i % q};
    else if (i < q * q + q) v = '{0, 1, i - q * q};
    else v = '{0, 0, 1};
  endfunction

  function automatic int ref_cols(input int code);
    if (code == 2) return 12;
    return ref_base_cols(code);
  endfunction

  // Number of blocks in top-level column c of the 49x49 codes.
  function automatic int ref_col_degree(input int code, input int c);
    if (code == 6 || c < 21) return 7;
    if (c < 27) return 4;
    return 3;
  endfunction

  // Top-level columns (0-based, before cloning) of the top-level row r.
  function automatic int_q ref_line(input int code, input int r);
    int_q full [7];
    int_q q;
    int   sel [4];
    full[0] = '{0, 1, 2};
    full[1] = '{0, 3, 4};
    full[2] = '{0, 5, 6};
    full[3] = '{1, 3, 5};
    full[4] = '{1, 4, 6};
    full[5] = '{2, 3, 6};
    full[6] = '{2, 4, 5};
    sel = '{0, 1, 3, 6};
    if (code >= 3 && code <= 5) begin
      int qq, lv[3], pv[3];
      qq = ref_q(code);
      ref_pg(qq, r, lv);
      for (int p = 0; p < qq * qq + qq + 1; p++) begin
        ref_pg(qq, p, pv);
        if ((lv[0] * pv[0] + lv[1] * pv[1] + lv[2] * pv[2]) % qq == 0) q.push_back(p);
      end
    end else if (code >= 6) begin
      // line y = m*x + k over GF(7), point (x, y) is column 7*x + y; the
      // irregular code keeps column c on slopes 2x .. 2x+deg(c)-1 (mod 7)
      for (int x = 0; x < 7; x++) begin
        int c;
        c = 7 * x + ((r / 7) * x + r % 7) % 7;
        if (code == 6 || (r / 7 - 2 * x + 14) % 7 < ref_col_degree(code, c)) q.push_back(c);
      end
    end else if (code == 0) q = full[r];
    else begin
      foreach (full[sel[r]][i])
        if (full[sel[r]][i] < 6) q.push_back(full[sel[r]][i]);
    end
    return q;
  endfunction

  // Information bit indices in parity check j (row j of H1).
  function automatic int_q ref_check(input int code, input int n, input int j);
    int_q line, res;
    int r, k, root, init, copies;
    r = j / n;
    k = j % n;
    line = ref_line(code, r);
    copies = (code == 2) ? 2 : 1;
    for (int cp = 0; cp < copies; cp++) begin
      foreach (line[i]) begin
        root = 1 + ((7 * line[i] + 11 * r) % (n - 1));
        init = (cp == 0) ? root : (r + 1) % n;
        res.push_back((line[i] + cp * ref_base_cols(code)) * n
                      + int'((longint'(init) + longint'(k) * root) % longint'(n)));
      end
    end
    return res;
  endfunction

  // Whether the bit-level H1 of the code has a length-four cycle: two
  // checks sharing two information bits. Every pair of bits of every check
  // is entered in a table; a pair seen twice closes a cycle.
  function automatic bit ref_has_4cycle(input int code, input int n);
    bit   seen [longint];
    int_q a;
    longint key;
    for (int x = 0; x < ref_rows(code) * n; x++) begin
      a = ref_check(code, n, x);
      foreach (a[i]) foreach (a[l]) if (a[i] < a[l]) begin
        key = longint'(a[i]) * 1000000 + longint'(a[l]);
        if (seen.exists(key)) return 1'b1;
        seen[key] = 1'b1;
      end
    end
    return 1'b0;
  endfunction

endpackage
