// plane_rom_checker: checks one top_matrix_rom built on a projective or
// affine plane (CODE 3..7) against eira_ref_pkg: the columns of every slot,
// the roots and init values, the block count per row and per column
// (q+1 for PG(2,q), 7 for the regular 49x49 code; for the irregular one
// 21 columns of degree 7, 6 of degree 4, 22 of degree 3 and 4 or 5 blocks
// per row, slot w holding the point with x = w), and that any two
// top-level rows share at most one column (exactly one for a projective
// plane). Reports its counts on its outputs and raises `done`.
module plane_rom_checker
  import eira_ref_pkg::*;
#(
  parameter int CODE = 7,
  parameter int N    = 41
) (
  output int checks,
  output int failures,
  output bit done
);

  localparam int R  = ref_rows(CODE);
  localparam int C  = ref_cols(CODE);
  localparam int W  = (CODE >= 6) ? 7 : ref_q(CODE) + 1;
  localparam int AW = $clog2(N);
  localparam int RW = $clog2(R);
  localparam int CW = $clog2(C);

  logic [RW-1:0] row;
  logic [W-1:0]  v;
  logic [CW-1:0] col  [W];
  logic [AW-1:0] root [W];
  logic [AW-1:0] init [W];

  top_matrix_rom #(.CODE(CODE), .N(N)) dut (
    .row, .slot_valid(v), .slot_col(col), .slot_root(root), .slot_init(init)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 20) $display("FAIL (code %0d): %s", CODE, what);
    end
  endtask

  initial begin
    int   deg [C];
    int_q lines [R];
    checks = 0;
    failures = 0;
    done = 1'b0;
    foreach (deg[c]) deg[c] = 0;
    for (int r = 0; r < R; r++) begin
      row = RW'(r);
      #1;
      lines[r] = ref_line(CODE, r);
      if (CODE == 7)
        check(lines[r].size() inside {4, 5}, $sformatf("reference row %0d has %0d blocks", r, lines[r].size()));
      else
        check(lines[r].size() == W, $sformatf("reference row %0d has %0d blocks", r, lines[r].size()));
      begin
        int i;
        i = 0;
        for (int w = 0; w < W; w++) begin
          int exp_col, exp_root;
          if (CODE == 7 && !v[w]) continue;
          check(v[w], $sformatf("row %0d slot %0d empty", r, w));
          exp_col = (i < lines[r].size()) ? lines[r][i] : -1;
          i++;
          exp_root = 1 + ((7 * exp_col + 11 * r) % (N - 1));
          check(int'(col[w]) == exp_col,
                $sformatf("row %0d slot %0d column %0d, expected %0d", r, w, col[w], exp_col));
          if (CODE == 7) check(int'(col[w]) / 7 == w, $sformatf("row %0d slot %0d holds column %0d", r, w, col[w]));
          check(int'(root[w]) == exp_root && int'(init[w]) == exp_root,
                $sformatf("row %0d slot %0d root %0d init %0d, expected %0d", r, w, root[w], init[w], exp_root));
          if (int'(col[w]) < C) deg[col[w]]++;
        end
        check(i == lines[r].size(), $sformatf("row %0d has %0d blocks, expected %0d", r, i, lines[r].size()));
      end
    end
    if (CODE >= 6) begin
      int hist [8];
      foreach (hist[d]) hist[d] = 0;
      foreach (deg[c]) begin
        check(deg[c] == ref_col_degree(CODE, c),
              $sformatf("column %0d has %0d blocks, expected %0d", c, deg[c], ref_col_degree(CODE, c)));
        if (deg[c] < 8) hist[deg[c]]++;
      end
      if (CODE == 7)
        check(hist[3] == 22 && hist[4] == 6 && hist[7] == 21,
              $sformatf("degree mix %0d/%0d/%0d of 3/4/7", hist[3], hist[4], hist[7]));
    end else
      foreach (deg[c]) check(deg[c] == W, $sformatf("column %0d has %0d blocks, expected %0d", c, deg[c], W));
    for (int a = 0; a < R; a++)
      for (int b = a + 1; b < R; b++) begin
        int shared;
        shared = 0;
        foreach (lines[a][i]) foreach (lines[b][l]) if (lines[a][i] == lines[b][l]) shared++;
        if (CODE >= 6) check(shared <= 1, $sformatf("rows %0d and %0d share %0d columns", a, b, shared));
        else           check(shared == 1, $sformatf("rows %0d and %0d share %0d columns", a, b, shared));
      end
    done = 1'b1;
  end

endmodule
