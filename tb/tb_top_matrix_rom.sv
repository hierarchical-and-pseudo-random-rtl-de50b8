// tb_top_matrix_rom: checks the pointer store of all three example codes
// (rate 1/2, 0.6 and 0.75, N = 41) against the top matrices written out
// independently in eira_ref_pkg: slot columns, roots (non-zero, below N),
// init values (root on the original blocks, row number on the cloned
// ones), that rows past the last read as empty, that every top-level column
// has the expected degree (3 for rate 1/2, 2 otherwise), and that two
// top-level rows share at most one column of the original BIBD (the
// lambda = 1 property that rules out length-four cycles). The larger codes,
// PG(2,3), PG(2,5), PG(2,7), the regular 49x49 code and the default
// irregular 49x49 code, are checked the same way by one plane_rom_checker
// each.
module tb_top_matrix_rom;
  import eira_ref_pkg::*;

  localparam int N = 41;

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 30) $display("FAIL: %s", what);
    end
  endtask

  // one ROM per example code
  logic [2:0] row0, row1, row2;
  logic [2:0] v0;
  logic [2:0] c0 [3];
  logic [5:0] rt0 [3], in0 [3];
  logic [2:0] v1;
  logic [2:0] c1 [3];
  logic [5:0] rt1 [3], in1 [3];
  logic [5:0] v2;
  logic [3:0] c2 [6];
  logic [5:0] rt2 [6], in2 [6];

  top_matrix_rom #(.CODE(0), .N(N)) u0 (.row(row0), .slot_valid(v0), .slot_col(c0), .slot_root(rt0), .slot_init(in0));
  top_matrix_rom #(.CODE(1), .N(N)) u1 (.row(row1[1:0]), .slot_valid(v1), .slot_col(c1), .slot_root(rt1), .slot_init(in1));
  top_matrix_rom #(.CODE(2), .N(N)) u2 (.row(row2[1:0]), .slot_valid(v2), .slot_col(c2), .slot_root(rt2), .slot_init(in2));

  int  pc_checks [5], pc_failures [5];
  bit  pc_done [5];
  plane_rom_checker #(.CODE(3), .N(N)) u_pg3 (.checks(pc_checks[0]), .failures(pc_failures[0]), .done(pc_done[0]));
  plane_rom_checker #(.CODE(4), .N(N)) u_pg5 (.checks(pc_checks[1]), .failures(pc_failures[1]), .done(pc_done[1]));
  plane_rom_checker #(.CODE(5), .N(N)) u_pg7 (.checks(pc_checks[2]), .failures(pc_failures[2]), .done(pc_done[2]));
  plane_rom_checker #(.CODE(6), .N(N)) u_ag7 (.checks(pc_checks[3]), .failures(pc_failures[3]), .done(pc_done[3]));
  plane_rom_checker u_irr (.checks(pc_checks[4]), .failures(pc_failures[4]), .done(pc_done[4]));

  // generic view of the ROM selected by `code`
  function automatic void read_slot(input int code, input int w, output bit v, output int c,
                                    output int rt, output int ini);
    case (code)
      0: begin v = v0[w]; c = int'(c0[w]); rt = int'(rt0[w]); ini = int'(in0[w]); end
      1: begin v = v1[w]; c = int'(c1[w]); rt = int'(rt1[w]); ini = int'(in1[w]); end
      default: begin v = v2[w]; c = int'(c2[w]); rt = int'(rt2[w]); ini = int'(in2[w]); end
    endcase
  endfunction

  initial begin
    for (int code = 0; code < 3; code++) begin
      int rows, cols, slots, base;
      int deg [12];
      int rowset [7][12];
      rows  = ref_rows(code);
      cols  = ref_cols(code);
      base  = ref_base_cols(code);
      slots = (code == 2) ? 6 : 3;
      foreach (deg[c]) deg[c] = 0;
      foreach (rowset[r, c]) rowset[r][c] = 0;
      for (int r = 0; r < rows; r++) begin
        int_q line;
        int w;
        line = ref_line(code, r);
        row0 = 3'(r); row1 = 3'(r); row2 = 3'(r);
        #1;
        w = 0;
        for (int cp = 0; cp < slots / 3; cp++) begin
          foreach (line[i]) begin
            bit v; int c, rt, ini, exp_root;
            read_slot(code, w, v, c, rt, ini);
            exp_root = 1 + ((7 * line[i] + 11 * r) % (N - 1));
            check(v, $sformatf("code %0d row %0d slot %0d not valid", code, r, w));
            check(c == line[i] + cp * base,
                  $sformatf("code %0d row %0d slot %0d column %0d, expected %0d", code, r, w, c, line[i] + cp * base));
            check(rt == exp_root && rt > 0 && rt < N,
                  $sformatf("code %0d row %0d slot %0d root %0d, expected %0d", code, r, w, rt, exp_root));
            check(ini == ((cp == 0) ? exp_root : r + 1),
                  $sformatf("code %0d row %0d slot %0d init %0d", code, r, w, ini));
            if (v && c < 12) begin
              deg[c]++;
              rowset[r][c] = 1;
            end
            w++;
          end
          w = 3 * (cp + 1);
        end
        for (int e = 0; e < slots; e++) begin
          bit v; int c, rt, ini;
          bit expected;
          read_slot(code, e, v, c, rt, ini);
          expected = (e % 3) < line.size();
          check(v == expected, $sformatf("code %0d row %0d slot %0d valid %0b", code, r, e, v));
        end
      end
      for (int c = 0; c < cols; c++)
        check(deg[c] == ((code == 0) ? 3 : 2), $sformatf("code %0d column %0d degree %0d", code, c, deg[c]));
      for (int a = 0; a < rows; a++)
        for (int b = a + 1; b < rows; b++) begin
          int shared;
          shared = 0;
          for (int c = 0; c < base; c++) if (rowset[a][c] != 0 && rowset[b][c] != 0) shared++;
          check(shared <= 1, $sformatf("code %0d rows %0d and %0d share %0d columns", code, a, b, shared));
        end
    end
    // rows past the last top-level row are empty
    row0 = 3'd7;
    #1;
    check(v0 == '0, "code 0: row 7 not empty");
    foreach (pc_done[i]) wait (pc_done[i]);
    foreach (pc_checks[i]) begin
      checks += pc_checks[i];
      failures += pc_failures[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
