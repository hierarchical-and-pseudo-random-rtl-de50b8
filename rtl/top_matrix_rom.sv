// top_matrix_rom: the pointer store of the hierarchical matrix.
//
// For a top-level row `row` it returns, for every slot 0..W-1, whether the
// slot holds a permutation block, the top-level column of that block, and
// the root and init_value of its primitive generator. This is the only
// structure information the encoder stores: the positions of the ones inside
// each block come from the generators. The table is computed at elaboration
// from eira_pkg (the Fano-plane and projective-plane codes, by default
// the irregular 49x49 code with 4 or 5 blocks per row), so it maps to a
// small constant ROM; the read is combinational. Storing only the top
// matrix and the generator parameters follows the construction; the table
// layout (slots per top-level row) is this design's.
module top_matrix_rom
  import eira_pkg::*;
#(
  parameter int CODE = CODE_AG7_IRR,
  parameter int N    = 41,
  parameter int R    = code_rows(CODE),
  parameter int C    = code_cols(CODE),
  parameter int W    = code_slots(CODE),
  parameter int AW   = (N > 1) ? $clog2(N) : 1,
  parameter int RW   = (R > 1) ? $clog2(R) : 1,
  parameter int CW   = (C > 1) ? $clog2(C) : 1
) (
  input  logic [RW-1:0] row,
  output logic [W-1:0]  slot_valid,
  output logic [CW-1:0] slot_col  [W],
  output logic [AW-1:0] slot_root [W],
  output logic [AW-1:0] slot_init [W]
);

  typedef struct packed {
    logic          valid;
    logic [CW-1:0] col;
    logic [AW-1:0] root;
    logic [AW-1:0] init;
  } entry_t;

  function automatic entry_t make_entry(input int r, input int w);
    entry_t e;
    int c;
    c = code_col(CODE, r, w);
    e.valid = (c >= 0);
    e.col   = (c >= 0) ? CW'(c) : '0;
    e.root  = AW'(code_root(CODE, N, r, w));
    e.init  = AW'(code_init(CODE, N, r, w));
    return e;
  endfunction

  entry_t table_w [R][W];

  for (genvar r = 0; r < R; r++) begin : g_row
    for (genvar w = 0; w < W; w++) begin : g_slot
      localparam entry_t ENTRY = make_entry(r, w);
      assign table_w[r][w] = ENTRY;
    end
  end

  always_comb begin
    for (int w = 0; w < W; w++) begin
      if (int'(row) < R) begin
        slot_valid[w] = table_w[row][w].valid;
        slot_col[w]   = table_w[row][w].col;
        slot_root[w]  = table_w[row][w].root;
        slot_init[w]  = table_w[row][w].init;
      end else begin
        slot_valid[w] = 1'b0;
        slot_col[w]   = '0;
        slot_root[w]  = '0;
        slot_init[w]  = '0;
      end
    end
  end

endmodule
