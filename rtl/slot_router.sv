// slot_router: address network between the generator slots and the column
// memories.
//
// In a top-level row each slot w points at top-level column slot_col[w] and
// its generator gives the bit position slot_idx[w] inside that column. The
// router sends each slot's address to the memory of its column and raises
// that memory's read enable. Because the BIBD puts at most one block of a
// top-level row in any column, no two valid slots ever claim the same
// memory; if two did, the later slot would win. Purely combinational.
// The crossbar itself is this design's choice: the construction only says
// that the generators point at the systematic bits of each parity check.
module slot_router #(
  parameter int N  = 41,
  parameter int C  = 49,
  parameter int W  = 7,
  parameter int AW = (N > 1) ? $clog2(N) : 1,
  parameter int CW = (C > 1) ? $clog2(C) : 1
) (
  input  logic [W-1:0]  slot_valid,
  input  logic [CW-1:0] slot_col [W],
  input  logic [AW-1:0] slot_idx [W],
  output logic [C-1:0]  mem_en,
  output logic [AW-1:0] mem_addr [C]
);

  always_comb begin
    for (int c = 0; c < C; c++) begin
      mem_en[c]   = 1'b0;
      mem_addr[c] = '0;
      for (int w = 0; w < W; w++) begin
        if (slot_valid[w] && int'(slot_col[w]) == c) begin
          mem_en[c]   = 1'b1;
          mem_addr[c] = slot_idx[w];
        end
      end
    end
  end

endmodule
