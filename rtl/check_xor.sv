// check_xor: one row of H1 applied to the information bits.
//
// Takes the bits just read from the C column memories and the mask of the
// memories that took part in the read (the blocks present in the current
// top-level row) and returns their XOR, s_j = (H1 u)_j for the parity check
// being processed. Purely combinational; the mask must be delayed to line
// up with the one-cycle memory read. The XOR is what H1 prescribes; its
// placement after the memories is this design's choice.
module check_xor #(
  parameter int C = 49
) (
  input  logic [C-1:0] bits,
  input  logic [C-1:0] mask,
  output logic         s
);

  assign s = ^(bits & mask);

endmodule
