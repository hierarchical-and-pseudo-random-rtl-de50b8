// parity_accumulator: the H2 part of the eIRA encoder.
//
// H2 is the m x m dual-diagonal matrix (m-1 degree-2 columns, one degree-1
// column), so parity check j reads s_j + p_{j-1} + p_j = 0, i.e.
// p_0 = s_0 and p_j = p_{j-1} xor s_j: an accumulator. `s_first` marks the
// first check of a frame and restarts the chain from zero.
//
// Interface: input s_valid/s_bit/s_first/s_last, output p_valid/p_bit/
// p_last registered one cycle later; one parity bit per cycle with no
// stall. Reset clears the output valid and the running parity. The
// dual-diagonal H2 is the eIRA structure; the ordering of parity checks
// (top-level row, then block row) and the interface are this design's.
module parity_accumulator (
  input  logic clk,
  input  logic rst_n,
  input  logic s_valid,
  input  logic s_bit,
  input  logic s_first,
  input  logic s_last,
  output logic p_valid,
  output logic p_bit,
  output logic p_last
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p_valid <= 1'b0;
      p_bit   <= 1'b0;
      p_last  <= 1'b0;
    end else begin
      p_valid <= s_valid;
      p_last  <= s_valid && s_last;
      if (s_valid) p_bit <= (s_first ? 1'b0 : p_bit) ^ s_bit;
    end
  end

endmodule
