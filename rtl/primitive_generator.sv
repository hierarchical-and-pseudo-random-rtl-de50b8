// primitive_generator: pseudo-random address generator of one permutation
// block, i_{k+1} = (i_k + root) mod N.
//
// With N prime every root in 1..N-1 visits all N addresses once in N steps,
// so the sequence defines the permutation matrix of the block: row k of the
// block has its one in column i_k. No pointer per one is stored; only the
// root and the initial value.
//
// Interface: `load` copies `init` (i_0) and `root` into the generator;
// `step` advances to the next address; `idx` is the current address,
// registered, valid from the cycle after a load or step. `load` wins over
// `step`. The recurrence and the choice of a prime N follow the code
// construction; the load/step interface, the reset and the adder structure
// are this design's. The modular add uses one adder and one compare-and-subtract, which
// is exact because both operands are below N. Reset clears the state to 0.
module primitive_generator #(
  parameter int N  = 41,
  parameter int AW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load,
  input  logic [AW-1:0] init,
  input  logic [AW-1:0] root,
  input  logic          step,
  output logic [AW-1:0] idx
);

  logic [AW-1:0] root_q;
  logic [AW:0]   sum;
  logic [AW-1:0] next_idx;

  always_comb begin
    sum = {1'b0, idx} + {1'b0, root_q};
    if (sum >= (AW+1)'(N)) next_idx = AW'(sum - (AW+1)'(N));
    else                   next_idx = sum[AW-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx    <= '0;
      root_q <= '0;
    end else if (load) begin
      idx    <= init;
      root_q <= root;
    end else if (step) begin
      idx    <= next_idx;
    end
  end

endmodule
