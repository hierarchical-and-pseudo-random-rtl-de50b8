// eira_encoder: systematic encoder for hierarchical eIRA LDPC codes whose
// H1 part is a BIBD-placed grid of primitive-generator permutation blocks.
//
// Codeword = [u | p], u the K = C*N information bits, p the M = R*N parity
// bits with H1*u + H2*p = 0 and H2 dual-diagonal. The encoder keeps one
// column_memory per top-level column of H1. Each top-level row has W slots;
// slot w owns a primitive_generator that, loaded with the root and
// init_value of its block from top_matrix_rom, produces in turn the position
// of the information bit each parity check needs from that block. The
// slot_router sends the slot addresses to their columns' memories (no two
// slots of a row share a column, by the BIBD), check_xor folds the bits
// read into s_j, and parity_accumulator turns s_j into p_j = p_{j-1} ^ s_j.
//
// Interface: information bits enter serially, u[0] first, on in_valid/
// in_ready (in_ready is low while a frame is being encoded; in_valid may
// pause at any time). u[c*N + x] is bit x of top-level column c. Parity bits
// leave serially on out_valid/out_bit, p[0] first, out_last on p[M-1]; the
// output cannot be stalled. Timing: p[0] is registered on the third rising
// edge after the edge that accepts the last information bit, and the M
// parity bits follow on consecutive cycles (one per clock), so a frame
// takes K + M + 1 cycles of controller time; the next frame may start
// loading while the last two parity bits drain.
//
// Default configuration: CODE_AG7_IRR with N = 41, the 49x49 top matrix
// derived from PG(2,7) (see eira_pkg) with blocks removed to give columns
// of degree 3, 4 and 7, and the rate-1/2 frame of 2009 information and
// 2009 parity bits in 49 memories. The regular 49x49 code, the Fano-plane
// example codes, including the cloned rate-0.75 code, and PG(2,3/5/7) are
// selected with CODE. Rows with fewer blocks than W leave slots empty.
//
// The hierarchical matrix, the generators and the one-memory-per-column
// organisation follow the published construction; the serial interfaces,
// the one-check-per-clock schedule and the root rule (see eira_pkg) are
// this design's.
module eira_encoder
  import eira_pkg::*;
#(
  parameter int CODE = CODE_AG7_IRR,
  parameter int N    = 41
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  output logic in_ready,
  input  logic in_bit,
  output logic out_valid,
  output logic out_bit,
  output logic out_last,
  output logic busy
);

  localparam int R  = code_rows(CODE);
  localparam int C  = code_cols(CODE);
  localparam int W  = code_slots(CODE);
  localparam int AW = (N > 1) ? $clog2(N) : 1;
  localparam int RW = (R > 1) ? $clog2(R) : 1;
  localparam int CW = (C > 1) ? $clog2(C) : 1;

  // controller
  logic          wr_en;
  logic [CW-1:0] wr_col;
  logic [AW-1:0] wr_addr;
  logic          gen_load, gen_step;
  logic [RW-1:0] ld_row;
  logic          rd_valid, rd_first, rd_last;

  encoder_controller #(.N(N), .R(R), .C(C)) u_ctrl (
    .clk, .rst_n,
    .in_valid, .in_ready,
    .wr_en, .wr_col, .wr_addr,
    .gen_load, .gen_step, .ld_row,
    .rd_valid, .rd_first, .rd_last,
    .busy
  );

  // pointer store, read when the slots are loaded
  logic [W-1:0]  rom_valid;
  logic [CW-1:0] rom_col  [W];
  logic [AW-1:0] rom_root [W];
  logic [AW-1:0] rom_init [W];

  top_matrix_rom #(.CODE(CODE), .N(N)) u_rom (
    .row(ld_row),
    .slot_valid(rom_valid),
    .slot_col(rom_col),
    .slot_root(rom_root),
    .slot_init(rom_init)
  );

  // slots: column pointer register plus generator
  logic [W-1:0]  slot_valid;
  logic [CW-1:0] slot_col [W];
  logic [AW-1:0] slot_idx [W];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      slot_valid <= '0;
      for (int w = 0; w < W; w++) slot_col[w] <= '0;
    end else if (gen_load) begin
      slot_valid <= rom_valid;
      for (int w = 0; w < W; w++) slot_col[w] <= rom_col[w];
    end
  end

  for (genvar w = 0; w < W; w++) begin : g_slot
    primitive_generator #(.N(N)) u_gen (
      .clk, .rst_n,
      .load(gen_load),
      .init(rom_init[w]),
      .root(rom_root[w]),
      .step(gen_step),
      .idx(slot_idx[w])
    );
  end

  // address network
  logic [C-1:0]  mem_en;
  logic [AW-1:0] mem_addr [C];

  slot_router #(.N(N), .C(C), .W(W)) u_router (
    .slot_valid, .slot_col, .slot_idx,
    .mem_en, .mem_addr
  );

  // one memory per top-level column
  logic [C-1:0] mem_bits;

  for (genvar c = 0; c < C; c++) begin : g_col
    column_memory #(.N(N)) u_mem (
      .clk,
      .we(wr_en && (wr_col == CW'(c))),
      .waddr(wr_addr),
      .wdata(in_bit),
      .re(rd_valid && mem_en[c]),
      .raddr(mem_addr[c]),
      .rdata(mem_bits[c])
    );
  end

  // align the check's mask and flags with the memory read
  logic [C-1:0] mask_q;
  logic         s_valid, s_first, s_last;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mask_q  <= '0;
      s_valid <= 1'b0;
      s_first <= 1'b0;
      s_last  <= 1'b0;
    end else begin
      mask_q  <= rd_valid ? mem_en : '0;
      s_valid <= rd_valid;
      s_first <= rd_first;
      s_last  <= rd_last;
    end
  end

  logic s_bit;

  check_xor #(.C(C)) u_xor (
    .bits(mem_bits),
    .mask(mask_q),
    .s(s_bit)
  );

  parity_accumulator u_acc (
    .clk, .rst_n,
    .s_valid, .s_bit, .s_first, .s_last,
    .p_valid(out_valid),
    .p_bit(out_bit),
    .p_last(out_last)
  );

endmodule
