// encoder_controller: frame sequencer of the eIRA encoder.
//
// A frame has K = C*N information bits and M = R*N parity bits. The
// controller works in three states:
//   LOAD  - accepts one information bit per in_valid&in_ready cycle and
//           writes it to column col_cnt at position pos_cnt (bit n goes to
//           column n / N, position n % N);
//   PRIME - one cycle: loads the slot generators of top-level row 0;
//   ENC   - issues one parity check per cycle: row `row` of the top matrix,
//           block row `k`. The generators step every cycle; on the last
//           block row of a top-level row they load the roots and init values
//           of the next top-level row instead, so there is no bubble between
//           top-level rows. After the last check it returns to LOAD, so the
//           next frame loads while the last checks drain.
// Outputs: memory write strobe and address, generator load/step and the
// top-level row whose table entries to load (`ld_row`), and the read issue
// strobe with first/last-of-frame flags. The state machine, the
// bubble-free reload and the overlap of loading with draining are this
// design's choices; the construction fixes only the order of the work.
module encoder_controller #(
  parameter int N  = 41,
  parameter int R  = 49,
  parameter int C  = 49,
  parameter int AW = (N > 1) ? $clog2(N) : 1,
  parameter int RW = (R > 1) ? $clog2(R) : 1,
  parameter int CW = (C > 1) ? $clog2(C) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // information bit input handshake
  input  logic          in_valid,
  output logic          in_ready,
  // column memory writes
  output logic          wr_en,
  output logic [CW-1:0] wr_col,
  output logic [AW-1:0] wr_addr,
  // generator control
  output logic          gen_load,
  output logic          gen_step,
  output logic [RW-1:0] ld_row,
  // parity check issue
  output logic          rd_valid,
  output logic          rd_first,
  output logic          rd_last,
  output logic          busy
);

  typedef enum logic [1:0] {
    S_LOAD  = 2'd0,
    S_PRIME = 2'd1,
    S_ENC   = 2'd2
  } state_e;

  state_e        state;
  logic [CW-1:0] col_cnt;
  logic [AW-1:0] pos_cnt;
  logic [RW-1:0] row;
  logic [AW-1:0] k;

  logic last_pos, last_col, last_k, last_row;

  assign last_pos = (pos_cnt == AW'(N - 1));
  assign last_col = (col_cnt == CW'(C - 1));
  assign last_k   = (k == AW'(N - 1));
  assign last_row = (row == RW'(R - 1));

  assign in_ready = (state == S_LOAD);
  assign wr_en    = in_valid && in_ready;
  assign wr_col   = col_cnt;
  assign wr_addr  = pos_cnt;
  assign busy     = (state != S_LOAD);

  assign rd_valid = (state == S_ENC);
  assign rd_first = (state == S_ENC) && (row == '0) && (k == '0);
  assign rd_last  = (state == S_ENC) && last_row && last_k;

  always_comb begin
    gen_load = 1'b0;
    gen_step = 1'b0;
    ld_row   = '0;
    if (state == S_PRIME) begin
      gen_load = 1'b1;
    end else if (state == S_ENC) begin
      if (last_k && !last_row) begin
        gen_load = 1'b1;
        ld_row   = row + RW'(1);
      end else begin
        gen_step = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_LOAD;
      col_cnt <= '0;
      pos_cnt <= '0;
      row     <= '0;
      k       <= '0;
    end else begin
      unique case (state)
        S_LOAD: begin
          if (wr_en) begin
            if (last_pos) begin
              pos_cnt <= '0;
              if (last_col) begin
                col_cnt <= '0;
                state   <= S_PRIME;
              end else begin
                col_cnt <= col_cnt + CW'(1);
              end
            end else begin
              pos_cnt <= pos_cnt + AW'(1);
            end
          end
        end
        S_PRIME: begin
          row   <= '0;
          k     <= '0;
          state <= S_ENC;
        end
        S_ENC: begin
          if (last_k) begin
            k <= '0;
            if (last_row) begin
              row   <= '0;
              state <= S_LOAD;
            end else begin
              row <= row + RW'(1);
            end
          end else begin
            k <= k + AW'(1);
          end
        end
        default: state <= S_LOAD;
      endcase
    end
  end

  // The generators are never loaded and stepped in the same cycle.
  always_comb begin
    a_load_xor_step: assert (!(gen_load && gen_step))
      else $error("encoder_controller: load and step together");
  end

endmodule
