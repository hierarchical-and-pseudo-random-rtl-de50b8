// tb_eira_encoder: end-to-end test of the encoder at its default size
// (irregular 49x49 top matrix with 4 or 5 blocks per row and columns of
// degree 3, 4 and 7, N = 41: 2009 information bits and 2009 parity bits
// per frame). A second encoder, the
// cloned rate-0.75 BIBD(7,3,1) code at N = 41 in eira_encoder_bench, runs
// alongside so that the cloned blocks (init_value = row number) are
// exercised too; its counts are added to this testbench's.
//
// Sends several random frames with random pauses on in_valid and keeps
// in_valid high while the encoder is busy, so the next frame waits on
// in_ready. Every parity bit is compared with eira_ref_pkg's encoder, and
// every parity check of H = [H1 | H2] is evaluated on the received codeword.
// Also checked: the parity bits leave on consecutive cycles, p[0] leaves
// 4 cycles after the last information bit is accepted, out_last marks
// p[M-1], and the bit-level H1 has no length-four cycle. Mechanisms counted
// (each must occur): input pauses, back-pressure, generator reload at a
// top-level row boundary, a top-level row loaded with empty slots (every
// row of the irregular code), a new frame loading while the previous one
// drains and, in the second encoder, loading of a cloned block with its row number
// as init_value.
module tb_eira_encoder;
  import eira_ref_pkg::*;

  localparam int CODE   = 7;
  localparam int N      = 41;
  localparam int FRAMES = 2;
  localparam int R      = ref_rows(CODE);
  localparam int C      = ref_cols(CODE);
  localparam int K      = C * N;
  localparam int M      = R * N;
  localparam int LAT    = 4;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic in_bit = 1'b0;
  logic in_ready, out_valid, out_bit, out_last, busy;

  eira_encoder dut (
    .clk, .rst_n, .in_valid, .in_ready, .in_bit,
    .out_valid, .out_bit, .out_last, .busy
  );

  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;
  // cycle number of the most recent rising edge (edges at 5, 15, 25, ...)
  function automatic longint cycle();
    return longint'($time / 10);
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 20) $display("FAIL: %s", what);
    end
  endtask

  // frames and their acceptance times
  bit     frame_bits [FRAMES][K];
  longint accept_done [FRAMES];

  // mechanism counters
  int n_pause = 0, n_backpressure = 0, n_reload = 0, n_overlap = 0, n_empty = 0;

  // the cloned rate-0.75 code
  int clone_checks, clone_failures;
  bit clone_done;
  eira_encoder_bench #(.CODE(2), .N(41), .FRAMES(2)) u_clone (
    .checks(clone_checks), .failures(clone_failures), .done(clone_done)
  );

  always @(posedge clk) if (rst_n) begin
    if (!in_valid && in_ready) n_pause++;
    if (in_valid && !in_ready) n_backpressure++;
    if (dut.gen_load && dut.ld_row != '0) n_reload++;
    if (dut.gen_load && !(&dut.rom_valid)) n_empty++;
    if (in_valid && in_ready && out_valid) n_overlap++;
  end

  // driver
  initial begin
    for (int f = 0; f < FRAMES; f++)
      for (int i = 0; i < K; i++)
        frame_bits[f][i] = (f == 0) ? 1'b1 : 1'($urandom_range(0, 1));
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    // inputs change on the falling edge and are taken on the rising edge
    for (int f = 0; f < FRAMES; f++) begin
      for (int i = 0; i < K; i++) begin
        while ($urandom_range(0, 15) == 0) begin
          in_valid = 1'b0;
          @(negedge clk);
        end
        in_valid = 1'b1;
        in_bit   = frame_bits[f][i];
        @(posedge clk);
        while (!in_ready) @(posedge clk);
        if (i == K - 1) accept_done[f] = cycle();
        @(negedge clk);
      end
    end
    in_valid = 1'b0;
  end

  // monitor and checker
  initial begin
    bit     p [M];
    longint t_first, t_prev;
    int_q   q;
    bit     syn;
    wait (rst_n);
    for (int f = 0; f < FRAMES; f++) begin
      for (int j = 0; j < M; j++) begin
        do @(posedge clk); while (!out_valid);
        p[j] = out_bit;
        if (j == 0) begin
          t_first = cycle();
          check(t_first - accept_done[f] == longint'(LAT),
                $sformatf("frame %0d: p[0] after %0d cycles, expected %0d",
                          f, t_first - accept_done[f], LAT));
        end else begin
          check(cycle() == t_prev + 1, $sformatf("frame %0d: gap before p[%0d]", f, j));
        end
        t_prev = cycle();
        check(out_last == (j == M - 1), $sformatf("frame %0d: out_last at p[%0d]", f, j));
      end
      // reference parity and parity checks
      begin
        bit acc;
        int bad_ref, bad_syn;
        acc = 1'b0;
        bad_ref = 0;
        bad_syn = 0;
        for (int j = 0; j < M; j++) begin
          q = ref_check(CODE, N, j);
          syn = 1'b0;
          foreach (q[i]) syn ^= frame_bits[f][q[i]];
          acc ^= syn;
          if (p[j] != acc) bad_ref++;
          syn ^= p[j] ^ ((j > 0) ? p[j-1] : 1'b0);
          if (syn) bad_syn++;
          check(p[j] == acc, $sformatf("frame %0d: p[%0d]=%0b, reference %0b", f, j, p[j], acc));
          check(syn == 1'b0, $sformatf("frame %0d: parity check %0d fails", f, j));
        end
        $display("frame %0d: %0d parity bits, %0d differ from reference, %0d checks unsatisfied",
                 f, M, bad_ref, bad_syn);
      end
    end
    check(!ref_has_4cycle(CODE, N), "bit-level H1 has a length-four cycle");
    $display("mechanisms: pauses=%0d backpressure=%0d row_reloads=%0d overlap=%0d rows_with_empty_slots=%0d",
             n_pause, n_backpressure, n_reload, n_overlap, n_empty);
    check(n_pause > 0, "no input pause happened");
    check(n_backpressure > 0, "no back-pressure happened");
    check(n_reload == FRAMES * (R - 1), $sformatf("row reloads %0d, expected %0d", n_reload, FRAMES * (R - 1)));
    check(n_overlap > 0, "no frame loaded while the previous one drained");
    check(n_empty == FRAMES * R, $sformatf("rows loaded with empty slots %0d, expected %0d", n_empty, FRAMES * R));
    wait (clone_done);
    checks += clone_checks;
    failures += clone_failures;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog
  initial begin
    repeat (FRAMES * (K + M) * 3 + 1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
