// eira_encoder_bench: self-checking harness for one encoder configuration,
// used by tb_eira_codes to run several codes side by side. It instantiates
// the encoder with the given CODE and N, sends FRAMES random frames with
// random input pauses and back-pressure, compares every parity bit with
// eira_ref_pkg's encoder, evaluates every parity check on the codeword,
// checks the 4-cycle output latency and the consecutive output, checks that
// the bit-level H1 has no length-four cycle, and counts the mechanisms
// (pauses, back-pressure, top-level row reloads, cloned-block loads for the
// rate-0.75 code, loading during drain). It raises `done` when finished and
// reports its counts on `checks` and `failures`.
module eira_encoder_bench
  import eira_ref_pkg::*;
#(
  parameter int CODE   = 0,
  parameter int N      = 41,
  parameter int FRAMES = 3
) (
  output int checks,
  output int failures,
  output bit done
);

  initial begin
    checks = 0;
    failures = 0;
    done = 1'b0;
  end

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

  eira_encoder #(.CODE(CODE), .N(N)) dut (
    .clk, .rst_n, .in_valid, .in_ready, .in_bit,
    .out_valid, .out_bit, .out_last, .busy
  );

  always #5 clk = ~clk;

  // cycle number of the most recent rising edge (edges at 5, 15, 25, ...)
  function automatic longint cycle();
    return longint'($time / 10);
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 20) $display("FAIL (code %0d, N %0d): %s", CODE, N, what);
    end
  endtask

  // frames and their acceptance times
  bit     frame_bits [FRAMES][K];
  longint accept_done [FRAMES];

  // mechanism counters
  int n_pause = 0, n_backpressure = 0, n_reload = 0, n_clone_load = 0, n_overlap = 0;

  always @(posedge clk) if (rst_n) begin
    if (!in_valid && in_ready) n_pause++;
    if (in_valid && !in_ready) n_backpressure++;
    if (dut.gen_load && dut.ld_row != '0) n_reload++;
    if (in_valid && in_ready && out_valid) n_overlap++;
  end

  if (CODE == 2) begin : g_clone
    always @(posedge clk)
      if (rst_n && dut.gen_load && dut.rom_valid[3] && int'(dut.rom_init[3]) == int'(dut.ld_row) + 1)
        n_clone_load++;
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
        $display("code %0d frame %0d: %0d parity bits, %0d differ from reference, %0d checks unsatisfied",
                 CODE, f, M, bad_ref, bad_syn);
      end
    end
    check(!ref_has_4cycle(CODE, N), "bit-level H1 has a length-four cycle");
    $display("code %0d mechanisms: pauses=%0d backpressure=%0d row_reloads=%0d clone_loads=%0d overlap=%0d",
             CODE, n_pause, n_backpressure, n_reload, n_clone_load, n_overlap);
    check(n_pause > 0, "no input pause happened");
    check(n_backpressure > 0, "no back-pressure happened");
    check(n_reload == FRAMES * (R - 1), $sformatf("row reloads %0d, expected %0d", n_reload, FRAMES * (R - 1)));
    if (CODE == 2)
      check(n_clone_load == FRAMES * R, $sformatf("clone loads %0d, expected %0d", n_clone_load, FRAMES * R));
    check(n_overlap > 0, "no frame loaded while the previous one drained");
    done = 1'b1;
  end

endmodule
