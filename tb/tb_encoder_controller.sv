// tb_encoder_controller: runs the sequencer at a small size (N = 5, R = 3,
// C = 4) for several frames with random input pauses and checks, cycle by
// cycle against a software model: memory write column and address for each
// accepted bit, in_ready low while encoding, one PRIME cycle loading row 0,
// exactly R*N consecutive check issues, generator loads of rows 1..R-1 on
// the last block row of the previous row and steps otherwise, and the
// first/last flags.
module tb_encoder_controller;

  localparam int N  = 5;
  localparam int R  = 3;
  localparam int C  = 4;
  localparam int AW = $clog2(N);
  localparam int RW = $clog2(R);
  localparam int CW = $clog2(C);

  logic          clk = 1'b0, rst_n = 1'b0;
  logic          in_valid = 1'b0;
  logic          in_ready, wr_en, gen_load, gen_step, rd_valid, rd_first, rd_last, busy;
  logic [CW-1:0] wr_col;
  logic [AW-1:0] wr_addr;
  logic [RW-1:0] ld_row;

  encoder_controller #(.N(N), .R(R), .C(C)) dut (
    .clk, .rst_n, .in_valid, .in_ready, .wr_en, .wr_col, .wr_addr,
    .gen_load, .gen_step, .ld_row, .rd_valid, .rd_first, .rd_last, .busy
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    int n_frames;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    n_frames = 0;
    for (int f = 0; f < 5; f++) begin
      // load phase
      for (int i = 0; i < C * N; i++) begin
        while ($urandom_range(0, 2) == 0) begin
          in_valid = 1'b0;
          #1;
          check(in_ready && !wr_en && !busy, $sformatf("frame %0d: idle load cycle", f));
          check(!rd_valid && !gen_load && !gen_step, "generator activity while loading");
          @(negedge clk);
        end
        in_valid = 1'b1;
        #1;
        check(in_ready && wr_en, $sformatf("frame %0d bit %0d not accepted", f, i));
        check(int'(wr_col) == i / N && int'(wr_addr) == i % N,
              $sformatf("frame %0d bit %0d written to column %0d address %0d", f, i, wr_col, wr_addr));
        @(negedge clk);
      end
      // keep offering data: must be refused while encoding
      in_valid = 1'b1;
      #1;
      check(!in_ready && !wr_en && busy, "prime cycle accepts input");
      check(gen_load && !gen_step && ld_row == '0 && !rd_valid, "prime cycle does not load row 0");
      @(negedge clk);
      for (int r = 0; r < R; r++)
        for (int k = 0; k < N; k++) begin
          #1;
          check(!in_ready && !wr_en, "input accepted while encoding");
          check(rd_valid, $sformatf("frame %0d row %0d k %0d: no check issued", f, r, k));
          check(rd_first == (r == 0 && k == 0), "rd_first wrong");
          check(rd_last == (r == R - 1 && k == N - 1), "rd_last wrong");
          if (k == N - 1 && r != R - 1)
            check(gen_load && !gen_step && int'(ld_row) == r + 1,
                  $sformatf("frame %0d row %0d: no reload of row %0d", f, r, r + 1));
          else
            check(gen_step && !gen_load, $sformatf("frame %0d row %0d k %0d: no step", f, r, k));
          @(negedge clk);
        end
      #1;
      check(in_ready && !rd_valid, "not back to loading after the last check");
      in_valid = 1'b0;
      n_frames++;
    end
    check(n_frames == 5, "frames");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
