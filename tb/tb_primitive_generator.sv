// tb_primitive_generator: checks the primitive generator at N = 41 against
// the closed form i_k = (i_0 + k*root) mod N for every root 1..N-1 and a
// spread of initial values, that each sequence visits all N addresses once
// in N steps (the block is a permutation), that `idx` holds when neither
// load nor step is given, and that load takes priority over step.
module tb_primitive_generator;

  localparam int N  = 41;
  localparam int AW = $clog2(N);

  logic          clk = 1'b0;
  logic          rst_n = 1'b0;
  logic          load = 1'b0, step = 1'b0;
  logic [AW-1:0] init = '0, root = '0;
  logic [AW-1:0] idx;

  primitive_generator dut (.clk, .rst_n, .load, .init, .root, .step, .idx);

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
    bit seen [N];
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    check(idx == '0, "reset value");
    for (int r = 1; r < N; r++) begin
      int i0;
      i0 = (r * 17 + 3) % N;
      @(negedge clk);
      load = 1'b1; step = 1'b1; init = AW'(i0); root = AW'(r);
      @(negedge clk);
      load = 1'b0; step = 1'b0;
      check(int'(idx) == i0, $sformatf("root %0d: load gives %0d, expected %0d", r, idx, i0));
      foreach (seen[a]) seen[a] = 1'b0;
      for (int k = 0; k < N; k++) begin
        check(int'(idx) == (i0 + k * r) % N,
              $sformatf("root %0d step %0d: %0d, expected %0d", r, k, idx, (i0 + k * r) % N));
        seen[idx] = 1'b1;
        step = 1'b1;
        // the root input must not matter after the load
        root = AW'($urandom_range(0, N - 1));
        @(negedge clk);
        step = 1'b0;
        if (k == 3) begin
          logic [AW-1:0] held;
          held = idx;
          @(negedge clk);
          check(idx == held, "idx changes without load or step");
        end
      end
      check(int'(idx) == i0, $sformatf("root %0d: sequence does not close after N steps", r));
      begin
        int cnt;
        cnt = 0;
        foreach (seen[a]) if (seen[a]) cnt++;
        check(cnt == N, $sformatf("root %0d visits %0d of %0d addresses", r, cnt, N));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
