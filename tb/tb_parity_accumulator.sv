// tb_parity_accumulator: random streams of check values s_j, with gaps in
// s_valid and a new frame started by s_first, against the recurrence
// p_0 = s_0, p_j = p_{j-1} xor s_j. Checks the one-cycle latency, p_valid,
// and that p_last follows s_last.
module tb_parity_accumulator;

  logic clk = 1'b0, rst_n = 1'b0;
  logic s_valid = 1'b0, s_bit = 1'b0, s_first = 1'b0, s_last = 1'b0;
  logic p_valid, p_bit, p_last;

  parity_accumulator dut (.clk, .rst_n, .s_valid, .s_bit, .s_first, .s_last, .p_valid, .p_bit, .p_last);

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
    bit model;
    int j;
    model = 1'b0;
    j = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    check(!p_valid && !p_last, "outputs idle after reset");
    for (int t = 0; t < 3000; t++) begin
      s_valid = 1'($urandom_range(0, 3) != 0);
      s_bit   = 1'($urandom_range(0, 1));
      s_first = s_valid && (j == 0);
      s_last  = s_valid && (j == 9);
      if (s_valid) begin
        model = (s_first ? 1'b0 : model) ^ s_bit;
        j = (j == 9) ? 0 : j + 1;
      end
      @(negedge clk);
      check(p_valid == s_valid, $sformatf("t=%0d p_valid %0b", t, p_valid));
      check(p_last == s_last, $sformatf("t=%0d p_last %0b", t, p_last));
      if (s_valid) check(p_bit == model, $sformatf("t=%0d p %0b expected %0b", t, p_bit, model));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
