// tb_column_memory: random writes and reads of one 41-bit column memory
// against an array model. Checks the one-cycle read latency, that the
// output holds while `re` is low, and that a write and a read of different
// addresses in the same cycle do not disturb each other.
module tb_column_memory;

  localparam int N  = 41;
  localparam int AW = $clog2(N);

  logic          clk = 1'b0;
  logic          we = 1'b0, re = 1'b0, wdata = 1'b0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  logic          rdata;

  column_memory dut (.clk, .we, .waddr, .wdata, .re, .raddr, .rdata);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  bit model [N];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    @(negedge clk);
    for (int a = 0; a < N; a++) begin
      we = 1'b1; waddr = AW'(a); wdata = 1'($urandom_range(0, 1));
      model[a] = wdata;
      @(negedge clk);
    end
    we = 1'b0;
    for (int t = 0; t < 2000; t++) begin
      int ra, wa;
      bit expect_v, hold_v;
      ra = $urandom_range(0, N - 1);
      wa = $urandom_range(0, N - 1);
      hold_v = rdata;
      re = 1'($urandom_range(0, 3) != 0);
      raddr = AW'(ra);
      we = (wa != ra) && ($urandom_range(0, 1) == 1);
      waddr = AW'(wa);
      wdata = 1'($urandom_range(0, 1));
      expect_v = re ? model[ra] : hold_v;
      if (we) model[wa] = wdata;
      @(negedge clk);
      check(rdata == expect_v, $sformatf("t=%0d addr %0d read %0b expected %0b", t, ra, rdata, expect_v));
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
