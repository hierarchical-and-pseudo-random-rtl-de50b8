// tb_slot_router: random top-level rows (up to 7 slots on distinct columns
// out of 49, some slots empty) with random generator addresses. Checks that
// each memory is enabled exactly when a valid slot points at it and gets
// that slot's address, and that unused memories get address 0.
module tb_slot_router;

  localparam int N  = 41;
  localparam int C  = 49;
  localparam int W  = 7;
  localparam int AW = $clog2(N);
  localparam int CW = $clog2(C);

  logic [W-1:0]  slot_valid;
  logic [CW-1:0] slot_col [W];
  logic [AW-1:0] slot_idx [W];
  logic [C-1:0]  mem_en;
  logic [AW-1:0] mem_addr [C];

  slot_router dut (.slot_valid, .slot_col, .slot_idx, .mem_en, .mem_addr);

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    for (int t = 0; t < 3000; t++) begin
      int perm [C];
      int owner [C];
      for (int c = 0; c < C; c++) perm[c] = c;
      for (int c = C - 1; c > 0; c--) begin
        int j, tmp;
        j = $urandom_range(0, c);
        tmp = perm[c]; perm[c] = perm[j]; perm[j] = tmp;
      end
      for (int c = 0; c < C; c++) owner[c] = -1;
      for (int w = 0; w < W; w++) begin
        slot_valid[w] = 1'($urandom_range(0, 4) != 0);
        slot_col[w]   = CW'(perm[w]);
        slot_idx[w]   = AW'($urandom_range(0, N - 1));
        if (slot_valid[w]) owner[perm[w]] = w;
      end
      #1;
      for (int c = 0; c < C; c++) begin
        check(mem_en[c] == (owner[c] >= 0), $sformatf("t=%0d memory %0d enable %0b", t, c, mem_en[c]));
        if (owner[c] >= 0)
          check(mem_addr[c] == slot_idx[owner[c]],
                $sformatf("t=%0d memory %0d address %0d, expected %0d", t, c, mem_addr[c], slot_idx[owner[c]]));
        else
          check(mem_addr[c] == '0, $sformatf("t=%0d idle memory %0d address %0d", t, c, mem_addr[c]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
