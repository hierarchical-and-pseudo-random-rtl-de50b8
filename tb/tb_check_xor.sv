// tb_check_xor: random bit and mask vectors for a 49-memory check_xor,
// compared with a bit-by-bit parity count.
module tb_check_xor;

  localparam int C = 49;

  logic [C-1:0] bits, mask;
  logic         s;

  check_xor dut (.bits, .mask, .s);

  int checks = 0, failures = 0;

  initial begin
    for (int t = 0; t < 5000; t++) begin
      int ones;
      bits = C'({$urandom, $urandom});
      mask = C'({$urandom, $urandom});
      #1;
      ones = 0;
      for (int c = 0; c < C; c++) if (bits[c] && mask[c]) ones++;
      checks++;
      if (s != 1'(ones % 2)) begin
        failures++;
        if (failures <= 20) $display("FAIL: bits %b mask %b gives %b", bits, mask, s);
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
