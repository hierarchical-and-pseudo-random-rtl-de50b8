// tb_eira_codes: runs the three example codes of the construction through
// the encoder, each in its own eira_encoder_bench: rate 1/2 (all seven
// lines of BIBD(7,3,1), N = 41: 287 information and 287 parity bits), rate
// 0.6 (four lines, column 7 removed, N = 41: 246 and 164 bits) and the
// cloned rate-0.75 code at a second block size, N = 13 (156 and 52 bits).
module tb_eira_codes;

  int  checks [3];
  int  failures [3];
  bit  done [3];

  eira_encoder_bench #(.CODE(0), .N(41), .FRAMES(3)) u_r050 (.checks(checks[0]), .failures(failures[0]), .done(done[0]));
  eira_encoder_bench #(.CODE(1), .N(41), .FRAMES(3)) u_r060 (.checks(checks[1]), .failures(failures[1]), .done(done[1]));
  eira_encoder_bench #(.CODE(2), .N(13), .FRAMES(3)) u_r075 (.checks(checks[2]), .failures(failures[2]), .done(done[2]));

  initial begin
    fork
      begin
        wait (done[0] && done[1] && done[2]);
        $display("TB_RESULT checks=%0d failures=%0d",
                 checks[0] + checks[1] + checks[2], failures[0] + failures[1] + failures[2]);
      end
      begin
        #200000;
        $display("FAIL: watchdog expired");
        $display("TB_RESULT checks=%0d failures=%0d",
                 checks[0] + checks[1] + checks[2], failures[0] + failures[1] + failures[2] + 1);
      end
    join_any
    $finish;
  end

endmodule
