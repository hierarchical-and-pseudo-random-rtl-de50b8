// tb_plane_codes: the larger rate-1/2 codes built on projective planes,
// each run through the encoder with random frames (eira_encoder_bench):
//   PG(2,3), N = 13:  169 information and 169 parity bits, 4 blocks per row
//   PG(2,5), N = 11:  341 and 341 bits, 6 blocks per row
//   PG(2,7), N = 41: 2337 and 2337 bits, 8 blocks per row
//   49x49,   N = 41: 2009 and 2009 bits, 7 blocks per row and column - the
//                    regular version of the default (4018, 2009) code
module tb_plane_codes;

  localparam int NB = 4;

  int checks [NB];
  int failures [NB];
  bit done [NB];


  eira_encoder_bench #(.CODE(3), .N(13), .FRAMES(3)) u_enc_pg3 (.checks(checks[0]), .failures(failures[0]), .done(done[0]));
  eira_encoder_bench #(.CODE(4), .N(11), .FRAMES(3)) u_enc_pg5 (.checks(checks[1]), .failures(failures[1]), .done(done[1]));
  eira_encoder_bench #(.CODE(5), .N(41), .FRAMES(2)) u_enc_pg7 (.checks(checks[2]), .failures(failures[2]), .done(done[2]));
  eira_encoder_bench #(.CODE(6), .N(41), .FRAMES(2)) u_enc_ag7 (.checks(checks[3]), .failures(failures[3]), .done(done[3]));

  function automatic int total(input int v [NB]);
    int t;
    t = 0;
    foreach (v[i]) t += v[i];
    return t;
  endfunction

  initial begin
    fork
      begin
        foreach (done[i]) wait (done[i]);
        $display("TB_RESULT checks=%0d failures=%0d", total(checks), total(failures));
      end
      begin
        #1000000;
        $display("FAIL: watchdog expired");
        $display("TB_RESULT checks=%0d failures=%0d", total(checks), total(failures) + 1);
      end
    join_any
    $finish;
  end

endmodule
