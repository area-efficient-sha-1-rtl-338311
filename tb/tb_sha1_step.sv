// tb_sha1_step: checks one round against the reference round function for
// random states and words in every round range, and all 80 rounds of the
// "abc" block chained, against the standard's published intermediate value
// of A after round 79 (0x42541b35).
module tb_sha1_step;
  import sha1_pkg::*;
  import sha1_ref_pkg::*;
  logic [6:0] t;
  state_t     s_in, s_out;
  word_t      w;
  logic [3:0] wraps;
  int checks = 0, failures = 0;

  sha1_step dut (.t(t), .s_in(s_in), .w(w), .s_out(s_out), .wraps(wraps));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit [159:0] want, st;
    bit [511:0] blk;
    for (int i = 0; i < 800; i++) begin
      t    = 7'(i % 80);
      s_in = {$urandom, $urandom, $urandom, $urandom, $urandom};
      w    = $urandom;
      #1;
      want = ref_round(s_in, w, i % 80);
      checks++;
      if (s_out !== want) begin
        failures++;
        $display("FAIL t=%0d got %h want %h", i % 80, s_out, want);
      end
    end
    // "abc" block, chained through the DUT.
    blk = {32'h61626380, 416'b0, 64'd24};
    st  = 160'h67452301_EFCDAB89_98BADCFE_10325476_C3D2E1F0;
    for (int r = 0; r < 80; r++) begin
      t = 7'(r); s_in = st; w = ref_w(blk, r); #1;
      st = s_out;
    end
    checks++;
    if (st[159:128] !== 32'h42541B35) begin
      failures++;
      $display("FAIL abc round 79 A=%h", st[159:128]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
