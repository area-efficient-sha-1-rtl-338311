// tb_sha1_top: end-to-end test of the SHA-1 hasher at its only configuration.
// Hashes the standard vectors "", "abc" and the 448-bit two-block vector, then
// random messages of random bit lengths chosen to hit every case of the
// padding, all against the reference model. Input is offered with random
// gaps and held while in_ready is low. Counts how often each mechanism
// happened (one-block padding, padding spilling into a second block, an empty
// last chunk, chaining over several chunks, a new message right after another,
// back-pressure) and counts a failure for any that never did. Checks the
// digest_valid pulse timing: 82 cycles per block from accept.
module tb_sha1_top;
  import sha1_ref_pkg::*;
  logic         clk = 0, rst_n = 0;
  logic         in_valid = 0, in_ready, in_last = 0;
  logic [511:0] in_data = '0;
  logic [8:0]   in_nbits = '0;
  logic         digest_valid;
  logic [159:0] digest;
  int checks = 0, failures = 0;
  int n_onepad = 0, n_twopad = 0, n_empty_last = 0, n_multi = 0, n_backpressure = 0,
      n_messages = 0;

  sha1_top dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready),
                .in_data(in_data), .in_last(in_last), .in_nbits(in_nbits),
                .digest_valid(digest_valid), .digest(digest));

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Offer one chunk and wait until it is taken.
  task automatic send_chunk(bit [511:0] d, bit last, int nb);
    in_valid = 1; in_data = d; in_last = last; in_nbits = 9'(nb);
    @(posedge clk);
    if (!in_ready) n_backpressure++;
    while (!in_ready) @(posedge clk);
    @(negedge clk);
    in_valid = 0; in_data = '0; in_last = 0; in_nbits = '0;
  endtask

  task automatic hash(msg_q m, bit check_known = 0, bit [159:0] known = '0);
    int nfull = m.size() / 512;
    int rem   = m.size() % 512;
    int nblocks = nfull + ((rem >= 448) ? 2 : 1);
    int cycles = 0;
    bit [159:0] want = ref_sha1(m);
    bit [511:0] d;
    n_messages++;
    if (rem >= 448) n_twopad++; else n_onepad++;
    if (rem == 0) n_empty_last++;
    if (nfull > 0) n_multi++;
    fork
      begin
        for (int c = 0; c <= nfull; c++) begin
          int nb = (c < nfull) ? 512 : rem;
          d = '0;
          for (int i = 0; i < nb; i++) d[511 - i] = m[512*c + i];
          for (int i = nb; i < 512; i++) d[511 - i] = 1'($urandom);  // ignored bits
          repeat ($urandom % 3) @(negedge clk);
          send_chunk(d, c == nfull, (c == nfull) ? rem : 0);
        end
      end
      begin
        // cycles from the first accept to digest_valid
        while (!(in_valid && in_ready)) @(posedge clk);
        while (!digest_valid) begin @(posedge clk); cycles++; end
      end
    join
    checks++;
    if (digest !== want) begin
      failures++;
      $display("FAIL len=%0d digest %h want %h", m.size(), digest, want);
    end
    if (check_known) begin
      checks++;
      if (digest !== known) begin failures++; $display("FAIL known vector len=%0d", m.size()); end
    end
    checks++;
    if (cycles < 82 * nblocks - 1) begin
      failures++;
      $display("FAIL len=%0d digest after %0d cycles, below %0d", m.size(), cycles, 82 * nblocks - 1);
    end
    @(negedge clk);
    checks++;
    if (digest_valid) begin failures++; $display("FAIL digest_valid longer than one cycle"); end
  endtask

  initial begin
    automatic msg_q m;
    automatic int lens[$] = '{0, 1, 7, 447, 448, 511, 512, 513, 959, 960, 1023, 1024, 1471, 1536, 1600};
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    hash(from_string(""), 1, 160'hDA39A3EE_5E6B4B0D_3255BFEF_95601890_AFD80709);
    hash(from_string("abc"), 1, 160'hA9993E36_4706816A_BA3E2571_7850C26C_9CD0D89D);
    hash(from_string("abcdbcdecdefdefgefghfghighijhijkijkljklmklmnlmnomnopnopq"), 1,
         160'h84983E44_1C3BD26E_BAAE4AA1_F95129E5_E54670F1);
    foreach (lens[i]) begin
      m.delete();
      for (int j = 0; j < lens[i]; j++) m.push_back(1'($urandom));
      hash(m);
    end
    for (int n = 0; n < 10; n++) begin
      m.delete();
      for (int j = 0, l = $urandom % 2000; j < l; j++) m.push_back(1'($urandom));
      hash(m);
    end
    $display("messages=%0d one-block-pad=%0d two-block-pad=%0d empty-last=%0d multi-chunk=%0d backpressure=%0d",
             n_messages, n_onepad, n_twopad, n_empty_last, n_multi, n_backpressure);
    checks++; if (n_onepad == 0)       begin failures++; $display("FAIL never: one-block padding"); end
    checks++; if (n_twopad == 0)       begin failures++; $display("FAIL never: two-block padding"); end
    checks++; if (n_empty_last == 0)   begin failures++; $display("FAIL never: empty last chunk"); end
    checks++; if (n_multi == 0)        begin failures++; $display("FAIL never: multi-chunk chaining"); end
    checks++; if (n_backpressure == 0) begin failures++; $display("FAIL never: back-pressure"); end
    checks++; if (n_messages < 2)      begin failures++; $display("FAIL never: back-to-back messages"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
