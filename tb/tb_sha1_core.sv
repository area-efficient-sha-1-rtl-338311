// tb_sha1_core: drives padded blocks into the compression engine and checks
// the digest after each block: the one-block "abc" vector, the two-block
// 448-bit vector (chaining through H0..H4), and random blocks and chains
// against the reference compression. Checks the latency of 81 cycles from the
// accepting edge to done, that done lasts one cycle, that ready returns with
// done, and that modulo reductions occurred.
module tb_sha1_core;
  import sha1_ref_pkg::*;
  logic         clk = 0, rst_n = 0;
  logic         init = 0, start = 0;
  logic [511:0] block;
  logic         ready, done;
  logic [159:0] digest;
  logic [15:0]  wrap_count;
  int checks = 0, failures = 0, wrap_total = 0;
  bit [159:0] h_ref;

  sha1_core dut (.clk(clk), .rst_n(rst_n), .init(init), .start(start), .block(block),
                 .ready(ready), .done(done), .digest(digest), .wrap_count(wrap_count));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_block(bit [511:0] blk, bit first);
    int cycles = 0;
    while (!ready) @(negedge clk);
    block = blk; init = first; start = 1;
    @(negedge clk);
    start = 0; init = 0; block = '0;
    cycles = 1;  // the accepting edge is cycle 0; this negedge follows it
    while (!done) begin @(negedge clk); cycles++; end
    cycles--;  // done is seen on the negedge after edge 81
    h_ref = ref_compress(first ? 160'h67452301_EFCDAB89_98BADCFE_10325476_C3D2E1F0 : h_ref, blk);
    checks++;
    if (cycles != 81) begin failures++; $display("FAIL latency %0d cycles", cycles); end
    checks++;
    if (!ready) begin failures++; $display("FAIL ready low at done"); end
    checks++;
    if (digest !== h_ref) begin failures++; $display("FAIL digest %h want %h", digest, h_ref); end
    wrap_total += int'(wrap_count);
    @(negedge clk);
    checks++;
    if (done) begin failures++; $display("FAIL done longer than one cycle"); end
  endtask

  initial begin
    bit [511:0] b;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++;
    if (digest !== 160'h67452301_EFCDAB89_98BADCFE_10325476_C3D2E1F0 || !ready) begin
      failures++; $display("FAIL reset state");
    end
    // "abc"
    run_block({32'h61626380, 416'b0, 64'd24}, 1);
    checks++;
    if (digest !== 160'hA9993E36_4706816A_BA3E2571_7850C26C_9CD0D89D) begin
      failures++; $display("FAIL abc digest %h", digest);
    end
    // "abcdbcdecdefdefgefghfghighijhijkijkljklmklmnlmnomnopnopq" (448 bits, two blocks)
    b = '0;
    for (int i = 0; i < 14; i++)
      for (int j = 0; j < 4; j++) b[511 - 32*i - 8*j -: 8] = 8'h61 + 8'(i + j);
    b[63] = 1'b1;  // the appended 1 bit
    run_block(b, 1);
    run_block({448'b0, 64'd448}, 0);
    checks++;
    if (digest !== 160'h84983E44_1C3BD26E_BAAE4AA1_F95129E5_E54670F1) begin
      failures++; $display("FAIL 448-bit digest %h", digest);
    end
    // random chains
    for (int n = 0; n < 12; n++) begin
      for (int i = 0; i < 16; i++) b[32*i +: 32] = $urandom;
      run_block(b, (n % 4) == 0);
    end
    checks++;
    if (wrap_total == 0) begin failures++; $display("FAIL no modulo reduction seen"); end
    $display("modulo reductions seen: %0d", wrap_total);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
