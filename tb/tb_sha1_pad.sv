// tb_sha1_pad: pads random last chunks of every length 0..511 with random
// garbage below the valid bits, and compares with the reference padding.
module tb_sha1_pad;
  import sha1_ref_pkg::*;
  logic [511:0] msg, blk0, blk1;
  logic [8:0]   nbits;
  logic [63:0]  total_len;
  logic         two_blocks;
  int checks = 0, failures = 0, seen_two = 0;

  sha1_pad dut (.msg(msg), .nbits(nbits), .total_len(total_len),
                .blk0(blk0), .blk1(blk1), .two_blocks(two_blocks));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 512; n++) begin
      automatic msg_q m, p;
      automatic bit [511:0] w0, w1;
      automatic int prefix = 512 * ($urandom % 3);
      for (int i = 0; i < 16; i++) msg[32*i +: 32] = $urandom;
      // message = prefix of random bits (not part of this chunk) + n bits of msg
      for (int i = 0; i < prefix; i++) m.push_back(1'($urandom));
      for (int i = 0; i < n; i++) m.push_back(msg[511 - i]);
      p = ref_pad(m);
      nbits = 9'(n); total_len = 64'(m.size());
      #1;
      w0 = '0; w1 = '0;
      for (int i = 0; i < 512; i++) w0[511 - i] = p[prefix + i];
      checks++;
      if (two_blocks !== (p.size() - prefix == 1024)) begin
        failures++; $display("FAIL n=%0d two_blocks=%b", n, two_blocks);
      end
      checks++;
      if (blk0 !== w0) begin failures++; $display("FAIL n=%0d blk0 %h\n want %h", n, blk0, w0); end
      if (p.size() - prefix == 1024) begin
        seen_two++;
        for (int i = 0; i < 512; i++) w1[511 - i] = p[prefix + 512 + i];
        checks++;
        if (blk1 !== w1) begin failures++; $display("FAIL n=%0d blk1", n); end
      end
    end
    checks++;
    if (seen_two != 64) begin failures++; $display("FAIL two-block cases %0d", seen_two); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
