// tb_sha1_k: checks K_t for every round number 0..79.
module tb_sha1_k;
  logic [6:0]  t;
  logic [31:0] k, want;
  int checks = 0, failures = 0;

  sha1_k dut (.t(t), .k(k));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 80; r++) begin
      t = 7'(r); #1;
      want = (r < 20) ? 32'h5A827999 : (r < 40) ? 32'h6ED9EBA1 :
             (r < 60) ? 32'h8F1BBCDC : 32'hCA62C1D6;
      checks++;
      if (k !== want) begin
        failures++;
        $display("FAIL t=%0d k=%h want %h", r, k, want);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
