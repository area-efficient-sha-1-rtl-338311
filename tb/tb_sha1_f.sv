// tb_sha1_f: checks f_t for every round number against the reference
// functions (choose, parity, majority) on random and fixed words.
module tb_sha1_f;
  import sha1_ref_pkg::*;
  logic [6:0]  t;
  logic [31:0] b, c, d, f;
  int checks = 0, failures = 0;

  sha1_f dut (.t(t), .b(b), .c(c), .d(d), .f(f));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 80; r++) begin
      for (int i = 0; i < 20; i++) begin
        t = 7'(r);
        if (i == 0) begin b = 32'hFF00_FF00; c = 32'hF0F0_F0F0; d = 32'hCCCC_CCCC; end
        else begin b = $urandom; c = $urandom; d = $urandom; end
        #1;
        checks++;
        if (f !== ref_f(r, b, c, d)) begin
          failures++;
          $display("FAIL t=%0d b=%h c=%h d=%h f=%h want %h", r, b, c, d, f, ref_f(r, b, c, d));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
