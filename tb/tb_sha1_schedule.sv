// tb_sha1_schedule: loads random blocks and checks W_0..W_79, one per
// advance, against the reference expansion; also checks that the window
// holds still when neither load nor advance is given.
module tb_sha1_schedule;
  import sha1_ref_pkg::*;
  logic         clk = 0;
  logic         load = 0, advance = 0;
  logic [511:0] block;
  logic [31:0]  w;
  int checks = 0, failures = 0;

  sha1_schedule dut (.clk(clk), .load(load), .block(block), .advance(advance), .w(w));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 8; n++) begin
      for (int i = 0; i < 16; i++) block[32*i +: 32] = $urandom;
      @(negedge clk); load = 1;
      @(negedge clk); load = 0;
      for (int t = 0; t < 80; t++) begin
        checks++;
        if (w !== ref_w(block, t)) begin
          failures++;
          $display("FAIL block %0d t=%0d w=%h want %h", n, t, w, ref_w(block, t));
        end
        if (t == 40) begin
          advance = 0;
          @(negedge clk);
          checks++;
          if (w !== ref_w(block, t)) begin failures++; $display("FAIL hold"); end
        end
        advance = 1;
        @(negedge clk);
        advance = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
