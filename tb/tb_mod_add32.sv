// tb_mod_add32: checks the modulo 2^32 adder against 32-bit wrap-around
// addition on corner cases and random operands, and that wrap flags a carry.
module tb_mod_add32;
  logic [31:0] a, b, sum;
  logic        wrap;
  int checks = 0, failures = 0, wraps_seen = 0, nowraps_seen = 0;

  mod_add32 dut (.a(a), .b(b), .sum(sum), .wrap(wrap));

  task automatic check(logic [31:0] x, logic [31:0] y);
    logic [32:0] full;
    a = x; b = y; #1;
    full = {1'b0, x} + {1'b0, y};
    checks++;
    if (sum !== full[31:0] || wrap !== full[32]) begin
      failures++;
      $display("FAIL %h + %h: got %h wrap %b, want %h wrap %b", x, y, sum, wrap, full[31:0], full[32]);
    end
    if (full[32]) wraps_seen++; else nowraps_seen++;
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(0, 0);
    check(32'hFFFF_FFFF, 1);
    check(32'hFFFF_FFFF, 32'hFFFF_FFFF);
    check(32'h8000_0000, 32'h8000_0000);
    check(32'h7FFF_FFFF, 32'h8000_0000);
    check(32'h1234_5678, 32'h9ABC_DEF0);
    for (int i = 0; i < 2000; i++) check($urandom, $urandom);
    checks++;
    if (wraps_seen == 0 || nowraps_seen == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
