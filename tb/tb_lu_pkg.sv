// Testbench of the shared package: the fixed-point product fx_mul against
// real arithmetic (floor of a*b/2^FRAC, wrapped to 16 bits) on corner values
// and random operands, and the derived constants and token widths that the
// rest of the design relies on.
module tb_lu_pkg;
  import lu_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  function automatic word_t expect_mul(word_t a, word_t b);
    real    p;
    longint q;
    p = $floor(real'(a) * real'(b) / real'(1 << FRAC));
    q = longint'(p);
    return word_t'(q & 64'hFFFF);
  endfunction

  task automatic check_mul(word_t a, word_t b);
    word_t got, exp;
    got = fx_mul(a, b);
    exp = expect_mul(a, b);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("fx_mul(%0d, %0d) = %0d, expected %0d", a, b, got, exp);
    end
  endtask

  task automatic check_eq(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%s = %0d, expected %0d", what, got, exp);
    end
  endtask

  initial begin
    word_t corner [8] = '{16'sh0000, 16'sh0001, 16'shFFFF, 16'sh0100, 16'shFF00,
                          16'sh7FFF, 16'sh8000, 16'sh0080};
    foreach (corner[i]) foreach (corner[j]) check_mul(corner[i], corner[j]);
    repeat (20000) check_mul(word_t'($urandom), word_t'($urandom));
    // small operands, where no wrap-around happens
    repeat (5000) check_mul(word_t'($urandom_range(4095)) - 16'sd2048,
                            word_t'($urandom_range(4095)) - 16'sd2048);

    check_eq("NORM_SHIFT", NORM_SHIFT, 13);
    check_eq("RECIP_DEPTH", RECIP_DEPTH, 1 << RECIP_AW);
    check_eq("bits of lu_tok_t", $bits(lu_tok_t), 1 + 2 + 2 * IW + W);
    check_eq("max matrix size", 1 << IW, 1024);
    check_eq("address space", longint'(1) << AW, 1024 * 1024);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
