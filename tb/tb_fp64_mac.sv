// tb_fp64_mac: checks the double-precision multiply-add lane against the
// simulator's own real arithmetic (a*b rounded, then +c rounded) on directed
// cases (exact values, cancellation, signed zeros, overflow) and on random
// normal operands, including pairs of widely different magnitude.
module tb_fp64_mac;
  import morph_pkg::*;

  fp64_t a, b, c, y;
  int checks = 0, failures = 0;

  fp64_mac dut (.a, .b, .c, .y);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input real ra, input real rb, input real rc);
    real p, r;
    fp64_t exp_bits;
    a = $realtobits(ra); b = $realtobits(rb); c = $realtobits(rc);
    #1;
    p = ra * rb;
    r = p + rc;
    exp_bits = $realtobits(r);
    checks++;
    if (y !== exp_bits) begin
      failures++;
      if (failures < 10)
        $display("FAIL %h * %h + %h : got %h want %h", a, b, c, y, exp_bits);
    end
  endtask

  function automatic real rnd(input int emax);
    fp64_t bits;
    bits[63] = $urandom_range(0, 1);
    bits[62:52] = 11'(1023 - emax + $urandom_range(0, 2 * emax));
    bits[51:32] = 20'($urandom);
    bits[31:0] = $urandom;
    return $bitstoreal(bits);
  endfunction

  initial begin
    check(1.0, 2.0, 3.0);
    check(1.5, -2.0, 3.0);
    check(0.1, 0.2, 0.3);
    check(3.0, 1.0, -3.0);          // exact cancellation to +0
    check(0.0, 5.0, 7.25);
    check(-0.0, 1.0, 0.0);
    check(-0.0, 1.0, -0.0);
    check(1.0e200, 1.0e200, 1.0);    // overflow to infinity
    check(1.0, 1.0, -0.9999999999999999);
    check(1.0000000000000002, 1.0000000000000002, -1.0);
    for (int i = 0; i < 20000; i++) begin
      if (i % 3 == 0) check(rnd(20), rnd(20), rnd(60));
      else if (i % 3 == 1) check(rnd(4), rnd(4), -rnd(4));
      else check(rnd(100), rnd(100), rnd(100));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
