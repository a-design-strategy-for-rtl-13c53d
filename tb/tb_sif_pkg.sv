// tb_sif_pkg: checks the Sign/Integer/Fraction format rules of sif_pkg on the
// formats of the pixel-correction data path and on a few general cases.
//   (4/12/0) x (1/2/13)              -> (5/14/13), 32 bits
//   (5/14/13) << 3, drop 16 bits     -> (2/14/0)
//   (2/14/0) + (11/5/0)              -> (1/15/0)
//   (1/15/0) >>> 3                   -> (4/12/0)
module tb_sif_pkg;
  import sif_pkg::*;

  int checks = 0, failures = 0;

  task automatic expect_fmt(input sif_fmt_t got, input int s, input int i, input int f,
                            input string what);
    checks++;
    if (got.s != s || got.i != i || got.f != f) begin
      failures++;
      $display("FAIL %s: got (%0d/%0d/%0d) expected (%0d/%0d/%0d)",
               what, got.s, got.i, got.f, s, i, f);
    end
  endtask

  initial begin
    sif_fmt_t x, a, b, ppf, p, ypf;
    x = sif(4, 12, 0);
    a = sif(1, 2, 13);
    b = sif(11, 5, 0);
    ppf = sif_mul(x, a);
    expect_fmt(ppf, 5, 14, 13, "raw product");
    checks++;
    if (sif_width(ppf) != 32) begin
      failures++;
      $display("FAIL raw product width %0d", sif_width(ppf));
    end
    p = sif_drop(sif_shl(ppf, 3), 16);
    expect_fmt(sif_shl(ppf, 3), 2, 14, 16, "product shifted left 3");
    expect_fmt(p, 2, 14, 0, "formatted product");
    ypf = sif_add(p, b);
    expect_fmt(ypf, 1, 15, 0, "sum");
    expect_fmt(sif_asr(ypf, 3), 4, 12, 0, "output");
    // general cases
    expect_fmt(sif_add(sif(3, 4, 9), sif(5, 2, 9)), 2, 5, 9, "add with unequal fields");
    expect_fmt(sif_mul(sif(2, 3, 3), sif(1, 0, 7)), 3, 3, 10, "pure-fraction multiply");
    expect_fmt(sif_drop(sif(1, 10, 5), 2), 1, 10, 3, "drop fraction bits only");
    expect_fmt(sif_asr(sif(2, 6, 8), 4), 6, 6, 4, "shift right into the fraction");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
