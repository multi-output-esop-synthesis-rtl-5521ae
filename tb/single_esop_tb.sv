// single_esop_tb: single-output ESOP cascades at the sizes of the
// single-output benchmark functions: 9 inputs / 52 products (9sym and
// 9symml), 16 inputs / 13 products (t481) and 5 inputs / 5 products (xor5,
// here random products of that size). The products themselves are
// pseudo-random. Each size checks that the cascade has one gate per
// product, one garbage output fewer and one constant per gate, and that it
// computes the ESOP for every input vector.
module single_esop_tb;
  int checks = 0;
  int failures = 0;

  int  c9, f9, c16, f16, c5, f5;
  bit  d9, d16, d5;

  single_esop_chk #(.NV(9),  .NP(52), .SEED(9))   u_9sym (.checks(c9),  .failures(f9),  .done(d9));
  single_esop_chk #(.NV(16), .NP(13), .SEED(481)) u_t481 (.checks(c16), .failures(f16), .done(d16));
  single_esop_chk #(.NV(5),  .NP(5),  .SEED(5))   u_xor5 (.checks(c5),  .failures(f5),  .done(d5));

  initial begin
    #1ms;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (d9 && d16 && d5);
    checks = c9 + c16 + c5;
    failures = f9 + f16 + f5;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
