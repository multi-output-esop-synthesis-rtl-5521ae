// multi_esop_tb: multi-output ESOP cascades at the input, output and
// product counts of some small benchmark functions (adr2: 4/3/7, temp:
// 4/3/7, con1: 7/2/9, rd53: 5/3/15, squar5: 5/8/20). The products and
// which outputs use them are pseudo-random, since only the sizes are known;
// each cascade is checked for every input vector.
module multi_esop_tb;
  int checks = 0;
  int failures = 0;

  localparam int N = 5;
  int c [N];
  int f [N];
  bit d [N];

  multi_esop_chk #(.NV(4), .NOUT(3), .NPROD(7),  .SEED(2)) u_adr2   (.checks(c[0]), .failures(f[0]), .done(d[0]));
  multi_esop_chk #(.NV(4), .NOUT(3), .NPROD(7),  .SEED(7)) u_temp   (.checks(c[1]), .failures(f[1]), .done(d[1]));
  multi_esop_chk #(.NV(7), .NOUT(2), .NPROD(9),  .SEED(3)) u_con1   (.checks(c[2]), .failures(f[2]), .done(d[2]));
  multi_esop_chk #(.NV(5), .NOUT(3), .NPROD(15), .SEED(4)) u_rd53   (.checks(c[3]), .failures(f[3]), .done(d[3]));
  multi_esop_chk #(.NV(5), .NOUT(8), .NPROD(20), .SEED(5)) u_squar5 (.checks(c[4]), .failures(f[4]), .done(d[4]));

  initial begin
    #1ms;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (d[0] && d[1] && d[2] && d[3] && d[4]);
    for (int i = 0; i < N; i++) begin
      checks += c[i];
      failures += f[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
