// rev_inv_column_tb: exhaustive check of an inverter column of five lines
// with lines 1, 2 and 4 inverted, and of a column with no inverters.
module rev_inv_column_tb;
  int checks = 0;
  int failures = 0;

  logic [4:0] a, p, p_none;

  rev_inv_column #(.W(5), .INV(5'b10110)) dut (.a(a), .p(p));
  rev_inv_column #(.W(5), .INV(5'b00000)) dut_none (.a(a), .p(p_none));

  initial begin
    #100us;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      a = 5'(v);
      #1;
      for (int i = 0; i < 5; i++) begin
        checks++;
        if (p[i] !== ((i == 1 || i == 2 || i == 4) ? !a[i] : a[i])) begin
          failures++;
          $display("FAIL line %0d a=%b p=%b", i, a, p);
        end
      end
      checks++;
      if (p_none !== a) begin
        failures++;
        $display("FAIL empty column a=%b p=%b", a, p_none);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
