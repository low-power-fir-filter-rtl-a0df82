// approx5_fa_tb -- exhaustive check of the fifth approximate full adder.
//
// Applies all eight input combinations and compares sum and cout with the
// expected approximate values (Sum = B, Cout = A). It also counts how often
// the cell differs from an exact full adder and checks the expected totals
// of four Sum errors and two Cout errors.
module approx5_fa_tb;
  logic a, b, cin, sum, cout;
  int checks = 0, failures = 0;
  int sum_err = 0, cout_err = 0;

  approx5_fa dut (.a, .b, .cin, .sum, .cout);

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, cin} = 3'(v);
      #1;
      checks++;
      if (sum !== b || cout !== a) begin
        failures++;
        $display("FAIL abc=%03b sum=%b cout=%b", {a, b, cin}, sum, cout);
      end
      if (sum  != (a ^ b ^ cin)) sum_err++;
      if (cout != ((a & b) | (a & cin) | (b & cin))) cout_err++;
    end
    checks++;
    if (sum_err != 4 || cout_err != 2) begin
      failures++;
      $display("FAIL error counts sum=%0d cout=%0d", sum_err, cout_err);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
