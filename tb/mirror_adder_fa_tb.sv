// mirror_adder_fa_tb -- exhaustive check of the exact mirror full adder.
//
// Applies all eight input combinations and compares {cout, sum} with the
// integer sum a + b + cin.
module mirror_adder_fa_tb;
  logic a, b, cin, sum, cout;
  int checks = 0, failures = 0;

  mirror_adder_fa dut (.a, .b, .cin, .sum, .cout);

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
      if ({cout, sum} !== 2'(int'(a) + int'(b) + int'(cin))) begin
        failures++;
        $display("FAIL abc=%03b sum=%b cout=%b", {a, b, cin}, sum, cout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
