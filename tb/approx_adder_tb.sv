// approx_adder_tb -- random and corner-case check of the hybrid adder.
//
// Instantiates the default 37-bit adder with 8 approximate low bits, plus a
// 12-bit variant with no approximate bits (must be exact) and one whose bits
// are all approximate (must return b). Expected values come from the closed
// form of the approximation: the low K bits of the result are b's low bits,
// and the upper bits are a_hi + b_hi + a[K-1].
module approx_adder_tb;
  localparam int unsigned W = 37;
  localparam int unsigned K = 8;

  logic [W-1:0] a, b, s;
  logic [11:0]  a12, b12, s_exact, s_all;
  int checks = 0, failures = 0;
  int inexact = 0;

  approx_adder dut (.a(a), .b(b), .sum(s));
  approx_adder #(.W(12), .APPROX_LSBS(0))  u_exact (.a(a12), .b(b12), .sum(s_exact));
  approx_adder #(.W(12), .APPROX_LSBS(12)) u_all   (.a(a12), .b(b12), .sum(s_all));

  function automatic logic [W-1:0] model(logic [W-1:0] x, logic [W-1:0] y);
    logic [W-K-1:0] hi;
    hi = x[W-1:K] + y[W-1:K] + (W-K)'(x[K-1]);
    return {hi, y[K-1:0]};
  endfunction

  task automatic check_one(logic [W-1:0] x, logic [W-1:0] y);
    a = x; b = y;
    #1;
    checks++;
    if (s !== model(x, y)) begin
      failures++;
      $display("FAIL a=%h b=%h sum=%h expected=%h", x, y, s, model(x, y));
    end
    if (s != x + y) inexact++;
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check_one('0, '0);
    check_one('1, '1);
    check_one(W'(1) << (K-1), W'(1) << (K-1));   // carry made from a[K-1]
    check_one(W'(8'hFF), W'(1));                 // exact adder would carry
    check_one({W{1'b1}}, W'(1));
    for (int i = 0; i < 2000; i++)
      check_one({$urandom, $urandom}, {$urandom, $urandom});
    checks++;
    if (inexact == 0) begin
      failures++;
      $display("FAIL approximation never differed from exact addition");
    end
    for (int i = 0; i < 500; i++) begin
      a12 = 12'($urandom); b12 = 12'($urandom);
      #1;
      checks += 2;
      if (s_exact !== a12 + b12) begin
        failures++;
        $display("FAIL exact variant %h+%h=%h", a12, b12, s_exact);
      end
      if (s_all !== b12) begin
        failures++;
        $display("FAIL all-approx variant %h,%h -> %h", a12, b12, s_all);
      end
    end
    $display("inexact results: %0d of 2005", inexact);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
