// tb_acs: checks the add-compare-select cell with rolling 5-bit metrics.
//
// Random true (unbounded) metrics within 15 of each other are reduced
// modulo 32 before they reach the cell; the cell must pick the smaller
// true sum (the first one on a tie) and output it modulo 32, including
// cases where the sums wrap past 31.
module tb_acs;
  logic [4:0] sm0, sm1, bm0, bm1, sm_new;
  logic dec;
  int checks = 0, failures = 0, wraps = 0;

  acs dut (.*);

  task automatic check(input bit c, input string w);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL: %s", w); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 20000; t++) begin
      int base, a, b, x, y, s0, s1, exp_sum;
      bit exp_dec;
      base = $urandom % 1000;
      a = base + ($urandom % 6);
      b = base + ($urandom % 6);
      x = $urandom % 3;
      y = $urandom % 3;
      if (t % 5 == 0) begin x = $urandom % 5; y = $urandom % 5; end
      s0 = a + x; s1 = b + y;
      exp_dec = (s1 < s0);
      exp_sum = exp_dec ? s1 : s0;
      sm0 = 5'(a); sm1 = 5'(b); bm0 = 5'(x); bm1 = 5'(y);
      #1;
      if (5'(a) + 5'(x) < 5'(a) || 5'(b) + 5'(y) < 5'(b)) wraps++;
      check(dec == exp_dec, $sformatf("dec %b exp %b (a %0d b %0d x %0d y %0d)", dec, exp_dec, a, b, x, y));
      check(sm_new == 5'(exp_sum), $sformatf("sum %0d exp %0d", sm_new, exp_sum % 32));
    end
    check(wraps > 0, "no wrapped sum exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
