// tb_noise_monitor: drives a rolling 5-bit metric that grows by random
// steps (with occasional small drops) and checks the count against a model
// that tracks the true, unbounded metric and counts each upward pass
// through a multiple of 8. Also checks `clear` and saturation of a narrow
// (3-bit) counter.
module tb_noise_monitor;
  logic clk = 0, rst_n = 0, clear = 0, sm_valid = 0;
  logic [4:0] sm = 0;
  logic [7:0] count;
  logic [2:0] count3;
  int checks = 0, failures = 0;

  noise_monitor dut (.*);
  noise_monitor #(.CNT_W(3)) dut3 (.clk, .rst_n, .clear, .sm_valid, .sm, .count(count3));
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit c, input string w);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL: %s", w); end
  endtask

  initial begin
    int m, prev, exp_cnt, steps;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int trial = 0; trial < 20; trial++) begin
      @(negedge clk); clear = 1; @(negedge clk); clear = 0;
      check(count == 0 && count3 == 0, "clear");
      m = 40 + ($urandom % 32);
      prev = -1;
      exp_cnt = 0;
      steps = 50 + ($urandom % 200);
      for (int t = 0; t < steps; t++) begin
        if (prev >= 0) begin
          if ($urandom % 6 == 0) m = m - ($urandom % 2);   // state metric may drop slightly
          else m = m + ($urandom % 3);
        end
        if (prev >= 0 && (m / 8) == (prev / 8) + 1) exp_cnt++;
        prev = m;
        sm = 5'(m); sm_valid = 1;
        @(negedge clk);
        sm_valid = 0;
        if ($urandom % 2) @(negedge clk);
        check(int'(count) == exp_cnt, $sformatf("count %0d exp %0d", count, exp_cnt));
        check(int'(count3) == ((exp_cnt > 7) ? 7 : exp_cnt), "saturating count");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
