// tb_pmu: checks the path metric unit against an integer model.
//
// Random hard-decision branch metrics (from random received symbols) drive
// the unit for long runs, so the 5-bit metrics wrap many times. The model
// keeps unbounded metrics, adds each branch's Hamming distance, keeps the
// smaller candidate (predecessor {n, 0} on a tie) and must match every
// state metric modulo 32 and every decision bit. `init` must keep state 0's
// metric and put the other states 6 above it.
module tb_pmu;
  logic clk = 0, rst_n = 0, init = 0, bm_valid = 0;
  logic [3:0][4:0] bm = '0;
  logic dec_valid;
  logic [3:0] dec;
  logic [3:0][4:0] sm;
  int checks = 0, failures = 0, wraps = 0;

  pmu dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit c, input string w);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL: %s", w); end
  endtask

  initial begin
    int pm[4], nm[4];
    bit ed[4];
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 4; k++) pm[k] = 0;
    for (int run = 0; run < 40; run++) begin
      @(negedge clk); init = 1; bm_valid = 1'($urandom);
      @(negedge clk); init = 0; bm_valid = 0;
      for (int k = 1; k < 4; k++) pm[k] = pm[0] + 6;
      check(!dec_valid, "no decisions after init");
      for (int k = 0; k < 4; k++) check(sm[k] == 5'(pm[k]), $sformatf("init metric %0d: %0d exp %0d", k, sm[k], pm[k] % 32));
      for (int t = 0; t < 100; t++) begin
        bit r1, r0;
        r1 = 1'($urandom); r0 = 1'($urandom);
        for (int i = 0; i < 4; i++) bm[i] = 5'(int'(r1 != i[1]) + int'(r0 != i[0]));
        for (int ns = 0; ns < 4; ns++) begin
          int best;
          best = -1;
          for (int x = 0; x < 2; x++) begin
            int ps, b, e1, e0, m;
            ps = ((ns & 1) << 1) | x;
            b  = ns >> 1;
            e1 = b ^ (ps >> 1) ^ (ps & 1);
            e0 = b ^ (ps & 1);
            m  = pm[ps] + int'(bm[e1 * 2 + e0]);
            if (best < 0 || m < best) begin best = m; ed[ns] = x[0]; end
          end
          nm[ns] = best;
        end
        for (int k = 0; k < 4; k++) if ((nm[k] % 32) < (pm[k] % 32)) wraps++;
        pm = nm;
        bm_valid = 1;
        @(negedge clk);
        bm_valid = 0;
        check(dec_valid, "dec_valid one clock after bm_valid");
        for (int k = 0; k < 4; k++) begin
          check(sm[k] == 5'(pm[k]), $sformatf("metric %0d: %0d exp %0d", k, sm[k], pm[k] % 32));
          check(dec[k] == ed[k], $sformatf("decision %0d", k));
        end
        if ($urandom % 4 == 0) begin
          @(negedge clk);
          check(!dec_valid, "dec_valid without bm_valid");
        end
      end
    end
    check(wraps > 0, "metrics never wrapped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
