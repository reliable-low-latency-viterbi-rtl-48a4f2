// tb_viterbi_decoder: checks the decoder core against the reference
// Viterbi decoder on frames of random data with a zero tail, encoded by the
// reference encoder and hit by random bit errors of varying density. The
// decoded bits, the noise count (accumulating across frames) and the
// latency (last bit 2L+2 clocks after the last symbol) must match. Symbols
// arrive with random gaps. Frames of the default L = 14 and of L = 40 run
// on two instances.
module tb_viterbi_decoder;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0, n_errors_fixed = 0;
  always #5 clk = ~clk;

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit c, input string w);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL: %s", w); end
  endtask

  logic init = 0, nclr = 0, sv = 0, sl = 0, r1 = 0, r0 = 0;
  logic rdy_a, ov_a, ob_a, ol_a, rdy_b, ov_b, ob_b, ol_b;
  logic [7:0] nc_a, nc_b;
  logic sel = 0;

  viterbi_decoder dut_a (.clk, .rst_n, .init(init && !sel), .noise_clear(nclr), .sym_valid(sv && !sel),
                         .sym_last(sl), .rx1(r1), .rx0(r0), .ready(rdy_a), .out_valid(ov_a),
                         .out_bit(ob_a), .out_last(ol_a), .noise_count(nc_a));
  viterbi_decoder #(.L(40)) dut_b (.clk, .rst_n, .init(init && sel), .noise_clear(nclr), .sym_valid(sv && sel),
                         .sym_last(sl), .rx1(r1), .rx0(r0), .ready(rdy_b), .out_valid(ov_b),
                         .out_bit(ob_b), .out_last(ol_b), .noise_count(nc_b));

  int base_a = 0, band_a = -1, noise_a = 0;
  int base_b = 0, band_b = -1, noise_b = 0;

  task automatic frame(input bit s, input int L, input int err_per_100);
    rbits_t b, dec;
    rsyms_t tx, rx;
    int noise, cyc, got, nerr;
    bit exact;
    for (int i = 0; i < RL; i++) b[i] = 0;
    for (int i = 0; i < L - 2; i++) b[i] = 1'($urandom);
    tx = ref_encode(b, L);
    rx = tx;
    nerr = 0;
    for (int i = 0; i < L; i++)
      for (int j = 0; j < 2; j++)
        if ($urandom % 100 < err_per_100) begin rx[i][j] = !rx[i][j]; nerr++; end
    if (s) begin ref_viterbi(rx, L, dec, noise, base_b, band_b); noise_b += noise; end
    else   begin ref_viterbi(rx, L, dec, noise, base_a, band_a); noise_a += noise; end
    sel = s;
    @(negedge clk); init = 1; @(negedge clk); init = 0;
    for (int i = 0; i < L; i++) begin
      while ($urandom % 4 == 0) @(negedge clk);
      check(s ? rdy_b : rdy_a, "ready while receiving");
      sv = 1; sl = (i == L - 1); r1 = rx[i][1]; r0 = rx[i][0];
      @(negedge clk);
      sv = 0; sl = 0;
    end
    cyc = 1; got = 0; exact = 1;
    while (got < L && cyc < 4 * L + 10) begin
      if (s ? ov_b : ov_a) begin
        check((s ? ob_b : ob_a) == dec[got], $sformatf("L=%0d bit %0d", L, got));
        if (dec[got] != b[got]) exact = 0;
        if (got == L - 1) begin
          check(s ? ol_b : ol_a, "out_last");
          check(cyc == 2 * L + 2, $sformatf("latency %0d exp %0d", cyc, 2 * L + 2));
        end
        got++;
      end
      @(negedge clk);
      cyc++;
    end
    check(got == L, "all bits out");
    if (s) check(int'(nc_b) == ((noise_b > 255) ? 255 : noise_b), $sformatf("noise b %0d exp %0d", nc_b, noise_b));
    else   check(int'(nc_a) == ((noise_a > 255) ? 255 : noise_a), $sformatf("noise a %0d exp %0d", nc_a, noise_a));
    if (exact && nerr > 0) n_errors_fixed++;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 400; f++) begin
      frame(0, 14, f % 12);
      frame(1, 40, f % 8);
      if (f % 100 == 99) begin
        @(negedge clk); nclr = 1; @(negedge clk); nclr = 0;
        noise_a = 0; noise_b = 0; band_a = -1; band_b = -1;
        check(nc_a == 0 && nc_b == 0, "noise_clear");
      end
    end
    check(n_errors_fixed > 0, "no channel error was corrected");
    $display("frames with corrected errors: %0d", n_errors_fixed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
