// tb_tbu: checks the trace-back unit with random decision words.
//
// For each frame of L random decision words the model starts in state 0 at
// the last step, outputs the state's newest bit and moves to predecessor
// {state[0], decision}. The unit must emit the same bits in forward order on
// L consecutive clocks, the last one 2L clocks after the clock that took
// dec_last, with `ready` low meanwhile. Run for the default L = 14 and for
// L = 5.
module tb_tbu;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
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

  logic       dv_a = 0, dl_a = 0, rdy_a, ov_a, ob_a, ol_a;
  logic [3:0] d_a = 0;
  logic       dv_b = 0, dl_b = 0, rdy_b, ov_b, ob_b, ol_b;
  logic [3:0] d_b = 0;

  tbu dut_a (.clk, .rst_n, .dec_valid(dv_a), .dec_last(dl_a), .dec(d_a), .ready(rdy_a),
             .out_valid(ov_a), .out_bit(ob_a), .out_last(ol_a));
  tbu #(.L(5)) dut_b (.clk, .rst_n, .dec_valid(dv_b), .dec_last(dl_b), .dec(d_b), .ready(rdy_b),
             .out_valid(ov_b), .out_bit(ob_b), .out_last(ol_b));

  // Run one frame on instance a (sel = 0) or b (sel = 1)
  task automatic frame(input bit sel, input int L);
    bit [3:0] dw [64];
    bit       exp_bits [64];
    int st, cyc, got;
    for (int t = 0; t < L; t++) dw[t] = 4'($urandom);
    st = 0;
    for (int t = L - 1; t >= 0; t--) begin
      exp_bits[t] = st[1];
      st = ((st & 1) << 1) | int'(dw[t][st]);
    end
    for (int t = 0; t < L; t++) begin
      while ($urandom % 4 == 0) @(negedge clk);
      if (sel) begin check(rdy_b, "ready while collecting"); dv_b = 1; dl_b = (t == L - 1); d_b = dw[t]; end
      else     begin check(rdy_a, "ready while collecting"); dv_a = 1; dl_a = (t == L - 1); d_a = dw[t]; end
      @(negedge clk);
      dv_a = 0; dl_a = 0; dv_b = 0; dl_b = 0;
    end
    cyc = 1; got = 0;
    while (got < L && cyc < 4 * L + 10) begin
      if (sel ? ov_b : ov_a) begin
        check((sel ? ob_b : ob_a) == exp_bits[got], $sformatf("bit %0d of %0d", got, L));
        check((sel ? ol_b : ol_a) == (got == L - 1), "out_last");
        if (got == L - 1) check(cyc == 2 * L, $sformatf("last bit after %0d clocks, exp %0d", cyc, 2 * L));
        got++;
      end else begin
        check(!(sel ? rdy_b : rdy_a), "ready low during trace-back");
      end
      @(negedge clk);
      cyc++;
    end
    check(got == L, "all bits emitted");
    check(sel ? rdy_b : rdy_a, "ready again after the frame");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 300; f++) begin
      frame(0, 14);
      frame(1, 5);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
