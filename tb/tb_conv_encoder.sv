// tb_conv_encoder: checks the rate-1/2 encoder against the reference (7,5)
// encoder for random bit streams with random gaps between valid bits, the
// one-clock latency, and `clear` returning the encoder to state 0.
module tb_conv_encoder;
  import tb_ref_pkg::*;
  import viterbi_pkg::sym_t;

  logic clk = 0, rst_n = 0, clear = 0, in_valid = 0, in_bit = 0;
  logic out_valid;
  sym_t out_sym;
  int checks = 0, failures = 0;

  conv_encoder dut (.*);
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
    rbits_t b;
    rsyms_t s;
    int n;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int trial = 0; trial < 200; trial++) begin
      n = 1 + ($urandom % 40);
      for (int i = 0; i < RL; i++) b[i] = 1'($urandom);
      s = ref_encode(b, n);
      @(negedge clk); clear = 1; in_valid = 1'($urandom);
      @(negedge clk); clear = 0; in_valid = 0;
      check(!out_valid, "no output after clear");
      for (int i = 0; i < n; i++) begin
        while ($urandom % 3 == 0) begin
          @(negedge clk);
          check(!out_valid, "output without input");
        end
        in_valid = 1; in_bit = b[i];
        @(negedge clk);
        in_valid = 0;
        check(out_valid, "out_valid one clock after in_valid");
        check(out_sym == s[i], $sformatf("symbol %0d: %b exp %b", i, out_sym, s[i]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
