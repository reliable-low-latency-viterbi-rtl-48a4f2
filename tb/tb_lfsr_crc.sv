// tb_lfsr_crc: checks the CRC LFSR against a bit-serial long division.
//
// Random messages of 1 to 40 bits are shifted in; the register must equal
// the reference remainder after every bit. Appending the check bits must
// leave a zero remainder (`zero` high), and flipping any single bit of the
// extended message must leave it non-zero. Also checks that `en` low holds
// the register and that `clear` empties it.
module tb_lfsr_crc;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0, clear = 0, en = 0, din = 0;
  logic [3:0] crc;
  logic zero;
  int checks = 0, failures = 0;

  lfsr_crc dut (.*);
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

  task automatic shift(input bit b);
    @(negedge clk); en = 1; din = b; clear = 0;
    @(negedge clk); en = 0;
  endtask

  task automatic do_clear();
    @(negedge clk); clear = 1; en = 1; din = 1;
    @(negedge clk); clear = 0; en = 0;
  endtask

  initial begin
    rbits_t m;
    int n, flip;
    bit [3:0] r;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int trial = 0; trial < 300; trial++) begin
      n = 1 + ($urandom % 40);
      for (int i = 0; i < RL; i++) m[i] = 0;
      for (int i = 0; i < n; i++) m[i] = 1'($urandom);
      do_clear();
      check(crc == 0 && zero, "clear");
      for (int i = 0; i < n; i++) begin
        shift(m[i]);
        check(crc == ref_crc(m, i + 1), $sformatf("remainder after %0d bits: %h exp %h", i + 1, crc, ref_crc(m, i + 1)));
      end
      r = crc;
      repeat (3) @(negedge clk);
      check(crc == r, "hold while en low");
      for (int i = 0; i < 4; i++) begin m[n + i] = r[3 - i]; shift(r[3 - i]); end
      check(zero && crc == 0, "message plus check bits leaves zero");
      flip = $urandom % (n + 4);
      m[flip] = !m[flip];
      do_clear();
      for (int i = 0; i < n + 4; i++) shift(m[i]);
      check(!zero, "single bit error not detected");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
