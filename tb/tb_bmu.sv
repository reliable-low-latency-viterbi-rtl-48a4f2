// tb_bmu: checks the branch metric unit. With hard bits (Q = 1) every
// metric must be the Hamming distance between the received symbol and the
// metric's code symbol; a second instance with 3-bit soft levels must give
// the sum of absolute level differences from 0 and 7. Also checks the
// one-clock latency and that the metrics hold while in_valid is low.
module tb_bmu;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic rx1 = 0, rx0 = 0;
  logic [2:0] s1 = 0, s0 = 0;
  logic bm_valid, sbm_valid;
  logic [3:0][4:0] bm, sbm;
  int checks = 0, failures = 0;

  bmu dut (.clk, .rst_n, .in_valid, .rx1, .rx0, .bm_valid, .bm);
  bmu #(.Q(3)) dut_soft (.clk, .rst_n, .in_valid, .rx1(s1), .rx0(s0), .bm_valid(sbm_valid), .bm(sbm));
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

  function automatic int absd(input int a, input int b);
    return (a > b) ? a - b : b - a;
  endfunction

  initial begin
    logic [3:0][4:0] held;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 500; t++) begin
      in_valid = 1;
      rx1 = 1'($urandom); rx0 = 1'($urandom);
      s1 = 3'($urandom); s0 = 3'($urandom);
      @(negedge clk);
      in_valid = 0;
      check(bm_valid && sbm_valid, "valid after one clock");
      for (int i = 0; i < 4; i++) begin
        int hd, sd;
        hd = int'(rx1 != i[1]) + int'(rx0 != i[0]);
        sd = absd(int'(s1), i[1] ? 7 : 0) + absd(int'(s0), i[0] ? 7 : 0);
        check(int'(bm[i]) == hd, $sformatf("hard bm[%0d]=%0d exp %0d", i, bm[i], hd));
        check(int'(sbm[i]) == sd, $sformatf("soft bm[%0d]=%0d exp %0d", i, sbm[i], sd));
      end
      held = bm;
      rx1 = !rx1;
      @(negedge clk);
      check(!bm_valid && bm == held, "hold while in_valid low");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
