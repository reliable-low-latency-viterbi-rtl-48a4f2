// tb_filo: checks the first-in-last-out buffer against a queue model with
// random push/pop traffic that never overflows or underflows, including
// filling it completely and push-and-pop in the same clock.
module tb_filo;
  localparam int DEPTH = 14;
  logic clk = 0, rst_n = 0, push = 0, pop = 0;
  logic [7:0] din = 0, top;
  logic empty, full;
  logic [3:0] count;
  int checks = 0, failures = 0, n_full = 0, n_both = 0;
  logic [7:0] model[$];

  filo #(.DEPTH(DEPTH), .W(8)) dut (.*);
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
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 20000; t++) begin
      int rp, rq;
      rp = $urandom % 8;
      rq = $urandom % 8;
      // bias towards filling then draining in phases
      push = ((t / 200) % 2 == 0) ? (rp < 6) : (rp < 2);
      pop  = ((t / 200) % 2 == 0) ? (rq < 2) : (rq < 6);
      if (push && pop && model.size() == 0) pop = 0;
      if (push && !pop && model.size() == DEPTH) push = 0;
      if (pop && !push && model.size() == 0) pop = 0;
      din = 8'($urandom);
      check(int'(count) == model.size(), "count");
      check(empty == (model.size() == 0), "empty");
      check(full == (model.size() == DEPTH), "full");
      if (model.size() > 0) check(top == model[$], $sformatf("top %h exp %h", top, model[$]));
      if (full) n_full++;
      if (pop) begin void'(model.pop_back()); end
      if (push) model.push_back(din);
      if (push && pop) n_both++;
      @(negedge clk);
    end
    push = 0; pop = 0;
    check(n_full > 0 && n_both > 0, "full buffer and simultaneous push/pop exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
