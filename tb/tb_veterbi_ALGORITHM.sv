// tb_veterbi_ALGORITHM: end-to-end test of the instrumented coding chain at
// its default parameters.
//
// Each operation drives u (input byte) and v (error pattern), waits for
// done and compares v_decoder, crc_error, v_encoder and noise_count with the
// golden models of tb_ref_pkg, computed from u and v alone. The first
// operation is the vector u = 00100101, v = 01010010, which must decode back
// to u. Metrics and the noise count carry over from one operation to the
// next, and the models do the same. It also checks the start-to-done latency (3*FRAME_LEN + 4 clocks) and
// counts the mechanisms the design has; each must occur at least once:
// corrected channel errors, uncorrectable errors flagged by the CRC check,
// noise-monitor increments, the noise counter saturating, path-metric
// roll-over and a full FILO buffer. The spread of the path metrics must
// never exceed 8, well inside the 15 the modular compare tolerates.
module tb_veterbi_ALGORITHM;
  import tb_ref_pkg::*;

  localparam int L       = 14;           // 8 data + 4 CRC + 2 tail
  localparam int LATENCY = 3 * L + 4;
  localparam int N_RAND  = 3000;

  logic        clk = 0, rst_n = 0, start = 0, noise_clear = 0;
  int          ref_base = 0, ref_band = -1, ref_noise = 0;
  logic [7:0]  u = '0, v = '0;
  logic        busy, done, crc_error;
  logic [7:0]  v_decoder, noise_count;
  logic [27:0] v_encoder;

  int checks = 0, failures = 0;
  int n_corrected = 0, n_detected = 0, n_noise = 0, n_rollover = 0, n_filo_full = 0;
  int n_clean = 0, n_saturated = 0;

  veterbi_ALGORITHM dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Mechanism monitors (internal observation only)
  logic [3:0][4:0] sm_prev;
  int max_spread = 0;
  always @(posedge clk) begin
    if (dut.u_dec.u_pmu.dec_valid) begin
      for (int i = 0; i < 4; i++) begin
        if (dut.u_dec.u_pmu.sm[i] < sm_prev[i]) n_rollover++;
        for (int j = 0; j < 4; j++) begin
          logic [4:0] d;
          d = dut.u_dec.u_pmu.sm[i] - dut.u_dec.u_pmu.sm[j];
          if (!d[4] && int'(d) > max_spread) max_spread = int'(d);
        end
      end
    end
    sm_prev <= dut.u_dec.u_pmu.sm;
    if (dut.u_dec.u_tbu.u_filo.full) n_filo_full++;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  task automatic run_one(input logic [7:0] uu, input logic [7:0] vv);
    rbits_t frame, dec;
    rsyms_t syms, rx;
    bit [3:0] c;
    int noise, cyc;
    logic [7:0] exp_dec;
    bit exp_err;
    logic [27:0] exp_enc;

    for (int i = 0; i < RL; i++) frame[i] = 0;
    for (int i = 0; i < 8; i++) frame[i] = uu[7 - i];
    c = ref_crc(frame, 8);
    for (int i = 0; i < 4; i++) frame[8 + i] = c[3 - i];
    syms = ref_encode(frame, L);
    rx = syms;
    for (int i = 0; i < 8; i++) rx[i][0] = rx[i][0] ^ vv[7 - i];
    ref_viterbi(rx, L, dec, noise, ref_base, ref_band);
    ref_noise += noise;
    for (int i = 0; i < 8; i++) exp_dec[7 - i] = dec[i];
    exp_err = (ref_crc(dec, 12) != 0);
    for (int i = 0; i < L; i++) exp_enc[27 - 2 * i -: 2] = syms[i];

    @(negedge clk);
    u = uu; v = vv; start = 1;
    @(negedge clk);
    start = 0;
    cyc = 1;
    while (!done) begin
      @(negedge clk);
      cyc++;
    end
    check(v_decoder == exp_dec, $sformatf("v_decoder %b exp %b (u %b v %b)", v_decoder, exp_dec, uu, vv));
    check(crc_error == exp_err, $sformatf("crc_error %b exp %b (u %b v %b)", crc_error, exp_err, uu, vv));
    check(v_encoder == exp_enc, $sformatf("v_encoder %h exp %h", v_encoder, exp_enc));
    check(noise_count == 8'((ref_noise > 255) ? 255 : ref_noise), $sformatf("noise_count %0d exp %0d", noise_count, ref_noise));
    check(cyc == LATENCY, $sformatf("latency %0d exp %0d", cyc, LATENCY));
    check(!busy, "busy after done");
    if (vv != 0 && v_decoder == uu && !crc_error) n_corrected++;
    if (vv == 0) begin
      n_clean++;
      check(v_decoder == uu && !crc_error, "error-free frame not recovered");
    end
    if (crc_error) n_detected++;
    if (noise != 0) n_noise++;
    if (noise_count == 8'hFF) n_saturated++;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    // Vector shown in the output waveform of the source
    run_one(8'b0010_0101, 8'b0101_0010);
    check(v_decoder == 8'b0010_0101, "waveform vector not decoded to u");
    // Every input byte without errors
    for (int i = 0; i < 256; i++) run_one(8'(i), 8'h00);
    // Single and dense error patterns
    for (int i = 0; i < 8; i++) run_one(8'($urandom), 8'(1 << i));
    run_one(8'hA5, 8'hFF);
    // Clearing the noise count
    @(negedge clk); noise_clear = 1; @(negedge clk); noise_clear = 0;
    ref_band = -1; ref_noise = 0;
    check(noise_count == 0, "noise_clear did not clear the count");
    for (int i = 0; i < N_RAND; i++) run_one(8'($urandom), 8'($urandom));

    $display("mechanisms: clean=%0d corrected=%0d crc_detected=%0d noise_nonzero=%0d rollover=%0d filo_full=%0d saturated=%0d",
             n_clean, n_corrected, n_detected, n_noise, n_rollover, n_filo_full, n_saturated);
    $display("largest path metric spread: %0d", max_spread);
    check(max_spread <= 8, "path metric spread above 8");
    check(n_corrected > 0, "no corrected error pattern");
    check(n_detected > 0,  "CRC check never flagged an error");
    check(n_noise > 0,     "noise monitor never counted");
    check(n_saturated > 0, "noise counter never saturated");
    check(n_rollover > 0,  "path metrics never rolled over");
    check(n_filo_full > 0, "FILO never filled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
