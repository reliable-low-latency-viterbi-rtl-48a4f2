// viterbi_decoder: frame-based Viterbi decoder core, BMU -> PMU -> trace-back.
//
// Received symbols (two Q-bit code levels each) enter the branch metric
// unit, whose four metrics drive the path metric unit's add-compare-select
// cells. The decisions of every step go to the trace-back unit, which, once
// the frame's last symbol is in, recovers the maximum-likelihood input
// sequence from state 0 and emits it in order through its first-in-last-out
// buffer. A noise monitor watches the metric of state 0 as the source
// suggests. The three-stage chain follows the source; frames of L symbols
// ending in the zero state are this design's own choice.
//
// Interface and timing: pulse `init` once before a frame (it restarts the
// search from state 0; the metrics keep rolling across frames, so the noise
// count accumulates until `noise_clear`). Then give L symbols on `sym_valid`
// with `sym_last` on the final one, not necessarily on consecutive clocks,
// and only while `ready` is high. The BMU and PMU add two clocks; the
// trace-back then takes L clocks and the L decoded bits follow on
// `out_valid`/`out_bit`/`out_last` on consecutive clocks. The last bit
// therefore leaves 2L+2 clocks after the last symbol entered. Q is passed to
// the BMU; with the package's 5-bit state metrics only Q = 1 (hard
// decisions) keeps the metric spread inside the rolling-compare limit.
module viterbi_decoder
  import viterbi_pkg::*;
#(
  parameter int unsigned L     = FRAME_LEN,
  parameter int unsigned Q     = 1,
  parameter int unsigned CNT_W = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             init,
  input  logic             noise_clear,
  input  logic             sym_valid,
  input  logic             sym_last,
  input  logic [Q-1:0]     rx1,
  input  logic [Q-1:0]     rx0,
  output logic             ready,
  output logic             out_valid,
  output logic             out_bit,
  output logic             out_last,
  output logic [CNT_W-1:0] noise_count
);

  logic                   bm_valid, dec_valid;
  logic [3:0][BM_W-1:0]   bm;
  logic [NS-1:0]          dec;
  logic [NS-1:0][SM_W-1:0] sm;
  logic                   last_d1, last_d2;
  logic                   tb_ready;

  // The frame-end marker travels alongside the BMU and PMU stages
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      last_d1 <= 1'b0;
      last_d2 <= 1'b0;
    end else begin
      last_d1 <= sym_valid && sym_last;
      last_d2 <= last_d1;
    end
  end

  bmu #(.Q(Q)) u_bmu (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (sym_valid),
    .rx1      (rx1),
    .rx0      (rx0),
    .bm_valid (bm_valid),
    .bm       (bm)
  );

  pmu u_pmu (
    .clk       (clk),
    .rst_n     (rst_n),
    .init      (init),
    .bm_valid  (bm_valid),
    .bm        (bm),
    .dec_valid (dec_valid),
    .dec       (dec),
    .sm        (sm)
  );

  tbu #(.L(L)) u_tbu (
    .clk       (clk),
    .rst_n     (rst_n),
    .dec_valid (dec_valid),
    .dec_last  (last_d2),
    .dec       (dec),
    .ready     (tb_ready),
    .out_valid (out_valid),
    .out_bit   (out_bit),
    .out_last  (out_last)
  );

  noise_monitor #(.CNT_W(CNT_W)) u_noise (
    .clk      (clk),
    .rst_n    (rst_n),
    .clear    (noise_clear),
    .sm_valid (dec_valid),
    .sm       (sm[0]),
    .count    (noise_count)
  );

  // No new symbols while the trace-back is busy or a frame is still in the
  // two pipeline stages ahead of it.
  assign ready = tb_ready && !last_d1 && !last_d2;

endmodule
