// noise_monitor: channel noise estimate from the growth of one state metric.
//
// With rolling (never normalised) metrics, the metric of a state grows at
// the rate at which the received symbols disagree with the best paths, so
// its growth measures the noise on the incoming stream. The monitor watches
// the metric of a single state and splits the metric range into four equal
// bands (the band is the metric's top two bits). Each time the metric
// passes upward into the next band, wrapping from the top band into the
// bottom one, the noise counter increments. This scheme is the one the
// source suggests; watching state 0 and the saturating CNT_W-bit counter are
// this design's own choices.
//
// Interface and timing: `clear` zeroes the counter and re-reads the band
// from the next sample. On `sm_valid` the monitor compares the band of `sm`
// with the band of the previous sample; `count` moves one clock later.
module noise_monitor
  import viterbi_pkg::*;
#(
  parameter int unsigned CNT_W = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             sm_valid,
  input  logic [SM_W-1:0]  sm,
  output logic [CNT_W-1:0] count
);

  logic [1:0] band_q;
  logic [1:0] band;
  logic       primed;        // band_q holds a real sample
  logic       crossed;

  assign band    = sm[SM_W-1 -: 2];
  assign crossed = primed && (band == band_q + 2'd1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      band_q <= '0;
      primed <= 1'b0;
      count  <= '0;
    end else if (clear) begin
      primed <= 1'b0;
      count  <= '0;
    end else if (sm_valid) begin
      band_q <= band;
      primed <= 1'b1;
      if (crossed && count != '1) count <= count + CNT_W'(1);
    end
  end

endmodule
