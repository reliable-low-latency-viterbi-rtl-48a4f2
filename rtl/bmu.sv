// bmu: branch metric unit.
//
// For every received symbol the unit produces four branch metrics, the
// distances of the symbol from the four possible code symbols 00, 01, 10 and
// 11 (index i of `bm` belongs to code symbol i = {c1, c0}). Each received
// code bit is a Q-bit level, 0 standing for a certain 0 and 2^Q-1 for a
// certain 1; the distance is the sum of the absolute differences of the two
// levels from the ideal ones. With the default Q = 1 the inputs are hard
// bits and the metrics are Hamming distances (0, 1 or 2). The metrics are
// BM_W = 5 bits wide, as the source specifies; Q and the registered output
// are this design's own choices. Soft levels (Q > 1) give metrics up to
// 2*(2^Q-1), which the 5-bit rolling state metrics of the path metric unit
// cannot absorb: a soft-decision decoder needs wider state metrics and a
// larger start bias, so the decoder core is used with Q = 1.
//
// Timing: `in_valid`/`rx1`/`rx0` give `bm_valid`/`bm` one clock later.
module bmu
  import viterbi_pkg::*;
#(
  parameter int unsigned Q = 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic [Q-1:0]         rx1,       // received level of code bit c1
  input  logic [Q-1:0]         rx0,       // received level of code bit c0
  output logic                 bm_valid,
  output logic [3:0][BM_W-1:0] bm
);

  localparam logic [Q-1:0] ONE = '1;

  // |rx - ideal|, where ideal is 0 or the top level
  function automatic logic [Q-1:0] bit_dist(input logic [Q-1:0] rx, input logic ideal);
    return ideal ? ONE - rx : rx;
  endfunction

  logic [3:0][BM_W-1:0] bm_d;

  always_comb begin
    for (int i = 0; i < 4; i++) begin
      bm_d[i] = BM_W'(bit_dist(rx1, i[1])) + BM_W'(bit_dist(rx0, i[0]));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bm_valid <= 1'b0;
      bm       <= '0;
    end else begin
      bm_valid <= in_valid;
      if (in_valid) bm <= bm_d;
    end
  end

endmodule
