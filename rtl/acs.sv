// acs: add-compare-select cell for one trellis state.
//
// The cell adds the branch metric of each of the two incoming branches to
// the state metric of the branch's predecessor, compares the two sums and
// selects the smaller one as the new state metric of its state. The
// decision bit tells which branch survived (0: predecessor {n, 0}, 1:
// predecessor {n, 1} in the package's convention).
//
// State metrics are SM_W = 5 bits (the source's resolution) and are never
// normalised: sums wrap modulo 2^SM_W, and the comparison takes the sign of
// the modular difference of the two sums. This is correct as long as all
// live metrics stay within 2^(SM_W-1) of each other, which the source states
// as the condition for letting metrics roll over.
//
// Purely combinational; the path metric unit holds the registers.
module acs
  import viterbi_pkg::*;
(
  input  logic [SM_W-1:0] sm0,    // metric of predecessor for decision 0
  input  logic [SM_W-1:0] sm1,    // metric of predecessor for decision 1
  input  logic [BM_W-1:0] bm0,    // branch metric from predecessor 0
  input  logic [BM_W-1:0] bm1,    // branch metric from predecessor 1
  output logic [SM_W-1:0] sm_new,
  output logic            dec
);

  logic [SM_W-1:0] sum0, sum1, diff;

  always_comb begin
    sum0   = sm0 + SM_W'(bm0);
    sum1   = sm1 + SM_W'(bm1);
    diff   = sum0 - sum1;        // modular difference
    dec    = !diff[SM_W-1] && (diff != '0);   // sum1 strictly smaller
    sm_new = dec ? sum1 : sum0;
  end

endmodule
