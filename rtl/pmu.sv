// pmu: path metric unit.
//
// One acs cell per trellis state, connected as the trellis of the code
// dictates: state n takes its two candidates from predecessors {n, 0} and
// {n, 1} (package convention), and the branch metric of each candidate is
// the BMU metric of the code symbol that branch carries. Every valid set of
// branch metrics updates all state metrics at once and produces one decision
// bit per state, which the trace-back unit stores.
//
// The metrics roll over instead of being normalised (5-bit metrics, as in
// the source), and they keep rolling from frame to frame. A frame starts
// with `init`: the previous frame ended in state 0, so state 0 keeps its
// metric m and every other state gets m + INIT_BIAS. The search thus starts
// from the encoder's known zero state; INIT_BIAS exceeds the largest metric
// a path from state 0 can gain in K-1 hard-decision steps, which keeps the
// metric spread below 2^(SM_W-1). Because state 0's metric is never reset
// (only by rst_n, to 0), its growth over many frames measures the channel
// noise. This start rule is this design's own choice.
//
// Timing: `bm_valid`/`bm` give `dec_valid`/`dec` and the new `sm` one clock
// later. `init` is synchronous and wins over `bm_valid`.
module pmu
  import viterbi_pkg::*;
#(
  parameter logic [SM_W-1:0] INIT_BIAS = SM_W'(2 * (K - 1) + 2)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  init,
  input  logic                  bm_valid,
  input  logic [3:0][BM_W-1:0]  bm,
  output logic                  dec_valid,
  output logic [NS-1:0]         dec,
  output logic [NS-1:0][SM_W-1:0] sm
);

  logic [NS-1:0][SM_W-1:0] sm_new;
  logic [NS-1:0]           dec_new;

  for (genvar n = 0; n < NS; n++) begin : g_acs
    localparam logic [SW-1:0] P0 = pred_state(SW'(n), 1'b0);
    localparam logic [SW-1:0] P1 = pred_state(SW'(n), 1'b1);
    localparam logic          B  = 1'(n >> (SW - 1));      // input bit into n
    localparam sym_t          S0 = encode_sym(B, P0);
    localparam sym_t          S1 = encode_sym(B, P1);

    acs u_acs (
      .sm0    (sm[P0]),
      .sm1    (sm[P1]),
      .bm0    (bm[S0]),
      .bm1    (bm[S1]),
      .sm_new (sm_new[n]),
      .dec    (dec_new[n])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sm        <= '0;
      dec       <= '0;
      dec_valid <= 1'b0;
    end else begin
      dec_valid <= bm_valid && !init;
      if (init) begin
        for (int n = 1; n < NS; n++) sm[n] <= sm[0] + INIT_BIAS;
      end else if (bm_valid) begin
        sm  <= sm_new;
        dec <= dec_new;
      end
    end
  end

endmodule
