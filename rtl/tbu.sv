// tbu: survivor memory and trace-back unit.
//
// The unit stores the decision bits of every trellis step of a frame
// (survivor path memory, one NS-bit word per step). When the last step of
// the frame has arrived it traces the surviving path backwards: starting
// from state 0, where the zero tail leaves the encoder, it reads the
// decision of the current state at each step, emits that state's input bit
// (its MSB) and moves to the predecessor the decision names. Because the bits
// come out last-first, they are pushed into a first-in-last-out buffer and
// then popped in transmission order.
//
// The trace-back approach follows the source; tracing whole frames from the
// known end state, one step per clock, is this design's own choice.
//
// Interface and timing: decisions are accepted on `dec_valid` while `ready`
// is high; `dec_last` marks the last step of a frame. One clock after the
// last decision the trace-back runs for L clocks, then the decoded bits
// leave on `out_valid`/`out_bit` for L clocks, `out_last` on the final one.
// `ready` is low from the clock after `dec_last` until the last bit is out.
module tbu
  import viterbi_pkg::*;
#(
  parameter int unsigned L = FRAME_LEN
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          dec_valid,
  input  logic          dec_last,
  input  logic [NS-1:0] dec,
  output logic          ready,
  output logic          out_valid,
  output logic          out_bit,
  output logic          out_last
);

  localparam int unsigned AW = (L > 1) ? $clog2(L) : 1;

  typedef enum logic [1:0] {COLLECT, TRACE, EMIT} tb_state_e;

  tb_state_e          phase;
  logic [NS-1:0]      spm [L];          // survivor path memory
  logic [AW-1:0]      wptr, tptr;
  logic [SW-1:0]      st;

  logic               push, pop, f_empty, f_top;
  logic [$clog2(L+1)-1:0] f_count;
  logic [NS-1:0]      dword;
  logic               dbit;

  assign ready = (phase == COLLECT);
  assign dword = spm[tptr];
  assign dbit  = dword[st];

  assign push      = (phase == TRACE);
  assign pop       = (phase == EMIT) && !f_empty;
  assign out_valid = pop;
  assign out_bit   = f_top;
  assign out_last  = pop && (f_count == 1);

  always_ff @(posedge clk) begin
    if (dec_valid && ready) spm[wptr] <= dec;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase <= COLLECT;
      wptr  <= '0;
      tptr  <= '0;
      st    <= '0;
    end else begin
      unique case (phase)
        COLLECT: if (dec_valid) begin
          if (dec_last) begin
            phase <= TRACE;
            tptr  <= wptr;
            st    <= '0;
            wptr  <= '0;
          end else begin
            wptr  <= wptr + AW'(1);
          end
        end
        TRACE: begin
          st <= pred_state(st, dbit);
          if (tptr == '0) phase <= EMIT;
          else            tptr  <= tptr - AW'(1);
        end
        EMIT: if (out_last) phase <= COLLECT;
        default: phase <= COLLECT;
      endcase
    end
  end

  filo #(.DEPTH(L), .W(1)) u_filo (
    .clk   (clk),
    .rst_n (rst_n),
    .push  (push),
    .din   (st[SW-1]),
    .pop   (pop),
    .top   (f_top),
    .empty (f_empty),
    .full  (),
    .count (f_count)
  );

  a_accept_only_when_ready: assert property (@(posedge clk) disable iff (!rst_n) dec_valid |-> ready);
  a_frame_fits: assert property (@(posedge clk) disable iff (!rst_n)
                                 (dec_valid && !dec_last) |-> (wptr != AW'(L - 1)));

endmodule
