// veterbi_ALGORITHM: instrumented Viterbi coding chain with CRC signature
// check.
//
// One operation takes the input byte `u` through the whole chain and back:
//   1. LFSR CRC generation: the eight bits of `u` (MSB first) are shifted
//      through a CRC-4 LFSR, and its four check bits are appended, followed
//      by K-1 zero tail bits that return the encoder to state 0.
//   2. Convolutional encoding of that frame; the clean code word is
//      available on `v_encoder` (first symbol in the top bits).
//   3. Error injection: bit i of `v` (MSB = first symbol) flips the second
//      code bit of the i-th information symbol, which makes this an
//      instrumented decoder for error-detection experiments.
//   4. Viterbi decoding: BMU, PMU of add-compare-select cells and trace-back
//      with a first-in-last-out buffer.
//   5. The decoded bits are fed back through a second CRC LFSR. A non-zero
//      remainder raises `crc_error`: the decoder could not correct the
//      injected errors. The decoded byte appears on `v_decoder`.
// The block chain (LFSR, BMU, PMU, trace-back with its output fed back to
// the LFSR) and the port names u, v, v_decoder and v_encoder follow the
// source. The roles given to u and v, the code, the CRC polynomial and the
// frame layout are this design's own choices.
//
// `noise_count` is the noise monitor's count, accumulated over all
// operations since reset or the last `noise_clear`.
//
// Interface and timing: pulse `start` while `busy` is low. The frame is
// sent on FRAME_LEN consecutive clocks and decoded as it arrives; `done`
// pulses for one clock 3*FRAME_LEN+4 clocks after the clock edge that
// sampled `start` (46 clocks at the defaults): FRAME_LEN+1 to send and
// encode, 2 in the BMU and PMU, FRAME_LEN of trace-back, FRAME_LEN to pop
// the bits and 1 to register the result. `v_decoder` and `crc_error` hold
// until the next operation completes.
module veterbi_ALGORITHM
  import viterbi_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  logic                     noise_clear,  // restart the noise count
  input  logic [INFO_BITS-1:0]     u,            // input bits
  input  logic [INFO_BITS-1:0]     v,            // injected error pattern
  output logic                     busy,
  output logic                     done,
  output logic [INFO_BITS-1:0]     v_decoder,    // decoded input bits
  output logic [2*FRAME_LEN-1:0]   v_encoder,    // clean code word
  output logic                     crc_error,    // error indication flag
  output logic [7:0]               noise_count
);

  localparam int unsigned IW = $clog2(FRAME_LEN + 1);   // frame bit index
  localparam int unsigned UW = $clog2(INFO_BITS);       // index into u, v
  localparam int unsigned CW = $clog2(CRC_W);           // index into the CRC

  typedef enum logic [1:0] {IDLE, SEND, DECODE} top_state_e;

  top_state_e            state;
  logic [INFO_BITS-1:0]  u_q, v_q;
  logic [IW-1:0]         tx_cnt, enc_idx, rx_cnt;
  logic                  init;

  // ---------------- transmit side ----------------
  logic                  tx_valid, tx_bit, tx_last;
  logic [CRC_W-1:0]      crc_tx;

  assign init     = (state == IDLE) && start;
  assign tx_valid = (state == SEND);
  assign tx_last  = tx_valid && (tx_cnt == IW'(FRAME_LEN - 1));

  always_comb begin
    if (tx_cnt < IW'(INFO_BITS))
      tx_bit = u_q[UW'(IW'(INFO_BITS - 1) - tx_cnt)];
    else if (tx_cnt < IW'(INFO_BITS + CRC_W))
      tx_bit = crc_tx[CW'(IW'(INFO_BITS + CRC_W - 1) - tx_cnt)];
    else
      tx_bit = 1'b0;
  end

  lfsr_crc u_crc_gen (
    .clk   (clk),
    .rst_n (rst_n),
    .clear (init),
    .en    (tx_valid && (tx_cnt < IW'(INFO_BITS))),
    .din   (tx_bit),
    .crc   (crc_tx),
    .zero  ()
  );

  logic enc_valid;
  sym_t enc_sym;
  logic enc_last, enc_err;

  conv_encoder u_enc (
    .clk       (clk),
    .rst_n     (rst_n),
    .clear     (init),
    .in_valid  (tx_valid),
    .in_bit    (tx_bit),
    .out_valid (enc_valid),
    .out_sym   (enc_sym)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      enc_idx  <= '0;
      enc_last <= 1'b0;
    end else begin
      enc_idx  <= tx_cnt;
      enc_last <= tx_last;
    end
  end

  assign enc_err = (enc_idx < IW'(INFO_BITS)) ? v_q[UW'(IW'(INFO_BITS - 1) - enc_idx)] : 1'b0;

  // ---------------- receive side ----------------
  logic dec_ready, out_valid, out_bit, out_last;
  logic crc_rx_zero;

  viterbi_decoder #(.L(FRAME_LEN), .Q(1), .CNT_W(8)) u_dec (
    .clk         (clk),
    .rst_n       (rst_n),
    .init        (init),
    .noise_clear (noise_clear),
    .sym_valid   (enc_valid),
    .sym_last    (enc_last),
    .rx1         (enc_sym[1]),
    .rx0         (enc_sym[0] ^ enc_err),
    .ready       (dec_ready),
    .out_valid   (out_valid),
    .out_bit     (out_bit),
    .out_last    (out_last),
    .noise_count (noise_count)
  );

  // Trace-back output fed back into the LFSR for the signature check
  lfsr_crc u_crc_chk (
    .clk   (clk),
    .rst_n (rst_n),
    .clear (init),
    .en    (out_valid && (rx_cnt < IW'(INFO_BITS + CRC_W))),
    .din   (out_bit),
    .crc   (),
    .zero  (crc_rx_zero)
  );

  // ---------------- control ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= IDLE;
      u_q       <= '0;
      v_q       <= '0;
      tx_cnt    <= '0;
      rx_cnt    <= '0;
      done      <= 1'b0;
      v_decoder <= '0;
      v_encoder <= '0;
      crc_error <= 1'b0;
    end else begin
      done <= 1'b0;
      if (enc_valid) v_encoder <= {v_encoder[2*FRAME_LEN-3:0], enc_sym};
      unique case (state)
        IDLE: if (start) begin
          state  <= SEND;
          u_q    <= u;
          v_q    <= v;
          tx_cnt <= '0;
          rx_cnt <= '0;
        end
        SEND: begin
          tx_cnt <= tx_cnt + IW'(1);
          if (tx_last) state <= DECODE;
        end
        DECODE: if (out_valid) begin
          rx_cnt <= rx_cnt + IW'(1);
          if (rx_cnt < IW'(INFO_BITS)) v_decoder <= {v_decoder[INFO_BITS-2:0], out_bit};
          if (out_last) begin
            // the check LFSR has absorbed data and check bits by now
            crc_error <= !crc_rx_zero;
            done      <= 1'b1;
            state     <= IDLE;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  assign busy = (state != IDLE);

  a_decoder_ready: assert property (@(posedge clk) disable iff (!rst_n) enc_valid |-> dec_ready);

endmodule
