// conv_encoder: rate-1/2 convolutional encoder (the transmit side that
// produces the code symbols the decoder receives).
//
// A K-1 bit shift register holds the previous input bits. For each valid
// input bit the encoder forms the K-bit window {new bit, register} and emits
// two code bits, the parities of the window under the generators G0 and G1
// from viterbi_pkg, then shifts the new bit in. The code itself is this
// design's own choice; the source only requires two code bits per symbol.
//
// Interface: `clear` returns the register to state zero (start of frame).
// A bit on `in_valid`/`in_bit` gives `out_valid`/`out_sym` ({c1, c0}) one
// clock later.
module conv_encoder
  import viterbi_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  clear,
  input  logic  in_valid,
  input  logic  in_bit,
  output logic  out_valid,
  output sym_t  out_sym
);

  logic [SW-1:0] state;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= '0;
      out_valid <= 1'b0;
      out_sym   <= '0;
    end else begin
      out_valid <= in_valid && !clear;
      if (clear) begin
        state <= '0;
      end else if (in_valid) begin
        out_sym <= encode_sym(in_bit, state);
        state   <= {in_bit, state[SW-1:1]};
      end
    end
  end

endmodule
