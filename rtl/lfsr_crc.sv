// lfsr_crc: serial CRC generator and checker built as a linear feedback
// shift register.
//
// Each enabled clock shifts the register one place towards its most
// significant bit. The bit leaving the MSB is XORed with the incoming data
// bit, and that feedback bit is XORed into the register stages selected by
// the polynomial taps (internal-XOR, or Galois, form). After the message bits
// have been shifted in, the register holds the remainder of the message
// times x^W divided by the generator polynomial: these are the check bits to
// append. Shifting a message followed by its check bits through a cleared
// register leaves zero, which is how the receiver tests a frame; a non-zero
// remainder flags an error.
//
// Interface: `clear` (synchronous) empties the register and wins over `en`;
// `en` shifts in `din`. `crc` is the register, `zero` is high while it is
// all zeros. Both outputs change one clock after the bit that caused them.
// The polynomial and its width come from the package by default; the
// register form is this design's own choice.
module lfsr_crc #(
  parameter int unsigned    W    = viterbi_pkg::CRC_W,
  parameter logic [W-1:0]   POLY = viterbi_pkg::CRC_POLY
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         en,
  input  logic         din,
  output logic [W-1:0] crc,
  output logic         zero
);

  logic fb;
  assign fb = crc[W-1] ^ din;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     crc <= '0;
    else if (clear) crc <= '0;
    else if (en)    crc <= {crc[W-2:0], 1'b0} ^ (fb ? POLY : '0);
  end

  assign zero = (crc == '0);

endmodule
