// Radix-4 modified Booth encoder for one digit.
//
// The multiplier Y is scanned in overlapping triplets {y(2i+1), y(2i), y(2i-1)}
// (with y(-1) = 0). Each triplet stands for the digit
// -2*y(2i+1) + y(2i) + y(2i-1), one of -2, -1, 0, +1, +2, and is turned into
// the control signals of the encoding table:
//   one  = the digit is +-1 (select X)
//   two  = the digit is +-2 (select X shifted left by one)
//   neg  = y(2i+1), invert the selected multiple
//   zero = the triplet is 000 or 111 (digit 0, the row is forced to zero)
//   cor  = neg and not zero, the +1 added at the row's LSB column
// The table, including neg = 1 for the triplet 111, follows the design
// description; the zero gating that keeps 111 from producing an all-ones
// row is what the zero signal is for.
//
// Interface: trip[2:0] = {y(2i+1), y(2i), y(2i-1)}, enc = booth_enc_t.
// Timing: purely combinational, two gate levels.
module booth_encoder
  import fwm_pkg::*;
(
  input  logic [2:0]  trip,
  output booth_enc_t  enc
);

  always_comb begin
    enc.one  = trip[1] ^ trip[0];
    enc.two  = (trip[2] & ~trip[1] & ~trip[0]) | (~trip[2] & trip[1] & trip[0]);
    enc.neg  = trip[2];
    enc.zero = (trip == 3'b000) || (trip == 3'b111);
    enc.cor  = trip[2] & ~enc.zero;
  end

endmodule
