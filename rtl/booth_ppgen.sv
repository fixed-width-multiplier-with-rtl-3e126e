// Partial-product row generator of the modified Booth multiplier.
//
// From the multiplicand X (N bits, two's complement) and one digit's Booth
// control bundle it forms the N+1-bit row
//   pp[j] = ((one & x[j]) | (two & x[j-1])) ^ neg, forced to 0 when zero,
// where X is sign-extended by one bit (x[N] = x[N-1]) and x[-1] = 0, so that
// 2X fits. A negative digit gives the one's complement of |digit|*X; the
// missing +1 is the encoder's cor bit, which the adder places at the row's
// LSB column (enc.cor is therefore not used in this module). Read as an
// N+1-bit signed number, pp + cor equals digit*X.
// Selecting and inverting this way follows the design description; the
// exact gate form is this design's own.
//
// Interface: x[N-1:0] multiplicand, enc Booth controls, pp[N:0] row
// (pp[N] is the row's sign bit).
// Timing: purely combinational.
module booth_ppgen
  import fwm_pkg::*;
#(
  parameter int N = 8
) (
  input  logic [N-1:0] x,
  input  booth_enc_t   enc,
  output logic [N:0]   pp
);

  logic [N:0] xe;      // X sign-extended to N+1 bits
  logic [N:0] xs;      // 2X, N+1 bits

  assign xe = {x[N-1], x};
  assign xs = {x, 1'b0};

  always_comb begin
    for (int j = 0; j <= N; j++) begin
      pp[j] = (((enc.one & xe[j]) | (enc.two & xs[j])) ^ enc.neg) & ~enc.zero;
    end
  end

endmodule
