// Fixed-width radix-4 (modified Booth) multiplier with a simple,
// Booth-encoder-driven compensation bias.
//
// Two N-bit two's-complement operands give an N-bit product: the 2N-bit
// product with its n-1 least significant columns cut off. Instead of
// adding those columns (post-truncation) or ignoring them (direct
// truncation), the truncated part LP is split into LP_major, its top
// column, and LP_minor, the rest:
//   * N/2 Booth encoders turn Y into digits in {-2,-1,0,1,2} and
//     booth_ppgen forms one N+1-bit partial-product row per digit;
//   * the adder cells of LP_minor are removed; carry_estimator guesses the
//     carry LP_minor would send into LP_major from which of the digits
//     0 .. N/2-2 are non-zero;
//   * lp_major_adder adds the LP_major bits, that estimate and a rounding
//     constant; its carries into column n-1 are the compensation bias;
//   * mp_adder adds the kept columns MP and the bias and delivers p.
// The structure follows the design description; the rounding constant and
// the plain word-level MP adder are this design's choices (see the
// submodules). Supported widths: N = 8 (default), 10 and 12, the widths
// the carry-estimation rule is defined for.
//
// Interface: x[N-1:0] multiplicand, y[N-1:0] multiplier, p[N-1:0] product,
// all two's complement; p approximates x*y / 2^(N-1). The product
// (-2^(N-1))^2 does not fit and wraps to -2^(N-1).
// Timing: purely combinational, no clock, result valid one settling time
// after the inputs change.
module fwm_booth_mult
  import fwm_pkg::*;
#(
  parameter int N = 8
) (
  input  logic [N-1:0] x,
  input  logic [N-1:0] y,
  output logic [N-1:0] p
);

  localparam int G  = N / 2;
  localparam int BW = $clog2((G + 4) / 2 + 1);

  logic [N:0]         yz;      // {y, y(-1) = 0}
  booth_enc_t         enc [G];
  logic [G-1:0][N:0]  pp;
  logic [G-2:0]       nz;      // y''(i): digit i is non-zero
  logic [1:0]         carry;
  logic [G:0]         col;     // LP_major column bits
  logic [BW-1:0]      bias;

  assign yz = {y, 1'b0};

  for (genvar i = 0; i < G; i++) begin : g_row
    booth_encoder u_enc (
      .trip (yz[2*i+2:2*i]),
      .enc  (enc[i])
    );
    booth_ppgen #(.N(N)) u_pp (
      .x   (x),
      .enc (enc[i]),
      .pp  (pp[i])
    );
    // row i reaches LP_major (column N-2) with its bit N-2-2i
    assign col[i] = pp[i][N-2-2*i];
  end
  // the correction bit of the last row sits in column 2(G-1) = N-2
  assign col[G] = enc[G-1].cor;

  for (genvar i = 0; i < G - 1; i++) begin : g_nz
    assign nz[i] = ~enc[i].zero;
  end

  carry_estimator #(.N(N)) u_est (
    .nz    (nz),
    .carry (carry)
  );

  lp_major_adder #(.N(N), .BW(BW)) u_lpm (
    .col   (col),
    .carry (carry),
    .bias  (bias)
  );

  mp_adder #(.N(N), .BW(BW)) u_mp (
    .pp   (pp),
    .bias (bias),
    .p    (p)
  );

endmodule
