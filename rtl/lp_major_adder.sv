// LP_major column adder: produces the compensation bias.
//
// The adder cells of the LP_minor columns are removed; the LP_major column
// (weight 2^(n-2)) is kept. It adds the column's partial-product bits
// (bit n-2-2i of every row i, plus the correction bit cor of the last row),
// the estimated carries CARRY1/CARRY2 from the carry estimator, and one
// rounding constant of the same weight. The carries this addition passes
// to column n-1 are the compensation bias, added into the kept part MP:
//   bias = (popcount(col) + CARRY1 + CARRY2 + 1) >> 1
// Adding LP_major and the estimated carry and keeping only the carry
// follows the design description. The rounding constant (half an output
// LSB) is this design's reading: without it the maximum error of the
// 8-bit multiplier is 1.5 output LSBs, with it the error figures match
// the published ones (maximum 1 LSB).
//
// Interface: col[N/2:0] LP_major bits, carry[1:0] estimated carries,
// bias[BW-1:0] number of carries into column n-1.
// Timing: purely combinational (a small counter).
module lp_major_adder #(
  parameter int N  = 8,
  parameter int BW = $clog2((N / 2 + 4) / 2 + 1)
) (
  input  logic [N/2:0]  col,
  input  logic [1:0]    carry,
  output logic [BW-1:0] bias
);

  localparam int SW = $clog2(N / 2 + 5);   // holds the full column sum

  logic [SW-1:0] sum;

  always_comb begin
    sum = SW'(1) + SW'(carry[0]) + SW'(carry[1]);   // rounding constant + carries
    for (int i = 0; i <= N / 2; i++) begin
      sum += SW'(col[i]);
    end
    bias = BW'(sum >> 1);
  end

endmodule
