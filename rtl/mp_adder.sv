// Retained adder cells: sum of the most significant part (MP) of the
// partial-product matrix plus the compensation bias.
//
// Row i (N+1 bits, sign bit pp[i][N]) sits at columns 2i .. 2i+N of the
// 2N-column matrix. The adder keeps only columns n-1 and up: every row is
// sign-extended to the full width, its bits in the n-1 truncated columns
// are dropped, and the rows are added together with the bias, which has
// the weight of column n-1. All correction bits cor lie in the truncated
// columns (the last one in LP_major), so none enters here. The output is
// columns n-1 .. 2n-2 of the sum, the n-bit fixed-width product.
// Summing the MP columns and the bias follows the design description; the
// adder's structure is left to synthesis (word-level additions of the
// sign-extended rows) and is this design's own choice.
// Range: the n-bit signed output cannot hold (-2^(n-1)) * (-2^(n-1)) =
// 2^(2n-2); that one product wraps to -2^(n-1), as in any n-bit result.
//
// Interface: pp[N/2-1:0][N:0] partial-product rows, bias[BW-1:0]
// compensation carries into column n-1, p[N-1:0] product (two's complement,
// scaled by 2^-(n-1) relative to the exact product).
// Timing: purely combinational.
module mp_adder #(
  parameter int N  = 8,
  parameter int BW = $clog2((N / 2 + 4) / 2 + 1)
) (
  input  logic [N/2-1:0][N:0] pp,
  input  logic [BW-1:0]       bias,
  output logic [N-1:0]        p
);

  localparam int G = N / 2;

  logic [2*N-1:0] sum;
  logic [2*N-1:0] row;

  always_comb begin
    sum = (2 * N)'(bias) << (N - 1);
    for (int i = 0; i < G; i++) begin
      row = (2 * N)'(signed'(pp[i])) << (2 * i);   // sign-extend, place at column 2i
      row[N-2:0] = '0;                             // drop the truncated LP columns
      sum += row;
    end
    p = sum[2*N-2:N-1];
  end

endmodule
