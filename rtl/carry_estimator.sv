// Approximate carry from LP_minor into LP_major (the compensation-bias
// circuit).
//
// The n-1 truncated columns of the partial-product matrix (LP) are split
// into LP_major, the most significant truncated column (weight 2^(n-2)),
// and LP_minor, all columns below it. LP_minor only holds bits of the rows
// 0 .. n/2-2, so the carry it would send into LP_major is estimated from
// the flags nz[i] = y''(i) = 1 when Booth digit i is non-zero. The
// estimation rule was obtained by exhaustive simulation of every input pair
// and picking, for each flag pattern, the carry value that occurs most
// often (ties resolved to 0):
//   n = 8  : CARRY1 = nz0 & nz1 & nz2                        (3-input AND)
//   n = 10 : CARRY1 = 1 when at least three of nz0..nz3 are set
//   n = 12 : CARRY1 = 1 when at least three of nz0..nz4 are set,
//            CARRY2 = 1 when all five are set (estimated carry 2)
// CARRY2 is 0 for n = 8 and n = 10. Both carries have the weight of the
// LP_major column. The rules for n = 8, 10 and 12 follow the design
// description; the sum-of-products forms for n = 10 and n = 12 are written
// out here from those rules. Other widths are rejected at elaboration.
//
// Interface: nz[N/2-2:0] non-zero-digit flags of rows 0 .. N/2-2;
// carry[0] = CARRY1, carry[1] = CARRY2.
// Timing: purely combinational.
module carry_estimator
  import fwm_pkg::*;
#(
  parameter int N = 8
) (
  input  logic [N/2-2:0] nz,
  output logic [1:0]     carry
);

  if (!supported_width(N)) begin : g_bad_width
    $error("carry_estimator: N must be 8, 10 or 12");
  end

  if (N == 8) begin : g_n8
    assign carry = {1'b0, &nz};
  end else if (N == 10) begin : g_n10
    assign carry = {1'b0,
                    (nz[3] & nz[2] & nz[1]) | (nz[3] & nz[2] & nz[0]) |
                    (nz[3] & nz[1] & nz[0]) | (nz[2] & nz[1] & nz[0])};
  end else begin : g_n12
    logic c1;
    always_comb begin
      c1 = 1'b0;
      // OR of all ten products of three distinct flags
      for (int a = 0; a < 5; a++)
        for (int b = a + 1; b < 5; b++)
          for (int c = b + 1; c < 5; c++)
            c1 |= nz[a] & nz[b] & nz[c];
    end
    assign carry = {&nz, c1};
  end

endmodule
