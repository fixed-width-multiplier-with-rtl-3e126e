// Self-checking testbench for lp_major_adder (N = 8, the default).
// Applies every combination of the five LP_major column bits and the two
// estimated carries and checks that the bias equals the number of carries
// the column passes upward, floor((ones + CARRY1 + CARRY2 + 1) / 2), where
// the +1 is the rounding constant. Combinational.
module tb_lp_major_adder;

  localparam int N  = 8;
  localparam int BW = 3;

  logic [N/2:0]  col;
  logic [1:0]    carry;
  logic [BW-1:0] bias;
  int checks = 0, failures = 0;

  lp_major_adder #(.N(N), .BW(BW)) dut (.col(col), .carry(carry), .bias(bias));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < (1 << (N / 2 + 1)); c++) begin
      for (int k = 0; k < 4; k++) begin
        int ones, want;
        col   = (N / 2 + 1)'(c);
        carry = 2'(k);
        #1;
        ones = $countones(col) + $countones(carry);
        want = (ones + 1) / 2;
        checks++;
        if (int'(bias) != want) begin
          failures++;
          $display("FAIL col=%b carry=%b bias=%0d expected=%0d", col, carry, bias, want);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
