// Self-checking testbench for carry_estimator at the three supported
// widths. Every pattern of non-zero-digit flags is applied and the
// estimated carry CARRY1 + CARRY2 is compared with the value chosen from
// the exhaustive carry statistics of each width, written out here as
// lists of flag patterns (flags read y''(G-2) .. y''(0)):
//   8 bit : carry 1 only for 111
//   10 bit: carry 1 for 0111, 1011, 1101, 1110, 1111
//   12 bit: carry 0 for 00000, the five one-hot patterns and the ten
//           patterns with two flags; carry 2 for 11111; carry 1 otherwise
// CARRY2 must stay 0 at 8 and 10 bits. Combinational.
module tb_carry_estimator;

  logic [2:0] nz8;
  logic [3:0] nz10;
  logic [4:0] nz12;
  logic [1:0] c8, c10, c12;
  int checks = 0, failures = 0;

  carry_estimator #(.N(8))  dut8  (.nz(nz8),  .carry(c8));
  carry_estimator #(.N(10)) dut10 (.nz(nz10), .carry(c10));
  carry_estimator #(.N(12)) dut12 (.nz(nz12), .carry(c12));

  localparam int ONES10 [5]  = '{4'b0111, 4'b1011, 4'b1101, 4'b1110, 4'b1111};
  localparam int ZERO12 [16] = '{5'b00000, 5'b00001, 5'b00010, 5'b00100, 5'b01000,
                                 5'b10000, 5'b00011, 5'b00101, 5'b00110, 5'b01001,
                                 5'b01010, 5'b01100, 5'b10001, 5'b10010, 5'b10100,
                                 5'b11000};

  function automatic int value(logic [1:0] c);
    return int'(c[0]) + int'(c[1]);
  endfunction

  task automatic expect_eq(string what, int code, int got, int want);
    checks++;
    if (got != want) begin
      failures++;
      $display("FAIL %s flags=%b carry=%0d expected=%0d", what, code[4:0], got, want);
    end
  endtask

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 8; k++) begin
      nz8 = 3'(k);
      #1;
      expect_eq("n=8", k, value(c8), (k == 7) ? 1 : 0);
      expect_eq("n=8 CARRY2", k, int'(c8[1]), 0);
    end
    for (int k = 0; k < 16; k++) begin
      int want;
      want = 0;
      nz10 = 4'(k);
      #1;
      foreach (ONES10[m]) if (ONES10[m] == k) want = 1;
      expect_eq("n=10", k, value(c10), want);
      expect_eq("n=10 CARRY2", k, int'(c10[1]), 0);
    end
    for (int k = 0; k < 32; k++) begin
      int want;
      want = 1;
      nz12 = 5'(k);
      #1;
      foreach (ZERO12[m]) if (ZERO12[m] == k) want = 0;
      if (k == 31) want = 2;
      expect_eq("n=12", k, value(c12), want);
      expect_eq("n=12 CARRY2", k, int'(c12[1]), (k == 31) ? 1 : 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
