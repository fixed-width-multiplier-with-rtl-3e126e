// Self-checking testbench for booth_ppgen (N = 8, the default).
// For every multiplicand X and every Booth digit d in {-2,-1,0,+1,+2}
// (driven through the encoding signals, with cor = 1 for negative digits)
// it checks that the N+1-bit row, read as a signed number, plus cor equals
// d*X, and that a negative digit gives exactly the bitwise inverse of
// |d|*X. Combinational: one time step per vector.
module tb_booth_ppgen;
  import fwm_pkg::*;

  localparam int N = 8;

  logic [N-1:0] x;
  booth_enc_t   enc;
  logic [N:0]   pp;
  int checks = 0, failures = 0;

  booth_ppgen #(.N(N)) dut (.x(x), .enc(enc), .pp(pp));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int xi = 0; xi < (1 << N); xi++) begin
      for (int d = -2; d <= 2; d++) begin
        longint xv, want, got, mag;
        x   = N'(xi);
        enc = '{one: (d == 1 || d == -1), two: (d == 2 || d == -2),
                neg: (d < 0), zero: (d == 0), cor: (d < 0)};
        #1;
        xv   = longint'(signed'(x));
        want = longint'(d) * xv;
        got  = longint'(signed'(pp)) + longint'(enc.cor);
        checks++;
        if (got != want) begin
          failures++;
          $display("FAIL x=%0d d=%0d row=%b value=%0d expected=%0d", xv, d, pp, got, want);
        end
        if (d < 0) begin
          mag = (d == -2 ? 2 : 1) * xv;
          checks++;
          if (pp !== ~(N + 1)'(mag)) begin
            failures++;
            $display("FAIL x=%0d d=%0d row=%b is not the inverse of |d|X", xv, d, pp);
          end
        end
      end
    end
    // digit 0 from triplet 111 carries neg = 1 but must still give a zero row
    x = 8'h5a;
    enc = '{one: 1'b0, two: 1'b0, neg: 1'b1, zero: 1'b1, cor: 1'b0};
    #1;
    checks++;
    if (pp !== '0) begin
      failures++;
      $display("FAIL zero digit with neg=1 gave row %b", pp);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
