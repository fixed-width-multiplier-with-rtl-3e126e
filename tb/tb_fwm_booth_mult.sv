// End-to-end testbench for fwm_booth_mult at its default width (N = 8).
// Runs all 65536 operand pairs through the multiplier and checks:
//   * every output against the arithmetic reference model (fwm_ref_pkg);
//   * the error statistics against the published 8-bit figures
//     (maximum absolute error 128, mean 38.24, mean-square 2220.5;
//     mean and mean-square within 1 %), and the direct-truncation figures
//     of the reference (512 and 192.25) as a check of the LP partition;
//   * the histogram of actual LP_minor -> LP_major carries per flag pattern
//     against the published 8-bit exhaustive table;
//   * that every mechanism occurs: each Booth digit -2..+2, estimated
//     carry 0 and 1, every bias value 0..3 and the one wrapping product.
// The multiplier is combinational: one time step per operand pair.
module tb_fwm_booth_mult;
  import fwm_ref_pkg::*;

  localparam int N = 8;
  localparam int G = N / 2;

  logic [N-1:0] x, y, p;
  int checks = 0, failures = 0;

  fwm_booth_mult dut (.x(x), .y(y), .p(p));

  // published carry histogram, rows y''2 y''1 y''0 = 000 .. 111,
  // columns: cases with carry 0, 1, 2, 3
  localparam int HIST [8][4] = '{
    '{1024,     0,    0,  0},
    '{3024,    48,    0,  0},
    '{2880,   192,    0,  0},
    '{4576,  4592,   48,  0},
    '{2304,   768,    0,  0},
    '{4768,  4400,   48,  0},
    '{4480,  4544,  192,  0},
    '{4416, 18368, 4816, 48}
  };

  int     hist [8][4];
  int     digit_seen [5];
  int     carry_seen [2];
  int     bias_seen [4];
  int     wraps = 0;
  longint emax = 0, esum = 0, esq = 0, dmax = 0, dsum = 0;

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (hist[a, b]) hist[a][b] = 0;
    foreach (digit_seen[a]) digit_seen[a] = 0;
    foreach (carry_seen[a]) carry_seen[a] = 0;
    foreach (bias_seen[a]) bias_seen[a] = 0;
    for (int xi = 0; xi < (1 << N); xi++) begin
      for (int yi = 0; yi < (1 << N); yi++) begin
        ref_t   r;
        longint xv, yv, pfull, e;
        x = N'(xi);
        y = N'(yi);
        #1;
        xv = longint'(signed'(x));
        yv = longint'(signed'(y));
        r  = model(N, xv, yv);
        // the N-bit output is compared modulo 2^N
        checks++;
        if (p !== N'(r.pt >>> (N - 1))) begin
          failures++;
          if (failures < 10)
            $display("FAIL x=%0d y=%0d p=%0d expected=%0d", xv, yv, signed'(p), r.pt >>> (N - 1));
        end
        // undo the single wrap before measuring the error
        pfull = longint'(signed'(p));
        if ((r.pt >>> (N - 1)) - pfull >= (longint'(1) << (N - 1))) begin
          pfull += longint'(1) << N;
          wraps++;
        end
        e = r.exact - (pfull << (N - 1));
        if (e < 0) e = -e;
        if (e > emax) emax = e;
        esum += e;
        esq  += e * e;
        if (r.lp > dmax) dmax = r.lp;
        dsum += r.lp;
        hist[r.nz][r.lp_minor >> (N - 2)]++;
        for (int i = 0; i < G; i++) begin
          int d;
          d = (dut.enc[i].neg ? -1 : 1) * (2 * int'(dut.enc[i].two) + int'(dut.enc[i].one));
          if (!dut.enc[i].zero) digit_seen[d + 2]++;
          else digit_seen[2]++;
        end
        carry_seen[int'(dut.carry[0])]++;
        bias_seen[int'(dut.bias)]++;
      end
    end
    $display("8-bit errors: max=%0d mean=%f mse=%f (published 128, 38.24, 2220.5)",
             emax, real'(esum) / 65536.0, real'(esq) / 65536.0);
    $display("8-bit direct truncation: max=%0d mean=%f (published 512, 192.25)",
             dmax, real'(dsum) / 65536.0);
    check("maximum error", emax == 128);
    check("mean error", real'(esum) / 65536.0 > 38.24 * 0.99 && real'(esum) / 65536.0 < 38.24 * 1.01);
    check("mean-square error", real'(esq) / 65536.0 > 2220.5 * 0.99 && real'(esq) / 65536.0 < 2220.5 * 1.01);
    check("direct truncation max", dmax == 512);
    check("direct truncation mean", dsum == 192 * 65536 + 65536 / 4);
    foreach (HIST[a, b]) begin
      checks++;
      if (hist[a][b] != HIST[a][b]) begin
        failures++;
        $display("FAIL carry histogram flags=%b carry=%0d: %0d, published %0d", 3'(a), b, hist[a][b], HIST[a][b]);
      end
    end
    $display("mechanisms: digits -2..2 = %0d %0d %0d %0d %0d, estimated carry 0/1 = %0d/%0d, bias 0..3 = %0d %0d %0d %0d, wraps = %0d",
             digit_seen[0], digit_seen[1], digit_seen[2], digit_seen[3], digit_seen[4],
             carry_seen[0], carry_seen[1], bias_seen[0], bias_seen[1], bias_seen[2], bias_seen[3], wraps);
    foreach (digit_seen[a]) check($sformatf("digit %0d never used", a - 2), digit_seen[a] > 0);
    foreach (carry_seen[a]) check($sformatf("estimated carry %0d never produced", a), carry_seen[a] > 0);
    foreach (bias_seen[a]) check($sformatf("bias %0d never produced", a), bias_seen[a] > 0);
    check("wrapping product never applied", wraps == 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
