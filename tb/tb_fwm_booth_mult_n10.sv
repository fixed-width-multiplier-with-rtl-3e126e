// Testbench for fwm_booth_mult configured for 10-bit operands (N = 10).
// Runs all 2^20 operand pairs through the multiplier and checks:
//   * every output against the arithmetic reference model (fwm_ref_pkg);
//   * the error statistics against the published 10-bit figures
//     (maximum absolute error 768, mean 164.733 within 0.1 %, mean-square
//     4.11e4 within 1 %), and the direct-truncation figures of the
//     reference (2560 and 960.25) as a check of the LP partition;
//   * the histogram of actual LP_minor -> LP_major carries per flag pattern
//     against the published 10-bit exhaustive table;
//   * that every mechanism occurs: each Booth digit -2..+2, estimated
//     carry 0 and 1, bias values 0..3 and the one wrapping product.
// The multiplier is combinational: one time step per operand pair.
module tb_fwm_booth_mult_n10;
  import fwm_ref_pkg::*;

  localparam int N = 10;
  localparam int G = N / 2;

  logic [N-1:0] x, y, p;
  int checks = 0, failures = 0;

  fwm_booth_mult #(.N(N)) dut (.x(x), .y(y), .p(p));

  // published carry histogram, rows y''3 .. y''0 = 0000 .. 1111,
  // columns: cases with carry 0, 1, 2, 3, 4
  localparam int HIST [16][5] = '{
    '{ 4096,      0,      0,     0,  0},
    '{12240,     48,      0,     0,  0},
    '{12096,    192,      0,     0,  0},
    '{18400,  18416,     48,     0,  0},
    '{11520,    768,      0,     0,  0},
    '{18592,  18224,     48,     0,  0},
    '{18304,  18368,    192,     0,  0},
    '{17344,  75456,  17744,    48,  0},
    '{ 9216,   3072,      0,     0,  0},
    '{19360,  17456,     48,     0,  0},
    '{19072,  17600,    192,     0,  0},
    '{17664,  74048,  18832,    48,  0},
    '{17920,  18176,    768,     0,  0},
    '{18592,  72768,  19184,    48,  0},
    '{17664,  73472,  19264,   192,  0},
    '{12960, 153344, 151680, 13744, 48}
  };

  int     hist [16][5];
  int     digit_seen [5];
  int     carry_seen [2];
  int     bias_seen [8];
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
    #4000000;
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
    $display("10-bit errors: max=%0d mean=%f mse=%f (published 768, 164.733, 4.11e4)",
             emax, real'(esum) / 1048576.0, real'(esq) / 1048576.0);
    $display("10-bit direct truncation: max=%0d mean=%f (published 2560, 960.25)",
             dmax, real'(dsum) / 1048576.0);
    check("maximum error", emax == 768);
    check("mean error", real'(esum) / 1048576.0 > 164.733 * 0.999 && real'(esum) / 1048576.0 < 164.733 * 1.001);
    check("mean-square error", real'(esq) / 1048576.0 > 4.11e4 * 0.99 && real'(esq) / 1048576.0 < 4.11e4 * 1.01);
    check("direct truncation max", dmax == 2560);
    check("direct truncation mean", dsum == 960 * 1048576 + 1048576 / 4);
    foreach (HIST[a, b]) begin
      checks++;
      if (hist[a][b] != HIST[a][b]) begin
        failures++;
        $display("FAIL carry histogram flags=%b carry=%0d: %0d, published %0d", 4'(a), b, hist[a][b], HIST[a][b]);
      end
    end
    $display("mechanisms: digits -2..2 = %0d %0d %0d %0d %0d, estimated carry 0/1 = %0d/%0d, bias 0..4 = %0d %0d %0d %0d %0d, wraps = %0d",
             digit_seen[0], digit_seen[1], digit_seen[2], digit_seen[3], digit_seen[4],
             carry_seen[0], carry_seen[1], bias_seen[0], bias_seen[1], bias_seen[2], bias_seen[3], bias_seen[4], wraps);
    foreach (digit_seen[a]) check($sformatf("digit %0d never used", a - 2), digit_seen[a] > 0);
    foreach (carry_seen[a]) check($sformatf("estimated carry %0d never produced", a), carry_seen[a] > 0);
    for (int a = 0; a < 4; a++) check($sformatf("bias %0d never produced", a), bias_seen[a] > 0);
    check("wrapping product never applied", wraps == 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
