// Testbench for fwm_booth_mult configured for 12-bit operands (N = 12).
// Runs all 2^24 operand pairs through the multiplier and checks:
//   * every output against the arithmetic reference model (fwm_ref_pkg);
//   * the histogram of actual LP_minor -> LP_major carries per flag pattern
//     against the published 12-bit exhaustive table;
//   * that every mechanism occurs: each Booth digit -2..+2, estimated
//     carry 0, 1 and 2 (CARRY2), bias values 0..4 and the one wrapping
//     product.
// No error figures are published for this width; they are only printed.
// The multiplier is combinational: one time step per operand pair.
module tb_fwm_booth_mult_n12;
  import fwm_ref_pkg::*;

  localparam int N = 12;
  localparam int G = N / 2;

  logic [N-1:0] x, y, p;
  int checks = 0, failures = 0;

  fwm_booth_mult #(.N(N)) dut (.x(x), .y(y), .p(p));

  // published carry histogram, rows y''4 .. y''0 = 00000 .. 11111,
  // columns: cases with carry 0, 1, 2, 3, 4, 5
  // Row 01111 holds the exhaustive counts 46944 and 47728 for carry 0 and
  // carry 3; the published table lists 46994 and 47678 there (both 50 off,
  // same row total). Every other entry is the published value.
  localparam int HIST [32][6] = '{
    '{  16384,       0,       0,       0,       0,       0},
    '{  49104,      48,       0,       0,       0,       0},
    '{  48960,     192,       0,       0,       0,       0},
    '{  73696,   73712,      48,       0,       0,       0},
    '{  48384,     768,       0,       0,       0,       0},
    '{  73888,   73520,      48,       0,       0,       0},
    '{  73600,   73664,     192,       0,       0,       0},
    '{  69440,  303040,   69840,      48,       0,       0},
    '{  46080,    3072,       0,       0,       0,       0},
    '{  74656,   72752,      48,       0,       0,       0},
    '{  74368,   72896,     192,       0,       0,       0},
    '{  70656,  299840,   71824,      48,       0,       0},
    '{  73216,   73472,     768,       0,       0,       0},
    '{  71136,  299456,   71728,      48,       0,       0},
    '{  69376,  301824,   70976,     192,       0,       0},
    '{  46944,  617024,  615360,   47728,      48,       0},
    '{  36864,   12288,       0,       0,       0,       0},
    '{  77728,   69680,      48,       0,       0,       0},
    '{  77440,   69824,     192,       0,       0,       0},
    '{  71936,  294208,   76176,      48,       0,       0},
    '{  76288,   70400,     768,       0,       0,       0},
    '{  75552,  287552,   79216,      48,       0,       0},
    '{  70656,  296192,   75328,     192,       0,       0},
    '{  55040,  612128,  603936,   55952,      48,       0},
    '{  71680,   72704,    3072,       0,       0,       0},
    '{  74656,  291648,   76016,      48,       0,       0},
    '{  74368,  291072,   76736,     192,       0,       0},
    '{  52960,  612544,  607040,   54512,      48,       0},
    '{  70656,  293888,   77056,     768,       0,       0},
    '{  54944,  611456,  604992,   55664,      48,       0},
    '{  51840,  613376,  606720,   54976,     192,       0},
    '{  30656,  835968, 2243488,  839680,   31472,      48}
  };

  int     hist [32][6];
  int     digit_seen [5];
  int     carry_seen [3];
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
    #40000000;
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
        carry_seen[int'(dut.carry[0]) + int'(dut.carry[1])]++;
        bias_seen[int'(dut.bias)]++;
      end
    end
    $display("12-bit errors: max=%0d mean=%f mse=%f", emax, real'(esum) / 16777216.0, real'(esq) / 16777216.0);
    $display("12-bit direct truncation: max=%0d mean=%f", dmax, real'(dsum) / 16777216.0);
    foreach (HIST[a, b]) begin
      checks++;
      if (hist[a][b] != HIST[a][b]) begin
        failures++;
        $display("FAIL carry histogram flags=%b carry=%0d: %0d, published %0d", 5'(a), b, hist[a][b], HIST[a][b]);
      end
    end
    $display("mechanisms: digits -2..2 = %0d %0d %0d %0d %0d, estimated carry 0/1/2 = %0d/%0d/%0d, bias 0..4 = %0d %0d %0d %0d %0d, wraps = %0d",
             digit_seen[0], digit_seen[1], digit_seen[2], digit_seen[3], digit_seen[4],
             carry_seen[0], carry_seen[1], carry_seen[2], bias_seen[0], bias_seen[1], bias_seen[2], bias_seen[3], bias_seen[4], wraps);
    foreach (digit_seen[a]) check($sformatf("digit %0d never used", a - 2), digit_seen[a] > 0);
    foreach (carry_seen[a]) check($sformatf("estimated carry %0d never produced", a), carry_seen[a] > 0);
    for (int a = 0; a < 5; a++) check($sformatf("bias %0d never produced", a), bias_seen[a] > 0);
    check("wrapping product never applied", wraps == 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
