// Self-checking testbench for mp_adder (N = 8, the default).
// Drives random partial-product rows and biases. The reference treats each
// row as an N+1-bit signed number at column 2i, computes the exact sum of
// all rows, subtracts the unsigned value of the row bits that fall into the
// n-1 truncated columns, adds bias * 2^(n-1) and keeps columns n-1 .. 2n-2.
// Combinational: one time step per vector.
module tb_mp_adder;

  localparam int N  = 8;
  localparam int G  = N / 2;
  localparam int BW = 3;

  logic [G-1:0][N:0] pp;
  logic [BW-1:0]     bias;
  logic [N-1:0]      p;
  int checks = 0, failures = 0;

  mp_adder #(.N(N), .BW(BW)) dut (.pp(pp), .bias(bias), .p(p));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 20000; v++) begin
      longint total, lp, want;
      for (int i = 0; i < G; i++) pp[i] = (N + 1)'($urandom);
      bias = BW'($urandom_range(0, 3));
      if (v < 4) begin   // corner rows: all ones, all zeros
        for (int i = 0; i < G; i++) pp[i] = (v[0]) ? '1 : '0;
        bias = BW'(v);
      end
      #1;
      total = 0;
      lp = 0;
      for (int i = 0; i < G; i++) begin
        longint placed;
        total += longint'(signed'(pp[i])) * (longint'(1) << (2 * i));
        placed = longint'(pp[i]) << (2 * i);             // unsigned row bits
        lp += placed & ((longint'(1) << (N - 1)) - 1);   // truncated part
      end
      want = (total - lp + (longint'(bias) << (N - 1))) >>> (N - 1);
      checks++;
      if (p !== N'(want)) begin
        failures++;
        $display("FAIL v=%0d p=%h expected=%h", v, p, N'(want));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
