// Self-checking testbench for booth_encoder.
// Applies all eight triplets and compares the five control signals with
// the radix-4 Booth encoding table written out below, and checks that the
// selected multiple (+-1, +-2 or 0) equals the digit value
// -2*y(2i+1) + y(2i) + y(2i-1). Combinational: one time step per triplet.
module tb_booth_encoder;
  import fwm_pkg::*;

  logic [2:0] trip;
  booth_enc_t enc;
  int checks = 0, failures = 0;

  booth_encoder dut (.trip(trip), .enc(enc));

  // expected {one, two, neg, zero, cor} for triplets 000 .. 111
  localparam logic [4:0] TABLE [8] = '{
    5'b00010,   // 000 :  0
    5'b10000,   // 001 : +X
    5'b10000,   // 010 : +X
    5'b01000,   // 011 : +2X
    5'b01101,   // 100 : -2X
    5'b10101,   // 101 : -X
    5'b10101,   // 110 : -X
    5'b00110    // 111 :  0
  };

  initial begin : watchdog
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 8; t++) begin
      int digit, mult;
      trip = 3'(t);
      #1;
      checks++;
      if (enc !== TABLE[t]) begin
        failures++;
        $display("FAIL trip=%b enc=%b expected=%b", trip, enc, TABLE[t]);
      end
      digit = -2 * int'(trip[2]) + int'(trip[1]) + int'(trip[0]);
      mult  = enc.zero ? 0 : (enc.two ? 2 : (enc.one ? 1 : 0));
      if (enc.neg && !enc.zero) mult = -mult;
      checks++;
      if (mult != digit) begin
        failures++;
        $display("FAIL trip=%b digit=%0d encoded multiple=%0d", trip, digit, mult);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
