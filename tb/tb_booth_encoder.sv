// tb_booth_encoder: self-checking test of the modified Booth encoder. All
// eight bit triples are applied; the digit -2*b2 + b1 + b0 is worked out here
// and compared with the (one, two, neg) code.
module tb_booth_encoder;

  int checks = 0, failures = 0;
  logic [2:0] b3;
  logic one, two, neg;

  booth_encoder u_dut (.b3, .one, .two, .neg);

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int dg, got;
    for (int v = 0; v < 8; v++) begin
      b3 = 3'(v);
      #1;
      dg  = -2 * int'(b3[2]) + int'(b3[1]) + int'(b3[0]);
      got = (two ? 2 : (one ? 1 : 0)) * (neg ? -1 : 1);
      checks++;
      if (got != dg || (one && two) || (dg < 0 && !neg) || (dg > 0 && neg)) begin
        failures++;
        $display("b3=%b: one=%0d two=%0d neg=%0d, digit %0d", b3, one, two, neg, dg);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
