// tb_booth_selector_row: self-checking test of the Booth selector rows.
//
// For rows 0..3 of an 8-bit multiplier, every multiplicand and every digit in
// {-2..2} is applied; the partial product must equal d * 4^row * A modulo 255
// (residues compared, since 0 and 255 both stand for zero).
module tb_booth_selector_row;

  int checks = 0, failures = 0;
  logic [7:0] a;
  logic one, two, neg;
  logic [7:0] pp [4];

  booth_selector_row #(.N(8), .ROW(0)) u_r0 (.a, .one, .two, .neg, .pp(pp[0]));
  booth_selector_row #(.N(8), .ROW(1)) u_r1 (.a, .one, .two, .neg, .pp(pp[1]));
  booth_selector_row #(.N(8), .ROW(2)) u_r2 (.a, .one, .two, .neg, .pp(pp[2]));
  booth_selector_row #(.N(8), .ROW(3)) u_r3 (.a, .one, .two, .neg, .pp(pp[3]));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint want, w4;
    for (int dg = -2; dg <= 2; dg++) begin
      for (int i = 0; i < 256; i++) begin
        a   = 8'(i);
        one = (dg == 1 || dg == -1);
        two = (dg == 2 || dg == -2);
        neg = (dg < 0);
        #1;
        w4 = 1;
        for (int r = 0; r < 4; r++) begin
          want = ((longint'(dg) * w4 * i) % 255 + 255) % 255;
          checks++;
          if (longint'(pp[r]) % 255 != want) begin
            failures++;
            if (failures < 10) $display("row %0d d=%0d A=%0d: got %0d want %0d (mod 255)", r, dg, i, pp[r], want);
          end
          w4 = w4 * 4;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
