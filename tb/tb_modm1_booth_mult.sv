// tb_modm1_booth_mult: self-checking test of the modulo 2^n-1 Booth
// multiplier. Every pair of 8-bit operands is applied to the default
// (Kogge-Stone) instance and to a Brent-Kung one, every pair of 4-bit and
// 6-bit operands to smaller instances; P must equal A * B modulo 2^n-1
// (residues compared: 0 and 2^n-1 both stand for zero).
module tb_modm1_booth_mult;

  import modarith_pkg::*;

  int checks = 0, failures = 0, n_negdig = 0, n_allones = 0;

  logic [7:0] a, b, p, p_bk;
  logic [3:0] a4, b4, p4;
  logic [5:0] a6, b6, p6;

  modm1_booth_mult #(.N(8))                  u_dut (.a, .b, .p);
  modm1_booth_mult #(.N(8), .ADDER(ADD_BKA)) u_bk  (.a, .b, .p(p_bk));
  modm1_booth_mult #(.N(4))                  u_n4  (.a(a4), .b(b4), .p(p4));
  modm1_booth_mult #(.N(6))                  u_n6  (.a(a6), .b(b6), .p(p6));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int want;
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        a = 8'(i); b = 8'(j);
        a4 = 4'(i); b4 = 4'(j); a6 = 6'(i); b6 = 6'(j);
        #1;
        want = (i * j) % 255;
        if (b[1] || b[3] || b[5] || b[7]) n_negdig++;
        if (p == 8'hff) n_allones++;
        checks += 2;
        if (int'(p) % 255 != want || int'(p_bk) % 255 != want) begin
          failures++;
          if (failures < 10) $display("A=%0d B=%0d: got %0d / %0d want %0d", i, j, p, p_bk, want);
        end
        if (i < 16 && j < 16) begin
          checks++;
          if (int'(p4) % 15 != (i * j) % 15) failures++;
        end
        if (i < 64 && j < 64) begin
          checks++;
          if (int'(p6) % 63 != (i * j) % 63) failures++;
        end
      end
    end
    if (n_negdig == 0) failures++;
    $display("all-ones zero codes: %0d", n_allones);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
