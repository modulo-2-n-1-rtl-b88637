// tb_eac_adder: self-checking test of the modulo 2^n-1 end-around-carry adder.
//
// For every pair of 8-bit operands and every carry network, compares s with
// the exact expected code: x + z when it is below 256 (255 = x + z is the
// all-ones zero code), else x + z - 255.
module tb_eac_adder;

  import modarith_pkg::*;

  int checks = 0, failures = 0, n_wrap = 0;

  logic [7:0] x, z;
  logic [7:0] s [4];

  eac_adder #(.N(8), .ADDER(ADD_RCA)) u_rca (.x, .z, .s(s[0]));
  eac_adder #(.N(8), .ADDER(ADD_CLA)) u_cla (.x, .z, .s(s[1]));
  eac_adder #(.N(8), .ADDER(ADD_KSA)) u_ksa (.x, .z, .s(s[2]));
  eac_adder #(.N(8), .ADDER(ADD_BKA)) u_bka (.x, .z, .s(s[3]));

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
        x = 8'(i); z = 8'(j);
        #1;
        want = (i + j < 256) ? i + j : i + j - 255;
        if (i + j >= 256) n_wrap++;
        for (int k = 0; k < 4; k++) begin
          checks++;
          if (s[k] !== 8'(want)) begin
            failures++;
            if (failures < 10) $display("adder %0d: %0d+%0d got %0d want %0d", k, i, j, s[k], want);
          end
        end
      end
    end
    if (n_wrap == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
