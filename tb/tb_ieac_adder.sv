// tb_ieac_adder: self-checking test of the n-bit IEAC adder.
//
// For every pair of 8-bit operands, and every carry network, checks that
// {msb, s} equals (x + z + 1) mod 257, computed here with integers; also
// checks a 4-bit Kogge-Stone instance exhaustively against mod 17. Counts how
// often the complementary-input case (result 2^n, msb = 1) occurred.
module tb_ieac_adder;

  import modarith_pkg::*;

  int checks = 0, failures = 0, n_msb = 0;

  logic [7:0] x, z;
  logic [7:0] s [4];
  logic       msb [4];
  logic [3:0] x4, z4, s4;
  logic       msb4;

  ieac_adder #(.N(8), .ADDER(ADD_RCA)) u_rca (.x, .z, .s(s[0]), .msb(msb[0]));
  ieac_adder #(.N(8), .ADDER(ADD_CLA)) u_cla (.x, .z, .s(s[1]), .msb(msb[1]));
  ieac_adder #(.N(8), .ADDER(ADD_KSA)) u_ksa (.x, .z, .s(s[2]), .msb(msb[2]));
  ieac_adder #(.N(8), .ADDER(ADD_BKA)) u_bka (.x, .z, .s(s[3]), .msb(msb[3]));
  ieac_adder #(.N(4), .ADDER(ADD_KSA)) u_ks4 (.x(x4), .z(z4), .s(s4), .msb(msb4));

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
        x4 = 4'(i); z4 = 4'(j);
        #1;
        want = (i + j + 1) % 257;
        if (want == 256) n_msb++;
        for (int k = 0; k < 4; k++) begin
          checks++;
          if ({msb[k], s[k]} !== 9'(want)) begin
            failures++;
            if (failures < 10) $display("adder %0d: %0d+%0d+1 got %0d want %0d", k, i, j, {msb[k], s[k]}, want);
          end
        end
        if (i < 16 && j < 16) begin
          checks++;
          if ({msb4, s4} !== 5'((i + j + 1) % 17)) failures++;
        end
      end
    end
    if (n_msb == 0) failures++;
    $display("complementary-input cases: %0d", n_msb);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
