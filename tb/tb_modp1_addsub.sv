// tb_modp1_addsub: self-checking test of the combined modulo 2^n+1
// adder/subtractor (normal representation).
//
// Every operand pair A, B in [0, 256] and both modes are applied to 8-bit
// instances on all four carry networks, and every pair in [0, 16] to a 4-bit
// ripple-carry instance. Expected: (A + B) mod 257 or (A - B) mod 257 (17 for
// n = 4), from integer arithmetic. Counts the special subtract case
// (A = 2^n, B < 2^n) and results equal to 2^n, and fails if either never
// occurred.
module tb_modp1_addsub;

  import modarith_pkg::*;

  int checks = 0, failures = 0, n_special = 0, n_top = 0;

  logic [8:0] a, b;
  logic       m;
  logic [8:0] d [4];
  logic [4:0] a4, b4, d4;

  modp1_addsub #(.N(8), .ADDER(ADD_RCA)) u_rca (.a, .b, .m, .d(d[0]));
  modp1_addsub #(.N(8), .ADDER(ADD_CLA)) u_cla (.a, .b, .m, .d(d[1]));
  modp1_addsub #(.N(8), .ADDER(ADD_KSA)) u_ksa (.a, .b, .m, .d(d[2]));
  modp1_addsub #(.N(8), .ADDER(ADD_BKA)) u_bka (.a, .b, .m, .d(d[3]));
  modp1_addsub #(.N(4), .ADDER(ADD_RCA)) u_rca4 (.a(a4), .b(b4), .m, .d(d4));

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int want, want4;
    for (int mode = 0; mode < 2; mode++) begin
      for (int i = 0; i <= 256; i++) begin
        for (int j = 0; j <= 256; j++) begin
          a = 9'(i); b = 9'(j); m = mode[0];
          a4 = 5'(i % 17); b4 = 5'(j % 17);
          #1;
          want  = mode ? (i - j + 257) % 257 : (i + j) % 257;
          want4 = mode ? ((i % 17) - (j % 17) + 17) % 17 : ((i % 17) + (j % 17)) % 17;
          if (mode == 1 && i == 256 && j < 256) n_special++;
          if (want == 256) n_top++;
          for (int k = 0; k < 4; k++) begin
            checks++;
            if (d[k] !== 9'(want)) begin
              failures++;
              if (failures < 10) $display("adder %0d m=%0d A=%0d B=%0d got %0d want %0d", k, mode, i, j, d[k], want);
            end
          end
          checks++;
          if (d4 !== 5'(want4)) begin
            failures++;
            if (failures < 10) $display("n=4 m=%0d A=%0d B=%0d got %0d want %0d", mode, a4, b4, d4, want4);
          end
        end
      end
    end
    if (n_special == 0 || n_top == 0) failures++;
    $display("special subtract cases %0d, results 2^n %0d", n_special, n_top);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
