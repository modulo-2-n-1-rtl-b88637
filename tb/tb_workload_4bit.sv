// tb_workload_4bit: end-to-end test of modulo_arith_top built for 4-bit computations (n = 4: moduli 17 and 15).
//
// Sweeps every normal-representation operand pair A, B in [0, 2^n] in both
// modes through the three normal-representation units, feeds the same values
// in diminished-one form (X* = X - 1, zero flag X_z) to the two
// diminished-one subtractors, and the low n bits of A and B to the modulo
// 2^n-1 multiplier. Expected values come from integer arithmetic:
// (A +- B) mod 2^n+1, and A * B mod 2^n-1 (residues compared). Each mechanism
// of the design is counted and must occur at least once: add and subtract
// modes, the subtract case A = 2^n with B < 2^n (carry gating / multiplexer),
// a result of 2^n (IEAC adder MSB from complementary inputs), each
// diminished-one zero-operand case and a zero difference, negative and
// double Booth digits, products whose high half is folded back by the
// end-around carries, and the all-ones zero code of the product.
module tb_workload_4bit;

  localparam int N    = 4;
  localparam int MP1  = (1 << N) + 1;
  localparam int MM1  = (1 << N) - 1;

  int checks = 0, failures = 0;
  int n_add = 0, n_sub = 0, n_special = 0, n_top = 0;
  int n_az = 0, n_bz = 0, n_both = 0, n_dz = 0;
  int n_negdig = 0, n_twodig = 0, n_eac = 0, n_allones = 0;

  logic [N:0]   a, b, d_addsub_rca, d_addsub_cla, d_sub_mux;
  logic         m, a_z, b_z, dz_dim_ks, dz_dim_bk;
  logic [N-1:0] a_dim, b_dim, d_dim_ks, d_dim_bk, mul_a, mul_b, prod;

  modulo_arith_top #(.N(N)) u_dut (
    .a, .b, .m, .a_dim, .a_z, .b_dim, .b_z, .mul_a, .mul_b,
    .d_addsub_rca, .d_addsub_cla, .d_sub_mux,
    .d_dim_ks, .dz_dim_ks, .d_dim_bk, .dz_dim_bk, .prod
  );

  task automatic check(input bit ok, input string what, input int i, input int j);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("%s mismatch: A=%0d B=%0d m=%0d", what, i, j, m);
    end
  endtask

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sum, dif, pr;
    logic [N:0] bx;
    for (int mode = 0; mode < 2; mode++) begin
      for (int i = 0; i <= (1 << N); i++) begin
        for (int j = 0; j <= (1 << N); j++) begin
          a = (N+1)'(i); b = (N+1)'(j); m = mode[0];
          a_z = (i == 0); b_z = (j == 0);
          a_dim = a_z ? N'($urandom) : N'(i - 1);
          b_dim = b_z ? N'($urandom) : N'(j - 1);
          mul_a = N'(i); mul_b = N'(j);
          #1;
          sum = (i + j) % MP1;
          dif = (i - j + MP1) % MP1;
          pr  = (int'(mul_a) * int'(mul_b)) % MM1;
          // normal representation
          check(d_addsub_rca == (N+1)'(mode ? dif : sum), "addsub rca", i, j);
          check(d_addsub_cla == (N+1)'(mode ? dif : sum), "addsub cla", i, j);
          check(d_sub_mux == (N+1)'(dif), "sub mux", i, j);
          if (mode) n_sub++; else n_add++;
          if (mode && i == (1 << N) && j < (1 << N)) n_special++;
          if ((mode ? dif : sum) == (1 << N)) n_top++;
          // diminished-one, checked once per operand pair
          if (mode == 1) begin
            check(dz_dim_ks == (dif == 0) && (dif == 0 || d_dim_ks == N'(dif - 1)), "dim1 ks", i, j);
            check(dz_dim_bk == (dif == 0) && (dif == 0 || d_dim_bk == N'(dif - 1)), "dim1 bk", i, j);
            if (a_z && b_z) n_both++; else if (a_z) n_az++; else if (b_z) n_bz++;
            if (dif == 0) n_dz++;
          end
          // multiplier
          check(int'(prod) % MM1 == pr, "multiplier", i, j);
          bx = {mul_b, mul_b[N-1]};
          for (int k = 0; k < N / 2; k++) begin
            if (bx[2*k+2]) n_negdig++;
            if (bx[2*k+2 -: 3] == 3'b100 || bx[2*k+2 -: 3] == 3'b011) n_twodig++;
          end
          if (int'(mul_a) * int'(mul_b) > MM1) n_eac++;  // high half folded back
          if (prod == N'(MM1)) n_allones++;
        end
      end
    end
    $display("add %0d sub %0d special-subtract %0d result-2^n %0d", n_add, n_sub, n_special, n_top);
    $display("dim1: A zero %0d B zero %0d both %0d zero result %0d", n_az, n_bz, n_both, n_dz);
    $display("booth: negative digits %0d double digits %0d folded products %0d all-ones products %0d",
             n_negdig, n_twodig, n_eac, n_allones);
    if (n_add == 0) failures++;
    if (n_sub == 0) failures++;
    if (n_special == 0) failures++;
    if (n_top == 0) failures++;
    if (n_az == 0) failures++;
    if (n_bz == 0) failures++;
    if (n_both == 0) failures++;
    if (n_dz == 0) failures++;
    if (n_negdig == 0) failures++;
    if (n_twodig == 0) failures++;
    if (n_eac == 0) failures++;
    if (n_allones == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
