// tb_modp1_sub_dim1: self-checking test of the diminished-one modulo 2^n+1
// subtractor.
//
// Every A, B in [0, 256] is converted to diminished-one form (X* = X - 1,
// X_z = (X == 0); X* is random when X = 0, since it is then unused) and
// applied to 8-bit Kogge-Stone and Brent-Kung instances and, reduced mod 17,
// to a 4-bit instance. Expected: D = (A - B) mod 257; D_z = (D == 0);
// D* = D - 1 when D != 0, and 0..00 when both operands are zero. Counts the
// operand-zero and result-zero cases.
module tb_modp1_sub_dim1;

  import modarith_pkg::*;

  int checks = 0, failures = 0, n_az = 0, n_bz = 0, n_both = 0, n_dz = 0;

  logic [7:0] a_dim, b_dim;
  logic       a_z, b_z;
  logic [7:0] d_dim [2];
  logic       d_z [2];
  logic [3:0] a4, b4, d4;
  logic       a4z, b4z, d4z;

  modp1_sub_dim1 #(.N(8), .ADDER(ADD_KSA)) u_ks (.a_dim, .a_z, .b_dim, .b_z, .d_dim(d_dim[0]), .d_z(d_z[0]));
  modp1_sub_dim1 #(.N(8), .ADDER(ADD_BKA)) u_bk (.a_dim, .a_z, .b_dim, .b_z, .d_dim(d_dim[1]), .d_z(d_z[1]));
  modp1_sub_dim1 #(.N(4), .ADDER(ADD_BKA)) u_bk4 (.a_dim(a4), .a_z(a4z), .b_dim(b4), .b_z(b4z), .d_dim(d4), .d_z(d4z));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int dd, d4w, i4, j4;
    for (int i = 0; i <= 256; i++) begin
      for (int j = 0; j <= 256; j++) begin
        a_z = (i == 0); b_z = (j == 0);
        a_dim = a_z ? 8'($urandom) : 8'(i - 1);
        b_dim = b_z ? 8'($urandom) : 8'(j - 1);
        i4 = i % 17; j4 = j % 17;
        a4z = (i4 == 0); b4z = (j4 == 0);
        a4 = a4z ? 4'($urandom) : 4'(i4 - 1);
        b4 = b4z ? 4'($urandom) : 4'(j4 - 1);
        #1;
        dd  = (i - j + 257) % 257;
        d4w = (i4 - j4 + 17) % 17;
        if (a_z && b_z) n_both++; else if (a_z) n_az++; else if (b_z) n_bz++;
        if (dd == 0) n_dz++;
        for (int k = 0; k < 2; k++) begin
          checks++;
          if (d_z[k] !== (dd == 0) ||
              (dd != 0 && d_dim[k] !== 8'(dd - 1)) ||
              (a_z && b_z && d_dim[k] !== 8'd0)) begin
            failures++;
            if (failures < 10) $display("unit %0d A=%0d B=%0d: got D*=%0d Dz=%0d want D=%0d", k, i, j, d_dim[k], d_z[k], dd);
          end
        end
        checks++;
        if (d4z !== (d4w == 0) || (d4w != 0 && d4 !== 4'(d4w - 1))) begin
          failures++;
          if (failures < 10) $display("n=4 A=%0d B=%0d: got D*=%0d Dz=%0d want D=%0d", i4, j4, d4, d4z, d4w);
        end
      end
    end
    if (n_az == 0 || n_bz == 0 || n_both == 0 || n_dz == 0) failures++;
    $display("A zero %0d, B zero %0d, both %0d, zero results %0d", n_az, n_bz, n_both, n_dz);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
