// tb_eac_csa_row: self-checking test of the end-around carry-save row.
// Random triples: s must be the bitwise sum x ^ y ^ z, and s + c must equal
// x + y + z modulo 255.
module tb_eac_csa_row;

  int checks = 0, failures = 0, n_wrap = 0;
  logic [7:0] x, y, z, s, c;

  eac_csa_row #(.N(8)) u_dut (.x, .y, .z, .s, .c);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 20000; t++) begin
      x = 8'($urandom); y = 8'($urandom); z = 8'($urandom);
      #1;
      if ((x[7] & y[7]) | (x[7] & z[7]) | (y[7] & z[7])) n_wrap++;
      checks++;
      if (s !== (x ^ y ^ z) || (int'(s) + int'(c)) % 255 != (int'(x) + int'(y) + int'(z)) % 255) begin
        failures++;
        if (failures < 10) $display("x=%h y=%h z=%h: s=%h c=%h", x, y, z, s, c);
      end
    end
    if (n_wrap == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
