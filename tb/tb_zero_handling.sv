// tb_zero_handling: self-checking test of the diminished-one zero-handling
// unit. All eight input combinations are applied and D_z is compared with the
// rule worked out from D = A - B: zero when both operands are zero, or when
// neither is and the adder inputs are complementary (A* = B*).
module tb_zero_handling;

  int checks = 0, failures = 0;
  logic a_z, b_z, all_p, d_z;

  zero_handling u_dut (.a_z, .b_z, .all_p, .d_z);

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic want;
    for (int v = 0; v < 8; v++) begin
      {a_z, b_z, all_p} = 3'(v);
      #1;
      if (a_z && b_z)        want = 1'b1;
      else if (a_z || b_z)   want = 1'b0;
      else                   want = all_p;
      checks++;
      if (d_z !== want) begin
        failures++;
        $display("a_z=%0d b_z=%0d all_p=%0d: got %0d want %0d", a_z, b_z, all_p, d_z, want);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
