// tb_carry_networks: self-checking test of the four carry networks.
//
// Drives rca_carry, cla_carry, ks_prefix and bk_prefix with every (g, p)
// pair at N = 8 and with random pairs at N = 4 and N = 16, and compares the
// group generate G[i:0] and group propagate P[i:0] of every bit with a
// bit-serial reference computed here. Combinational: inputs are applied, then
// outputs sampled 1 time unit later.
module tb_carry_networks;

  int checks = 0, failures = 0;

  logic [7:0]  g8,  p8;
  logic [3:0]  g4,  p4;
  logic [15:0] g16, p16;

  logic [7:0]  gg8  [4], pp8  [4];
  logic [3:0]  gg4  [4], pp4  [4];
  logic [15:0] gg16 [4], pp16 [4];

  rca_carry #(.N(8))  u_rca8  (.g(g8),  .p(p8),  .gg(gg8[0]),  .pp(pp8[0]));
  cla_carry #(.N(8))  u_cla8  (.g(g8),  .p(p8),  .gg(gg8[1]),  .pp(pp8[1]));
  ks_prefix #(.N(8))  u_ks8   (.g(g8),  .p(p8),  .gg(gg8[2]),  .pp(pp8[2]));
  bk_prefix #(.N(8))  u_bk8   (.g(g8),  .p(p8),  .gg(gg8[3]),  .pp(pp8[3]));
  rca_carry #(.N(4))  u_rca4  (.g(g4),  .p(p4),  .gg(gg4[0]),  .pp(pp4[0]));
  cla_carry #(.N(4))  u_cla4  (.g(g4),  .p(p4),  .gg(gg4[1]),  .pp(pp4[1]));
  ks_prefix #(.N(4))  u_ks4   (.g(g4),  .p(p4),  .gg(gg4[2]),  .pp(pp4[2]));
  bk_prefix #(.N(4))  u_bk4   (.g(g4),  .p(p4),  .gg(gg4[3]),  .pp(pp4[3]));
  rca_carry #(.N(16)) u_rca16 (.g(g16), .p(p16), .gg(gg16[0]), .pp(pp16[0]));
  cla_carry #(.N(16)) u_cla16 (.g(g16), .p(p16), .gg(gg16[1]), .pp(pp16[1]));
  ks_prefix #(.N(16)) u_ks16  (.g(g16), .p(p16), .gg(gg16[2]), .pp(pp16[2]));
  bk_prefix #(.N(16)) u_bk16  (.g(g16), .p(p16), .gg(gg16[3]), .pp(pp16[3]));

  // Reference: walk from bit 0 upwards.
  function automatic void ref_gp(input logic [15:0] g, input logic [15:0] p, input int n,
                                 output logic [15:0] rg, output logic [15:0] rp);
    logic cg, cp;
    cg = 1'b0; cp = 1'b1; rg = '0; rp = '0;
    for (int i = 0; i < n; i++) begin
      cg = g[i] | (p[i] & cg);
      cp = p[i] & cp;
      rg[i] = cg; rp[i] = cp;
    end
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] rg, rp;
    string nm [4] = '{"rca", "cla", "ks", "bk"};
    for (int v = 0; v < 65536; v++) begin
      g8 = v[7:0]; p8 = v[15:8];
      g4 = 4'($urandom); p4 = 4'($urandom);
      g16 = 16'($urandom); p16 = 16'($urandom);
      #1;
      ref_gp({8'b0, g8}, {8'b0, p8}, 8, rg, rp);
      for (int k = 0; k < 4; k++) begin
        checks++;
        if (gg8[k] !== rg[7:0] || pp8[k] !== rp[7:0]) begin
          failures++;
          if (failures < 10) $display("N=8 %s g=%h p=%h: got %h/%h want %h/%h", nm[k], g8, p8, gg8[k], pp8[k], rg[7:0], rp[7:0]);
        end
      end
      ref_gp({12'b0, g4}, {12'b0, p4}, 4, rg, rp);
      for (int k = 0; k < 4; k++) begin
        checks++;
        if (gg4[k] !== rg[3:0] || pp4[k] !== rp[3:0]) begin
          failures++;
          if (failures < 10) $display("N=4 %s mismatch", nm[k]);
        end
      end
      ref_gp(g16, p16, 16, rg, rp);
      for (int k = 0; k < 4; k++) begin
        checks++;
        if (gg16[k] !== rg || pp16[k] !== rp) begin
          failures++;
          if (failures < 10) $display("N=16 %s g=%h p=%h: got %h want %h", nm[k], g16, p16, gg16[k], rg);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
