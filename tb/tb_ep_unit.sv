// tb_ep_unit: drives the element-wise product stage with random and extreme
// gains and model values and compares e_sac, f_sac, e_mac and f_mac with the
// integer reference model (ac - bd and ad + bc, each cut to its format).
module tb_ep_unit;
  import ls_pkg::*;
  import tb_ref_pkg::*;

  logic signed [A_WL-1:0] a;
  logic signed [B_WL-1:0] b;
  logic signed [C_WL-1:0] c;
  logic signed [D_WL-1:0] d;
  logic signed [ESAC_WL-1:0] e_sac;
  logic signed [FSAC_WL-1:0] f_sac;
  logic signed [EMAC_WL-1:0] e_mac;
  logic signed [FMAC_WL-1:0] f_mac;

  ep_unit dut (.*);

  int checks = 0, failures = 0;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got=%0d exp=%0d", what, got, exp);
    end
  endtask

  initial begin
    #1000000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint av, bv, cv, dv;
    z_t z;
    for (int n = 0; n < 5000; n++) begin
      av = rnd(A_WL); bv = rnd(B_WL); cv = rnd(C_WL); dv = rnd(D_WL);
      if (n == 0) begin av = 1 <<< A_FL; bv = 0; cv = 1 <<< 10; dv = -(1 <<< 9); end  // g = 1
      a = A_WL'(av); b = B_WL'(bv); c = C_WL'(cv); d = D_WL'(dv);
      #1;
      z = ep(av, bv, cv, dv);
      check("e_sac", e_sac, z.e_sac);
      check("f_sac", f_sac, z.f_sac);
      check("e_mac", e_mac, z.e_mac);
      check("f_mac", f_mac, z.f_mac);
    end
    // g = 1: z equals m exactly
    a = A_WL'(1 <<< A_FL); b = '0; c = C_WL'(1 <<< 10); d = D_WL'(-(1 <<< 9)); #1;
    check("unit gain e", e_mac, 1 <<< 10);
    check("unit gain f", f_mac, -(1 <<< 10));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
