// ep_unit: element-wise product (EP) stage, z = m * g for one term.
//
// The complex product (a + ib)(c + id) = (ac - bd) + i(ad + bc) is formed with
// four exact partial-product multipliers, one subtractor and one adder. Each
// product is cut to its optimised accurate-core format (ac 23.25, bd 21.25,
// ad 23.26, bc 24.26); the difference e and the sum f are kept one bit wider
// than their widest operand and are then cut separately to the formats seen by
// the square-accumulate stage (e_sac 21.23, f_sac 20.22) and by the
// multiply-accumulate stage (e_mac 23.25, f_mac 24.26). EP is never
// approximated. Purely combinational: the only registers of the datapath are
// the accumulators. The formats follow the document; cutting by rounding to
// nearest and the width of e and f are this design's choice.
module ep_unit
  import ls_pkg::*;
(
  input  logic signed [A_WL-1:0]    a,      // real(g)
  input  logic signed [B_WL-1:0]    b,      // imag(g)
  input  logic signed [C_WL-1:0]    c,      // real(m)
  input  logic signed [D_WL-1:0]    d,      // imag(m)
  output logic signed [ESAC_WL-1:0] e_sac,
  output logic signed [FSAC_WL-1:0] f_sac,
  output logic signed [EMAC_WL-1:0] e_mac,
  output logic signed [FMAC_WL-1:0] f_mac
);
  localparam int unsigned E_WL = ((AC_WL > BD_WL) ? AC_WL : BD_WL) + 1;
  localparam int unsigned E_FL = AC_FL;  // ac and bd share FL
  localparam int unsigned F_WL = ((AD_WL > BC_WL) ? AD_WL : BC_WL) + 1;
  localparam int unsigned F_FL = AD_FL;  // ad and bc share FL

  logic signed [A_WL+C_WL-1:0] ac_full;
  logic signed [B_WL+D_WL-1:0] bd_full;
  logic signed [A_WL+D_WL-1:0] ad_full;
  logic signed [B_WL+C_WL-1:0] bc_full;
  logic signed [AC_WL-1:0] ac;
  logic signed [BD_WL-1:0] bd;
  logic signed [AD_WL-1:0] ad;
  logic signed [BC_WL-1:0] bc;
  logic signed [E_WL-1:0]  e;
  logic signed [F_WL-1:0]  f;

  approx_mult #(.WA(A_WL), .WB(C_WL)) u_ac (.a(a), .b(c), .p(ac_full));
  approx_mult #(.WA(B_WL), .WB(D_WL)) u_bd (.a(b), .b(d), .p(bd_full));
  approx_mult #(.WA(A_WL), .WB(D_WL)) u_ad (.a(a), .b(d), .p(ad_full));
  approx_mult #(.WA(B_WL), .WB(C_WL)) u_bc (.a(b), .b(c), .p(bc_full));

  fx_requant #(.WI(A_WL+C_WL), .FI(A_FL+C_FL), .WO(AC_WL), .FO(AC_FL)) q_ac (.din(ac_full), .dout(ac));
  fx_requant #(.WI(B_WL+D_WL), .FI(B_FL+D_FL), .WO(BD_WL), .FO(BD_FL)) q_bd (.din(bd_full), .dout(bd));
  fx_requant #(.WI(A_WL+D_WL), .FI(A_FL+D_FL), .WO(AD_WL), .FO(AD_FL)) q_ad (.din(ad_full), .dout(ad));
  fx_requant #(.WI(B_WL+C_WL), .FI(B_FL+C_FL), .WO(BC_WL), .FO(BC_FL)) q_bc (.din(bc_full), .dout(bc));

  always_comb begin
    e = E_WL'(ac) - E_WL'(bd);
    f = F_WL'(ad) + F_WL'(bc);
  end

  fx_requant #(.WI(E_WL), .FI(E_FL), .WO(ESAC_WL), .FO(ESAC_FL)) q_esac (.din(e), .dout(e_sac));
  fx_requant #(.WI(F_WL), .FI(F_FL), .WO(FSAC_WL), .FO(FSAC_FL)) q_fsac (.din(f), .dout(f_sac));
  fx_requant #(.WI(E_WL), .FI(E_FL), .WO(EMAC_WL), .FO(EMAC_FL)) q_emac (.din(e), .dout(e_mac));
  fx_requant #(.WI(F_WL), .FI(F_FL), .WO(FMAC_WL), .FO(FMAC_FL)) q_fmac (.din(f), .dout(f_mac));

endmodule
