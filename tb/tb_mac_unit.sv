// tb_mac_unit: streams random z and visibility values through the
// multiply-accumulate stage, exact and with the input truncation of the
// approximate core (e_mac 8 bits, f_mac 12 bits), with first-term loads of
// unbiasing values, and compares both accumulators every cycle with the
// integer reference model. A known case checks the sign convention
// (real = eh - ft, imaginary = et + fh).
module tb_mac_unit;
  import ls_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0, en = 0, first = 0;
  logic signed [MACR_WL-1:0] init_real;
  logic signed [MACI_WL-1:0] init_imag;
  logic signed [EMAC_WL-1:0] e_mac;
  logic signed [FMAC_WL-1:0] f_mac;
  logic signed [H_WL-1:0]    h;
  logic signed [T_WL-1:0]    t;
  logic signed [MACR_WL-1:0] rn_ex, rn_ax, mr_ex, mr_ax;
  logic signed [MACI_WL-1:0] in_ex, in_ax, mi_ex, mi_ax;

  mac_unit u_ex (.clk, .rst_n, .en, .first, .init_real, .init_imag, .e_mac, .f_mac, .h, .t,
                 .real_next(rn_ex), .imag_next(in_ex), .mac_real(mr_ex), .mac_imag(mi_ex));
  mac_unit #(.METHOD(AM_INPUT_TRUNC), .TRUNC_E(8), .TRUNC_F(12)) u_ax
                (.clk, .rst_n, .en, .first, .init_real, .init_imag, .e_mac, .f_mac, .h, .t,
                 .real_next(rn_ax), .imag_next(in_ax), .mac_real(mr_ax), .mac_imag(mi_ax));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got=%0d exp=%0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint xr, xi, ar, ai, ev, fv, hv, tv, ir, ii, tr, ti;
    cfg_t cx;
    cx = exact_cfg(); cx.m = AM_INPUT_TRUNC; cx.t_emac = 8; cx.t_fmac = 12;
    init_real = '0; init_imag = '0; e_mac = '0; f_mac = '0; h = '0; t = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // z = 0.0625 + 0.03125i, v = 2 + 1i  ->  v*z = 0.09375 + 0.125i
    @(negedge clk);
    e_mac = EMAC_WL'(1 <<< (EMAC_FL - 4)); f_mac = FMAC_WL'(1 <<< (FMAC_FL - 5));
    h = H_WL'(2 <<< H_FL); t = T_WL'(1 <<< T_FL); first = 1; en = 1;
    @(posedge clk); #1;
    check("known real", mr_ex, 3 <<< (MACR_FL - 5));
    check("known imag", mi_ex, 1 <<< (MACI_FL - 3));
    xr = 0; xi = 0; ar = 0; ai = 0;
    for (int g = 0; g < 40; g++) begin
      ir = (g % 2) ? rnd(14) : 0;
      ii = (g % 2) ? rnd(14) : 0;
      for (int n = 0; n < 16; n++) begin
        @(negedge clk);
        ev = rnd(EMAC_WL - 4); fv = rnd(FMAC_WL - 4); hv = rnd(H_WL - 1); tv = rnd(T_WL - 1);
        e_mac = EMAC_WL'(ev); f_mac = FMAC_WL'(fv); h = H_WL'(hv); t = T_WL'(tv);
        init_real = MACR_WL'(ir); init_imag = MACI_WL'(ii);
        first = (n == 0);
        en = ($urandom_range(0, 3) != 0);
        if (en) begin
          mac_term(ev, fv, hv, tv, exact_cfg(), tr, ti);
          xr = wrap((first ? ir : xr) + tr, MACR_WL); xi = wrap((first ? ii : xi) + ti, MACI_WL);
          mac_term(ev, fv, hv, tv, cx, tr, ti);
          ar = wrap((first ? ir : ar) + tr, MACR_WL); ai = wrap((first ? ii : ai) + ti, MACI_WL);
        end
        @(posedge clk); #1;
        check("mac_real exact", mr_ex, xr);
        check("mac_imag exact", mi_ex, xi);
        check("mac_real input-trunc", mr_ax, ar);
        check("mac_imag input-trunc", mi_ax, ai);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
