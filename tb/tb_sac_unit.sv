// tb_sac_unit: streams groups of random z values through the square-accumulate
// stage, exact and with 8-bit input truncation, with the first-term load and an
// unbiasing init value, and compares the running sum every cycle with the
// integer reference model. Also checks that en = 0 holds the register.
module tb_sac_unit;
  import ls_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0, en = 0, first = 0;
  logic signed [SAC_WL-1:0]  init;
  logic signed [ESAC_WL-1:0] e_sac;
  logic signed [FSAC_WL-1:0] f_sac;
  logic signed [SAC_WL-1:0]  nx_ex, nx_ax, sac_ex, sac_ax;

  sac_unit u_ex (.clk, .rst_n, .en, .first, .init, .e_sac, .f_sac, .acc_next(nx_ex), .sac(sac_ex));
  sac_unit #(.METHOD(AM_INPUT_TRUNC), .TRUNC_E(8), .TRUNC_F(8)) u_ax
    (.clk, .rst_n, .en, .first, .init, .e_sac, .f_sac, .acc_next(nx_ax), .sac(sac_ax));

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
    longint ex, ax, ev, fv, iv;
    cfg_t cx;
    cx = exact_cfg(); cx.m = AM_INPUT_TRUNC; cx.t_esac = 8; cx.t_fsac = 8;
    init = '0; e_sac = '0; f_sac = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    ex = 0; ax = 0;
    for (int g = 0; g < 40; g++) begin
      iv = (g % 2) ? rnd(12) : 0;
      for (int n = 0; n < 16; n++) begin
        @(negedge clk);
        ev = rnd(ESAC_WL - 3); fv = rnd(FSAC_WL - 3);   // |z| well inside range
        e_sac = ESAC_WL'(ev); f_sac = FSAC_WL'(fv);
        init = SAC_WL'(iv);
        first = (n == 0);
        en = ($urandom_range(0, 3) != 0);
        if (en) begin
          ex = wrap((first ? iv : ex) + sac_term(ev, fv, exact_cfg()), SAC_WL);
          ax = wrap((first ? iv : ax) + sac_term(ev, fv, cx), SAC_WL);
        end
        @(posedge clk); #1;
        check("sac exact", sac_ex, ex);
        check("sac input-trunc", sac_ax, ax);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
