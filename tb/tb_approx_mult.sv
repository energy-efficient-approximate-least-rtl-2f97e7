// tb_approx_mult: checks the four methods of approx_mult against the integer
// reference model on the MAC operand sizes (e_mac 23 bits x h 18 bits) and on
// a squarer (f_sac 20 x 20), with random and corner operands, and checks the
// error signatures the methods are chosen for: partial-product truncation is
// biased negative, input truncation changes results, DRUM's mean error is
// near zero.
module tb_approx_mult;
  import ls_pkg::*;
  import tb_ref_pkg::*;

  localparam int WA = 23, WB = 18, WS = 20;
  localparam int TA = 8, PPT = 20, K = 12;

  logic signed [WA-1:0] a;
  logic signed [WB-1:0] b;
  logic signed [WS-1:0] s;
  logic signed [WA+WB-1:0] p_ex, p_pp, p_it, p_dr;
  logic signed [2*WS-1:0]  p_sq;

  approx_mult #(.WA(WA), .WB(WB), .METHOD(AM_EXACT))                         u_ex (.a, .b, .p(p_ex));
  approx_mult #(.WA(WA), .WB(WB), .METHOD(AM_PP_TRUNC), .PPT_COLS(PPT))      u_pp (.a, .b, .p(p_pp));
  approx_mult #(.WA(WA), .WB(WB), .METHOD(AM_INPUT_TRUNC), .TRUNC_A(TA))     u_it (.a, .b, .p(p_it));
  approx_mult #(.WA(WA), .WB(WB), .METHOD(AM_DRUM), .DRUM_K(K))              u_dr (.a, .b, .p(p_dr));
  approx_mult #(.WA(WS), .WB(WS), .METHOD(AM_INPUT_TRUNC), .TRUNC_A(TA), .TRUNC_B(TA)) u_sq (.a(s), .b(s), .p(p_sq));

  int checks = 0, failures = 0;
  real err_pp = 0, err_it = 0, err_dr = 0, rel_dr = 0;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s a=%0d b=%0d got=%0d exp=%0d", what, a, b, got, exp);
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
    longint av, bv, sv;
    for (int n = 0; n < 4000; n++) begin
      case (n)
        0: begin av = -(longint'(1) << (WA-1)); bv = -(longint'(1) << (WB-1)); end
        1: begin av = (longint'(1) << (WA-1)) - 1; bv = -(longint'(1) << (WB-1)); end
        2: begin av = 0; bv = 12345; end
        3: begin av = -1; bv = -1; end
        default: begin av = rnd(WA); bv = rnd(WB); end
      endcase
      sv = rnd(WS);
      a = WA'(av); b = WB'(bv); s = WS'(sv);
      #1;
      check("exact", p_ex, av * bv);
      check("pp_trunc", p_pp, mult(av, bv, WA, WB, AM_PP_TRUNC, 0, 0, PPT, K));
      check("input_trunc", p_it, mult(av, bv, WA, WB, AM_INPUT_TRUNC, TA, 0, 0, K));
      check("drum", p_dr, mult(av, bv, WA, WB, AM_DRUM, 0, 0, 0, K));
      check("squarer", p_sq, mult(sv, sv, WS, WS, AM_INPUT_TRUNC, TA, TA, 0, K));
      if (n >= 4) begin
        err_pp += real'(p_pp - av * bv);
        err_it += real'(p_it - av * bv);
        err_dr += real'(p_dr - av * bv);
        if (av * bv != 0) rel_dr += real'(p_dr - av * bv) / real'(av * bv);
      end
    end
    // error signatures
    checks++; if (!(err_pp < 0)) begin failures++; $display("FAIL pp truncation not biased negative"); end
    checks++; if (!(err_it < 0 || err_it > 0)) begin failures++; $display("FAIL input truncation has no error"); end
    checks++;
    if (!((rel_dr / 3996.0) < 1e-3 && (rel_dr / 3996.0) > -1e-3)) begin
      failures++; $display("FAIL DRUM mean relative error %g", rel_dr / 3996.0);
    end
    $display("mean errors: pp=%g it=%g drum=%g (drum rel %g)", err_pp/3996.0, err_it/3996.0, err_dr/3996.0, rel_dr/3996.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
