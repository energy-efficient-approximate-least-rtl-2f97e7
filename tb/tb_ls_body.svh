// tb_ls_body.svh: body shared by the end-to-end testbenches of ls_accelerator.
// The including module declares NA (antennas), NC (channels), N_AX and N_ACC
// (iterations on the approximate and on the accurate core), the DUT signals
// and the DUT itself, then includes this file.
//
// The testbench plays the host: it makes a noise-free calibration problem
// (random true gains g, random model visibilities M, V = g_q M_qp conj(g_p)
// stored with its imaginary part negated so that the core's v * z is
// conj(V) * z), and runs StEFCal iterations: each gain p of iteration i is
// streamed as NA * NC beats (g^(i-1)_q, M_qp, V_qp) over all q and channels.
// Phase 1 runs N_AX iterations on the approximate core with unbiasing values
// (the mean accumulator difference between the two datapaths, worked out by
// the host beforehand),
// phase 2 switches to the accurate core for N_ACC iterations (the host
// first leaves results untaken for a while, so that a core stalls), phase 3 turns
// both cores on and runs one iteration of two independent problems at once,
// beats interleaved on the bus. Every gain is compared with the integer
// reference model. As in StEFCal, the host replaces the gains by the mean of
// the new and the previous ones after every second iteration. Counted mechanisms, each of which must occur: core switch,
// stall of a core, both cores on with results colliding, unbiased
// accumulation, approximate result differing from the accurate one, and a
// falling convergence measure ||g_i - g_(i-1)|| / ||g_i||.

  import ls_pkg::*;
  import tb_ref_pkg::*;

  localparam int NT = NA * NC;

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_stall_cycles = 0, n_unbiased = 0, n_approx_diff = 0, n_parallel = 0;
  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got=%0d exp=%0d", what, got, exp);
    end
  endtask

  always @(posedge clk) if (|core_stall) n_stall_cycles++;

  // problem data, [problem][channel][q][p]
  longint mc [2][NC][NA][NA];
  longint md [2][NC][NA][NA];
  longint vh [2][NC][NA][NA];
  longint vt [2][NC][NA][NA];
  longint gre [2][NA];   // current gains per problem
  longint gim [2][NA];

  // unbiasing values, worked out by the host before the run (see unbias())
  longint BIAS_MR = 0, BIAS_MI = 0, BIAS_SAC = 0;

  function automatic real urand();
    return real'($urandom) / 4294967296.0;
  endfunction

  task automatic make_problem(int pr);
    real tre[NA], tim[NA], mre, mim, zr, zi, vr, vi;
    for (int q = 0; q < NA; q++) begin
      tre[q] = 30.0 + 20.0 * urand();
      tim[q] = 20.0 * (urand() - 0.5);
      gre[pr][q] = longint'(40.0 * real'(1 << A_FL));   // start value 40 + 0i
      gim[pr][q] = 0;
    end
    for (int ch = 0; ch < NC; ch++)
      for (int q = 0; q < NA; q++)
        for (int p = 0; p < NA; p++) begin
          mre = 4.5e-4 * (urand() - 0.5) * 2.0;   // |imag(M)| < 2^-11 in format 15.25
          mim = 4.5e-4 * (urand() - 0.5) * 2.0;
          mc[pr][ch][q][p] = longint'(mre * real'(longint'(1) << C_FL));
          md[pr][ch][q][p] = longint'(mim * real'(longint'(1) << D_FL));
          // z = g_q * M_qp ; V_qp = z * conj(g_p)
          zr = tre[q] * mre - tim[q] * mim;
          zi = tre[q] * mim + tim[q] * mre;
          vr = zr * tre[p] + zi * tim[p];
          vi = zi * tre[p] - zr * tim[p];
          vh[pr][ch][q][p] = longint'(vr * real'(1 << H_FL));
          vt[pr][ch][q][p] = -longint'(vi * real'(1 << T_FL));  // stored conjugated
        end
  endtask

  function automatic void ref_gain(int pr, int p, cfg_t cf, longint br, longint bi, longint bs,
                                   output longint re, output longint im);
    longint a[], b[], c[], d[], h[], t[];
    int i;
    a = new[NT]; b = new[NT]; c = new[NT]; d = new[NT]; h = new[NT]; t = new[NT];
    i = 0;
    for (int ch = 0; ch < NC; ch++)
      for (int q = 0; q < NA; q++) begin
        a[i] = gre[pr][q]; b[i] = gim[pr][q];
        c[i] = mc[pr][ch][q][p]; d[i] = md[pr][ch][q][p];
        h[i] = vh[pr][ch][q][p]; t[i] = vt[pr][ch][q][p];
        i++;
      end
    tb_ref_pkg::gain(a, b, c, d, h, t, NT, cf, br, bi, bs, re, im);
  endfunction

  // Unbiasing values: the mean difference between the accurate and the
  // approximate accumulator sums over all gains of the first iteration of
  // problem 0, rounded to the accumulator LSB.
  task automatic unbias();
    longint a[], b[], c[], d[], h[], t[];
    longint xr, xi, xs, pr_, pi_, ps_;
    real sr, si, ss;
    int i;
    a = new[NT]; b = new[NT]; c = new[NT]; d = new[NT]; h = new[NT]; t = new[NT];
    sr = 0; si = 0; ss = 0;
    for (int p = 0; p < NA; p++) begin
      i = 0;
      for (int ch = 0; ch < NC; ch++)
        for (int q = 0; q < NA; q++) begin
          a[i] = gre[0][q]; b[i] = gim[0][q];
          c[i] = mc[0][ch][q][p]; d[i] = md[0][ch][q][p];
          h[i] = vh[0][ch][q][p]; t[i] = vt[0][ch][q][p];
          i++;
        end
      tb_ref_pkg::sums(a, b, c, d, h, t, NT, exact_cfg(), xr, xi, xs);
      tb_ref_pkg::sums(a, b, c, d, h, t, NT, cx, pr_, pi_, ps_);
      sr += real'(xr - pr_); si += real'(xi - pi_); ss += real'(xs - ps_);
    end
    BIAS_MR = longint'(sr / NA); BIAS_MI = longint'(si / NA); BIAS_SAC = longint'(ss / NA);
    $display("unbiasing values (LSBs): mac_real %0d, mac_imag %0d, sac %0d", BIAS_MR, BIAS_MI, BIAS_SAC);
  endtask

  task automatic cfg_write(logic [1:0] ad, logic [31:0] d);
    @(negedge clk); cfg_we = 1; cfg_addr = ad; cfg_wdata = d;
    @(negedge clk); cfg_we = 0;
  endtask

  // one beat on the bus, waiting for ready
  task automatic send_beat(int core, int pr, int ch, int q, int p);
    @(negedge clk);
    bus_valid = 1; bus_core = 1'(core);
    bus_beat.a = A_WL'(gre[pr][q]); bus_beat.b = B_WL'(gim[pr][q]);
    bus_beat.c = C_WL'(mc[pr][ch][q][p]); bus_beat.d = D_WL'(md[pr][ch][q][p]);
    bus_beat.h = H_WL'(vh[pr][ch][q][p]); bus_beat.t = T_WL'(vt[pr][ch][q][p]);
    #1;
    while (!bus_ready) begin @(negedge clk); #1; end
    @(posedge clk); #1;
    bus_valid = 0;
  endtask

  // results arrive in order per core
  longint res_re [2][$];
  longint res_im [2][$];
  always @(posedge clk) begin
    if (res_valid && res_ready) begin
      res_re[res_core].push_back(longint'(res_gain.re));
      res_im[res_core].push_back(longint'(res_gain.im));
    end
  end
  // the host is briefly busy now and then
  // (hold_results keeps results waiting long enough for a core to stall)
  logic hold_results = 0;
  always @(negedge clk) res_ready <= !hold_results && ($urandom_range(0, 7) != 0);

  cfg_t cx;
  int iter_no [2] = '{0, 0};

  // one StEFCal iteration of problem pr on core `core`; returns the convergence measure
  task automatic iteration(int core, int pr, output real conv);
    longint er[NA], ei[NA], xr, xi;
    real num, den;
    for (int p = 0; p < NA; p++) begin
      if (core == int'(CORE_AX)) begin
        ref_gain(pr, p, cx, BIAS_MR, BIAS_MI, BIAS_SAC, er[p], ei[p]);
        ref_gain(pr, p, exact_cfg(), 0, 0, 0, xr, xi);
        if (xr != er[p] || xi != ei[p]) n_approx_diff++;
        n_unbiased++;
      end else begin
        ref_gain(pr, p, exact_cfg(), 0, 0, 0, er[p], ei[p]);
      end
      for (int ch = 0; ch < NC; ch++)
        for (int q = 0; q < NA; q++) send_beat(core, pr, ch, q, p);
    end
    num = 0; den = 0;
    for (int p = 0; p < NA; p++) begin
      while (res_re[core].size() == 0) @(posedge clk);
      check("gain re", res_re[core].pop_front(), er[p]);
      check("gain im", res_im[core].pop_front(), ei[p]);
      num += real'((er[p] - gre[pr][p]) ** 2 + (ei[p] - gim[pr][p]) ** 2);
      den += real'(er[p] ** 2 + ei[p] ** 2);
    end
    // host step of StEFCal: every second iteration the new gains are
    // replaced by the mean of the new and the previous gains
    iter_no[pr]++;
    for (int p = 0; p < NA; p++) begin
      if (iter_no[pr] % 2 == 0) begin
        gre[pr][p] = (er[p] + gre[pr][p]) >>> 1;
        gim[pr][p] = (ei[p] + gim[pr][p]) >>> 1;
      end else begin
        gre[pr][p] = er[p];
        gim[pr][p] = ei[p];
      end
    end
    conv = (den > 0) ? $sqrt(num / den) : 0.0;
  endtask

  // both cores on: problem 0 on the accurate core, problem 1 on the
  // approximate core, beats alternating on the bus
  task automatic parallel_iteration();
    longint e0r[NA], e0i[NA], e1r[NA], e1i[NA];
    for (int p = 0; p < NA; p++) begin
      ref_gain(0, p, exact_cfg(), 0, 0, 0, e0r[p], e0i[p]);
      ref_gain(1, p, cx, BIAS_MR, BIAS_MI, BIAS_SAC, e1r[p], e1i[p]);
      for (int ch = 0; ch < NC; ch++)
        for (int q = 0; q < NA; q++) begin
          send_beat(CORE_ACC, 0, ch, q, p);
          send_beat(CORE_AX, 1, ch, q, p);
        end
    end
    for (int p = 0; p < NA; p++) begin
      while (res_re[0].size() == 0 || res_re[1].size() == 0) @(posedge clk);
      check("parallel acc re", res_re[0].pop_front(), e0r[p]);
      check("parallel acc im", res_im[0].pop_front(), e0i[p]);
      check("parallel ax re", res_re[1].pop_front(), e1r[p]);
      check("parallel ax im", res_im[1].pop_front(), e1i[p]);
      n_parallel++;
    end
    for (int p = 0; p < NA; p++) begin
      gre[0][p] = e0r[p]; gim[0][p] = e0i[p];
      gre[1][p] = e1r[p]; gim[1][p] = e1i[p];
    end
  endtask

  initial begin
    real conv, conv_first, conv_last;
    cx = exact_cfg(); cx.m = AX_METHOD; cx.t_esac = 8; cx.t_fsac = 8; cx.t_emac = 8; cx.t_fmac = 12;
    cx.ppt = 20; cx.k = 12;
    bus_beat = '0;
    make_problem(0);
    make_problem(1);
    unbias();
    repeat (3) @(posedge clk);
    rst_n = 1;
    // phase 1: approximate core only, with unbiasing values
    cfg_write(2'd1, 32'(BIAS_MR));
    cfg_write(2'd2, 32'(BIAS_MI));
    cfg_write(2'd3, 32'(BIAS_SAC));
    cfg_write(2'd0, 32'b10);
    check("approximate core alone", core_on, 2'b10);
    conv_first = 0.0;
    for (int i = 0; i < N_AX; i++) begin
      iteration(CORE_AX, 0, conv);
      $display("iteration %0d (approximate core): convergence %g", i + 1, conv);
      if (i == 0) conv_first = conv;
    end
    // phase 2: switch to the accurate core
    cfg_write(2'd0, 32'b01);
    check("accurate core alone", core_on, 2'b01);
    conv_last = conv_first;
    fork
      begin
        hold_results = 1;
        repeat (3 * 2 * NT + 200) @(posedge clk);
        hold_results = 0;
      end
    join_none
    for (int i = 0; i < N_ACC; i++) begin
      iteration(CORE_ACC, 0, conv);
      $display("iteration %0d (accurate core): convergence %g", N_AX + i + 1, conv);
      conv_last = conv;
    end
    // phase 3: both cores on, two independent problems
    cfg_write(2'd0, 32'b11);
    parallel_iteration();
    repeat (5) @(posedge clk);
    $display("switches=%0d stall_cycles=%0d result_conflicts=%0d unbiased_gains=%0d approx_diff=%0d parallel=%0d",
             n_switches, n_stall_cycles, n_conflicts, n_unbiased, n_approx_diff, n_parallel);
    checks++; if (n_switches < 3)    begin failures++; $display("FAIL core switch not seen"); end
    checks++; if (n_stall_cycles == 0) begin failures++; $display("FAIL no stall seen"); end
    checks++; if (n_conflicts == 0)  begin failures++; $display("FAIL no result conflict seen"); end
    checks++; if (n_unbiased == 0 || (BIAS_MR == 0 && BIAS_MI == 0 && BIAS_SAC == 0)) begin failures++; $display("FAIL no unbiased gain"); end
    checks++; if (n_approx_diff == 0) begin failures++; $display("FAIL approximation never visible"); end
    checks++; if (n_parallel == 0)   begin failures++; $display("FAIL no parallel run"); end
    checks++; if (!(conv_last < conv_first)) begin failures++; $display("FAIL convergence measure did not fall"); end
    $display("final convergence measure %g after %0d iterations", conv_last, N_AX + N_ACC);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
