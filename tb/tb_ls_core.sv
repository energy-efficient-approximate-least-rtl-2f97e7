// tb_ls_core: runs two cores of N_ANT = 4 antennas and N_CH = 2 channels
// (8 terms per gain) on the same stream of random beats: an accurate core and
// an approximate core with input truncation and unbiasing values. Every gain
// is compared with the integer reference model. Also checked: the 45-clock
// latency from the last term to out_valid, that the last term stalls while the
// previous division or result is still pending (and that this happens), that
// results wait for out_ready, and that a core with en = 0 takes nothing.
module tb_ls_core;
  import ls_pkg::*;
  import tb_ref_pkg::*;

  localparam int NA = 4, NC = 2, NT = NA * NC, LAT = 45;

  logic clk = 0, rst_n = 0, en = 0;
  logic in_valid = 0, out_ready = 0;
  ls_beat_t beat;
  ls_bias_t bias_ex, bias_ax;
  logic rdy_ex, rdy_ax, ov_ex, ov_ax, st_ex, st_ax;
  ls_gain_t g_ex, g_ax;

  ls_core #(.N_ANT(NA), .N_CH(NC)) u_ex (
    .clk, .rst_n, .en, .bias(bias_ex), .in_valid, .in_ready(rdy_ex), .in_beat(beat),
    .out_valid(ov_ex), .out_ready, .out_gain(g_ex), .stall(st_ex));
  ls_core #(.N_ANT(NA), .N_CH(NC), .METHOD(AM_INPUT_TRUNC), .TRUNC_ESAC(8), .TRUNC_FSAC(8),
            .TRUNC_EMAC(8), .TRUNC_FMAC(12)) u_ax (
    .clk, .rst_n, .en, .bias(bias_ax), .in_valid, .in_ready(rdy_ax), .in_beat(beat),
    .out_valid(ov_ax), .out_ready, .out_gain(g_ax), .stall(st_ax));

  always #5 clk = ~clk;

  int checks = 0, failures = 0, stalls = 0, waits = 0, cycle = 0;
  longint exp_q[$];          // re_ex, im_ex, re_ax, im_ax, cycle of last term
  always @(posedge clk) cycle++;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got=%0d exp=%0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  cfg_t cx;
  localparam int NGAINS = 60;
  int got_gains = 0;

  // driver
  initial begin
    longint a[], b[], c[], d[], h[], t[];
    longint rex, iex, rax, iax;
    cx = exact_cfg(); cx.m = AM_INPUT_TRUNC;
    cx.t_esac = 8; cx.t_fsac = 8; cx.t_emac = 8; cx.t_fmac = 12;
    a = new[NT]; b = new[NT]; c = new[NT]; d = new[NT]; h = new[NT]; t = new[NT];
    bias_ex = '0;
    bias_ax.mac_real = MACR_WL'(37); bias_ax.mac_imag = MACI_WL'(-21); bias_ax.sac = SAC_WL'(5);
    beat = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // switched off: nothing is taken
    @(negedge clk); in_valid = 1;
    @(posedge clk); #1;
    checks++; if (rdy_ex || rdy_ax) begin failures++; $display("FAIL ready while off"); end
    @(negedge clk); in_valid = 0; en = 1;
    for (int g = 0; g < NGAINS; g++) begin
      for (int i = 0; i < NT; i++) begin
        a[i] = rnd(A_FL + 7); b[i] = rnd(B_FL + 7);
        c[i] = rnd(C_FL - 10); d[i] = rnd(D_FL - 10);
        h[i] = rnd(H_FL + 3); t[i] = rnd(T_FL + 3);
      end
      gain(a, b, c, d, h, t, NT, exact_cfg(), 0, 0, 0, rex, iex);
      gain(a, b, c, d, h, t, NT, cx, 37, -21, 5, rax, iax);
      for (int i = 0; i < NT; i++) begin
        @(negedge clk);
        beat.a = A_WL'(a[i]); beat.b = B_WL'(b[i]); beat.c = C_WL'(c[i]);
        beat.d = D_WL'(d[i]); beat.h = H_WL'(h[i]); beat.t = T_WL'(t[i]);
        in_valid = 1;
        #1;
        while (!(rdy_ex && rdy_ax)) begin
          check("cores ready together", rdy_ex, rdy_ax);
          stalls++;
          @(negedge clk); #1;
        end
        @(posedge clk); #1;   // the term is taken at this edge
        if (i == NT - 1) begin
          exp_q.push_back(rex); exp_q.push_back(iex); exp_q.push_back(rax); exp_q.push_back(iax);
          exp_q.push_back(cycle);
        end
        if ($urandom_range(0, 3) == 0) begin
          @(negedge clk); in_valid = 0;
        end
      end
    end
    @(negedge clk); in_valid = 0;
  end

  // consumer: out_ready is held low for a while now and then
  initial begin
    longint r0, i0, r1, i1, lc;
    int hold;
    wait (rst_n);
    while (got_gains < NGAINS) begin
      @(negedge clk);
      hold = ($urandom_range(0, 9) == 0) ? 60 : 0;
      if (ov_ex && hold > 0) begin
        out_ready = 0;
        repeat (hold) @(negedge clk);
        checks++; if (!ov_ex || !ov_ax) begin failures++; $display("FAIL result dropped"); end
        waits++;
      end
      out_ready = 1;
      if (ov_ex) begin
        r0 = exp_q.pop_front(); i0 = exp_q.pop_front(); r1 = exp_q.pop_front(); i1 = exp_q.pop_front();
        lc = exp_q.pop_front();
        check("gain re accurate", g_ex.re, r0);
        check("gain im accurate", g_ex.im, i0);
        check("gain re approx", g_ax.re, r1);
        check("gain im approx", g_ax.im, i1);
        check("both cores valid", ov_ax, 1);
        if (hold == 0 && got_gains > 0) check("latency", cycle - lc, LAT);
        got_gains++;
        @(posedge clk);
      end
    end
    checks++; if (stalls == 0) begin failures++; $display("FAIL no stall seen"); end
    checks++; if (waits == 0) begin failures++; $display("FAIL no result wait seen"); end
    $display("gains=%0d stalls=%0d waits=%0d", got_gains, stalls, waits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
