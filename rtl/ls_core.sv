// ls_core: one least-squares (StEFCal) core, computing one antenna gain
// g_p = (v^H z) / (z^H z), z = M(:,p) .* g, from a stream of N_ANT * N_CH terms.
//
// Each accepted beat carries one element of g (a, b), the matching element of
// the model column M(:,p) (c, d) and of the visibility column (h, t). The
// combinational datapath EP -> {SAC, MAC} adds the term into the three
// accumulators (sac, mac_real, mac_imag) in the same clock; the first term of
// a gain loads the accumulators with the unbiasing values in `bias` instead
// of adding to the old sum. On the last term the final sums are handed to two
// sequential dividers (real and imaginary part over sac) and the accumulators
// are free for the next gain at once, so accumulation of gain p+1 overlaps the
// division of gain p. The gain is held in out_gain with out_valid until
// out_ready. The last term of a gain stalls (in_ready = 0) while a division
// is still running or a result has not been taken.
// Timing: one term per clock; a gain appears (out_valid) 45 clocks after its
// last term is taken. en = 0 models the core switched off: it accepts nothing and
// keeps its state.
// METHOD and the truncation settings select the approximation of the MAC
// multipliers and SAC squarers: AM_EXACT gives the accurate core. The
// datapath, formats and serial one-structure organisation follow the
// document; handshakes, overlap of division with accumulation and the
// PPT_COLS / DRUM_K defaults are this design's own.
module ls_core
  import ls_pkg::*;
#(
  parameter int unsigned    N_ANT      = N_ANT_DEFAULT,
  parameter int unsigned    N_CH       = N_CH_DEFAULT,
  parameter approx_method_t METHOD     = AM_EXACT,
  parameter int unsigned    TRUNC_ESAC = 0,
  parameter int unsigned    TRUNC_FSAC = 0,
  parameter int unsigned    TRUNC_EMAC = 0,
  parameter int unsigned    TRUNC_FMAC = 0,
  parameter int unsigned    PPT_COLS   = 0,
  parameter int unsigned    DRUM_K     = 8
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     en,          // core switched on
  input  ls_bias_t bias,        // accumulator initial values (unbiasing)
  input  logic     in_valid,
  output logic     in_ready,
  input  ls_beat_t in_beat,
  output logic     out_valid,
  input  logic     out_ready,
  output ls_gain_t out_gain,
  output logic     stall        // last term held back this cycle
);
  localparam int unsigned N_TERMS = N_ANT * N_CH;
  localparam int unsigned TW      = (N_TERMS > 1) ? $clog2(N_TERMS) : 1;

  logic [TW-1:0] term_idx;
  logic          first, last, fire, div_busy, div_busy_im, div_done_re, div_done_im;

  logic signed [ESAC_WL-1:0] e_sac;
  logic signed [FSAC_WL-1:0] f_sac;
  logic signed [EMAC_WL-1:0] e_mac;
  logic signed [FMAC_WL-1:0] f_mac;
  logic signed [SAC_WL-1:0]  sac_next, sac_q;
  logic signed [MACR_WL-1:0] real_next, mac_real_q;
  logic signed [MACI_WL-1:0] imag_next, mac_imag_q;
  logic signed [A_WL-1:0]    q_re;
  logic signed [B_WL-1:0]    q_im;

  assign first    = (term_idx == '0);
  assign last     = (term_idx == TW'(N_TERMS - 1));
  assign in_ready = en && !(last && (div_busy || div_done_re || out_valid));
  assign stall    = en && in_valid && !in_ready;
  assign fire     = in_valid && in_ready;

  ep_unit u_ep (
    .a(in_beat.a), .b(in_beat.b), .c(in_beat.c), .d(in_beat.d),
    .e_sac(e_sac), .f_sac(f_sac), .e_mac(e_mac), .f_mac(f_mac)
  );

  sac_unit #(.METHOD(METHOD), .TRUNC_E(TRUNC_ESAC), .TRUNC_F(TRUNC_FSAC),
             .PPT_COLS(PPT_COLS), .DRUM_K(DRUM_K)) u_sac (
    .clk, .rst_n, .en(fire), .first, .init(bias.sac),
    .e_sac, .f_sac, .acc_next(sac_next), .sac(sac_q)
  );

  mac_unit #(.METHOD(METHOD), .TRUNC_E(TRUNC_EMAC), .TRUNC_F(TRUNC_FMAC),
             .PPT_COLS(PPT_COLS), .DRUM_K(DRUM_K)) u_mac (
    .clk, .rst_n, .en(fire), .first,
    .init_real(bias.mac_real), .init_imag(bias.mac_imag),
    .e_mac, .f_mac, .h(in_beat.h), .t(in_beat.t),
    .real_next, .imag_next, .mac_real(mac_real_q), .mac_imag(mac_imag_q)
  );

  gain_divider #(.NW(MACR_WL), .NF(MACR_FL), .DW(SAC_WL), .DF(SAC_FL),
                 .QW(A_WL), .QF(A_FL)) u_div_re (
    .clk, .rst_n, .start(fire && last), .num(real_next), .den(sac_next),
    .busy(div_busy), .done(div_done_re), .q(q_re)
  );

  gain_divider #(.NW(MACI_WL), .NF(MACI_FL), .DW(SAC_WL), .DF(SAC_FL),
                 .QW(B_WL), .QF(B_FL)) u_div_im (
    .clk, .rst_n, .start(fire && last), .num(imag_next), .den(sac_next),
    .busy(div_busy_im), .done(div_done_im), .q(q_im)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      term_idx  <= '0;
      out_valid <= 1'b0;
      out_gain  <= '0;
    end else begin
      if (fire) term_idx <= last ? '0 : term_idx + 1'b1;
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (div_done_re) begin
        out_valid   <= 1'b1;
        out_gain.re <= q_re;
        out_gain.im <= q_im;
      end
    end
  end

  // The imaginary divider is one bit shorter and finishes first; a result is
  // only published once both are done, which the real divider's done implies.
  logic im_ready_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)            im_ready_q <= 1'b0;
    else if (div_done_im)  im_ready_q <= 1'b1;
    else if (div_done_re)  im_ready_q <= 1'b0;
  end
  assert property (@(posedge clk) disable iff (!rst_n) div_done_re |-> (im_ready_q || div_done_im))
    else $error("ls_core: real quotient before imaginary quotient");

  // The registered accumulator values are not needed here (the dividers take
  // the next-state sums), nor is the busy flag of the shorter divider.
  logic unused;
  assign unused = ^{sac_q, mac_real_q, mac_imag_q, div_busy_im};

endmodule
