// mac_unit: multiply-accumulate (MAC) stage, accumulates the complex product
// of the visibility v = h + it and z = e + if.
//
// Four partial-product multipliers form eh (28.25), ft (26.25), et (28.26) and
// fh (27.26); the real part eh_minus_ft (28.25) and the imaginary part
// et_plus_fh (28.26) are cut to the accumulator formats mac_real 25.18 and
// mac_imag 24.18 and added to the two registers. On the first term of a gain
// (first = 1) each register is loaded with its unbiasing init value plus the
// term. real_next / imag_next are the values the registers take on this beat.
// One beat per cycle when en = 1.
// The real and imaginary combinations (eh - ft, et + fh) are those of the
// document's signal-flow graph, i.e. the product v * z; the conjugate v^H z of
// the least-squares formula is obtained by storing the visibility with its
// imaginary part negated (see README). In the approximate core METHOD
// approximates the four multipliers; input truncation cuts only the z
// operands (h and t are never cut), as in the document.
module mac_unit
  import ls_pkg::*;
#(
  parameter approx_method_t METHOD   = AM_EXACT,
  parameter int unsigned    TRUNC_E  = 0,   // input bits cut from e_mac
  parameter int unsigned    TRUNC_F  = 0,   // input bits cut from f_mac
  parameter int unsigned    PPT_COLS = 0,
  parameter int unsigned    DRUM_K   = 8
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      en,
  input  logic                      first,
  input  logic signed [MACR_WL-1:0] init_real,
  input  logic signed [MACI_WL-1:0] init_imag,
  input  logic signed [EMAC_WL-1:0] e_mac,
  input  logic signed [FMAC_WL-1:0] f_mac,
  input  logic signed [H_WL-1:0]    h,
  input  logic signed [T_WL-1:0]    t,
  output logic signed [MACR_WL-1:0] real_next,
  output logic signed [MACI_WL-1:0] imag_next,
  output logic signed [MACR_WL-1:0] mac_real,
  output logic signed [MACI_WL-1:0] mac_imag
);
  logic signed [EMAC_WL+H_WL-1:0] eh_full;
  logic signed [FMAC_WL+T_WL-1:0] ft_full;
  logic signed [EMAC_WL+T_WL-1:0] et_full;
  logic signed [FMAC_WL+H_WL-1:0] fh_full;
  logic signed [EH_WL-1:0] eh;
  logic signed [FT_WL-1:0] ft;
  logic signed [ET_WL-1:0] et;
  logic signed [FH_WL-1:0] fh;
  logic signed [EHMFT_WL-1:0] eh_minus_ft;
  logic signed [ETPFH_WL-1:0] et_plus_fh;
  logic signed [MACR_WL-1:0]  term_real;
  logic signed [MACI_WL-1:0]  term_imag;

  approx_mult #(.WA(EMAC_WL), .WB(H_WL), .METHOD(METHOD), .TRUNC_A(TRUNC_E),
                .PPT_COLS(PPT_COLS), .DRUM_K(DRUM_K)) u_eh (.a(e_mac), .b(h), .p(eh_full));
  approx_mult #(.WA(FMAC_WL), .WB(T_WL), .METHOD(METHOD), .TRUNC_A(TRUNC_F),
                .PPT_COLS(PPT_COLS), .DRUM_K(DRUM_K)) u_ft (.a(f_mac), .b(t), .p(ft_full));
  approx_mult #(.WA(EMAC_WL), .WB(T_WL), .METHOD(METHOD), .TRUNC_A(TRUNC_E),
                .PPT_COLS(PPT_COLS), .DRUM_K(DRUM_K)) u_et (.a(e_mac), .b(t), .p(et_full));
  approx_mult #(.WA(FMAC_WL), .WB(H_WL), .METHOD(METHOD), .TRUNC_A(TRUNC_F),
                .PPT_COLS(PPT_COLS), .DRUM_K(DRUM_K)) u_fh (.a(f_mac), .b(h), .p(fh_full));

  fx_requant #(.WI(EMAC_WL+H_WL), .FI(EMAC_FL+H_FL), .WO(EH_WL), .FO(EH_FL)) q_eh (.din(eh_full), .dout(eh));
  fx_requant #(.WI(FMAC_WL+T_WL), .FI(FMAC_FL+T_FL), .WO(FT_WL), .FO(FT_FL)) q_ft (.din(ft_full), .dout(ft));
  fx_requant #(.WI(EMAC_WL+T_WL), .FI(EMAC_FL+T_FL), .WO(ET_WL), .FO(ET_FL)) q_et (.din(et_full), .dout(et));
  fx_requant #(.WI(FMAC_WL+H_WL), .FI(FMAC_FL+H_FL), .WO(FH_WL), .FO(FH_FL)) q_fh (.din(fh_full), .dout(fh));

  // eh/ft and et/fh share their fractional lengths
  assign eh_minus_ft = EHMFT_WL'(eh) - EHMFT_WL'(ft);
  assign et_plus_fh  = ETPFH_WL'(et) + ETPFH_WL'(fh);

  fx_requant #(.WI(EHMFT_WL), .FI(EHMFT_FL), .WO(MACR_WL), .FO(MACR_FL)) q_tr (.din(eh_minus_ft), .dout(term_real));
  fx_requant #(.WI(ETPFH_WL), .FI(ETPFH_FL), .WO(MACI_WL), .FO(MACI_FL)) q_ti (.din(et_plus_fh), .dout(term_imag));

  assign real_next = (first ? init_real : mac_real) + term_real;
  assign imag_next = (first ? init_imag : mac_imag) + term_imag;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mac_real <= '0;
      mac_imag <= '0;
    end else if (en) begin
      mac_real <= real_next;
      mac_imag <= imag_next;
    end
  end
endmodule
