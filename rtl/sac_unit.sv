// sac_unit: square-accumulate (SAC) stage, accumulates z^H z = e^2 + f^2.
//
// Two squarers (the partial-product multiplier with both operands tied) form
// esq and fsq in format 22.28; their sum esq_plus_fsq (22.28) is cut to the
// accumulator format 24.23 and added to register sac. On the first term of a
// gain (first = 1) the register is loaded with init + term instead, where init
// is the unbiasing value (0 for no unbiasing). acc_next shows the value the
// register takes on this beat, so that the final sum is available in the
// cycle of the last term. One beat per cycle when en = 1.
// In the approximate core METHOD and its settings approximate the two squarers;
// the document approximates exactly these two squarers. Requantisation by
// rounding to nearest and the first/init load are this design's choice.
module sac_unit
  import ls_pkg::*;
#(
  parameter approx_method_t METHOD   = AM_EXACT,
  parameter int unsigned    TRUNC_E  = 0,   // input bits cut from e_sac
  parameter int unsigned    TRUNC_F  = 0,   // input bits cut from f_sac
  parameter int unsigned    PPT_COLS = 0,
  parameter int unsigned    DRUM_K   = 8
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      en,
  input  logic                      first,
  input  logic signed [SAC_WL-1:0]  init,
  input  logic signed [ESAC_WL-1:0] e_sac,
  input  logic signed [FSAC_WL-1:0] f_sac,
  output logic signed [SAC_WL-1:0]  acc_next,
  output logic signed [SAC_WL-1:0]  sac
);
  logic signed [2*ESAC_WL-1:0] esq_full;
  logic signed [2*FSAC_WL-1:0] fsq_full;
  logic signed [ESQ_WL-1:0]    esq;
  logic signed [FSQ_WL-1:0]    fsq;
  logic signed [ESQF_WL-1:0]   esq_plus_fsq;
  logic signed [SAC_WL-1:0]    term;

  approx_mult #(.WA(ESAC_WL), .WB(ESAC_WL), .METHOD(METHOD), .TRUNC_A(TRUNC_E),
                .TRUNC_B(TRUNC_E), .PPT_COLS(PPT_COLS), .DRUM_K(DRUM_K))
    u_esq (.a(e_sac), .b(e_sac), .p(esq_full));
  approx_mult #(.WA(FSAC_WL), .WB(FSAC_WL), .METHOD(METHOD), .TRUNC_A(TRUNC_F),
                .TRUNC_B(TRUNC_F), .PPT_COLS(PPT_COLS), .DRUM_K(DRUM_K))
    u_fsq (.a(f_sac), .b(f_sac), .p(fsq_full));

  fx_requant #(.WI(2*ESAC_WL), .FI(2*ESAC_FL), .WO(ESQ_WL), .FO(ESQ_FL)) q_esq (.din(esq_full), .dout(esq));
  fx_requant #(.WI(2*FSAC_WL), .FI(2*FSAC_FL), .WO(FSQ_WL), .FO(FSQ_FL)) q_fsq (.din(fsq_full), .dout(fsq));

  assign esq_plus_fsq = esq + fsq;

  fx_requant #(.WI(ESQF_WL), .FI(ESQF_FL), .WO(SAC_WL), .FO(SAC_FL)) q_term (.din(esq_plus_fsq), .dout(term));

  assign acc_next = (first ? init : sac) + term;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  sac <= '0;
    else if (en) sac <= acc_next;
  end
endmodule
