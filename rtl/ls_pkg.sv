// ls_pkg: shared constants and types of the StEFCal least-squares accelerator.
//
// Every datapath signal is a signed two's-complement fixed-point number written
// as WL.FL (word length, fractional length); its value is the integer read as
// signed times 2^-FL. The widths below are the optimised accurate-core formats
// of the fixed-point study (Table of formats in the README). The approximation
// method enumeration and the bus/beat structures are this design's own.
package ls_pkg;

  // ---- Element-wise product inputs: g = a + ib, m = c + id -------------
  localparam int unsigned A_WL = 23, A_FL = 14;   // real(g)
  localparam int unsigned B_WL = 22, B_FL = 14;   // imag(g)
  localparam int unsigned C_WL = 16, C_FL = 25;   // real(m)
  localparam int unsigned D_WL = 15, D_FL = 25;   // imag(m)
  // ---- Visibility v = h + it --------------------------------------------
  localparam int unsigned H_WL = 18, H_FL = 12;
  localparam int unsigned T_WL = 18, T_FL = 12;
  // ---- EP products ------------------------------------------------------
  localparam int unsigned AC_WL = 23, AC_FL = 25;
  localparam int unsigned BD_WL = 21, BD_FL = 25;
  localparam int unsigned AD_WL = 23, AD_FL = 26;
  localparam int unsigned BC_WL = 24, BC_FL = 26;
  // ---- z = e + if as seen by SAC and MAC ---------------------------------
  localparam int unsigned ESAC_WL = 21, ESAC_FL = 23;
  localparam int unsigned FSAC_WL = 20, FSAC_FL = 22;
  localparam int unsigned EMAC_WL = 23, EMAC_FL = 25;
  localparam int unsigned FMAC_WL = 24, FMAC_FL = 26;
  // ---- SAC --------------------------------------------------------------
  localparam int unsigned ESQ_WL = 22, ESQ_FL = 28;
  localparam int unsigned FSQ_WL = 22, FSQ_FL = 28;
  localparam int unsigned ESQF_WL = 22, ESQF_FL = 28;  // esq_plus_fsq
  localparam int unsigned SAC_WL = 24, SAC_FL = 23;
  // ---- MAC --------------------------------------------------------------
  localparam int unsigned EH_WL = 28, EH_FL = 25;
  localparam int unsigned FT_WL = 26, FT_FL = 25;
  localparam int unsigned ET_WL = 28, ET_FL = 26;
  localparam int unsigned FH_WL = 27, FH_FL = 26;
  localparam int unsigned EHMFT_WL = 28, EHMFT_FL = 25; // eh_minus_ft
  localparam int unsigned ETPFH_WL = 28, ETPFH_FL = 26; // et_plus_fh
  localparam int unsigned MACR_WL = 25, MACR_FL = 18;   // mac_real
  localparam int unsigned MACI_WL = 24, MACI_FL = 18;   // mac_imag

  // ---- Problem size of the case study ------------------------------------
  localparam int unsigned N_ANT_DEFAULT = 124;  // antennas = gains
  localparam int unsigned N_CH_DEFAULT  = 4;    // frequency channels

  // ---- Approximation applied to the MAC multipliers and SAC squarers ------
  typedef enum logic [1:0] {
    AM_EXACT       = 2'd0,  // accurate partial-product array
    AM_PP_TRUNC    = 2'd1,  // low partial-product columns removed
    AM_INPUT_TRUNC = 2'd2,  // low operand bits forced to zero
    AM_DRUM        = 2'd3   // dynamic-range unbiased multiplier
  } approx_method_t;

  // One bus beat: the three complex operands of one term of Eq. (2)/(3).
  typedef struct packed {
    logic signed [A_WL-1:0] a;  // real(g_q)
    logic signed [B_WL-1:0] b;  // imag(g_q)
    logic signed [C_WL-1:0] c;  // real(M_qp)
    logic signed [D_WL-1:0] d;  // imag(M_qp)
    logic signed [H_WL-1:0] h;  // real(V_qp)
    logic signed [T_WL-1:0] t;  // imag of the visibility as stored (see README)
  } ls_beat_t;

  // One computed gain g_p = a + ib.
  typedef struct packed {
    logic signed [A_WL-1:0] re;
    logic signed [B_WL-1:0] im;
  } ls_gain_t;

  // Initial accumulator values used for unbiasing (0 for an unbiased-free core).
  typedef struct packed {
    logic signed [MACR_WL-1:0] mac_real;
    logic signed [MACI_WL-1:0] mac_imag;
    logic signed [SAC_WL-1:0]  sac;
  } ls_bias_t;

  localparam int unsigned N_CORES = 2;
  localparam int unsigned CORE_ACC = 0;  // accurate core index
  localparam int unsigned CORE_AX  = 1;  // approximate core index

endpackage
