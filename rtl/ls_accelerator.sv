// ls_accelerator: heterogeneous least-squares accelerator for StEFCal gain
// calibration - an accurate core and an approximate (reduced-precision) core
// on one data bus, switched by the host.
//
// The host runs the first N_ax calibration iterations on the approximate core
// and the remaining ones on the accurate core, switching off the core it does
// not use; it may also run both at once on independent problems. Both cores
// share the datapath of ls_core (element-wise product, square-accumulate,
// multiply-accumulate, division, one gain per N_ANT * N_CH terms). The
// accurate core uses exact multipliers; the approximate core approximates the
// four MAC multipliers and the two SAC squarers with AX_METHOD and may start
// its accumulators from host-programmed unbiasing values.
// Interface: register writes (cfg_*), beats with a destination core on the
// bus (bus_*, valid/ready), gains returned on res_* (valid/ready) tagged with
// the core that made them. Timing per core: one term per clock, a gain 45
// clocks after its last term. The default approximation - input truncation by
// 8 bits of e_sac, f_sac, e_mac and 12 bits of f_mac, h and t exact - is the
// document's best configuration; PPT_COLS and DRUM_K for the other two
// methods are this design's own values.
module ls_accelerator
  import ls_pkg::*;
#(
  parameter int unsigned    N_ANT         = N_ANT_DEFAULT,
  parameter int unsigned    N_CH          = N_CH_DEFAULT,
  parameter approx_method_t AX_METHOD     = AM_INPUT_TRUNC,
  parameter int unsigned    AX_TRUNC_ESAC = 8,
  parameter int unsigned    AX_TRUNC_FSAC = 8,
  parameter int unsigned    AX_TRUNC_EMAC = 8,
  parameter int unsigned    AX_TRUNC_FMAC = 12,
  parameter int unsigned    AX_PPT_COLS   = 20,
  parameter int unsigned    AX_DRUM_K     = 12
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cfg_we,
  input  logic [1:0]  cfg_addr,
  input  logic [31:0] cfg_wdata,
  input  logic        bus_valid,
  output logic        bus_ready,
  input  logic        bus_core,
  input  ls_beat_t    bus_beat,
  output logic        res_valid,
  input  logic        res_ready,
  output logic        res_core,
  output ls_gain_t    res_gain,
  output logic [1:0]  core_on,
  output logic [1:0]  core_stall,
  output logic [15:0] n_switches,
  output logic [15:0] n_conflicts
);
  logic [N_CORES-1:0] core_en, core_in_valid, core_in_ready, core_out_valid, core_out_ready;
  ls_bias_t           core_bias [N_CORES];
  ls_gain_t           core_gain [N_CORES];
  ls_beat_t           core_beat;

  hetero_ctrl u_ctrl (
    .clk, .rst_n, .cfg_we, .cfg_addr, .cfg_wdata,
    .bus_valid, .bus_ready, .bus_core, .bus_beat,
    .res_valid, .res_ready, .res_core, .res_gain,
    .core_en, .core_bias, .core_in_valid, .core_in_ready, .core_beat,
    .core_out_valid, .core_out_ready, .core_gain,
    .n_switches, .n_conflicts
  );

  ls_core #(.N_ANT(N_ANT), .N_CH(N_CH), .METHOD(AM_EXACT)) u_acc_core (
    .clk, .rst_n, .en(core_en[CORE_ACC]), .bias(core_bias[CORE_ACC]),
    .in_valid(core_in_valid[CORE_ACC]), .in_ready(core_in_ready[CORE_ACC]), .in_beat(core_beat),
    .out_valid(core_out_valid[CORE_ACC]), .out_ready(core_out_ready[CORE_ACC]),
    .out_gain(core_gain[CORE_ACC]), .stall(core_stall[CORE_ACC])
  );

  ls_core #(.N_ANT(N_ANT), .N_CH(N_CH), .METHOD(AX_METHOD),
            .TRUNC_ESAC(AX_TRUNC_ESAC), .TRUNC_FSAC(AX_TRUNC_FSAC),
            .TRUNC_EMAC(AX_TRUNC_EMAC), .TRUNC_FMAC(AX_TRUNC_FMAC),
            .PPT_COLS(AX_PPT_COLS), .DRUM_K(AX_DRUM_K)) u_ax_core (
    .clk, .rst_n, .en(core_en[CORE_AX]), .bias(core_bias[CORE_AX]),
    .in_valid(core_in_valid[CORE_AX]), .in_ready(core_in_ready[CORE_AX]), .in_beat(core_beat),
    .out_valid(core_out_valid[CORE_AX]), .out_ready(core_out_ready[CORE_AX]),
    .out_gain(core_gain[CORE_AX]), .stall(core_stall[CORE_AX])
  );

  assign core_on = core_en;

endmodule
