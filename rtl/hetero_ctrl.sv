// hetero_ctrl: the CPU-facing control of the heterogeneous accelerator.
//
// It holds the registers the host writes over a simple write port and joins
// the shared data bus to the two cores:
//   * CTRL (address 0): bit 0 switches the accurate core on, bit 1 the
//     approximate core. A core that is off accepts no beats and keeps its state
//     (a stand-in for power or clock gating). Both may be on at once, e.g. for
//     two independent calibrations.
//   * BIAS_MR / BIAS_MI / BIAS_SAC (addresses 1..3): initial accumulator values
//     of the approximate core used for unbiasing (sign-extended from the low
//     bits of the write data); the accurate core always starts from 0.
// Bus beats carry a destination core index and go to that core with a
// valid/ready handshake; a beat for a core that is off is held (not ready).
// Gains coming back from the cores are returned one at a time on the result
// port; when both cores offer one, the core not served last goes first.
// Counters of core switches and result conflicts are exported for
// observation. The document shows only a CPU, a data bus and a control line
// to the two cores; the register map, handshakes and arbitration are this
// design's own.
module hetero_ctrl
  import ls_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  // host register write port
  input  logic                 cfg_we,
  input  logic [1:0]           cfg_addr,
  input  logic [31:0]          cfg_wdata,
  // shared data bus, host side
  input  logic                 bus_valid,
  output logic                 bus_ready,
  input  logic                 bus_core,     // 0: accurate, 1: approximate
  input  ls_beat_t             bus_beat,
  // results, host side
  output logic                 res_valid,
  input  logic                 res_ready,
  output logic                 res_core,
  output ls_gain_t             res_gain,
  // core side
  output logic [N_CORES-1:0]   core_en,
  output ls_bias_t             core_bias [N_CORES],
  output logic [N_CORES-1:0]   core_in_valid,
  input  logic [N_CORES-1:0]   core_in_ready,
  output ls_beat_t             core_beat,
  input  logic [N_CORES-1:0]   core_out_valid,
  output logic [N_CORES-1:0]   core_out_ready,
  input  ls_gain_t             core_gain [N_CORES],
  // observation
  output logic [15:0]          n_switches,   // changes of CTRL core enables
  output logic [15:0]          n_conflicts   // cycles with both results pending
);
  localparam logic [1:0] A_CTRL = 2'd0, A_BIAS_MR = 2'd1, A_BIAS_MI = 2'd2, A_BIAS_SAC = 2'd3;

  ls_bias_t ax_bias;
  logic     last_served;
  logic     pick;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      core_en     <= '0;
      ax_bias     <= '0;
      n_switches  <= '0;
    end else if (cfg_we) begin
      unique case (cfg_addr)
        A_CTRL: begin
          if (cfg_wdata[N_CORES-1:0] != core_en) n_switches <= n_switches + 1'b1;
          core_en <= cfg_wdata[N_CORES-1:0];
        end
        A_BIAS_MR:  ax_bias.mac_real <= cfg_wdata[MACR_WL-1:0];
        A_BIAS_MI:  ax_bias.mac_imag <= cfg_wdata[MACI_WL-1:0];
        A_BIAS_SAC: ax_bias.sac      <= cfg_wdata[SAC_WL-1:0];
      endcase
    end
  end

  always_comb begin
    core_bias[CORE_ACC] = '0;
    core_bias[CORE_AX]  = ax_bias;
  end

  // ---- data bus routing -------------------------------------------------------
  assign core_beat = bus_beat;
  always_comb begin
    core_in_valid = '0;
    core_in_valid[bus_core] = bus_valid;
  end
  assign bus_ready = core_in_ready[bus_core];

  // ---- result return ------------------------------------------------------------
  always_comb begin
    unique case (core_out_valid)
      2'b01:   pick = 1'b0;
      2'b10:   pick = 1'b1;
      2'b11:   pick = ~last_served;
      default: pick = 1'b0;
    endcase
  end

  assign res_valid = |core_out_valid;
  assign res_core  = pick;
  assign res_gain  = core_gain[pick];
  always_comb begin
    core_out_ready = '0;
    core_out_ready[pick] = res_ready && core_out_valid[pick];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      last_served <= 1'b1;
      n_conflicts <= '0;
    end else begin
      if (res_valid && res_ready) last_served <= pick;
      if (&core_out_valid) n_conflicts <= n_conflicts + 1'b1;
    end
  end

  // A beat offered to the bus stays stable until it is taken.
  assert property (@(posedge clk) disable iff (!rst_n)
                   bus_valid && !bus_ready |=> bus_valid && $stable(bus_core) && $stable(bus_beat))
    else $error("hetero_ctrl: bus beat changed while stalled");

endmodule
