// tb_ls_full: the accelerator at its default size - 124 antennas, 4 channels,
// 496 terms per gain - with no parameter changed, running the calibration
// schedule of the best configuration (unbiased input truncation): 64 complete
// StEFCal iterations (all 124 gains each) on the approximate core, a switch,
// 28 on the accurate core (92 in all), then one iteration of two independent
// problems with both cores on. See tb_ls_body.svh for what is checked.
module tb_ls_full;
  localparam int NA = ls_pkg::N_ANT_DEFAULT, NC = ls_pkg::N_CH_DEFAULT, N_AX = 64, N_ACC = 28;
  localparam ls_pkg::approx_method_t AX_METHOD = ls_pkg::AM_INPUT_TRUNC;

  logic clk = 0, rst_n = 0;
  logic cfg_we = 0;
  logic [1:0] cfg_addr = '0;
  logic [31:0] cfg_wdata = '0;
  logic bus_valid = 0, bus_ready, bus_core = 0;
  ls_pkg::ls_beat_t bus_beat;
  logic res_valid, res_ready = 0, res_core;
  ls_pkg::ls_gain_t res_gain;
  logic [1:0] core_on, core_stall;
  logic [15:0] n_switches, n_conflicts;

  ls_accelerator dut (.*);

  initial begin
    repeat (50000000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  `include "tb_ls_body.svh"
endmodule
