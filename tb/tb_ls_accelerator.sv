// tb_ls_accelerator: end-to-end test of the heterogeneous accelerator at a
// reduced size (8 antennas, 2 channels, 16 terms per gain): 4 iterations on
// the approximate core, a switch, 4 on the accurate core, then both cores at
// once. See tb_ls_body.svh for what is checked.
module tb_ls_accelerator;
  localparam int NA = 8, NC = 2, N_AX = 4, N_ACC = 4;
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

  ls_accelerator #(.N_ANT(NA), .N_CH(NC)) dut (.*);

  initial begin
    repeat (2000000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  `include "tb_ls_body.svh"
endmodule
