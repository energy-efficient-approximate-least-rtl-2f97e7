// tb_hetero_ctrl: drives the host side and stands in for the two cores with
// plain signals. Checks register writes (core enables, sign-extended unbias
// values of the approximate core, zero bias of the accurate core), routing of
// bus beats and of the ready signal by destination core, the alternating
// service of two pending results, and the switch and conflict counters.
module tb_hetero_ctrl;
  import ls_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic cfg_we = 0;
  logic [1:0] cfg_addr = '0;
  logic [31:0] cfg_wdata = '0;
  logic bus_valid = 0, bus_core = 0, res_ready = 0;
  logic bus_ready, res_valid, res_core;
  ls_beat_t bus_beat, core_beat;
  ls_gain_t res_gain;
  ls_gain_t core_gain [N_CORES];
  ls_bias_t core_bias [N_CORES];
  logic [N_CORES-1:0] core_en, core_in_valid, core_in_ready, core_out_valid, core_out_ready;
  logic [15:0] n_switches, n_conflicts;

  hetero_ctrl dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got=%0d exp=%0d", what, got, exp);
    end
  endtask

  task automatic wr(logic [1:0] ad, logic [31:0] d);
    @(negedge clk); cfg_we = 1; cfg_addr = ad; cfg_wdata = d;
    @(negedge clk); cfg_we = 0;
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic last;
    int served0, served1;
    bus_beat = '0; core_in_ready = '0; core_out_valid = '0;
    core_gain[0] = '{re: 23'd111, im: 22'd222};
    core_gain[1] = '{re: 23'd333, im: 22'd444};
    repeat (2) @(posedge clk);
    rst_n = 1;
    check("cores off after reset", core_en, 0);
    wr(2'd0, 32'h1);
    check("accurate core on", core_en, 2'b01);
    wr(2'd0, 32'h2);
    check("approximate core on", core_en, 2'b10);
    wr(2'd0, 32'h2);   // no change, not a switch
    wr(2'd0, 32'h3);
    check("both on", core_en, 2'b11);
    check("switch count", n_switches, 3);
    wr(2'd1, 32'h1FF_FFF0);  // -16 in 25 bits
    wr(2'd2, 32'd77);
    wr(2'd3, 32'hFF_FFFF);   // -1 in 24 bits
    check("bias mac_real", core_bias[1].mac_real, -16);
    check("bias mac_imag", core_bias[1].mac_imag, 77);
    check("bias sac", core_bias[1].sac, -1);
    check("accurate bias zero", core_bias[0], 0);
    // routing
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      // a stalled beat is held, as the bus rule requires
      if (!(bus_valid && !bus_ready)) begin
        bus_valid = 1'($urandom_range(0, 1));
        bus_core = 1'($urandom_range(0, 1));
        bus_beat = ls_beat_t'({$urandom, $urandom, $urandom, $urandom});
      end
      core_in_ready = 2'($urandom_range(0, 3));
      #1;
      check("valid to selected core", core_in_valid[bus_core], bus_valid);
      check("no valid to other core", core_in_valid[!bus_core], 0);
      check("ready from selected core", bus_ready, core_in_ready[bus_core]);
      check("beat passes", core_beat == bus_beat, 1);
    end
    @(negedge clk); bus_valid = 0;
    // results: both cores pending, host always ready -> alternate
    core_out_valid = 2'b11; res_ready = 1;
    served0 = 0; served1 = 0;
    for (int n = 0; n < 20; n++) begin
      #1;
      check("result valid", res_valid, 1);
      check("result tag", res_gain.re, res_core ? 333 : 111);
      check("only picked core released", core_out_ready, res_core ? 2'b10 : 2'b01);
      if (n > 0) check("alternates", res_core, !last);
      last = res_core;
      if (res_core) served1++; else served0++;
      @(negedge clk);
    end
    check("fair share", served0, served1);
    check("conflicts counted", n_conflicts, 20);
    // single pending result, host not ready: held
    core_out_valid = 2'b10; res_ready = 0; #1;
    check("held result core", res_core, 1);
    check("not released", core_out_ready, 0);
    @(negedge clk);
    core_out_valid = 2'b00; #1;
    check("idle", res_valid, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
