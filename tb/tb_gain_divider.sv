// tb_gain_divider: divides random MAC-real-format numerators (25.18) by random
// SAC-format denominators (24.23) into the 23.14 gain format and compares the
// quotient with the integer reference (rounding towards zero, saturation,
// zero divisor). Checks the latency of NW + SHIFT = 44 clocks from start to
// done (counted in clock edges after the edge that takes start) and that
// busy is high meanwhile.
module tb_gain_divider;
  import ls_pkg::*;
  import tb_ref_pkg::*;

  localparam int LAT = MACR_WL + A_FL + SAC_FL - MACR_FL;  // 44

  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic signed [MACR_WL-1:0] num;
  logic signed [SAC_WL-1:0]  den;
  logic signed [A_WL-1:0]    q;

  gain_divider #(.NW(MACR_WL), .NF(MACR_FL), .DW(SAC_WL), .DF(SAC_FL), .QW(A_WL), .QF(A_FL))
    dut (.clk, .rst_n, .start, .num, .den, .busy, .done, .q);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s num=%0d den=%0d got=%0d exp=%0d", what, num, den, got, exp);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint nv, dv;
    int cyc;
    num = '0; den = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 600; n++) begin
      nv = rnd(MACR_WL);
      case (n % 4)
        0: dv = rnd(SAC_WL);
        1: dv = longint'($urandom_range(1, 1 << 22));      // positive, typical
        2: dv = longint'($urandom_range(1, 255));          // tiny: saturates
        default: dv = (n == 3) ? 0 : longint'($urandom_range(1 << 20, (1 << 23) - 1));
      endcase
      @(negedge clk);
      num = MACR_WL'(nv); den = SAC_WL'(dv); start = 1;
      @(negedge clk);
      start = 0;
      cyc = 0;
      while (!done) begin
        checks++; if (!busy) begin failures++; $display("FAIL busy low during division"); end
        @(negedge clk); cyc++;
      end
      check("quotient", q, div(nv, MACR_FL, dv, SAC_FL, A_WL, A_FL));
      check("latency", cyc, LAT);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
