// fx_requant: converts a signed fixed-point value from format WI.FI to WO.FO.
//
// Fractional bits are dropped by rounding to nearest, ties towards plus
// infinity (add half an output LSB, then shift right arithmetically), or are
// appended as zeros; the integer part is then cut to WO bits, which wraps on
// overflow. The formats are sized so that no overflow occurs on valid data.
// Purely combinational. The rounding mode is this design's choice: plain
// truncation leaves a bias of half an LSB per accumulated term, which held the
// calibration's convergence measure near 2e-4 instead of a few 1e-6.
module fx_requant #(
  parameter int unsigned WI = 16,
  parameter int unsigned FI = 8,
  parameter int unsigned WO = 16,
  parameter int unsigned FO = 8
) (
  input  logic signed [WI-1:0] din,
  output logic signed [WO-1:0] dout
);
  // Wide enough for any shift in either direction plus the sign.
  localparam int unsigned WW = WI + WO + ((FO > FI) ? (FO - FI) : 0) + 1;

  logic signed [WW-1:0] wide;

  always_comb begin
    wide = WW'(din);  // sign extension
    if (FO >= FI) wide = wide <<< (FO - FI);
    else          wide = (wide + (WW'(1) <<< (FI - FO - 1))) >>> (FI - FO);
    dout = wide[WO-1:0];
  end
endmodule
