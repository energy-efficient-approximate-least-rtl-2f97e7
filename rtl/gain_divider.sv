// gain_divider: sequential signed fixed-point divider, q = num / den.
//
// Used twice per core to divide the accumulated MAC real and imaginary parts
// by the SAC sum, which gives the new gain g_p (Eq. 3). The magnitudes are
// divided by a radix-2 restoring long division, one quotient bit per clock:
// the dividend is |num| shifted left by SHIFT = QF + DF - NF so that the
// integer quotient carries QF fractional bits. The quotient is rounded towards
// zero, given the sign of num XOR den, and saturated to the QW-bit range.
// A zero divisor gives the saturated value with the sign of num.
// Timing: start is accepted when busy = 0; done pulses LAT = NW + SHIFT clocks
// later with q valid in that cycle (q holds until the next result).
// The document gives only the division itself; the algorithm, rounding,
// saturation and handshake are this design's own.
module gain_divider #(
  parameter int unsigned NW = 25,  // numerator word length
  parameter int unsigned NF = 18,  // numerator fractional length
  parameter int unsigned DW = 24,  // denominator word length
  parameter int unsigned DF = 23,  // denominator fractional length
  parameter int unsigned QW = 23,  // quotient word length
  parameter int unsigned QF = 14   // quotient fractional length
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic signed [NW-1:0] num,
  input  logic signed [DW-1:0] den,
  output logic                 busy,
  output logic                 done,
  output logic signed [QW-1:0] q
);
  localparam int unsigned SHIFT = QF + DF - NF;
  localparam int unsigned VW    = NW + SHIFT;   // dividend width = iterations
  localparam int unsigned CW    = $clog2(VW + 1);

  logic [VW-1:0] dvd;      // dividend bits still to be brought down
  logic [VW-1:0] quo;      // quotient bits produced so far
  logic [DW:0]   rem;      // partial remainder
  logic [DW-1:0] dmag;     // divisor magnitude
  logic          neg;
  logic [CW-1:0] cnt;

  logic [DW+1:0] trial;
  logic [DW+1:0] shifted;
  logic [VW-1:0] quo_next;
  logic [VW-1:0] num_mag;

  always_comb begin
    num_mag  = VW'(num[NW-1] ? NW'(-num) : NW'(num)) << SHIFT;
    shifted  = {rem, dvd[VW-1]};
    trial    = shifted - (DW+2)'(dmag);
    quo_next = {quo[VW-2:0], ~trial[DW+1]};
  end

  // Saturate the magnitude into the signed QW-bit range.
  localparam logic [VW-1:0] POS_MAX = VW'((64'd1 << (QW-1)) - 1);
  localparam logic [VW-1:0] NEG_MAX = VW'(64'd1 << (QW-1));

  function automatic logic signed [QW-1:0] finish(input logic [VW-1:0] mag, input logic n);
    if (n) return (mag > NEG_MAX) ? QW'(-NEG_MAX) : QW'(-mag);
    else   return (mag > POS_MAX) ? QW'(POS_MAX)  : QW'(mag);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
      q    <= '0;
      dvd  <= '0;
      quo  <= '0;
      rem  <= '0;
      dmag <= '0;
      neg  <= 1'b0;
      cnt  <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy <= 1'b1;
          dvd  <= num_mag;
          quo  <= '0;
          rem  <= '0;
          dmag <= den[DW-1] ? DW'(-den) : DW'(den);
          neg  <= num[NW-1] ^ den[DW-1];
          cnt  <= CW'(VW);
        end
      end else begin
        dvd <= dvd << 1;
        quo <= quo_next;
        rem <= trial[DW+1] ? shifted[DW:0] : trial[DW:0];
        cnt <= cnt - 1'b1;
        if (cnt == CW'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
          q    <= finish(quo_next, neg);
        end
      end
    end
  end

  // A new division may only start while the divider is idle.
  assert property (@(posedge clk) disable iff (!rst_n) busy |-> !start)
    else $error("gain_divider: start while busy");

endmodule
