// round_sat: the "16-bit control logic" at the end of an arithmetic unit.
//
// Takes the arithmetic unit's sum, which carries FRAC fractional bits, rounds it to an
// integer (round half up: add 2^(FRAC-1), then shift right arithmetically), and saturates
// the result to the signed OUT_W-bit range. `ovf` is high whenever saturation changed the
// value; the processor collects these flags as overflow status for overall scaling.
// Purely combinational. Rounding, saturation and the overflow status come from the
// document; the round-half-up rule and the fraction position are this design's choices.
module round_sat #(
  parameter int unsigned IN_W  = 34,
  parameter int unsigned OUT_W = 16,
  parameter int unsigned FRAC  = 14
) (
  input  logic signed [IN_W-1:0]  acc,
  output logic signed [OUT_W-1:0] q,
  output logic                    ovf
);
  localparam int unsigned SW = IN_W - FRAC + 1;  // width of the rounded integer part
  localparam logic signed [IN_W:0] HALF = (FRAC == 0) ? '0 : ((IN_W+1)'(1) <<< (FRAC - 1));
  localparam logic signed [SW-1:0] MAXV = (SW'(1) <<< (OUT_W - 1)) - SW'(1);
  localparam logic signed [SW-1:0] MINV = -(SW'(1) <<< (OUT_W - 1));

  logic signed [IN_W:0] rounded;
  logic signed [SW-1:0] whole;

  always_comb begin
    rounded = {acc[IN_W-1], acc} + HALF;
    whole   = rounded[IN_W:FRAC];
    if (whole > MAXV) begin
      q   = MAXV[OUT_W-1:0];
      ovf = 1'b1;
    end else if (whole < MINV) begin
      q   = MINV[OUT_W-1:0];
      ovf = 1'b1;
    end else begin
      q   = whole[OUT_W-1:0];
      ovf = 1'b0;
    end
  end
endmodule
