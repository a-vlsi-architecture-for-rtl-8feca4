// arith_unit: one arithmetic unit of the processor, solving the computational primitive
//   q = [c*f + r] + [d*y + q']
// once per processor cycle.
//
// Stage 1 is a 16x16 signed multiplier. Its 32-bit product is split at the coefficient's
// fraction point: the upper part (the whole-number part, PW-LW bits) goes to the MSB register,
// the lower LW bits go to an LSB register. A second LSB register behind the first keeps the
// fraction bits of the earlier product of the same cycle. Stage 2 holds two adders: the LSB
// adder sums the two fraction fields, and the main adder sums the MSB register, the
// accumulator and the carry out of the LSB adder. The accumulator is loaded with the state
// variables r + q' at the start of a cycle and afterwards with the main adder's output. The
// main adder's output, joined with the LSB adder's fraction bits, is rounded and saturated to
// 16 bits (round_sat) and latched in the results register `res`. The multiplier is used twice
// per cycle, first with the C/F operands and then with D/Y. Because the fractions are kept
// apart and added once, the result equals rounding the exact sum r + q' + (c*f + d*y)/2^LW.
//
// Phase plan (one step per enabled clock, `en` high); P1 = c*f, P2 = d*y:
//   PH0  MSB <= P1 whole part   LSB1 <= P1 fraction   LSB2 <= 0      ACC <= r + q'
//   PH1  ACC <= ACC + MSB       (RESULT_PH == PH1: res <= round_sat of that sum with LSB1)
//   PH2  MSB <= P2 whole part   LSB1 <= P2 fraction   LSB2 <= LSB1
//   PH3  ACC <= ACC + MSB + carry(LSB1 + LSB2)   (RESULT_PH == PH3: res <= rounded sum)
// In PH1 the second LSB register is zero, so the carry is zero and only the whole part of
// c*f is accumulated. The output unit uses RESULT_PH = PH1, so the output g is ready as the
// feedback term y of the other units in PH2. `res_next` is the value being latched, for
// writers that must store it at the same clock edge. `ovf` is a one-clock pulse after a
// result that had to be saturated.
// The multiplier and two-adder pipeline, the MSB and LSB registers, the accumulator loaded
// with the state variables, 16-bit words, the 32-bit product and saturation are from the
// document; the phase plan, the split position and clearing the second LSB register at the
// start of each cycle are this design's choices.
module arith_unit
  import dsp_pkg::*;
#(
  parameter phase_e RESULT_PH = PH3
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   en,
  input  phase_e ph,
  input  word_t  c,
  input  word_t  d,
  input  word_t  f,
  input  word_t  y,
  input  word_t  r,
  input  word_t  qv,
  output word_t  res,
  output word_t  res_next,
  output logic   ovf
);
  logic signed [PW-1:0]    prod;
  logic signed [PW-LW-1:0] msb;
  logic        [LW-1:0]    lsb1, lsb2;
  logic        [LW:0]      lsb_sum;
  logic signed [IW-1:0]    acc, sum;
  logic                    ovf_next;

  // Multiplier: operands chosen by phase (C/F before PH1, D/Y before PH3).
  assign prod    = (ph == PH0) ? c * f : d * y;
  // LSB adder: fraction bits of both products; its top bit is the carry into the main adder.
  assign lsb_sum = {1'b0, lsb1} + {1'b0, lsb2};
  // Main adder.
  assign sum     = acc + IW'(msb) + IW'({1'b0, lsb_sum[LW]});

  round_sat #(.IN_W(IW + LW), .OUT_W(DW), .FRAC(LW)) u_rs (
    .acc({sum, lsb_sum[LW-1:0]}), .q(res_next), .ovf(ovf_next)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      msb  <= '0;
      lsb1 <= '0;
      lsb2 <= '0;
      acc  <= '0;
      res  <= '0;
      ovf  <= 1'b0;
    end else begin
      ovf <= 1'b0;
      if (en) begin
        unique case (ph)
          PH0: begin
            msb  <= prod[PW-1:LW];
            lsb1 <= prod[LW-1:0];
            lsb2 <= '0;
            acc  <= IW'(r) + IW'(qv);
          end
          PH1: acc <= sum;
          PH2: begin
            msb  <= prod[PW-1:LW];
            lsb1 <= prod[LW-1:0];
            lsb2 <= lsb1;
          end
          PH3: acc <= sum;
        endcase
        if (ph == RESULT_PH) begin
          res <= res_next;
          ovf <= ovf_next;
        end
      end
    end
  end
endmodule
