// phase_gen: four-phase clock generator of the processor.
//
// The processor divides each of its cycles (one input sample) into four non-overlapping
// phases, so that four operations can follow each other inside one cycle. In this
// synchronous implementation the phases are enables rather than separate clocks: a one-hot
// ring of four flip-flops, advanced by `advance`, marks the current phase (`phi`, exactly one
// bit set at any time, so the phases can never overlap), and `ph` gives the same phase as a
// number. After reset the ring points at phase 0. When `advance` is low the ring holds, which
// is how the sequence control suspends the processor. The four-phase scheme is from the
// document; building it as enables from the system clock is this design's choice.
module phase_gen
  import dsp_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       advance,
  output logic [3:0] phi,
  output phase_e     ph
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       phi <= 4'b0001;
    else if (advance) phi <= {phi[2:0], phi[3]};
  end

  always_comb begin
    unique case (phi)
      4'b0010: ph = PH1;
      4'b0100: ph = PH2;
      4'b1000: ph = PH3;
      default: ph = PH0;
    endcase
  end

  assert property (@(posedge clk) disable iff (!rst_n) $onehot(phi))
    else $error("phase_gen: phases overlap or vanished");
endmodule
