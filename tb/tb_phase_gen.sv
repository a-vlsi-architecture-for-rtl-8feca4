// tb_phase_gen: checks that the four-phase generator starts in phase 0, steps
// 0,1,2,3,0,... only when advanced, holds otherwise, and always has exactly one phase active.
module tb_phase_gen;
  import dsp_pkg::*;
  logic clk = 0, rst_n = 0, advance = 0;
  logic [3:0] phi;
  phase_e ph;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  phase_gen dut (.clk, .rst_n, .advance, .phi, .ph);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  initial begin
    int model = 0;
    int steps = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(ph == PH0 && phi == 4'b0001, "reset phase");
    repeat (400) begin
      advance = ($urandom_range(0, 2) != 0);
      @(posedge clk);
      if (advance) begin model = (model + 1) % 4; steps++; end
      @(negedge clk);
      chk(int'(ph) == model, $sformatf("phase %0d expected %0d", ph, model));
      chk(phi == 4'(1 << model), $sformatf("phi %b", phi));
    end
    chk(steps > 100, "too few steps");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
