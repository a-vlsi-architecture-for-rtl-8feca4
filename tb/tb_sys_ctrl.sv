// tb_sys_ctrl: checks the system controller alone, with two processor sections modelled by
// the testbench. The host stores coefficients; a frame start must copy all 2 x 9 of them to
// the right processor (first-section C values shifted by the scale factor), pulse the
// processor start, admit exactly rows*cols input samples (never while IBUF is full), finish
// after the last output, and raise the scale factor after a frame with overflow when gain
// control is on. Coefficient writes during a frame must reach the processor directly.
module tb_sys_ctrl;
  import dsp_pkg::*;
  localparam int NSEC = 2;
  logic clk = 0, rst_n = 0;
  logic host_coef_we = 0, host_start = 0, host_agc_en = 0;
  logic [7:0] host_coef_sec = 0;
  coef_wr_t host_coef = '0;
  logic [15:0] host_rows = 3, host_cols = 4;
  logic host_busy, host_done, host_ovf;
  logic [2:0] host_scale;
  logic [NSEC-1:0] dsp_coef_we, dsp_ovf = '0;
  coef_wr_t dsp_coef;
  logic dsp_start;
  logic [15:0] dsp_rows, dsp_cols;
  logic in_valid = 0, ibuf_full = 0, in_ready, out_taken = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  sys_ctrl #(.NSEC(NSEC)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  // what each modelled processor received
  word_t gc [NSEC][9], gd [NSEC][9];
  int starts = 0, accepted = 0;
  always @(posedge clk) if (rst_n) begin
    for (int s = 0; s < NSEC; s++)
      if (dsp_coef_we[s]) begin gc[s][dsp_coef.unit] = dsp_coef.c; gd[s][dsp_coef.unit] = dsp_coef.d; end
    if (dsp_start) starts++;
    if (in_valid && in_ready) begin chk(!ibuf_full, "input admitted while IBUF full"); accepted++; end
  end

  word_t hc [NSEC][9], hd [NSEC][9];

  task automatic run_frame(input bit with_ovf, input int expect_scale, input bit adapt);
    int n = int'(host_rows) * int'(host_cols);
    int outs = 0;
    accepted = 0; starts = 0;
    @(negedge clk); host_start = 1;
    @(negedge clk); host_start = 0;
    while (!host_done) begin
      @(negedge clk);
      in_valid  = $urandom_range(0, 1);
      ibuf_full = ($urandom_range(0, 4) == 0);
      dsp_ovf   = with_ovf && starts > 0 ? 2'b10 : 2'b00;
      out_taken = (outs < accepted) && $urandom_range(0, 1);
      if (out_taken) outs++;
      if (adapt && accepted == 2 && host_coef_we == 0 && starts > 0 && gc[1][3] != 16'h1234) begin
        host_coef_we = 1; host_coef_sec = 1; host_coef = '{unit: 3, c: 16'h1234, d: 16'h4321};
      end else host_coef_we = 0;
    end
    host_coef_we = 0; in_valid = 0; out_taken = 0; dsp_ovf = 0;
    chk(accepted == n, $sformatf("admitted %0d samples, expected %0d", accepted, n));
    chk(starts == 1, "processor start count");
    chk(dsp_rows == host_rows && dsp_cols == host_cols, "frame size");
    chk(int'(host_scale) == expect_scale, $sformatf("scale %0d expected %0d", host_scale, expect_scale));
    chk(host_ovf == with_ovf, "overflow report");
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < NSEC; s++)
      for (int u = 0; u < 9; u++) begin
        hc[s][u] = 16'($urandom); hd[s][u] = 16'($urandom);
        @(negedge clk);
        host_coef_we = 1; host_coef_sec = 8'(s);
        host_coef = '{unit: 4'(u), c: hc[s][u], d: hd[s][u]};
      end
    @(negedge clk); host_coef_we = 0;
    host_agc_en = 1;
    run_frame(0, 0, 0);
    for (int s = 0; s < NSEC; s++)
      for (int u = 0; u < 9; u++)
        chk(gc[s][u] == hc[s][u] && gd[s][u] == hd[s][u], $sformatf("coef %0d/%0d", s, u));
    run_frame(1, 1, 0);  // overflow raises the scale for the next frame
    host_rows = 2; host_cols = 5;
    run_frame(0, 1, 1);  // loaded with scale 1
    for (int u = 0; u < 9; u++) begin
      chk(gc[0][u] == (hc[0][u] >>> 1), $sformatf("scaled coef %0d", u));
      chk(gc[1][u] == ((u == 3) ? 16'h1234 : hc[1][u]), $sformatf("section 2 coef %0d", u));
    end
    chk(gd[1][3] == 16'h4321, "coefficient written during the frame");
    host_agc_en = 0;
    run_frame(0, 0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
