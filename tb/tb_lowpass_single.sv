// tb_lowpass_single: the single-processor system (one second-order section) running a 2-D
// IIR low-pass filter on test images.
//
// The filter is separable: H(z1,z2) = H1(z1)·H1(z2) with the second-order Butterworth
// low-pass H1(z) = 0.0675(1 + 2z^-1 + z^-2) / (1 - 1.1430z^-1 + 0.4128z^-2) (cut-off at one
// tenth of the sampling rate), so a(j,k) = bb[j]·bb[k] and b(j,k) = aa[j]·aa[k]. Three images
// are filtered:
//   * a constant image: far from the edges the output must settle at the input level (unit
//     DC gain, within coefficient-quantisation error);
//   * a checkerboard (the highest spatial frequency): the output must be nearly zero;
//   * a random image: every output must equal the fixed-point reference model.
// Every output of every image is compared with the model, and each frame must take four
// clocks per pixel plus a fixed overhead.
module tb_lowpass_single;
  import dsp_pkg::*;
  import iir_ref_pkg::*;

  localparam int ROWS = 32;
  localparam int COLS = 48;
  localparam int N    = ROWS * COLS;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        host_coef_we = 0, host_start = 0;
  logic [7:0]  host_coef_sec = 0;
  coef_wr_t    host_coef = '0;
  logic        host_busy, host_done, host_ovf;
  logic [2:0]  host_scale;
  logic        in_valid, in_ready, out_valid;
  word_t       in_data, out_data;
  logic [0:0]  sec_busy, sec_stall_in, sec_stall_out;

  dsp_system #(.NSEC(1), .ROW_DEPTH(COLS)) dut (
    .clk, .rst_n, .host_coef_we, .host_coef_sec, .host_coef, .host_start,
    .host_rows(16'(ROWS)), .host_cols(16'(COLS)), .host_agc_en(1'b0),
    .host_busy, .host_done, .host_scale, .host_ovf,
    .in_valid, .in_ready, .in_data, .out_valid, .out_ready(1'b1), .out_data,
    .sec_busy, .sec_stall_in, .sec_stall_out
  );

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (3 * (4 * N + 200)) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  int fin [];
  int gout [];
  int nin, nout;
  coefs_t c, d;

  assign in_valid = (nin < N);
  assign in_data  = (nin < N) ? 16'(fin[nin]) : '0;

  always @(posedge clk) if (rst_n) begin
    if (in_valid && in_ready) nin <= nin + 1;
    if (out_valid) begin gout[nout] = out_data; nout++; end
  end

  task automatic frame(input string name);
    int t0, clocks, errs;
    int g [];
    coefs_t cs [], ds [];
    bit ovf;
    nin = 0; nout = 0;
    gout = new[N];
    @(negedge clk); host_start = 1;
    @(negedge clk); host_start = 0;
    t0 = cyc;
    while (!host_done) @(negedge clk);
    clocks = cyc - t0;
    cs = new[N]; ds = new[N];
    foreach (cs[i]) begin cs[i] = c; ds[i] = d; end
    section(ROWS, COLS, cs, ds, fin, g, ovf);
    errs = 0;
    for (int i = 0; i < N; i++) begin
      checks++;
      if (gout[i] != g[i]) begin
        failures++;
        if (errs++ < 5) $display("FAIL %s: sample %0d got %0d expected %0d", name, i, gout[i], g[i]);
      end
    end
    chk(clocks >= 4 * N && clocks <= 4 * N + 40, $sformatf("%s: %0d clocks", name, clocks));
    $display("%s: %0d clocks for %0d pixels", name, clocks, N);
  endtask

  initial begin
    real bb [3], aa [3];
    bb = '{0.0675, 0.1349, 0.0675};
    aa = '{1.0, -1.1430, 0.4128};
    for (int u = 0; u < 9; u++) begin
      c[u] = $rtoi(bb[UJ[u]] * bb[UK[u]] * 16384.0 + 0.5);
      d[u] = (u == 0) ? 0 : -$rtoi(aa[UJ[u]] * aa[UK[u]] * 16384.0 + (aa[UJ[u]] * aa[UK[u]] > 0 ? 0.5 : -0.5));
    end
    fin = new[N];
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int u = 0; u < 9; u++) begin
      @(negedge clk);
      host_coef_we = 1; host_coef_sec = 0;
      host_coef = '{unit: 4'(u), c: 16'(c[u]), d: 16'(d[u])};
    end
    @(negedge clk); host_coef_we = 0;

    foreach (fin[i]) fin[i] = 4000;
    frame("constant");
    begin
      int v;
      v = gout[N - 1];
      $display("constant: settled output %0d for input 4000", v);
      chk(v > 3800 && v < 4200, $sformatf("DC gain: %0d for 4000", v));
    end

    foreach (fin[i]) fin[i] = (((i % COLS) + (i / COLS)) % 2) ? 4000 : -4000;
    frame("checkerboard");
    begin
      int mx;
      mx = 0;
      for (int n = ROWS / 2; n < ROWS; n++)
        for (int m = COLS / 2; m < COLS; m++)
          if (gout[n * COLS + m] > mx || -gout[n * COLS + m] > mx)
            mx = (gout[n * COLS + m] > 0) ? gout[n * COLS + m] : -gout[n * COLS + m];
      $display("checkerboard: largest settled output %0d for input +-4000", mx);
      chk(mx < 100, $sformatf("high frequency not suppressed: %0d", mx));
    end

    foreach (fin[i]) fin[i] = $urandom_range(0, 8000) - 4000;
    frame("random");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
