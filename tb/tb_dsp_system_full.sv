// tb_dsp_system_full: the system at its default size (two cascaded sections, 512-word row
// buffers) filtering one 512 x 512 frame, the full row length the buffers hold. Input is
// offered and output taken on every clock; every output is compared with the two-section
// fixed-point reference, and the frame must take four clocks per sample plus a small fixed
// overhead (coefficient load and pipeline fill).
module tb_dsp_system_full;
  import dsp_pkg::*;
  import iir_ref_pkg::*;

  localparam int ROWS = 512;
  localparam int COLS = 512;
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
  logic [1:0]  sec_busy, sec_stall_in, sec_stall_out;

  dsp_system dut (
    .clk, .rst_n, .host_coef_we, .host_coef_sec, .host_coef, .host_start,
    .host_rows(16'(ROWS)), .host_cols(16'(COLS)), .host_agc_en(1'b0),
    .host_busy, .host_done, .host_scale, .host_ovf,
    .in_valid, .in_ready, .in_data, .out_valid, .out_ready(1'b1), .out_data,
    .sec_busy, .sec_stall_in, .sec_stall_out
  );

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (4 * N + 20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int fin [];
  int gout [];
  int nin = 0, nout = 0;
  coefs_t c [2], d [2];

  assign in_valid = (nin < N);
  assign in_data  = (nin < N) ? 16'(fin[nin]) : '0;

  always @(posedge clk) if (rst_n) begin
    if (in_valid && in_ready) nin <= nin + 1;
    if (out_valid) begin gout[nout] = out_data; nout++; end
  end

  initial begin
    int t0, clocks, errs;
    int x [], g [];
    coefs_t cs [], ds [];
    bit ovf;
    fin = new[N];
    gout = new[N];
    // a smooth test image: diagonal ramps plus pseudo-random texture
    foreach (fin[i]) fin[i] = ((i % COLS) + (i / COLS)) % 256 * 4 - 512 + int'($urandom_range(0, 64)) - 32;
    test_filter(5, c[0], d[0]);
    test_filter(17, c[1], d[1]);
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < 2; s++)
      for (int u = 0; u < 9; u++) begin
        @(negedge clk);
        host_coef_we = 1; host_coef_sec = 8'(s);
        host_coef = '{unit: 4'(u), c: 16'(c[s][u]), d: 16'(d[s][u])};
      end
    @(negedge clk); host_coef_we = 0;
    host_start = 1;
    @(negedge clk); host_start = 0;
    t0 = cyc;
    while (!host_done) @(negedge clk);
    clocks = cyc - t0;

    cs = new[N]; ds = new[N];
    x = fin;
    for (int s = 0; s < 2; s++) begin
      foreach (cs[i]) begin cs[i] = c[s]; ds[i] = d[s]; end
      section(ROWS, COLS, cs, ds, x, g, ovf);
      x = g;
    end
    errs = 0;
    checks++;
    if (nout != N) begin failures++; $display("FAIL %0d outputs", nout); end
    for (int i = 0; i < N; i++) if (gout[i] != g[i]) begin
      if (errs < 10) $display("FAIL sample %0d got %0d expected %0d", i, gout[i], g[i]);
      errs++;
    end
    checks += N;
    failures += errs;
    $display("frame: %0d clocks for %0d samples (%0d mismatches)", clocks, N, errs);
    checks++;
    if (clocks > 4 * N + 60 || clocks < 4 * N) begin
      failures++;
      $display("FAIL throughput: %0d clocks", clocks);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
