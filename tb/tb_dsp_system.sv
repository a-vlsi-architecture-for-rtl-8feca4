// tb_dsp_system: end-to-end test of the cascaded system with two second-order sections
// (a fourth-order 2-D filter) at reduced buffer sizes.
//
// The host loads two sections' coefficients and runs four frames; every output is compared
// with the two-section cascade of the fixed-point reference model:
//   1. free-running frame: the input is always offered and the output always taken; the
//      system must then deliver one output per four clocks;
//   2. frame with random input gaps and random output back-pressure, so processors suspend
//      on empty input, on a full OBUF and on full inter-processor FIFOs;
//   3. frame with large input and gain control on: outputs saturate, overflow is reported
//      and the scale factor rises;
//   4. a small input: the first section's input coefficients are now halved, which the
//      model reproduces.
// Each mechanism (input stall, output stall, link-FIFO full, overflow, scale change) is
// counted and must happen at least once.
module tb_dsp_system;
  import dsp_pkg::*;
  import iir_ref_pkg::*;

  localparam int NSEC = 2;
  localparam int ROWS = 6;
  localparam int COLS = 14;
  localparam int N    = ROWS * COLS;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        host_coef_we = 0, host_start = 0, host_agc_en = 0;
  logic [7:0]  host_coef_sec = 0;
  coef_wr_t    host_coef = '0;
  logic        host_busy, host_done, host_ovf;
  logic [2:0]  host_scale;
  logic        in_valid, in_ready, out_valid, out_ready;
  word_t       in_data, out_data;
  logic [NSEC-1:0] sec_busy, sec_stall_in, sec_stall_out;

  dsp_system #(.NSEC(NSEC), .ROW_DEPTH(16), .LINK_DEPTH(4)) dut (
    .clk, .rst_n, .host_coef_we, .host_coef_sec, .host_coef, .host_start,
    .host_rows(16'(ROWS)), .host_cols(16'(COLS)), .host_agc_en,
    .host_busy, .host_done, .host_scale, .host_ovf,
    .in_valid, .in_ready, .in_data, .out_valid, .out_ready, .out_data,
    .sec_busy, .sec_stall_in, .sec_stall_out
  );

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (40000) @(posedge clk);
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
  bit rnd;
  int n_stall_in, n_stall_out, n_link_full, n_ovf, n_scale;
  coefs_t c [NSEC], d [NSEC];

  always_comb begin
    in_valid = (nin < N) && (!rnd || ($urandom_range(0, 3) != 0));
    in_data  = (nin < N) ? 16'(fin[nin]) : '0;
  end

  always @(negedge clk) out_ready <= !rnd || ($urandom_range(0, 7) == 0);

  always @(posedge clk) if (rst_n) begin
    if (in_valid && in_ready) nin <= nin + 1;
    if (out_valid && out_ready) begin gout[nout] = out_data; nout++; end
    if (|sec_stall_in) n_stall_in++;
    if (|sec_stall_out) n_stall_out++;
    if (sec_stall_out[0]) n_link_full++;
  end

  task automatic model(input int scale, ref int g [], output bit ovf);
    int x [];
    coefs_t cs [], ds [];
    ovf = 0;
    cs = new[N]; ds = new[N];
    x = new[N];
    x = fin;
    for (int s = 0; s < NSEC; s++) begin
      coefs_t cc = c[s];
      if (s == 0) foreach (cc[u]) cc[u] = int'(word_t'(cc[u]) >>> scale);
      foreach (cs[i]) begin cs[i] = cc; ds[i] = d[s]; end
      section(ROWS, COLS, cs, ds, x, g, ovf);
      x = g;
    end
  endtask

  task automatic frame(input string name, input bit r, output int clocks, output bit ovf);
    int t0, scale0;
    int g [];
    bit movf;
    rnd = r; nin = 0; nout = 0;
    gout = new[N];
    scale0 = host_scale;
    @(negedge clk); host_start = 1;
    @(negedge clk); host_start = 0;
    t0 = cyc;
    while (!host_done) @(negedge clk);
    clocks = cyc - t0;
    ovf = host_ovf;
    model(scale0, g, movf);
    chk(ovf == movf, $sformatf("%s: overflow report %0b, model %0b", name, ovf, movf));
    chk(nout == N, $sformatf("%s: %0d outputs", name, nout));
    begin
      int mx = 0;
      foreach (gout[i]) if (gout[i] > mx || -gout[i] > mx) mx = (gout[i] > 0) ? gout[i] : -gout[i];
      $display("%s: largest output magnitude %0d, overflow %0b", name, mx, ovf);
    end
    for (int i = 0; i < N; i++)
      chk(gout[i] == g[i], $sformatf("%s: sample %0d got %0d expected %0d", name, i, gout[i], g[i]));
  endtask

  initial begin
    int clocks;
    bit ovf;
    n_stall_in = 0; n_stall_out = 0; n_link_full = 0; n_ovf = 0; n_scale = 0;
    nin = N; rnd = 0;
    fin = new[N];
    test_filter(3, c[0], d[0]);
    test_filter(11, c[1], d[1]);
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < NSEC; s++)
      for (int u = 0; u < 9; u++) begin
        @(negedge clk);
        host_coef_we = 1; host_coef_sec = 8'(s);
        host_coef = '{unit: 4'(u), c: 16'(c[s][u]), d: 16'(d[s][u])};
      end
    @(negedge clk); host_coef_we = 0;

    foreach (fin[i]) fin[i] = $urandom_range(0, 1600) - 800;
    frame("free", 0, clocks, ovf);
    $display("free frame: %0d clocks for %0d samples", clocks, N);
    // 4 clocks per sample plus coefficient load (18), start and pipeline fill/drain
    chk(clocks <= 4 * N + 60, $sformatf("free frame too slow: %0d clocks", clocks));
    chk(clocks >= 4 * N, $sformatf("free frame too fast: %0d clocks", clocks));
    chk(!ovf, "unexpected overflow");

    frame("stalled", 1, clocks, ovf);
    $display("stalled frame: %0d clocks", clocks);

    // a high-gain first section for the overflow frame
    for (int u = 0; u < 9; u++) begin
      c[0][u] = 8000;
      @(negedge clk);
      host_coef_we = 1; host_coef_sec = 0;
      host_coef = '{unit: 4'(u), c: 16'(c[0][u]), d: 16'(d[0][u])};
    end
    @(negedge clk); host_coef_we = 0;
    host_agc_en = 1;
    foreach (fin[i]) fin[i] = ((i / COLS) % 2) ? -32000 : 32000;
    frame("overflow", 0, clocks, ovf);
    if (ovf) n_ovf++;
    chk(host_scale == 1, $sformatf("scale %0d after overflow, expected 1", host_scale));
    if (host_scale == 1) n_scale++;
    foreach (fin[i]) fin[i] = (i % 5) * 30 - 60;
    frame("scaled", 1, clocks, ovf);

    $display("mechanisms: input stall %0d, output stall %0d, link full %0d, overflow %0d, scale change %0d",
             n_stall_in, n_stall_out, n_link_full, n_ovf, n_scale);
    chk(n_stall_in > 0, "no input stall");
    chk(n_stall_out > 0, "no output stall");
    chk(n_link_full > 0, "no stall on a full inter-processor FIFO");
    chk(n_ovf > 0, "no overflow");
    chk(n_scale > 0, "no scale change");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
