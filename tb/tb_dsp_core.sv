// tb_dsp_core: self-checking testbench of the second-order processor.
//
// The processor is surrounded by IBUF, OBUF and QBUF FIFOs. Three frames are run:
//   1. a free-running frame (IBUF pre-filled, OBUF always drained): outputs are checked
//      against the fixed-point reference and against the real-valued difference equation,
//      and the processor must deliver one output every four clocks;
//   2. a frame with random gaps in the input, random back-pressure from OBUF and random
//      blocking of the QBUF E and F flags, so every suspend path is taken; halfway through
//      the frame a new coefficient set is written (adaptive operation);
//   3. a frame whose input drives the arithmetic into saturation: overflow status must rise.
// A watchdog ends the run with a failure if the processor hangs.
module tb_dsp_core;
  import dsp_pkg::*;
  import iir_ref_pkg::*;

  localparam int ROWS = 6;
  localparam int COLS = 12;
  localparam int N    = ROWS * COLS;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        start;
  logic        coef_we;
  coef_wr_t    coef_wr;
  logic        busy, done, ovf_status;
  logic        in_rd, in_empty, out_wr, out_full, q_rd, q_empty, q_wr, q_full;
  word_t       in_data, out_data;
  qword_t      q_in, q_out;
  logic        stall_in, stall_out;

  // TB side of the buffers
  logic        ib_wr, ib_full, ob_rd, ob_empty;
  word_t       ib_wdata, ob_rdata;
  logic        qb_full_raw, qb_empty_raw, block_qe, block_qf;

  fifo #(.W(16), .DEPTH(COLS)) u_ibuf (
    .clk, .rst_n, .wr(ib_wr), .wr_data(ib_wdata), .full(ib_full),
    .rd(in_rd), .rd_data(in_data), .empty(in_empty), .count()
  );
  fifo #(.W(16), .DEPTH(COLS)) u_obuf (
    .clk, .rst_n, .wr(out_wr), .wr_data(out_data), .full(out_full),
    .rd(ob_rd), .rd_data(ob_rdata), .empty(ob_empty), .count()
  );
  fifo #(.W(32), .DEPTH(COLS)) u_qbuf (
    .clk, .rst_n, .wr(q_wr), .wr_data(q_out), .full(qb_full_raw),
    .rd(q_rd), .rd_data(q_in), .empty(qb_empty_raw), .count()
  );
  assign q_empty = qb_empty_raw || block_qe;
  assign q_full  = qb_full_raw  || block_qf;

  dsp_core dut (
    .clk, .rst_n, .start, .rows(16'(ROWS)), .cols(16'(COLS)), .coef_we, .coef_wr,
    .busy, .done, .ovf_status,
    .in_rd, .in_data, .in_empty, .out_wr, .out_data, .out_full,
    .q_rd, .q_in, .q_empty, .q_wr, .q_out, .q_full, .stall_in, .stall_out
  );

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // watchdog
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // stimulus state
  int    fin [];
  int    gref [];
  real   gdir [];
  int    gout [];
  coefs_t csnap [], dsnap [];
  coefs_t cmir, dmir;
  int    nin, nout, nload;
  bit    random_io;
  bit    use_set1_after_half;
  bit    set1_written;
  int    stall_in_cnt, stall_out_cnt, qe_stall_cnt, qf_stall_cnt;
  coefs_t c0, d0, c1, d1;

  task automatic write_coefs(input coefs_t c, input coefs_t d);
    for (int u = 0; u < 9; u++) begin
      coef_we      <= 1;
      coef_wr.unit <= 4'(u);
      coef_wr.c    <= 16'(c[u]);
      coef_wr.d    <= 16'(d[u]);
      @(posedge clk);
    end
    coef_we <= 0;
  endtask

  // Feed IBUF, drain OBUF, block QBUF flags, and log the coefficients each sample used.
  always @(posedge clk) begin
    if (rst_n && ob_rd) begin
      gout[nout] = ob_rdata;
      nout++;
    end
    if (rst_n && busy && in_rd) begin
      csnap[nload] = cmir;
      dsnap[nload] = dmir;
      nload++;
    end
    // mirror of the holding registers: a load copies the values from before this edge
    if (rst_n && coef_we) begin
      cmir[coef_wr.unit] = int'(coef_wr.c);
      dmir[coef_wr.unit] = int'(coef_wr.d);
    end
    if (rst_n && busy) begin
      if (stall_in) stall_in_cnt++;
      if (stall_out) stall_out_cnt++;
      if (block_qe && !qb_empty_raw && !in_empty && stall_in) qe_stall_cnt++;
      if (block_qf && !qb_full_raw && stall_out) qf_stall_cnt++;
    end
  end

  always_comb begin
    ib_wr    = (nin < N) && !ib_full && (!random_io || ($urandom_range(0, 3) != 0));
    ib_wdata = (nin < N) ? 16'(fin[nin]) : '0;
  end

  always @(posedge clk) if (ib_wr) nin <= nin + 1;

  initial begin
    ob_rd = 0; block_qe = 0; block_qf = 0;
    forever begin
      @(negedge clk);
      ob_rd    = !ob_empty && (!random_io || ($urandom_range(0, 2) != 0));
      block_qe = random_io && ($urandom_range(0, 4) == 0);
      block_qf = random_io && ($urandom_range(0, 4) == 0);
    end
  end

  task automatic run_frame(input string name, input int fmax, input bit rnd, input bit adapt,
                           output int clocks);
    int t0;
    bit ovf;
    random_io = rnd;
    nout = 0; nload = 0; set1_written = 0;
    gout = new[N];
    csnap = new[N];
    dsnap = new[N];
    write_coefs(c0, d0);
    // pre-fill happens through ib_wr; start the processor
    t0 = cyc;
    start <= 1;
    @(posedge clk);
    start <= 0;
    @(posedge clk);
    while (busy || !ob_empty) begin
      @(posedge clk);
      if (adapt && !set1_written && nload == N / 2) begin
        write_coefs(c1, d1);
        set1_written = 1;
      end
    end
    clocks = cyc - t0;
    ovf = 0;
    section(ROWS, COLS, csnap, dsnap, fin, gref, ovf);
    check(nout == N, $sformatf("%s: %0d outputs, expected %0d", name, nout, N));
    for (int i = 0; i < N; i++)
      check(gout[i] == gref[i], $sformatf("%s: sample %0d got %0d expected %0d",
                                          name, i, gout[i], gref[i]));
    check(ovf_status == ovf, $sformatf("%s: overflow status %0b expected %0b",
                                      name, ovf_status, ovf));
  endtask

  initial begin
    int clocks;
    start = 0; coef_we = 0; coef_wr = '0;
    nin = 0; random_io = 0; set1_written = 0;
    stall_in_cnt = 0; stall_out_cnt = 0; qe_stall_cnt = 0; qf_stall_cnt = 0;
    test_filter(7, c0, d0);
    test_filter(99, c1, d1);
    fin = new[N];
    foreach (fin[i]) fin[i] = $urandom_range(0, 2000) - 1000;
    foreach (cmir[i]) begin cmir[i] = 0; dmir[i] = 0; end
    nin = N; // hold the feeder until the frame starts
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);

    // Frame 1: free running. Let IBUF fill first so no input stall occurs.
    nin = 0;
    repeat (COLS + 2) @(posedge clk);
    run_frame("free", 0, 0, 0, clocks);
    begin
      real gd [];
      real maxerr = 0;
      direct_form(ROWS, COLS, c0, d0, fin, gd);
      foreach (gd[i]) if ((gd[i] - gout[i]) > maxerr || (gout[i] - gd[i]) > maxerr)
        maxerr = (gd[i] > gout[i]) ? gd[i] - gout[i] : gout[i] - gd[i];
      check(maxerr < 4.0, $sformatf("free: difference equation mismatch %f", maxerr));
      $display("free frame: max |hardware - difference equation| = %f", maxerr);
    end
    // N outputs at 4 clocks each, plus fetch, start and OBUF drain overhead
    $display("free frame: %0d clocks for %0d samples", clocks, N);
    check(clocks <= 4 * N + 6, $sformatf("free: %0d clocks, expected <= %0d", clocks, 4 * N + 6));
    check(clocks >= 4 * N, $sformatf("free: %0d clocks, expected >= %0d", clocks, 4 * N));

    // Frame 2: random input gaps, OBUF back-pressure, QBUF flag blocking, coefficient change.
    nin = 0;
    run_frame("stalls", 0, 1, 1, clocks);
    check(stall_in_cnt > 0, "no input stall happened");
    check(stall_out_cnt > 0, "no output stall happened");
    check(qe_stall_cnt > 0, "no QBUF-empty stall happened");
    check(qf_stall_cnt > 0, "no QBUF-full stall happened");
    $display("stalls: input %0d, output %0d, QBUF empty %0d, QBUF full %0d",
             stall_in_cnt, stall_out_cnt, qe_stall_cnt, qf_stall_cnt);

    // Frame 3: overflow. Large input with the same filter saturates.
    foreach (fin[i]) fin[i] = 30000 - ((i % 3) * 100);
    nin = 0;
    run_frame("overflow", 0, 0, 0, clocks);
    check(ovf_status == 1, "overflow status did not rise");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
