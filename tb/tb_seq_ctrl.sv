// tb_seq_ctrl: runs the sequence control through frames against modelled buffers (fill
// counters) with random availability. Checks that it never reads an empty or writes a full
// buffer, that it reads IBUF and writes OBUF once per sample and uses QBUF in every row but
// the first (read) and the last (write), that the phases run PH0..PH3 once per sample,
// that an unstalled frame takes four clocks per sample, and that `done` pulses once.
module tb_seq_ctrl;
  import dsp_pkg::*;
  localparam int ROWS = 5, COLS = 7, N = ROWS * COLS;
  logic clk = 0, rst_n = 0, start = 0;
  logic ibuf_empty, obuf_full, qbuf_empty, qbuf_full;
  logic ibuf_rd, qbuf_rd, obuf_wr, qbuf_wr, load, en, first_col, first_row, last_row;
  logic busy, done, stall_in, stall_out;
  phase_e ph;
  int checks = 0, failures = 0;
  int iavail, ocnt, qcnt, nird, nowr, nqrd, nqwr, ndone, nph, si, so;
  bit rnd;
  always #5 clk = ~clk;

  seq_ctrl dut (.clk, .rst_n, .start, .rows(16'(ROWS)), .cols(16'(COLS)),
                .ibuf_empty, .obuf_full, .qbuf_empty, .qbuf_full,
                .ibuf_rd, .qbuf_rd, .obuf_wr, .qbuf_wr, .load, .en, .ph,
                .first_col, .first_row, .last_row, .busy, .done, .stall_in, .stall_out);

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

  logic blk_i, blk_o, blk_qe, blk_qf;
  always @(negedge clk) begin
    blk_i  <= rnd && $urandom_range(0, 3) == 0;
    blk_o  <= rnd && $urandom_range(0, 3) == 0;
    blk_qe <= rnd && $urandom_range(0, 5) == 0;
    blk_qf <= rnd && $urandom_range(0, 5) == 0;
  end
  assign ibuf_empty = (iavail == 0) || blk_i;
  assign obuf_full  = blk_o;
  assign qbuf_empty = (qcnt == 0) || blk_qe;
  assign qbuf_full  = (qcnt == COLS) || blk_qf;

  always @(posedge clk) if (rst_n) begin
    if (ibuf_rd) begin chk(!ibuf_empty, "IBUF read while empty"); iavail--; nird++; end
    if (obuf_wr) begin chk(!obuf_full, "OBUF write while full"); chk(ph == PH3, "write outside PH3"); nowr++; end
    if (qbuf_rd) begin chk(!qbuf_empty, "QBUF read while empty"); chk(!first_row || ph == PH3, "QBUF read in first row"); nqrd++; end
    if (qbuf_wr) begin chk(!qbuf_full, "QBUF write while full"); chk(!last_row, "QBUF write in last row"); nqwr++; end
    qcnt <= qcnt + (qbuf_wr ? 1 : 0) - (qbuf_rd ? 1 : 0);
    if (done) ndone++;
    if (en && ph == PH0) nph++;
    if (stall_in) si++;
    if (stall_out) so++;
  end

  task automatic frame(input bit r, output int clocks);
    int t = 0;
    rnd = r; nird = 0; nowr = 0; nqrd = 0; nqwr = 0; ndone = 0; nph = 0;
    iavail = N; qcnt = 0;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    while (busy) begin @(negedge clk); t++; end
    clocks = t;
    @(posedge clk);
    @(negedge clk);
    chk(nird == N && nowr == N, $sformatf("reads %0d writes %0d", nird, nowr));
    chk(nqrd == N - COLS && nqwr == N - COLS, $sformatf("QBUF reads %0d writes %0d", nqrd, nqwr));
    chk(nph == N, $sformatf("%0d cycles for %0d samples", nph, N));
    chk(ndone == 1, "done count");
    chk(qcnt == 0, "QBUF not empty after frame");
  endtask

  initial begin
    int clocks;
    si = 0; so = 0; rnd = 0; iavail = 0; qcnt = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    frame(0, clocks);
    chk(clocks == 4 * N + 1, $sformatf("unstalled frame %0d clocks, expected %0d", clocks, 4 * N + 1));
    chk(si == 0 && so == 0, "stall without cause");
    frame(1, clocks);
    chk(si > 0 && so > 0, "stalls not exercised");
    $display("stalled frame: %0d clocks, input stalls %0d, output stalls %0d", clocks, si, so);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
