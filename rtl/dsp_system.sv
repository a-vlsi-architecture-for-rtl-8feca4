// dsp_system: real-time 2-D digital signal processing system built from a linear array of
// second-order processors.
//
// NSEC processors (dsp_core) are cascaded in a pipeline; each realises one second-order 2-D
// DLSI section with its own coefficients, so the array realises a system of order 2*NSEC
// whose transfer function is the product of the sections'. With NSEC = 1 this is the single
// processor system. Data flows
//   in_* -> IBUF -> processor 1 -> FIFO -> processor 2 -> ... -> processor NSEC -> OBUF -> out_*
// and every processor has its own QBUF holding the vertical state variables of one row.
// Each processor starts on a sample as soon as its input and its vertical states are there
// and waits when a neighbour buffer is empty or full, so no global schedule is needed: the
// buffers and the handshakes keep the array in step (a wavefront of samples).
// The system controller (sys_ctrl) takes coefficients and frame commands from the host,
// loads the processors, admits the frame's samples into IBUF and applies automatic gain
// control between frames.
//
// External interfaces: host port (coefficient writes, start, frame size, gain-control enable,
// busy/done/scale/overflow status); input stream in_valid/in_ready/in_data (a sample is taken
// when both valid and ready are high); output stream out_valid/out_ready/out_data (OBUF's head
// is taken when both are high). Samples are 16-bit two's complement, row by row.
// Parameters: NSEC sections; ROW_DEPTH words in IBUF, OBUF and each QBUF, which is the
// longest row the system runs at full speed (a QBUF shorter than a row would deadlock);
// LINK_DEPTH words in each inter-processor FIFO.
// The system structure is from the document; buffer depths are this design's choices.
module dsp_system
  import dsp_pkg::*;
#(
  parameter int unsigned NSEC       = 2,
  parameter int unsigned ROW_DEPTH  = 512,
  parameter int unsigned LINK_DEPTH = 16
) (
  input  logic            clk,
  input  logic            rst_n,
  // host / user
  input  logic            host_coef_we,
  input  logic [7:0]      host_coef_sec,
  input  coef_wr_t        host_coef,
  input  logic            host_start,
  input  logic [15:0]     host_rows,
  input  logic [15:0]     host_cols,
  input  logic            host_agc_en,
  output logic            host_busy,
  output logic            host_done,
  output logic [2:0]      host_scale,
  output logic            host_ovf,
  // input stream
  input  logic            in_valid,
  output logic            in_ready,
  input  word_t           in_data,
  // output stream
  output logic            out_valid,
  input  logic            out_ready,
  output word_t           out_data,
  // activity of each processor, for monitoring
  output logic [NSEC-1:0] sec_busy,
  output logic [NSEC-1:0] sec_stall_in,
  output logic [NSEC-1:0] sec_stall_out
);
  logic [NSEC-1:0] coef_we, ovf, done;
  coef_wr_t        coef_bus;
  logic            dsp_start;
  logic [15:0]     rows, cols;

  // Stream between stages: stage s reads link s, writes link s+1.
  // Link 0 is IBUF, link NSEC is OBUF, the others are the inter-processor FIFOs.
  logic  [NSEC:0] l_wr, l_full, l_rd, l_empty;
  word_t          l_wdata [NSEC+1];
  word_t          l_rdata [NSEC+1];
  logic           ibuf_full;

  sys_ctrl #(.NSEC(NSEC)) u_ctrl (
    .clk, .rst_n,
    .host_coef_we, .host_coef_sec, .host_coef, .host_start, .host_rows, .host_cols,
    .host_agc_en, .host_busy, .host_done, .host_scale, .host_ovf,
    .dsp_coef_we(coef_we), .dsp_coef(coef_bus), .dsp_start, .dsp_rows(rows), .dsp_cols(cols),
    .dsp_ovf(ovf),
    .in_valid, .ibuf_full, .in_ready, .out_taken(out_valid && out_ready)
  );

  assign l_wr[0]    = in_valid && in_ready;
  assign l_wdata[0] = in_data;
  assign ibuf_full  = l_full[0];

  assign out_valid     = !l_empty[NSEC];
  assign out_data      = l_rdata[NSEC];
  assign l_rd[NSEC]    = out_valid && out_ready;

  for (genvar s = 0; s <= NSEC; s++) begin : g_link
    localparam int unsigned D = (s == 0 || s == NSEC) ? ROW_DEPTH : LINK_DEPTH;
    fifo #(.W(DW), .DEPTH(D)) u_buf (
      .clk, .rst_n,
      .wr(l_wr[s]), .wr_data(l_wdata[s]), .full(l_full[s]),
      .rd(l_rd[s]), .rd_data(l_rdata[s]), .empty(l_empty[s]), .count()
    );
  end

  for (genvar s = 0; s < NSEC; s++) begin : g_sec
    logic   q_rd, q_wr, q_empty, q_full;
    qword_t q_in, q_out;

    dsp_core u_dsp (
      .clk, .rst_n,
      .start(dsp_start), .rows, .cols,
      .coef_we(coef_we[s]), .coef_wr(coef_bus),
      .busy(sec_busy[s]), .done(done[s]), .ovf_status(ovf[s]),
      .in_rd(l_rd[s]), .in_data(l_rdata[s]), .in_empty(l_empty[s]),
      .out_wr(l_wr[s+1]), .out_data(l_wdata[s+1]), .out_full(l_full[s+1]),
      .q_rd, .q_in, .q_empty, .q_wr, .q_out, .q_full,
      .stall_in(sec_stall_in[s]), .stall_out(sec_stall_out[s])
    );

    fifo #(.W($bits(qword_t)), .DEPTH(ROW_DEPTH)) u_qbuf (
      .clk, .rst_n,
      .wr(q_wr), .wr_data(q_out), .full(q_full),
      .rd(q_rd), .rd_data(q_in), .empty(q_empty), .count()
    );
  end
endmodule
