// dsp_core: the single-chip processor for a second-order 2-D DLSI system (2-D IIR filter).
//
// Per input sample f(m,n) it computes the output g(m,n) and all eight state variables in one
// processor cycle of four phases, using nine arithmetic units that each solve
//   q = [c*f + r] + [d*y + q'].
// Unit 0 forms the output, g = a(0,0) f + h(1,0) + v1; it finishes in PH1 and its result is
// the feedback term y of the other units. Units 1..8 then form the next states, with d = -b:
//   unit 1: h(2,0) = a(2,0) f + d(2,0) g          unit 2: h(1,0) = a(1,0) f + d(1,0) g + h(2,0)
//   unit 3: h(2,1) = a(2,1) f + d(2,1) g          unit 4: h(1,1) = a(1,1) f + d(1,1) g + h(2,1)
//   unit 5: v1     = a(0,1) f + d(0,1) g + h(1,1) + v2
//   unit 6: h(2,2) = a(2,2) f + d(2,2) g          unit 7: h(1,2) = a(1,2) f + d(1,2) g + h(2,2)
//   unit 8: v2     = a(0,2) f + d(0,2) g + h(1,2)
// Horizontal states h(j,k) are one-sample delays and live in the units' results registers;
// they read as zero at the first sample of a row. Vertical states v1, v2 are one-row delays:
// the pair for column m is written to QBUF (Q OUTPUT/QWR) and read back (Q INPUT/QRD) for the
// same column of the next row; they read as zero in the first row and are not written in the
// last row, so QBUF is empty again after a frame.
//
// Interfaces (named after the processor's pins): IBUF side READ/INPUT/EMPTY, OBUF side
// WRITE/OUTPUT/FULL, QBUF side QRD/Q INPUT/E and QWR/Q OUTPUT/F, controller side the
// coefficient write port, start, frame size, busy/done and the sticky overflow status.
// Coefficient writes (unit, C, D) land in holding registers and are copied into the C and D
// registers used by the arithmetic at the next sample fetch, so coefficients may change while
// a frame is processed (adaptive operation) without mixing values inside one sample.
// Throughput is one output every four clocks when no buffer stalls (see seq_ctrl).
// The unit count, the primitive, the state-variable structure and the buffers are from the
// document; the assignment of equations to units, the phase plan, the coefficient holding
// registers and the frame-edge rules are this design's choices.
module dsp_core
  import dsp_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // system controller
  input  logic        start,
  input  logic [15:0] rows,
  input  logic [15:0] cols,
  input  logic        coef_we,
  input  coef_wr_t    coef_wr,
  output logic        busy,
  output logic        done,
  output logic        ovf_status,
  // IBUF
  output logic        in_rd,
  input  word_t       in_data,
  input  logic        in_empty,
  // OBUF
  output logic        out_wr,
  output word_t       out_data,
  input  logic        out_full,
  // QBUF
  output logic        q_rd,
  input  qword_t      q_in,
  input  logic        q_empty,
  output logic        q_wr,
  output qword_t      q_out,
  input  logic        q_full,
  // activity, for monitoring
  output logic        stall_in,
  output logic        stall_out
);
  word_t  c_hold [NUNITS];
  word_t  d_hold [NUNITS];
  word_t  c_reg  [NUNITS];
  word_t  d_reg  [NUNITS];
  word_t  f_reg;
  qword_t q_reg;
  word_t  res      [NUNITS];
  word_t  res_next [NUNITS];
  logic   ovf      [NUNITS];
  word_t  r_in     [NUNITS];
  word_t  q_in_u   [NUNITS];

  logic   load, en, first_col, first_row, last_row;
  phase_e ph;

  seq_ctrl u_seq (
    .clk, .rst_n, .start, .rows, .cols,
    .ibuf_empty(in_empty), .obuf_full(out_full), .qbuf_empty(q_empty), .qbuf_full(q_full),
    .ibuf_rd(in_rd), .qbuf_rd(q_rd), .obuf_wr(out_wr), .qbuf_wr(q_wr),
    .load, .en, .ph, .first_col, .first_row, .last_row, .busy, .done,
    .stall_in, .stall_out
  );

  // Coefficient holding registers and C/D registers.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NUNITS; i++) begin
        c_hold[i] <= '0;
        d_hold[i] <= '0;
        c_reg[i]  <= '0;
        d_reg[i]  <= '0;
      end
    end else begin
      if (coef_we && coef_wr.unit < 4'(NUNITS)) begin
        c_hold[coef_wr.unit] <= coef_wr.c;
        d_hold[coef_wr.unit] <= coef_wr.d;
      end
      if (load) begin
        for (int i = 0; i < NUNITS; i++) begin
          c_reg[i] <= c_hold[i];
          d_reg[i] <= d_hold[i];
        end
      end
    end
  end

  // Input register F and vertical state register (Q INPUT), loaded at the sample fetch.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      f_reg <= '0;
      q_reg <= '0;
    end else if (load) begin
      f_reg <= in_data;
      q_reg <= q_rd ? q_in : '0;
    end
  end

  // Horizontal inputs r of each unit (zero at the start of a row) and vertical inputs q'.
  always_comb begin
    for (int i = 0; i < NUNITS; i++) begin
      r_in[i]   = '0;
      q_in_u[i] = '0;
    end
    if (!first_col) begin
      r_in[0] = res[2];  // h(1,0)
      r_in[2] = res[1];  // h(2,0)
      r_in[4] = res[3];  // h(2,1)
      r_in[5] = res[4];  // h(1,1)
      r_in[7] = res[6];  // h(2,2)
      r_in[8] = res[7];  // h(1,2)
    end
    q_in_u[0] = q_reg.v1;
    q_in_u[5] = q_reg.v2;
  end

  for (genvar i = 0; i < NUNITS; i++) begin : g_unit
    arith_unit #(.RESULT_PH(i == 0 ? PH1 : PH3)) u_au (
      .clk, .rst_n, .en, .ph,
      .c(c_reg[i]), .d(i == 0 ? word_t'(0) : d_reg[i]),
      .f(f_reg), .y(res[0]), .r(r_in[i]), .qv(q_in_u[i]),
      .res(res[i]), .res_next(res_next[i]), .ovf(ovf[i])
    );
  end

  assign out_data = res[0];
  assign q_out.v2 = res_next[8];
  assign q_out.v1 = res_next[5];

  // Overflow status: any saturation since the frame started.
  logic ovf_any;
  always_comb begin
    ovf_any = 1'b0;
    for (int i = 0; i < NUNITS; i++) ovf_any |= ovf[i];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)            ovf_status <= 1'b0;
    else if (start && !busy) ovf_status <= 1'b0;
    else if (ovf_any)      ovf_status <= 1'b1;
  end

  // The results of one sample must not be stored before its output has been computed.
  assert property (@(posedge clk) disable iff (!rst_n) out_wr |-> ph == PH3)
    else $error("dsp_core: output written outside PH3");
endmodule
