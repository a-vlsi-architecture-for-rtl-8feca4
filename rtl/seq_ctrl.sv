// seq_ctrl: sequence control logic of the processor.
//
// Generates every control signal of the processor so that each unit gets its data at the
// right phase, and runs the handshakes with the buffers around the chip: IBUF on the input
// side (READ/EMPTY), OBUF on the output side (WRITE/FULL) and QBUF below (QRD/E, QWR/F).
// After `start` it processes a frame of `rows` x `cols` samples, row by row:
//   * A sample is fetched when IBUF is not empty and, except in the first row, QBUF is not
//     empty. The fetch pulses `ibuf_rd` (and `qbuf_rd`) and `load`, which latches the input
//     into F and the vertical states into the Q register. If the data is not there the
//     processor suspends (`stall_in`) until it is.
//   * The four phases PH0..PH3 follow (phase_gen). PH3 stores the results: it pulses
//     `obuf_wr` and, except in the last row, `qbuf_wr`. If OBUF or QBUF is full the processor
//     holds in PH3 (`stall_out`) until there is room.
//   * If the next sample is already available, it is fetched in the same clock as the PH3
//     store, so an unstalled processor delivers one output every four clocks.
// `first_col` marks samples at the start of a row (horizontal states are taken as zero),
// `first_row` and `last_row` mark the frame's edges (no QBUF read / write). `done` pulses
// after the last sample of the frame is stored. The fetch/compute/store order and the
// suspend rules are from the document; the exact signal timing is this design's choice.
module seq_ctrl
  import dsp_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [15:0] rows,
  input  logic [15:0] cols,
  input  logic        ibuf_empty,
  input  logic        obuf_full,
  input  logic        qbuf_empty,
  input  logic        qbuf_full,
  output logic        ibuf_rd,
  output logic        qbuf_rd,
  output logic        obuf_wr,
  output logic        qbuf_wr,
  output logic        load,
  output logic        en,
  output phase_e      ph,
  output logic        first_col,
  output logic        first_row,
  output logic        last_row,
  output logic        busy,
  output logic        done,
  output logic        stall_in,
  output logic        stall_out
);
  typedef enum logic [1:0] {S_IDLE, S_FETCH, S_RUN} state_e;

  state_e      state;
  logic [15:0] row, col, nrows, ncols;
  logic [3:0]  phi;
  logic        in_ok, out_ok, store, last_sample, fetch;

  assign first_col   = (col == '0);
  assign first_row   = (row == '0);
  assign last_row    = (row == nrows - 1'b1);
  assign last_sample = last_row && (col == ncols - 1'b1);
  assign in_ok       = !ibuf_empty && (first_row_next() || !qbuf_empty);
  assign out_ok      = !obuf_full && (last_row || !qbuf_full);
  assign store       = (state == S_RUN) && (ph == PH3) && out_ok;
  assign fetch       = in_ok && ((state == S_FETCH) || (store && !last_sample));

  // Row index of the sample that a fetch in this clock would load.
  function automatic logic first_row_next();
    if (state == S_FETCH) return row == '0;
    return (col == ncols - 1'b1) ? 1'b0 : (row == '0);
  endfunction

  assign en        = (state == S_RUN) && ((ph != PH3) || out_ok);
  assign ibuf_rd   = fetch;
  assign qbuf_rd   = fetch && !first_row_next();
  assign load      = fetch;
  assign obuf_wr   = store;
  assign qbuf_wr   = store && !last_row;
  assign busy      = (state != S_IDLE);
  assign stall_in  = (state == S_FETCH) && !in_ok;
  assign stall_out = (state == S_RUN) && (ph == PH3) && !out_ok;

  phase_gen u_phase (.clk, .rst_n, .advance(en), .phi, .ph);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      row   <= '0;
      col   <= '0;
      nrows <= 16'd1;
      ncols <= 16'd1;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          state <= S_FETCH;
          row   <= '0;
          col   <= '0;
          nrows <= (rows == '0) ? 16'd1 : rows;
          ncols <= (cols == '0) ? 16'd1 : cols;
        end
        S_FETCH: if (fetch) state <= S_RUN;
        S_RUN: if (store) begin
          if (col == ncols - 1'b1) begin
            col <= '0;
            row <= row + 1'b1;
          end else begin
            col <= col + 1'b1;
          end
          if (last_sample) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end else if (!fetch) begin
            state <= S_FETCH;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // The phase ring must be back at PH0 whenever a sample is loaded.
  assert property (@(posedge clk) disable iff (!rst_n) load |-> (ph == PH0 || ph == PH3))
    else $error("seq_ctrl: load outside the cycle boundary");
endmodule
