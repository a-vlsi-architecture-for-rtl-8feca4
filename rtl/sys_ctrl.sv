// sys_ctrl: system controller of the 2-D signal processing system.
//
// Sits between the host (or user) and a linear array of NSEC processors. The host writes the
// system coefficients (section, unit, C, D) into the controller's coefficient store and
// starts a frame of `rows` x `cols` samples. The controller then
//   1. copies every section's coefficients into its processor (LOAD), one per clock on a
//      shared bus with a per-processor write enable; the C coefficients of the first section
//      are shifted right by the current scale factor;
//   2. starts all processors together (START);
//   3. admits exactly rows*cols input samples into IBUF (`in_ready`) and counts the outputs
//      taken from OBUF (RUN); host coefficient writes made during RUN are forwarded to the
//      processor at once, which allows adaptive filtering;
//   4. when the last output has left OBUF, reports `done`. If automatic gain control is
//      enabled and any processor signalled overflow during the frame, the scale factor is
//      raised by one (up to MAX_SCALE) for the next frame; a frame started with gain control
//      disabled resets the scale factor to zero.
// The controller's duties (coefficient loading, buffer control one row at a time, scale
// control between frames) are from the document; the scale rule (a power-of-two shift of the
// input coefficients of the first section) and the host port are this design's choices.
module sys_ctrl
  import dsp_pkg::*;
#(
  parameter int unsigned NSEC      = 2,
  parameter int unsigned MAX_SCALE = 7
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
  // processors
  output logic [NSEC-1:0] dsp_coef_we,
  output coef_wr_t        dsp_coef,
  output logic            dsp_start,
  output logic [15:0]     dsp_rows,
  output logic [15:0]     dsp_cols,
  input  logic [NSEC-1:0] dsp_ovf,
  // buffers
  input  logic            in_valid,
  input  logic            ibuf_full,
  output logic            in_ready,
  input  logic            out_taken
);
  localparam int unsigned NCOEF = NSEC * NUNITS;
  localparam int unsigned SECW  = (NSEC > 1) ? $clog2(NSEC) : 1;

  typedef enum logic [2:0] {C_IDLE, C_LOAD, C_START, C_RUN, C_FINISH} cstate_e;

  cstate_e     state;
  word_t       c_mem [NCOEF];
  word_t       d_mem [NCOEF];
  logic [$clog2(NCOEF+1)-1:0] idx;
  logic [31:0] total, in_cnt, out_cnt;
  logic        frame_ovf;
  logic [SECW-1:0] ld_sec;
  logic [3:0]      ld_unit;

  function automatic word_t scaled(input word_t c, input logic [2:0] s);
    return c >>> s;
  endfunction

  assign host_busy = (state != C_IDLE);
  assign dsp_start = (state == C_START);
  assign in_ready  = (state == C_RUN) && (in_cnt < total) && !ibuf_full;
  assign ld_sec    = SECW'(idx / NUNITS);
  assign ld_unit   = 4'(idx % NUNITS);

  // Host coefficient store.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NCOEF; i++) begin
        c_mem[i] <= '0;
        d_mem[i] <= '0;
      end
    end else if (host_coef_we && host_coef_sec < 8'(NSEC) && host_coef.unit < 4'(NUNITS)) begin
      c_mem[int'(host_coef_sec) * NUNITS + int'(host_coef.unit)] <= host_coef.c;
      d_mem[int'(host_coef_sec) * NUNITS + int'(host_coef.unit)] <= host_coef.d;
    end
  end

  // Coefficient bus towards the processors.
  always_comb begin
    dsp_coef_we = '0;
    dsp_coef    = '0;
    if (state == C_LOAD) begin
      dsp_coef_we[ld_sec] = 1'b1;
      dsp_coef.unit = ld_unit;
      dsp_coef.c    = (ld_sec == '0) ? scaled(c_mem[idx], host_scale) : c_mem[idx];
      dsp_coef.d    = d_mem[idx];
    end else if (state == C_RUN && host_coef_we && host_coef_sec < 8'(NSEC)) begin
      dsp_coef_we[SECW'(host_coef_sec)] = 1'b1;
      dsp_coef.unit = host_coef.unit;
      dsp_coef.c    = (host_coef_sec == '0) ? scaled(host_coef.c, host_scale) : host_coef.c;
      dsp_coef.d    = host_coef.d;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= C_IDLE;
      idx        <= '0;
      total      <= '0;
      in_cnt     <= '0;
      out_cnt    <= '0;
      frame_ovf  <= 1'b0;
      dsp_rows   <= 16'd1;
      dsp_cols   <= 16'd1;
      host_done  <= 1'b0;
      host_scale <= '0;
      host_ovf   <= 1'b0;
    end else begin
      host_done <= 1'b0;
      unique case (state)
        C_IDLE: if (host_start) begin
          state     <= C_LOAD;
          idx       <= '0;
          dsp_rows  <= (host_rows == '0) ? 16'd1 : host_rows;
          dsp_cols  <= (host_cols == '0) ? 16'd1 : host_cols;
          total     <= 32'((host_rows == '0) ? 16'd1 : host_rows)
                     * 32'((host_cols == '0) ? 16'd1 : host_cols);
          in_cnt    <= '0;
          out_cnt   <= '0;
          frame_ovf <= 1'b0;
          if (!host_agc_en) host_scale <= '0;
        end
        C_LOAD: begin
          if (idx == ($clog2(NCOEF+1))'(NCOEF - 1)) state <= C_START;
          idx <= idx + 1'b1;
        end
        C_START: state <= C_RUN;
        C_RUN: begin
          if (in_valid && in_ready) in_cnt <= in_cnt + 1'b1;
          if (out_taken) out_cnt <= out_cnt + 1'b1;
          if (|dsp_ovf) frame_ovf <= 1'b1;
          if (out_taken && out_cnt + 1'b1 == total) state <= C_FINISH;
        end
        C_FINISH: begin
          state     <= C_IDLE;
          host_done <= 1'b1;
          host_ovf  <= frame_ovf;
          if (host_agc_en && frame_ovf && host_scale < 3'(MAX_SCALE))
            host_scale <= host_scale + 1'b1;
        end
        default: state <= C_IDLE;
      endcase
    end
  end
endmodule
