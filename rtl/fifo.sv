// fifo: elastic first-in-first-out buffer with full/empty handshakes.
//
// Used for every buffer of the system: IBUF (one row of input), OBUF (output), QBUF (one
// row of vertical state variables) and the FIFOs between cascaded processors. A write with
// `wr` while not full stores `wr_data`; `rd_data` always shows the oldest word (first-word
// fall-through), and `rd` while not empty removes it. Both can happen in the same clock. The
// `count` output gives the fill level. Reads from empty and writes to full are ignored and
// flagged by assertions. Storage is a plain array. The document asks only for FIFO
// behaviour; the fall-through read and the counter are this design's choices.
module fifo #(
  parameter int unsigned W     = 16,
  parameter int unsigned DEPTH = 512
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     wr,
  input  logic [W-1:0]             wr_data,
  output logic                     full,
  input  logic                     rd,
  output logic [W-1:0]             rd_data,
  output logic                     empty,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned PTRW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [W-1:0]    mem [DEPTH];
  logic [PTRW-1:0] wptr, rptr;
  logic            do_wr, do_rd;

  assign full    = (count == ($clog2(DEPTH+1))'(DEPTH));
  assign empty   = (count == '0);
  assign do_wr   = wr && !full;
  assign do_rd   = rd && !empty;
  assign rd_data = mem[rptr];

  function automatic logic [PTRW-1:0] inc(input logic [PTRW-1:0] p);
    return (p == PTRW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (do_wr) wptr <= inc(wptr);
      if (do_rd) rptr <= inc(rptr);
      unique case ({do_wr, do_rd})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: count <= count;
      endcase
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(wr && full))
    else $error("fifo: write while full");
  assert property (@(posedge clk) disable iff (!rst_n) !(rd && empty))
    else $error("fifo: read while empty");
endmodule
