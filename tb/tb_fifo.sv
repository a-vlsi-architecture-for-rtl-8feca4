// tb_fifo: drives the elastic FIFO with random reads and writes (never a write when full
// or a read when empty, as the handshakes require) and compares data order, count, full
// and empty with a queue model. Fills it completely and drains it completely.
module tb_fifo;
  localparam int D = 8;
  logic clk = 0, rst_n = 0;
  logic wr = 0, rd = 0, full, empty;
  logic [15:0] wdata = 0, rdata;
  logic [$clog2(D+1)-1:0] count;
  int checks = 0, failures = 0;
  logic [15:0] model [$];
  int fulls = 0, empties = 0;
  always #5 clk = ~clk;

  fifo #(.W(16), .DEPTH(D)) dut (.clk, .rst_n, .wr, .wr_data(wdata), .full, .rd,
                                 .rd_data(rdata), .empty, .count);

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

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      int bias;
      bias = (i / 300) % 2;  // alternate fill-biased and drain-biased stretches
      @(negedge clk);
      chk(count == model.size(), $sformatf("count %0d model %0d", count, model.size()));
      chk(full == (model.size() == D), "full flag");
      chk(empty == (model.size() == 0), "empty flag");
      if (!empty) chk(rdata == model[0], $sformatf("data %h expected %h", rdata, model[0]));
      if (full) fulls++;
      if (empty) empties++;
      wr    = !full && ($urandom_range(0, 3) < (bias ? 1 : 3));
      rd    = !empty && ($urandom_range(0, 3) < (bias ? 3 : 1));
      wdata = 16'($urandom);
      @(posedge clk);
      if (rd) void'(model.pop_front());
      if (wr) model.push_back(wdata);
    end
    chk(fulls > 0 && empties > 0, "never full or never empty");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
