// tb_arith_unit: runs two arithmetic units through random processor cycles, one latching
// its result in PH1 (output unit) and one in PH3 (state unit), with random idle clocks
// between phases. Checks each result and overflow flag against
//   sat16(r + q' + ((c*f [+ d*y] + 2^13) >>> 14)),
// and that the result register changes only at its own phase.
module tb_arith_unit;
  import dsp_pkg::*;
  logic clk = 0, rst_n = 0, en = 0;
  phase_e ph = PH0;
  word_t c, d, f, y, r, qv;
  word_t res1, res3, rn1, rn3;
  logic  ovf1, ovf3;
  int checks = 0, failures = 0, sats = 0;
  always #5 clk = ~clk;

  arith_unit #(.RESULT_PH(PH1)) u1 (.clk, .rst_n, .en, .ph, .c, .d, .f, .y, .r, .qv,
                                    .res(res1), .res_next(rn1), .ovf(ovf1));
  arith_unit #(.RESULT_PH(PH3)) u3 (.clk, .rst_n, .en, .ph, .c, .d, .f, .y, .r, .qv,
                                    .res(res3), .res_next(rn3), .ovf(ovf3));

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  function automatic int model(input longint s, input longint p, output bit o);
    longint v = s + ((p + 8192) >>> 14);
    o = 0;
    if (v > 32767)  begin o = 1; return 32767; end
    if (v < -32768) begin o = 1; return -32768; end
    return int'(v);
  endfunction

  task automatic step(input phase_e p);
    while ($urandom_range(0, 2) == 0) begin
      en = 0; ph = p;
      @(posedge clk); #1;
    end
    en = 1; ph = p;
    @(posedge clk); #1;
    en = 0;
  endtask

  initial begin
    c = 0; d = 0; f = 0; y = 0; r = 0; qv = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1;
    for (int i = 0; i < 1000; i++) begin
      int e1, e3;
      bit o1, o3;
      word_t old3;
      bit big;
      big = (i % 4 == 0);
      c  = 16'($urandom); d = 16'($urandom); f = 16'($urandom);
      r  = big ? 16'($urandom) : 16'($urandom_range(0, 2000) - 1000);
      qv = big ? 16'($urandom) : 16'($urandom_range(0, 2000) - 1000);
      y  = 16'($urandom);
      e1 = model(longint'(r) + qv, longint'(c) * f, o1);
      e3 = model(longint'(r) + qv, longint'(c) * f + longint'(d) * y, o3);
      old3 = res3;
      step(PH0);
      step(PH1);
      chk(res1 == 16'(e1) && ovf1 == o1, $sformatf("PH1 unit: %0d/%0b expected %0d/%0b", res1, ovf1, e1, o1));
      chk(res3 == old3, "PH3 unit changed its result early");
      // inputs other than d and y may change after PH0 without effect
      c = 16'($urandom); f = 16'($urandom); r = 16'($urandom); qv = 16'($urandom);
      step(PH2);
      step(PH3);
      chk(res3 == 16'(e3) && ovf3 == o3, $sformatf("PH3 unit: %0d/%0b expected %0d/%0b", res3, ovf3, e3, o3));
      chk(res1 == 16'(e1), "PH1 unit changed its result late");
      if (o3) sats++;
    end
    chk(sats > 0, "saturation never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
