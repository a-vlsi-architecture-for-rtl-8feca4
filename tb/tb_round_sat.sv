// tb_round_sat: checks rounding, saturation and the overflow flag of the 16-bit control
// logic against an integer model, on corner values and random values.
module tb_round_sat;
  logic signed [35:0] acc;
  logic signed [15:0] q;
  logic               ovf;
  int checks = 0, failures = 0;

  round_sat #(.IN_W(36), .OUT_W(16), .FRAC(14)) dut (.acc, .q, .ovf);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic try(input longint v);
    longint r, e;
    bit eo;
    acc = 36'(v);
    #1;
    r  = (v + 8192) >>> 14;
    eo = 0;
    e  = r;
    if (r > 32767)  begin e = 32767;  eo = 1; end
    if (r < -32768) begin e = -32768; eo = 1; end
    checks++;
    if (q !== 16'(e) || ovf !== eo) begin
      failures++;
      $display("FAIL acc=%0d q=%0d ovf=%0b expected %0d %0b", v, q, ovf, e, eo);
    end
  endtask

  initial begin
    longint lim = 64'sd1 <<< 34;
    try(0); try(8191); try(8192); try(-8192); try(-8193); try(16384); try(-16384);
    try(longint'(32767) * 16384); try(longint'(32767) * 16384 + 8191);
    try(longint'(32767) * 16384 + 8192); try(longint'(-32768) * 16384);
    try(longint'(-32768) * 16384 - 8193); try(lim - 1); try(-lim);
    repeat (2000) begin
      longint v;
      v = (longint'($urandom) <<< 3) ^ longint'($urandom);
      v = v % lim;
      if ($urandom_range(0, 1)) v = -v;
      try(v);
      try(v >>> 6);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
