// tb_round_half_even: compares the rounding with a reference computed from
// the real value for exhaustive small cases and random 32-bit values.
module tb_round_half_even;
  localparam int IW = 32, FRAC = 8;
  logic [IW+FRAC-1:0] x;
  logic [IW-1:0]      y;
  int checks = 0, failures = 0;

  round_half_even #(.IW(IW), .FRAC(FRAC)) dut (.*);

  function automatic longint ref_round(input longint v);
    longint ip, fp;
    ip = v >> FRAC;
    fp = v - (ip << FRAC);
    if (2 * fp > (1 << FRAC))                  return ip + 1;
    else if (2 * fp < (1 << FRAC))             return ip;
    else                                       return (ip % 2 == 1) ? ip + 1 : ip;
  endfunction

  task automatic try_val(input longint v);
    x = v[IW+FRAC-1:0];
    #1;
    checks++;
    if (longint'(y) != ref_round(v)) begin
      failures++;
      $display("FAIL: x=%0d/256 y=%0d exp %0d", v, y, ref_round(v));
    end
  endtask

  initial begin
    for (longint v = 0; v < 4096; v++) try_val(v);
    // the documented tie cases
    try_val((longint'(10) << FRAC) + 128);   // 10.5 -> 10
    try_val((longint'(11) << FRAC) + 128);   // 11.5 -> 12
    for (int k = 0; k < 2000; k++) try_val({$urandom_range(0, 32'h7fff_fffe), 8'($urandom)});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
