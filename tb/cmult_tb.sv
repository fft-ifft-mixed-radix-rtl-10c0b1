// cmult_tb: drives the complex multiplier with corner values (data parts
// -32768, 32767, 0; twiddle parts -32767, 32767, 0) and 2000 random operand
// pairs (twiddle parts within +-32767, as the multiplier requires), and compares both 32-bit product parts
// with 64-bit integer arithmetic computed here.
module cmult_tb;
  import fft_pkg::*;

  cplx_t  a, w;
  cprod_t p;
  int checks = 0, failures = 0;

  cmult dut (.a(a), .w(w), .p(p));

  task automatic try(input int ar, input int ai, input int wr, input int wi);
    longint er, ei;
    a.re = 16'(ar); a.im = 16'(ai); w.re = 16'(wr); w.im = 16'(wi);
    #1;
    er = longint'(ar) * wr - longint'(ai) * wi;
    ei = longint'(ar) * wi + longint'(ai) * wr;
    checks++;
    if (longint'(p.re) != er || longint'(p.im) != ei) begin
      failures++;
      if (failures < 10)
        $display("FAIL: (%0d,%0d)*(%0d,%0d) = (%0d,%0d), expected (%0d,%0d)", ar, ai, wr, wi, p.re, p.im, er, ei);
    end
  endtask

  initial begin
    int corner [3] = '{-32768, 32767, 0};
    foreach (corner[i]) foreach (corner[j]) foreach (corner[m]) foreach (corner[n])
      try(corner[i], corner[j], corner[m] == -32768 ? -32767 : corner[m],
          corner[n] == -32768 ? -32767 : corner[n]);
    repeat (2000)
      try(int'($urandom_range(65535)) - 32768, int'($urandom_range(65535)) - 32768,
          int'($urandom_range(65534)) - 32767, int'($urandom_range(65534)) - 32767);
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
