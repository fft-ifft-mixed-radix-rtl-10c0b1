// twiddle_rom_tb: reads all 128 entries of the twiddle table and compares
// them with 32767*cos(2*pi*k/128) and -32767*sin(2*pi*k/128) computed here
// in floating point; each part must be within 0.5 LSB (exact rounding). It
// also checks the symmetries W^(k+64) = -W^k and W^32 = -j.
module twiddle_rom_tb;
  import fft_pkg::*;

  localparam real PI = 3.14159265358979323846;

  logic [6:0] k;
  cplx_t      w;
  int checks = 0, failures = 0;

  twiddle_rom dut (.k(k), .w(w));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    cplx_t first [64];
    for (int i = 0; i < 128; i++) begin
      real c, s;
      k = 7'(i);
      #1;
      c = 32767.0 * $cos(2.0 * PI * i / 128.0);
      s = -32767.0 * $sin(2.0 * PI * i / 128.0);
      check((real'(w.re) - c) <= 0.5 && (c - real'(w.re)) <= 0.5, $sformatf("re k=%0d %0d vs %f", i, w.re, c));
      check((real'(w.im) - s) <= 0.5 && (s - real'(w.im)) <= 0.5, $sformatf("im k=%0d %0d vs %f", i, w.im, s));
      if (i < 64) first[i] = w;
      else check(w.re == -first[i-64].re && w.im == -first[i-64].im, $sformatf("symmetry k=%0d", i));
    end
    k = 7'd32;
    #1;
    check(w.re == 0 && w.im == -16'sd32767, "W^32 = -j");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
