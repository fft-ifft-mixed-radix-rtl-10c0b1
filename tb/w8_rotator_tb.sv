// w8_rotator_tb: random samples and random exponents e = 0..3 through the
// W8 rotator, with random gaps in en. Each result must match
// x * exp(-j*pi*e/4), computed here in floating point and saturated to
// 16 bits, within 1 LSB; e = 0 and e = 2 must be exact. The output must
// appear one step after its input and carry the input's position and flags.
// Corner inputs (-32768 parts, full-scale magnitudes) exercise saturation.
module w8_rotator_tb;
  import fft_pkg::*;

  localparam real PI = 3.14159265358979323846;

  logic clk = 0, rst_n = 0, en = 0;
  logic [1:0] e = 0;
  smp_t in = '0, out;
  logic [6:0] in_pos = 0, out_pos;
  int checks = 0, failures = 0, n_sat = 0;

  w8_rotator dut (.*);

  always #5 clk = ~clk;

  function automatic int sat(input real v);
    int r = int'($floor(v + 0.5));
    if (r > 32767) return 32767;
    if (r < -32768) return -32768;
    return r;
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < 3000; i++) begin
      int xr, xi, er, ei, dr, di;
      real c, s;
      smp_t x;
      logic [1:0] ee;
      if (i < 16) begin
        xr = (i & 1) ? -32768 : 32767;
        xi = (i & 2) ? -32768 : 32767;
      end else begin
        xr = int'($urandom_range(65535)) - 32768;
        xi = int'($urandom_range(65535)) - 32768;
      end
      ee = 2'(i < 16 ? i >> 2 : $urandom_range(3));
      x.vld = 1'($urandom_range(1)); x.inv = 1'($urandom_range(1));
      x.d.re = 16'(xr); x.d.im = 16'(xi);
      while ($urandom_range(3) == 0) begin
        en <= 0;
        @(posedge clk);
      end
      en <= 1; e <= ee; in <= x; in_pos <= 7'(i);
      @(posedge clk);
      en <= 0;
      @(posedge clk);
      c = $cos(PI * ee / 4.0);
      s = -$sin(PI * ee / 4.0);
      er = sat(xr * c - xi * s);
      ei = sat(xr * s + xi * c);
      if (er == 32767 || er == -32768 || ei == 32767 || ei == -32768) n_sat++;
      dr = int'(out.d.re) - er; di = int'(out.d.im) - ei;
      checks++;
      if (dr < -1 || dr > 1 || di < -1 || di > 1 || ((ee == 0 || ee == 2) && (dr != 0 || di != 0)) ||
          out_pos != 7'(i) || out.vld != x.vld || out.inv != x.inv) begin
        failures++;
        if (failures < 10) $display("FAIL: x=(%0d,%0d) e=%0d got (%0d,%0d) expected (%0d,%0d)",
                                    xr, xi, ee, out.d.re, out.d.im, er, ei);
      end
    end
    checks++;
    if (n_sat == 0) begin failures++; $display("FAIL: saturation never reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
