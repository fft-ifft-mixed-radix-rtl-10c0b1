// mixed_radix_fft_tb: end-to-end test of the complete design at its default
// (and only) size: both processors run at the same time.
//   128-point pipeline: seven random frames: FFT, FFT, IFFT, FFT back to back
//   (mode switches), an IFFT with random input gaps (stalls), an idle period
//   that forces flush frames, then an IFFT and a near full-scale FFT.
//   Checked: every result against a direct DFT / 128 (TOL128 LSB), index,
//   last and mode flags, the 269-clock latency and the 128-clock frame
//   spacing.
//   32-point processor: five random frames (FFT and IFFT, two with input
//   gaps, one near full scale). Checked: every result against a direct
//   DFT / 512 (TOL32 LSB), flags, the 96-clock frame period.
// Each mechanism (stall, flush, mode switch, back-to-back output, input
// backpressure of the 32-point core, its radix-2 stage) is counted and must
// have happened at least once.
module mixed_radix_fft_tb;
  import fft_pkg::*;

  localparam int  NF128  = 7;
  localparam int  NF32   = 5;
  localparam int  TOL128 = 4;
  localparam int  TOL32  = 2;
  localparam real PI     = 3.14159265358979323846;

  logic clk = 0, rst_n = 0;
  logic f128_in_valid = 0, f128_in_ready, f128_in_inverse = 0;
  logic signed [15:0] f128_in_re = 0, f128_in_im = 0;
  logic f128_out_valid, f128_out_last, f128_out_inverse, f128_flushing;
  logic signed [15:0] f128_out_re, f128_out_im;
  logic [6:0] f128_out_index;
  logic f32_in_valid = 0, f32_in_ready, f32_in_inverse = 0;
  logic signed [15:0] f32_in_re = 0, f32_in_im = 0;
  logic f32_out_valid, f32_out_last, f32_out_inverse;
  logic signed [15:0] f32_out_re, f32_out_im;
  logic [4:0] f32_out_index;
  logic [1:0] f32_stage;

  mixed_radix_fft dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // Reference DFT of n points, scaled by 1/scale.
  task automatic dft(input int n, input int xr[], input int xi[], input bit inv, input real scale,
                     output real yr[], output real yi[]);
    yr = new[n];
    yi = new[n];
    for (int k = 0; k < n; k++) begin
      real sr, si;
      sr = 0.0; si = 0.0;
      for (int m = 0; m < n; m++) begin
        real ang, cs, sn;
        ang = 2.0 * PI * real'((m * k) % n) / n;
        cs = $cos(ang);
        sn = inv ? $sin(ang) : -$sin(ang);
        sr += xr[m] * cs - xi[m] * sn;
        si += xr[m] * sn + xi[m] * cs;
      end
      yr[k] = sr / scale;
      yi[k] = si / scale;
    end
  endtask

  function automatic int absdiff(input real e, input int g);
    int d = int'($floor(e + 0.5)) - g;
    return d < 0 ? -d : d;
  endfunction

  // ---------------- 128-point pipeline ----------------
  real e128_re [NF128][128], e128_im [NF128][128];
  bit  inv128 [NF128];
  int  n_stall = 0, n_flush = 0, n_switch = 0, n_b2b = 0, max128 = 0;
  int  t128_in [NF128], t128_out [NF128];

  task automatic send128(input int f, input bit inv, input bit gaps, input int amp);
    int xr[], xi[];
    real yr[], yi[];
    xr = new[128]; xi = new[128];
    for (int n = 0; n < 128; n++) begin
      xr[n] = int'($urandom_range(2 * amp)) - amp;
      xi[n] = int'($urandom_range(2 * amp)) - amp;
    end
    inv128[f] = inv;
    dft(128, xr, xi, inv, 128.0, yr, yi);
    for (int k = 0; k < 128; k++) begin e128_re[f][k] = yr[k]; e128_im[f][k] = yi[k]; end
    for (int n = 0; n < 128; n++) begin
      if (gaps && n > 0 && $urandom_range(3) == 0) begin
        f128_in_valid <= 0;
        repeat ($urandom_range(1, 3)) begin
          @(posedge clk);
          n_stall++;
        end
      end
      f128_in_valid <= 1; f128_in_inverse <= inv;
      f128_in_re <= 16'(xr[n]); f128_in_im <= 16'(xi[n]);
      @(posedge clk);
      while (!f128_in_ready) @(posedge clk);
      if (n == 0) t128_in[f] = cyc;
    end
    f128_in_valid <= 0;
  endtask

  int of128 = 0, oi128 = 0;
  bit prev_last128 = 0;
  always @(posedge clk) begin
    if (f128_flushing) n_flush++;
    if (f128_out_valid && of128 < NF128) begin
      int er, ei;
      if (oi128 == 0) t128_out[of128] = cyc;
      if (oi128 == 0 && prev_last128) n_b2b++;
      er = absdiff(e128_re[of128][oi128], int'(f128_out_re));
      ei = absdiff(e128_im[of128][oi128], int'(f128_out_im));
      if (er > max128) max128 = er;
      if (ei > max128) max128 = ei;
      check(er <= TOL128 && ei <= TOL128 && f128_out_index == 7'(oi128) &&
            f128_out_inverse == inv128[of128] && f128_out_last == (oi128 == 127),
            $sformatf("128: frame %0d k=%0d got (%0d,%0d) expected (%f,%f)", of128, oi128,
                      f128_out_re, f128_out_im, e128_re[of128][oi128], e128_im[of128][oi128]));
      if (oi128 == 127) begin oi128 = 0; of128++; end
      else oi128++;
    end
    prev_last128 <= f128_out_valid && f128_out_last;
  end

  // ---------------- 32-point memory-based processor ----------------
  real e32_re [NF32][32], e32_im [NF32][32];
  bit  inv32 [NF32];
  int  n_busy = 0, n_radix2 = 0, max32 = 0, nin32 = 0;
  int  t32_first_in [NF32];

  task automatic send32(input int f, input bit inv, input bit gaps, input int amp);
    int xr[], xi[];
    real yr[], yi[];
    xr = new[32]; xi = new[32];
    for (int n = 0; n < 32; n++) begin
      xr[n] = int'($urandom_range(2 * amp)) - amp;
      xi[n] = int'($urandom_range(2 * amp)) - amp;
    end
    inv32[f] = inv;
    dft(32, xr, xi, inv, 512.0, yr, yi);
    for (int k = 0; k < 32; k++) begin e32_re[f][k] = yr[k]; e32_im[f][k] = yi[k]; end
    for (int n = 0; n < 32; n++) begin
      while (gaps && n > 0 && $urandom_range(3) == 0) begin
        f32_in_valid <= 0;
        @(posedge clk);
      end
      f32_in_valid <= 1; f32_in_inverse <= inv;
      f32_in_re <= 16'(xr[n]); f32_in_im <= 16'(xi[n]);
      @(posedge clk);
      while (!f32_in_ready) begin
        n_busy++;
        @(posedge clk);
      end
    end
    f32_in_valid <= 0;
  endtask

  always @(posedge clk)
    if (rst_n && f32_in_valid && f32_in_ready) begin
      if (nin32 % 32 == 0) t32_first_in[nin32 / 32] <= cyc + 1;
      nin32 <= nin32 + 1;
    end

  int of32 = 0;
  always @(negedge clk) begin
    if (f32_stage == 2'd3) n_radix2++;
    if (f32_out_valid && of32 < NF32) begin
      int k, er, ei;
      k = int'(f32_out_index);
      er = absdiff(e32_re[of32][k], int'(f32_out_re));
      ei = absdiff(e32_im[of32][k], int'(f32_out_im));
      if (er > max32) max32 = er;
      if (ei > max32) max32 = ei;
      check(er <= TOL32 && ei <= TOL32 && f32_out_inverse == inv32[of32] && f32_out_last == (k == 31),
            $sformatf("32: frame %0d k=%0d got (%0d,%0d) expected (%f,%f)", of32, k,
                      f32_out_re, f32_out_im, e32_re[of32][k], e32_im[of32][k]));
      if (k == 31) of32++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    fork
      begin
        send128(0, 0, 0, 16000);
        send128(1, 0, 0, 16000);
        send128(2, 1, 0, 16000);
        n_switch++;
        send128(3, 0, 0, 16000);
        n_switch++;
        send128(4, 1, 1, 16000);
        n_switch++;
        repeat (400) @(posedge clk);
        send128(5, 1, 0, 20000);
        send128(6, 0, 0, 23000);
        n_switch++;
      end
      begin
        send32(0, 0, 0, 16000);
        send32(1, 1, 0, 16000);
        send32(2, 0, 1, 16000);
        send32(3, 1, 1, 16000);
        send32(4, 0, 0, 23000);
      end
    join
    wait (of128 == NF128 && of32 == NF32);
    repeat (5) @(posedge clk);
    check(t128_out[0] - t128_in[0] == 269, $sformatf("128: latency %0d", t128_out[0] - t128_in[0]));
    check(t128_out[1] - t128_out[0] == 128, $sformatf("128: frame spacing %0d", t128_out[1] - t128_out[0]));
    check(t32_first_in[1] - t32_first_in[0] == 96, $sformatf("32: frame period %0d", t32_first_in[1] - t32_first_in[0]));
    check(n_stall > 0, "128: no stall happened");
    check(n_flush > 0, "128: no flush happened");
    check(n_switch > 0, "128: no FFT/IFFT switch happened");
    check(n_b2b > 0, "128: no back-to-back output frames");
    check(n_busy > 0, "32: input never held off");
    check(n_radix2 > 0, "32: radix-2 stage never ran");
    $display("128: stalls=%0d flush_cycles=%0d switches=%0d back_to_back=%0d max_err=%0d",
             n_stall, n_flush, n_switch, n_b2b, max128);
    $display("32:  busy_cycles=%0d radix2_cycles=%0d max_err=%0d", n_busy, n_radix2, max32);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog, %0d and %0d frames out", of128, of32);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
