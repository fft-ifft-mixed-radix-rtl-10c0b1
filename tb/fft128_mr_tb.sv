// fft128_mr_tb: end-to-end test of the 128-point FFT/IFFT processor at its
// default (and only) size. It sends seven frames of random complex data:
// frames 0-3 back to back (FFT, FFT, IFFT, FFT: mode switches), frame 4 an
// IFFT with random gaps in in_valid (pipeline stalls), then waits so that
// the pipeline has to flush, then frames 5 (IFFT) and 6 (FFT, near
// full-scale amplitude) after the flush. Every output is compared with a direct DFT in floating point,
// scaled by 1/128, to within TOL LSB. It also checks the latency of the first
// frame (first input to first output), that back-to-back frames come out
// 128 clocks apart, and that each mechanism (stall, flush, mode switch,
// back-to-back output) happened at least once.
module fft128_mr_tb;
  import fft_pkg::*;

  localparam int    NF      = 7;
  localparam int    TOL     = 4;
  localparam int    LATENCY = 269;   // 127 + 140 pipeline steps + write + read
  localparam real   PI      = 3.14159265358979323846;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, in_inverse = 0;
  logic signed [15:0] in_re = 0, in_im = 0;
  logic out_valid, out_last, out_inverse, flushing;
  logic signed [15:0] out_re, out_im;
  logic [6:0] out_index;

  fft128_mr dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycle = 0;
  real exp_re [NF][N];
  real exp_im [NF][N];
  bit  frame_inv [NF];
  int  max_err = 0;

  // mechanism counters
  int n_stall = 0, n_flush = 0, n_switch = 0, n_b2b = 0;
  int t_first_in [NF];
  int t_first_out [NF];

  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  function automatic void reference(input int f, input int xr[N], input int xi[N], input bit inv);
    for (int k = 0; k < N; k++) begin
      real sr = 0.0, si = 0.0;
      for (int n = 0; n < N; n++) begin
        real a = 2.0 * PI * real'((n * k) % N) / N;
        real c = $cos(a);
        real s = inv ? $sin(a) : -$sin(a);
        sr += xr[n] * c - xi[n] * s;
        si += xr[n] * s + xi[n] * c;
      end
      exp_re[f][k] = sr / N;
      exp_im[f][k] = si / N;
    end
  endfunction

  task automatic send_frame(input int f, input bit inv, input bit gaps, input int amp);
    int xr[N], xi[N];
    for (int n = 0; n < N; n++) begin
      xr[n] = int'($urandom_range(2 * amp)) - amp;
      xi[n] = int'($urandom_range(2 * amp)) - amp;
    end
    frame_inv[f] = inv;
    reference(f, xr, xi, inv);
    for (int n = 0; n < N; n++) begin
      if (gaps && n > 0 && $urandom_range(3) == 0) begin
        in_valid <= 1'b0;
        repeat ($urandom_range(1, 3)) begin
          @(posedge clk);
          n_stall++;
        end
      end
      in_valid <= 1'b1; in_inverse <= inv; in_re <= 16'(xr[n]); in_im <= 16'(xi[n]);
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      if (n == 0) t_first_in[f] = cycle;
    end
    in_valid <= 1'b0;
  endtask

  // Output checker
  int of = 0, oi = 0;
  bit prev_last = 0;
  always @(posedge clk) begin
    if (flushing) n_flush++;
    if (out_valid && of < NF) begin
      int er, ei;
      if (oi == 0) t_first_out[of] = cycle;
      if (oi == 0 && prev_last) n_b2b++;
      er = int'($floor(exp_re[of][oi] + 0.5)) - int'(out_re);
      ei = int'($floor(exp_im[of][oi] + 0.5)) - int'(out_im);
      if (er < 0) er = -er;
      if (ei < 0) ei = -ei;
      if (er > max_err) max_err = er;
      if (ei > max_err) max_err = ei;
      check(out_index == 7'(oi), $sformatf("frame %0d index %0d != %0d", of, out_index, oi));
      check(out_inverse == frame_inv[of], $sformatf("frame %0d inverse flag", of));
      check(er <= TOL && ei <= TOL,
            $sformatf("frame %0d k=%0d got (%0d,%0d) expected (%f,%f)", of, oi, out_re, out_im,
                      exp_re[of][oi], exp_im[of][oi]));
      check(out_last == (oi == N - 1), $sformatf("frame %0d out_last at %0d", of, oi));
      if (oi == N - 1) begin
        oi = 0;
        of++;
      end else oi++;
    end
    prev_last <= out_valid && out_last;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    send_frame(0, 0, 0, 16000);
    send_frame(1, 0, 0, 16000);
    send_frame(2, 1, 0, 16000);
    n_switch++;
    send_frame(3, 0, 0, 16000);
    n_switch++;
    send_frame(4, 1, 1, 16000);
    n_switch++;
    repeat (400) @(posedge clk);
    send_frame(5, 1, 0, 20000);
    send_frame(6, 0, 0, 23000);
    n_switch++;
    wait (of == NF);
    repeat (5) @(posedge clk);
    check(t_first_out[0] - t_first_in[0] == LATENCY,
          $sformatf("latency %0d, expected %0d", t_first_out[0] - t_first_in[0], LATENCY));
    for (int f = 1; f <= 1; f++)
      check(t_first_out[f] - t_first_out[f-1] == N,
            $sformatf("frame spacing %0d, expected %0d", t_first_out[f] - t_first_out[f-1], N));
    check(n_stall > 0, "no stall happened");
    check(n_flush > 0, "no flush happened");
    check(n_switch > 0, "no FFT/IFFT switch happened");
    check(n_b2b > 0, "no back-to-back output frames");
    $display("latency=%0d stalls=%0d flush_cycles=%0d mode_switches=%0d back_to_back=%0d max_err=%0d",
             t_first_out[0] - t_first_in[0], n_stall, n_flush, n_switch, n_b2b, max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog, %0d frames out", of);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
