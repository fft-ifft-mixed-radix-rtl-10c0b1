// fft32_mem_tb: runs five 32-point frames (FFT and IFFT, one with random
// input gaps, one near full scale) through the memory-based processor and
// compares every output with a direct DFT in floating point scaled by 1/512,
// within TOL LSB. Also checked: out_index, out_last, out_inverse; that the
// stages run for 8, 8 and 16 clocks; that the first result leaves 33 clocks
// after the last input sample; that a frame with continuous input takes
// 96 clocks from first input to the next frame's first input; and that
// in_ready is low while a frame is being computed.
module fft32_mem_tb;
  import fft_pkg::*;

  localparam int  NF  = 5;
  localparam int  TOL = 2;
  localparam real PI  = 3.14159265358979323846;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, in_inverse = 0;
  logic signed [15:0] in_re = 0, in_im = 0;
  logic out_valid, out_last, out_inverse;
  logic signed [15:0] out_re, out_im;
  logic [4:0] out_index;
  logic [1:0] stage;

  fft32_mem dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, max_err = 0;
  real exp_re [NF][32], exp_im [NF][32];
  bit  finv [NF];
  int  cyc = 0, t_last_in [NF], t_first_in [NF], t_first_out [NF];
  int  stage_len [4] = '{0, 0, 0, 0};
  int  n_busy = 0;

  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  task automatic send_frame(input int f, input bit inv, input bit gaps, input int amp);
    int xr[32], xi[32];
    for (int n = 0; n < 32; n++) begin
      xr[n] = int'($urandom_range(2 * amp)) - amp;
      xi[n] = int'($urandom_range(2 * amp)) - amp;
    end
    finv[f] = inv;
    for (int k = 0; k < 32; k++) begin
      real sr, si;
      sr = 0.0; si = 0.0;
      for (int n = 0; n < 32; n++) begin
        real ang, cs, sn;
        ang = 2.0 * PI * real'((n * k) % 32) / 32.0;
        cs = $cos(ang);
        sn = inv ? $sin(ang) : -$sin(ang);
        sr += xr[n] * cs - xi[n] * sn;
        si += xr[n] * sn + xi[n] * cs;
      end
      exp_re[f][k] = sr / 512.0;
      exp_im[f][k] = si / 512.0;
    end
    for (int n = 0; n < 32; n++) begin
      while (gaps && n > 0 && $urandom_range(3) == 0) begin
        in_valid <= 0;
        @(posedge clk);
      end
      in_valid <= 1; in_inverse <= inv; in_re <= 16'(xr[n]); in_im <= 16'(xi[n]);
      @(posedge clk);
      while (!in_ready) begin
        n_busy++;
        @(posedge clk);
      end
    end
    in_valid <= 0;
  endtask

  // first and last accepted input of each frame, counted at the clock edge
  int nin = 0;
  always @(posedge clk)
    if (rst_n && in_valid && in_ready) begin
      if (nin % 32 == 0) t_first_in[nin / 32] <= cyc + 1;
      if (nin % 32 == 31) t_last_in[nin / 32] <= cyc + 1;
      nin <= nin + 1;
    end

  int of = 0;
  logic [1:0] prev_stage = 0;
  int run = 0;
  always @(negedge clk) begin
    if (rst_n) begin
      if (stage == prev_stage) run++;
      else begin
        if (prev_stage != 0) begin
          if (stage_len[prev_stage] == 0) stage_len[prev_stage] = run;
          check(run == (prev_stage == 3 ? 16 : 8), $sformatf("stage %0d ran %0d clocks", prev_stage, run));
        end
        run = 1;
      end
      prev_stage = stage;
      if (stage != 0) check(!in_ready, "in_ready while computing");
    end
    if (out_valid && of < NF) begin
      int k, er, ei;
      k = int'(out_index);
      if (k == 0) t_first_out[of] = cyc;
      er = int'($floor(exp_re[of][k] + 0.5)) - int'(out_re);
      ei = int'($floor(exp_im[of][k] + 0.5)) - int'(out_im);
      if (er < 0) er = -er;
      if (ei < 0) ei = -ei;
      if (er > max_err) max_err = er;
      if (ei > max_err) max_err = ei;
      check(er <= TOL && ei <= TOL && out_inverse == finv[of] && out_last == (k == 31),
            $sformatf("frame %0d k=%0d got (%0d,%0d) expected (%f,%f)", of, k, out_re, out_im,
                      exp_re[of][k], exp_im[of][k]));
      if (k == 31) of++;
    end
  end

  int expect_k = 0;
  always @(negedge clk)
    if (out_valid) begin
      check(int'(out_index) == expect_k, $sformatf("out_index %0d, expected %0d", out_index, expect_k));
      expect_k = (expect_k + 1) % 32;
    end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    send_frame(0, 0, 0, 16000);
    send_frame(1, 1, 0, 16000);
    send_frame(2, 0, 1, 16000);
    send_frame(3, 1, 1, 16000);
    send_frame(4, 0, 0, 23000);
    wait (of == NF);
    repeat (3) @(posedge clk);
    check(t_first_out[0] - t_last_in[0] == 33,
          $sformatf("first result %0d clocks after the last input", t_first_out[0] - t_last_in[0]));
    check(t_first_in[1] - t_first_in[0] == 96,
          $sformatf("frame period %0d clocks", t_first_in[1] - t_first_in[0]));
    check(n_busy > 0 && stage_len[3] == 16, "no backpressure or no radix-2 stage seen");
    $display("max_err=%0d", max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog, %0d frames out", of);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
