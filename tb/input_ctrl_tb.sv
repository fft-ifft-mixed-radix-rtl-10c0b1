// input_ctrl_tb: drives the frame controller with frames that have random
// gaps (stalls inside a frame), a changing FFT/IFFT mode per frame (with
// in_inverse toggling inside frames, which must be ignored), and idle times
// that must trigger flush frames; one frame is offered while a flush is
// running and must wait for in_ready. A model of a 140-step pipeline made of
// valid flags stands in for the datapath and drives pipe_out_vld. Checked at
// every clock: an accepted sample steps the pipeline with position = steps
// so far mod 128, vld = 1, the frame's mode, and real/imaginary swapped for
// an IFFT; no step happens inside a frame without input; a flush starts only
// at position 0, steps once per clock with vld = 0 and lasts whole frames;
// at the end every valid sample has left the model pipeline and the
// controller is idle.
module input_ctrl_tb;
  import fft_pkg::*;

  localparam int L = 140;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, in_inverse = 0, pipe_out_vld, en, flushing;
  cplx_t in_data = '0;
  smp_t smp;
  logic [6:0] pos;

  input_ctrl dut (.*);

  always #5 clk = ~clk;

  logic [L-1:0] model = '0;
  assign pipe_out_vld = model[L-1];

  int checks = 0, failures = 0;
  int n_stall = 0, n_flush = 0, n_wait = 0, n_inv = 0;
  int steps = 0, flush_run = 0;
  bit frame_inv = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  always @(negedge clk) begin
    if (rst_n) begin
      int p;
      p = steps % 128;
      if (in_valid && in_ready) begin
        cplx_t e;
        bit inv;
        inv = (p == 0) ? in_inverse : frame_inv;
        if (p == 0) frame_inv = in_inverse;
        if (p == 0 && inv) n_inv++;
        e = inv ? swap_ri(in_data) : in_data;
        check(en && smp.vld && int'(pos) == p && smp.inv == inv && smp.d == e && !flushing,
              $sformatf("accepted sample at position %0d", p));
      end else if (flushing) begin
        check(en && !smp.vld && int'(pos) == p, "flush step");
        if (flush_run == 0) check(p == 0, "flush starts inside a frame");
        if (p != 0) check(!in_ready, "in_ready during a flush");
        if (in_valid) n_wait++;
        n_flush++;
      end else begin
        check(!en, $sformatf("step without input at position %0d", p));
        if (p != 0) n_stall++;
      end
      flush_run = flushing ? flush_run + 1 : 0;
      if (!flushing) check(flush_run == 0 || flush_run % 128 == 0, "partial flush frame");
      if (en) begin
        model = {model[L-2:0], smp.vld};
        steps++;
      end
    end
  end

  task automatic send_frame(input bit gaps, input bit inv);
    for (int n = 0; n < 128; n++) begin
      while (gaps && n > 0 && $urandom_range(3) == 0) begin
        in_valid <= 0;
        @(posedge clk);
      end
      in_valid <= 1;
      in_inverse <= (n == 0) ? inv : 1'($urandom_range(1));
      in_data <= cplx_t'($urandom());
      @(posedge clk);
      while (!in_ready) @(posedge clk);
    end
    in_valid <= 0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    send_frame(0, 0);
    send_frame(1, 1);
    repeat (20) @(posedge clk);   // idle: a flush frame starts
    send_frame(0, 1);             // offered during the flush
    send_frame(1, 0);
    send_frame(0, 1);
    repeat (600) @(posedge clk);
    check(model == '0, "valid samples left in the pipeline");
    check(n_stall > 0 && n_flush >= 256 && n_wait > 0 && n_inv > 0,
          $sformatf("stall=%0d flush=%0d wait=%0d inv=%0d", n_stall, n_flush, n_wait, n_inv));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
