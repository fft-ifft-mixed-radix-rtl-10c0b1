// twiddle_stage_tb: streams random samples with random positions through
// both inter-stage twiddle multipliers (STAGE 1 and STAGE 2), with random
// gaps in en, and compares each result one step later with the exact
// product in floating point:
//   STAGE 1, position q = 64*k1 + n2:          x * exp(-j*2*pi*k1*n2/128)
//   STAGE 2, position q = 8*bitrev3(k21) + m2: x * exp(-j*2*pi*m2*k21/64)
// within 2 LSB (twiddle quantisation plus rounding), and checks that the
// position and flags pass through unchanged.
module twiddle_stage_tb;
  import fft_pkg::*;

  localparam real PI = 3.14159265358979323846;

  logic clk = 0, rst_n = 0, en = 0;
  smp_t in = '0, out1, out2;
  logic [6:0] in_pos = 0, pos1, pos2;
  int checks = 0, failures = 0;

  twiddle_stage #(.STAGE(1)) dut1 (.clk, .rst_n, .en, .in, .in_pos, .out(out1), .out_pos(pos1));
  twiddle_stage #(.STAGE(2)) dut2 (.clk, .rst_n, .en, .in, .in_pos, .out(out2), .out_pos(pos2));

  always #5 clk = ~clk;

  task automatic check_one(input int stage, input smp_t x, input int q, input smp_t o, input logic [6:0] op);
    real ang, er, ei, dr, di;
    int k21, m2;
    if (stage == 1) ang = 2.0 * PI * real'((q / 64) * (q % 64)) / 128.0;
    else begin
      k21 = ((q >> 5) & 1) | (((q >> 4) & 1) << 1) | (((q >> 3) & 1) << 2);
      m2  = q % 8;
      ang = 2.0 * PI * real'(m2 * k21) / 64.0;
    end
    er = x.d.re * $cos(ang) + x.d.im * $sin(ang);
    ei = x.d.im * $cos(ang) - x.d.re * $sin(ang);
    dr = real'(o.d.re) - er;
    di = real'(o.d.im) - ei;
    checks++;
    if (dr > 2.0 || dr < -2.0 || di > 2.0 || di < -2.0 || int'(op) != q || o.vld != x.vld || o.inv != x.inv) begin
      failures++;
      if (failures < 10) $display("FAIL: stage %0d q=%0d x=(%0d,%0d) got (%0d,%0d) expected (%f,%f)",
                                  stage, q, x.d.re, x.d.im, o.d.re, o.d.im, er, ei);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < 2048; i++) begin
      smp_t x;
      int q;
      // magnitude below 32767 so that no saturation occurs
      x.d.re = 16'(int'($urandom_range(46000)) - 23000);
      x.d.im = 16'(int'($urandom_range(46000)) - 23000);
      x.vld = 1'($urandom_range(1));
      x.inv = 1'($urandom_range(1));
      q = (i < 128) ? i : int'($urandom_range(127));
      while ($urandom_range(3) == 0) begin
        en <= 0;
        @(posedge clk);
      end
      en <= 1; in <= x; in_pos <= 7'(q);
      @(posedge clk);
      en <= 0;
      @(negedge clk);
      check_one(1, x, q, out1, pos1);
      check_one(2, x, q, out2, pos2);
    end
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
