// r8_sdf_unit_tb: streams three frames of 128 random samples, then two
// frames of empty positions, through two radix-8 units, the stage-2 form
// (D = 8, delays 32/16/8) and the stage-3 form (D = 1, delays 4/2/1), with
// random gaps in en. The n-th valid output carries position q = n mod 128;
// with b the part of q outside the three digit bits and (d, e, f) the
// digit bits from the top, it must equal
//   (1/8) * sum_m x[b + D*m] * exp(-j*2*pi*m*k/8),  k = d + 2e + 4f,
// computed here in floating point, within 2 LSB. Also checked: the number of
// valid outputs and the latency 7D + 5 steps.
module r8_sdf_unit_tb;
  import fft_pkg::*;

  localparam int  NF = 3;
  localparam real PI = 3.14159265358979323846;
  localparam int  DS [2] = '{8, 1};

  logic clk = 0, rst_n = 0, en = 0;
  smp_t in = '0, out0, out1;
  logic [6:0] in_pos = 0, pos0, pos1;
  int xr [NF][128], xi [NF][128];
  bit xinv [NF];
  int checks = 0, failures = 0, max_err = 0;
  int nout [2] = '{0, 0};
  int first_out [2] = '{-1, -1};
  int step = 0;
  logic stepped = 0;

  r8_sdf_unit #(.D(8)) dut0 (.clk, .rst_n, .en, .in, .in_pos, .out(out0), .out_pos(pos0));
  r8_sdf_unit #(.D(1)) dut1 (.clk, .rst_n, .en, .in, .in_pos, .out(out1), .out_pos(pos1));

  always #5 clk = ~clk;
  always @(posedge clk) stepped <= rst_n && en;

  task automatic check_out(input int g, input smp_t o, input logic [6:0] op);
    int f, q, d, b, k;
    real er, ei, dr, di;
    if (!o.vld) return;
    d = DS[g];
    f = nout[g] / 128;
    q = nout[g] % 128;
    if (first_out[g] < 0) first_out[g] = step;
    nout[g]++;
    checks++;
    if (f >= NF) begin
      failures++;
      if (failures < 10) $display("FAIL: D=%0d extra valid output", d);
      return;
    end
    b = q & ~(7 * d);
    k = ((q / (4 * d)) & 1) + 2 * ((q / (2 * d)) & 1) + 4 * ((q / d) & 1);
    er = 0.0; ei = 0.0;
    for (int m = 0; m < 8; m++) begin
      real a = 2.0 * PI * real'((m * k) % 8) / 8.0;
      er += xr[f][b + d * m] * $cos(a) + xi[f][b + d * m] * $sin(a);
      ei += xi[f][b + d * m] * $cos(a) - xr[f][b + d * m] * $sin(a);
    end
    er /= 8.0; ei /= 8.0;
    dr = real'(o.d.re) - er;
    di = real'(o.d.im) - ei;
    if (dr > max_err || -dr > max_err) max_err = int'($ceil(dr < 0 ? -dr : dr));
    if (di > max_err || -di > max_err) max_err = int'($ceil(di < 0 ? -di : di));
    if (int'(op) != q || dr > 2.0 || dr < -2.0 || di > 2.0 || di < -2.0 || o.inv != xinv[f]) begin
      failures++;
      if (failures < 10) $display("FAIL: D=%0d frame %0d q=%0d pos=%0d got (%0d,%0d) expected (%f,%f)",
                                  d, f, q, op, o.d.re, o.d.im, er, ei);
    end
  endtask

  always @(negedge clk) begin
    if (stepped) begin
      check_out(0, out0, pos0);
      check_out(1, out1, pos1);
      step++;
    end
  end

  initial begin
    for (int f = 0; f < NF; f++) begin
      xinv[f] = 1'(f & 1);
      for (int n = 0; n < 128; n++) begin
        xr[f][n] = int'($urandom_range(46000)) - 23000;
        xi[f][n] = int'($urandom_range(46000)) - 23000;
      end
    end
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int s = 0; s < (NF + 2) * 128; s++) begin
      int f;
      f = s / 128;
      while ($urandom_range(4) == 0) begin
        en <= 0;
        @(posedge clk);
      end
      en <= 1;
      in_pos <= 7'(s);
      if (f < NF) begin
        in.vld <= 1; in.inv <= xinv[f];
        in.d.re <= 16'(xr[f][s % 128]); in.d.im <= 16'(xi[f][s % 128]);
      end else in <= '0;
      @(posedge clk);
    end
    en <= 0;
    repeat (3) @(posedge clk);
    for (int g = 0; g < 2; g++) begin
      checks += 2;
      if (nout[g] != NF * 128) begin
        failures++; $display("FAIL: D=%0d %0d valid outputs", DS[g], nout[g]);
      end
      // output position 0 leaves 7D + 5 steps after input position 0
      if (first_out[g] != 7 * DS[g] + 4) begin
        failures++; $display("FAIL: D=%0d first output at step %0d", DS[g], first_out[g]);
      end
    end
    $display("max_err=%0d", max_err);
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
