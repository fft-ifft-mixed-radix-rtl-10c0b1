// r2_sdf_stage_tb: streams three frames of 128 random samples, then a
// frame of empty (vld = 0) positions, through two radix-2 delay-feedback
// stages, one with the default delay D = 64 and one with D = 2, with random
// gaps in en. The n-th valid output of each stage must carry position n mod
// 128 and equal, for a position q of the pair (p, p+D) of its frame,
// round((x[p] + x[p+D]) / 2) if q = p or round((x[p] - x[p+D]) / 2) if
// q = p + D, computed here. The flags must follow the samples, and the
// latency (steps from an input to its result) must be D + 1.
module r2_sdf_stage_tb;
  import fft_pkg::*;

  localparam int NF = 3;
  localparam int DS [2] = '{64, 2};

  logic clk = 0, rst_n = 0, en = 0;
  smp_t in = '0;
  logic [6:0] in_pos = 0;
  smp_t out0, out1;
  logic [6:0] pos0, pos1;
  int xr [NF][128], xi [NF][128];
  bit xinv [NF];
  int checks = 0, failures = 0;
  int nout [2] = '{0, 0};
  int step = 0;
  int first_out [2] = '{-1, -1};

  always #5 clk = ~clk;

  r2_sdf_stage #(.D(64)) dut0 (.clk, .rst_n, .en, .in, .in_pos, .out(out0), .out_pos(pos0));
  r2_sdf_stage #(.D(2))  dut1 (.clk, .rst_n, .en, .in, .in_pos, .out(out1), .out_pos(pos1));

  function automatic int rnd2(input int s);
    return int'($floor(real'(s) / 2.0 + 0.5));
  endfunction

  // Check the outputs half a clock after each step.
  logic stepped = 0;
  always @(posedge clk) stepped <= rst_n && en;

  task automatic check_out(input int g, input smp_t o, input logic [6:0] op);
    int f, q, d, p, er, ei;
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
    p = (q & d) ? q - d : q;
    if (q & d) begin
      er = rnd2(xr[f][p] - xr[f][p+d]); ei = rnd2(xi[f][p] - xi[f][p+d]);
    end else begin
      er = rnd2(xr[f][p] + xr[f][p+d]); ei = rnd2(xi[f][p] + xi[f][p+d]);
    end
    if (int'(op) != q || int'(o.d.re) != er || int'(o.d.im) != ei || o.inv != xinv[f]) begin
      failures++;
      if (failures < 10) $display("FAIL: D=%0d frame %0d q=%0d pos=%0d got (%0d,%0d) expected (%0d,%0d)",
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
        xr[f][n] = int'($urandom_range(65535)) - 32768;
        xi[f][n] = int'($urandom_range(65535)) - 32768;
      end
    end
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int s = 0; s < (NF + 1) * 128; s++) begin
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
      // the first valid output (position 0) leaves D + 1 steps after input 0
      if (first_out[g] != DS[g]) begin
        failures++; $display("FAIL: D=%0d first output at step %0d", DS[g], first_out[g]);
      end
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
