// r4_butterfly_tb: random operands and random unit-magnitude twiddles (parts
// within +-32767) through the radix-4 butterfly, in radix-4 and radix-2 mode,
// plus full-scale corner operands. The expected outputs are worked out here
// with 64-bit integers: the exact four-term sums of A*2^15 and the products,
// then floor((sum + 2^17) / 2^18). Every output part must match exactly.
module r4_butterfly_tb;
  import fft_pkg::*;

  localparam real PI = 3.14159265358979323846;

  logic  radix2;
  cplx_t a, b, c, d, wb, wc, wd;
  cplx_t y [4];
  int checks = 0, failures = 0;

  r4_butterfly dut (.*);

  function automatic longint rnd(input longint s);
    longint t = s + (64'sd1 <<< 17);
    // arithmetic floor division by 2^18
    return t >>> 18;
  endfunction

  function automatic cplx_t rand_tw();
    cplx_t w;
    real ang = 2.0 * PI * real'($urandom_range(1023)) / 1024.0;
    w.re = 16'($rtoi($floor(32767.0 * $cos(ang) + 0.5)));
    w.im = 16'($rtoi($floor(32767.0 * $sin(ang) + 0.5)));
    return w;
  endfunction

  task automatic try(input bit r2);
    longint pr [4], pi [4], er [4], ei [4];
    cplx_t ops [4], tws [4];
    radix2 = r2;
    #1;
    ops = '{a, b, c, d};
    tws = '{'{re: 16'sd0, im: 16'sd0}, wb, wc, wd};
    pr[0] = longint'(a.re) * 32768;
    pi[0] = longint'(a.im) * 32768;
    for (int i = 1; i < 4; i++) begin
      if (r2 && (i == 1 || i == 3)) begin
        pr[i] = 0; pi[i] = 0;
      end else begin
        pr[i] = longint'(ops[i].re) * tws[i].re - longint'(ops[i].im) * tws[i].im;
        pi[i] = longint'(ops[i].re) * tws[i].im + longint'(ops[i].im) * tws[i].re;
      end
    end
    // y_k = sum_i (-j)^(i*k) * P_i
    for (int k = 0; k < 4; k++) begin
      er[k] = 0; ei[k] = 0;
      for (int i = 0; i < 4; i++) begin
        unique case ((i * k) % 4)
          0: begin er[k] += pr[i]; ei[k] += pi[i]; end
          1: begin er[k] += pi[i]; ei[k] -= pr[i]; end   // -j
          2: begin er[k] -= pr[i]; ei[k] -= pi[i]; end
          default: begin er[k] -= pi[i]; ei[k] += pr[i]; end // +j
        endcase
      end
      checks++;
      if (longint'(y[k].re) != rnd(er[k]) || longint'(y[k].im) != rnd(ei[k])) begin
        failures++;
        if (failures < 10) $display("FAIL: radix2=%0d y%0d got (%0d,%0d) expected (%0d,%0d)",
                                    r2, k, y[k].re, y[k].im, rnd(er[k]), rnd(ei[k]));
      end
    end
  endtask

  initial begin
    // corners: every operand at full scale, twiddles 1
    a = '{re: -16'sd32768, im: -16'sd32768};
    b = a; c = a; d = a;
    wb = '{re: 16'sd32767, im: 16'sd0}; wc = wb; wd = wb;
    try(0);
    try(1);
    a = '{re: 16'sd32767, im: -16'sd32768};
    b = '{re: -16'sd32768, im: 16'sd32767};
    c = a; d = b;
    wb = '{re: 16'sd23170, im: -16'sd23170}; wc = wb; wd = wb;
    try(0);
    repeat (3000) begin
      a = cplx_t'($urandom); b = cplx_t'($urandom); c = cplx_t'($urandom); d = cplx_t'($urandom);
      wb = rand_tw(); wc = rand_tw(); wd = rand_tw();
      try(1'($urandom_range(1)));
    end
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
