// bitrev_buffer_tb: writes frames of 128 random words at stream positions
// 0..127 and expects them back in natural order: output k must be the word
// written at position bitrev7(k), with real and imaginary parts swapped for a
// frame flagged inv. Frames 0-2 are written back to back (their outputs must
// then follow each other with no idle clock), frame 3 has random gaps in
// in_en, and an empty frame (vld = 0) between frames 3 and 4 must produce
// nothing. Also checked: out_index, out_last, out_inverse, and that the first
// word leaves one clock after the clock edge that wrote the frame's last word.
module bitrev_buffer_tb;
  import fft_pkg::*;

  localparam int NF = 5;

  logic clk = 0, rst_n = 0, in_en = 0;
  smp_t in = '0;
  logic [6:0] in_pos = 0;
  logic out_valid, out_last, out_inverse;
  cplx_t out_data;
  logic [6:0] out_index;

  bitrev_buffer dut (.*);

  always #5 clk = ~clk;

  cplx_t data [NF][128];
  bit    finv [NF];
  int checks = 0, failures = 0;
  int cyc = 0, last_write [NF], first_read [NF];
  int of = 0, oi = 0, n_b2b = 0;
  bit prev_last = 0;

  always @(posedge clk) cyc <= cyc + 1;

  // clock count just after the edge that writes the first frame's last word
  int nwritten = 0;
  always @(posedge clk)
    if (rst_n && in_en && in.vld && in_pos == 7'd127) begin
      if (nwritten < NF) last_write[nwritten] <= cyc + 1;
      nwritten <= nwritten + 1;
    end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  always @(negedge clk) begin
    if (out_valid) begin
      cplx_t e;
      if (of >= NF) check(0, "output after the last frame");
      else begin
        e = data[of][bitrev7(7'(oi))];
        if (finv[of]) e = swap_ri(e);
        if (oi == 0) begin
          first_read[of] = cyc;
          if (prev_last) n_b2b++;
        end
        check(out_data == e && out_index == 7'(oi) && out_last == (oi == 127) && out_inverse == finv[of],
              $sformatf("frame %0d k=%0d got %h expected %h", of, oi, out_data, e));
        if (oi == 127) begin oi = 0; of++; end
        else oi++;
      end
    end
    prev_last = out_valid && out_last;
  end

  task automatic write_frame(input int f, input bit gaps, input bit valid);
    for (int p = 0; p < 128; p++) begin
      while (gaps && $urandom_range(3) == 0) begin
        in_en <= 0;
        @(posedge clk);
      end
      in_en <= 1; in_pos <= 7'(p);
      in.vld <= valid;
      in.inv <= valid ? finv[f] : 1'b0;
      in.d   <= valid ? data[f][p] : '0;
      @(posedge clk);
    end
    in_en <= 0;
  endtask

  initial begin
    for (int f = 0; f < NF; f++) begin
      finv[f] = 1'($urandom_range(1));
      for (int p = 0; p < 128; p++) data[f][p] = cplx_t'($urandom());
    end
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    write_frame(0, 0, 1);
    write_frame(1, 0, 1);
    write_frame(2, 0, 1);
    write_frame(3, 1, 1);
    write_frame(0, 0, 0);   // empty frame
    write_frame(4, 1, 1);
    repeat (300) @(posedge clk);
    check(of == NF, $sformatf("%0d frames read", of));
    check(n_b2b >= 2, $sformatf("only %0d back-to-back frames", n_b2b));
    check(first_read[0] - last_write[0] == 1,
          $sformatf("first word %0d clocks after the last write", first_read[0] - last_write[0]));
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
