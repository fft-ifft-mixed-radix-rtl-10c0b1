// fft32_mem: memory-based 32-point mixed radix (4, 4, 2) FFT/IFFT processor
// with a single radix-4 butterfly core that is reused for every butterfly of
// every stage.
//
// Decimation in time with natural-order input, n = 8*n1 + 2*n2 + n3 and
// k = K1 + 4*K2 + 16*K3, computed in place in a 32-word memory:
//   stage 1, radix 4 (8 butterflies): over n1, addresses b, b+8, b+16, b+24
//            (b = 2*n2 + n3), no twiddles; result K1 replaces n1.
//   stage 2, radix 4 (8 butterflies): over n2, addresses 8*K1 + 2*i + n3,
//            input i multiplied by W32^(2*i*K1); result K2 replaces n2.
//   stage 3, radix 2 (16 butterflies, core with B = D = 0): over n3, pair
//            8*K1 + 2*K2 + {0,1}, the second multiplied by W32^(K1 + 4*K2).
// X(k) then sits at address 8*K1 + 2*K2 + K3 (digit-reversed order, not a
// plain bit reversal) and is read out in natural order.
// Each pass of the core scales by 1/8 (see r4_butterfly), so the output is
// X(k)/512 for an FFT and (1/512) sum X(k) W32^(-nk) for an IFFT; the IFFT
// swaps real and imaginary parts on the way in and out.
//
// Operation, one frame at a time: LOAD takes 32 samples (in_valid/in_ready,
// in_inverse sampled with the first), then 8 + 8 + 16 clocks of butterflies,
// one butterfly per clock, then 32 clocks of output (out_valid, out_index = k,
// out_last on k = 31). A frame takes 96 clocks; its first result appears 33
// clocks after its last input sample was accepted. A new frame is accepted
// only after the last result of the previous one has been sent.
// The 32-point radix 4-4-2 flow graph, the single reusable radix-4 core and
// its radix-2 mode follow the document; the memory organisation (a register
// file read and written four words per clock), the sequencing and the
// interface are this design's choices.
module fft32_mem
  import fft_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  output logic        in_ready,
  input  logic        in_inverse,
  input  logic signed [DW-1:0] in_re,
  input  logic signed [DW-1:0] in_im,
  output logic        out_valid,
  output logic signed [DW-1:0] out_re,
  output logic signed [DW-1:0] out_im,
  output logic [4:0]  out_index,
  output logic        out_last,
  output logic        out_inverse,
  output logic [1:0]  stage          // 0: load/unload, 1..3: butterfly stage running
);

  typedef enum logic [2:0] {S_LOAD, S_P1, S_P2, S_P3, S_OUT} state_t;

  state_t     state;
  logic [4:0] cnt;
  logic       inv;
  cplx_t      mem [32];

  // butterfly operand addresses and twiddle exponents (in units of W128)
  logic [4:0] ad [4];
  logic [6:0] eb, ec, ed;
  logic       radix2;
  cplx_t      wb, wc, wd, y [4];
  cplx_t      in_data, rd_word;

  always_comb begin
    logic [1:0] k1, k2;
    for (int i = 0; i < 4; i++) ad[i] = '0;
    eb = '0; ec = '0; ed = '0;
    radix2 = 1'b0;
    k1 = '0; k2 = '0;
    unique case (state)
      S_P1: begin
        for (int i = 0; i < 4; i++) ad[i] = 5'(8 * i) + {2'b00, cnt[2:0]};
      end
      S_P2: begin
        k1 = cnt[2:1];
        for (int i = 0; i < 4; i++) ad[i] = {k1, 3'b000} + 5'(2 * i) + {4'b0000, cnt[0]};
        // W32^(2*i*K1) = W128^(8*i*K1)
        eb = 7'(8 * 1 * k1);
        ec = 7'(8 * 2 * k1);
        ed = 7'(8 * 3 * k1);
      end
      S_P3: begin
        k1 = cnt[3:2];
        k2 = cnt[1:0];
        radix2 = 1'b1;
        ad[0] = {k1, k2, 1'b0};
        ad[2] = {k1, k2, 1'b1};
        ad[1] = ad[0];
        ad[3] = ad[2];
        // W32^(K1 + 4*K2) = W128^(4*K1 + 16*K2)
        ec = 7'(4 * k1 + 16 * k2);
      end
      default: ;
    endcase
  end

  twiddle_rom u_wb (.k(eb), .w(wb));
  twiddle_rom u_wc (.k(ec), .w(wc));
  twiddle_rom u_wd (.k(ed), .w(wd));

  r4_butterfly u_core (
    .radix2, .a(mem[ad[0]]), .b(mem[ad[1]]), .c(mem[ad[2]]), .d(mem[ad[3]]),
    .wb, .wc, .wd, .y);

  assign in_data.re = in_re;
  assign in_data.im = in_im;
  assign in_ready   = (state == S_LOAD);

  // Memory: one input word per clock while loading, four results per clock
  // in stages 1 and 2, two in stage 3.
  always_ff @(posedge clk) begin
    unique case (state)
      S_LOAD: if (in_valid) mem[cnt] <= ((cnt == '0) ? in_inverse : inv) ? swap_ri(in_data) : in_data;
      S_P1, S_P2: for (int i = 0; i < 4; i++) mem[ad[i]] <= y[i];
      S_P3: begin
        mem[ad[0]] <= y[0];
        mem[ad[2]] <= y[1];
      end
      default: ;
    endcase
  end

  // Natural-order read address: k = K1 + 4*K2 + 16*K3 is at 8*K1 + 2*K2 + K3.
  always_ff @(posedge clk) rd_word <= mem[{cnt[1:0], cnt[3:2], cnt[4]}];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_LOAD; cnt <= '0; inv <= 1'b0;
      out_valid <= 1'b0; out_index <= '0; out_last <= 1'b0; out_inverse <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      unique case (state)
        S_LOAD: if (in_valid) begin
          if (cnt == '0) inv <= in_inverse;
          cnt <= cnt + 1'b1;
          if (cnt == 5'd31) state <= S_P1;
        end
        S_P1: begin
          cnt <= (cnt == 5'd7) ? '0 : cnt + 1'b1;
          if (cnt == 5'd7) state <= S_P2;
        end
        S_P2: begin
          cnt <= (cnt == 5'd7) ? '0 : cnt + 1'b1;
          if (cnt == 5'd7) state <= S_P3;
        end
        S_P3: begin
          cnt <= (cnt == 5'd15) ? '0 : cnt + 1'b1;
          if (cnt == 5'd15) state <= S_OUT;
        end
        S_OUT: begin
          out_valid   <= 1'b1;
          out_index   <= cnt;
          out_last    <= (cnt == 5'd31);
          out_inverse <= inv;
          cnt         <= cnt + 1'b1;
          if (cnt == 5'd31) state <= S_LOAD;
        end
        default: state <= S_LOAD;
      endcase
    end
  end

  always_comb begin
    unique case (state)
      S_P1:    stage = 2'd1;
      S_P2:    stage = 2'd2;
      S_P3:    stage = 2'd3;
      default: stage = 2'd0;
    endcase
  end

  assign out_re = out_inverse ? rd_word.im : rd_word.re;
  assign out_im = out_inverse ? rd_word.re : rd_word.im;

endmodule
