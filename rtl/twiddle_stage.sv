// twiddle_stage: inter-stage twiddle multiplication of the 128-point mixed
// radix (2, 8, 8) decimation-in-frequency FFT.
//   STAGE = 1 (after the radix-2 stage): position q = 64*k1 + n2 is
//     multiplied by W128^(k1*n2).
//   STAGE = 2 (after the first radix-8 stage): q = 8*r(k21) + m2, where the
//     radix-8 unit leaves k21 bit-reversed in q[5:3]; the factor is
//     W64^(m2*k21) = W128^(2*m2*k21).
// The exponent addresses the twiddle table, the sample goes through a
// full-precision complex multiplier, and the 32-bit result is rounded back to
// 16 bits with a half-LSB add (and saturated). Registered output, latency one
// step; the position passes through unchanged. The index mapping
// n = 64n1 + n2, k = k1 + 2k2 and the rounding rule are the document's.
module twiddle_stage
  import fft_pkg::*;
#(
  parameter int STAGE = 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            en,
  input  smp_t            in,
  input  logic [LOGN-1:0] in_pos,
  output smp_t            out,
  output logic [LOGN-1:0] out_pos
);

  logic [LOGN-1:0] k;
  cplx_t  w;
  cprod_t p;
  smp_t   r;

  always_comb begin
    logic [2:0] k21, m2;
    k21 = {in_pos[3], in_pos[4], in_pos[5]};
    m2  = in_pos[2:0];
    if (STAGE == 1) k = in_pos[6] ? {1'b0, in_pos[5:0]} : '0;
    else            k = LOGN'({1'b0, m2} * {1'b0, k21} * 2);
  end

  twiddle_rom u_rom (.k(k), .w(w));
  cmult       u_mul (.a(in.d), .w(w), .p(p));

  always_comb begin
    r      = in;
    r.d.re = round_sat((PW+2)'(p.re), 15);
    r.d.im = round_sat((PW+2)'(p.im), 15);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out     <= '0;
      out_pos <= '0;
    end else if (en) begin
      out     <= r;
      out_pos <= in_pos;
    end
  end

endmodule
