// w8_rotator: multiplies a sample by W8^e = exp(-j*pi*e/4), e = 0..3, the
// internal twiddle factors of a radix-8 butterfly split into three radix-2
// steps.
//   e=0: x            e=2: -j*x = (xi, -xr)
//   e=1: (xr+xi, xi-xr)/sqrt2     e=3: (xi-xr, -(xr+xi))/sqrt2
// 1/sqrt2 is the constant 23170/32768; the product is rounded with a half-LSB
// add and saturated to 16 bits. One register, so the latency is one step; the
// position of the sample passes through unchanged. That the radix-8 butterfly
// is three radix-2 steps with such rotations between them follows the
// document's figure of the 128-point flow graph; the constant and the
// rounding are this design's choice.
module w8_rotator
  import fft_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            en,
  input  logic [1:0]      e,
  input  smp_t            in,
  input  logic [LOGN-1:0] in_pos,
  output smp_t            out,
  output logic [LOGN-1:0] out_pos
);

  localparam logic signed [PW+1:0] C = 34'sd23170;   // round(2^15 / sqrt 2)

  smp_t r;

  always_comb begin
    logic signed [PW+1:0] xr, xi, s, d;
    xr = (PW+2)'(in.d.re);
    xi = (PW+2)'(in.d.im);
    s  = (xr + xi) * C;
    d  = (xi - xr) * C;
    r  = in;
    unique case (e)
      2'd0: r.d = in.d;
      2'd1: begin
        r.d.re = round_sat(s, 15);
        r.d.im = round_sat(d, 15);
      end
      2'd2: begin
        r.d.re = in.d.im;
        r.d.im = round_sat(-xr, 0);
      end
      default: begin
        r.d.re = round_sat(d, 15);
        r.d.im = round_sat(-s, 15);
      end
    endcase
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
