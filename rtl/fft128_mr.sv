// fft128_mr: 128-point FFT/IFFT processor using the mixed radix (2, 8, 8)
// decimation-in-frequency algorithm, built as a single-path delay-feedback
// pipeline that takes one complex 16-bit sample per clock.
//
//   input_ctrl -> radix-2 stage (delay 64) -> x W128^(k1*n2)
//              -> radix-8 unit (delays 32, 16, 8) -> x W64^(m2*k21)
//              -> radix-8 unit (delays 4, 2, 1) -> bitrev_buffer
//
// With n = 64n1 + n2 and k = k1 + 2k2 the radix-2 stage splits the 128-point
// DFT into two 64-point DFTs, each computed as 8 x 8 with the radix-8 units.
// The pipeline leaves X(k) at position bitrev7(k); the output buffer puts the
// results in natural order. Every radix-2 step scales by 1/2, so the output
// is X(k)/128 for an FFT and (1/128) sum X(k) W^-nk for an IFFT (selected per
// frame with in_inverse, done by swapping real and imaginary parts at input
// and output).
// Timing: in continuous streaming a frame's first natural-order result comes
// out 269 clocks after its first input sample (127 clocks to take the
// frame in, 140 pipeline steps, one clock to write and one to read the
// reorder memory); one frame per 128 clocks. Because a delay-feedback
// pipeline is pushed by the samples behind, a frame's last results leave
// only as the next frame enters, or during a flush frame.
// The algorithm, radices, 16-bit data and rounding follow the document; the
// single-path pipeline, the handshake, the scaling and the IFFT method are
// this design's choices.
module fft128_mr
  import fft_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  output logic            in_ready,
  input  logic            in_inverse,
  input  logic signed [DW-1:0] in_re,
  input  logic signed [DW-1:0] in_im,
  output logic            out_valid,
  output logic signed [DW-1:0] out_re,
  output logic signed [DW-1:0] out_im,
  output logic [LOGN-1:0] out_index,
  output logic            out_last,
  output logic            out_inverse,
  output logic            flushing
);

  logic            en;
  smp_t            s0, s1, t1, s2, t2, s3;
  logic [LOGN-1:0] p0, p1, q1, p2, q2, p3;
  cplx_t           in_data, out_data;

  assign in_data.re = in_re;
  assign in_data.im = in_im;

  input_ctrl u_ctrl (
    .clk, .rst_n, .in_valid, .in_ready, .in_inverse, .in_data,
    .pipe_out_vld(s3.vld), .en, .smp(s0), .pos(p0), .flushing);

  r2_sdf_stage #(.D(64)) u_stage1 (
    .clk, .rst_n, .en, .in(s0), .in_pos(p0), .out(s1), .out_pos(p1));

  twiddle_stage #(.STAGE(1)) u_tw1 (
    .clk, .rst_n, .en, .in(s1), .in_pos(p1), .out(t1), .out_pos(q1));

  r8_sdf_unit #(.D(8)) u_stage2 (
    .clk, .rst_n, .en, .in(t1), .in_pos(q1), .out(s2), .out_pos(p2));

  twiddle_stage #(.STAGE(2)) u_tw2 (
    .clk, .rst_n, .en, .in(s2), .in_pos(p2), .out(t2), .out_pos(q2));

  r8_sdf_unit #(.D(1)) u_stage3 (
    .clk, .rst_n, .en, .in(t2), .in_pos(q2), .out(s3), .out_pos(p3));

  bitrev_buffer u_reorder (
    .clk, .rst_n, .in_en(en), .in(s3), .in_pos(p3),
    .out_valid, .out_data, .out_index, .out_last, .out_inverse);

  assign out_re = out_data.re;
  assign out_im = out_data.im;

endmodule
