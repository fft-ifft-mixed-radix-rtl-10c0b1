// mixed_radix_fft: the two mixed radix FFT/IFFT processors side by side,
// each with its own ports (prefix f128_ and f32_); they share only the clock
// and reset.
//   f128_*: fft128_mr, the 128-point radix (2, 8, 8) delay-feedback pipeline,
//           one complex sample per clock, results X(k)/128 in natural order.
//   f32_*:  fft32_mem, the 32-point radix (4, 4, 2) processor with one
//           reusable radix-4 core and a 32-word memory, one frame per 96
//           clocks, results X(k)/512 in natural order.
// See those modules for the timing of each interface. Both designs follow
// the document; putting them under one top is only a convenience.
module mixed_radix_fft
  import fft_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  // 128-point pipeline
  input  logic                 f128_in_valid,
  output logic                 f128_in_ready,
  input  logic                 f128_in_inverse,
  input  logic signed [DW-1:0] f128_in_re,
  input  logic signed [DW-1:0] f128_in_im,
  output logic                 f128_out_valid,
  output logic signed [DW-1:0] f128_out_re,
  output logic signed [DW-1:0] f128_out_im,
  output logic [LOGN-1:0]      f128_out_index,
  output logic                 f128_out_last,
  output logic                 f128_out_inverse,
  output logic                 f128_flushing,
  // 32-point memory-based processor
  input  logic                 f32_in_valid,
  output logic                 f32_in_ready,
  input  logic                 f32_in_inverse,
  input  logic signed [DW-1:0] f32_in_re,
  input  logic signed [DW-1:0] f32_in_im,
  output logic                 f32_out_valid,
  output logic signed [DW-1:0] f32_out_re,
  output logic signed [DW-1:0] f32_out_im,
  output logic [4:0]           f32_out_index,
  output logic                 f32_out_last,
  output logic                 f32_out_inverse,
  output logic [1:0]           f32_stage
);

  fft128_mr u_fft128 (
    .clk, .rst_n,
    .in_valid(f128_in_valid), .in_ready(f128_in_ready), .in_inverse(f128_in_inverse),
    .in_re(f128_in_re), .in_im(f128_in_im),
    .out_valid(f128_out_valid), .out_re(f128_out_re), .out_im(f128_out_im),
    .out_index(f128_out_index), .out_last(f128_out_last), .out_inverse(f128_out_inverse),
    .flushing(f128_flushing));

  fft32_mem u_fft32 (
    .clk, .rst_n,
    .in_valid(f32_in_valid), .in_ready(f32_in_ready), .in_inverse(f32_in_inverse),
    .in_re(f32_in_re), .in_im(f32_in_im),
    .out_valid(f32_out_valid), .out_re(f32_out_re), .out_im(f32_out_im),
    .out_index(f32_out_index), .out_last(f32_out_last), .out_inverse(f32_out_inverse),
    .stage(f32_stage));

endmodule
