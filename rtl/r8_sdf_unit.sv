// r8_sdf_unit: radix-8 decimation-in-frequency butterfly over groups of eight
// samples spaced D apart, built as three radix-2 delay-feedback steps
// (delays 4D, 2D, D) with W8 rotations between them:
//   8-point DFT, m = 4a + 2b + c, k = d + 2e + 4f
//   step 1: butterfly over a (delay 4D), then multiply by W8^(d*(2b+c))
//   step 2: butterfly over b (delay 2D), then multiply by W8^(2*c*e)
//   step 3: butterfly over c (delay D)
// The rotations' exponents are read from the stream position of each sample.
// Afterwards the three position bits that held (a, b, c) hold (d, e, f), so
// the output index k appears bit-reversed. Each radix-2 step scales by 1/2,
// the unit by 1/8. Latency: 7D + 3 + 2 steps. Splitting the radix-8 butterfly
// into three steps follows the document's figure; D = 8 builds the second
// stage of the 128-point transform and D = 1 the third.
module r8_sdf_unit
  import fft_pkg::*;
#(
  parameter int D = 8
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            en,
  input  smp_t            in,
  input  logic [LOGN-1:0] in_pos,
  output smp_t            out,
  output logic [LOGN-1:0] out_pos
);

  localparam int BA = $clog2(4 * D);   // position bit of a, later d
  localparam int BB = $clog2(2 * D);   // position bit of b, later e
  localparam int BC = $clog2(D);       // position bit of c

  smp_t            s1, r1, s2, r2;
  logic [LOGN-1:0] p1, q1, p2, q2;
  logic [1:0]      e1, e2;

  r2_sdf_stage #(.D(4 * D)) u_step1 (
    .clk, .rst_n, .en, .in(in), .in_pos(in_pos), .out(s1), .out_pos(p1));

  assign e1 = p1[BA] ? {p1[BB], p1[BC]} : 2'd0;

  w8_rotator u_rot1 (
    .clk, .rst_n, .en, .e(e1), .in(s1), .in_pos(p1), .out(r1), .out_pos(q1));

  r2_sdf_stage #(.D(2 * D)) u_step2 (
    .clk, .rst_n, .en, .in(r1), .in_pos(q1), .out(s2), .out_pos(p2));

  assign e2 = (p2[BB] & p2[BC]) ? 2'd2 : 2'd0;

  w8_rotator u_rot2 (
    .clk, .rst_n, .en, .e(e2), .in(s2), .in_pos(p2), .out(r2), .out_pos(q2));

  r2_sdf_stage #(.D(D)) u_step3 (
    .clk, .rst_n, .en, .in(r2), .in_pos(q2), .out(out), .out_pos(out_pos));

endmodule
