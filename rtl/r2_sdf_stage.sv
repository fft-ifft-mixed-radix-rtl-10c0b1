// r2_sdf_stage: radix-2 decimation-in-frequency butterfly with a single-path
// delay-feedback (SDF) memory of D words.
//
// The stage sees the frame as pairs (x[p], x[p+D]) where bit log2(D) of the
// stream position p is 0 for the first element. While that bit is 0 the input
// is written into the delay line and the line's oldest word (a difference
// kept from the previous pair block) is sent on. While the bit is 1 the
// butterfly works: the sum fifo+x goes out at once and the difference fifo-x
// goes into the delay line, to leave D steps later. Both are scaled by 1/2
// with a half-LSB rounding, so the stage never overflows.
//
// Interface: one sample per step, a step being a clock edge with en = 1. The
// position of the incoming sample comes with it on in_pos; the registered
// output carries its own position out_pos = in_pos - D. Latency: D + 1 steps.
// The flags of each sample (vld, inv) travel with it through the delay line.
// The butterfly and its rounding rule follow the document; the delay-feedback
// organisation and the per-step 1/2 scaling are this design's reading of it.
module r2_sdf_stage
  import fft_pkg::*;
#(
  parameter int D = 64
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            en,
  input  smp_t            in,
  input  logic [LOGN-1:0] in_pos,
  output smp_t            out,
  output logic [LOGN-1:0] out_pos
);

  localparam int SB = $clog2(D);           // position bit that picks the half
  localparam int AW = (D > 1) ? SB : 1;    // delay line address width

  cplx_t       dl_d  [D];                  // delay line, data
  logic [1:0]  dl_f  [D];                  // delay line, flags {vld, inv}
  logic [AW-1:0] ptr;

  smp_t fifo_out, fifo_in, bf_out;
  logic phase;

  assign phase = in_pos[SB];

  always_comb begin
    logic signed [DW:0] sr, si, dr, di;
    fifo_out.vld = dl_f[ptr][1];
    fifo_out.inv = dl_f[ptr][0];
    fifo_out.d   = dl_d[ptr];
    sr = (DW+1)'(fifo_out.d.re) + (DW+1)'(in.d.re);
    si = (DW+1)'(fifo_out.d.im) + (DW+1)'(in.d.im);
    dr = (DW+1)'(fifo_out.d.re) - (DW+1)'(in.d.re);
    di = (DW+1)'(fifo_out.d.im) - (DW+1)'(in.d.im);
    if (phase) begin
      bf_out.vld  = in.vld;
      bf_out.inv  = in.inv;
      bf_out.d.re = round_sat((PW+2)'(sr), 1);
      bf_out.d.im = round_sat((PW+2)'(si), 1);
      fifo_in.vld  = in.vld;
      fifo_in.inv  = in.inv;
      fifo_in.d.re = round_sat((PW+2)'(dr), 1);
      fifo_in.d.im = round_sat((PW+2)'(di), 1);
    end else begin
      bf_out  = fifo_out;
      fifo_in = in;
    end
  end

  // Delay line as a circular buffer. Only the flags are reset: data words are
  // never used unless their vld flag says so.
  always_ff @(posedge clk) begin
    if (en) dl_d[ptr] <= fifo_in.d;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < D; i++) dl_f[i] <= 2'b00;
      ptr     <= '0;
      out     <= '0;
      out_pos <= '0;
    end else if (en) begin
      dl_f[ptr] <= {fifo_in.vld, fifo_in.inv};
      ptr       <= (D > 1) ? ptr + 1'b1 : '0;   // D is a power of two
      out       <= bf_out;
      out_pos   <= in_pos - LOGN'(D);
    end
  end

endmodule
