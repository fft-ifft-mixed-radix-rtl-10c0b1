// input_ctrl: frame control at the entrance of the delay-feedback pipeline.
//
// The pipeline has no valid/ready of its own: it moves one position per step
// (a clock with en = 1) and every stage derives its butterfly phase from the
// stream position, so a frame must enter as 128 consecutive positions.
//   - A frame starts with the sample accepted at position 0. The FFT/IFFT mode
//     (in_inverse) is sampled there and held for the rest of the frame; an
//     IFFT frame has its real and imaginary parts swapped on entry.
//   - Stall: if in_valid drops inside a frame the pipeline simply does not
//     step until the next sample arrives.
//   - Flush: results of the last frame sit in the delay lines until later
//     positions push them out. When no input is waiting at a frame boundary
//     but valid samples are still inside (counted in 'pending'), the
//     controller runs one whole frame of empty positions (vld = 0) at one per
//     clock; in_ready is low during that frame.
// The document does not describe input control; all of this is this design's
// own choice. Interface: in_valid/in_ready handshake, one sample per clock.
module input_ctrl
  import fft_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  output logic            in_ready,
  input  logic            in_inverse,
  input  cplx_t           in_data,
  input  logic            pipe_out_vld,  // the pipeline's last stage holds a valid sample
  output logic            en,            // pipeline step
  output smp_t            smp,           // sample entering the pipeline
  output logic [LOGN-1:0] pos,           // its position in the frame
  output logic            flushing       // the current step is part of a flush frame
);

  logic [LOGN-1:0] cnt;
  logic            dummy, inv_frame, accept, start_dummy, cur_inv;
  logic [8:0]      pending;

  assign in_ready    = !dummy;
  assign accept      = in_valid && in_ready;
  assign start_dummy = !dummy && (cnt == '0) && !in_valid && (pending != '0);
  assign flushing    = dummy || start_dummy;
  assign en          = accept || flushing;
  assign pos         = cnt;
  assign cur_inv     = (cnt == '0) ? in_inverse : inv_frame;

  always_comb begin
    smp.vld = accept;
    smp.inv = accept && cur_inv;
    smp.d   = '0;
    if (accept) smp.d = cur_inv ? swap_ri(in_data) : in_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt       <= '0;
      dummy     <= 1'b0;
      inv_frame <= 1'b0;
      pending   <= '0;
    end else begin
      if (en) cnt <= cnt + 1'b1;
      if (start_dummy) dummy <= 1'b1;
      else if (dummy && cnt == LOGN'(N - 1)) dummy <= 1'b0;
      if (accept && cnt == '0) inv_frame <= in_inverse;
      pending <= pending + 9'(accept) - 9'(en && pipe_out_vld);
    end
  end

endmodule
