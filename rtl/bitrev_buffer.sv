// bitrev_buffer: output reordering. The delay-feedback pipeline delivers
// X(k) of a frame at stream position bitrev7(k); this buffer writes each
// valid result at address bitrev7(position), which is k, into one bank of a
// 2 x 128 word memory, and reads a full bank in natural order k = 0..127 at
// one word per clock while the other bank fills (ping-pong). For an IFFT
// frame the real and imaginary parts are swapped back on the way out.
// Write side: one sample per step (in_en); a bank is complete when position
// 127 has been written. Read side: out_valid for 128 consecutive clocks per
// frame, out_index = k, out_last on k = 127; reading starts the clock after
// the bank is complete (one clock of latency). There is no backpressure on
// the output. Bit reversal of the output order follows the document; the
// ping-pong memory is this design's choice.
module bitrev_buffer
  import fft_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_en,
  input  smp_t            in,
  input  logic [LOGN-1:0] in_pos,
  output logic            out_valid,
  output cplx_t           out_data,
  output logic [LOGN-1:0] out_index,
  output logic            out_last,
  output logic            out_inverse
);

  cplx_t           mem [2*N];
  logic            wb, rb;
  logic [1:0]      full, bank_inv;
  logic [LOGN-1:0] rd_addr;
  logic            we, bank_done, rd_done;
  cplx_t           rd_word;

  assign we        = in_en && in.vld;
  assign bank_done = we && (in_pos == LOGN'(N - 1));
  assign rd_done   = full[rb] && (rd_addr == LOGN'(N - 1));

  always_ff @(posedge clk) begin
    if (we) mem[{wb, bitrev7(in_pos)}] <= in.d;
    rd_word <= mem[{rb, rd_addr}];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wb <= 1'b0; rb <= 1'b0; full <= '0; bank_inv <= '0; rd_addr <= '0;
      out_valid <= 1'b0; out_index <= '0; out_last <= 1'b0; out_inverse <= 1'b0;
    end else begin
      if (bank_done) begin
        full[wb]     <= 1'b1;
        bank_inv[wb] <= in.inv;
        wb           <= ~wb;
      end
      out_valid <= full[rb];
      if (full[rb]) begin
        out_index   <= rd_addr;
        out_last    <= rd_done;
        out_inverse <= bank_inv[rb];
        rd_addr     <= rd_addr + 1'b1;
        if (rd_done) begin
          full[rb] <= 1'b0;
          rb       <= ~rb;
        end
      end
    end
  end

  assign out_data = out_inverse ? swap_ri(rd_word) : rd_word;

endmodule
