// twiddle_rom: twiddle factor table W128^k = exp(-j*2*pi*k/128), k = 0..127.
// The table is built at elaboration time from cos/sin and held as a constant
// array, so no data file is needed: re = round(32767*cos(2*pi*k/128)),
// im = round(-32767*sin(2*pi*k/128)), Q1.15 with +1.0 stored as 32767.
// Combinational lookup, no latency. The twiddle definition is the document's;
// the Q1.15 coding and the 32767 scale are this design's choice.
module twiddle_rom
  import fft_pkg::*;
#(
  parameter int N_PTS = fft_pkg::N
) (
  input  logic [$clog2(N_PTS)-1:0] k,
  output cplx_t                    w
);

  localparam real PI = 3.14159265358979323846;

  typedef logic [N_PTS-1:0][2*DW-1:0] table_t;

  function automatic table_t make_table();
    table_t t;
    logic signed [DW-1:0] c, s;
    for (int i = 0; i < N_PTS; i++) begin
      c = DW'($rtoi($floor(32767.0 * $cos(2.0 * PI * i / N_PTS) + 0.5)));
      s = DW'($rtoi($floor(-32767.0 * $sin(2.0 * PI * i / N_PTS) + 0.5)));
      t[i] = {c, s};
    end
    return t;
  endfunction

  localparam table_t TABLE = make_table();

  assign w = TABLE[k];

endmodule
