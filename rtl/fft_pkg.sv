// fft_pkg: types and constants shared by the 128-point mixed radix FFT/IFFT
// processor. Samples are complex fixed-point numbers, 16-bit two's complement
// real and imaginary parts in Q1.15. A sample travels through the pipeline
// with two flags: whether it belongs to a real frame (vld) and whether that
// frame is an inverse transform (inv). The 16-bit data width and N = 128 are
// the document's; the flag bundle is a choice of this design.
package fft_pkg;

  localparam int N      = 128;  // transform length
  localparam int LOGN   = 7;
  localparam int DW     = 16;   // data and twiddle width (Q1.15)
  localparam int PW     = 32;   // width of a full-precision product

  typedef logic signed [DW-1:0] sdata_t;
  typedef logic signed [PW-1:0] sprod_t;

  typedef struct packed {
    sdata_t re;
    sdata_t im;
  } cplx_t;

  typedef struct packed {
    sprod_t re;
    sprod_t im;
  } cprod_t;

  // A sample as it moves through the pipeline.
  typedef struct packed {
    logic  vld;   // belongs to a frame that was really fed in
    logic  inv;   // the frame is an inverse transform
    cplx_t d;
  } smp_t;

  // Reverse the bit order of a 7-bit index: the pipeline delivers X(k) at
  // stream position bitrev7(k).
  function automatic logic [LOGN-1:0] bitrev7(input logic [LOGN-1:0] a);
    logic [LOGN-1:0] r;
    for (int i = 0; i < LOGN; i++) r[i] = a[LOGN-1-i];
    return r;
  endfunction

  // Round a value that carries F extra fraction bits back to 16 bits: add
  // one half LSB, truncate, then saturate to the 16-bit range.
  function automatic sdata_t round_sat(input logic signed [PW+1:0] v, input int F);
    logic signed [PW+1:0] t;
    t = (v + (F > 0 ? (34'sd1 <<< (F-1)) : 34'sd0)) >>> F;
    if (t > 34'sd32767)       return 16'sh7fff;
    else if (t < -34'sd32768) return 16'sh8000;
    else                      return t[DW-1:0];
  endfunction

  // Swap real and imaginary parts: FFT(swap(x)) = swap(N * IFFT(x)).
  function automatic cplx_t swap_ri(input cplx_t a);
    cplx_t r;
    r.re = a.im;
    r.im = a.re;
    return r;
  endfunction

endpackage
