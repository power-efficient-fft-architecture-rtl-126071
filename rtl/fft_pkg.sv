// fft_pkg: widths, the complex sample type and small helpers shared by the
// 16-point two-stream FFT. Inputs are IW-bit two's-complement I/Q samples; all
// internal arithmetic and the outputs use DW = IW + 6 bits so that the 16x
// growth of a 16-point transform (plus a rotation) can never overflow. The
// widths are this design's choice: the source gives none.
package fft_pkg;
  parameter int IW = 16;          // input sample width per component
  parameter int DW = IW + 6;      // internal / output width per component

  typedef struct packed {
    logic signed [IW-1:0] re;
    logic signed [IW-1:0] im;
  } cin_t;

  typedef struct packed {
    logic signed [DW-1:0] re;
    logic signed [DW-1:0] im;
  } cplx_t;

  // Reverse the low 'bits' bits of v.
  function automatic int unsigned bitrev(input int unsigned v, input int bits);
    int unsigned r;
    r = 0;
    for (int i = 0; i < bits; i++) r = (r << 1) | ((v >> i) & 1);
    return r;
  endfunction

  function automatic cplx_t c_add(input cplx_t a, input cplx_t b);
    cplx_t r;
    r.re = a.re + b.re;
    r.im = a.im + b.im;
    return r;
  endfunction

  function automatic cplx_t c_sub(input cplx_t a, input cplx_t b);
    cplx_t r;
    r.re = a.re - b.re;
    r.im = a.im - b.im;
    return r;
  endfunction

  // Multiply by -j: (a + jb)(-j) = b - ja.
  function automatic cplx_t c_mul_mj(input cplx_t a);
    cplx_t r;
    r.re = a.im;
    r.im = -a.re;
    return r;
  endfunction
endpackage
