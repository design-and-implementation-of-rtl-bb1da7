// Shared types and constants of the 8x8 2-D FFT core.
//
// Every sample is a complex number whose real and imaginary parts are 24-bit
// two's-complement values in Q12 (12 fractional bits), as the design uses
// throughout. Twiddle factors are Q12 constants W8^k = cos(2*pi*k/8) -
// j*sin(2*pi*k/8), each scaled by 4096 and rounded to the nearest integer
// (4096/sqrt(2) = 2896.3 -> 2896). The table is small enough to write out.
package fft_pkg;

  localparam int unsigned DW   = 24;  // bits per real or imaginary part
  localparam int unsigned FRAC = 12;  // fractional bits (Q12)
  localparam int unsigned NPT  = 8;   // points per 1-D transform

  typedef struct packed {
    logic signed [DW-1:0] re;
    logic signed [DW-1:0] im;
  } cplx_t;

  localparam logic signed [DW-1:0] C45 = 24'sd2896;  // round(4096*cos(pi/4))
  localparam logic signed [DW-1:0] ONE = 24'sd4096;  // 1.0 in Q12

  // W8^k for k = 0..3, the only twiddles an 8-point radix-2 FFT needs.
  function automatic cplx_t twiddle8(input int unsigned k);
    cplx_t w;
    case (k)
      0:       begin w.re = ONE;  w.im = '0;   end
      1:       begin w.re = C45;  w.im = -C45; end
      2:       begin w.re = '0;   w.im = -ONE; end
      default: begin w.re = -C45; w.im = -C45; end
    endcase
    return w;
  endfunction

endpackage
