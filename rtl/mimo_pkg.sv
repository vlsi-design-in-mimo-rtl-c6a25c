// Shared types and constants of the 4x4 MIMO-OFDM baseband.
// Complex samples are carried as a packed pair of signed 16-bit
// fixed-point numbers (Q1.15 style, full scale = +/-1.0). The OFDM
// numbers (64-point FFT, 16-sample cyclic prefix, four antennas,
// 80 MHz clock and 20 MHz IF) follow the IEEE 802.11a based design;
// the word widths are this implementation's choice.
package mimo_pkg;
  localparam int W      = 16;   // real/imag word width
  localparam int N_ANT  = 4;    // receive/transmit antennas
  localparam int NFFT   = 64;   // FFT points
  localparam int NCP    = 16;   // cyclic prefix length
  localparam int ADC_W  = 12;   // ADC word width

  typedef struct packed {
    logic signed [W-1:0] re;
    logic signed [W-1:0] im;
  } cplx_t;

  typedef enum logic [1:0] {
    MOD_BPSK  = 2'd0,
    MOD_QPSK  = 2'd1,
    MOD_QAM16 = 2'd2,
    MOD_QAM64 = 2'd3
  } mod_t;

  // saturate a wider signed value to W bits
  function automatic logic signed [W-1:0] sat16(input logic signed [39:0] v);
    if (v > 40'sd32767)       return 16'sh7fff;
    else if (v < -40'sd32768) return 16'sh8000;
    else                      return v[W-1:0];
  endfunction

  // complex product, Q15 x Q15 -> Q15 with saturation
  function automatic cplx_t cmul(input cplx_t a, input cplx_t b);
    logic signed [32:0] pr, pi;
    cplx_t r;
    pr = 33'(a.re * b.re) - 33'(a.im * b.im);
    pi = 33'(a.re * b.im) + 33'(a.im * b.re);
    r.re = sat16(40'(pr >>> 15));
    r.im = sat16(40'(pi >>> 15));
    return r;
  endfunction
endpackage
