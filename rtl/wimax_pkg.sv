// wimax_pkg: types and constants shared by the 2x2 MIMO-OFDM mobile WiMAX
// transmitter. A complex baseband sample is two signed 16-bit words (I and Q).
// The OFDM numerology is the 20 MHz, 2048-point PUSC downlink one: 1440 data
// carriers per symbol, 120 clusters of 12 data + 2 pilot carriers, DC at
// carrier 1024 and 184/183 guard carriers. The guard split, the 256-sample
// cyclic prefix and the frame timing derived from them are this design's
// reading of the standard; the document gives 2048, 1440, 46 and the DC position.
package wimax_pkg;

  typedef struct packed {
    logic signed [15:0] re;
    logic signed [15:0] im;
  } cplx_t;

  // A pair of values for the two OFDM symbols 2l and 2l+1 of one carrier.
  typedef struct packed {
    cplx_t even;
    cplx_t odd;
  } cpair_t;

  localparam int unsigned N_FFT        = 2048;
  localparam int unsigned N_DATA       = 1440;  // data carriers per symbol
  localparam int unsigned CLUSTER_LEN  = 14;    // 12 data + 2 pilots
  localparam int unsigned LEFT_GUARD   = 184;
  localparam int unsigned DC_POS       = 1024;
  localparam int unsigned LAST_USED    = 1864;  // 184 + 1680 (DC included)
  localparam int unsigned CP_LEN       = 256;
  localparam int unsigned SYM_LEN      = N_FFT + CP_LEN;  // 2304 samples
  localparam int unsigned N_SYM_FRAME  = 46;    // data symbols per frame

  // Saturating negation of a 16-bit word (-32768 maps to +32767).
  function automatic logic signed [15:0] neg16(input logic signed [15:0] x);
    return (x == -16'sd32768) ? 16'sd32767 : -x;
  endfunction

  function automatic cplx_t cneg(input cplx_t a);
    cplx_t r;
    r.re = neg16(a.re);
    r.im = neg16(a.im);
    return r;
  endfunction

  function automatic cplx_t cconj(input cplx_t a);
    cplx_t r;
    r.re = a.re;
    r.im = neg16(a.im);
    return r;
  endfunction

  // Reverse the low 11 bits of an index.
  function automatic logic [10:0] bitrev11(input logic [10:0] x);
    logic [10:0] r;
    for (int i = 0; i < 11; i++) r[i] = x[10-i];
    return r;
  endfunction

endpackage
