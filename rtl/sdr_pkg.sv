// sdr_pkg: constants and helper functions shared by the SDR cores.
// Holds the FIR structure encoding (the LATENCY generic of the FIR core), the
// default compensation-filter taps of the FM receiver, and constant functions
// that build sine/cosine tables at elaboration time, so no table file is needed.
package sdr_pkg;

  // FIR structure selection; the numeric codes are the ones of the FIR
  // core's LATENCY generic.
  typedef enum logic [1:0] {
    FIR_TRANSPOSE = 2'd0,  // transposed direct form, all coefficients
    FIR_ODD_SYM   = 2'd1,  // odd (anti-)symmetric, h[k] = -h[T-1-k]
    FIR_EVEN_SYM  = 2'd2,  // even symmetric,       h[k] =  h[T-1-k]
    FIR_MOVING_AVG= 2'd3   // moving average, no coefficients
  } fir_struct_e;

  localparam int CFIR_TAPS = 21;
  // 21-tap CIC compensator for R=128, N=10, M=1 at 960 kSPS, 90 kHz cutoff.
  // Taps are the Kaiser-windowed (beta 5) frequency-sampling design of
  // |sin(pi f/R) R / sin(pi f)|^10 over 0..90 kHz and 0 above, normalised to
  // unit DC gain and rounded to Q1.15.
  localparam int CFIR_COEFFS [CFIR_TAPS] = '{
    7, -61, -246, -489, -575, -191, 900,
    2654, 4663, 6276, 6894, 6276, 4663,
    2654, 900, -191, -575, -489, -246,
    -61, 7};

  // Wishbone register map of the DSP IP cores (word addresses)
  typedef enum logic [2:0] {
    WB_SLAVE_SEL = 3'd0,  // read/write, routed to the core wrapper
    WB_STATUS    = 3'd1,  // read only, see wb_status_t
    WB_CONTROL   = 3'd2,  // read/write, see wb_ctrl_t
    WB_COEFF     = 3'd3,  // write pushes a coefficient into its RX FIFO
    WB_INPUT     = 3'd4,  // write pushes an input sample into its RX FIFO
    WB_OUTPUT    = 3'd5,  // read pops an output sample from the TX FIFO
    WB_FTW       = 3'd6   // read/write NCO frequency tuning word (DDC)
  } wb_reg_e;

  typedef struct packed {
    logic [28:0] rsvd;
    logic        mode;    // core specific, e.g. inverse FFT
    logic        srst;    // soft reset of the DSP core
    logic        en;      // let samples flow from the RX FIFO into the core
  } wb_ctrl_t;

  typedef struct packed {
    logic [7:0]  rsvd;
    logic [15:0] tx_count;
    logic [1:0]  rsvd2;
    logic        core_rdy;
    logic        coef_full;
    logic        tx_full;
    logic        tx_empty;
    logic        rx_full;
    logic        rx_empty;
  } wb_status_t;

  localparam real PI = 3.14159265358979323846;

  // round(A * cos(2*pi*i/L)) with A = 2^(W-1)-1
  function automatic int cos_q(input int i, input int L, input int W);
    real a;
    a = (2.0 ** (W - 1)) - 1.0;
    return $rtoi($floor(a * $cos(2.0 * PI * i / L) + 0.5));
  endfunction

  // round(A * sin(2*pi*i/L)) with A = 2^(W-1)-1
  function automatic int sin_q(input int i, input int L, input int W);
    real a;
    a = (2.0 ** (W - 1)) - 1.0;
    return $rtoi($floor(a * $sin(2.0 * PI * i / L) + 0.5));
  endfunction

endpackage
