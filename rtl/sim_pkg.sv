// Shared constants of the MIMO channel simulator digital block.
//
// Sample rate, converter widths, the EVA tap delays and the profile refresh
// rate follow the LTE EVA set-up the design targets: fs = 50 MHz, 14-bit
// converters, nine taps at 0..126 sample delays and a 0.3 kHz profile refresh.
// The coefficient width (16 bits) is the widest of the range the design is
// meant to be used with (8 to 16 bits); the host word layout below is this
// design's own choice.
package sim_pkg;

  // Converter and sample format
  localparam int unsigned X_W   = 14;  // ADC sample width, two's complement
  localparam int unsigned DAC_W = 14;  // DAC sample width
  localparam int unsigned H_W   = 16;  // time-domain tap coefficient width

  // EVA profile: nine paths, delays in samples of Ts = 20 ns
  localparam int unsigned N_TAPS    = 9;
  localparam int unsigned MAX_DELAY = 126;
  typedef int unsigned delay_arr_t [N_TAPS];
  localparam delay_arr_t EVA_DELAYS = '{0, 2, 8, 16, 19, 36, 55, 87, 126};

  // Profile refresh: f_ref = 0.3 kHz at fs = 50 MHz -> 166 667 sample clocks
  localparam int unsigned REFRESH_CYCLES = 166667;

  // Frequency-domain architecture: blocks of N new samples, FFT of 2N
  localparam int unsigned FD_N     = 128;
  localparam int unsigned FD_NFFT  = 256;
  localparam int unsigned FD_H_W   = 16;  // width of Re and Im of H
  localparam int unsigned FD_OUT_W = 17;  // width before DAC truncation
  localparam int unsigned FD_H_FRAC = 12; // H in Q4.12 (|H| < 8)
  localparam int unsigned FD_GUARD  = 12; // fractional guard bits on x
  localparam int unsigned FD_D      = 40; // FFT/IFFT datapath width

  // Truncation mode of the output stage
  typedef enum logic {TRUNC_BRUTAL = 1'b0, TRUNC_SLIDING = 1'b1} trunc_mode_e;

endpackage
