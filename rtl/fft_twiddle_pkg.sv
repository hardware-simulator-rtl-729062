// Twiddle factors for the 256-point FFT/IFFT pipelines.
//
// TW_COS[m] and TW_SIN[m] hold cos and sin of 2*pi*m/256, m = 0..127, as
// signed 16-bit values with 14 fractional bits (1.0 = 16384), rounded to
// nearest. The table is computed at elaboration from the formula, so no data
// file is needed.
package fft_twiddle_pkg;

  localparam int unsigned TW_N    = 256;
  localparam int unsigned TW_W    = 16;
  localparam int unsigned TW_FRAC = 14;

  typedef logic signed [TW_W-1:0] tw_tab_t [TW_N/2];

  function automatic tw_tab_t make_tab(bit sine);
    tw_tab_t t;
    for (int m = 0; m < int'(TW_N / 2); m++) begin
      real a, v;
      a = 2.0 * 3.14159265358979323846 * real'(m) / real'(TW_N);
      v = (sine ? $sin(a) : $cos(a)) * real'(1 << TW_FRAC);
      t[m] = TW_W'($rtoi(v >= 0.0 ? v + 0.5 : v - 0.5));
    end
    return t;
  endfunction

  localparam tw_tab_t TW_COS = make_tab(1'b0);
  localparam tw_tab_t TW_SIN = make_tab(1'b1);

endpackage
