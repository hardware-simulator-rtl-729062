// One radix-2 decimation-in-frequency stage of a single-path delay-feedback
// (SDF) FFT pipeline.
//
// The stage works on windows of 2*L consecutive samples. During the first L
// samples of a window the inputs are parked in an L-deep feedback delay
// line while the delay line's previous contents (the differences of the last
// window) leave through the twiddle multiplier. During the second L samples
// each input b meets the parked a: a+b leaves at once and a-b goes back into
// the delay line. The output stream therefore holds, per window, the L sums
// followed (one window later) by the L differences times W_2L^j,
// W = exp(-+ i*2*pi/2L). With SCALE set, sums and differences are halved so
// a forward transform cannot overflow; INVERSE selects the conjugate
// twiddles of the inverse transform.
//
// Interface: one complex sample per clock when in_valid is high; gaps are
// allowed. out_valid rises once L samples have entered. Timing: the output
// is registered; a sample leaves L valid inputs plus one clock after it came.
module fft_sdf_stage
  import fft_twiddle_pkg::*;
#(
  parameter int unsigned N       = 256,
  parameter int unsigned L       = 128,
  parameter int unsigned D       = 32,
  parameter bit          INVERSE = 1'b0,
  parameter bit          SCALE   = 1'b1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [D-1:0] in_re,
  input  logic signed [D-1:0] in_im,
  output logic                out_valid,
  output logic signed [D-1:0] out_re,
  output logic signed [D-1:0] out_im
);

  localparam int unsigned CW     = $clog2(2 * L);
  localparam int unsigned STRIDE = N / (2 * L);

  logic signed [D-1:0] dl_re [L];
  logic signed [D-1:0] dl_im [L];
  logic [CW-1:0]       cnt;
  logic                primed;
  logic                second_half;

  assign second_half = (L == 1) ? cnt[0] : cnt[CW-1];

  // butterfly
  logic signed [D:0]   s_re, s_im, d_re, d_im;
  logic signed [D-1:0] a_re, a_im;
  assign a_re = dl_re[L-1];
  assign a_im = dl_im[L-1];
  assign s_re = a_re + in_re;
  assign s_im = a_im + in_im;
  assign d_re = a_re - in_re;
  assign d_im = a_im - in_im;

  logic signed [D-1:0] sum_re, sum_im, dif_re, dif_im;
  assign sum_re = SCALE ? D'(s_re >>> 1) : D'(s_re);
  assign sum_im = SCALE ? D'(s_im >>> 1) : D'(s_im);
  assign dif_re = SCALE ? D'(d_re >>> 1) : D'(d_re);
  assign dif_im = SCALE ? D'(d_im >>> 1) : D'(d_im);

  // twiddle W^j for the parked difference leaving at position j of a window
  logic [CW-1:0]              j;
  logic [6:0]                 m;
  logic signed [TW_W-1:0]     w_c, w_s;
  logic signed [D+TW_W-1:0]   p_re, p_im;
  assign j   = cnt;
  assign m   = (L == 1) ? '0 : 7'(int'(j) * int'(STRIDE));
  assign w_c = TW_COS[m];
  // forward: W = cos - i sin ; inverse: W = cos + i sin
  assign w_s = INVERSE ? TW_SIN[m] : -TW_SIN[m];
  assign p_re = (D+TW_W)'(a_re) * w_c - (D+TW_W)'(a_im) * w_s;
  assign p_im = (D+TW_W)'(a_re) * w_s + (D+TW_W)'(a_im) * w_c;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(L); i++) begin
        dl_re[i] <= '0;
        dl_im[i] <= '0;
      end
      cnt       <= '0;
      primed    <= 1'b0;
      out_valid <= 1'b0;
      out_re    <= '0;
      out_im    <= '0;
    end else begin
      out_valid <= in_valid && (primed || second_half);
      if (in_valid) begin
        cnt <= (int'(cnt) == int'(2 * L - 1)) ? '0 : cnt + 1'b1;
        for (int i = 1; i < int'(L); i++) begin
          dl_re[i] <= dl_re[i-1];
          dl_im[i] <= dl_im[i-1];
        end
        if (!second_half) begin
          dl_re[0] <= in_re;
          dl_im[0] <= in_im;
          out_re   <= D'(p_re >>> TW_FRAC);
          out_im   <= D'(p_im >>> TW_FRAC);
        end else begin
          primed   <= 1'b1;
          dl_re[0] <= dif_re;
          dl_im[0] <= dif_im;
          out_re   <= sum_re;
          out_im   <= sum_im;
        end
      end
    end
  end

endmodule
