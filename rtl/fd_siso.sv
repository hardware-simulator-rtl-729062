// Frequency-domain SISO channel working in streaming mode (overlap-add).
//
// The input stream is cut into blocks of N = 128 samples; each block is
// padded with N zeros, transformed by a 256-point FFT, multiplied bin by bin
// with the channel's frequency response H (256 complex coefficients, the DFT
// of the impulse response padded to 256), transformed back by a 256-point
// IFFT, and overlap-added: the second half of every result is added to the
// first half of the next. This gives the exact linear convolution of an
// unbounded stream with an impulse response of up to 129 taps (delays up to
// 128 samples; the EVA profile needs 126), which a plain FFT-multiply-IFFT
// of one frame cannot do.
//
// Data path: fd_block_in -> fft_sdf (forward, scaled by 1/256) -> product
// with H read from freq_coef_ram at bin bitrev(k) -> bitrev_buf ->
// fft_sdf (inverse, unscaled) -> fd_overlap_add. The input gets FD_GUARD
// fractional bits, H is Q4.12, the datapath is FD_D bits wide; the output is
// the real part with the guard bits removed, clamped to Y_BITS bits.
//
// Interface: x_valid/x_in at the sample rate, which must be at most half the
// clock rate (each block occupies the FFT for 2N clocks); y_valid/y_out, one
// output per x_valid once the pipeline is full; host writes of H as in
// freq_coef_ram; swap_req arms a profile swap applied at the next FFT frame.
// Timing: with x_valid every other clock, output sample i leaves 1300 clocks
// (650 sample periods) after input sample i: one block to collect, then each
// of the two pipelines holds a frame until the next one pushes it out
// (2 x 2N clocks), plus the reorder buffer (2N) and a few register stages.
//
// Block size, zero tail, FFT size and the 32-bit {Re, Im} coefficient words
// follow the design description; the pipeline FFT, the fixed-point formats
// and the clock of twice the sample rate are this design's choices.
module fd_siso
  import sim_pkg::*;
#(
  parameter int unsigned NB     = FD_N,
  parameter int unsigned D      = FD_D,
  parameter int unsigned Y_BITS = FD_OUT_W + 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     x_valid,
  input  logic signed [X_W-1:0]    x_in,
  input  logic                     wr_en,
  input  logic [$clog2(2*NB):0]    wr_addr,
  input  logic [2*FD_H_W-1:0]      wr_data,
  input  logic                     swap_req,
  output logic                     y_valid,
  output logic signed [Y_BITS-1:0] y_out,
  output logic                     commit_o,
  output logic                     swapped_o,
  output logic                     overrun_o,
  output logic                     sat_o
);

  localparam int unsigned NF = 2 * NB;
  localparam int unsigned AW = $clog2(NF);

  function automatic logic [AW-1:0] bitrev(logic [AW-1:0] k);
    for (int b = 0; b < int'(AW); b++) bitrev[b] = k[AW-1-b];
  endfunction

  // block former
  logic                bi_v;
  logic signed [D-1:0] bi_re;
  fd_block_in #(.NB(NB), .XB(X_W), .D(D), .GUARD(FD_GUARD)) u_in (
    .clk, .rst_n, .x_valid, .x_in, .out_valid(bi_v), .out_re(bi_re), .overrun_o);

  // forward FFT
  logic                f_v;
  logic signed [D-1:0] f_re, f_im;
  logic [AW-1:0]       f_idx;
  fft_sdf #(.N(NF), .D(D), .INVERSE(1'b0), .SCALE(1'b1)) u_fft (
    .clk, .rst_n, .in_valid(bi_v), .in_re(bi_re), .in_im('0),
    .out_valid(f_v), .out_re(f_re), .out_im(f_im), .out_idx(f_idx));

  // channel frequency response
  logic signed [FD_H_W-1:0] h_re, h_im;
  freq_coef_ram #(.NBIN(NF), .HB(FD_H_W)) u_h (
    .clk, .rst_n, .wr_en, .wr_addr, .wr_data, .swap_req,
    .frame_start(f_v && f_idx == '0), .rd_en(f_v), .rd_addr(bitrev(f_idx)),
    .rd_re(h_re), .rd_im(h_im), .commit_o, .swapped_o, .bank_o());

  // X aligned with the registered H read, then the complex product
  logic                x_v, p_v;
  logic [AW-1:0]       x_idx, p_idx;
  logic signed [D-1:0] x_re, x_im, p_re, p_im;
  logic signed [D+FD_H_W:0] m_re, m_im;
  assign m_re = (D+FD_H_W+1)'(x_re) * h_re - (D+FD_H_W+1)'(x_im) * h_im;
  assign m_im = (D+FD_H_W+1)'(x_re) * h_im + (D+FD_H_W+1)'(x_im) * h_re;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_v <= 1'b0; p_v <= 1'b0; x_idx <= '0; p_idx <= '0;
      x_re <= '0; x_im <= '0; p_re <= '0; p_im <= '0;
    end else begin
      x_v   <= f_v;
      x_idx <= f_idx;
      x_re  <= f_re;
      x_im  <= f_im;
      p_v   <= x_v;
      p_idx <= x_idx;
      p_re  <= D'(m_re >>> FD_H_FRAC);
      p_im  <= D'(m_im >>> FD_H_FRAC);
    end
  end

  // natural order for the inverse transform
  logic                b_v;
  logic signed [D-1:0] b_re, b_im;
  bitrev_buf #(.N(NF), .D(D)) u_reorder (
    .clk, .rst_n, .in_valid(p_v), .in_idx(p_idx), .in_re(p_re), .in_im(p_im),
    .out_valid(b_v), .out_re(b_re), .out_im(b_im));

  // inverse FFT
  logic                i_v;
  logic signed [D-1:0] i_re, i_im;
  logic [AW-1:0]       i_idx;
  fft_sdf #(.N(NF), .D(D), .INVERSE(1'b1), .SCALE(1'b0)) u_ifft (
    .clk, .rst_n, .in_valid(b_v), .in_re(b_re), .in_im(b_im),
    .out_valid(i_v), .out_re(i_re), .out_im(i_im), .out_idx(i_idx));

  // overlap-add at the sample rate
  fd_overlap_add #(.NB(NB), .D(D), .GUARD(FD_GUARD), .Y_BITS(Y_BITS)) u_ola (
    .clk, .rst_n, .in_valid(i_v), .in_idx(i_idx), .in_re(i_re),
    .out_en(x_valid), .y_valid, .y_out, .sat_o);

endmodule
