// Streaming 256-point FFT / IFFT: a radix-2 single-path delay-feedback
// pipeline of log2(N) fft_sdf_stage instances with delays N/2 ... 1.
//
// Accepts one complex sample per clock in natural order, frames of N samples
// back to back (gaps in in_valid are allowed), and delivers each transformed
// frame in bit-reversed order: the k-th output of a frame is bin bitrev(k).
// out_idx counts the outputs within a frame.
// Forward (INVERSE = 0, SCALE = 1): X[k]/N, each stage halving, so no
// overflow. Inverse (INVERSE = 1, SCALE = 0): the unnormalised sum
// sum_k X[k] exp(+i 2 pi k n / N).
//
// Timing: the first output of a frame leaves N-1 valid inputs plus log2(N)
// clocks after the frame's first sample; with a continuous stream the
// transform runs at one sample per clock. A frame's last outputs only leave
// once the next frame flows in.
//
// The transform size follows the design (256 = two 128-sample halves); the
// pipeline structure is this design's choice for the FFT/IFFT cores, whose
// insides the description does not give.
module fft_sdf #(
  parameter int unsigned N       = 256,
  parameter int unsigned D       = 32,
  parameter bit          INVERSE = 1'b0,
  parameter bit          SCALE   = 1'b1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [D-1:0]     in_re,
  input  logic signed [D-1:0]     in_im,
  output logic                    out_valid,
  output logic signed [D-1:0]     out_re,
  output logic signed [D-1:0]     out_im,
  output logic [$clog2(N)-1:0]    out_idx
);

  localparam int unsigned S = $clog2(N);

  logic                v  [S+1];
  logic signed [D-1:0] re [S+1];
  logic signed [D-1:0] im [S+1];

  assign v[0]  = in_valid;
  assign re[0] = in_re;
  assign im[0] = in_im;

  for (genvar s = 0; s < S; s++) begin : g_stage
    fft_sdf_stage #(
      .N(N), .L(N >> (s + 1)), .D(D), .INVERSE(INVERSE), .SCALE(SCALE)
    ) u_stage (
      .clk, .rst_n,
      .in_valid(v[s]), .in_re(re[s]), .in_im(im[s]),
      .out_valid(v[s+1]), .out_re(re[s+1]), .out_im(im[s+1])
    );
  end

  assign out_valid = v[S];
  assign out_re    = re[S];
  assign out_im    = im[S];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_idx <= '0;
    else if (v[S]) out_idx <= out_idx + 1'b1;
  end

endmodule
