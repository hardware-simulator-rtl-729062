// Self-checking testbench for fft_sdf, 256 points. A forward (scaled) and an
// inverse (unscaled) pipeline each receive four back-to-back random frames,
// with one gap in the stream. Every output is compared with a direct DFT
// computed in floating point by the testbench (bin bitrev(k) at output k);
// the allowed error covers the 14-bit twiddle rounding. Also checks the
// pipeline latency of the first output.
module tb_fft_sdf;
  localparam int N = 256;
  localparam int D = 32;
  localparam int NF = 4;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic signed [D-1:0] in_re = '0, in_im = '0;
  logic fv, iv;
  logic signed [D-1:0] f_re, f_im, i_re, i_im;
  logic [7:0] f_idx, i_idx;

  fft_sdf #(.N(N), .D(D), .INVERSE(1'b0), .SCALE(1'b1)) u_fwd (
    .clk, .rst_n, .in_valid, .in_re, .in_im,
    .out_valid(fv), .out_re(f_re), .out_im(f_im), .out_idx(f_idx));
  fft_sdf #(.N(N), .D(D), .INVERSE(1'b1), .SCALE(1'b0)) u_inv (
    .clk, .rst_n, .in_valid, .in_re, .in_im,
    .out_valid(iv), .out_re(i_re), .out_im(i_im), .out_idx(i_idx));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  real xr [NF+1][N], xi [NF+1][N];
  int fcount = 0, icount = 0;
  int first_in_clk = -1, first_out_clk = -1, clk_n = 0;

  initial begin
    #(10 * (N * (NF + 3) + 1000));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int bitrev(int k);
    int r = 0;
    for (int b = 0; b < 8; b++) if (k & (1 << b)) r |= 1 << (7 - b);
    return r;
  endfunction

  task automatic compare(int f, int k, bit inv, longint gr, longint gi);
    real er, ei, ang, tol;
    int bin;
    bin = bitrev(k);
    er = 0.0; ei = 0.0;
    for (int n = 0; n < N; n++) begin
      ang = (inv ? 2.0 : -2.0) * 3.14159265358979 * real'(bin * n) / real'(N);
      er += xr[f][n] * $cos(ang) - xi[f][n] * $sin(ang);
      ei += xr[f][n] * $sin(ang) + xi[f][n] * $cos(ang);
    end
    if (!inv) begin er = er / N; ei = ei / N; tol = 4.0; end
    else tol = 0.002 * 1000.0 * N;   // relative to the input full scale
    checks++;
    if ((real'(gr) - er) > tol || (er - real'(gr)) > tol ||
        (real'(gi) - ei) > tol || (ei - real'(gi)) > tol) begin
      failures++;
      if (failures < 10) $display("%s frame %0d out %0d: got (%0d,%0d) exp (%f,%f)",
                                  inv ? "inv" : "fwd", f, k, gr, gi, er, ei);
    end
  endtask

  always @(posedge clk) clk_n <= clk_n + 1;

  always @(negedge clk) if (rst_n) begin
    if (fv) begin
      if (first_out_clk < 0) first_out_clk = clk_n;
      if (fcount / N < NF) compare(fcount / N, fcount % N, 1'b0, f_re, f_im);
      checks++;
      if (int'(f_idx) != fcount % N) failures++;
      fcount++;
    end
    if (iv) begin
      if (icount / N < NF) compare(icount / N, icount % N, 1'b1, i_re, i_im);
      icount++;
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f <= NF; f++)
      for (int n = 0; n < N; n++) begin
        // frame 0 is an impulse, the others random within +-2^13 x 16
        if (f == 0) begin xr[f][n] = (n == 3) ? 100000.0 : 0.0; xi[f][n] = 0.0; end
        else begin
          xr[f][n] = real'($signed($urandom_range(0, 262143)) - 131072);
          xi[f][n] = (f == 2) ? 0.0 : real'($signed($urandom_range(0, 262143)) - 131072);
        end
      end
    for (int f = 0; f <= NF; f++)
      for (int n = 0; n < N; n++) begin
        if (f == 2 && n == 100) begin
          in_valid = 0;
          repeat (7) @(negedge clk);
        end
        in_valid = 1;
        in_re = D'($rtoi(xr[f][n]));
        in_im = D'($rtoi(xi[f][n]));
        if (first_in_clk < 0) first_in_clk = clk_n;
        @(negedge clk);
      end
    in_valid = 0;
    repeat (20) @(negedge clk);
    checks++;
    if (fcount < NF * N || icount < NF * N) begin
      failures++;
      $display("outputs: fwd %0d inv %0d", fcount, icount);
    end
    // first output: N-1 inputs later plus one register per stage
    checks++;
    if (first_out_clk - first_in_clk != N - 1 + 8) begin
      failures++;
      $display("latency %0d clocks, expected %0d", first_out_clk - first_in_clk, N - 1 + 8);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
