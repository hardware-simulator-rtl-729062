// Self-checking testbench for fd_siso, the overlap-add frequency-domain
// channel, at its default size (blocks of 128, 256-point transforms).
// The testbench builds two nine-path impulse responses on the EVA delays,
// computes their 256-point frequency responses by direct DFT, loads them
// through the host port (257 words each) and streams 20 blocks of input
// (Gaussian pulses, then random samples) at one sample every other clock.
// Each output sample is compared with the direct convolution
// y[n] = sum_k h(k) x[n - d_k], using the first response for the blocks
// before the profile switch and the second after it; the switch must fall
// on one block boundary shortly after the swap request. Also checks the
// first-sample latency and that the output keeps the input's sample rate.
module tb_fd_siso;
  import sim_pkg::*;

  localparam int NS  = 128 * 20;
  localparam int NB  = 128;
  localparam int NFFT = 256;
  localparam int YB  = FD_OUT_W + 1;
  localparam int LAT = 1300;   // clocks from input sample i to output sample i

  logic clk = 0, rst_n = 0;
  logic x_valid = 0;
  logic signed [X_W-1:0] x_in = '0;
  logic wr_en = 0;
  logic [8:0] wr_addr = '0;
  logic [31:0] wr_data = '0;
  logic swap_req = 0;
  logic y_valid, commit_o, swapped_o, overrun_o, sat_o;
  logic signed [YB-1:0] y_out;

  fd_siso dut (.clk, .rst_n, .x_valid, .x_in, .wr_en, .wr_addr, .wr_data,
               .swap_req, .y_valid, .y_out, .commit_o, .swapped_o,
               .overrun_o, .sat_o);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  real h [2][9];
  longint xs [NS];
  longint ys [NS];
  int ny = 0, clk_n = 0, t_in0 = -1, t_out0 = -1;
  int n_swapped = 0;

  initial begin
    #(10 * (2 * NS + 6000));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    clk_n <= clk_n + 1;
    if (rst_n && y_valid) begin
      if (ny < NS) ys[ny] = y_out;
      if (ny == 0) t_out0 = clk_n;
      ny++;
    end
    if (swapped_o) n_swapped++;
  end

  task automatic load_profile(int p);
    for (int b = 0; b <= NFFT; b++) begin
      real hr, hi, a;
      int qr, qi;
      hr = 0.0; hi = 0.0;
      for (int k = 0; k < 9; k++) begin
        a = -2.0 * 3.14159265358979 * real'(b * int'(EVA_DELAYS[k])) / real'(NFFT);
        hr += h[p][k] * $cos(a);
        hi += h[p][k] * $sin(a);
      end
      qr = $rtoi(hr * 4096.0 + (hr >= 0 ? 0.5 : -0.5));
      qi = $rtoi(hi * 4096.0 + (hi >= 0 ? 0.5 : -0.5));
      @(negedge clk);
      wr_en = 1;
      wr_addr = 9'(b);
      wr_data = {16'(qr), 16'(qi)};
    end
    @(negedge clk);
    wr_en = 0;
  endtask

  function automatic real model(int n, int sw_blk);
    real acc = 0.0;
    for (int k = 0; k < 9; k++) begin
      int m = n - int'(EVA_DELAYS[k]);
      if (m >= 0) acc += h[(m / NB >= sw_blk) ? 1 : 0][k] * real'(xs[m]);
    end
    return acc;
  endfunction

  real rp [9] = '{-3.85, -2.22, -3.26, -7.89, -4.04, -8.50, -7.28, -8.56, -12.30};

  initial begin
    int req_blk, best_blk, best_err;
    for (int p = 0; p < 2; p++)
      for (int k = 0; k < 9; k++) begin
        h[p][k] = $pow(10.0, rp[k] / 20.0) * (p == 0 ? 1.0 : 0.7);
        if ($urandom_range(0, 1)) h[p][k] = -h[p][k];
      end
    for (int n = 0; n < NS; n++) begin
      if (n < NS / 2) begin
        real mx, sg;
        int i;
        mx = 3.0 * 126.0 / 16.0; sg = mx / 12.0; i = n % 384;
        xs[n] = longint'(4096.0 * $exp(-((i - mx) ** 2) / (2.0 * sg * sg)));
      end else xs[n] = longint'($urandom_range(0, 16383)) - 8192;
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    load_profile(0);
    swap_req = 1; @(negedge clk); swap_req = 0;
    if (!commit_o) ; // commit cleared by the request
    req_blk = -1;
    for (int n = 0; n < NS; n++) begin
      x_valid = 1;
      x_in = X_W'(xs[n]);
      if (n == 0) t_in0 = clk_n;
      @(negedge clk);
      x_valid = 0;
      // second profile written during block 8, requested at its end
      if (n == 8 * NB) begin
        fork load_profile(1); join_none
      end
      if (n == 9 * NB + 10) begin
        swap_req = 1;
        req_blk = n / NB;
      end
      @(negedge clk);
      swap_req = 0;
    end
    // keep the stream running with zeros to flush the pipeline
    for (int n = 0; n < 8 * NB; n++) begin
      x_valid = 1; x_in = '0;
      @(negedge clk);
      x_valid = 0;
      @(negedge clk);
    end
    // find the switch block
    best_blk = -1; best_err = NS + 1;
    for (int b = req_blk - 1; b <= req_blk + 3; b++) begin
      int e = 0;
      for (int n = 0; n < NS; n++) begin
        real d;
        d = real'(ys[n]) - model(n, b);
        if (d > 3.0 || d < -3.0) e++;
      end
      if (e < best_err) begin best_err = e; best_blk = b; end
    end
    $display("profile switch at block %0d (requested in block %0d), mismatches %0d",
             best_blk, req_blk, best_err);
    for (int n = 0; n < NS; n++) begin
      real d;
      d = real'(ys[n]) - model(n, best_blk);
      checks++;
      if (d > 3.0 || d < -3.0) begin
        failures++;
        if (failures < 10) $display("y[%0d]=%0d exp %f", n, ys[n], model(n, best_blk));
      end
    end
    checks++;
    if (ny < NS || n_swapped != 2 || best_blk > req_blk + 1) begin
      failures++;
      $display("outputs %0d swaps %0d", ny, n_swapped);
    end
    checks++;
    $display("latency %0d clocks", t_out0 - t_in0);
    if (t_out0 - t_in0 != LAT) begin
      failures++;
      $display("latency %0d clocks, expected %0d", t_out0 - t_in0, LAT);
    end
    checks++;
    if (overrun_o) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
