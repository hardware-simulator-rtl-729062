// Self-checking testbench for fd_mimo, the 2x2 frequency-domain block, at
// its default size. Four nine-path responses on the EVA delays (gains from
// the EVA 2x2 relative powers, random signs) are turned into 256-bin
// frequency responses by direct DFT and loaded through the host port
// ((256+1) x 4 words). Transmit input 1 carries Gaussian pulses, input 2
// random samples, one sample every other clock. Checks:
//  * y_full[r] against the direct convolution sum_t sum_k h_(t,r)(k) x_t(n-d_k)
//    within 4 LSB, before and after a profile switch that must land on the
//    block whose frame passes the multiplier next after the refresh tick;
//  * a refresh tick with an uncommitted channel is held;
//  * each DAC sample is the previous y_full through the current window.
module tb_fd_mimo;
  import sim_pkg::*;

  localparam int NB = 128, NFFT = 256, NBLK = 20, NS = NB * NBLK;

  logic clk = 0, rst_n = 0;
  logic x_valid = 0;
  logic signed [X_W-1:0] x_in [2];
  logic wr_en = 0;
  logic [10:0] wr_addr = '0;
  logic [31:0] wr_data = '0;
  logic refresh_tick = 0;
  trunc_mode_e mode = TRUNC_SLIDING;
  logic y_valid, dac_valid, swap_o, held_o, overrun_o, ch_sat_o;
  logic signed [FD_OUT_W-1:0] y_full [2];
  logic signed [DAC_W-1:0] y_dac [2];
  logic [4:0] shift_o [2];
  logic [1:0] sat_o;

  fd_mimo dut (.clk, .rst_n, .x_valid, .x_in, .wr_en, .wr_addr, .wr_data,
               .refresh_tick, .mode, .y_valid, .y_full, .dac_valid, .y_dac,
               .shift_o, .sat_o, .swap_o, .held_o, .overrun_o, .ch_sat_o);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  real h [2][4][9];
  longint xs [2][NS];
  longint ys [2][NS];
  int ny = 0, n_swap = 0, n_held = 0;
  logic signed [FD_OUT_W-1:0] y_prev [2];
  logic [4:0] shift_last [2] = '{5'd3, 5'd3};

  real rp [9][4] = '{
    '{-3.85, -3.92, -3.68, -3.90}, '{-2.22, -2.87, -2.27, -3.04},
    '{-3.26, -2.55, -2.73, -2.05}, '{-7.89, -8.46, -7.15, -7.57},
    '{-4.04, -4.46, -3.57, -4.43}, '{-8.50, -8.84, -8.24, -8.77},
    '{-7.28, -6.35, -6.84, -5.70}, '{-8.56, -9.02, -9.01, -9.50},
    '{-12.30, -12.50, -12.68, -12.21}};

  initial begin
    #(10 * (2 * NS + 20000));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (y_valid) begin
      if (ny < NS) begin ys[0][ny] = y_full[0]; ys[1][ny] = y_full[1]; end
      ny++;
      y_prev = y_full;
    end
    if (dac_valid) begin
      for (int r = 0; r < 2; r++) begin
        longint s;
        s = longint'(y_prev[r]) >>> shift_last[r];
        if (s > 8191) s = 8191;
        if (s < -8192) s = -8192;
        checks++;
        if (y_dac[r] !== DAC_W'(s)) begin
          failures++;
          if (failures < 10) $display("dac[%0d]=%0d exp %0d", r, y_dac[r], s);
        end
      end
    end
    if (swap_o) n_swap++;
    if (held_o) n_held++;
    shift_last = shift_o;   // window in force for the next DAC sample
  end

  task automatic load_set(int p, bit skip_last_commit);
    for (int c = 0; c < 4; c++)
      for (int b = 0; b <= NFFT; b++) begin
        real hr, hi, a;
        hr = 0.0; hi = 0.0;
        for (int k = 0; k < 9; k++) begin
          a = -2.0 * 3.14159265358979 * real'(b * int'(EVA_DELAYS[k])) / real'(NFFT);
          hr += h[p][c][k] * $cos(a);
          hi += h[p][c][k] * $sin(a);
        end
        @(negedge clk);
        wr_en = !(skip_last_commit && c == 3 && b == NFFT);
        wr_addr = {2'(c), 9'(b)};
        wr_data = {16'($rtoi(hr * 4096.0 + (hr >= 0 ? 0.5 : -0.5))),
                   16'($rtoi(hi * 4096.0 + (hi >= 0 ? 0.5 : -0.5)))};
      end
    @(negedge clk);
    wr_en = 0;
  endtask

  function automatic real model(int r, int n, int sw_blk);
    real acc = 0.0;
    for (int t = 0; t < 2; t++)
      for (int k = 0; k < 9; k++) begin
        int m = n - int'(EVA_DELAYS[k]);
        if (m >= 0) acc += h[(m / NB >= sw_blk) ? 1 : 0][t*2 + r][k] * real'(xs[t][m]);
      end
    return acc;
  endfunction

  initial begin
    int req_blk, best_blk, best_err;
    for (int p = 0; p < 2; p++)
      for (int c = 0; c < 4; c++)
        for (int k = 0; k < 9; k++) begin
          h[p][c][k] = $pow(10.0, rp[k][c] / 20.0) * (p == 0 ? 0.5 : 0.35);
          if ($urandom_range(0, 1)) h[p][c][k] = -h[p][c][k];
        end
    for (int n = 0; n < NS; n++) begin
      real mx, sg;
      int i;
      mx = 3.0 * 126.0 / 16.0; sg = mx / 12.0; i = n % 384;
      xs[0][n] = longint'(4096.0 * $exp(-((i - mx) ** 2) / (2.0 * sg * sg)));
      xs[1][n] = longint'($urandom_range(0, 16383)) - 8192;
    end
    x_in[0] = '0; x_in[1] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    load_set(0, 1'b0);
    refresh_tick = 1; @(negedge clk); refresh_tick = 0;
    req_blk = -1;
    for (int n = 0; n < NS + 8 * NB; n++) begin
      x_valid = 1;
      x_in[0] = (n < NS) ? X_W'(xs[0][n]) : '0;
      x_in[1] = (n < NS) ? X_W'(xs[1][n]) : '0;
      @(negedge clk);
      x_valid = 0;
      if (n == 5 * NB) fork load_set(1, 1'b0); join_none
      if (n == 9 * NB + 10) begin refresh_tick = 1; req_blk = n / NB; end
      if (n == 11 * NB) fork load_set(1, 1'b1); join_none
      if (n == 16 * NB) refresh_tick = 1;   // one commit missing: held
      @(negedge clk);
      refresh_tick = 0;
    end
    best_blk = -1; best_err = NS + 1;
    for (int b = req_blk - 1; b <= req_blk + 3; b++) begin
      int e = 0;
      for (int n = 0; n < NS; n++)
        for (int r = 0; r < 2; r++) begin
          real d;
          d = real'(ys[r][n]) - model(r, n, b);
          if (d > 4.0 || d < -4.0) e++;
        end
      if (e < best_err) begin best_err = e; best_blk = b; end
    end
    $display("profile switch at block %0d (requested in block %0d)", best_blk, req_blk);
    for (int n = 0; n < NS; n++)
      for (int r = 0; r < 2; r++) begin
        real d;
        d = real'(ys[r][n]) - model(r, n, best_blk);
        checks++;
        if (d > 4.0 || d < -4.0) begin
          failures++;
          if (failures < 10) $display("y%0d[%0d]=%0d exp %f", r, n, ys[r][n], model(r, n, best_blk));
        end
      end
    checks++;
    if (ny < NS || n_swap != 2 || n_held != 1 || best_blk > req_blk + 1 || overrun_o) begin
      failures++;
      $display("outputs %0d swaps %0d held %0d", ny, n_swap, n_held);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
