// End-to-end testbench of hw_sim_top with every parameter at its default:
// refresh every 166 667 clocks of clk_td (50 MHz) and 333 334 clocks of
// clk_fd (100 MHz), i.e. 0.3 kHz. Both 2x2 channel implementations run side
// by side on streaming inputs for three refresh periods (about 10 ms of
// simulated time).
//  * Time domain: profile A is loaded during period 0, B during period 1, and
//    C without one commit word during period 2; the third tick must hold B.
//    Period 3 runs in brutal mode. y_full is checked exactly every clock
//    against sum_t sum_k h_(t,r)(k) x_t(n - d_k); every DAC sample against
//    the previous y_full through the current window.
//  * Frequency domain: A and B are loaded the same way (257 x 4 words each);
//    every output sample is checked within 6 LSB against the convolution,
//    with each profile switch placed on the block boundary that matches.
// Counted mechanisms, each of which must occur: profile swaps and a held
// profile (both), sliding-window moves, DAC clamps, a brutal frame, and
// overlap-add across many blocks.
module tb_hw_sim_top;
  import sim_pkg::*;

  localparam int TD_P = REFRESH_CYCLES;
  localparam int NTD  = 3 * TD_P + 3000;     // clk_td cycles simulated
  localparam int NB   = 128;
  localparam int NFS  = (NTD * 2) / 2;       // fd samples (one per 2 clk_fd)
  localparam int SB   = X_W + H_W + 5;

  logic rst_n = 0, refresh_en = 0;
  logic clk_td = 0, clk_fd = 0;
  logic signed [X_W-1:0] td_x [2], fd_x [2];
  logic td_wr_en = 0, fd_wr_en = 0, fd_x_valid = 0;
  logic [5:0] td_wr_addr = '0;
  logic [H_W-1:0] td_wr_data = '0;
  logic [10:0] fd_wr_addr = '0;
  logic [31:0] fd_wr_data = '0;
  trunc_mode_e td_mode = TRUNC_SLIDING, fd_mode = TRUNC_SLIDING;
  logic signed [SB-1:0] td_y_full [2];
  logic signed [DAC_W-1:0] td_y_dac [2], fd_y_dac [2];
  logic [5:0] td_shift [2];
  logic [4:0] fd_shift [2];
  logic [1:0] td_sat, fd_sat;
  logic td_tick, td_swap, td_held;
  logic fd_y_valid, fd_dac_valid, fd_tick, fd_swap, fd_held, fd_overrun, fd_ch_sat;
  logic signed [FD_OUT_W-1:0] fd_y_full [2];

  hw_sim_top dut (.*);

  always #10 clk_td = ~clk_td;
  always #5  clk_fd = ~clk_fd;

  int checks = 0, failures = 0;

  initial begin
    #(20 * (NTD + 2000));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real rp [9][4] = '{
    '{-3.85, -3.92, -3.68, -3.90}, '{-2.22, -2.87, -2.27, -3.04},
    '{-3.26, -2.55, -2.73, -2.05}, '{-7.89, -8.46, -7.15, -7.57},
    '{-4.04, -4.46, -3.57, -4.43}, '{-8.50, -8.84, -8.24, -8.77},
    '{-7.28, -6.35, -6.84, -5.70}, '{-8.56, -9.02, -9.01, -9.50},
    '{-12.30, -12.50, -12.68, -12.21}};

  // profiles: index 0 = all zero (after reset), 1 = A, 2 = B, 3 = C
  longint hq [4][4][9];     // time-domain 16-bit gains
  real    hf [3][4][9];     // frequency-domain gains (0 = zero, 1 = A, 2 = B)

  function automatic longint tdgain(int p, int c, int k);
    real g;
    g = $pow(10.0, rp[k][c] / 20.0) * 32767.0 * (1.0 - 0.2 * p);
    return ((p + c + k) % 2 == 1) ? -longint'(g) : longint'(g);
  endfunction

  // ================= time domain =================
  longint txs [2][$];
  longint tys [2][$];
  int td_prof = 0, td_edge = 0;
  int tds = 0, tdh = 0, td_wchg = 0, td_clamp = 0, td_brutal = 0;
  int td_prof_at [$];        // profile read at the product stage per edge
  logic [5:0] td_sh_last [2] = '{6'd21, 6'd21};

  always @(posedge clk_td) if (rst_n) begin
    for (int t = 0; t < 2; t++) txs[t].push_back(td_x[t]);
    td_prof_at.push_back(td_prof);
    td_edge++;
    if (td_swap) tds++;
    if (td_held) tdh++;
    if (td_sat != 0) td_clamp++;
    if (td_tick && td_mode == TRUNC_BRUTAL) td_brutal++;
    if (td_shift[0] != td_sh_last[0]) td_wchg++;
    td_sh_last = td_shift;
  end

  function automatic longint td_model(int r, int m);  // y_full after edge m (1-based)
    longint acc = 0;
    if (m - 2 < 1) return 0;
    for (int t = 0; t < 2; t++)
      for (int k = 0; k < 9; k++) begin
        int j = m - 3 - int'(EVA_DELAYS[k]);
        if (j >= 1) acc += hq[td_prof_at[m-3]][t*2 + r][k] * txs[t][j-1];
      end
    return acc;
  endfunction

  task automatic td_load(int p, bit skip_commit);
    for (int c = 0; c < 4; c++)
      for (int w = 0; w < 10; w++) begin
        @(negedge clk_td);
        td_wr_en = !(skip_commit && c == 1 && w == 9);
        td_wr_addr = {2'(c), 4'(w)};
        td_wr_data = (w < 9) ? H_W'(hq[p][c][w]) : '0;
      end
    @(negedge clk_td);
    td_wr_en = 0;
  endtask

  initial begin : td_side
    longint prev_full [2];
    for (int c = 0; c < 4; c++)
      for (int k = 0; k < 9; k++) begin
        hq[0][c][k] = 0;
        for (int p = 1; p < 4; p++) hq[p][c][k] = tdgain(p, c, k);
      end
    td_x[0] = '0; td_x[1] = '0;
    prev_full = '{0, 0};
    repeat (3) @(negedge clk_td);
    rst_n = 1;
    refresh_en = 1;
    fork
      begin
        td_load(1, 1'b0);
        wait (td_tick); @(negedge clk_td);
        td_load(2, 1'b0);
        wait (td_tick); @(negedge clk_td);
        td_load(3, 1'b1);
        @(posedge td_tick); @(negedge clk_td);
      end
    join_none
    for (int n = 0; n < NTD; n++) begin
      int per;
      per = n / TD_P;
      // quiet first half of period 1, loud otherwise
      if (per == 1 && (n % TD_P) < TD_P / 2) begin
        td_x[0] = X_W'($urandom_range(0, 63)) - 14'sd32;
        td_x[1] = X_W'($urandom_range(0, 63)) - 14'sd32;
      end else begin
        td_x[0] = X_W'($urandom);
        td_x[1] = X_W'($urandom);
      end
      td_mode = (per >= 2 && (n % TD_P) > TD_P - 100) || per >= 3 ? TRUNC_BRUTAL : TRUNC_SLIDING;
      @(negedge clk_td);
      // the profile that the product stage will use from the next edge on
      if (td_swap) td_prof = (td_prof == 0) ? 1 : 2;
      for (int r = 0; r < 2; r++) begin
        longint e, s;
        e = td_model(r, td_edge);
        checks++;
        if (td_y_full[r] !== SB'(e)) begin
          failures++;
          if (failures < 10) $display("td edge %0d y_full[%0d]=%0d exp %0d", td_edge, r, td_y_full[r], e);
        end
        if (td_edge > 5) begin
          s = prev_full[r] >>> td_shift_prev[r];
          if (s > 8191) s = 8191;
          if (s < -8192) s = -8192;
          checks++;
          if (td_y_dac[r] !== DAC_W'(s)) begin
            failures++;
            if (failures < 10) $display("td edge %0d dac[%0d]=%0d exp %0d", td_edge, r, td_y_dac[r], s);
          end
        end
        prev_full[r] = td_y_full[r];
      end
      td_shift_prev = td_shift;
    end
    td_done = 1;
  end

  logic [5:0] td_shift_prev [2] = '{6'd21, 6'd21};
  bit td_done = 0, fd_done = 0;

  // ================= frequency domain =================
  longint fxs [2][$];
  longint fys [2][$];
  int fd_blk_at_tick [$];
  int fds = 0, fdh = 0, fd_wchg = 0;
  logic [4:0] fd_sh_last [2] = '{5'd3, 5'd3};
  int fd_n = 0;

  always @(posedge clk_fd) if (rst_n) begin
    if (fd_y_valid) begin
      fys[0].push_back(fd_y_full[0]);
      fys[1].push_back(fd_y_full[1]);
    end
    if (fd_swap) fds++;
    if (fd_held) fdh++;
    if (fd_tick) fd_blk_at_tick.push_back(fd_n / NB);
    if (fd_shift[0] != fd_sh_last[0]) fd_wchg++;
    fd_sh_last = fd_shift;
  end

  task automatic fd_load(int p);
    for (int c = 0; c < 4; c++)
      for (int b = 0; b <= 256; b++) begin
        real hr, hi, a;
        hr = 0.0; hi = 0.0;
        for (int k = 0; k < 9; k++) begin
          a = -2.0 * 3.14159265358979 * real'(b * int'(EVA_DELAYS[k])) / 256.0;
          hr += hf[p][c][k] * $cos(a);
          hi += hf[p][c][k] * $sin(a);
        end
        @(negedge clk_fd);
        fd_wr_en = 1;
        fd_wr_addr = {2'(c), 9'(b)};
        fd_wr_data = {16'($rtoi(hr * 4096.0 + (hr >= 0 ? 0.5 : -0.5))),
                      16'($rtoi(hi * 4096.0 + (hi >= 0 ? 0.5 : -0.5)))};
      end
    @(negedge clk_fd);
    fd_wr_en = 0;
  endtask

  int sw [2];
  function automatic real fd_model(int r, int n);
    real acc = 0.0;
    for (int t = 0; t < 2; t++)
      for (int k = 0; k < 9; k++) begin
        int m, p;
        m = n - int'(EVA_DELAYS[k]);
        p = (m / NB >= sw[1]) ? 2 : (m / NB >= sw[0]) ? 1 : 0;
        if (m >= 0) acc += hf[p][t*2 + r][k] * real'(fxs[t][m]);
      end
    return acc;
  endfunction

  function automatic int fd_err(int b0, int b1);
    int e = 0;
    for (int n = b0 * NB; n < b1 * NB && n < fys[0].size(); n++)
      for (int r = 0; r < 2; r++) begin
        real d;
        d = real'(fys[r][n]) - fd_model(r, n);
        if (d > 6.0 || d < -6.0) e++;
      end
    return e;
  endfunction

  initial begin : fd_side
    for (int c = 0; c < 4; c++)
      for (int k = 0; k < 9; k++) begin
        hf[0][c][k] = 0.0;
        hf[1][c][k] = real'(tdgain(1, c, k)) / 32768.0 * 0.5;
        hf[2][c][k] = real'(tdgain(2, c, k)) / 32768.0 * 0.5;
      end
    fd_x[0] = '0; fd_x[1] = '0;
    wait (rst_n);
    fork
      begin
        fd_load(1);
        @(posedge fd_swap); @(negedge clk_fd);   // armed profile now running
        fd_load(2);
      end
    join_none
    for (int n = 0; n < NFS; n++) begin
      @(negedge clk_fd);
      fd_x_valid = 1;
      fxs[0].push_back(longint'($urandom_range(0, 16383)) - 8192);
      fxs[1].push_back(longint'($urandom_range(0, 4095)) - 2048);
      fd_x[0] = X_W'(fxs[0][n]);
      fd_x[1] = X_W'(fxs[1][n]);
      fd_n = n + 1;
      @(negedge clk_fd);
      fd_x_valid = 0;
    end
    fd_done = 1;
  end

  initial begin : finish
    int best, be, nout;
    wait (td_done && fd_done);
    // place the two frequency-domain profile switches
    for (int p = 0; p < 2; p++) sw[p] = 1 << 30;
    for (int p = 0; p < 2; p++) begin
      int q;
      q = fd_blk_at_tick[p];
      best = q; be = 1 << 30;
      for (int b = q - 1; b <= q + 2; b++) begin
        int e;
        sw[p] = b;
        e = fd_err(q - 3, q + 4);
        if (e < be) begin be = e; best = b; end
      end
      sw[p] = best;
      $display("fd profile switch %0d at block %0d (tick during block %0d)", p, best, q);
      checks++;
      if (best > q + 1) failures++;
    end
    nout = fys[0].size();
    for (int n = 0; n < nout; n++)
      for (int r = 0; r < 2; r++) begin
        real d;
        d = real'(fys[r][n]) - fd_model(r, n);
        checks++;
        if (d > 6.0 || d < -6.0) begin
          failures++;
          if (failures < 10) $display("fd y%0d[%0d]=%0d exp %f", r, n, fys[r][n], fd_model(r, n));
        end
      end
    $display("td: swaps=%0d held=%0d window moves=%0d clamped cycles=%0d brutal ticks=%0d",
             tds, tdh, td_wchg, td_clamp, td_brutal);
    $display("fd: swaps=%0d held=%0d window moves=%0d output samples=%0d blocks=%0d",
             fds, fdh, fd_wchg, nout, nout / NB);
    checks++;
    if (tds != 2 || tdh != 1 || td_wchg == 0 || td_clamp == 0 || td_brutal == 0 ||
        fds != 2 || fdh != 1 || fd_wchg == 0 || nout < NFS - 1000 || fd_overrun) begin
      failures++;
      $display("a mechanism did not occur as planned");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
