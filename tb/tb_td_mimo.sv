// Self-checking testbench for td_mimo, the 2x2 time-domain channel block,
// at its default size. Profiles are built from the EVA 2x2 relative powers
// (gain = 10^(dB/20), random sign, 16-bit fractional) and loaded through the
// host port during the previous frame; each frame ends with a refresh tick.
// Inputs are the Gaussian pulse train used to measure accuracy
// (x_m = half scale, m_x = 3*126/16, sigma = m_x/12), random full-scale
// noise, or small noise. A reference model recomputes
// y_r = sum_t sum_k h_(t,r)(k) x_t(i - d_k) and checks y_full every clock,
// the latency of 4 edges to y_full and 5 to y_dac, the DAC samples, the
// sliding window chosen from each frame's peak, and that a profile swap, a
// held profile, a window change, a clamp and a brutal frame all occurred.
module tb_td_mimo;
  import sim_pkg::*;

  localparam int SB = X_W + H_W + 4 + 1;   // 35-bit sums
  localparam int FRAME = 600;
  localparam int NFR = 8;
  localparam int NCY = FRAME * NFR + 50;

  logic clk = 0, rst_n = 0;
  logic signed [X_W-1:0] x_in [2];
  logic wr_en = 0;
  logic [5:0] wr_addr = '0;
  logic [H_W-1:0] wr_data = '0;
  logic refresh_tick = 0;
  trunc_mode_e mode = TRUNC_SLIDING;
  logic signed [SB-1:0] y_full [2];
  logic signed [DAC_W-1:0] y_dac [2];
  logic [5:0] shift_o [2];
  logic [1:0] sat_o;
  logic swap_o, held_o, bank_o;

  td_mimo dut (.clk, .rst_n, .x_in, .wr_en, .wr_addr, .wr_data, .refresh_tick,
               .mode, .y_full, .y_dac, .shift_o, .sat_o, .swap_o, .held_o, .bank_o);

  always #10 clk = ~clk;

  int checks = 0, failures = 0;
  int n_swap = 0, n_held = 0, n_sat = 0, n_wchg = 0, n_brutal = 0;

  // EVA 2x2 relative powers in dB: [tap][h11 h12 h21 h22]
  real rp [9][4] = '{
    '{-3.85, -3.92, -3.68, -3.90}, '{-2.22, -2.87, -2.27, -3.04},
    '{-3.26, -2.55, -2.73, -2.05}, '{-7.89, -8.46, -7.15, -7.57},
    '{-4.04, -4.46, -3.57, -4.43}, '{-8.50, -8.84, -8.24, -8.77},
    '{-7.28, -6.35, -6.84, -5.70}, '{-8.56, -9.02, -9.01, -9.50},
    '{-12.30, -12.50, -12.68, -12.21}};

  // reference histories, indexed by rising edge number
  longint xs [2][0:NCY];
  longint cs [0:NCY][4][9];
  longint yexp [2][0:NCY];
  longint prof_active [4][9];
  longint prof_next   [4][9];
  int edge_n = 0;
  int pending_swap = 0;

  initial begin
    #(20 * (NCY + 500));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint model(int r, int m);
    longint acc = 0;
    if (m - 2 < 1) return 0;
    for (int t = 0; t < 2; t++)
      for (int k = 0; k < 9; k++) begin
        int j = m - 3 - int'(EVA_DELAYS[k]);
        if (j >= 1) acc += cs[m-2][t*2 + r][k] * xs[t][j];
      end
    return acc;
  endfunction

  // record what the block sampled at each rising edge
  always @(posedge clk) if (rst_n) begin
    int m;
    m = edge_n + 1;
    edge_n <= m;
    for (int t = 0; t < 2; t++) xs[t][m] = x_in[t];
    // the profile read at the product stage changes with the tick edge
    for (int c = 0; c < 4; c++) for (int k = 0; k < 9; k++) cs[m][c][k] = prof_active[c][k];
    if (refresh_tick && pending_swap == 1) prof_active = prof_next;
  end

  task automatic make_profile(int seed);
    for (int c = 0; c < 4; c++)
      for (int k = 0; k < 9; k++) begin
        real g;
        g = $pow(10.0, rp[k][c] / 20.0) * 32767.0 * (0.6 + 0.4 * ((seed + c + k) % 3) / 2.0);
        prof_next[c][k] = longint'(g);
        if ($urandom_range(0, 1)) prof_next[c][k] = -prof_next[c][k];
      end
  endtask

  function automatic longint gauss(int i);
    real mx, sg, v;
    mx = 3.0 * 126.0 / 16.0;
    sg = mx / 12.0;
    v = 4096.0 * $exp(-((i - mx) ** 2) / (2.0 * sg * sg));
    return longint'(v);
  endfunction

  int window_bits [2];
  int ref_shift [2] = '{SB - DAC_W, SB - DAC_W};

  function automatic int bits_for(longint v);
    int b = 1;
    while (!(v >= -(longint'(1) << (b - 1)) && v < (longint'(1) << (b - 1)))) b++;
    return b;
  endfunction

  initial begin
    int load_idx, commit_skip;
    for (int c = 0; c < 4; c++) for (int k = 0; k < 9; k++) prof_active[c][k] = 0;
    x_in[0] = '0; x_in[1] = '0;
    window_bits = '{1, 1};
    repeat (2) @(negedge clk);
    rst_n = 1;
    make_profile(0);
    for (int f = 0; f < NFR; f++) begin
      int kind;
      load_idx = 0;
      commit_skip = (f == 4);               // frame 4 misses a commit word
      mode = (f == 6) ? TRUNC_BRUTAL : TRUNC_SLIDING;
      kind = f % 3;                         // 0 Gaussian pulses, 1 full noise, 2 small noise
      for (int i = 0; i < FRAME; i++) begin
        // inputs
        case (kind)
          0: begin x_in[0] = X_W'(gauss(i % 384)); x_in[1] = X_W'(-gauss((i + 40) % 384)); end
          1: begin x_in[0] = X_W'($urandom); x_in[1] = X_W'($urandom); end
          default: begin x_in[0] = X_W'($urandom_range(0, 255)) - 14'sd128;
                         x_in[1] = X_W'($urandom_range(0, 255)) - 14'sd128; end
        endcase
        // host writes of the next profile, one word every 4 clocks
        wr_en = 0;
        if (i % 4 == 0 && load_idx < 40) begin
          int c, w;
          c = load_idx / 10; w = load_idx % 10;
          if (!(commit_skip && c == 2 && w == 9)) begin
            wr_en = 1;
            wr_addr = {2'(c), 4'(w)};
            wr_data = (w < 9) ? H_W'(prof_next[c][w]) : '0;
          end
          load_idx++;
        end
        refresh_tick = (i == FRAME - 1);
        pending_swap = commit_skip ? 0 : 1;
        @(negedge clk);
        // checks against the model, y_full after edge m
        for (int r = 0; r < 2; r++) begin
          longint e, s;
          e = model(r, edge_n);
          yexp[r][edge_n] = e;
          checks++;
          if (y_full[r] !== SB'(e)) begin
            failures++;
            if (failures < 10) $display("edge %0d y_full[%0d]=%0d exp %0d", edge_n, r, y_full[r], e);
          end
          // y_dac carries the previous edge's sum through the window
          if (edge_n > 1) begin
            s = yexp[r][edge_n-1] >>> ref_shift[r];
            if (s > 8191) s = 8191;
            if (s < -8192) s = -8192;
            checks++;
            if (y_dac[r] !== DAC_W'(s)) begin
              failures++;
              if (failures < 10) $display("edge %0d y_dac[%0d]=%0d exp %0d", edge_n, r, y_dac[r], s);
            end
            if (sat_o[r]) n_sat++;
            if (bits_for(yexp[r][edge_n-1]) > window_bits[r]) window_bits[r] = bits_for(yexp[r][edge_n-1]);
          end
        end
        if (swap_o) n_swap++;
        if (held_o) n_held++;
        if (refresh_tick) begin
          // window for the next frame: the tick edge's own sample is in this frame
          for (int r = 0; r < 2; r++) begin
            int ns, wb;
            wb = window_bits[r];
            if (bits_for(yexp[r][edge_n]) > wb) wb = bits_for(yexp[r][edge_n]);
            ns = (mode == TRUNC_SLIDING) ? ((wb > DAC_W) ? wb - DAC_W : 0) : SB - DAC_W;
            if (ns != ref_shift[r]) n_wchg++;
            ref_shift[r] = ns;
            window_bits[r] = 1;
            checks++;
            if (int'(shift_o[r]) != ns) begin
              failures++;
              $display("frame %0d: shift_o[%0d]=%0d exp %0d", f, r, shift_o[r], ns);
            end
          end
          if (mode == TRUNC_BRUTAL) n_brutal++;
          if (!commit_skip) make_profile(f + 1);
        end
      end
    end
    refresh_tick = 0;
    wr_en = 0;
    $display("swaps=%0d held=%0d clamped=%0d window changes=%0d brutal frames=%0d",
             n_swap, n_held, n_sat, n_wchg, n_brutal);
    checks++;
    if (n_swap != NFR - 1 || n_held != 1 || n_sat == 0 || n_wchg == 0 || n_brutal == 0) begin
      failures++;
      $display("a mechanism was not exercised as planned");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
