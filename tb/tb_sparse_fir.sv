// Self-checking testbench for sparse_fir at its default size (EVA delays,
// 14-bit samples, 16-bit coefficients). A reference model keeps the sample
// history and recomputes sum_k h(k) * x(i - d_k) every clock. Checks:
//  * an impulse returns each coefficient at edge 4 + d_k (latency and delays);
//  * random samples with three random coefficient sets, full range included;
//  * a coefficient change reaches the output after three clocks.
module tb_sparse_fir;
  import sim_pkg::*;

  localparam int unsigned YB = X_W + H_W + 4;
  localparam int NCYC = 1500;

  logic clk = 0, rst_n = 0;
  logic signed [X_W-1:0] x_in;
  logic signed [H_W-1:0] coef [N_TAPS];
  logic signed [YB-1:0]  y_out;

  int checks = 0, failures = 0;

  sparse_fir dut (.clk, .rst_n, .x_in, .coef, .y_out);

  always #10 clk = ~clk;

  // history: xs[m] is the sample taken at rising edge m, cs[m] the coefficients
  longint xs [0:NCYC+200];
  longint cs [0:NCYC+200][N_TAPS];
  int edge_n = 0;

  initial begin
    #(20*(NCYC+400));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint model(int m);
    longint acc = 0;
    // product stage at edge m-2 used coefficients present then
    for (int k = 0; k < int'(N_TAPS); k++) begin
      int j = m - 3 - int'(EVA_DELAYS[k]);
      if (j >= 1 && m - 2 >= 1) acc += cs[m-2][k] * xs[j];
    end
    return acc;
  endfunction

  always @(posedge clk) if (rst_n) begin
    edge_n <= edge_n + 1;
    xs[edge_n + 1] = x_in;
    for (int k = 0; k < int'(N_TAPS); k++) cs[edge_n + 1][k] = coef[k];
  end

  initial begin
    x_in = '0;
    for (int k = 0; k < int'(N_TAPS); k++) coef[k] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // phase 1: impulse with known coefficients
    for (int k = 0; k < int'(N_TAPS); k++) coef[k] = H_W'(1000 * (k + 1) - 4000);
    x_in = 14'sd1;
    @(negedge clk);
    x_in = '0;
    for (int n = 2; n <= 140; n++) begin
      @(negedge clk);
      begin
        longint exp_v;
        exp_v = 0;
        for (int k = 0; k < int'(N_TAPS); k++)
          if (n == 4 + int'(EVA_DELAYS[k])) exp_v = 1000 * (k + 1) - 4000;
        checks++;
        if (y_out != YB'(exp_v)) begin
          failures++;
          if (failures < 10) $display("impulse: edge %0d y=%0d exp=%0d", n, y_out, exp_v);
        end
      end
    end
    // phase 2: random samples, coefficient sets changed twice, then extremes
    for (int n = 0; n < NCYC - 200; n++) begin
      if (n == 0 || n == 400 || n == 800)
        for (int k = 0; k < int'(N_TAPS); k++) coef[k] = H_W'($urandom);
      if (n == 1000)
        for (int k = 0; k < int'(N_TAPS); k++) coef[k] = -16'sd32768;
      if (n >= 1000) x_in = -14'sd8192;
      else           x_in = X_W'($urandom);
      @(negedge clk);
      if (edge_n > 150) begin
        checks++;
        if (y_out !== YB'(model(edge_n))) begin
          failures++;
          if (failures < 10) $display("random: edge %0d y=%0d exp=%0d", edge_n, y_out, model(edge_n));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
