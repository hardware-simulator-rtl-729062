// Sparse FIR filter: one SISO channel of the time-domain architecture.
//
// Computes y(i) = sum_k h(k) * x(i - d_k) over N_TAPS paths, where the path
// delays d_k are fixed at elaboration (EVA profile by default) and the path
// gains h(k) come in on coef and may change on any clock (profile reload).
// Only N_TAPS multipliers are used however long the delay line is: a filter
// of length MAX_DELAY+1 with nine non-zero taps, as an EVA/ETU impulse
// response needs.
//
// Interface: one signed X_W-bit sample per clock on x_in (the ADC rate),
// signed H_W-bit coefficients (fractional, full scale = 1.0), and a signed
// output of X_W + H_W + 4 bits, the full-precision sum of nine products.
//
// Timing: four register stages - delay-line write, products, three partial
// sums of three products, final sum. y_out shows the response to a sample
// four clocks after that sample was on x_in. A new coefficient set is used
// from the product stage onward, so a profile change takes effect on the
// output three clocks after coef changes.
//
// The tap structure and the output width (h bits + input bits + 4) follow the
// design description; the pipelining and reset of the delay line are this
// design's own choices.
module sparse_fir
  import sim_pkg::*;
#(
  parameter int unsigned X_BITS  = X_W,
  parameter int unsigned H_BITS  = H_W,
  parameter int unsigned NTAP    = N_TAPS,
  parameter int unsigned MAXDLY  = MAX_DELAY,
  parameter delay_arr_t  DELAYS  = EVA_DELAYS,
  parameter int unsigned Y_BITS  = X_BITS + H_BITS + 4
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic signed [X_BITS-1:0] x_in,
  input  logic signed [H_BITS-1:0] coef [NTAP],
  output logic signed [Y_BITS-1:0] y_out
);

  localparam int unsigned P_BITS = X_BITS + H_BITS;
  localparam int unsigned NGRP   = (NTAP + 2) / 3;

  logic signed [X_BITS-1:0] dline [MAXDLY+1];
  logic signed [P_BITS-1:0] prod  [NTAP];
  logic signed [Y_BITS-1:0] psum  [NGRP];

  // Tapped delay line: dline[d] holds x delayed by d samples (plus one clock)
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int d = 0; d <= int'(MAXDLY); d++) dline[d] <= '0;
    end else begin
      dline[0] <= x_in;
      for (int d = 1; d <= int'(MAXDLY); d++) dline[d] <= dline[d-1];
    end
  end

  // One multiplier per path
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < int'(NTAP); k++) prod[k] <= '0;
    end else begin
      for (int k = 0; k < int'(NTAP); k++) prod[k] <= coef[k] * dline[DELAYS[k]];
    end
  end

  // Adder tree: groups of three, then the final sum
  logic signed [Y_BITS-1:0] psum_d [NGRP];
  logic signed [Y_BITS-1:0] tot_d;

  always_comb begin
    for (int g = 0; g < int'(NGRP); g++) begin
      psum_d[g] = '0;
      for (int j = 0; j < 3; j++)
        if (3*g + j < int'(NTAP)) psum_d[g] += Y_BITS'(prod[3*g + j]);
    end
    tot_d = '0;
    for (int g = 0; g < int'(NGRP); g++) tot_d += psum[g];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int g = 0; g < int'(NGRP); g++) psum[g] <= '0;
      y_out <= '0;
    end else begin
      psum  <= psum_d;
      y_out <= tot_d;
    end
  end

  initial begin
    for (int k = 0; k < int'(NTAP); k++)
      assert (DELAYS[k] <= MAXDLY) else $error("sparse_fir: delay %0d beyond MAXDLY", DELAYS[k]);
  end

endmodule
