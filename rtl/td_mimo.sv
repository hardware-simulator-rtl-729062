// Time-domain MIMO channel digital block (default 2x2).
//
// Each of the NTX x NRX SISO channels is a sparse FIR (nine multipliers,
// delays up to 126 samples). Receive output r is the sum of the channels
// from every transmit input t, y_r = sum_t h_(t,r) * x_t, and is truncated
// to the 14-bit DAC by a brutal or sliding-window truncation. Channel
// c = t*NRX + r; for 2x2 the channels are, in order, h11 (x1 -> y1),
// h12 (x1 -> y2), h21 (x2 -> y1), h22 (x2 -> y2).
//
// Profiles are loaded from the host into a ping-pong coefficient bank
// (NTAP+1 words per channel, see tap_coef_bank) and take effect together on
// the refresh tick. The same tick closes a truncation frame: the sliding
// window is re-chosen from the peak seen during the last profile.
//
// Interface: one signed 14-bit sample per clock per transmit input; y_full
// gives the full-precision sums (h bits + 14 + 4 + log2(NTX) bits) and
// y_dac the truncated DAC samples.
// Timing: y_full follows x_in by four clocks and y_dac by five
// (100 ns at 50 MHz).
//
// Pairing of channels with outputs follows the output equations of the
// design description; the bank, pipelining and port layout are this
// design's choices.
module td_mimo
  import sim_pkg::*;
#(
  parameter int unsigned NTX    = 2,
  parameter int unsigned NRX    = 2,
  parameter int unsigned H_BITS = H_W,
  parameter int unsigned MAXDLY = MAX_DELAY,
  parameter delay_arr_t  DELAYS = EVA_DELAYS,
  parameter int unsigned NCH    = NTX * NRX,
  parameter int unsigned CH_AW  = (NCH > 1) ? $clog2(NCH) : 1,
  parameter int unsigned WD_AW  = $clog2(N_TAPS + 1),
  parameter int unsigned F_BITS = X_W + H_BITS + 4,
  parameter int unsigned S_BITS = F_BITS + ((NTX > 1) ? $clog2(NTX) : 0),
  parameter int unsigned SH_BITS = $clog2(S_BITS + 1)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic signed [X_W-1:0]    x_in   [NTX],
  input  logic                     wr_en,
  input  logic [CH_AW+WD_AW-1:0]   wr_addr,
  input  logic [H_BITS-1:0]        wr_data,
  input  logic                     refresh_tick,
  input  trunc_mode_e              mode,
  output logic signed [S_BITS-1:0] y_full [NRX],
  output logic signed [DAC_W-1:0]  y_dac  [NRX],
  output logic [SH_BITS-1:0]       shift_o [NRX],
  output logic [NRX-1:0]           sat_o,
  output logic                     swap_o,
  output logic                     held_o,
  output logic                     bank_o
);

  logic signed [H_BITS-1:0] coef   [NCH][N_TAPS];
  logic signed [F_BITS-1:0] ch_out [NCH];

  tap_coef_bank #(
    .NCH(NCH), .NTAP(N_TAPS), .H_BITS(H_BITS), .CH_AW(CH_AW), .WD_AW(WD_AW)
  ) u_bank (
    .clk, .rst_n, .wr_en, .wr_addr, .wr_data, .refresh_tick,
    .coef_o(coef), .swap_o, .held_o, .bank_o
  );

  for (genvar t = 0; t < NTX; t++) begin : g_tx
    for (genvar r = 0; r < NRX; r++) begin : g_rx
      sparse_fir #(
        .X_BITS(X_W), .H_BITS(H_BITS), .NTAP(N_TAPS), .MAXDLY(MAXDLY),
        .DELAYS(DELAYS), .Y_BITS(F_BITS)
      ) u_fir (
        .clk, .rst_n, .x_in(x_in[t]), .coef(coef[t*NRX + r]),
        .y_out(ch_out[t*NRX + r])
      );
    end
  end

  always_comb begin
    for (int r = 0; r < int'(NRX); r++) begin
      y_full[r] = '0;
      for (int t = 0; t < int'(NTX); t++)
        y_full[r] += S_BITS'(ch_out[t*NRX + r]);
    end
  end

  for (genvar r = 0; r < NRX; r++) begin : g_out
    sliding_trunc #(.IN_BITS(S_BITS), .DAC_BITS(DAC_W), .SH_BITS(SH_BITS)) u_trunc (
      .clk, .rst_n, .mode, .frame_tick(refresh_tick),
      .in_data(y_full[r]), .out_data(y_dac[r]), .shift_o(shift_o[r]),
      .sat_o(sat_o[r])
    );
  end

endmodule
