// Frequency-domain MIMO channel digital block (default 2x2).
//
// Four fd_siso overlap-add channels, one per transmit/receive pair, whose
// outputs are summed per receive antenna, y_r = sum_t h_(t,r) * x_t
// (channel c = t*NRX + r, the same pairing as the time-domain block), clamped
// to 17 bits and brought to the 14-bit DAC by brutal or sliding-window
// truncation.
//
// Profiles: each channel has a 257-word address space (256 bins of
// {Re, Im} in Q4.12, then a commit word), wr_addr = {channel, word}. On
// refresh_tick the new profile is armed in all channels if every channel
// has been committed (each then switches at its next FFT frame, and all
// frames are aligned); otherwise held_o pulses and the old profile runs on.
// The same tick closes a sliding-window frame.
//
// Interface: x_valid marks one sample on every x_in; it must come at most
// every other clock (the clock runs at twice the sample rate, 100 MHz for
// fs = 50 MHz). y_valid marks y_full; dac_valid marks y_dac one clock later.
// overrun_o flags samples arriving too fast; ch_sat_o a clamped channel
// output. Timing: y_full sample i leaves 1300 clocks after input sample i.
//
// The four-SISO structure and the 17-to-14-bit truncation follow the design
// description; the clamp of the sum and the shared commit rule are this
// design's choices.
module fd_mimo
  import sim_pkg::*;
#(
  parameter int unsigned NTX = 2,
  parameter int unsigned NRX = 2,
  parameter int unsigned NB  = FD_N,
  parameter int unsigned NCH = NTX * NRX,
  parameter int unsigned CH_AW = (NCH > 1) ? $clog2(NCH) : 1,
  parameter int unsigned WD_AW = $clog2(2 * NB) + 1,
  parameter int unsigned SH_BITS = $clog2(FD_OUT_W + 1)
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       x_valid,
  input  logic signed [X_W-1:0]      x_in [NTX],
  input  logic                       wr_en,
  input  logic [CH_AW+WD_AW-1:0]     wr_addr,
  input  logic [2*FD_H_W-1:0]        wr_data,
  input  logic                       refresh_tick,
  input  trunc_mode_e                mode,
  output logic                       y_valid,
  output logic signed [FD_OUT_W-1:0] y_full [NRX],
  output logic                       dac_valid,
  output logic signed [DAC_W-1:0]    y_dac [NRX],
  output logic [SH_BITS-1:0]         shift_o [NRX],
  output logic [NRX-1:0]             sat_o,
  output logic                       swap_o,
  output logic                       held_o,
  output logic                       overrun_o,
  output logic                       ch_sat_o
);

  localparam int unsigned YB = FD_OUT_W + 1;

  logic [NCH-1:0]        commit, swapped, overrun, yv, csat;
  logic signed [YB-1:0]  ch_y [NCH];
  logic                  all_commit, swap_req;

  assign all_commit = &commit;
  assign swap_req   = refresh_tick && all_commit;

  for (genvar t = 0; t < NTX; t++) begin : g_tx
    for (genvar r = 0; r < NRX; r++) begin : g_rx
      localparam int unsigned C = t * NRX + r;
      fd_siso #(.NB(NB), .D(FD_D), .Y_BITS(YB)) u_ch (
        .clk, .rst_n, .x_valid, .x_in(x_in[t]),
        .wr_en(wr_en && wr_addr[CH_AW+WD_AW-1:WD_AW] == CH_AW'(C)),
        .wr_addr(wr_addr[WD_AW-1:0]), .wr_data, .swap_req,
        .y_valid(yv[C]), .y_out(ch_y[C]), .commit_o(commit[C]),
        .swapped_o(swapped[C]), .overrun_o(overrun[C]), .sat_o(csat[C]));
    end
  end

  // per-receive sum, clamped to FD_OUT_W bits; held between valid samples
  localparam longint SMAX = (longint'(1) << (FD_OUT_W - 1)) - 1;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < int'(NRX); r++) y_full[r] <= '0;
      y_valid <= 1'b0;
    end else begin
      y_valid <= yv[0];
      if (yv[0]) begin
        for (int r = 0; r < int'(NRX); r++) begin
          logic signed [YB+3:0] s;
          s = '0;
          for (int t = 0; t < int'(NTX); t++) s += (YB+4)'(ch_y[t*NRX + r]);
          if (s > (YB+4)'(SMAX))            y_full[r] <= FD_OUT_W'(SMAX);
          else if (s < -(YB+4)'(SMAX) - 1)  y_full[r] <= FD_OUT_W'(-SMAX - 1);
          else                              y_full[r] <= FD_OUT_W'(s);
        end
      end
    end
  end

  for (genvar r = 0; r < NRX; r++) begin : g_out
    sliding_trunc #(.IN_BITS(FD_OUT_W), .DAC_BITS(DAC_W), .SH_BITS(SH_BITS)) u_trunc (
      .clk, .rst_n, .mode, .frame_tick(refresh_tick),
      .in_data(y_full[r]), .out_data(y_dac[r]), .shift_o(shift_o[r]),
      .sat_o(sat_o[r]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dac_valid <= 1'b0;
      held_o    <= 1'b0;
    end else begin
      dac_valid <= y_valid;
      held_o    <= refresh_tick && !all_commit;
    end
  end

  assign swap_o    = swapped[0];
  assign overrun_o = |overrun;
  assign ch_sat_o  = |csat;

endmodule
