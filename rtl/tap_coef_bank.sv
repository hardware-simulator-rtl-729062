// Ping-pong coefficient bank for the time-domain channels.
//
// Holds two copies of the tap gains of NCH channels (NTAP gains each). The
// filters always read the active copy while the host writes the next profile
// into the shadow copy, so a profile can be reloaded while the channel runs.
// Each channel's profile is NTAP coefficient words followed by one commit
// word, NTAP+1 words per channel and (9+1) x 4 = 40 words for a 2x2 link, as
// the host link transfers them. On refresh_tick the two copies swap roles, but
// only when every channel has been committed since the last swap; otherwise
// the running profile is kept and held_o pulses.
//
// Host write port: wr_addr = {channel, word}; word < NTAP writes a
// coefficient, word == NTAP is the commit word (its data is ignored). One
// write per clock, no back-pressure.
//
// Timing: coef_o changes on the clock edge that samples refresh_tick; swap_o
// pulses in the same cycle as the new coefficients appear.
//
// Swapping two full banks and the commit rule are this design's choices for
// the reload circuit, whose insides the design description does not detail.
module tap_coef_bank
  import sim_pkg::*;
#(
  parameter int unsigned NCH    = 4,
  parameter int unsigned NTAP   = N_TAPS,
  parameter int unsigned H_BITS = H_W,
  parameter int unsigned CH_AW  = (NCH > 1) ? $clog2(NCH) : 1,
  parameter int unsigned WD_AW  = $clog2(NTAP + 1)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     wr_en,
  input  logic [CH_AW+WD_AW-1:0]   wr_addr,
  input  logic [H_BITS-1:0]        wr_data,
  input  logic                     refresh_tick,
  output logic signed [H_BITS-1:0] coef_o [NCH][NTAP],
  output logic                     swap_o,
  output logic                     held_o,
  output logic                     bank_o
);

  logic signed [H_BITS-1:0] bank [2][NCH][NTAP];
  logic [NCH-1:0]           committed;
  logic                     active;

  logic [CH_AW-1:0] wr_ch;
  logic [WD_AW-1:0] wr_wd;
  assign wr_ch = wr_addr[CH_AW+WD_AW-1:WD_AW];
  assign wr_wd = wr_addr[WD_AW-1:0];

  logic all_committed;
  assign all_committed = &committed;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int b = 0; b < 2; b++)
        for (int c = 0; c < int'(NCH); c++)
          for (int k = 0; k < int'(NTAP); k++) bank[b][c][k] <= '0;
      committed <= '0;
      active    <= 1'b0;
      swap_o    <= 1'b0;
      held_o    <= 1'b0;
    end else begin
      swap_o <= 1'b0;
      held_o <= 1'b0;
      if (wr_en && int'(wr_ch) < int'(NCH)) begin
        if (int'(wr_wd) < int'(NTAP))
          bank[~active][wr_ch][wr_wd] <= wr_data;
        else if (int'(wr_wd) == int'(NTAP))
          committed[wr_ch] <= 1'b1;
      end
      if (refresh_tick) begin
        if (all_committed) begin
          active    <= ~active;
          committed <= '0;
          swap_o    <= 1'b1;
        end else begin
          held_o    <= 1'b1;
        end
      end
    end
  end

  always_comb begin
    for (int c = 0; c < int'(NCH); c++)
      for (int k = 0; k < int'(NTAP); k++) coef_o[c][k] = bank[active][c][k];
  end
  assign bank_o = active;

endmodule
