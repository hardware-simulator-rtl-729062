// Digital block of a 2x2 MIMO radio channel simulator for LTE signals.
//
// The simulator sits between two down-conversion and two up-conversion RF
// units: two 14-bit ADC streams enter, each of the four SISO channel impulse
// responses (EVA profile, nine paths up to 126 samples) is applied, the
// channels are summed per receive antenna and two 14-bit DAC streams leave.
// The impulse responses vary in time: the host computes a new profile for
// every refresh period (0.3 kHz) and loads it through its bus while the
// running profile keeps being used (ping-pong banks).
//
// Two implementations of the channel stand side by side, each with its own
// clock, converters, host port and refresh timer:
//  * time domain (td_*): four nine-multiplier sparse FIR filters, one sample
//    per clock at clk_td = fs = 50 MHz, latency 5 clocks (100 ns); profile =
//    (9+1) x 4 words of 16 bits.
//  * frequency domain (fd_*): four overlap-add channels (128-sample blocks,
//    256-point FFT, product with H, IFFT), clocked at clk_fd = 2 fs = 100 MHz
//    with fd_x_valid every other clock, latency 1300 clocks (13 us);
//    profile = (256+1) x 4 words of 32 bits.
// Both end in a brutal or sliding-window truncation to 14 bits; *_shift is
// the window position, i.e. the gain exponent the analog amplifier after the
// DAC applies. *_y_full are the wide values before truncation.
//
// The host link, converters, RF units and analog amplifier are outside this
// block: their signals are the ports. *_tick tells the host a refresh
// happened (the next profile may be written). One reset serves both clocks
// and must be released synchronously to each (this design's choice).
module hw_sim_top
  import sim_pkg::*;
#(
  parameter int unsigned TD_REFRESH = REFRESH_CYCLES,      // clk_td cycles
  parameter int unsigned FD_REFRESH = 2 * REFRESH_CYCLES   // clk_fd cycles
) (
  input  logic                       rst_n,
  input  logic                       refresh_en,
  // time-domain architecture
  input  logic                       clk_td,
  input  logic signed [X_W-1:0]      td_x [2],
  input  logic                       td_wr_en,
  input  logic [5:0]                 td_wr_addr,
  input  logic [H_W-1:0]             td_wr_data,
  input  trunc_mode_e                td_mode,
  output logic signed [X_W+H_W+4:0]  td_y_full [2],
  output logic signed [DAC_W-1:0]    td_y_dac [2],
  output logic [5:0]                 td_shift [2],
  output logic [1:0]                 td_sat,
  output logic                       td_tick,
  output logic                       td_swap,
  output logic                       td_held,
  // frequency-domain architecture
  input  logic                       clk_fd,
  input  logic                       fd_x_valid,
  input  logic signed [X_W-1:0]      fd_x [2],
  input  logic                       fd_wr_en,
  input  logic [10:0]                fd_wr_addr,
  input  logic [2*FD_H_W-1:0]        fd_wr_data,
  input  trunc_mode_e                fd_mode,
  output logic                       fd_y_valid,
  output logic signed [FD_OUT_W-1:0] fd_y_full [2],
  output logic                       fd_dac_valid,
  output logic signed [DAC_W-1:0]    fd_y_dac [2],
  output logic [4:0]                 fd_shift [2],
  output logic [1:0]                 fd_sat,
  output logic                       fd_tick,
  output logic                       fd_swap,
  output logic                       fd_held,
  output logic                       fd_overrun,
  output logic                       fd_ch_sat
);

  // ---------------- time domain ----------------
  refresh_timer #(.PERIOD(TD_REFRESH)) u_td_timer (
    .clk(clk_td), .rst_n, .enable(refresh_en), .tick(td_tick));

  td_mimo #(.NTX(2), .NRX(2)) u_td (
    .clk(clk_td), .rst_n, .x_in(td_x), .wr_en(td_wr_en), .wr_addr(td_wr_addr),
    .wr_data(td_wr_data), .refresh_tick(td_tick), .mode(td_mode),
    .y_full(td_y_full), .y_dac(td_y_dac), .shift_o(td_shift), .sat_o(td_sat),
    .swap_o(td_swap), .held_o(td_held), .bank_o());

  // ---------------- frequency domain ----------------
  refresh_timer #(.PERIOD(FD_REFRESH)) u_fd_timer (
    .clk(clk_fd), .rst_n, .enable(refresh_en), .tick(fd_tick));

  fd_mimo #(.NTX(2), .NRX(2)) u_fd (
    .clk(clk_fd), .rst_n, .x_valid(fd_x_valid), .x_in(fd_x),
    .wr_en(fd_wr_en), .wr_addr(fd_wr_addr), .wr_data(fd_wr_data),
    .refresh_tick(fd_tick), .mode(fd_mode), .y_valid(fd_y_valid),
    .y_full(fd_y_full), .dac_valid(fd_dac_valid), .y_dac(fd_y_dac),
    .shift_o(fd_shift), .sat_o(fd_sat), .swap_o(fd_swap), .held_o(fd_held),
    .overrun_o(fd_overrun), .ch_sat_o(fd_ch_sat));

endmodule
