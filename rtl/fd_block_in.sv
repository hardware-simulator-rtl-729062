// Input block former of the frequency-domain channel.
//
// Collects the sample stream into blocks of NB samples (ping-pong buffer) and
// sends each block to the FFT as NB samples followed by NB zeros, the null
// "tail" that makes room for the channel's delay spread so that blocks can be
// overlap-added afterwards. The FFT side takes 2*NB clocks per block while
// the input side delivers NB samples, so the block former needs a clock at
// least twice the sample rate (x_valid at most every other clock). Samples
// leave sign-extended to D bits with GUARD fractional bits added.
//
// Interface: x_valid/x_in at the sample rate; out_valid/out_re one value per
// clock while a block is streamed, back to back when the next block is ready.
// overrun_o pulses if a block is completed while both buffers are still full.
// Timing: a block starts leaving two clocks after its last sample arrived.
module fd_block_in
  import sim_pkg::*;
#(
  parameter int unsigned NB    = FD_N,
  parameter int unsigned XB    = X_W,
  parameter int unsigned D     = FD_D,
  parameter int unsigned GUARD = FD_GUARD
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                x_valid,
  input  logic signed [XB-1:0] x_in,
  output logic                out_valid,
  output logic signed [D-1:0] out_re,
  output logic                overrun_o
);

  localparam int unsigned AW = $clog2(NB);

  logic signed [XB-1:0] mem [2*NB];
  logic [AW-1:0] wcnt;
  logic          wbank, rbank, busy;
  logic [AW:0]   rcnt;
  logic [1:0]    full;

  always_ff @(posedge clk) begin
    if (x_valid) mem[{wbank, wcnt}] <= x_in;
  end

  logic                 rd_zero, rd_v;
  logic signed [XB-1:0] rd_x;
  always_ff @(posedge clk) begin
    rd_x <= mem[{rbank, rcnt[AW-1:0]}];
  end

  logic wdone, rdone;
  assign wdone = x_valid && (wcnt == AW'(NB - 1));
  assign rdone = busy && (rcnt == (AW+1)'(2 * NB - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wcnt <= '0; wbank <= 1'b0; rbank <= 1'b0; busy <= 1'b0;
      rcnt <= '0; full <= '0; rd_zero <= 1'b0; rd_v <= 1'b0;
      overrun_o <= 1'b0;
    end else begin
      logic [1:0] f;
      f = full;
      overrun_o <= 1'b0;
      if (x_valid) begin
        wcnt <= wcnt + 1'b1;
        if (wdone) begin
          if (f[wbank]) overrun_o <= 1'b1;
          f[wbank] = 1'b1;
          wbank <= ~wbank;
        end
      end
      rd_v    <= busy;
      rd_zero <= rcnt[AW];
      if (busy) begin
        rcnt <= rcnt + 1'b1;
        if (rdone) begin
          f[rbank] = 1'b0;
          rbank <= ~rbank;
          busy  <= f[~rbank];
        end
      end else if (f[rbank]) begin
        busy <= 1'b1;
        rcnt <= '0;
      end
      full <= f;
    end
  end

  assign out_valid = rd_v;
  assign out_re    = rd_zero ? '0 : (D'(rd_x) <<< GUARD);

endmodule
