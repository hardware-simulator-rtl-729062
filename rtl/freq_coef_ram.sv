// Ping-pong memory of one channel's frequency response H (256 complex bins).
//
// Two banks of NBIN words, each word {Re[31:16], Im[15:0]} in signed Q4.12.
// The host writes the next profile into the idle bank while the running
// channel reads the other; word NBIN of a channel's address space is its
// commit word, so a profile is NBIN+1 = 257 words, (256+1) x 4 for a 2x2
// link. commit_o tells the enclosing block that the idle bank is complete.
// swap_req (refresh tick with every channel committed) arms a swap, which
// takes effect at the next frame_start so that one FFT frame never mixes two
// profiles; swapped_o pulses then. Until the first swap H reads as zero.
// Between swap_req and swapped_o the idle bank is still the armed profile:
// the host must wait for swapped_o before writing the next one (an
// assertion checks this rule).
//
// Read port: rd_en with rd_addr returns rd_re / rd_im on the next clock
// (a registered block-RAM read). The bank swap rule is this design's choice.
module freq_coef_ram
  import sim_pkg::*;
#(
  parameter int unsigned NBIN   = FD_NFFT,
  parameter int unsigned HB     = FD_H_W,
  parameter int unsigned AW     = $clog2(NBIN)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 wr_en,
  input  logic [AW:0]          wr_addr,
  input  logic [2*HB-1:0]      wr_data,
  input  logic                 swap_req,
  input  logic                 frame_start,
  input  logic                 rd_en,
  input  logic [AW-1:0]        rd_addr,
  output logic signed [HB-1:0] rd_re,
  output logic signed [HB-1:0] rd_im,
  output logic                 commit_o,
  output logic                 swapped_o,
  output logic                 bank_o
);

  logic [2*HB-1:0] mem [2*NBIN];
  logic            active, pending, loaded;
  logic            do_swap, rd_bank;

  assign do_swap = frame_start && (pending || swap_req);
  assign rd_bank = do_swap ? ~active : active;

  // storage: write into the idle bank, registered read from the live one
  always_ff @(posedge clk) begin
    if (wr_en && !wr_addr[AW])
      mem[{~active, wr_addr[AW-1:0]}] <= wr_data;
  end

  logic [2*HB-1:0] rd_word;
  logic            rd_ok;
  always_ff @(posedge clk) begin
    if (rd_en) rd_word <= mem[{rd_bank, rd_addr}];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active    <= 1'b0;
      pending   <= 1'b0;
      loaded    <= 1'b0;
      commit_o  <= 1'b0;
      swapped_o <= 1'b0;
      rd_ok     <= 1'b0;
    end else begin
      swapped_o <= 1'b0;
      if (wr_en && wr_addr[AW] && wr_addr[AW-1:0] == '0) commit_o <= 1'b1;
      if (swap_req) begin
        pending  <= 1'b1;
        commit_o <= 1'b0;
      end
      if (do_swap) begin
        active    <= ~active;
        pending   <= 1'b0;
        loaded    <= 1'b1;
        swapped_o <= 1'b1;
      end
      if (rd_en) rd_ok <= loaded || do_swap;
    end
  end

  // host rule: no writes while a swap is armed but not yet done
  always_ff @(posedge clk) begin
    if (rst_n)
      assert (!(wr_en && (pending || swap_req) && !do_swap))
        else $error("freq_coef_ram: profile written before the armed swap took effect");
  end

  assign rd_re  = rd_ok ? rd_word[2*HB-1:HB] : '0;
  assign rd_im  = rd_ok ? rd_word[HB-1:0]    : '0;
  assign bank_o = active;

endmodule
