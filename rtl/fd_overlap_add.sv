// Overlap-add output stage of the frequency-domain channel.
//
// Each inverse-FFT frame holds 2*NB real samples: the response to one input
// block of NB samples, whose second half (the tail) belongs with the next
// block. The stage stores frames in a ring of four banks, writing each
// value at address bitrev(in_idx) to undo the pipeline's bit-reversed order,
// and outputs y[k] = frame_b[k] + frame_(b-1)[k + NB], k = 0..NB-1, one
// sample per out_en strobe (the sample rate). The sum drops the GUARD
// fractional bits and is clamped to Y_BITS bits; sat_o flags a clamp.
// Before the first frame the previous tail counts as zero.
//
// Interface: in_valid/in_idx/in_re from the IFFT (imaginary part unused: the
// signal is real); out_en at the sample rate; y_valid/y_out.
// Timing: a frame becomes readable once its last value is written; y_out
// follows the out_en that reads it by two clocks.
module fd_overlap_add
  import sim_pkg::*;
#(
  parameter int unsigned NB     = FD_N,
  parameter int unsigned D      = FD_D,
  parameter int unsigned GUARD  = FD_GUARD,
  parameter int unsigned Y_BITS = FD_OUT_W + 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic [$clog2(2*NB)-1:0]  in_idx,
  input  logic signed [D-1:0]      in_re,
  input  logic                     out_en,
  output logic                     y_valid,
  output logic signed [Y_BITS-1:0] y_out,
  output logic                     sat_o
);

  localparam int unsigned FW = $clog2(2 * NB);   // frame address width

  logic signed [D-1:0] mem [4][2*NB];
  logic [1:0]  wbank, rbank;                     // bank being written / read
  logic [3:0]  written;                          // bank holds a whole frame
  logic [1:0]  ready;                            // frames waiting to be read
  logic [FW-2:0] k;
  logic        rd_v, prev_ok, prev_ok_q;
  logic signed [D-1:0] cur_q, prev_q;

  function automatic logic [FW-1:0] bitrev(logic [FW-1:0] a);
    for (int b = 0; b < int'(FW); b++) bitrev[b] = a[FW-1-b];
  endfunction

  function automatic logic [1:0] prev_bank(logic [1:0] b);
    return b - 2'd1;
  endfunction

  function automatic logic [1:0] next_bank(logic [1:0] b);
    return b + 2'd1;
  endfunction

  logic wdone, reading, rdone;
  assign wdone   = in_valid && (in_idx == FW'(2 * NB - 1));
  assign reading = out_en && (ready != 2'd0);
  assign rdone   = reading && (k == (FW-1)'(NB - 1));
  assign prev_ok = written[prev_bank(rbank)];

  always_ff @(posedge clk) begin
    if (in_valid) mem[wbank][bitrev(in_idx)] <= in_re;
    if (reading) begin
      cur_q  <= mem[rbank][{1'b0, k}];
      prev_q <= mem[prev_bank(rbank)][{1'b1, k}];
    end
  end

  // sum, drop guard bits (floor), clamp
  localparam longint YMAX = (longint'(1) << (Y_BITS - 1)) - 1;
  logic signed [D:0] prev_term, sum_full, sum_sh;
  assign prev_term = prev_ok_q ? (D+1)'(prev_q) : '0;
  assign sum_full  = (D+1)'(cur_q) + prev_term;
  assign sum_sh   = sum_full >>> GUARD;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wbank <= '0; rbank <= '0; written <= '0; ready <= '0; k <= '0;
      rd_v <= 1'b0; prev_ok_q <= 1'b0; y_valid <= 1'b0; y_out <= '0;
      sat_o <= 1'b0;
    end else begin
      if (wdone) begin
        written[wbank] <= 1'b1;
        wbank <= next_bank(wbank);
      end
      ready <= ready + (wdone ? 2'd1 : 2'd0) - (rdone ? 2'd1 : 2'd0);
      rd_v  <= reading;
      if (reading) begin
        prev_ok_q <= prev_ok;
        k <= k + 1'b1;
        if (rdone) rbank <= next_bank(rbank);
      end
      y_valid <= rd_v;
      sat_o   <= 1'b0;
      if (rd_v) begin
        if (sum_sh > (D+1)'(YMAX)) begin
          y_out <= Y_BITS'(YMAX); sat_o <= 1'b1;
        end else if (sum_sh < -(D+1)'(YMAX) - 1) begin
          y_out <= Y_BITS'(-YMAX - 1); sat_o <= 1'b1;
        end else begin
          y_out <= Y_BITS'(sum_sh);
        end
      end
    end
  end

endmodule
