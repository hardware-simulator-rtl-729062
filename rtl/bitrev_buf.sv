// Bit-reversal reorder buffer between the forward FFT and the inverse FFT.
//
// The forward pipeline delivers bins in bit-reversed order and the inverse
// pipeline expects natural order. Each incoming frame of N complex values is
// written at address bitrev(in_idx) of one bank of a ping-pong buffer; a
// complete bank is then read out in address order, one value per clock,
// while the next frame fills the other bank.
//
// Interface: in_valid/in_idx/in_re/in_im from the FFT side (in_idx is the
// position within the frame); out_valid/out_re/out_im towards the IFFT.
// Timing: a frame starts leaving two clocks after its last value arrived;
// frames follow each other without gaps when the input is continuous.
module bitrev_buf #(
  parameter int unsigned N = 256,
  parameter int unsigned D = 40,
  parameter int unsigned AW = $clog2(N)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic [AW-1:0]       in_idx,
  input  logic signed [D-1:0] in_re,
  input  logic signed [D-1:0] in_im,
  output logic                out_valid,
  output logic signed [D-1:0] out_re,
  output logic signed [D-1:0] out_im
);

  logic [2*D-1:0] mem [2*N];
  logic           wbank, rbank, busy;
  logic [AW-1:0]  rcnt;
  logic [1:0]     full;

  function automatic logic [AW-1:0] bitrev(logic [AW-1:0] k);
    for (int b = 0; b < int'(AW); b++) bitrev[b] = k[AW-1-b];
  endfunction

  always_ff @(posedge clk) begin
    if (in_valid) mem[{wbank, bitrev(in_idx)}] <= {in_re, in_im};
  end

  logic [2*D-1:0] rd_word;
  always_ff @(posedge clk) rd_word <= mem[{rbank, rcnt}];

  logic wdone, rdone;
  assign wdone = in_valid && (in_idx == AW'(N - 1));
  assign rdone = busy && (rcnt == AW'(N - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wbank <= 1'b0; rbank <= 1'b0; busy <= 1'b0; rcnt <= '0; full <= '0;
      out_valid <= 1'b0;
    end else begin
      logic [1:0] f;
      f = full;
      if (wdone) begin
        f[wbank] = 1'b1;
        wbank <= ~wbank;
      end
      out_valid <= busy;
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

  assign out_re = rd_word[2*D-1:D];
  assign out_im = rd_word[D-1:0];

endmodule
