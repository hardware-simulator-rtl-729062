// Output truncation to the DAC width: brutal or sliding window.
//
// The filter output carries IN_BITS bits but the DAC takes DAC_BITS. Two
// modes:
//  * brutal  - keep the DAC_BITS top bits of the full-width word (a fixed
//              arithmetic shift of IN_BITS - DAC_BITS);
//  * sliding - keep the DAC_BITS bits that start at the most significant bit
//              the signal actually uses, so small signals lose less precision.
//              The analog amplifier after the DAC then rescales by 2^shift.
// In sliding mode the window is chosen from the peak of the signal: the
// block accumulates the bits used by every sample (OR of x XOR sign) and, on
// frame_tick, sets shift to the smallest value that lets the observed peak
// pass without overflow. The window found in one frame is applied to the
// next. A sample that still does not fit is clamped to the DAC range and
// sat_o pulses with it.
//
// Interface: one sample per clock on in_data; mode selects the truncation
// (it takes effect on the next frame_tick); shift_o is the current window
// position, i.e. the gain exponent for the analog stage.
// Timing: out_data is registered, one clock after in_data.
//
// The two truncations and the 2^k0 analog rescaling follow the design
// description; computing the window from the previous frame's peak and
// clamping are this design's own choices.
module sliding_trunc
  import sim_pkg::*;
#(
  parameter int unsigned IN_BITS  = 17,
  parameter int unsigned DAC_BITS = DAC_W,
  parameter int unsigned SH_BITS  = $clog2(IN_BITS + 1)
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  trunc_mode_e                mode,
  input  logic                       frame_tick,
  input  logic signed [IN_BITS-1:0]  in_data,
  output logic signed [DAC_BITS-1:0] out_data,
  output logic [SH_BITS-1:0]         shift_o,
  output logic                       sat_o
);

  localparam int unsigned BRUTAL_SHIFT = IN_BITS - DAC_BITS;

  logic [IN_BITS-1:0] used_bits, used_next;
  logic [SH_BITS-1:0] shift, new_shift;

  // Bits used by this sample: for a negative value, the bits of its complement
  assign used_next = used_bits | (in_data ^ {IN_BITS{in_data[IN_BITS-1]}});

  // Window position for the accumulated peak
  always_comb begin
    int nb;
    nb = 1;                                  // sign bit
    for (int b = 0; b < int'(IN_BITS); b++)
      if (used_next[b]) nb = b + 2;
    if (nb > int'(IN_BITS)) nb = int'(IN_BITS);
    new_shift = (nb > int'(DAC_BITS)) ? SH_BITS'(nb - int'(DAC_BITS)) : '0;
  end

  // Shifted sample and clamp
  logic signed [IN_BITS-1:0] shifted;
  logic                      over, under;
  localparam logic signed [IN_BITS-1:0] DMAX = IN_BITS'((1 << (DAC_BITS - 1)) - 1);
  localparam logic signed [IN_BITS-1:0] DMIN = -IN_BITS'(1 << (DAC_BITS - 1));
  assign shifted = in_data >>> shift;
  assign over    = shifted > DMAX;
  assign under   = shifted < DMIN;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      used_bits <= '0;
      shift     <= SH_BITS'(BRUTAL_SHIFT);
      out_data  <= '0;
      sat_o     <= 1'b0;
    end else begin
      if (frame_tick) begin
        used_bits <= '0;
        shift     <= (mode == TRUNC_SLIDING) ? new_shift : SH_BITS'(BRUTAL_SHIFT);
      end else begin
        used_bits <= used_next;
      end
      out_data <= over  ? DMAX[DAC_BITS-1:0] :
                  under ? DMIN[DAC_BITS-1:0] : shifted[DAC_BITS-1:0];
      sat_o    <= over | under;
    end
  end

  assign shift_o = shift;

endmodule
