// Profile refresh timer.
//
// Emits a one-clock tick every PERIOD clocks. At the 50 MHz sample clock the
// default period of 166 667 clocks gives the 0.3 kHz profile refresh rate
// chosen for an 80 km/h terminal at 1.8 GHz (Doppler spread 133 Hz). The
// tick swaps the coefficient banks of both architectures.
//
// Interface: enable stops the count when low. Timing: the first tick comes
// PERIOD clocks after reset is released with enable high, then one every
// PERIOD clocks. The counter itself is this design's choice.
module refresh_timer
  import sim_pkg::*;
#(
  parameter int unsigned PERIOD = REFRESH_CYCLES
) (
  input  logic clk,
  input  logic rst_n,
  input  logic enable,
  output logic tick
);

  localparam int unsigned CW = $clog2(PERIOD + 1);
  logic [CW-1:0] count;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count <= '0;
      tick  <= 1'b0;
    end else begin
      tick <= 1'b0;
      if (enable) begin
        if (count == CW'(PERIOD - 1)) begin
          count <= '0;
          tick  <= 1'b1;
        end else begin
          count <= count + 1'b1;
        end
      end
    end
  end

endmodule
