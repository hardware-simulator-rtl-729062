// Self-checking testbench for refresh_timer at its default period
// (166 667 clocks = 1/0.3 kHz at 50 MHz). Counts clocks between ticks,
// checks every tick is one clock wide and that a low enable stops the count.
module tb_refresh_timer;
  import sim_pkg::*;

  logic clk = 0, rst_n = 0, enable = 0, tick;
  int checks = 0, failures = 0;

  refresh_timer dut (.clk, .rst_n, .enable, .tick);

  always #10 clk = ~clk;

  initial begin
    #(20 * (4 * REFRESH_CYCLES + 2000));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    repeat (2) @(negedge clk);
    rst_n = 1;
    enable = 1;
    for (int t = 0; t < 3; t++) begin
      n = (t == 0) ? 0 : 1;  // one clock of the period already passed
      do begin
        @(negedge clk);
        n++;
      end while (!tick);
      checks++;
      if (n != int'(REFRESH_CYCLES)) begin
        failures++;
        $display("tick %0d after %0d clocks, expected %0d", t, n, REFRESH_CYCLES);
      end
      @(negedge clk);
      checks++;
      if (tick) begin failures++; $display("tick wider than one clock"); end
      // pause the count for 100 clocks in the second period
      if (t == 1) begin
        enable = 0;
        repeat (100) begin
          @(negedge clk);
          checks++;
          if (tick) failures++;
        end
        enable = 1;
        n = 101;
        do begin @(negedge clk); n++; end while (!tick);
        checks++;
        if (n != int'(REFRESH_CYCLES) + 100) begin
          failures++;
          $display("paused period %0d clocks, expected %0d", n, REFRESH_CYCLES + 100);
        end
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
