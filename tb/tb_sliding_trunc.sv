// Self-checking testbench for sliding_trunc, 17-bit input to the 14-bit DAC.
// Frames of random samples with a chosen peak are sent in brutal and in
// sliding mode. An independent model finds, for each frame, the fewest bits
// that hold its peak, derives the window shift for the next frame, and
// predicts every output sample (shift, then clamp to the DAC range) one
// clock after its input. Checks the outputs, shift_o and sat_o, and that
// each mechanism (window change, clamp, brutal mode) was exercised.
module tb_sliding_trunc;
  import sim_pkg::*;

  localparam int IB = 17;
  localparam int DB = 14;

  logic clk = 0, rst_n = 0, frame_tick = 0;
  trunc_mode_e mode = TRUNC_BRUTAL;
  logic signed [IB-1:0] in_data = '0;
  logic signed [DB-1:0] out_data;
  logic [4:0] shift_o;
  logic sat_o;

  int checks = 0, failures = 0;
  int n_sat = 0, n_shift_change = 0, n_brutal = 0;

  sliding_trunc #(.IN_BITS(IB), .DAC_BITS(DB)) dut (
    .clk, .rst_n, .mode, .frame_tick, .in_data, .out_data, .shift_o, .sat_o);

  always #10 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int bits_for(longint v);
    int b = 1;
    while (!(v >= -(longint'(1) << (b - 1)) && v < (longint'(1) << (b - 1)))) b++;
    return b;
  endfunction

  int ref_shift = IB - DB;
  int frame_bits = 1;

  task automatic send(longint v, bit last, trunc_mode_e m);
    longint s, e;
    bit sat;
    in_data = IB'(v);
    frame_tick = last;
    mode = m;
    @(negedge clk);
    s = v >>> ref_shift;
    sat = 0;
    e = s;
    if (s > 8191) begin e = 8191; sat = 1; end
    if (s < -8192) begin e = -8192; sat = 1; end
    checks++;
    if (out_data !== DB'(e) || sat_o !== sat) begin
      failures++;
      if (failures < 10) $display("v=%0d shift=%0d out=%0d exp=%0d sat=%b", v, ref_shift, out_data, e, sat_o);
    end
    if (sat) n_sat++;
    if (bits_for(v) > frame_bits) frame_bits = bits_for(v);
    if (last) begin
      int ns;
      ns = (m == TRUNC_SLIDING) ? ((frame_bits > DB) ? frame_bits - DB : 0) : IB - DB;
      if (ns != ref_shift) n_shift_change++;
      if (m == TRUNC_BRUTAL) n_brutal++;
      ref_shift = ns;
      frame_bits = 1;
      checks++;
      if (int'(shift_o) != ref_shift) begin
        failures++;
        $display("shift_o=%0d exp=%0d", shift_o, ref_shift);
      end
    end
  endtask

  // peaks: number of bits of the largest sample in each frame
  int peak_bits [12] = '{10, 17, 15, 14, 16, 4, 17, 12, 17, 13, 16, 15};

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 12; f++) begin
      trunc_mode_e m;
      m = (f == 3 || f == 7) ? TRUNC_BRUTAL : TRUNC_SLIDING;
      for (int i = 0; i < 200; i++) begin
        longint lim, v;
        lim = longint'(1) << (peak_bits[f] - 1);
        v = longint'($urandom_range(0, 32'(2 * lim - 1))) - lim;
        if (i == 50) v = lim - 1;
        if (i == 51) v = -lim;
        send(v, i == 199, m);
      end
    end
    checks++;
    if (n_sat == 0 || n_shift_change < 3 || n_brutal == 0) begin
      failures++;
      $display("mechanisms: sat=%0d shift changes=%0d brutal frames=%0d", n_sat, n_shift_change, n_brutal);
    end
    $display("saturated samples=%0d window changes=%0d brutal frames=%0d", n_sat, n_shift_change, n_brutal);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
