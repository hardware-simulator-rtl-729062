// Self-checking testbench for tap_coef_bank (four channels of nine taps).
// Loads random profiles through the host port and checks that
//  * the running coefficients do not change while the shadow copy is written;
//  * a refresh tick after all four commit words swaps in the new profile,
//    with swap_o on the same cycle;
//  * a tick with one channel not committed keeps the old profile (held_o).
module tb_tap_coef_bank;
  import sim_pkg::*;

  localparam int NCH = 4;
  logic clk = 0, rst_n = 0;
  logic wr_en = 0;
  logic [5:0] wr_addr = '0;
  logic [H_W-1:0] wr_data = '0;
  logic refresh_tick = 0;
  logic signed [H_W-1:0] coef_o [NCH][N_TAPS];
  logic swap_o, held_o, bank_o;

  int checks = 0, failures = 0;
  int swaps = 0, holds = 0;
  logic [H_W-1:0] active_ref [NCH][N_TAPS];
  logic [H_W-1:0] next_ref   [NCH][N_TAPS];

  tap_coef_bank dut (.clk, .rst_n, .wr_en, .wr_addr, .wr_data, .refresh_tick,
                     .coef_o, .swap_o, .held_o, .bank_o);

  always #10 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_active(string what);
    for (int c = 0; c < NCH; c++)
      for (int k = 0; k < int'(N_TAPS); k++) begin
        checks++;
        if (coef_o[c][k] !== active_ref[c][k]) begin
          failures++;
          if (failures < 10) $display("%s: ch%0d tap%0d got %h exp %h", what, c, k, coef_o[c][k], active_ref[c][k]);
        end
      end
  endtask

  task automatic write_word(int c, int w, logic [H_W-1:0] d);
    wr_en = 1; wr_addr = {2'(c), 4'(w)}; wr_data = d;
    @(negedge clk);
    wr_en = 0;
    check_active("during load");
  endtask

  task automatic tick(bit expect_swap);
    refresh_tick = 1;
    @(negedge clk);
    refresh_tick = 0;
    checks++;
    if (swap_o !== expect_swap || held_o !== !expect_swap) begin
      failures++;
      $display("tick: swap=%b held=%b expected swap=%b", swap_o, held_o, expect_swap);
    end
    if (swap_o) swaps++;
    if (held_o) holds++;
    if (expect_swap) active_ref = next_ref;
    check_active("after tick");
  endtask

  initial begin
    for (int c = 0; c < NCH; c++)
      for (int k = 0; k < int'(N_TAPS); k++) active_ref[c][k] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    check_active("reset");
    for (int p = 0; p < 4; p++) begin
      bit skip;
      skip = (p == 2);
      for (int c = 0; c < NCH; c++) begin
        for (int k = 0; k < int'(N_TAPS); k++) begin
          next_ref[c][k] = H_W'($urandom);
          write_word(c, k, next_ref[c][k]);
        end
        if (!(skip && c == 3)) write_word(c, N_TAPS, '0);
      end
      repeat (3) @(negedge clk);
      check_active("before tick");
      tick(!skip);
      if (skip) begin
        // complete the profile and try again
        write_word(3, N_TAPS, '0);
        tick(1'b1);
      end
    end
    checks++;
    if (swaps != 4 || holds != 1) begin
      failures++;
      $display("swaps=%0d holds=%0d", swaps, holds);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
