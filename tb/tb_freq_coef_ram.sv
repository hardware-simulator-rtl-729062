// Self-checking testbench for freq_coef_ram (256 complex bins, two banks).
// Checks that H reads as zero before the first profile, that a loaded and
// committed profile becomes visible only at the first frame start after
// swap_req, that reads keep returning the running profile while the next
// one is written, and that the one-clock read latency holds.
module tb_freq_coef_ram;
  localparam int NBIN = 256;

  logic clk = 0, rst_n = 0;
  logic wr_en = 0;
  logic [8:0] wr_addr = '0;
  logic [31:0] wr_data = '0;
  logic swap_req = 0, frame_start = 0, rd_en = 0;
  logic [7:0] rd_addr = '0;
  logic signed [15:0] rd_re, rd_im;
  logic commit_o, swapped_o, bank_o;

  freq_coef_ram dut (.clk, .rst_n, .wr_en, .wr_addr, .wr_data, .swap_req,
                     .frame_start, .rd_en, .rd_addr, .rd_re, .rd_im,
                     .commit_o, .swapped_o, .bank_o);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_swaps = 0;
  logic [31:0] prof [2][NBIN];
  logic [31:0] live [NBIN];

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (swapped_o) n_swaps++;

  // read every bin once; frame_start on the first read
  task automatic read_all(string what, bit fs);
    for (int a = 0; a < NBIN; a++) begin
      rd_en = 1; rd_addr = 8'(a); frame_start = fs && (a == 0);
      @(negedge clk);
      rd_en = 0; frame_start = 0;
      checks++;
      if ({rd_re, rd_im} !== live[a]) begin
        failures++;
        if (failures < 10) $display("%s: bin %0d got %h exp %h", what, a, {rd_re, rd_im}, live[a]);
      end
    end
  endtask

  task automatic load(int p, bit commit);
    for (int a = 0; a < NBIN; a++) begin
      prof[p][a] = $urandom;
      wr_en = 1; wr_addr = 9'(a); wr_data = prof[p][a];
      @(negedge clk);
    end
    if (commit) begin wr_addr = 9'(NBIN); @(negedge clk); end
    wr_en = 0;
  endtask

  initial begin
    for (int a = 0; a < NBIN; a++) live[a] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    read_all("empty", 1'b1);
    load(0, 1'b1);
    checks++; if (!commit_o) failures++;
    read_all("loaded, no request", 1'b1);
    swap_req = 1; @(negedge clk); swap_req = 0;
    checks++; if (commit_o) failures++;
    read_all("requested, no frame start", 1'b0);
    live = prof[0];
    read_all("profile 0", 1'b1);
    // write profile 1 while reading profile 0
    fork
      load(1, 1'b1);
      read_all("profile 0 during load", 1'b0);
    join
    swap_req = 1; @(negedge clk); swap_req = 0;
    live = prof[1];
    read_all("profile 1", 1'b1);
    checks++;
    if (n_swaps != 2) begin failures++; $display("swaps %0d", n_swaps); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
