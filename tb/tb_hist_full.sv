// tb_hist_full: the accelerator at its default size on a full-size data set.
//
// Histograms n = 33,554,432 8-bit pixels (32 MiB, 8 MiB in each of the four
// memory banks, 131,072 512-bit beats per port), once with uniformly random
// pixels and once with a locally invariant image (black background), with
// memories that never stall. Checks every bin against a histogram computed
// here and checks the cycle count against
// BIN_SIZE (clear) + n / 256 (256 pixels per cycle) + BIN_SIZE (merge) + a few.
// It prints the update rate this gives at a 190 MHz clock.
module tb_hist_full;
  import tb_data_pkg::*;
  localparam int unsigned NUM_PORTS = 4, BUS_W = 512, BIN_SIZE = 256, COUNT_W = 32;
  localparam int unsigned ADDR_W = 64, LEN_W = 8, BEATS_W = 32;
  localparam longint unsigned N_PIXELS = 33554432;
  localparam int unsigned BEATS = int'(N_PIXELS / (NUM_PORTS * BUS_W / 8));

  logic clk = 1'b0, rst_n = 1'b0;
  logic start, busy, done, wr_valid, wr_ready;
  logic [ADDR_W-1:0] rd_base [NUM_PORTS];
  logic [BEATS_W-1:0] num_beats;
  logic [ADDR_W-1:0] res_base, wr_addr;
  logic [BUS_W-1:0] wr_data;
  hist_pkg::hist_state_e state;
  logic ar_valid [NUM_PORTS], ar_ready [NUM_PORTS], r_valid [NUM_PORTS], r_ready [NUM_PORTS];
  logic [ADDR_W-1:0] ar_addr [NUM_PORTS];
  logic [LEN_W-1:0] ar_len [NUM_PORTS];
  logic [BUS_W-1:0] r_data [NUM_PORTS];
  pattern_e pat;
  logic [31:0] seed;
  int checks = 0, failures = 0, n_done = 0;
  int unsigned expect_h [BIN_SIZE];
  logic [COUNT_W-1:0] mem [logic [ADDR_W-1:0]];

  hist_top dut (.*);

  for (genvar p = 0; p < NUM_PORTS; p++) begin : g_mem
    ddr_model #(.BUS_W(BUS_W), .ADDR_W(ADDR_W), .LEN_W(LEN_W), .STALL_PCT(0)) u_mem (
      .clk, .rst_n, .pat, .seed, .ar_valid(ar_valid[p]), .ar_ready(ar_ready[p]),
      .ar_addr(ar_addr[p]), .ar_len(ar_len[p]), .r_valid(r_valid[p]), .r_ready(r_ready[p]),
      .r_data(r_data[p]), .n_bursts(), .n_beats(), .n_stalls());
  end

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  always @(posedge clk) begin
    if (rst_n && wr_valid && wr_ready)
      for (int k = 0; k < int'(BUS_W / COUNT_W); k++)
        mem[wr_addr + ADDR_W'(4 * k)] = wr_data[k*COUNT_W +: COUNT_W];
    if (rst_n && done) n_done++;
  end

  task automatic run(input pattern_e p, input string name);
    int c = 0;
    longint unsigned total = 0;
    real gups;
    @(negedge clk);
    pat = p; seed = $urandom;
    for (int q = 0; q < int'(NUM_PORTS); q++) rd_base[q] = ADDR_W'(q) << 34;
    res_base = 64'h1_0000_0000;
    for (int b = 0; b < int'(BIN_SIZE); b++) expect_h[b] = 0;
    for (int q = 0; q < int'(NUM_PORTS); q++)
      for (int i = 0; i < BEATS * int'(BUS_W / 8); i++)
        expect_h[pixel(64'(rd_base[q]) + 64'(i), pat, seed)]++;
    mem.delete();
    n_done = 0;
    num_beats = BEATS_W'(BEATS);
    start = 1;
    @(negedge clk);
    start = 0;
    while (n_done == 0 && c < 2 * BEATS) begin
      @(negedge clk);
      c++;
    end
    check(n_done == 1, "done pulse");
    for (int b = 0; b < int'(BIN_SIZE); b++) begin
      logic [ADDR_W-1:0] a;
      a = res_base + ADDR_W'(4 * b);
      check(mem.exists(a) && mem[a] == expect_h[b],
            $sformatf("%s bin %0d: got %0d expected %0d", name, b, mem.exists(a) ? mem[a] : -1, expect_h[b]));
      if (mem.exists(a)) total += mem[a];
    end
    check(total == N_PIXELS, "total count");
    check(c <= 2 * int'(BIN_SIZE) + BEATS + 12, $sformatf("%s took %0d cycles", name, c));
    gups = real'(N_PIXELS) / (real'(c) / 190.0e6) / 1.0e9;
    $display("%s: %0d pixels in %0d cycles, %0.2f G bin updates/s at 190 MHz", name, N_PIXELS, c, gups);
  endtask

  initial begin
    start = 0; num_beats = '0; res_base = '0; pat = PAT_UNIFORM; seed = 0; wr_ready = 1;
    for (int q = 0; q < int'(NUM_PORTS); q++) rd_base[q] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run(PAT_UNIFORM, "uniform");
    run(PAT_DARK, "dark image");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4 * BEATS) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
