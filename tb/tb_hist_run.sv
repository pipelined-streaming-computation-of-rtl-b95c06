// tb_hist_run: one histogram run on a hist_top of a given port count.
//
// Helper for testbenches that compare configurations. It instantiates
// hist_top with NUM_PORTS ports, 256 >> BIN_SHIFT bins of width 2**BIN_SHIFT
// and stall-free memory-bank models, and on a
// rising `go` histograms N_PIXELS random pixels spread evenly over the banks.
// It checks every bin against a histogram computed here and the cycle count
// against BIN_SIZE + N_PIXELS/(64*NUM_PORTS) + BIN_SIZE + a few (twice the
// beat count with THREADS = 1, one bin table per pixel position), then raises
// `finished` with its check and failure counts and the cycles taken.
module tb_hist_run #(
  parameter int unsigned     NUM_PORTS = 1,
  parameter longint unsigned N_PIXELS  = 33554432,
  parameter int unsigned     BIN_SHIFT = 0,
  parameter int unsigned     THREADS   = 2
) (
  input  logic clk,
  input  logic rst_n,
  input  logic go,
  output logic finished,
  output int   checks,
  output int   failures,
  output int   cycles
);
  import tb_data_pkg::*;
  localparam int unsigned BUS_W = 512, BIN_SIZE = 256 >> BIN_SHIFT, COUNT_W = 32;
  localparam int unsigned ADDR_W = 64, LEN_W = 8, BEATS_W = 32;
  localparam int unsigned BEATS = int'(N_PIXELS / (NUM_PORTS * BUS_W / 8));

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
  int unsigned expect_h [BIN_SIZE];
  logic [COUNT_W-1:0] mem [logic [ADDR_W-1:0]];
  int n_done;

  hist_top #(.NUM_PORTS(NUM_PORTS), .BIN_SIZE(BIN_SIZE), .BIN_SHIFT(BIN_SHIFT),
             .THREADS(THREADS)) dut (.*);

  for (genvar p = 0; p < NUM_PORTS; p++) begin : g_mem
    ddr_model #(.BUS_W(BUS_W), .ADDR_W(ADDR_W), .LEN_W(LEN_W), .STALL_PCT(0)) u_mem (
      .clk, .rst_n, .pat, .seed, .ar_valid(ar_valid[p]), .ar_ready(ar_ready[p]),
      .ar_addr(ar_addr[p]), .ar_len(ar_len[p]), .r_valid(r_valid[p]), .r_ready(r_ready[p]),
      .r_data(r_data[p]), .n_bursts(), .n_beats(), .n_stalls());
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL [%0d ports, %0d bins] %s", NUM_PORTS, BIN_SIZE, what);
    end
  endtask

  always @(posedge clk) begin
    if (rst_n && wr_valid && wr_ready)
      for (int k = 0; k < int'(BUS_W / COUNT_W); k++)
        mem[wr_addr + ADDR_W'(4 * k)] = wr_data[k*COUNT_W +: COUNT_W];
    if (rst_n && done) n_done++;
  end

  initial begin
    int c = 0;
    longint unsigned total = 0;
    finished = 0; checks = 0; failures = 0; cycles = 0; n_done = 0;
    start = 0; num_beats = '0; res_base = 64'h1_0000_0000; wr_ready = 1;
    pat = PAT_UNIFORM; seed = $urandom;
    for (int q = 0; q < int'(NUM_PORTS); q++) rd_base[q] = ADDR_W'(q) << 34;
    for (int b = 0; b < int'(BIN_SIZE); b++) expect_h[b] = 0;
    for (int q = 0; q < int'(NUM_PORTS); q++)
      for (int i = 0; i < BEATS * int'(BUS_W / 8); i++)
        expect_h[pixel(64'(rd_base[q]) + 64'(i), pat, seed) >> BIN_SHIFT]++;
    wait (go);
    @(negedge clk);
    num_beats = BEATS_W'(BEATS);
    start = 1;
    @(negedge clk);
    start = 0;
    while (n_done == 0 && c < 2 * BEATS + 1000) begin
      @(negedge clk);
      c++;
    end
    check(n_done == 1, "done pulse");
    for (int b = 0; b < int'(BIN_SIZE); b++) begin
      logic [ADDR_W-1:0] a;
      a = res_base + ADDR_W'(4 * b);
      check(mem.exists(a) && mem[a] == expect_h[b], $sformatf("bin %0d", b));
      if (mem.exists(a)) total += mem[a];
    end
    check(total == N_PIXELS, "total count");
    // One vector per cycle, or one every other cycle with a single thread.
    if (THREADS == 1)
      check(c >= 2 * BEATS - 2 && c <= 2 * int'(BIN_SIZE) + 2 * BEATS + 12, $sformatf("took %0d cycles", c));
    else
      check(c <= 2 * int'(BIN_SIZE) + BEATS + 12, $sformatf("took %0d cycles", c));
    cycles = c;
    finished = 1;
  end
endmodule
