// tb_hist_top: end-to-end test of the histogram accelerator at its default size.
//
// Four memory-bank models feed the four read ports; the result writes are
// collected in a byte-addressed memory. Each run places the image in the
// four banks, starts the accelerator, waits for done and compares the 256
// counts in memory with a histogram computed here from the same data.
// Runs: uniform random data with memory stalls, locally invariant (dark
// background) data, constant data, a run shorter than one burst, and a
// stall-free run whose cycle count is checked against
// BIN_SIZE (clear) + num_beats + BIN_SIZE (merge) + a few cycles.
// The testbench counts how often each mechanism of the design occurred and
// fails if one never did: lock-step stall on an empty pipe, backpressure of
// a full pipe into memory, memory read stalls, burst splitting, use of every
// hardware thread, result-write backpressure, and clearing between runs.
module tb_hist_top;
  import tb_data_pkg::*;
  localparam int unsigned NUM_PORTS = 4, BUS_W = 512, BIN_SIZE = 256, COUNT_W = 32;
  localparam int unsigned ADDR_W = 64, LEN_W = 8, BEATS_W = 32, THREADS = 2;
  localparam int unsigned MAX_BURST = 64;

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
  int unsigned n_bursts [NUM_PORTS], n_beats [NUM_PORTS], n_mstall [NUM_PORTS];
  pattern_e pat;
  logic [31:0] seed;
  logic stall_mem;

  int checks = 0, failures = 0, n_done = 0, wr_stall_pct = 0;
  int unsigned expect_h [BIN_SIZE];
  logic [COUNT_W-1:0] mem [logic [ADDR_W-1:0]];
  // mechanism counters
  int ev_empty_stall = 0, ev_full_stall = 0, ev_wr_stall = 0, ev_long_burst = 0;
  int ev_thread [THREADS];
  int ev_clear = 0, ev_merge = 0;

  hist_top dut (.*);

  // Memory banks: the slow ones stall 25 % of cycles when stall_mem is set.
  for (genvar p = 0; p < NUM_PORTS; p++) begin : g_mem
    logic arv_s, arr_s, rv_s, rr_s, arv_f, arr_f, rv_f, rr_f;
    logic [BUS_W-1:0] rd_s, rd_f;
    ddr_model #(.BUS_W(BUS_W), .ADDR_W(ADDR_W), .LEN_W(LEN_W), .STALL_PCT(25 + 10 * p)) u_slow (
      .clk, .rst_n, .pat, .seed, .ar_valid(ar_valid[p] && stall_mem), .ar_ready(arr_s),
      .ar_addr(ar_addr[p]), .ar_len(ar_len[p]), .r_valid(rv_s), .r_ready(r_ready[p] && stall_mem),
      .r_data(rd_s), .n_bursts(), .n_beats(), .n_stalls(n_mstall[p]));
    ddr_model #(.BUS_W(BUS_W), .ADDR_W(ADDR_W), .LEN_W(LEN_W), .STALL_PCT(0)) u_fast (
      .clk, .rst_n, .pat, .seed, .ar_valid(ar_valid[p] && !stall_mem), .ar_ready(arr_f),
      .ar_addr(ar_addr[p]), .ar_len(ar_len[p]), .r_valid(rv_f), .r_ready(r_ready[p] && !stall_mem),
      .r_data(rd_f), .n_bursts(n_bursts[p]), .n_beats(n_beats[p]), .n_stalls());
    assign ar_ready[p] = stall_mem ? arr_s : arr_f;
    assign r_valid[p]  = stall_mem ? rv_s  : rv_f;
    assign r_data[p]   = stall_mem ? rd_s  : rd_f;
  end

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  always @(negedge clk) wr_ready <= ($urandom_range(99) >= wr_stall_pct);

  always @(posedge clk) begin
    if (rst_n) begin
      if (wr_valid && wr_ready)
        for (int k = 0; k < int'(BUS_W / COUNT_W); k++)
          mem[wr_addr + ADDR_W'(4 * k)] = wr_data[k*COUNT_W +: COUNT_W];
      if (wr_valid && !wr_ready) ev_wr_stall++;
      if (done) n_done++;
      if (state == hist_pkg::H_ACCUM && dut.u_hist.beats_left != 0 && !dut.u_hist.all_valid)
        ev_empty_stall++;
      for (int p = 0; p < int'(NUM_PORTS); p++) begin
        if (r_valid[p] && !r_ready[p] && dut.u_hist.busy) ev_full_stall++;
        if (ar_valid[p] && ar_ready[p] && int'(ar_len[p]) + 1 == int'(MAX_BURST)) ev_long_burst++;
      end
      if (dut.u_hist.vec_v) ev_thread[dut.u_hist.vec_sel]++;
      if (state == hist_pkg::H_CLEAR) ev_clear++;
      if (state == hist_pkg::H_MERGE) ev_merge++;
    end
  end

  task automatic run(input int beats, input pattern_e p, input bit slow, input int wstall,
                     output int cycles);
    int c = 0;
    @(negedge clk);
    pat = p; seed = $urandom; stall_mem = slow; wr_stall_pct = wstall;
    for (int q = 0; q < int'(NUM_PORTS); q++) rd_base[q] = ADDR_W'($urandom) << 12;
    res_base = ADDR_W'($urandom) << 6;
    for (int b = 0; b < int'(BIN_SIZE); b++) expect_h[b] = 0;
    for (int q = 0; q < int'(NUM_PORTS); q++)
      for (int i = 0; i < beats * int'(BUS_W / 8); i++)
        expect_h[pixel(64'(rd_base[q]) + 64'(i), pat, seed)]++;
    mem.delete();
    n_done = 0;
    num_beats = BEATS_W'(beats);
    start = 1;
    @(negedge clk);
    start = 0;
    while (n_done == 0 && c < 400000) begin
      @(negedge clk);
      c++;
    end
    cycles = c;
    check(n_done == 1, "done pulse");
    check(!busy, "busy after done");
    for (int b = 0; b < int'(BIN_SIZE); b++) begin
      logic [ADDR_W-1:0] a;
      a = res_base + ADDR_W'(4 * b);
      check(mem.exists(a) && mem[a] == expect_h[b],
            $sformatf("bin %0d: got %0d expected %0d", b, mem.exists(a) ? mem[a] : -1, expect_h[b]));
    end
  endtask

  initial begin
    int cyc;
    start = 0; num_beats = '0; res_base = '0; pat = PAT_UNIFORM; seed = 0; stall_mem = 0;
    for (int q = 0; q < int'(NUM_PORTS); q++) rd_base[q] = '0;
    for (int t = 0; t < int'(THREADS); t++) ev_thread[t] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run(150, PAT_UNIFORM, 1'b1, 30, cyc);
    run(100, PAT_DARK,    1'b1, 0,  cyc);
    run(70,  PAT_CONST,   1'b0, 60, cyc);
    run(3,   PAT_UNIFORM, 1'b0, 0,  cyc);
    run(1000, PAT_UNIFORM, 1'b0, 0, cyc);
    $display("stall-free run, 1000 beats per port (256000 pixels): %0d cycles", cyc);
    check(cyc <= 2 * int'(BIN_SIZE) + 1000 + 12, $sformatf("rate: %0d cycles", cyc));
    $display("events: empty-pipe stalls %0d, full-pipe stalls %0d, memory stalls %0d, 64-beat bursts %0d",
             ev_empty_stall, ev_full_stall, n_mstall[0] + n_mstall[1] + n_mstall[2] + n_mstall[3],
             ev_long_burst);
    $display("events: thread0 %0d, thread1 %0d, write stalls %0d, clear cycles %0d, merge cycles %0d",
             ev_thread[0], ev_thread[1], ev_wr_stall, ev_clear, ev_merge);
    check(ev_empty_stall > 0, "no empty-pipe stall");
    check(ev_full_stall > 0, "no full-pipe backpressure");
    check(n_mstall[0] > 0, "no memory stall");
    check(ev_long_burst > 0, "no burst split");
    for (int t = 0; t < int'(THREADS); t++) check(ev_thread[t] > 0, "a thread never used");
    check(ev_wr_stall > 0, "no result-write stall");
    check(ev_clear >= 5 * int'(BIN_SIZE), "clear phase missing");
    check(ev_merge >= 5 * int'(BIN_SIZE), "merge phase missing");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
