// tb_hist_kernel: self-checking test of the Hist kernel at its default size.
//
// The testbench plays the pipes: each of the NUM_PORTS inputs offers 512-bit
// vectors of test pixels with random gaps, and the result writes are
// collected with random backpressure. The 256 counts written to memory must
// equal a histogram computed by the testbench. Runs cover uniform, locally
// invariant (dark) and constant data, back-to-back runs (the arrays must be
// cleared in between) and a stall-free run whose length must be
// BIN_SIZE (clear) + num_beats (one vector per pipe per cycle) + BIN_SIZE
// (merge) plus a few cycles of pipeline.
module tb_hist_kernel;
  import tb_data_pkg::*;
  localparam int unsigned NUM_PORTS = 4, BUS_W = 512, BIN_SIZE = 256, COUNT_W = 32;
  localparam int unsigned ADDR_W = 64, BEATS_W = 32;

  logic clk = 1'b0, rst_n = 1'b0;
  logic start, busy, done, wr_valid, wr_ready;
  logic [BEATS_W-1:0] num_beats;
  logic [ADDR_W-1:0] res_base, wr_addr;
  logic [BUS_W-1:0] wr_data;
  hist_pkg::hist_state_e state;
  logic in_valid [NUM_PORTS];
  logic in_ready [NUM_PORTS];
  logic [BUS_W-1:0] in_data [NUM_PORTS];
  int checks = 0, failures = 0;
  int unsigned expect_h [BIN_SIZE];
  logic [COUNT_W-1:0] mem [logic [ADDR_W-1:0]];
  int sent [NUM_PORTS];
  int gap_pct = 0, wr_stall_pct = 0, n_done = 0;
  pattern_e pat;
  logic [31:0] seed;

  hist_kernel dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic logic [BUS_W-1:0] beat(input int p, input int i);
    logic [BUS_W-1:0] w;
    for (int b = 0; b < int'(BUS_W / 8); b++)
      w[b*8 +: 8] = pixel(64'(p) << 32 | 64'(i * 64 + b), pat, seed);
    return w;
  endfunction

  // Pipe sources and result sink.
  always @(negedge clk) begin
    for (int p = 0; p < int'(NUM_PORTS); p++) begin
      in_valid[p] <= busy && (sent[p] < int'(num_beats)) && ($urandom_range(99) >= gap_pct);
      in_data[p]  <= beat(p, sent[p]);
    end
    wr_ready <= ($urandom_range(99) >= wr_stall_pct);
  end
  always @(posedge clk) begin
    for (int p = 0; p < int'(NUM_PORTS); p++)
      if (in_valid[p] && in_ready[p]) sent[p]++;
    if (rst_n && wr_valid && wr_ready)
      for (int k = 0; k < int'(BUS_W / COUNT_W); k++)
        mem[wr_addr + ADDR_W'(4 * k)] = wr_data[k*COUNT_W +: COUNT_W];
    if (rst_n && done) n_done++;
  end

  task automatic run(input int beats, input pattern_e p, input int gaps, input int wstall,
                     output int cycles);
    int c = 0;
    @(negedge clk);
    pat = p; seed = $urandom; gap_pct = gaps; wr_stall_pct = wstall;
    for (int q = 0; q < int'(NUM_PORTS); q++) sent[q] = 0;
    for (int b = 0; b < int'(BIN_SIZE); b++) expect_h[b] = 0;
    for (int q = 0; q < int'(NUM_PORTS); q++)
      for (int i = 0; i < beats; i++)
        for (int b = 0; b < int'(BUS_W / 8); b++)
          expect_h[pixel(64'(q) << 32 | 64'(i * 64 + b), pat, seed)]++;
    mem.delete();
    n_done = 0;
    res_base = ADDR_W'($urandom) << 6;
    num_beats = BEATS_W'(beats);
    start = 1;
    @(negedge clk);
    start = 0;
    while (n_done == 0 && c < 200000) begin
      @(negedge clk);
      c++;
    end
    cycles = c;
    check(n_done == 1, "done pulse");
    for (int b = 0; b < int'(BIN_SIZE); b++) begin
      logic [ADDR_W-1:0] a;
      a = res_base + ADDR_W'(4 * b);
      check(mem.exists(a) && mem[a] == expect_h[b],
            $sformatf("bin %0d: got %0d expected %0d", b, mem.exists(a) ? mem[a] : -1, expect_h[b]));
    end
    for (int q = 0; q < int'(NUM_PORTS); q++) check(sent[q] == beats, "beats consumed");
  endtask

  initial begin
    int cyc;
    start = 0; num_beats = '0; res_base = '0; pat = PAT_UNIFORM; seed = 0;
    for (int p = 0; p < int'(NUM_PORTS); p++) begin
      in_valid[p] = 0; in_data[p] = '0; sent[p] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run(60, PAT_UNIFORM, 20, 30, cyc);
    run(33, PAT_DARK,    50, 0,  cyc);
    run(17, PAT_CONST,   0,  50, cyc);
    run(1,  PAT_UNIFORM, 0,  0,  cyc);
    run(200, PAT_UNIFORM, 0, 0,  cyc);
    check(cyc <= 2 * int'(BIN_SIZE) + 200 + 8, $sformatf("kernel took %0d cycles for 200 beats", cyc));
    $display("stall-free run of 200 beats per pipe: %0d cycles", cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
