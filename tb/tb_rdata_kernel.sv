// tb_rdata_kernel: self-checking test of the R_Data reader.
//
// The reader is connected to the memory model and its output to a sink with
// random backpressure (a pipe that fills). Every beat leaving the reader must
// equal the memory contents at base + 64*i, in order; exactly num_beats beats
// must leave; requests must not exceed MAX_BURST beats; done must pulse once.
// With memory and sink never stalling, the reader must deliver one beat per
// cycle (num_beats plus a few cycles of start-up).
module tb_rdata_kernel;
  import tb_data_pkg::*;
  localparam int unsigned BUS_W = 512, ADDR_W = 64, LEN_W = 8, BEATS_W = 32;
  localparam int unsigned MAX_BURST = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  logic start, busy, done, ar_valid, ar_ready, r_valid, r_ready, out_valid, out_ready;
  logic [ADDR_W-1:0] base_addr, ar_addr;
  logic [BEATS_W-1:0] num_beats;
  logic [LEN_W-1:0] ar_len;
  logic [BUS_W-1:0] r_data, out_data;
  pattern_e pat;
  logic [31:0] seed;
  int unsigned n_bursts, n_beats, n_stalls;
  int checks = 0, failures = 0, got = 0, n_done = 0, sink_stall_pct = 0, sink_stalls = 0;
  int long_bursts = 0;

  rdata_kernel #(.BUS_W(BUS_W), .ADDR_W(ADDR_W), .LEN_W(LEN_W), .BEATS_W(BEATS_W),
                 .MAX_BURST(MAX_BURST)) dut (.*);

  ddr_model #(.BUS_W(BUS_W), .ADDR_W(ADDR_W), .LEN_W(LEN_W), .STALL_PCT(20)) mem_slow (
    .clk, .rst_n, .pat, .seed, .ar_valid(ar_valid && sel_slow), .ar_ready(ar_ready_s),
    .ar_addr, .ar_len, .r_valid(r_valid_s), .r_ready(r_ready && sel_slow), .r_data(r_data_s),
    .n_bursts(), .n_beats(), .n_stalls(n_stalls));
  ddr_model #(.BUS_W(BUS_W), .ADDR_W(ADDR_W), .LEN_W(LEN_W), .STALL_PCT(0)) mem_fast (
    .clk, .rst_n, .pat, .seed, .ar_valid(ar_valid && !sel_slow), .ar_ready(ar_ready_f),
    .ar_addr, .ar_len, .r_valid(r_valid_f), .r_ready(r_ready && !sel_slow), .r_data(r_data_f),
    .n_bursts(n_bursts), .n_beats(n_beats), .n_stalls());

  logic sel_slow, ar_ready_s, ar_ready_f, r_valid_s, r_valid_f;
  logic [BUS_W-1:0] r_data_s, r_data_f;
  assign ar_ready = sel_slow ? ar_ready_s : ar_ready_f;
  assign r_valid  = sel_slow ? r_valid_s  : r_valid_f;
  assign r_data   = sel_slow ? r_data_s   : r_data_f;

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic logic [BUS_W-1:0] expect_beat(input logic [ADDR_W-1:0] a);
    logic [BUS_W-1:0] w;
    for (int b = 0; b < int'(BUS_W / 8); b++) w[b*8 +: 8] = pixel(64'(a) + 64'(b), pat, seed);
    return w;
  endfunction

  // Sink: random backpressure, checks data order.
  always @(negedge clk) out_ready <= ($urandom_range(99) >= sink_stall_pct);
  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      check(out_data == expect_beat(base_addr + ADDR_W'(64 * got)), $sformatf("beat %0d data", got));
      got++;
    end
    if (rst_n && out_valid && !out_ready) sink_stalls++;
    if (rst_n && ar_valid && ar_ready) begin
      check(int'(ar_len) + 1 <= int'(MAX_BURST), "burst longer than MAX_BURST");
      if (int'(ar_len) + 1 == int'(MAX_BURST)) long_bursts++;
    end
    if (rst_n && done) n_done++;
  end

  task automatic run(input logic [ADDR_W-1:0] base, input int beats, input bit slow,
                     input int stall_pct, input pattern_e p, output int cycles);
    int c = 0;
    @(negedge clk);
    sel_slow = slow; sink_stall_pct = stall_pct; pat = p; seed = $urandom;
    got = 0; n_done = 0;
    base_addr = base; num_beats = BEATS_W'(beats); start = 1;
    @(negedge clk);
    start = 0;
    while (n_done == 0 && c < 100000) begin
      @(negedge clk);
      c++;
    end
    cycles = c;
    repeat (3) @(negedge clk);
    check(n_done == 1, "done pulse");
    check(got == beats, $sformatf("beats delivered %0d != %0d", got, beats));
    check(!busy, "busy after done");
  endtask

  initial begin
    int cyc;
    start = 0; base_addr = '0; num_beats = '0; sel_slow = 0; pat = PAT_UNIFORM; seed = 1;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run(64'h0,          100, 1'b1, 30, PAT_UNIFORM, cyc);
    run(64'h10_0000,    37,  1'b1, 70, PAT_DARK, cyc);
    run(64'h4000_0000,  1,   1'b0, 0,  PAT_UNIFORM, cyc);
    run(64'h2000,       0,   1'b0, 0,  PAT_UNIFORM, cyc);
    // Rate: 500 beats with no stalls anywhere.
    run(64'h8_0000,     500, 1'b0, 0,  PAT_UNIFORM, cyc);
    check(cyc <= 500 + 4, $sformatf("rate: %0d cycles for 500 beats", cyc));
    check(n_stalls > 0 && sink_stalls > 0 && long_bursts > 0, "stall or burst split never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
