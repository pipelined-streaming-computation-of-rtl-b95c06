// tb_result_copy: self-checking test of the result copy.
//
// Streams BIN_SIZE random counts in bin order with random input gaps and
// random write backpressure, collects the bus writes in a byte-addressed
// memory and checks that count i landed at base + 4*i, that every write is a
// whole aligned bus word, that done pulses once after the last write, and
// that with no stalls the copy takes BIN_SIZE + 1 cycles.
module tb_result_copy;
  localparam int unsigned BIN_SIZE = 256;
  localparam int unsigned COUNT_W  = 32;
  localparam int unsigned BUS_W    = 512;
  localparam int unsigned ADDR_W   = 64;
  localparam int unsigned BW = $clog2(BIN_SIZE);

  logic clk = 1'b0, rst_n = 1'b0;
  logic start, in_valid, in_ready, wr_valid, wr_ready, done;
  logic [ADDR_W-1:0] base_addr, wr_addr;
  logic [BW-1:0] in_bin;
  logic [COUNT_W-1:0] in_count;
  logic [BUS_W-1:0] wr_data;
  int checks = 0, failures = 0, n_writes = 0, n_done = 0;
  logic [COUNT_W-1:0] sent [BIN_SIZE];
  logic [COUNT_W-1:0] mem [logic [ADDR_W-1:0]];

  result_copy #(.BIN_SIZE(BIN_SIZE), .COUNT_W(COUNT_W), .BUS_W(BUS_W), .ADDR_W(ADDR_W)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  always @(posedge clk) begin
    if (rst_n && wr_valid && wr_ready) begin
      n_writes++;
      check(wr_addr % (BUS_W / 8) == 0, "unaligned write");
      for (int k = 0; k < int'(BUS_W / COUNT_W); k++)
        mem[wr_addr + ADDR_W'(4 * k)] = wr_data[k*COUNT_W +: COUNT_W];
    end
    if (rst_n && done) n_done++;
  end

  task automatic run(input logic [ADDR_W-1:0] base, input int gap_pct, input int stall_pct,
                     output int cycles);
    int b = 0, c = 0;
    mem.delete();
    n_writes = 0; n_done = 0;
    @(negedge clk);
    start = 1; base_addr = base;
    @(negedge clk);
    start = 0;
    while (n_done == 0 && c < 5000) begin
      bit fire;
      wr_ready = ($urandom_range(99) >= stall_pct);
      in_valid = (b < int'(BIN_SIZE)) && ($urandom_range(99) >= gap_pct);
      in_bin   = BW'(b);
      in_count = $urandom;
      #1;
      fire = in_valid && in_ready;
      if (fire) sent[b] = in_count;
      @(negedge clk);
      if (fire) b++;
      c++;
    end
    in_valid = 0;
    cycles = c;
    repeat (3) @(negedge clk);
    check(n_done == 1, $sformatf("done pulses: %0d", n_done));
    check(n_writes == int'(BIN_SIZE * COUNT_W / BUS_W), $sformatf("writes: %0d", n_writes));
    for (int i = 0; i < int'(BIN_SIZE); i++) begin
      logic [ADDR_W-1:0] a;
      a = base + ADDR_W'(4 * i);
      check(mem.exists(a) && mem[a] == sent[i], $sformatf("bin %0d at %0h", i, a));
    end
  endtask

  initial begin
    int cyc;
    start = 0; in_valid = 0; wr_ready = 0; base_addr = '0; in_bin = '0; in_count = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run(64'h1000, 30, 40, cyc);
    run(64'h0002_0000_0040, 5, 70, cyc);
    run(64'h8000, 0, 0, cyc);
    check(cyc <= int'(BIN_SIZE) + 2, $sformatf("copy rate: %0d cycles", cyc));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
