// tb_bin_merge: self-checking test of the bin-array adder.
//
// Offers all BIN_SIZE bins, each with NUM_BANKS random counts, with random
// gaps on the input and random backpressure on the output. Every output must
// be the sum of its counts, in bin order; with the output always ready the
// block must take one bin per cycle and answer one cycle later.
module tb_bin_merge;
  localparam int unsigned NUM_BANKS = 512;
  localparam int unsigned BIN_SIZE  = 256;
  localparam int unsigned COUNT_W   = 32;
  localparam int unsigned BW = $clog2(BIN_SIZE);

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid, in_ready, out_valid, out_ready;
  logic [BW-1:0] in_bin, out_bin;
  logic [COUNT_W-1:0] in_counts [NUM_BANKS];
  logic [COUNT_W-1:0] out_count;
  int checks = 0, failures = 0;
  logic [COUNT_W-1:0] exp_sum [$];
  logic [BW-1:0]      exp_bin [$];

  bin_merge #(.NUM_BANKS(NUM_BANKS), .BIN_SIZE(BIN_SIZE), .COUNT_W(COUNT_W)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // Output side monitor.
  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      check(exp_bin.size() != 0, "unexpected output");
      if (exp_bin.size() != 0) begin
        check(out_bin == exp_bin[0], $sformatf("bin order: %0d != %0d", out_bin, exp_bin[0]));
        check(out_count == exp_sum[0], $sformatf("bin %0d sum %0d != %0d", out_bin, out_count, exp_sum[0]));
        void'(exp_bin.pop_front());
        void'(exp_sum.pop_front());
      end
    end
  end

  task automatic run(input int gap_pct, input int stall_pct, input bit big);
    int b = 0;
    bit fire;
    while (b < int'(BIN_SIZE)) begin
      logic [COUNT_W-1:0] s;
      @(negedge clk);
      out_ready = ($urandom_range(99) >= stall_pct);
      in_valid  = ($urandom_range(99) >= gap_pct);
      s = '0;
      in_bin = BW'(b);
      for (int k = 0; k < int'(NUM_BANKS); k++) begin
        in_counts[k] = big ? $urandom : COUNT_W'($urandom_range(100000));
        s += in_counts[k];
      end
      #1;
      fire = in_valid && in_ready;
      @(posedge clk);
      if (fire) begin
        exp_bin.push_back(BW'(b));
        exp_sum.push_back(s);
        b++;
      end
    end
    @(negedge clk);
    in_valid = 0; out_ready = 1;
    repeat (4) @(posedge clk);
  endtask

  initial begin
    int t0, t1;
    in_valid = 0; out_ready = 0; in_bin = '0;
    for (int k = 0; k < int'(NUM_BANKS); k++) in_counts[k] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run(30, 30, 1'b0);
    run(10, 60, 1'b1);
    // Rate: with no gaps and no backpressure, 256 bins take 256 cycles.
    t0 = $time;
    run(0, 0, 1'b0);
    t1 = $time;
    check((t1 - t0) / 10 <= int'(BIN_SIZE) + 8, $sformatf("merge rate: %0d cycles", (t1 - t0) / 10));
    check(exp_bin.size() == 0, "outputs missing");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
