// tb_bin_bank: self-checking test of one bin array.
//
// Clears the array, then applies random updates at the fastest legal rate
// (one every other cycle), with runs of the same bin to stress the
// read-after-write dependency, and random gaps. Afterwards every bin is read
// through the merge port (one-cycle read latency) and compared with a model.
module tb_bin_bank;
  localparam int unsigned BIN_SIZE = 256;
  localparam int unsigned COUNT_W  = 32;
  localparam int unsigned BW = $clog2(BIN_SIZE);

  logic clk = 1'b0, rst_n = 1'b0;
  logic upd_valid, clr_valid, rd_en;
  logic [BW-1:0] upd_bin, clr_addr, rd_addr;
  logic [COUNT_W-1:0] rd_data;
  int checks = 0, failures = 0;
  int unsigned model [BIN_SIZE];
  logic [BW-1:0] last_b = '0;

  bin_bank #(.BIN_SIZE(BIN_SIZE), .COUNT_W(COUNT_W)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic read_all(input string what);
    for (int b = 0; b < int'(BIN_SIZE); b++) begin
      @(negedge clk);
      rd_en = 1; rd_addr = BW'(b);
      @(negedge clk);
      rd_en = 0;
      check(rd_data == model[b], $sformatf("%s bin %0d: %0d != %0d", what, b, rd_data, model[b]));
      // The read value holds while no new read is issued.
      @(negedge clk);
      check(rd_data == model[b], "read data not held");
    end
  endtask

  initial begin
    upd_valid = 0; clr_valid = 0; rd_en = 0; upd_bin = '0; clr_addr = '0; rd_addr = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int round = 0; round < 2; round++) begin
      // Clear phase.
      for (int b = 0; b < int'(BIN_SIZE); b++) begin
        @(negedge clk);
        clr_valid = 1; clr_addr = BW'(b); model[b] = 0;
      end
      @(negedge clk);
      clr_valid = 0;
      read_all("after clear");
      // Updates: one every other cycle, sometimes with a longer gap.
      for (int i = 0; i < 3000; i++) begin
        logic [BW-1:0] b;
        b = ($urandom_range(3) == 0) ? last_b : BW'($urandom_range(BIN_SIZE - 1));
        if (round == 1) b = BW'($urandom_range(3));
        @(negedge clk);
        upd_valid = 1; upd_bin = b; model[b]++; last_b = b;
        @(negedge clk);
        upd_valid = 0;
        upd_bin = BW'($urandom_range(BIN_SIZE - 1));  // idle bus carries junk
        if ($urandom_range(9) == 0) @(negedge clk);
      end
      @(negedge clk);
      read_all("after updates");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
