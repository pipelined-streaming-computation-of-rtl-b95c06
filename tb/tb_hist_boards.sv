// tb_hist_boards: the smaller board configurations on the full data set.
//
// Runs the 33,554,432-pixel random data set on a one-port build (a single
// 512-bit memory port: 64 pixels per cycle) and on a two-port build (128
// pixels per cycle), side by side. Each must give the exact histogram in
// BIN_SIZE + n/(64*ports) + BIN_SIZE + a few cycles. A third one-port build
// counts 1,048,576 pixels into 64 bins of width four (BIN_SHIFT = 2), and a
// fourth one-port build with a single bin table per pixel position
// (THREADS = 1) must take two cycles per vector for 1,048,576 pixels.
module tb_hist_boards;
  logic clk = 1'b0, rst_n = 1'b0, go = 1'b0;
  logic fin1, fin2, fin3, fin4;
  int c1, f1, cy1, c2, f2, cy2, c3, f3, cy3, c4, f4, cy4;
  int checks = 0, failures = 0;

  tb_hist_run #(.NUM_PORTS(1)) u_one (.clk, .rst_n, .go, .finished(fin1), .checks(c1), .failures(f1), .cycles(cy1));
  tb_hist_run #(.NUM_PORTS(1), .N_PIXELS(1048576), .BIN_SHIFT(2)) u_w4 (.clk, .rst_n, .go, .finished(fin3), .checks(c3), .failures(f3), .cycles(cy3));
  tb_hist_run #(.NUM_PORTS(1), .N_PIXELS(1048576), .THREADS(1)) u_t1 (.clk, .rst_n, .go, .finished(fin4), .checks(c4), .failures(f4), .cycles(cy4));
  tb_hist_run #(.NUM_PORTS(2)) u_two (.clk, .rst_n, .go, .finished(fin2), .checks(c2), .failures(f2), .cycles(cy2));

  always #5 clk = ~clk;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    go = 1'b1;
    wait (fin1 && fin2 && fin3 && fin4);
    $display("1 port : %0d cycles for 33554432 pixels", cy1);
    $display("2 ports: %0d cycles for 33554432 pixels", cy2);
    $display("1 port, 64 bins of width 4: %0d cycles for 1048576 pixels", cy3);
    $display("1 port, one thread: %0d cycles for 1048576 pixels", cy4);
    checks = c1 + c2 + c3 + c4;
    failures = f1 + f2 + f3 + f4;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1200000) @(posedge clk);
    failures = f1 + f2 + f3 + f4 + 1;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c1 + c2 + c3 + c4, failures);
    $finish;
  end
endmodule
