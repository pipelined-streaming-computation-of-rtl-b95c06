// tb_pipe_fifo: self-checking test of the pipe FIFO.
//
// Random pushes and pops against a queue model: every word must come out in
// order, in_ready must drop exactly when DEPTH words are held, and a word
// pushed into an empty FIFO must be readable on the next cycle.
module tb_pipe_fifo;
  localparam int unsigned WIDTH = 512;
  localparam int unsigned DEPTH = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid, in_ready, out_valid, out_ready;
  logic [WIDTH-1:0] in_data, out_data;
  logic [$clog2(DEPTH):0] level;
  int checks = 0, failures = 0, full_seen = 0;
  logic [WIDTH-1:0] model [$];

  pipe_fifo #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  function automatic logic [WIDTH-1:0] rnd_word();
    logic [WIDTH-1:0] w;
    for (int k = 0; k < WIDTH / 32; k++) w[k*32 +: 32] = $urandom;
    return w;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    in_valid = 0; out_ready = 0; in_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // Latency: push one word into the empty FIFO, it is visible next cycle.
    @(negedge clk);
    in_valid = 1; in_data = rnd_word(); model.push_back(in_data);
    check(!out_valid, "empty FIFO shows valid");
    @(negedge clk);
    in_valid = 0;
    check(out_valid && out_data == model[0], "one-cycle latency");
    // Random traffic in three phases: fill-heavy, balanced, drain-heavy.
    for (int phase = 0; phase < 3; phase++) begin
      for (int i = 0; i < 2000; i++) begin
        @(negedge clk);
        in_valid  = ($urandom_range(99) < (phase == 0 ? 90 : phase == 1 ? 50 : 10));
        out_ready = ($urandom_range(99) < (phase == 0 ? 20 : phase == 1 ? 50 : 95));
        in_data   = rnd_word();
        check(in_ready == (model.size() < DEPTH), "in_ready vs fill level");
        check(out_valid == (model.size() != 0), "out_valid vs fill level");
        check(int'(level) == model.size(), "level");
        if (model.size() == DEPTH) full_seen++;
        if (out_valid && model.size() != 0) check(out_data == model[0], "data order");
        @(posedge clk);
        if (out_valid && out_ready) void'(model.pop_front());
        if (in_valid && in_ready) model.push_back(in_data);
      end
    end
    check(full_seen > 0, "FIFO was never full");
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
