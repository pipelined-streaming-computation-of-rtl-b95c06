// pipe_fifo: the pipe that links an R_Data reader to the Hist kernel.
//
// A blocking FIFO: the writer stalls while the FIFO is full (write_pipe_block)
// and the reader stalls while it is empty (read_pipe_block). It is a circular
// buffer of DEPTH words with read and write pointers one bit wider than the
// index, so full and empty are told apart by the extra bit. Both sides use a
// valid/ready handshake; a word is moved on a clock edge where valid and ready
// are both high. in_ready depends only on the fill state, and out_valid is high
// while the FIFO holds a word, so one word per cycle can flow through.
// Latency: a word written in cycle t can be read in cycle t+1.
// The depth is this implementation's choice; the design only requires a pipe.
module pipe_fifo #(
  parameter int unsigned WIDTH = hist_pkg::BUS_W,
  parameter int unsigned DEPTH = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  // write side
  input  logic             in_valid,
  input  logic [WIDTH-1:0] in_data,
  output logic             in_ready,
  // read side
  output logic             out_valid,
  output logic [WIDTH-1:0] out_data,
  input  logic             out_ready,
  output logic [$clog2(DEPTH):0] level
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0] wr_ptr, rd_ptr;
  logic push, pop;

  assign level     = wr_ptr - rd_ptr;
  assign in_ready  = (level != (AW+1)'(DEPTH));
  assign out_valid = (level != '0);
  assign out_data  = mem[rd_ptr[AW-1:0]];
  assign push      = in_valid && in_ready;
  assign pop       = out_valid && out_ready;

  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr[AW-1:0]] <= in_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
    end else begin
      if (push) wr_ptr <= wr_ptr + 1'b1;
      if (pop)  rd_ptr <= rd_ptr + 1'b1;
    end
  end

  initial assert (DEPTH >= 2 && (DEPTH & (DEPTH - 1)) == 0)
    else $error("pipe_fifo: DEPTH must be a power of two");

  // The level never goes past DEPTH.
  assert property (@(posedge clk) disable iff (!rst_n) level <= (AW+1)'(DEPTH));

endmodule
