// result_copy: copies the merged histogram into global memory.
//
// This is the hardware of the work-group copy that ends the Hist kernel: the
// final bin counts arrive one per cycle, in bin order, on a valid/ready
// stream. They are packed CPB = BUS_W/COUNT_W at a time (16 32-bit counts in
// a 512-bit word) and each full word is written with one bus write, bin i
// landing at byte address base_addr + 4*i, so the result is an int array in
// memory. start (a one-cycle pulse, with base_addr) arms the block; done
// pulses for one cycle after the write of the last word has been accepted.
// The write channel is a single address+data valid/ready channel. Timing: a
// word is offered on the cycle after its last count is accepted; with
// wr_ready high the copy of BIN_SIZE bins takes BIN_SIZE cycles plus one.
// Packing into full bus words is this implementation's choice.
module result_copy #(
  parameter int unsigned BIN_SIZE = hist_pkg::BIN_SIZE,
  parameter int unsigned COUNT_W  = hist_pkg::COUNT_W,
  parameter int unsigned BUS_W    = hist_pkg::BUS_W,
  parameter int unsigned ADDR_W   = hist_pkg::ADDR_W,
  localparam int unsigned BW = $clog2(BIN_SIZE)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic [ADDR_W-1:0]  base_addr,
  // merged bins, in bin order
  input  logic               in_valid,
  output logic               in_ready,
  input  logic [BW-1:0]      in_bin,
  input  logic [COUNT_W-1:0] in_count,
  // memory write channel
  output logic               wr_valid,
  input  logic               wr_ready,
  output logic [ADDR_W-1:0]  wr_addr,
  output logic [BUS_W-1:0]   wr_data,
  output logic               done
);
  localparam int unsigned CPB      = BUS_W / COUNT_W;      // counts per bus word
  localparam int unsigned NWORDS   = (BIN_SIZE + CPB - 1) / CPB;
  localparam int unsigned LW       = (CPB > 1) ? $clog2(CPB) : 1;
  localparam int unsigned WW       = (NWORDS > 1) ? $clog2(NWORDS) + 1 : 2;
  localparam int unsigned BYTES_PER_WORD = BUS_W / 8;

  logic [ADDR_W-1:0]  base_q;
  logic [COUNT_W-1:0] pack [CPB];
  logic [LW-1:0]      lane;
  logic [WW-1:0]      words_written;
  logic [WW-1:0]      word_idx;
  logic               last_lane, take, wr_fire;

  assign last_lane = (int'(lane) == CPB - 1) || (int'(in_bin) == BIN_SIZE - 1);
  assign in_ready  = !last_lane || !wr_valid || wr_ready;
  assign take      = in_valid && in_ready;
  assign wr_fire   = wr_valid && wr_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      base_q        <= '0;
      lane          <= '0;
      word_idx      <= '0;
      words_written <= '0;
      wr_valid      <= 1'b0;
      wr_addr       <= '0;
      wr_data       <= '0;
      done          <= 1'b0;
      for (int k = 0; k < CPB; k++) pack[k] <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        base_q        <= base_addr;
        lane          <= '0;
        word_idx      <= '0;
        words_written <= '0;
        for (int k = 0; k < CPB; k++) pack[k] <= '0;
      end else begin
        if (wr_fire) begin
          wr_valid      <= 1'b0;
          words_written <= words_written + 1'b1;
          if (int'(words_written) == NWORDS - 1) done <= 1'b1;
        end
        if (take) begin
          if (last_lane) begin
            // Emit the full word, including the count just taken.
            wr_valid <= 1'b1;
            wr_addr  <= base_q + ADDR_W'(word_idx) * ADDR_W'(BYTES_PER_WORD);
            for (int k = 0; k < CPB; k++)
              wr_data[k*COUNT_W +: COUNT_W] <= (k == int'(lane)) ? in_count : pack[k];
            word_idx <= word_idx + 1'b1;
            lane     <= '0;
            for (int k = 0; k < CPB; k++) pack[k] <= '0;
          end else begin
            pack[lane] <= in_count;
            lane       <= lane + 1'b1;
          end
        end
      end
    end
  end

  // Bins must come in order: the lane tracks the low bits of the bin index.
  assert property (@(posedge clk) disable iff (!rst_n)
                   in_valid |-> (int'(in_bin) % CPB) == int'(lane))
    else $error("result_copy: bins out of order");

endmodule
