// bin_merge: adds one bin of every bin array into the final histogram value.
//
// The Hist kernel keeps NUM_BANKS private bin arrays. After all pixels have
// been counted, the final count of bin i is the sum of bin i over all arrays.
// This block takes the NUM_BANKS counts of one bin (in_counts, with its bin
// index in_bin) and produces their sum. The sum is a balanced binary adder
// tree of combinational adders followed by one output register; the whole
// block is a one-stage valid/ready pipeline that accepts one bin per cycle
// (initiation interval 1) when the output is free or being taken.
// Latency: a bin accepted in cycle t is presented at the output in cycle t+1.
// The bin-by-bin summation follows the design; the adder tree and its single
// register stage are this implementation's choice.
module bin_merge #(
  parameter int unsigned NUM_BANKS = 512,
  parameter int unsigned BIN_SIZE  = hist_pkg::BIN_SIZE,
  parameter int unsigned COUNT_W   = hist_pkg::COUNT_W,
  localparam int unsigned BW = $clog2(BIN_SIZE)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  output logic               in_ready,
  input  logic [BW-1:0]      in_bin,
  input  logic [COUNT_W-1:0] in_counts [NUM_BANKS],
  output logic               out_valid,
  input  logic               out_ready,
  output logic [BW-1:0]      out_bin,
  output logic [COUNT_W-1:0] out_count
);
  // Tree padded to a power of two; level 0 holds the inputs.
  localparam int unsigned LEVELS = (NUM_BANKS > 1) ? $clog2(NUM_BANKS) : 1;
  localparam int unsigned LEAVES = 1 << LEVELS;

  // Level l of the tree has LEAVES >> l sums; the root is g_lvl[LEVELS].s[0].
  for (genvar l = 0; l <= LEVELS; l++) begin : g_lvl
    logic [COUNT_W-1:0] s [LEAVES >> l];
    for (genvar k = 0; k < (LEAVES >> l); k++) begin : g_node
      if (l == 0) begin : g_leaf
        if (k < NUM_BANKS) begin : g_in
          assign s[k] = in_counts[k];
        end else begin : g_pad
          assign s[k] = '0;
        end
      end else begin : g_add
        assign s[k] = g_lvl[l-1].s[2*k] + g_lvl[l-1].s[2*k+1];
      end
    end
  end

  assign in_ready = !out_valid || out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_bin   <= '0;
      out_count <= '0;
    end else if (in_ready) begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_bin   <= in_bin;
        out_count <= g_lvl[LEVELS].s[0];
      end
    end
  end

endmodule
