// bin_bank: the bin array of one hardware thread of the Hist kernel.
//
// BIN_SIZE counters of COUNT_W bits in one simple dual-port block RAM. An
// update (upd_valid with the pixel value upd_bin) is a read-modify-write in
// two steps: in the cycle it is presented the RAM reads the bin (R_BRAM), and
// in the next cycle the value read is incremented and written back
// (INC/W_BRAM). The following update may read the RAM only after that write,
// so a bank accepts at most one update every other cycle (initiation interval
// 2); callers reach one pixel per cycle by alternating between two banks,
// which is how the design hides this read-after-write dependency. The rule is
// checked by an assertion.
//
// Besides updates the bank has a clear port (clr_valid writes zero into
// clr_addr, used to initialise the array) and a read port for merging
// (rd_en reads rd_addr; rd_data is valid the next cycle and holds while rd_en
// is low). Updates, clears and merge reads are used in separate phases; the
// clear and merge ports are this implementation's way of initialising and
// reading the array.
module bin_bank #(
  parameter int unsigned BIN_SIZE = hist_pkg::BIN_SIZE,
  parameter int unsigned COUNT_W  = hist_pkg::COUNT_W,
  localparam int unsigned BW = $clog2(BIN_SIZE)
) (
  input  logic               clk,
  input  logic               rst_n,
  // update (accumulate) port
  input  logic               upd_valid,
  input  logic [BW-1:0]      upd_bin,
  // clear port
  input  logic               clr_valid,
  input  logic [BW-1:0]      clr_addr,
  // merge read port
  input  logic               rd_en,
  input  logic [BW-1:0]      rd_addr,
  output logic [COUNT_W-1:0] rd_data
);
  logic [COUNT_W-1:0] counters [BIN_SIZE];

  // RAM read port: shared by updates and merge reads.
  logic          ram_re;
  logic [BW-1:0] ram_raddr;
  logic [COUNT_W-1:0] ram_q;

  assign ram_re    = upd_valid || rd_en;
  assign ram_raddr = upd_valid ? upd_bin : rd_addr;

  always_ff @(posedge clk) begin
    if (ram_re) ram_q <= counters[ram_raddr];
  end
  assign rd_data = ram_q;

  // Second step of an update: increment and write back.
  logic          wb_valid;
  logic [BW-1:0] wb_bin;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wb_valid <= 1'b0;
      wb_bin   <= '0;
    end else begin
      wb_valid <= upd_valid;
      if (upd_valid) wb_bin <= upd_bin;
    end
  end

  // RAM write port: write-back of an update, or a clear.
  always_ff @(posedge clk) begin
    if (wb_valid)       counters[wb_bin]   <= ram_q + 1'b1;
    else if (clr_valid) counters[clr_addr] <= '0;
  end

  // Handshake rules of the bank.
  assert property (@(posedge clk) disable iff (!rst_n) upd_valid |-> !wb_valid)
    else $error("bin_bank: update accepted in two consecutive cycles (II must be 2)");
  assert property (@(posedge clk) disable iff (!rst_n) !((upd_valid || wb_valid) && (rd_en || clr_valid)))
    else $error("bin_bank: update overlaps a clear or merge read");

endmodule
