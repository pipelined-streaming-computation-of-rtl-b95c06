// hist_top: streaming 256-bin histogram accelerator with several memory ports.
//
// The input image is split over NUM_PORTS memory banks. For each bank an
// R_Data reader (R_Data) burst-reads num_beats 512-bit vectors of 64 8-bit
// pixels and pushes them into its own pipe (pipe_fifo). One Hist kernel
// (hist_kernel) pops a vector from every pipe per cycle and counts the
// NUM_PORTS*64 pixels in NUM_PORTS*64*THREADS private bin arrays, then sums
// the arrays bin by bin and writes the 256 32-bit counts to res_base through
// the write channel. Defaults: 4 ports, int16 (512-bit) vectors, two threads
// per pixel position (hiding the two-cycle read-modify-write of a bin), 256
// bins: 256 pixels per clock cycle when memory keeps up. BIN_SHIFT > 0 makes
// the bins 2**BIN_SHIFT values wide (e.g. 64 bins of width four with
// BIN_SHIFT = 2 and BIN_SIZE = 64).
//
// Interface: start is a one-cycle pulse sampled while busy is low, with
// rd_base[p] (byte address of bank p's data), num_beats (vectors per bank,
// the same for every bank) and res_base. done pulses for one cycle when the
// result is in memory. Each port has an AXI-style read-address channel
// (ar_*, ar_len = beats - 1) and an in-order read-data channel (r_*); the
// result leaves on a combined address/data write channel (wr_*).
// Pipe depth and burst length are this implementation's choices.
module hist_top
  import hist_pkg::hist_state_e;
#(
  parameter int unsigned NUM_PORTS  = 4,
  parameter int unsigned BUS_W      = hist_pkg::BUS_W,
  parameter int unsigned PIX_W      = hist_pkg::PIX_W,
  parameter int unsigned THREADS    = 2,
  parameter int unsigned BIN_SIZE   = hist_pkg::BIN_SIZE,
  parameter int unsigned BIN_SHIFT  = 0,
  parameter int unsigned COUNT_W    = hist_pkg::COUNT_W,
  parameter int unsigned ADDR_W     = hist_pkg::ADDR_W,
  parameter int unsigned LEN_W      = hist_pkg::LEN_W,
  parameter int unsigned BEATS_W    = hist_pkg::BEATS_W,
  parameter int unsigned PIPE_DEPTH = 16,
  parameter int unsigned MAX_BURST  = 64
) (
  input  logic               clk,
  input  logic               rst_n,
  // control
  input  logic               start,
  input  logic [ADDR_W-1:0]  rd_base [NUM_PORTS],
  input  logic [BEATS_W-1:0] num_beats,
  input  logic [ADDR_W-1:0]  res_base,
  output logic               busy,
  output logic               done,
  output hist_state_e        state,      // phase of the Hist kernel
  // read ports, one per memory bank
  output logic               ar_valid [NUM_PORTS],
  input  logic               ar_ready [NUM_PORTS],
  output logic [ADDR_W-1:0]  ar_addr  [NUM_PORTS],
  output logic [LEN_W-1:0]   ar_len   [NUM_PORTS],
  input  logic               r_valid  [NUM_PORTS],
  output logic               r_ready  [NUM_PORTS],
  input  logic [BUS_W-1:0]   r_data   [NUM_PORTS],
  // result write port
  output logic               wr_valid,
  input  logic               wr_ready,
  output logic [ADDR_W-1:0]  wr_addr,
  output logic [BUS_W-1:0]   wr_data
);
  logic             launch;
  logic             pipe_in_valid  [NUM_PORTS];
  logic             pipe_in_ready  [NUM_PORTS];
  logic [BUS_W-1:0] pipe_in_data   [NUM_PORTS];
  logic             pipe_out_valid [NUM_PORTS];
  logic             pipe_out_ready [NUM_PORTS];
  logic [BUS_W-1:0] pipe_out_data  [NUM_PORTS];

  assign launch = start && !busy;

  for (genvar p = 0; p < NUM_PORTS; p++) begin : g_port
    rdata_kernel #(
      .BUS_W     (BUS_W),
      .ADDR_W    (ADDR_W),
      .LEN_W     (LEN_W),
      .BEATS_W   (BEATS_W),
      .MAX_BURST (MAX_BURST)
    ) u_rdata (
      .clk       (clk),
      .rst_n     (rst_n),
      .start     (launch),
      .base_addr (rd_base[p]),
      .num_beats (num_beats),
      .busy      (),
      .done      (),
      .ar_valid  (ar_valid[p]),
      .ar_ready  (ar_ready[p]),
      .ar_addr   (ar_addr[p]),
      .ar_len    (ar_len[p]),
      .r_valid   (r_valid[p]),
      .r_ready   (r_ready[p]),
      .r_data    (r_data[p]),
      .out_valid (pipe_in_valid[p]),
      .out_ready (pipe_in_ready[p]),
      .out_data  (pipe_in_data[p])
    );

    pipe_fifo #(
      .WIDTH (BUS_W),
      .DEPTH (PIPE_DEPTH)
    ) u_pipe (
      .clk       (clk),
      .rst_n     (rst_n),
      .in_valid  (pipe_in_valid[p]),
      .in_data   (pipe_in_data[p]),
      .in_ready  (pipe_in_ready[p]),
      .out_valid (pipe_out_valid[p]),
      .out_data  (pipe_out_data[p]),
      .out_ready (pipe_out_ready[p]),
      .level     ()
    );
  end

  hist_kernel #(
    .NUM_PORTS (NUM_PORTS),
    .BUS_W     (BUS_W),
    .PIX_W     (PIX_W),
    .THREADS   (THREADS),
    .BIN_SIZE  (BIN_SIZE),
    .BIN_SHIFT (BIN_SHIFT),
    .COUNT_W   (COUNT_W),
    .ADDR_W    (ADDR_W),
    .BEATS_W   (BEATS_W)
  ) u_hist (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (launch),
    .num_beats (num_beats),
    .res_base  (res_base),
    .busy      (busy),
    .done      (done),
    .state     (state),
    .in_valid  (pipe_out_valid),
    .in_ready  (pipe_out_ready),
    .in_data   (pipe_out_data),
    .wr_valid  (wr_valid),
    .wr_ready  (wr_ready),
    .wr_addr   (wr_addr),
    .wr_data   (wr_data)
  );

endmodule
