// hist_kernel: the Hist kernel, consuming NUM_PORTS pipes of pixel vectors.
//
// Every pipe carries BUS_W-bit vectors of LANES = BUS_W/PIX_W pixels. A
// pixel's bin index is its value (BIN_SHIFT = 0, 256 bins of width one) or,
// for wider fixed-width bins, its value shifted right by BIN_SHIFT. A single bin array could be updated only
// every other cycle, because the read-modify-write of a bin must finish
// before the next update may read it. The kernel therefore gives every pixel
// position of every pipe THREADS private bin arrays (bin_bank, one per
// hardware thread) and hands successive vectors to the threads in turn. With
// THREADS = 2 each array is touched at most every other cycle, and the kernel
// takes one vector from every pipe on every cycle: NUM_PORTS*LANES pixels per
// cycle. The pipes are read in lock step, as one loop reads them all: a cycle
// in which any pipe is empty is a stall for all.
//
// Phases (hist_state_e): CLEAR writes zero into all BIN_SIZE bins of every
// array (BIN_SIZE cycles); ACCUM pops num_beats vectors from each pipe; the
// pipeline of an update is R_pipe (pop into a register), R_BRAM (bank read)
// and INC/W_BRAM (bank write), so one DRAIN cycle lets the last write land;
// MERGE reads bin i of every array, sums them in bin_merge and streams the
// sums to result_copy, which writes them to memory at res_base. done pulses
// when the last result word has been written. Timing with memory and pipes
// never stalling: about BIN_SIZE + num_beats + BIN_SIZE + a few cycles.
// With THREADS = 1 the kernel falls back to taking a vector every other cycle.
// Clearing by a BIN_SIZE-cycle loop and merging through a registered adder
// tree are this implementation's choices.
module hist_kernel
  import hist_pkg::hist_state_e;
#(
  parameter int unsigned NUM_PORTS = 4,
  parameter int unsigned BUS_W     = hist_pkg::BUS_W,
  parameter int unsigned PIX_W     = hist_pkg::PIX_W,
  parameter int unsigned THREADS   = 2,
  parameter int unsigned BIN_SIZE  = hist_pkg::BIN_SIZE,
  parameter int unsigned BIN_SHIFT = 0,
  parameter int unsigned COUNT_W   = hist_pkg::COUNT_W,
  parameter int unsigned ADDR_W    = hist_pkg::ADDR_W,
  parameter int unsigned BEATS_W   = hist_pkg::BEATS_W,
  localparam int unsigned LANES     = BUS_W / PIX_W,
  localparam int unsigned NUM_BANKS = NUM_PORTS * LANES * THREADS,
  localparam int unsigned BW        = $clog2(BIN_SIZE)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic [BEATS_W-1:0] num_beats,   // vectors to take from each pipe
  input  logic [ADDR_W-1:0]  res_base,    // byte address of the result array
  output logic               busy,
  output logic               done,
  output hist_state_e        state,
  // pipe read sides
  input  logic               in_valid [NUM_PORTS],
  output logic               in_ready [NUM_PORTS],
  input  logic [BUS_W-1:0]   in_data  [NUM_PORTS],
  // memory write channel for the result
  output logic               wr_valid,
  input  logic               wr_ready,
  output logic [ADDR_W-1:0]  wr_addr,
  output logic [BUS_W-1:0]   wr_data
);
  localparam int unsigned TW = (THREADS > 1) ? $clog2(THREADS) : 1;

  hist_state_e        state_d;
  logic [BW:0]        clr_cnt;
  logic [BEATS_W-1:0] beats_left;
  logic               all_valid, accept;

  // ---------------------------------------------------------------- R_pipe
  logic [BUS_W-1:0]   vec_q [NUM_PORTS];
  logic               vec_v;
  logic [TW-1:0]      sel, vec_sel;

  always_comb begin
    all_valid = 1'b1;
    for (int p = 0; p < NUM_PORTS; p++) all_valid &= in_valid[p];
  end

  // With a single thread the bank needs a free cycle between updates.
  assign accept = (state == hist_pkg::H_ACCUM) && (beats_left != '0) && all_valid &&
                  !(THREADS == 1 && vec_v);

  always_comb begin
    for (int p = 0; p < NUM_PORTS; p++) in_ready[p] = accept;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vec_v   <= 1'b0;
      sel     <= '0;
      vec_sel <= '0;
      for (int p = 0; p < NUM_PORTS; p++) vec_q[p] <= '0;
    end else begin
      vec_v <= accept;
      if (accept) begin
        for (int p = 0; p < NUM_PORTS; p++) vec_q[p] <= in_data[p];
        vec_sel <= sel;
        sel     <= (int'(sel) == THREADS - 1) ? '0 : sel + 1'b1;
      end
      if (state == hist_pkg::H_CLEAR) sel <= '0;
    end
  end

  // ------------------------------------------------------- merge addressing
  logic [BW:0]   m_addr;
  logic          m_issue, v1, merge_in_ready;
  logic [BW-1:0] v1_bin;

  assign m_issue = (state == hist_pkg::H_MERGE) && (m_addr != (BW+1)'(BIN_SIZE)) &&
                   (!v1 || merge_in_ready);

  // ----------------------------------------------------------- bin banks
  logic [COUNT_W-1:0] bank_q [NUM_BANKS];

  for (genvar p = 0; p < NUM_PORTS; p++) begin : g_port
    for (genvar l = 0; l < LANES; l++) begin : g_lane
      for (genvar t = 0; t < THREADS; t++) begin : g_thread
        bin_bank #(
          .BIN_SIZE (BIN_SIZE),
          .COUNT_W  (COUNT_W)
        ) u_bank (
          .clk       (clk),
          .rst_n     (rst_n),
          .upd_valid (vec_v && (int'(vec_sel) == t)),
          .upd_bin   (BW'(hist_pkg::find_index(32'(vec_q[p][l*PIX_W +: PIX_W]), BIN_SHIFT))),
          .clr_valid (state == hist_pkg::H_CLEAR),
          .clr_addr  (clr_cnt[BW-1:0]),
          .rd_en     (m_issue),
          .rd_addr   (m_addr[BW-1:0]),
          .rd_data   (bank_q[(p*LANES + l)*THREADS + t])
        );
      end
    end
  end

  // ----------------------------------------------------------- merge + copy
  logic               mrg_valid, mrg_ready, copy_done;
  logic [BW-1:0]      mrg_bin;
  logic [COUNT_W-1:0] mrg_count;

  bin_merge #(
    .NUM_BANKS (NUM_BANKS),
    .BIN_SIZE  (BIN_SIZE),
    .COUNT_W   (COUNT_W)
  ) u_merge (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (v1),
    .in_ready  (merge_in_ready),
    .in_bin    (v1_bin),
    .in_counts (bank_q),
    .out_valid (mrg_valid),
    .out_ready (mrg_ready),
    .out_bin   (mrg_bin),
    .out_count (mrg_count)
  );

  result_copy #(
    .BIN_SIZE (BIN_SIZE),
    .COUNT_W  (COUNT_W),
    .BUS_W    (BUS_W),
    .ADDR_W   (ADDR_W)
  ) u_copy (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (state == hist_pkg::H_DRAIN),
    .base_addr (res_base),
    .in_valid  (mrg_valid),
    .in_ready  (mrg_ready),
    .in_bin    (mrg_bin),
    .in_count  (mrg_count),
    .wr_valid  (wr_valid),
    .wr_ready  (wr_ready),
    .wr_addr   (wr_addr),
    .wr_data   (wr_data),
    .done      (copy_done)
  );

  // ----------------------------------------------------------- control
  always_comb begin
    state_d = state;
    unique case (state)
      hist_pkg::H_IDLE:  if (start) state_d = hist_pkg::H_CLEAR;
      hist_pkg::H_CLEAR: if (clr_cnt == (BW+1)'(BIN_SIZE - 1)) state_d = hist_pkg::H_ACCUM;
      hist_pkg::H_ACCUM: if (beats_left == '0 && !vec_v) state_d = hist_pkg::H_DRAIN;
      hist_pkg::H_DRAIN: state_d = hist_pkg::H_MERGE;
      hist_pkg::H_MERGE: if (copy_done) state_d = hist_pkg::H_DONE;
      hist_pkg::H_DONE:  state_d = hist_pkg::H_IDLE;
      default: state_d = hist_pkg::H_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= hist_pkg::H_IDLE;
      clr_cnt    <= '0;
      beats_left <= '0;
      m_addr     <= '0;
      v1         <= 1'b0;
      v1_bin     <= '0;
    end else begin
      state <= state_d;
      if (state == hist_pkg::H_IDLE && start) begin
        clr_cnt    <= '0;
        beats_left <= num_beats;
      end
      if (state == hist_pkg::H_CLEAR) clr_cnt <= clr_cnt + 1'b1;
      if (accept) beats_left <= beats_left - 1'b1;
      if (state == hist_pkg::H_DRAIN) m_addr <= '0;
      if (m_issue) begin
        v1     <= 1'b1;
        v1_bin <= m_addr[BW-1:0];
        m_addr <= m_addr + 1'b1;
      end else if (merge_in_ready) begin
        v1 <= 1'b0;
      end
    end
  end

  assign busy = (state != hist_pkg::H_IDLE);
  assign done = (state == hist_pkg::H_DONE);

  initial assert (BUS_W % PIX_W == 0 && BIN_SHIFT < PIX_W && (1 << (PIX_W - BIN_SHIFT)) <= BIN_SIZE)
    else $error("hist_kernel: PIX_W must split BUS_W and index at most BIN_SIZE bins");

  // A pipe is only popped when every pipe has a vector.
  for (genvar p = 0; p < NUM_PORTS; p++) begin : g_chk
    assert property (@(posedge clk) disable iff (!rst_n) in_ready[p] |-> in_valid[p]);
  end

endmodule
