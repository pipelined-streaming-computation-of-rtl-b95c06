// rdata_kernel: the R_Data kernel of one memory port.
//
// It streams num_beats consecutive bus words (512-bit int16 vectors) from
// global memory, starting at byte address base_addr, into its pipe. Reads are
// issued as bursts of up to MAX_BURST beats on an AXI-style read-address
// channel (ar_valid/ar_ready with ar_addr and ar_len = beats - 1) and the
// data returns in order on a read-data channel (r_valid/r_ready). Returned
// words go straight to the pipe: out_data is a wire from r_data, with no
// register on the data path, and r_ready follows the pipe's in_ready, so a
// full pipe stalls the memory (a blocking pipe write). With a memory that
// answers every cycle and a pipe that never fills, the kernel delivers one
// vector per clock cycle (initiation interval 1).
// start is a one-cycle pulse; done pulses one cycle after the last beat has
// been pushed. Burst length and the address/data channel split are this
// implementation's choices.
module rdata_kernel #(
  parameter int unsigned BUS_W     = hist_pkg::BUS_W,
  parameter int unsigned ADDR_W    = hist_pkg::ADDR_W,
  parameter int unsigned LEN_W     = hist_pkg::LEN_W,
  parameter int unsigned BEATS_W   = hist_pkg::BEATS_W,
  parameter int unsigned MAX_BURST = 64
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic [ADDR_W-1:0]  base_addr,
  input  logic [BEATS_W-1:0] num_beats,
  output logic               busy,
  output logic               done,
  // read address channel
  output logic               ar_valid,
  input  logic               ar_ready,
  output logic [ADDR_W-1:0]  ar_addr,
  output logic [LEN_W-1:0]   ar_len,
  // read data channel
  input  logic               r_valid,
  output logic               r_ready,
  input  logic [BUS_W-1:0]   r_data,
  // pipe write side
  output logic               out_valid,
  input  logic               out_ready,
  output logic [BUS_W-1:0]   out_data
);
  localparam int unsigned BYTES_PER_BEAT = BUS_W / 8;

  logic [BEATS_W-1:0] req_left;   // beats not yet requested
  logic [BEATS_W-1:0] rsp_left;   // beats not yet pushed into the pipe
  logic [ADDR_W-1:0]  next_addr;
  logic [BEATS_W-1:0] burst;

  assign burst = (req_left > BEATS_W'(MAX_BURST)) ? BEATS_W'(MAX_BURST) : req_left;

  // Read data is forwarded into the pipe.
  assign out_valid = busy && r_valid;
  assign out_data  = r_data;
  assign r_ready   = busy && out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      done      <= 1'b0;
      req_left  <= '0;
      rsp_left  <= '0;
      next_addr <= '0;
      ar_valid  <= 1'b0;
      ar_addr   <= '0;
      ar_len    <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy      <= (num_beats != '0);
        done      <= (num_beats == '0);
        req_left  <= num_beats;
        rsp_left  <= num_beats;
        next_addr <= base_addr;
      end else if (busy) begin
        // Address channel: one burst request at a time.
        if (ar_valid && ar_ready) ar_valid <= 1'b0;
        if ((!ar_valid || ar_ready) && req_left != '0) begin
          ar_valid  <= 1'b1;
          ar_addr   <= next_addr;
          ar_len    <= LEN_W'(burst - 1'b1);
          next_addr <= next_addr + ADDR_W'(burst) * ADDR_W'(BYTES_PER_BEAT);
          req_left  <= req_left - burst;
        end
        // Data channel.
        if (r_valid && r_ready) begin
          rsp_left <= rsp_left - 1'b1;
          if (rsp_left == BEATS_W'(1)) begin
            busy <= 1'b0;
            done <= 1'b1;
          end
        end
      end
    end
  end

  initial assert (MAX_BURST >= 1 && MAX_BURST <= (1 << LEN_W))
    else $error("rdata_kernel: MAX_BURST does not fit the burst length field");

  // AXI rule: a request is held stable until accepted.
  assert property (@(posedge clk) disable iff (!rst_n)
                   ar_valid && !ar_ready |=> ar_valid && $stable(ar_addr) && $stable(ar_len));

endmodule
