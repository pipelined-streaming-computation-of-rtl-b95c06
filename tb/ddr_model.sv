// ddr_model: behavioural model of one off-chip memory bank, read side only.
//
// Not synthesizable logic: it stands in for a DRAM bank and its controller in
// the testbenches. Read requests (ar_addr, ar_len = beats - 1) are queued;
// the bursts are answered in order, one BUS_W-bit beat per cycle, except in
// cycles where a random draw (STALL_PCT percent) holds r_valid low. Beat data
// is generated from the byte address by tb_data_pkg::pixel, so no storage is
// needed. ar_ready is also withheld at random. Counters report requests,
// beats and stall cycles.
module ddr_model #(
  parameter int unsigned BUS_W     = 512,
  parameter int unsigned ADDR_W    = 64,
  parameter int unsigned LEN_W     = 8,
  parameter int unsigned STALL_PCT = 0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  tb_data_pkg::pattern_e pat,
  input  logic [31:0]       seed,
  input  logic              ar_valid,
  output logic              ar_ready,
  input  logic [ADDR_W-1:0] ar_addr,
  input  logic [LEN_W-1:0]  ar_len,
  output logic              r_valid,
  input  logic              r_ready,
  output logic [BUS_W-1:0]  r_data,
  output int unsigned       n_bursts,
  output int unsigned       n_beats,
  output int unsigned       n_stalls
);
  localparam int unsigned BYTES = BUS_W / 8;

  logic [ADDR_W-1:0] q_addr [$];
  int unsigned       q_len  [$];
  logic              go, ar_go;
  logic [ADDR_W-1:0] cur_addr;
  int unsigned       cur_left;

  assign ar_ready = ar_go;
  assign r_valid  = (cur_left != 0) && go;

  always_comb begin
    for (int b = 0; b < int'(BYTES); b++)
      r_data[b*8 +: 8] = tb_data_pkg::pixel(64'(cur_addr) + 64'(b), pat, seed);
  end

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q_addr.delete();
      q_len.delete();
      cur_addr <= '0;
      cur_left <= 0;
      go       <= 1'b0;
      ar_go    <= 1'b0;
      n_bursts <= 0;
      n_beats  <= 0;
      n_stalls <= 0;
    end else begin
      go    <= (int'($urandom_range(99)) >= int'(STALL_PCT));
      ar_go <= (int'($urandom_range(99)) >= int'(STALL_PCT));
      if (ar_valid && ar_ready) begin
        q_addr.push_back(ar_addr);
        q_len.push_back(int'(ar_len) + 1);
        n_bursts <= n_bursts + 1;
      end
      if (cur_left != 0 && !go) n_stalls <= n_stalls + 1;
      if (r_valid && r_ready) begin
        n_beats <= n_beats + 1;
        if (cur_left == 1 && q_addr.size() != 0) begin
          cur_addr <= q_addr.pop_front();
          cur_left <= q_len.pop_front();
        end else begin
          cur_addr <= cur_addr + ADDR_W'(BYTES);
          cur_left <= cur_left - 1;
        end
      end else if (cur_left == 0 && q_addr.size() != 0) begin
        cur_addr <= q_addr.pop_front();
        cur_left <= q_len.pop_front();
      end
    end
  end

endmodule
