// tb_pac_l2_full: end-to-end test of the partitioned L2 at its default size
// (32 ways, 512 sets, 64-byte lines, 32-bit addresses, sampling intervals of
// 2^16 accesses). The top is instantiated with no parameter overrides; pac_env
// drives it through shared mode, partitioned mode under two threshold
// settings and back, 9 sampling intervals per phase, checking every response,
// every controller decision and every flush against its model.
module tb_pac_l2_full;
  import pac_pkg::*;
  localparam int unsigned WAYS = 32, SETS = 512, LB = 64, AW = 32, N = 16;
  localparam int unsigned OFF_W = $clog2(LB);
  localparam int unsigned WAY_W = $clog2(WAYS);
  localparam int unsigned POS_W = $clog2(WAYS + 1);
  localparam int unsigned CW    = $clog2(WAYS + 1);

  logic clk, rst_n, part_en, req_vld, req_ready, req_core, req_we;
  logic [N-1:0] t1, t2, d0, d1, miss_count0, miss_count1;
  logic [AW-1:0] req_addr;
  logic resp_vld, resp_core, resp_hit, resp_fill, wb_vld, wb_flush;
  logic [WAY_W-1:0] resp_way;
  logic [POS_W-1:0] resp_pos;
  logic [AW-OFF_W-1:0] wb_addr;
  logic [WAYS-1:0] way_pwr, way_use0, way_use1;
  logic [CW-1:0] alloc0, alloc1, act0, act1;
  logic sample_vld, cmd_vld, ev_alloc, ev_alloc_skip, busy;
  resize_e nalloc0, nact0, nact1;
  logic [2:0] state0, state1;

  pac_l2_top  dut (.*);

  pac_env #(.WAYS(WAYS), .SETS(SETS), .LINE_BYTES(LB), .ADDR_W(AW), .N(N), .PHASE_INT(9), .MAX_CYCLES(4000000)) env (.*);
endmodule
