// tb_pac_l2_top: end-to-end test of the partitioned L2 at reduced size
// (8 ways, 16 sets, 16-bit addresses, 8-bit counters). The sampling interval
// is 200 accesses, shorter than the 2^8 the counters allow, so the interval
// end is not a counter wrap; the full-size test covers the 2^N case.
// The design is driven and checked by pac_env, which models every part of it;
// see that file for what is checked and which mechanisms must occur.
module tb_pac_l2_top;
  import pac_pkg::*;
  localparam int unsigned WAYS = 8, SETS = 16, LB = 64, AW = 16, N = 8, IV = 200;
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

  pac_l2_top #(.WAYS(WAYS), .SETS(SETS), .LINE_BYTES(LB), .ADDR_W(AW), .N(N), .INTERVAL(IV)) dut (.*);

  pac_env #(.WAYS(WAYS), .SETS(SETS), .LINE_BYTES(LB), .ADDR_W(AW), .N(N), .INTERVAL(IV), .PHASE_INT(12), .MAX_CYCLES(200000)) env (.*);
endmodule
