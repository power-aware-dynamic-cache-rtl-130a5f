// pac_l2_top: power-aware dynamically partitioned L2 for a two-core building
// block.
//
// Two cores share one highly associative L2. Every way belongs to one of
// the cores; the boundary (virtual partition) moves at run time towards the
// core whose accesses show the lower locality, and inside each core's area
// ways whose capacity is not needed are switched off. Locality is measured as
// D = LRU hits / MRU hits over a sampling interval of INTERVAL L2 accesses
// (at most 2^N, by default 2^N).
//
// Data path of the control loop:
//   l2_tag_array   looks the request up in the ways its core may use and
//                  reports hit / miss and MRU / LRU hits
//   access_monitor counts those per core and closes an interval every
//                  INTERVAL accesses
//   cache_ctrl     dividers, comparators and the two asymmetric state machines
//                  turn the counts into NALLOC0, NACT0 and NACT1
//   way_manager    applies allocation (unless both cores already have an
//                  inactive way) then power control, and produces the way
//                  masks and the set of ways to write back
//   l2_tag_array   writes back and invalidates those ways (requests stall)
//
// The thresholds t1 < t2 are inputs in the same N-bit fraction format as D
// (t = round(value * 2^N)); small thresholds make the cache
// performance-oriented, large ones energy-oriented. `part_en` selects the
// partitioned mode (1) or the conventional shared mode (0), a choice the
// operating system makes. `way_pwr` is the per-way supply enable for the
// power-gating switches, which are outside the digital design. The data
// array, the cores with their L1 caches and main memory are outside too:
// the response and write-back ports connect to them.
module pac_l2_top
  import pac_pkg::*;
#(
  parameter int unsigned WAYS       = 32,
  parameter int unsigned SETS       = 512,
  parameter int unsigned LINE_BYTES = 64,
  parameter int unsigned ADDR_W     = 32,
  parameter int unsigned N          = 16,
  parameter int unsigned INTERVAL   = 1 << N,
  parameter int unsigned SM_BITS    = 3,
  localparam int unsigned OFF_W = $clog2(LINE_BYTES),
  localparam int unsigned WAY_W = (WAYS > 1) ? $clog2(WAYS) : 1,
  localparam int unsigned POS_W = $clog2(WAYS + 1),
  localparam int unsigned CW    = $clog2(WAYS + 1)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    part_en,
  input  logic [N-1:0]            t1,
  input  logic [N-1:0]            t2,
  // L2 requests from the two cores (L1 misses and write-backs)
  input  logic                    req_vld,
  output logic                    req_ready,
  input  logic                    req_core,
  input  logic [ADDR_W-1:0]       req_addr,
  input  logic                    req_we,
  // response to the data array / cores
  output logic                    resp_vld,
  output logic                    resp_core,
  output logic                    resp_hit,
  output logic [WAY_W-1:0]        resp_way,
  output logic                    resp_fill,
  output logic [POS_W-1:0]        resp_pos,
  // write-back requests to main memory
  output logic                    wb_vld,
  output logic [ADDR_W-OFF_W-1:0] wb_addr,
  output logic                    wb_flush,
  // way state
  output logic [WAYS-1:0]         way_pwr,
  output logic [WAYS-1:0]         way_use0,
  output logic [WAYS-1:0]         way_use1,
  output logic [CW-1:0]           alloc0,
  output logic [CW-1:0]           alloc1,
  output logic [CW-1:0]           act0,
  output logic [CW-1:0]           act1,
  // controller observation
  output logic                    sample_vld,
  output logic [N-1:0]            d0,
  output logic [N-1:0]            d1,
  output logic                    cmd_vld,
  output resize_e                 nalloc0,
  output resize_e                 nact0,
  output resize_e                 nact1,
  output logic [SM_BITS-1:0]      state0,
  output logic [SM_BITS-1:0]      state1,
  output logic [N-1:0]            miss_count0,
  output logic [N-1:0]            miss_count1,
  output logic                    ev_alloc,
  output logic                    ev_alloc_skip,
  output logic                    busy
);

  logic            resp_mru, resp_lru;
  logic            flush_req;
  logic [WAYS-1:0] flush_mask;
  logic [N-1:0]    mru_count [2];
  logic [N-1:0]    lru_count [2];
  logic [N-1:0]    miss_count [2];

  l2_tag_array #(
    .WAYS(WAYS), .SETS(SETS), .LINE_BYTES(LINE_BYTES), .ADDR_W(ADDR_W)
  ) u_tags (
    .clk, .rst_n,
    .req_vld, .req_ready, .req_core, .req_addr, .req_we,
    .use0(way_use0), .use1(way_use1),
    .resp_vld, .resp_core, .resp_hit, .resp_way, .resp_fill, .resp_pos,
    .resp_mru, .resp_lru,
    .wb_vld, .wb_addr, .wb_flush,
    .flush_req, .flush_mask, .busy
  );

  access_monitor #(.N(N), .INTERVAL(INTERVAL)) u_mon (
    .clk, .rst_n,
    .acc_vld(resp_vld), .acc_core(resp_core), .acc_hit(resp_hit),
    .acc_mru(resp_mru), .acc_lru(resp_lru),
    .sample_vld, .mru_count, .lru_count, .miss_count
  );

  cache_ctrl #(.N(N), .SM_BITS(SM_BITS)) u_ctrl (
    .clk, .rst_n, .sample_vld,
    .mru_count0(mru_count[0]), .lru_count0(lru_count[0]),
    .mru_count1(mru_count[1]), .lru_count1(lru_count[1]),
    .t1, .t2,
    .nalloc0, .nact0, .nact1, .cmd_vld, .d0, .d1, .state0, .state1
  );

  way_manager #(.WAYS(WAYS)) u_ways (
    .clk, .rst_n, .part_en, .cmd_vld, .nalloc0, .nact0, .nact1,
    .alloc0, .alloc1, .act0, .act1,
    .use0(way_use0), .use1(way_use1), .pwr(way_pwr),
    .flush_req, .flush_mask, .ev_alloc, .ev_alloc_skip
  );

  assign miss_count0 = miss_count[0];
  assign miss_count1 = miss_count[1];

endmodule
