// l2_tag_array: directory of the partitioned, per-way power-gated shared L2.
//
// A WAYS-way set-associative directory (tags, valid and dirty bits, and a
// true-LRU stack per set) for an L2 shared by two cores. Each request carries
// its core number and is looked up only in the ways that core may use (use0 /
// use1, from the way manager): ways owned by the other core and switched-off
// ways are never hit nor filled. On a hit the response gives the hit's
// position in the LRU stack of the usable ways, flagging MRU (position 0)
// and LRU (last position) hits for the access monitor. On a miss the line is
// allocated at once: an invalid usable way if there is one, else the least
// recently used usable way; a dirty victim is written back. The filled or hit
// way becomes MRU of the whole set. A write marks the line dirty.
//
// Flush engine: when `flush_req` pulses, the directory walks all sets; for
// each set it writes back, one per cycle, every valid dirty line in the ways
// of `flush_mask`, then invalidates those ways in the set (one more cycle).
// After reset it walks all sets once to clear the valid bits and set up the
// LRU stacks (SETS cycles). While walking, `req_ready` is low; it is also low
// in the cycle of `flush_req`, so no access slips in before the walk.
//
// Timing: a request is taken when req_vld and req_ready are both high; its
// response is registered and appears with resp_vld in the next cycle, so one
// access per cycle is sustained. Write-backs appear on wb_vld / wb_addr (line
// address) as single-cycle pulses, without back-pressure. The data array and
// the refill path are outside this block: the response tells the data side
// which way to read or fill.
//
// Sizes follow the evaluated L2: 1024 kB, 32 ways, 64-byte lines, so 512
// sets. The 32-bit address, the allocation policy among invalid ways and the
// request handshake are this design's choices.
module l2_tag_array #(
  parameter int unsigned WAYS       = 32,
  parameter int unsigned SETS       = 512,
  parameter int unsigned LINE_BYTES = 64,
  parameter int unsigned ADDR_W     = 32,
  localparam int unsigned OFF_W  = $clog2(LINE_BYTES),
  localparam int unsigned IDX_W  = $clog2(SETS),
  localparam int unsigned TAG_W  = ADDR_W - OFF_W - IDX_W,
  localparam int unsigned RANK_W = $clog2(WAYS),
  localparam int unsigned WAY_W  = (WAYS > 1) ? $clog2(WAYS) : 1,
  localparam int unsigned POS_W  = $clog2(WAYS + 1)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // request from the cores' L1 side
  input  logic                    req_vld,
  output logic                    req_ready,
  input  logic                    req_core,
  input  logic [ADDR_W-1:0]       req_addr,
  input  logic                    req_we,
  // way permissions
  input  logic [WAYS-1:0]         use0,
  input  logic [WAYS-1:0]         use1,
  // response (one cycle after the request is taken)
  output logic                    resp_vld,
  output logic                    resp_core,
  output logic                    resp_hit,
  output logic [WAY_W-1:0]        resp_way,   // hit or filled way
  output logic                    resp_fill,  // a line was allocated
  output logic [POS_W-1:0]        resp_pos,   // LRU-stack position of a hit
  output logic                    resp_mru,
  output logic                    resp_lru,
  // write-back of dirty lines (line address)
  output logic                    wb_vld,
  output logic [ADDR_W-OFF_W-1:0] wb_addr,
  output logic                    wb_flush,   // write-back comes from a flush
  // flush control
  input  logic                    flush_req,
  input  logic [WAYS-1:0]         flush_mask,
  output logic                    busy
);

  typedef struct packed {
    logic [WAYS-1:0]              valid;
    logic [WAYS-1:0]              dirty;
    logic [WAYS-1:0][TAG_W-1:0]   tag;
    logic [WAYS-1:0][RANK_W-1:0]  rank;   // 0 = MRU, WAYS-1 = LRU
  } set_t;

  typedef enum logic [1:0] {ST_INIT, ST_IDLE, ST_FLUSH} state_e;

  set_t            mem [SETS];
  state_e          state;
  logic [IDX_W-1:0] fptr;
  logic [WAYS-1:0] fmask;

  // ---------------------------------------------------------------- access
  logic [IDX_W-1:0] r_idx;
  logic [TAG_W-1:0] r_tag;
  logic [WAYS-1:0]  perm, hitv, freev;
  set_t             cur, acc_set;
  logic             hit, any_free, req_fire, no_way;
  logic [WAY_W-1:0] hw, vw, tw;
  logic [POS_W-1:0] pos, nperm;
  logic             evict_wb;

  assign r_idx    = req_addr[OFF_W +: IDX_W];
  assign r_tag    = req_addr[ADDR_W-1 -: TAG_W];
  assign req_ready = (state == ST_IDLE) && !flush_req;
  assign req_fire  = req_vld && req_ready;
  assign busy      = (state != ST_IDLE);
  assign perm      = req_core ? use1 : use0;
  assign cur       = mem[busy ? fptr : r_idx];

  always_comb begin
    hitv  = '0;
    freev = '0;
    hw    = '0;
    vw    = '0;
    pos   = '0;
    nperm = '0;
    for (int w = 0; w < WAYS; w++) begin
      hitv[w]  = perm[w] && cur.valid[w] && (cur.tag[w] == r_tag);
      freev[w] = perm[w] && !cur.valid[w];
      if (perm[w]) nperm = nperm + 1'b1;
    end
    hit      = |hitv;
    any_free = |freev;
    no_way   = (perm == '0);
    // hit way (at most one)
    for (int w = WAYS - 1; w >= 0; w--)
      if (hitv[w]) hw = WAY_W'(w);
    // victim: lowest free usable way, else the oldest usable way
    if (any_free) begin
      for (int w = WAYS - 1; w >= 0; w--)
        if (freev[w]) vw = WAY_W'(w);
    end else begin
      for (int w = 0; w < WAYS; w++)
        if (perm[w] && (perm[vw] == 1'b0 || cur.rank[w] > cur.rank[vw])) vw = WAY_W'(w);
    end
    // LRU-stack position of the hit among the usable valid ways
    for (int w = 0; w < WAYS; w++)
      if (perm[w] && cur.valid[w] && cur.rank[w] < cur.rank[hw]) pos = pos + 1'b1;
  end

  assign tw       = hit ? hw : vw;
  assign evict_wb = !hit && !no_way && cur.valid[vw] && cur.dirty[vw];

  always_comb begin
    acc_set = cur;
    if (!no_way) begin
      // true-LRU update: everything younger than the touched way ages by one
      for (int w = 0; w < WAYS; w++)
        if (cur.rank[w] < cur.rank[tw]) acc_set.rank[w] = cur.rank[w] + 1'b1;
      acc_set.rank[tw] = '0;
      if (hit) begin
        if (req_we) acc_set.dirty[tw] = 1'b1;
      end else begin
        acc_set.valid[tw] = 1'b1;
        acc_set.dirty[tw] = req_we;
        acc_set.tag[tw]   = r_tag;
      end
    end
  end

  // ---------------------------------------------------------------- walks
  logic [WAYS-1:0]  pend;
  logic [WAY_W-1:0] pw;
  set_t             init_set, flush_set;

  always_comb begin
    pend = cur.valid & cur.dirty & fmask;
    pw   = '0;
    for (int w = WAYS - 1; w >= 0; w--)
      if (pend[w]) pw = WAY_W'(w);
    flush_set = cur;
    if (pend != '0) begin
      flush_set.dirty[pw] = 1'b0;
    end else begin
      flush_set.valid = cur.valid & ~fmask;
      flush_set.dirty = cur.dirty & ~fmask;
    end
    init_set = '0;
    for (int w = 0; w < WAYS; w++) init_set.rank[w] = RANK_W'(w);
  end

  // ---------------------------------------------------------------- state
  always_ff @(posedge clk) begin
    if (state == ST_INIT)
      mem[fptr] <= init_set;
    else if (state == ST_FLUSH && !flush_req)
      mem[fptr] <= flush_set;
    else if (req_fire)
      mem[r_idx] <= acc_set;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= ST_INIT;
      fptr      <= '0;
      fmask     <= '0;
      resp_vld  <= 1'b0;
      resp_core <= 1'b0;
      resp_hit  <= 1'b0;
      resp_way  <= '0;
      resp_fill <= 1'b0;
      resp_pos  <= '0;
      resp_mru  <= 1'b0;
      resp_lru  <= 1'b0;
      wb_vld    <= 1'b0;
      wb_addr   <= '0;
      wb_flush  <= 1'b0;
    end else begin
      resp_vld <= req_fire;
      wb_vld   <= 1'b0;
      wb_flush <= 1'b0;
      if (req_fire) begin
        resp_core <= req_core;
        resp_hit  <= hit;
        resp_way  <= tw;
        resp_fill <= !hit && !no_way;
        resp_pos  <= hit ? pos : '0;
        resp_mru  <= hit && (pos == '0);
        resp_lru  <= hit && (pos == nperm - 1'b1);
        if (evict_wb) begin
          wb_vld  <= 1'b1;
          wb_addr <= {cur.tag[vw], r_idx};
        end
      end
      unique case (state)
        ST_INIT: begin
          fptr <= fptr + 1'b1;
          if (fptr == IDX_W'(SETS - 1)) begin
            fptr  <= '0;
            state <= ST_IDLE;
          end
        end
        ST_IDLE: begin
          if (flush_req && flush_mask != '0) begin
            fmask <= flush_mask;
            fptr  <= '0;
            state <= ST_FLUSH;
          end
        end
        ST_FLUSH: begin
          if (flush_req) begin
            // a new request restarts the walk with both sets of ways
            fmask <= fmask | flush_mask;
            fptr  <= '0;
          end else if (pend != '0) begin
            wb_vld   <= 1'b1;
            wb_flush <= 1'b1;
            wb_addr  <= {cur.tag[pw], fptr};
          end else begin
            fptr <= fptr + 1'b1;
            if (fptr == IDX_W'(SETS - 1)) begin
              fptr  <= '0;
              state <= ST_IDLE;
            end
          end
        end
        default: state <= ST_IDLE;
      endcase
    end
  end

  // At most one usable way can hold a given tag (checked on the values the
  // clock edge uses).
  always_ff @(posedge clk) begin
    if (req_fire) assert ($onehot0(hitv)) else $error("tag held by two ways");
  end

endmodule
