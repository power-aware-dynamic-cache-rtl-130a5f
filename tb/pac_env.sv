// pac_env: stimulus, reference model and checker for pac_l2_top.
//
// Drives the two cores' L2 requests, the mode and the thresholds, and keeps
// an independent model of the whole design: the directory (tags, valid and
// dirty bits, an explicit MRU-to-LRU list per set), the per-core MRU / LRU
// counts of each interval, the locality division, both comparisons, the two
// asymmetric state machines and the way allocation / power state. The DUT's
// own signals are used only for timing (when a request is taken, when a
// command arrives); every value is predicted by the model and compared:
//   - each response (hit, way, LRU-stack position) and each victim
//     write-back;
//   - D0 and D1 when an interval closes, exactly two cycles after the
//     request that completes it was taken;
//   - NALLOC0, NACT0, NACT1 one cycle later;
//   - the way counts and the use masks every cycle;
//   - the write-backs of each flush and its length (one cycle per set plus
//     one per write-back).
// The scenario has four phases: shared mode; partitioned with core 0 on a
// one-line-per-set footprint and core 1 on a wide random one under
// energy-oriented thresholds (0.1, 0.5); the same with the cores swapped
// under performance-oriented thresholds (0.001, 0.005); and both cores on
// small footprints under (0.1, 0.5). Each phase lasts PHASE_INT sampling
// intervals of INTERVAL accesses. The number of times each mechanism
// happened is printed, and
// each that never happened counts as a failure.
module pac_env
  import pac_pkg::*;
#(
  parameter int unsigned WAYS       = 8,
  parameter int unsigned SETS       = 16,
  parameter int unsigned LINE_BYTES = 64,
  parameter int unsigned ADDR_W     = 16,
  parameter int unsigned N          = 8,
  parameter int unsigned INTERVAL   = 1 << N,   // as set on the DUT
  parameter int unsigned PHASE_INT  = 12,
  parameter int unsigned MAX_CYCLES = 200000,
  localparam int unsigned OFF_W = $clog2(LINE_BYTES),
  localparam int unsigned IDX_W = $clog2(SETS),
  localparam int unsigned TAG_W = ADDR_W - OFF_W - IDX_W,
  localparam int unsigned WAY_W = (WAYS > 1) ? $clog2(WAYS) : 1,
  localparam int unsigned POS_W = $clog2(WAYS + 1),
  localparam int unsigned CW    = $clog2(WAYS + 1)
) (
  output logic                    clk,
  output logic                    rst_n,
  output logic                    part_en,
  output logic [N-1:0]            t1,
  output logic [N-1:0]            t2,
  output logic                    req_vld,
  input  logic                    req_ready,
  output logic                    req_core,
  output logic [ADDR_W-1:0]       req_addr,
  output logic                    req_we,
  input  logic                    resp_vld,
  input  logic                    resp_core,
  input  logic                    resp_hit,
  input  logic [WAY_W-1:0]        resp_way,
  input  logic                    resp_fill,
  input  logic [POS_W-1:0]        resp_pos,
  input  logic                    wb_vld,
  input  logic [ADDR_W-OFF_W-1:0] wb_addr,
  input  logic                    wb_flush,
  input  logic [WAYS-1:0]         way_pwr,
  input  logic [WAYS-1:0]         way_use0,
  input  logic [WAYS-1:0]         way_use1,
  input  logic [CW-1:0]           alloc0,
  input  logic [CW-1:0]           alloc1,
  input  logic [CW-1:0]           act0,
  input  logic [CW-1:0]           act1,
  input  logic                    sample_vld,
  input  logic [N-1:0]            d0,
  input  logic [N-1:0]            d1,
  input  logic                    cmd_vld,
  input  resize_e                 nalloc0,
  input  resize_e                 nact0,
  input  resize_e                 nact1,
  input  logic                    ev_alloc,
  input  logic                    ev_alloc_skip,
  input  logic                    busy
);

  localparam longint unsigned FULL = 64'd1 << N;   // 1.0 in the D format
  localparam int unsigned     TAG_HALF = 1 << (TAG_W - 1);

  int checks = 0, failures = 0;

  // ------------------------------------------------------------ clock
  initial clk = 1'b0;
  always #5 clk = ~clk;

  task automatic chk(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // ------------------------------------------------------------ model
  bit  m_v [SETS][WAYS];
  bit  m_d [SETS][WAYS];
  int  m_t [SETS][WAYS];
  int  m_lru [SETS][$];
  int  ma0, mc0, mc1;          // alloc0, act0, act1
  bit  m_part;
  int  sm [2];                 // state machine states
  int  cnt_mru [2], cnt_lru [2];
  longint unsigned n_in_int;
  int  s_mru [2], s_lru [2];   // snapshot of a closed interval
  resize_e e_alloc, e_act [2];
  int  e_d [2];

  function automatic logic [WAYS-1:0] mask0(input int act);
    logic [WAYS-1:0] m = '0;
    for (int w = 0; w < act; w++) m[w] = 1'b1;
    return m;
  endfunction
  function automatic logic [WAYS-1:0] mask1(input int act);
    logic [WAYS-1:0] m = '0;
    for (int w = 0; w < act; w++) m[WAYS - 1 - w] = 1'b1;
    return m;
  endfunction
  function automatic logic [WAYS-1:0] use_of(input int core);
    if (!m_part) return '1;
    return core ? mask1(mc1) : mask0(mc0);
  endfunction

  function automatic int ref_d(input int mru, input int lru);
    longint unsigned all1 = FULL - 1;
    if (mru == 0) return (lru == 0) ? 0 : int'(all1);
    if (lru >= mru) return int'(all1);
    return int'((longint'(lru) << N) / mru);
  endfunction

  function automatic resize_e ref_sm(inout int s, input resize_e r);
    if (r == RS_INC) begin s = 0; return RS_INC; end
    if (r == RS_DEC) begin
      if (s >= 6) begin s = 7; return RS_DEC; end
      s++; return RS_KEEP;
    end
    return RS_KEEP;
  endfunction

  // expected responses, in order
  typedef struct { int core; bit hit; int way; int pos; int wb; } exp_t;
  exp_t exp_q [$];
  int   fl_exp [$];
  int   fl_got [$];
  int   fl_len_exp;

  // mechanism counters
  int n_sample = 0, n_move_inc = 0, n_move_dec = 0, n_skip = 0;
  int n_pinc = 0, n_pdec = 0, n_keep = 0, n_flush = 0, n_flush_wb = 0, n_victim_wb = 0;
  int n_stall = 0, n_mode = 0, n_mru = 0, n_lru = 0, n_hit = 0, n_miss = 0;

  // model of one access taken at the next clock edge
  task automatic model_access(input int core, input int set, input int tag, input bit we);
    logic [WAYS-1:0] perm;
    exp_t e;
    int nperm, k;
    perm = use_of(core);
    nperm = $countones(perm);
    e.core = core; e.hit = 0; e.way = -1; e.pos = 0; e.wb = -1;
    for (int w = 0; w < WAYS; w++)
      if (perm[w] && m_v[set][w] && m_t[set][w] == tag) begin e.hit = 1; e.way = w; end
    if (e.hit) begin
      foreach (m_lru[set][i]) begin
        if (m_lru[set][i] == e.way) break;
        if (perm[m_lru[set][i]] && m_v[set][m_lru[set][i]]) e.pos++;
      end
      if (we) m_d[set][e.way] = 1;
      if (e.pos == 0) cnt_mru[core]++;
      if (e.pos == nperm - 1) cnt_lru[core]++;
    end else begin
      for (int w = WAYS - 1; w >= 0; w--) if (perm[w] && !m_v[set][w]) e.way = w;
      if (e.way < 0) foreach (m_lru[set][i]) if (perm[m_lru[set][i]]) e.way = m_lru[set][i];
      if (m_v[set][e.way] && m_d[set][e.way]) e.wb = m_t[set][e.way] * SETS + set;
      m_v[set][e.way] = 1; m_d[set][e.way] = we; m_t[set][e.way] = tag;
    end
    k = 0;
    foreach (m_lru[set][i]) if (m_lru[set][i] == e.way) k = i;
    m_lru[set].delete(k);
    m_lru[set].push_front(e.way);
    exp_q.push_back(e);
  endtask

  // model of a flush of the given ways
  task automatic model_flush(input logic [WAYS-1:0] mask);
    int nwb = 0;
    if (mask == '0) return;
    n_flush++;
    for (int s = 0; s < SETS; s++)
      for (int w = 0; w < WAYS; w++)
        if (mask[w] && m_v[s][w]) begin
          if (m_d[s][w]) begin fl_exp.push_back(m_t[s][w] * SETS + s); nwb++; end
          m_v[s][w] = 0; m_d[s][w] = 0;
        end
    fl_len_exp = SETS + nwb;
  endtask

  // model of the way manager for one command
  task automatic model_command();
    logic [WAYS-1:0] o0, o1;
    int a1;
    bit skip;
    o0 = use_of(0); o1 = use_of(1);
    a1 = WAYS - ma0;
    skip = (mc0 < ma0) && (mc1 < a1);
    if (!skip) begin
      if (e_alloc == RS_INC && a1 > 1) begin
        n_move_inc++;
        if (mc0 == ma0) mc0++;
        ma0++; a1--;
        if (mc1 > a1) mc1 = a1;
      end else if (e_alloc == RS_DEC && ma0 > 1) begin
        n_move_dec++;
        if (mc1 == a1) mc1++;
        ma0--; a1++;
        if (mc0 > ma0) mc0 = ma0;
      end
    end else n_skip++;
    if (e_act[0] == RS_INC && mc0 < ma0) mc0++; else if (e_act[0] == RS_DEC && mc0 > 1) mc0--;
    if (e_act[1] == RS_INC && mc1 < a1)  mc1++; else if (e_act[1] == RS_DEC && mc1 > 1) mc1--;
    model_flush((o0 & ~use_of(0)) | (o1 & ~use_of(1)));
  endtask

  // ------------------------------------------------------------ workload
  // footprint in lines per set for each core, and whether it writes
  int fp [2];
  int wr_pct [2];

  // ------------------------------------------------------------ main loop
  int  cyc = 0;
  int  sample_at = -1, cmd_at = -1, cfg_at = -1;
  bit  pend = 0;
  int  p_core, p_set, p_tag;
  bit  p_we;
  bit  mode_req = 0;
  int  flush_start = -1;
  bit  was_busy = 0;
  int  busy_len = 0;

  task automatic one_cycle();
    exp_t e;
    @(negedge clk);
    cyc++;
    // ---- responses
    if (resp_vld) begin
      chk("unexpected response", exp_q.size() > 0);
      if (exp_q.size() > 0) begin
        e = exp_q.pop_front();
        chk("resp core", 32'(resp_core) == e.core);
        chk($sformatf("resp hit exp %0d", e.hit), resp_hit == e.hit);
        chk($sformatf("resp way %0d exp %0d", resp_way, e.way), 32'(resp_way) == e.way);
        chk("resp fill", resp_fill == !e.hit);
        if (e.hit) chk($sformatf("resp pos %0d exp %0d", resp_pos, e.pos), 32'(resp_pos) == e.pos);
        if (e.hit) n_hit++; else n_miss++;
        if (e.hit && e.pos == 0) n_mru++;
        if (e.hit && e.pos == $countones(use_of(e.core)) - 1) n_lru++;
        if (e.wb >= 0) begin
          n_victim_wb++;
          chk("victim wb", wb_vld && !wb_flush && 32'(wb_addr) == e.wb);
        end else chk("no victim wb", !(wb_vld && !wb_flush));
      end
    end
    if (wb_vld && wb_flush) begin fl_got.push_back(int'(wb_addr)); n_flush_wb++; end
    // ---- flush walk
    if (busy) busy_len++;
    if (was_busy && !busy) begin
      chk($sformatf("flush wbs %0d exp %0d", fl_got.size(), fl_exp.size()), fl_got == fl_exp);
      chk($sformatf("flush length %0d exp %0d", busy_len, fl_len_exp), busy_len == fl_len_exp);
      fl_got.delete(); fl_exp.delete();
    end
    if (!busy) busy_len = 0;
    was_busy = busy;
    // ---- controller
    chk("sample_vld timing", sample_vld == (cyc == sample_at));
    if (cyc == sample_at) begin
      n_sample++;
      chk($sformatf("d0 %0d exp %0d", d0, e_d[0]), 32'(d0) == e_d[0]);
      chk($sformatf("d1 %0d exp %0d", d1, e_d[1]), 32'(d1) == e_d[1]);
      cmd_at = cyc + 1;
    end
    chk("cmd_vld timing", cmd_vld == (cyc == cmd_at));
    if (cyc == cmd_at) begin
      chk($sformatf("nalloc0 %0d exp %0d", nalloc0, e_alloc), nalloc0 == e_alloc);
      chk($sformatf("nact0 %0d exp %0d", nact0, e_act[0]), nact0 == e_act[0]);
      chk($sformatf("nact1 %0d exp %0d", nact1, e_act[1]), nact1 == e_act[1]);
      for (int c = 0; c < 2; c++) begin
        if (e_act[c] == RS_INC) n_pinc++;
        if (e_act[c] == RS_DEC) n_pdec++;
        if (e_act[c] == RS_KEEP) n_keep++;
      end
    end
    // ---- way state, every cycle
    chk("use0 mask", way_use0 == use_of(0));
    chk("use1 mask", way_use1 == use_of(1));
    chk("power mask", way_pwr == (use_of(0) | use_of(1)));
    if (m_part) begin
      chk($sformatf("alloc0 %0d exp %0d", alloc0, ma0), 32'(alloc0) == ma0);
      chk("alloc1", 32'(alloc1) == WAYS - ma0);
      chk($sformatf("act0 %0d exp %0d", act0, mc0), 32'(act0) == mc0);
      chk($sformatf("act1 %0d exp %0d", act1, mc1), 32'(act1) == mc1);
    end
    // ---- drive
    if (!pend) begin
      p_core = $urandom % 2;
      p_set  = $urandom % SETS;
      p_tag  = (p_core ? TAG_HALF : 0) + ($urandom % fp[p_core]);
      p_we   = ($urandom % 100) < wr_pct[p_core];
      pend   = 1;
    end
    req_vld  = pend && ($urandom % 8 != 0);
    req_core = 1'(p_core);
    req_we   = p_we;
    req_addr = ADDR_W'((longint'(p_tag) * SETS + p_set) * LINE_BYTES + ($urandom % LINE_BYTES));
    if (mode_req) begin
      part_en = ~part_en;
      mode_req = 0;
    end
    #1;
    if (req_vld && !req_ready) n_stall++;
    if (req_vld && req_ready) begin
      model_access(p_core, p_set, p_tag, p_we);
      pend = 0;
      n_in_int++;
      if (n_in_int == INTERVAL) begin
        n_in_int = 0;
        sample_at = cyc + 2;
        s_mru = cnt_mru; s_lru = cnt_lru;
        cnt_mru = '{0, 0}; cnt_lru = '{0, 0};
        for (int c = 0; c < 2; c++) e_d[c] = ref_d(s_mru[c], s_lru[c]);
        e_alloc = (e_d[0] > e_d[1]) ? RS_INC : (e_d[0] < e_d[1]) ? RS_DEC : RS_KEEP;
        for (int c = 0; c < 2; c++)
          e_act[c] = ref_sm(sm[c], (e_d[c] > 32'(t2)) ? RS_INC : (e_d[c] < 32'(t1)) ? RS_DEC : RS_KEEP);
      end
    end
    // the command takes effect at the coming edge, after this cycle's access
    if (cyc == cmd_at && m_part) model_command();
    if (part_en && !m_part) begin
      // entering partitioned mode: full flush, partitioned masks
      n_mode++;
      model_flush('1);
      m_part = 1;
    end else if (!part_en && m_part) begin
      n_mode++;
      m_part = 0;
    end
  endtask

  task automatic run_intervals(input int n);
    int target = n_sample + n;
    while (n_sample < target) one_cycle();
    // the state machines register the last command at the edge after
    // sample_vld: keep the thresholds until it is taken
    one_cycle();
  endtask

  function automatic logic [N-1:0] thr(input real x);
    return N'(longint'(x * real'(FULL) + 0.5));
  endfunction

  initial begin
    repeat (MAX_CYCLES) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; part_en = 0; req_vld = 0; req_core = 0; req_addr = '0; req_we = 0;
    t1 = thr(0.001); t2 = thr(0.005);
    for (int s = 0; s < SETS; s++)
      for (int w = 0; w < WAYS; w++) begin
        m_v[s][w] = 0; m_d[s][w] = 0; m_t[s][w] = 0; m_lru[s].push_back(w);
      end
    ma0 = WAYS / 2; mc0 = WAYS / 2; mc1 = WAYS - WAYS / 2; m_part = 0;
    sm = '{0, 0}; cnt_mru = '{0, 0}; cnt_lru = '{0, 0}; n_in_int = 0;
    fl_len_exp = SETS;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // the reset walk is a flush without write-backs
    @(negedge clk);
    chk("reset walk busy", busy);
    while (busy) @(negedge clk);
    // phase 1: shared mode
    fp = '{4, WAYS}; wr_pct = '{30, 30};
    run_intervals(2);
    // phase 2: partitioned, core 0 tiny footprint, core 1 wide, energy-oriented
    while (n_in_int < INTERVAL / 4) one_cycle();
    mode_req = 1;
    t1 = thr(0.1); t2 = thr(0.5);
    fp = '{1, 2 * WAYS};
    run_intervals(PHASE_INT);
    // phase 3: roles swapped, performance-oriented
    t1 = thr(0.001); t2 = thr(0.005);
    fp = '{2 * WAYS, 1};
    run_intervals(PHASE_INT);
    // phase 4: both small, energy-oriented (both shrink, allocation skipped)
    t1 = thr(0.1); t2 = thr(0.5);
    fp = '{1, 1};
    run_intervals(PHASE_INT);
    // back to shared mode
    while (n_in_int < INTERVAL / 4) one_cycle();
    mode_req = 1;
    run_intervals(1);
    repeat (4) one_cycle();
    $display("intervals=%0d partition_to_core0=%0d partition_to_core1=%0d allocation_skipped=%0d",
             n_sample, n_move_inc, n_move_dec, n_skip);
    $display("power_INC=%0d power_DEC=%0d power_KEEP=%0d flushes=%0d flush_writebacks=%0d victim_writebacks=%0d",
             n_pinc, n_pdec, n_keep, n_flush, n_flush_wb, n_victim_wb);
    $display("stall_cycles=%0d mode_switches=%0d hits=%0d misses=%0d mru_hits=%0d lru_hits=%0d",
             n_stall, n_mode, n_hit, n_miss, n_mru, n_lru);
    chk("mechanism: interval closed", n_sample > 0);
    chk("mechanism: partition moved to core 0", n_move_inc > 0);
    chk("mechanism: partition moved to core 1", n_move_dec > 0);
    chk("mechanism: allocation skipped", n_skip > 0);
    chk("mechanism: power INC", n_pinc > 0);
    chk("mechanism: power DEC", n_pdec > 0);
    chk("mechanism: flush write-back", n_flush_wb > 0);
    chk("mechanism: victim write-back", n_victim_wb > 0);
    chk("mechanism: stall", n_stall > 0);
    chk("mechanism: mode switch both ways", n_mode >= 2);
    chk("mechanism: MRU hit", n_mru > 0);
    chk("mechanism: LRU hit", n_lru > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
