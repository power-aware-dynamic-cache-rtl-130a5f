// tb_pac_policy: the three threshold settings on a pair of synthetic
// programs.
//
// Each core runs a synthetic program whose reuse is described by its stack
// distance profile: every access picks a distance d with probability
// proportional to r^d and touches the d-th most recently used line of that
// program in the chosen set (or a new line if d is beyond what it has used).
// Hits then land at LRU position d, so the locality metric of a core with A
// usable ways is about r^(A-1). Core 0 has r = 0.9 (a large working set, a
// program that keeps gaining from more ways); core 1 has r = 0.6 (a small
// working set that saturates).
//
// The top runs at 32 ways, 32 sets and N = 12 (intervals of 4096 accesses),
// once for each setting (0.001, 0.005), (0.01, 0.05) and (0.1, 0.5), each
// from reset for 60 intervals. Checked:
//   - in every cycle: the cores' way masks are disjoint, the power mask is
//     their union, the mask sizes equal act0 / act1, and the allocations
//     add up to the associativity;
//   - the average number of powered ways over the second half of a run does
//     not grow from the performance-oriented to the energy-oriented setting,
//     and is strictly lower at (0.1, 0.5) than at (0.001, 0.005);
//   - under (0.001, 0.005) the low-locality core ends with more ways
//     allocated than the high-locality one;
//   - under (0.1, 0.5) at least one way was switched off.
// The averages and hit rates are printed for each setting.
module tb_pac_policy;
  import pac_pkg::*;
  localparam int unsigned WAYS = 32, SETS = 32, LB = 64, AW = 24, N = 12;
  localparam int unsigned OFF_W = $clog2(LB);
  localparam int unsigned WAY_W = $clog2(WAYS);
  localparam int unsigned POS_W = $clog2(WAYS + 1);
  localparam int unsigned CW    = $clog2(WAYS + 1);
  localparam int unsigned TAG_W = AW - OFF_W - $clog2(SETS);
  localparam int unsigned INTERVALS = 60;

  logic clk = 0, rst_n = 0, part_en = 1, req_vld = 0, req_ready, req_core = 0, req_we = 0;
  logic [N-1:0] t1, t2, d0, d1, miss_count0, miss_count1;
  logic [AW-1:0] req_addr = '0;
  logic resp_vld, resp_core, resp_hit, resp_fill, wb_vld, wb_flush;
  logic [WAY_W-1:0] resp_way;
  logic [POS_W-1:0] resp_pos;
  logic [AW-OFF_W-1:0] wb_addr;
  logic [WAYS-1:0] way_pwr, way_use0, way_use1;
  logic [CW-1:0] alloc0, alloc1, act0, act1;
  logic sample_vld, cmd_vld, ev_alloc, ev_alloc_skip, busy;
  resize_e nalloc0, nact0, nact1;
  logic [2:0] state0, state1;

  pac_l2_top #(.WAYS(WAYS), .SETS(SETS), .LINE_BYTES(LB), .ADDR_W(AW), .N(N)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic chk(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // invariants, every cycle
  always @(negedge clk) if (rst_n && !busy) begin
    chk("disjoint masks", (way_use0 & way_use1) == '0);
    chk("power mask", way_pwr == (way_use0 | way_use1));
    chk("act0 size", $countones(way_use0) == 32'(act0));
    chk("act1 size", $countones(way_use1) == 32'(act1));
    chk("alloc sum", 32'(alloc0) + 32'(alloc1) == WAYS);
  end

  // synthetic programs: per core and set, the program's own recency list
  int stack [2][SETS][$];
  int next_tag [2];
  real r [2] = '{0.9, 0.6};

  function automatic int pick_dist(input real rr);
    int d = 0;
    while (d < 63 && ($urandom % 1000000) < int'(rr * 1000000.0)) d++;
    return d;
  endfunction

  task automatic gen(input int core, output int set, output int tag);
    int d, k;
    set = $urandom % SETS;
    d = pick_dist(r[core]);
    if (d < stack[core][set].size()) begin
      tag = stack[core][set][d];
      stack[core][set].delete(d);
    end else begin
      tag = (core ? (1 << (TAG_W - 1)) : 0) + (next_tag[core] % (1 << (TAG_W - 1)));
      next_tag[core]++;
    end
    stack[core][set].push_front(tag);
    k = stack[core][set].size();
    if (k > 64) void'(stack[core][set].pop_back());
  endtask

  real avg_pwr [3], avg0 [3], avg1 [3], hr [3][2];
  int  fin_alloc0 [3], min_pwr [3];

  task automatic run(input int k, input real x1, input real x2);
    int n_acc = 0, n_int = 0;
    longint sum_pwr = 0, sum0 = 0, sum1 = 0, ncyc = 0;
    int hits [2], accs [2];
    int set, tag;
    bit taken;
    hits = '{0, 0}; accs = '{0, 0};
    for (int c = 0; c < 2; c++) for (int s = 0; s < SETS; s++) stack[c][s].delete();
    next_tag = '{0, 0};
    min_pwr[k] = WAYS;
    t1 = N'(longint'(x1 * real'(1 << N) + 0.5));
    t2 = N'(longint'(x2 * real'(1 << N) + 0.5));
    rst_n = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    while (n_int < INTERVALS) begin
      // a request is presented after a falling edge and taken at the next
      // rising edge if req_ready is high by then
      if (!req_vld) begin
        req_core = 1'($urandom);
        gen(int'(req_core), set, tag);
        req_addr = AW'((tag * SETS + set) * LB);
        req_we = ($urandom % 4 == 0);
        req_vld = 1;
      end
      #1;
      taken = req_ready;
      @(negedge clk);
      if (taken) begin
        req_vld = 0;
        n_acc++;
      end
      if (resp_vld) begin
        accs[resp_core]++;
        if (resp_hit) hits[resp_core]++;
      end
      if (sample_vld) n_int++;
      if (n_int >= INTERVALS / 2) begin
        sum_pwr += $countones(way_pwr);
        sum0 += act0;
        sum1 += act1;
        ncyc++;
      end
      if ($countones(way_pwr) < min_pwr[k]) min_pwr[k] = $countones(way_pwr);
    end
    avg_pwr[k] = real'(sum_pwr) / real'(ncyc);
    avg0[k] = real'(sum0) / real'(ncyc);
    avg1[k] = real'(sum1) / real'(ncyc);
    for (int c = 0; c < 2; c++) hr[k][c] = real'(hits[c]) / real'(accs[c]);
    fin_alloc0[k] = alloc0;
    $display("t=(%0.3f,%0.3f): powered ways %0.1f (core0 %0.1f, core1 %0.1f), alloc0=%0d alloc1=%0d, hit rate core0 %0.3f core1 %0.3f",
             x1, x2, avg_pwr[k], avg0[k], avg1[k], alloc0, alloc1, hr[k][0], hr[k][1]);
  endtask

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    run(0, 0.001, 0.005);
    run(1, 0.01, 0.05);
    run(2, 0.1, 0.5);
    chk("mid setting powers no more ways than performance setting", avg_pwr[1] <= avg_pwr[0] + 0.01);
    chk("energy setting powers no more ways than mid setting", avg_pwr[2] <= avg_pwr[1] + 0.01);
    chk("energy setting powers fewer ways than performance setting", avg_pwr[2] < avg_pwr[0]);
    chk("low-locality core gets more ways under (0.001, 0.005)", fin_alloc0[0] > WAYS / 2);
    chk("ways switched off under (0.1, 0.5)", min_pwr[2] < WAYS);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
