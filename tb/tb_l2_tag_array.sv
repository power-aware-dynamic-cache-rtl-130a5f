// tb_l2_tag_array: self-checking test of the partitioned L2 directory.
//
// Runs an 8-way, 16-set directory (small, so that sets fill and conflict)
// against a model written here that keeps, per set, tags, valid and dirty
// bits and an explicit MRU-to-LRU list of ways. Random reads and writes
// from both cores, each limited to its own ways, are checked for hit / miss,
// hit or victim way, LRU-stack position, MRU / LRU flags and the write-back
// of dirty victims; the response must come exactly one cycle after the
// request is taken. Between phases the way masks change the way the way
// manager changes them, and the ways a core loses are flushed: the
// write-backs must be exactly the model's dirty lines of those ways, in set
// order, and the walk must last one cycle per set plus one per write-back.
// The reset walk (one cycle per set) is timed as well.
module tb_l2_tag_array;
  localparam int unsigned W = 8, S = 16, AW = 16, LB = 64;
  localparam int unsigned TW = AW - 6 - 4;
  logic clk = 0, rst_n = 0;
  logic req_vld = 0, req_ready, req_core = 0, req_we = 0;
  logic [AW-1:0] req_addr = '0;
  logic [W-1:0] use0, use1, flush_mask = '0;
  logic resp_vld, resp_core, resp_hit, resp_fill, resp_mru, resp_lru;
  logic [2:0] resp_way;
  logic [3:0] resp_pos;
  logic wb_vld, wb_flush, flush_req = 0, busy;
  logic [AW-7:0] wb_addr;
  int checks = 0, failures = 0;

  l2_tag_array #(.WAYS(W), .SETS(S), .LINE_BYTES(LB), .ADDR_W(AW)) dut (.*);

  always #5 clk = ~clk;

  // model
  bit           m_v [S][W];
  bit           m_d [S][W];
  int           m_t [S][W];
  int           m_lru [S][$];   // ways, MRU first
  int           wb_q [$];       // write-backs seen
  int           n_hits = 0, n_miss = 0, n_wb = 0, n_mru = 0, n_lru = 0;

  always @(posedge clk) if (wb_vld) wb_q.push_back(int'(wb_addr));

  task automatic chk(input string what, input logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic access(input logic core, input int set, input int tag, input logic we);
    logic [W-1:0] perm;
    int hw, pos, nperm, vw, wb_exp, k;
    bit hit;
    perm = core ? use1 : use0;
    hit = 0; hw = -1;
    for (int w = 0; w < W; w++) if (perm[w] && m_v[set][w] && m_t[set][w] == tag) begin hit = 1; hw = w; end
    nperm = $countones(perm);
    pos = 0;
    wb_exp = -1;
    if (hit) begin
      foreach (m_lru[set][i]) begin
        if (m_lru[set][i] == hw) break;
        if (perm[m_lru[set][i]] && m_v[set][m_lru[set][i]]) pos++;
      end
      vw = hw;
      if (we) m_d[set][hw] = 1;
    end else begin
      vw = -1;
      for (int w = W - 1; w >= 0; w--) if (perm[w] && !m_v[set][w]) vw = w;
      if (vw < 0) foreach (m_lru[set][i]) if (perm[m_lru[set][i]]) vw = m_lru[set][i];
      if (m_v[set][vw] && m_d[set][vw]) wb_exp = m_t[set][vw] * S + set;
      m_v[set][vw] = 1; m_d[set][vw] = we; m_t[set][vw] = tag;
    end
    // move to MRU
    k = 0;
    foreach (m_lru[set][i]) if (m_lru[set][i] == vw) k = i;
    m_lru[set].delete(k);
    m_lru[set].push_front(vw);

    @(negedge clk);
    req_vld = 1; req_core = core; req_we = we;
    req_addr = AW'((tag * S + set) * LB + ($urandom % LB));
    while (!req_ready) @(negedge clk);
    @(negedge clk);
    req_vld = 0;
    chk("resp_vld", resp_vld && resp_core == core);
    chk($sformatf("hit set=%0d tag=%0d exp %0d", set, tag, hit), resp_hit == hit);
    chk($sformatf("way got %0d exp %0d", resp_way, vw), 32'(resp_way) == vw);
    chk("fill", resp_fill == !hit);
    if (hit) begin
      chk($sformatf("pos got %0d exp %0d", resp_pos, pos), 32'(resp_pos) == pos);
      chk("mru", resp_mru == (pos == 0));
      chk("lru", resp_lru == (pos == nperm - 1));
      n_hits++;
      if (pos == 0) n_mru++;
      if (pos == nperm - 1) n_lru++;
    end else begin
      chk("no mru/lru on miss", !resp_mru && !resp_lru);
      n_miss++;
    end
    if (wb_exp >= 0) begin
      n_wb++;
      chk($sformatf("victim wb exp %0d", wb_exp), wb_vld && !wb_flush && 32'(wb_addr) == wb_exp);
    end else begin
      chk("no wb", !wb_vld);
    end
    @(negedge clk);
    chk("resp_vld one cycle", !resp_vld);
    if (!($urandom % 4)) @(negedge clk);
  endtask

  task automatic flush(input logic [W-1:0] mask);
    int exp_q [$];
    int cycles;
    for (int s = 0; s < S; s++)
      for (int w = 0; w < W; w++)
        if (mask[w] && m_v[s][w]) begin
          if (m_d[s][w]) exp_q.push_back(m_t[s][w] * S + s);
          m_v[s][w] = 0; m_d[s][w] = 0;
        end
    @(negedge clk);
    wb_q.delete();
    flush_req = 1; flush_mask = mask;
    #1;
    chk("ready low on flush_req", !req_ready);
    @(negedge clk);
    flush_req = 0; flush_mask = '0;
    cycles = 0;
    while (busy) begin @(negedge clk); cycles++; end
    chk($sformatf("flush wbs got %0d exp %0d", wb_q.size(), exp_q.size()), wb_q == exp_q);
    chk($sformatf("flush length %0d exp %0d", cycles, S + exp_q.size()), mask == '0 || cycles == S + exp_q.size());
    chk("flush marked", exp_q.size() == 0 || wb_flush == 0);
  endtask

  task automatic phase(input logic [W-1:0] u0, input logic [W-1:0] u1, input int n);
    flush((use0 & ~u0) | (use1 & ~u1));
    use0 = u0; use1 = u1;
    for (int i = 0; i < n; i++) begin
      logic core = 1'($urandom);
      // core 1 uses tags 8..15, core 0 tags 0..7: separate address spaces
      access(core, $urandom % S, (core ? 8 : 0) + ($urandom % ((i % 3 == 0) ? 8 : 3)), 1'($urandom % 3 == 0));
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc;
    use0 = '1; use1 = '1;
    for (int s = 0; s < S; s++) begin
      for (int w = 0; w < W; w++) begin m_v[s][w] = 0; m_d[s][w] = 0; m_t[s][w] = 0; m_lru[s].push_back(w); end
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    cyc = 0;
    while (busy) begin @(negedge clk); cyc++; end
    chk($sformatf("reset walk %0d cycles", cyc), cyc == S);
    phase(8'hFF, 8'hFF, 600);            // shared
    phase(8'h0F, 8'hF0, 600);            // even split
    phase(8'h07, 8'hE0, 600);            // way 3 and 4 off
    phase(8'h0F, 8'hC0, 600);            // partition moved
    phase(8'h01, 8'h80, 400);            // one way each
    phase(8'h3F, 8'hC0, 600);
    flush(8'hFF);
    chk("hits seen", n_hits > 0);
    chk("mru hits seen", n_mru > 0);
    chk("lru hits seen", n_lru > 0);
    chk("victim write-backs seen", n_wb > 0);
    $display("hits=%0d misses=%0d mru=%0d lru=%0d wb=%0d", n_hits, n_miss, n_mru, n_lru, n_wb);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
