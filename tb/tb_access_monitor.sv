// tb_access_monitor: self-checking test of the access monitor.
//
// Two 8-bit monitors see the same random stream of accesses from both cores,
// with idle cycles between them: one with the full interval of 2^8 = 256
// accesses, one with an interval of 100 accesses. A model here keeps its own
// counts for each; at every `sample_vld` the six outputs must equal the
// model's counts for the interval, and `sample_vld` must come exactly one
// cycle after the last access of the interval. One stretch of 256 accesses
// sends only MRU hits of core 0, so the full-interval count must saturate at
// 255.
module tb_access_monitor;
  localparam int unsigned N = 8;
  localparam int IV [2] = '{256, 100};
  logic clk = 0, rst_n = 0;
  logic acc_vld = 0, acc_core = 0, acc_hit = 0, acc_mru = 0, acc_lru = 0;
  logic sample_vld, sample_vld_b;
  logic [N-1:0] mru_count [2], mru_count_b [2];
  logic [N-1:0] lru_count [2], lru_count_b [2];
  logic [N-1:0] miss_count [2], miss_count_b [2];
  int checks = 0, failures = 0;
  int m_mru [2][2], m_lru [2][2], m_miss [2][2];   // [monitor][core]
  int e_mru [2][2], e_lru [2][2], e_miss [2][2];
  int n_acc = 0;
  int samples [2] = '{0, 0};
  int cyc = 0;
  int exp_cyc [2] = '{-1, -1};
  always @(posedge clk) cyc++;

  access_monitor #(.N(N)) dut (.*);

  access_monitor #(.N(N), .INTERVAL(100)) dut_b (
    .clk, .rst_n, .acc_vld, .acc_core, .acc_hit, .acc_mru, .acc_lru,
    .sample_vld(sample_vld_b), .mru_count(mru_count_b),
    .lru_count(lru_count_b), .miss_count(miss_count_b)
  );

  always #5 clk = ~clk;

  function automatic int sat(input int v);
    return (v > 255) ? 255 : v;
  endfunction

  task automatic check(input int k, input logic sv, input logic [N-1:0] mru [2],
                       input logic [N-1:0] lru [2], input logic [N-1:0] miss [2]);
    checks++;
    if (sv !== (cyc == exp_cyc[k])) begin
      failures++;
      $display("FAIL monitor %0d sample_vld=%0b at access %0d", k, sv, n_acc);
    end
    if (sv) begin
      samples[k]++;
      for (int c = 0; c < 2; c++) begin
        checks += 3;
        if (32'(mru[c]) != sat(e_mru[k][c]))   begin failures++; $display("FAIL monitor %0d mru%0d %0d exp %0d", k, c, mru[c], sat(e_mru[k][c])); end
        if (32'(lru[c]) != sat(e_lru[k][c]))   begin failures++; $display("FAIL monitor %0d lru%0d %0d exp %0d", k, c, lru[c], sat(e_lru[k][c])); end
        if (32'(miss[c]) != sat(e_miss[k][c])) begin failures++; $display("FAIL monitor %0d miss%0d %0d exp %0d", k, c, miss[c], sat(e_miss[k][c])); end
      end
    end
  endtask

  // checkers, sampled at the negative edge
  always @(negedge clk) if (rst_n) begin
    check(0, sample_vld, mru_count, lru_count, miss_count);
    check(1, sample_vld_b, mru_count_b, lru_count_b, miss_count_b);
  end

  task automatic access(input logic core, input int kind); // 0 miss 1 mru 2 lru 3 mid 4 mru+lru
    @(negedge clk);
    acc_vld = 1; acc_core = core;
    acc_hit = (kind != 0); acc_mru = (kind == 1 || kind == 4); acc_lru = (kind == 2 || kind == 4);
    for (int k = 0; k < 2; k++) begin
      if (kind == 0) m_miss[k][core]++;
      if (acc_mru) m_mru[k][core]++;
      if (acc_lru) m_lru[k][core]++;
    end
    n_acc++;
    @(posedge clk);
    #1;
    acc_vld = 0;
    for (int k = 0; k < 2; k++) if (n_acc % IV[k] == 0) begin
      exp_cyc[k] = cyc;
      e_mru[k] = m_mru[k]; e_lru[k] = m_lru[k]; e_miss[k] = m_miss[k];
      m_mru[k] = '{0, 0}; m_lru[k] = '{0, 0}; m_miss[k] = '{0, 0};
    end
    repeat ($urandom % 2) @(negedge clk);
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 2; k++) begin
      m_mru[k] = '{0, 0}; m_lru[k] = '{0, 0}; m_miss[k] = '{0, 0};
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 256 * 6; i++) access(1'($urandom), $urandom % 5);
    for (int i = 0; i < 256; i++) access(0, 1);          // saturating interval
    for (int i = 0; i < 256 * 3; i++) access(1'($urandom), $urandom % 5);
    repeat (4) @(negedge clk);
    checks += 2;
    if (samples[0] != 10) begin failures++; $display("FAIL %0d full-length samples, expected 10", samples[0]); end
    if (samples[1] != 25) begin failures++; $display("FAIL %0d 100-access samples, expected 25", samples[1]); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
