// tb_cache_ctrl: self-checking test of the cache control block.
//
// Presents random per-core MRU / LRU counts (16-bit) with the three
// threshold pairs of the evaluation, pulses `sample_vld`, and checks D0, D1,
// NALLOC0, NACT0 and NACT1 against a model written here (division, both
// comparisons and the 3-bit asymmetric state machine), and that `cmd_vld`
// follows `sample_vld` by exactly one cycle. Count ranges are chosen so that
// D falls on both sides of the thresholds and runs of dec occur.
module tb_cache_ctrl;
  import pac_pkg::*;
  localparam int unsigned N = 16;
  logic clk = 0, rst_n = 0, sample_vld = 0;
  logic [N-1:0] mru_count0, lru_count0, mru_count1, lru_count1, t1, t2;
  resize_e nalloc0, nact0, nact1;
  logic cmd_vld;
  logic [N-1:0] d0, d1;
  logic [2:0] state0, state1;
  int checks = 0, failures = 0;
  int s0 = 0, s1 = 0;
  int n_inc = 0, n_dec = 0;

  cache_ctrl #(.N(N), .SM_BITS(3)) dut (.*);

  always #5 clk = ~clk;

  function automatic int ref_d(input int mru, input int lru);
    if (mru == 0) return (lru == 0) ? 0 : 65535;
    if (lru >= mru) return 65535;
    return int'((longint'(lru) << 16) / mru);
  endfunction

  function automatic resize_e ref_t(input int d);
    if (d > 32'(t2)) return RS_INC;
    if (d < 32'(t1)) return RS_DEC;
    return RS_KEEP;
  endfunction

  function automatic resize_e ref_sm(inout int s, input resize_e r);
    if (r == RS_INC) begin s = 0; return RS_INC; end
    if (r == RS_DEC) begin
      if (s >= 6) begin s = 7; return RS_DEC; end
      s++; return RS_KEEP;
    end
    return RS_KEEP;
  endfunction

  task automatic interval(input int m0, input int l0, input int m1, input int l1);
    int e0, e1;
    resize_e ea, ec0, ec1;
    e0 = ref_d(m0, l0);
    e1 = ref_d(m1, l1);
    ea = (e0 > e1) ? RS_INC : (e0 < e1) ? RS_DEC : RS_KEEP;
    ec0 = ref_sm(s0, ref_t(e0));
    ec1 = ref_sm(s1, ref_t(e1));
    @(negedge clk);
    mru_count0 = N'(m0); lru_count0 = N'(l0); mru_count1 = N'(m1); lru_count1 = N'(l1);
    sample_vld = 1;
    #1;
    checks += 3;
    if (32'(d0) != e0) begin failures++; $display("FAIL d0 %0d exp %0d", d0, e0); end
    if (32'(d1) != e1) begin failures++; $display("FAIL d1 %0d exp %0d", d1, e1); end
    if (cmd_vld)       begin failures++; $display("FAIL cmd_vld early"); end
    @(negedge clk);
    sample_vld = 0;
    mru_count0 = N'($urandom); lru_count0 = N'($urandom);   // must not matter now
    checks += 4;
    if (!cmd_vld)      begin failures++; $display("FAIL cmd_vld missing"); end
    if (nalloc0 != ea) begin failures++; $display("FAIL nalloc0 %0d exp %0d", nalloc0, ea); end
    if (nact0 != ec0)  begin failures++; $display("FAIL nact0 %0d exp %0d", nact0, ec0); end
    if (nact1 != ec1)  begin failures++; $display("FAIL nact1 %0d exp %0d", nact1, ec1); end
    if (ec0 == RS_INC) n_inc++;
    if (ec0 == RS_DEC) n_dec++;
    @(negedge clk);
    checks++;
    if (cmd_vld) begin failures++; $display("FAIL cmd_vld longer than one cycle"); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [N-1:0] th1 [3] = '{16'd66, 16'd655, 16'd6554};
  logic [N-1:0] th2 [3] = '{16'd328, 16'd3277, 16'd32768};

  initial begin
    mru_count0 = '0; lru_count0 = '0; mru_count1 = '0; lru_count1 = '0;
    t1 = th1[0]; t2 = th2[0];
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 3; k++) begin
      t1 = th1[k]; t2 = th2[k];
      for (int i = 0; i < 400; i++) begin
        int m0, m1, l0, l1;
        m0 = 1 + $urandom % 40000;
        m1 = 1 + $urandom % 40000;
        // mostly small LRU counts (high locality) so dec runs happen
        l0 = (i % 5 == 0) ? $urandom % 40000 : $urandom % (m0 / 64 + 1);
        l1 = (i % 7 == 0) ? $urandom % 40000 : $urandom % (m1 / 16 + 1);
        interval(m0, l0, m1, l1);
      end
    end
    interval(0, 0, 0, 5);
    interval(100, 100, 100, 100);
    checks += 2;
    if (n_inc == 0) begin failures++; $display("FAIL no INC seen"); end
    if (n_dec == 0) begin failures++; $display("FAIL no DEC seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
