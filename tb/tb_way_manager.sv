// tb_way_manager: self-checking test of the way-allocation / power state.
//
// A model here keeps alloc0, act0 and act1 with the same rules (allocation
// skipped when both cores have inactive ways, then power control, at least
// one allocated and one active way per core) and builds the expected masks
// way by way. Random commands are applied to a 32-way manager;
// after each one the counts, the use / power masks, the flush request and
// mask (ways a core loses) and the event pulses are compared. The mode input
// is switched off and on to check the shared mode (all ways usable and
// powered) and the full flush on entering partitioned mode.
module tb_way_manager;
  import pac_pkg::*;
  localparam int unsigned W = 32;
  localparam int unsigned CW = $clog2(W + 1);
  logic clk = 0, rst_n = 0, part_en = 0, cmd_vld = 0;
  resize_e nalloc0 = RS_KEEP, nact0 = RS_KEEP, nact1 = RS_KEEP;
  logic [CW-1:0] alloc0, alloc1, act0, act1;
  logic [W-1:0]  use0, use1, pwr, flush_mask;
  logic          flush_req, ev_alloc, ev_alloc_skip;
  int checks = 0, failures = 0;
  int ma0, mc0, mc1;                 // model
  int n_moves = 0, n_skips = 0, n_flush = 0;

  way_manager #(.WAYS(W)) dut (.*);

  always #5 clk = ~clk;

  function automatic logic [W-1:0] m0(input int act);
    logic [W-1:0] m = '0;
    for (int w = 0; w < act; w++) m[w] = 1'b1;
    return m;
  endfunction
  function automatic logic [W-1:0] m1(input int act);
    logic [W-1:0] m = '0;
    for (int w = 0; w < act; w++) m[W - 1 - w] = 1'b1;
    return m;
  endfunction

  task automatic chk(input string what, input logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (a0=%0d c0=%0d c1=%0d)", what, ma0, mc0, mc1); end
  endtask

  task automatic check_state();
    chk("alloc0", 32'(alloc0) == ma0);
    chk("alloc1", 32'(alloc1) == W - ma0);
    chk("act0", 32'(act0) == mc0);
    chk("act1", 32'(act1) == mc1);
    chk("use0", use0 == m0(mc0));
    chk("use1", use1 == m1(mc1));
    chk("pwr", pwr == (m0(mc0) | m1(mc1)));
    chk("disjoint", (use0 & use1) == '0);
  endtask

  task automatic command(input resize_e a, input resize_e p0, input resize_e p1);
    logic [W-1:0] old0, old1, lost;
    bit skip, moved;
    int a1;
    old0 = m0(mc0); old1 = m1(mc1);
    a1 = W - ma0;
    skip = (mc0 < ma0) && (mc1 < a1);
    moved = 0;
    if (!skip) begin
      if (a == RS_INC && a1 > 1) begin
        moved = 1;
        if (mc0 == ma0) mc0++;
        ma0++; a1--;
        if (mc1 > a1) mc1 = a1;
      end else if (a == RS_DEC && ma0 > 1) begin
        moved = 1;
        if (mc1 == a1) mc1++;
        ma0--; a1++;
        if (mc0 > ma0) mc0 = ma0;
      end
    end
    if (p0 == RS_INC && mc0 < ma0) mc0++; else if (p0 == RS_DEC && mc0 > 1) mc0--;
    if (p1 == RS_INC && mc1 < a1)  mc1++; else if (p1 == RS_DEC && mc1 > 1) mc1--;
    lost = (old0 & ~m0(mc0)) | (old1 & ~m1(mc1));
    @(negedge clk);
    nalloc0 = a; nact0 = p0; nact1 = p1; cmd_vld = 1;
    @(negedge clk);
    cmd_vld = 0;
    check_state();
    chk("ev_alloc", ev_alloc == moved);
    chk("ev_alloc_skip", ev_alloc_skip == skip);
    chk("flush_req", flush_req == (lost != '0));
    chk("flush_mask", flush_mask == lost);
    if (moved) n_moves++;
    if (skip) n_skips++;
    if (lost != '0) n_flush++;
    @(negedge clk);
    chk("flush_req one cycle", !flush_req);
  endtask

  function automatic resize_e rnd(input int bias_dec);
    int r = $urandom % 10;
    if (r < bias_dec) return RS_DEC;
    if (r < 8) return RS_INC;
    return RS_KEEP;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ma0 = W / 2; mc0 = W / 2; mc1 = W / 2;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // shared mode: everything usable and powered, commands ignored
    chk("shared use0", use0 == '1);
    chk("shared use1", use1 == '1);
    chk("shared pwr", pwr == '1);
    @(negedge clk);
    cmd_vld = 1; nalloc0 = RS_INC; nact0 = RS_DEC;
    @(negedge clk);
    cmd_vld = 0;
    chk("shared ignores commands", alloc0 == CW'(W / 2) && !flush_req);
    // enter partitioned mode: full flush
    part_en = 1;
    @(negedge clk);
    chk("mode switch flush", flush_req && flush_mask == '1);
    check_state();
    for (int i = 0; i < 3000; i++) begin
      int phase = (i / 300) % 3;
      command(rnd(phase == 0 ? 6 : phase == 1 ? 2 : 4), rnd(phase == 0 ? 7 : 3), rnd(phase == 2 ? 7 : 4));
    end
    // leave and re-enter partitioned mode
    part_en = 0;
    @(negedge clk);
    @(negedge clk);
    chk("back to shared", use0 == '1 && use1 == '1 && !flush_req);
    part_en = 1;
    @(negedge clk);
    chk("re-entry flush", flush_req && flush_mask == '1);
    check_state();
    chk("moves seen", n_moves > 0);
    chk("skips seen", n_skips > 0);
    chk("flushes seen", n_flush > 0);
    $display("moves=%0d skips=%0d flushes=%0d", n_moves, n_skips, n_flush);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
