// tb_resize_fsm: self-checking test of the asymmetric state machine.
//
// First checks the documented sequence for the 3-bit machine: six dec
// requests in a row give KEEP, the seventh gives DEC, later ones give DEC,
// and a single inc gives INC and returns to state 000. Then drives random
// inc / dec / keep requests (dec-heavy so the DEC state is reached) into a
// 3-bit and a 2-bit machine and compares command and state each step with a
// model written here. Steps are spaced by idle cycles to check that the
// machine only moves when enabled, and that the command arrives one cycle
// after the enable.
module tb_resize_fsm;
  import pac_pkg::*;
  logic clk = 0, rst_n = 0, en = 0;
  resize_e nxt = RS_KEEP;
  resize_e nact3, nact2;
  logic    v3, v2;
  logic [2:0] st3;
  logic [1:0] st2;
  int checks = 0, failures = 0;
  int m3 = 0, m2 = 0;

  resize_fsm #(.SM_BITS(3)) dut3 (.clk, .rst_n, .en, .nxt, .nact(nact3), .nact_vld(v3), .state_o(st3));
  resize_fsm #(.SM_BITS(2)) dut2 (.clk, .rst_n, .en, .nxt, .nact(nact2), .nact_vld(v2), .state_o(st2));

  always #5 clk = ~clk;

  function automatic resize_e model(inout int s, input resize_e r, input int top);
    if (r == RS_INC) begin s = 0; return RS_INC; end
    if (r == RS_DEC) begin
      if (s >= top - 1) begin s = top; return RS_DEC; end
      s = s + 1; return RS_KEEP;
    end
    return RS_KEEP;
  endfunction

  task automatic step(input resize_e r);
    resize_e e3, e2;
    e3 = model(m3, r, 7);
    e2 = model(m2, r, 3);
    @(negedge clk);
    nxt = r; en = 1;
    @(negedge clk);
    en = 0; nxt = RS_KEEP;
    checks += 4;
    if (!v3 || nact3 != e3) begin failures++; $display("FAIL 3-bit cmd got=%0d exp=%0d", nact3, e3); end
    if (32'(st3) != m3)     begin failures++; $display("FAIL 3-bit state got=%0d exp=%0d", st3, m3); end
    if (!v2 || nact2 != e2) begin failures++; $display("FAIL 2-bit cmd got=%0d exp=%0d", nact2, e2); end
    if (32'(st2) != m2)     begin failures++; $display("FAIL 2-bit state got=%0d exp=%0d", st2, m2); end
    repeat ($urandom % 3) begin
      @(negedge clk);
      checks++;
      if (v3 || 32'(st3) != m3) begin failures++; $display("FAIL moved without enable"); end
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int dec_seen = 0;
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    // documented sequence
    for (int i = 1; i <= 6; i++) begin
      step(RS_DEC);
      checks++;
      if (nact3 != RS_KEEP || 32'(st3) != i) begin failures++; $display("FAIL dec #%0d", i); end
    end
    step(RS_DEC);
    checks++;
    if (nact3 != RS_DEC || st3 != 3'b111) begin failures++; $display("FAIL 7th dec"); end
    step(RS_DEC);
    checks++;
    if (nact3 != RS_DEC || st3 != 3'b111) begin failures++; $display("FAIL 8th dec"); end
    step(RS_INC);
    checks++;
    if (nact3 != RS_INC || st3 != 3'b000) begin failures++; $display("FAIL inc from 111"); end
    // random
    for (int i = 0; i < 1500; i++) begin
      int r;
      r = $urandom % 10;
      step(r < 7 ? RS_DEC : r < 8 ? RS_INC : RS_KEEP);
      if (nact3 == RS_DEC) dec_seen++;
    end
    checks++;
    if (dec_seen == 0) begin failures++; $display("FAIL DEC never reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
