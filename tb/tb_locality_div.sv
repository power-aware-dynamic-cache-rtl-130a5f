// tb_locality_div: self-checking test of the locality divider.
//
// Drives edge cases and random MRU / LRU counts into dividers of the four
// widths the controller is meant for (8, 12, 16 and 20 bits) and compares the quotient with floor(lru * 2^N / mru) computed
// here in 64-bit arithmetic, including the saturation cases (ratio >= 1,
// MRU count zero).
module tb_locality_div;
  localparam int unsigned N  = 16;
  localparam int unsigned N8 = 8;
  localparam int unsigned N12 = 12;
  localparam int unsigned N20 = 20;

  logic [N-1:0]  a, b, q;
  logic [N8-1:0] a8, b8, q8;
  logic [N12-1:0] a12, b12, q12;
  logic [N20-1:0] a20, b20, q20;
  int checks = 0, failures = 0;
  logic clk = 0;

  locality_div #(.N(N))  dut   (.diva(a),  .divb(b),  .divq(q));
  locality_div #(.N(N8)) dut8  (.diva(a8), .divb(b8), .divq(q8));
  locality_div #(.N(N12)) dut12 (.diva(a12), .divb(b12), .divq(q12));
  locality_div #(.N(N20)) dut20 (.diva(a20), .divb(b20), .divq(q20));

  always #5 clk = ~clk;

  function automatic longint unsigned ref_q(longint unsigned av, longint unsigned bv, int n);
    longint unsigned all1 = (64'd1 << n) - 1;
    if (av == 0) return (bv == 0) ? 0 : all1;
    if (bv >= av) return all1;
    return (bv << n) / av;
  endfunction

  task automatic check16(input logic [N-1:0] av, input logic [N-1:0] bv);
    a = av; b = bv;
    #1;
    checks++;
    if (64'(q) != ref_q(av, bv, N)) begin
      failures++;
      $display("FAIL N=16 mru=%0d lru=%0d q=%0d exp=%0d", av, bv, q, ref_q(av, bv, N));
    end
  endtask

  task automatic check8(input logic [N8-1:0] av, input logic [N8-1:0] bv);
    a8 = av; b8 = bv;
    #1;
    checks++;
    if (64'(q8) != ref_q(av, bv, N8)) begin
      failures++;
      $display("FAIL N=8 mru=%0d lru=%0d q=%0d exp=%0d", av, bv, q8, ref_q(av, bv, N8));
    end
  endtask

  task automatic check12(input logic [N12-1:0] av, input logic [N12-1:0] bv);
    a12 = av; b12 = bv;
    #1;
    checks++;
    if (64'(q12) != ref_q(av, bv, N12)) begin
      failures++;
      $display("FAIL N=12 mru=%0d lru=%0d q=%0d exp=%0d", av, bv, q12, ref_q(av, bv, N12));
    end
  endtask

  task automatic check20(input logic [N20-1:0] av, input logic [N20-1:0] bv);
    a20 = av; b20 = bv;
    #1;
    checks++;
    if (64'(q20) != ref_q(av, bv, N20)) begin
      failures++;
      $display("FAIL N=20 mru=%0d lru=%0d q=%0d exp=%0d", av, bv, q20, ref_q(av, bv, N20));
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // edge cases
    check16(0, 0);
    check16(0, 5);
    check16(1000, 1);      // 1/1000 -> 65
    check16(1000, 5);      // 5/1000 -> 327
    check16(10, 1);        // 0.1 -> 6553
    check16(2, 1);         // 0.5 -> 32768
    check16(7, 7);
    check16(3, 9);
    check16(16'hFFFF, 16'hFFFE);
    check16(16'hFFFF, 1);
    check8(0, 0);
    check8(255, 254);
    check8(3, 1);
    check12(0, 0);
    check12(4095, 4094);
    check12(1000, 1);      // 1/1000 -> 4
    check20(0, 7);
    check20(20'hFFFFF, 20'hFFFFE);
    check20(1000, 1);      // 1/1000 -> 1048
    check20(2, 1);         // 0.5 -> 524288
    // random, mostly lru < mru
    for (int i = 0; i < 3000; i++) begin
      logic [N-1:0] av, bv;
      av = N'($urandom);
      bv = (i % 4 == 0) ? N'($urandom) : N'($urandom % (32'(av) + 1));
      check16(av, bv);
      check8(N8'($urandom), N8'($urandom % 64));
      av = N'($urandom);
      check12(N12'(av), N12'($urandom % (32'(N12'(av)) + 1)));
      check20(N20'($urandom), (i % 4 == 0) ? N20'($urandom) : N20'($urandom % 4096));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
