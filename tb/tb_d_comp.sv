// tb_d_comp: self-checking test of the allocation comparator.
//
// Random and equal D0 / D1 pairs; expects INC for D0 > D1, DEC for D0 < D1
// and KEEP for equal values.
module tb_d_comp;
  import pac_pkg::*;
  localparam int unsigned N = 16;
  logic [N-1:0] d0, d1;
  resize_e      na;
  int checks = 0, failures = 0;

  d_comp #(.N(N)) dut (.d0(d0), .d1(d1), .nalloc0(na));

  task automatic check(input logic [N-1:0] x, input logic [N-1:0] y);
    resize_e exp;
    d0 = x; d1 = y;
    #1;
    exp = (x > y) ? RS_INC : (x < y) ? RS_DEC : RS_KEEP;
    checks++;
    if (na != exp) begin
      failures++;
      $display("FAIL d0=%0d d1=%0d got=%0d exp=%0d", x, y, na, exp);
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
    check(0, 0);
    check(1, 0);
    check(0, 1);
    check(16'hFFFF, 16'hFFFE);
    for (int i = 0; i < 2000; i++) begin
      logic [N-1:0] x;
      x = N'($urandom);
      check(x, (i % 3 == 0) ? x : N'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
