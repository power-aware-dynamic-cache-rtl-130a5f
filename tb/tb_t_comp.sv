// tb_t_comp: self-checking test of the threshold comparator.
//
// Uses the three threshold pairs of the evaluation, (0.001, 0.005),
// (0.01, 0.05) and (0.1, 0.5) as 16-bit fractions, and D values on, just
// below and just above each threshold as well as random ones.
module tb_t_comp;
  import pac_pkg::*;
  localparam int unsigned N = 16;
  logic [N-1:0] d, t1, t2;
  resize_e      nxt;
  int checks = 0, failures = 0;

  t_comp #(.N(N)) dut (.d(d), .t1(t1), .t2(t2), .nxt(nxt));

  task automatic check(input logic [N-1:0] dv);
    resize_e exp;
    d = dv;
    #1;
    exp = (dv > t2) ? RS_INC : (dv < t1) ? RS_DEC : RS_KEEP;
    checks++;
    if (nxt != exp) begin
      failures++;
      $display("FAIL d=%0d t1=%0d t2=%0d got=%0d exp=%0d", dv, t1, t2, nxt, exp);
    end
  endtask

  // thresholds: round(x * 65536)
  logic [N-1:0] th1 [3] = '{16'd66, 16'd655, 16'd6554};
  logic [N-1:0] th2 [3] = '{16'd328, 16'd3277, 16'd32768};

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 3; k++) begin
      t1 = th1[k];
      t2 = th2[k];
      check(t1 - 1);
      check(t1);
      check(t1 + 1);
      check(t2 - 1);
      check(t2);
      check(t2 + 1);
      check(0);
      check('1);
      for (int i = 0; i < 500; i++) check(N'($urandom % (2 * 32'(t2) + 2)));
    end
    // the three outcomes by name at (0.001, 0.005)
    t1 = 16'd66; t2 = 16'd328;
    d = 16'd10;  #1; checks++; if (nxt != RS_DEC)  failures++;
    d = 16'd100; #1; checks++; if (nxt != RS_KEEP) failures++;
    d = 16'd400; #1; checks++; if (nxt != RS_INC)  failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
