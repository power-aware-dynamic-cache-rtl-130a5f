// t_comp: the T_COMP block of the cache controller (local behaviour).
//
// Compares one core's locality metric D with the two thresholds t1 < t2.
// D above t2 means low locality and gives an up-sizing request (inc); D below
// t1 gives a down-sizing request (dec); otherwise keep. The thresholds use the
// same N-bit fraction format as D. Purely combinational; the output is the
// 2-bit NXT bus that feeds the state machine.
module t_comp
  import pac_pkg::*;
#(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0] d,    // D of one core
  input  logic [N-1:0] t1,   // lower threshold
  input  logic [N-1:0] t2,   // upper threshold
  output resize_e      nxt   // local request: inc, dec or keep
);

  always_comb begin
    if (d > t2)      nxt = RS_INC;
    else if (d < t1) nxt = RS_DEC;
    else             nxt = RS_KEEP;
  end

endmodule
