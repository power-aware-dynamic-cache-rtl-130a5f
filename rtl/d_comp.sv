// d_comp: the D_COMP block of the cache controller (way-allocation decision).
//
// Compares the locality metrics of the two cores. The core with the larger D
// (lower locality) is taken to need more ways, so: D0 > D1 asks for one more
// way for core 0 (RS_INC), D0 < D1 asks for one fewer (RS_DEC, i.e. one more
// for core 1), and equal values keep the partition (RS_KEEP). The output is
// the 2-bit NALLOC0 bus of the block diagram. Purely combinational.
module d_comp
  import pac_pkg::*;
#(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0] d0,       // D of core 0
  input  logic [N-1:0] d1,       // D of core 1
  output resize_e      nalloc0   // allocation change for core 0
);

  always_comb begin
    if (d0 > d1)      nalloc0 = RS_INC;
    else if (d0 < d1) nalloc0 = RS_DEC;
    else              nalloc0 = RS_KEEP;
  end

endmodule
